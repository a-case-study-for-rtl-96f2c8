// data_saver: pre-fetching and caching core in front of the convolutional
// core. It takes the input feature maps from the input DMA stream once, stores
// them in on-chip memory, and then replays them as many times as the layer
// needs (once per group of output maps) in the order the convolutional core
// consumes them.
//
// Loading (load_start, then in_valid/in_ready/in_data): the stream carries one
// 8-bit code per beat in height-width-channel order (channel fastest), the
// TensorFlow NHWC layout. Channel c goes to memory bank c mod P_IFM, at row
// (c div P_IFM) * in_h * in_w + y * in_w + x, so that one read returns the same
// pixel of P_IFM input maps. loaded rises when in_h * in_w * in_ch beats
// have been taken.
//
// Replay (run_start with ifm_group): for each output pixel (oy, ox), in raster
// order, and for each filter tap (ky, kx), in raster order, one beat carries
// P_IFM codes of input pixel (oy*stride + ky - pad, ox*stride + kx - pad) of
// the selected group. Taps that fall in the padding, and lanes past the last
// input map, carry the input zero point, which the input quantization machine
// turns into zero. A window is therefore k*k consecutive beats; the core that
// consumes them closes one convolution every k*k beats. run_done pulses when
// the last beat enters the output register.
//
// Timing: the memory is read synchronously (one cycle), with the read enabled
// only when the output register is free, so one beat leaves per cycle while
// out_ready stays high.
//
// From the published design: storing the inputs on chip once and re-ordering
// them for the parallelism of the convolutional core. The stream order,
// the memory layout and the padding by zero point are this design's choices.
module data_saver
  import acc_pkg::*;
#(
  parameter int unsigned P_IFM   = 3,     // intra-feature-map parallelism
  parameter int unsigned MAX_PIX = 51529, // 227 x 227 input pixels
  parameter int unsigned MAX_GRP = 1      // input-map groups held at once
) (
  input  logic              clk,
  input  logic              rst_n,
  input  layer_cfg_t        cfg,
  // loading from the input DMA
  input  logic              load_start,
  input  logic              in_valid,
  output logic              in_ready,
  input  q8_t               in_data,
  output logic              loaded,
  // replay towards the input quantization machine
  input  logic              run_start,
  input  logic [CH_W-1:0]   ifm_group,
  output logic              out_valid,
  input  logic              out_ready,
  output q8_t               out_data [P_IFM],
  output logic              run_done
);
  localparam int unsigned DEPTH = MAX_PIX * MAX_GRP;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned LW    = (P_IFM > 1) ? $clog2(P_IFM) : 1;

  q8_t mem [P_IFM][DEPTH];

  // ---------------- loading ----------------
  logic             loading;
  logic [CH_W-1:0]  ld_lane, ld_grp;
  logic [CH_W-1:0]  ld_ch;
  logic [DIM_W-1:0] ld_x, ld_y;
  logic [AW-1:0]    ld_pix;       // y * in_w + x
  logic [31:0]      plane;        // in_h * in_w

  assign plane    = 32'(cfg.in_h) * 32'(cfg.in_w);
  assign in_ready = loading;

  always_ff @(posedge clk) begin
    if (in_valid && in_ready)
      mem[LW'(ld_lane)][AW'(32'(ld_grp) * plane + 32'(ld_pix))] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      loading <= 1'b0;
      loaded  <= 1'b0;
      ld_lane <= '0; ld_grp <= '0; ld_ch <= '0;
      ld_x    <= '0; ld_y   <= '0; ld_pix <= '0;
    end else if (load_start) begin
      loading <= 1'b1;
      loaded  <= 1'b0;
      ld_lane <= '0; ld_grp <= '0; ld_ch <= '0;
      ld_x    <= '0; ld_y   <= '0; ld_pix <= '0;
    end else if (in_valid && in_ready) begin
      if (ld_ch == cfg.in_ch - 1'b1) begin
        ld_ch <= '0; ld_lane <= '0; ld_grp <= '0;
        ld_pix <= ld_pix + 1'b1;
        if (ld_x == cfg.in_w - 1'b1) begin
          ld_x <= '0;
          if (ld_y == cfg.in_h - 1'b1) begin
            loading <= 1'b0;
            loaded  <= 1'b1;
          end
          ld_y <= ld_y + 1'b1;
        end else begin
          ld_x <= ld_x + 1'b1;
        end
      end else begin
        ld_ch <= ld_ch + 1'b1;
        if (ld_lane == CH_W'(P_IFM - 1)) begin
          ld_lane <= '0;
          ld_grp  <= ld_grp + 1'b1;
        end else begin
          ld_lane <= ld_lane + 1'b1;
        end
      end
    end
  end

  // ---------------- replay ----------------
  logic             running;
  logic [CH_W-1:0]  grp;
  logic [DIM_W-1:0] ox, oy;
  logic [K_W-1:0]   kx, ky;
  logic             adv;
  logic signed [DIM_W+4:0] ix, iy;
  logic             in_map;
  logic             last_beat;

  assign adv = running && (!out_valid || out_ready);
  assign iy  = $signed({5'd0, oy}) * $signed({11'd0, cfg.stride})
               + $signed({10'd0, ky}) - $signed({11'd0, cfg.pad});
  assign ix  = $signed({5'd0, ox}) * $signed({11'd0, cfg.stride})
               + $signed({10'd0, kx}) - $signed({11'd0, cfg.pad});
  assign in_map = (iy >= 0) && (ix >= 0)
               && (iy < $signed({5'b00000, cfg.in_h}))
               && (ix < $signed({5'b00000, cfg.in_w}));
  assign last_beat = (kx == cfg.k - 1'b1) && (ky == cfg.k - 1'b1)
                  && (ox == cfg.out_w - 1'b1) && (oy == cfg.out_h - 1'b1);

  logic [AW-1:0] rd_addr;
  assign rd_addr = AW'(32'(grp) * plane + 32'(iy) * 32'(cfg.in_w) + 32'(ix));

  always_ff @(posedge clk) begin
    if (adv) begin
      for (int l = 0; l < P_IFM; l++) begin
        if (in_map && (32'(grp) * P_IFM + 32'(l) < 32'(cfg.in_ch)))
          out_data[l] <= mem[l][rd_addr];
        else
          out_data[l] <= cfg.in_zp;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running   <= 1'b0;
      out_valid <= 1'b0;
      run_done  <= 1'b0;
      grp <= '0; ox <= '0; oy <= '0; kx <= '0; ky <= '0;
    end else begin
      run_done <= 1'b0;
      if (out_valid && out_ready && !adv) out_valid <= 1'b0;
      if (run_start) begin
        running <= 1'b1;
        grp <= ifm_group; ox <= '0; oy <= '0; kx <= '0; ky <= '0;
      end else if (adv) begin
        out_valid <= 1'b1;
        if (last_beat) begin
          running  <= 1'b0;
          run_done <= 1'b1;
        end
        if (kx == cfg.k - 1'b1) begin
          kx <= '0;
          if (ky == cfg.k - 1'b1) begin
            ky <= '0;
            if (ox == cfg.out_w - 1'b1) begin
              ox <= '0;
              oy <= oy + 1'b1;
            end else begin
              ox <= ox + 1'b1;
            end
          end else begin
            ky <= ky + 1'b1;
          end
        end else begin
          kx <= kx + 1'b1;
        end
      end
    end
  end

  // No new replay or load may start while a replay is under way.
  assert property (@(posedge clk) disable iff (!rst_n) running |-> !load_start);
endmodule
