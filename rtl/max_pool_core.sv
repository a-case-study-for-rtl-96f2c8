// max_pool_core: the Max-Pooling core. It has the same data access pattern as
// the convolutional core (a window slid over a feature map, P_OL output maps
// side by side) but applies MAX instead of multiply-accumulate, so it needs
// no multipliers.
//
// With cfg.pool_en set, it first stores the whole out_h x out_w map of
// P_OL codes arriving from the requantization core (fill phase), then
// scans it: for each pooled pixel (py, px), in raster order, it reads the
// pool_k x pool_k window at (py*pool_s, px*pool_s) one element per cycle and
// emits the maximum of each of the P_OL lanes. While it scans, its input is
// held (in_ready low). Max pooling directly on 8-bit codes is exact because
// requantization is monotonic. With cfg.pool_en clear (layers without
// pooling) the beats pass straight through a register.
//
// Interface: valid/ready beats of P_OL 8-bit codes in and out.
// Timing: fill takes one cycle per pixel; the scan takes pool_k*pool_k cycles
// per pooled pixel, plus two cycles of read pipeline; bypass takes one cycle.
//
// From the published design: the MAX operator over windows of the same P_OL
// maps as the convolutional core. Buffering the whole map before the scan
// is this design's choice.
module max_pool_core
  import acc_pkg::*;
#(
  parameter int unsigned P_OL        = 48,   // intra-layer parallelism
  parameter int unsigned MAX_OUT_PIX = 3025  // 55 x 55 conv output pixels
) (
  input  logic       clk,
  input  logic       rst_n,
  input  layer_cfg_t cfg,
  input  logic       in_valid,
  output logic       in_ready,
  input  q8_t        in_data [P_OL],
  output logic       out_valid,
  input  logic       out_ready,
  output q8_t        out_data [P_OL]
);
  localparam int unsigned PW = $clog2(MAX_OUT_PIX);

  typedef enum logic [0:0] {FILL, SCAN} state_t;
  state_t state;

  q8_t buf_mem [MAX_OUT_PIX][P_OL];

  logic        hold;      // output register full and not read
  logic [PW:0] wr_pix;
  logic [31:0] npix;
  assign npix = 32'(cfg.out_h) * 32'(cfg.out_w);
  assign hold = out_valid && !out_ready;

  // ---------------- fill / bypass ----------------
  assign in_ready = (state == FILL) && !hold;

  always_ff @(posedge clk) begin
    if (cfg.pool_en && in_valid && in_ready)
      for (int o = 0; o < P_OL; o++) buf_mem[PW'(wr_pix)][o] <= in_data[o];
  end

  // ---------------- scan ----------------
  logic [DIM_W-1:0] px, py;
  logic [2:0]       wx, wy;
  logic             rd_valid, rd_first, rd_last;
  q8_t              rd_data [P_OL];
  q8_t              mx      [P_OL];
  logic [31:0]      rd_addr;
  logic             scan_adv;
  logic             win_last, map_last;

  assign scan_adv = (state == SCAN) && !hold;
  assign rd_addr  = (32'(py) * cfg.pool_s + 32'(wy)) * 32'(cfg.out_w)
                  + 32'(px) * cfg.pool_s + 32'(wx);
  assign win_last = (wx == cfg.pool_k - 1'b1) && (wy == cfg.pool_k - 1'b1);
  assign map_last = win_last && (px == cfg.pool_ow - 1'b1)
                             && (py == cfg.pool_oh - 1'b1);

  always_ff @(posedge clk) begin
    if (scan_adv)
      for (int o = 0; o < P_OL; o++) rd_data[o] <= buf_mem[PW'(rd_addr)][o];
    if (!hold && rd_valid)
      for (int o = 0; o < P_OL; o++)
        mx[o] <= (rd_first || rd_data[o] > mx[o]) ? rd_data[o] : mx[o];
    if (!hold) begin
      if (rd_valid && rd_last)
        for (int o = 0; o < P_OL; o++)
          out_data[o] <= (rd_first || rd_data[o] > mx[o]) ? rd_data[o] : mx[o];
      else if (!cfg.pool_en && in_valid && in_ready)
        out_data <= in_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= FILL;
      wr_pix    <= '0;
      px <= '0; py <= '0; wx <= '0; wy <= '0;
      rd_valid  <= 1'b0;
      rd_first  <= 1'b0;
      rd_last   <= 1'b0;
      out_valid <= 1'b0;
    end else if (!hold) begin
      // output register
      out_valid <= (rd_valid && rd_last)
                || (!cfg.pool_en && in_valid && in_ready);
      // read pipeline
      rd_valid <= scan_adv;
      rd_first <= (wx == '0) && (wy == '0);
      rd_last  <= win_last;
      case (state)
        FILL: if (cfg.pool_en && in_valid && in_ready) begin
          if (32'(wr_pix) == npix - 1) begin
            wr_pix <= '0;
            state  <= SCAN;
          end else begin
            wr_pix <= wr_pix + 1'b1;
          end
        end
        SCAN: begin
          if (wx == cfg.pool_k - 1'b1) begin
            wx <= '0;
            if (wy == cfg.pool_k - 1'b1) begin
              wy <= '0;
              if (px == cfg.pool_ow - 1'b1) begin
                px <= '0;
                py <= py + 1'b1;
              end else begin
                px <= px + 1'b1;
              end
            end else begin
              wy <= wy + 1'b1;
            end
          end else begin
            wx <= wx + 1'b1;
          end
          if (map_last) begin
            py    <= '0;
            state <= FILL;
          end
        end
        default: state <= FILL;
      endcase
    end
  end
endmodule
