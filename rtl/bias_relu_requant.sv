// bias_relu_requant: the BiasAdd, ReLU and Requantization core. It turns the
// 32-bit convolution sums of P_OL output maps into 8-bit output codes.
//
// Accumulation over input-map groups: when a layer has more input maps than
// the intra-feature-map parallelism, each output pixel is computed in several
// iterations, one per group of input maps. The partial sums of all output
// pixels are kept in a buffer (MAX_OUT_PIX x P_OL words): the first iteration
// (acc_first) writes them, later ones add to them, and only the last one
// (acc_last) goes on to the output arithmetic. With a single group both
// flags are set and the buffer is not used.
//
// Output arithmetic, per output map o of the group, with b = bias[ofm_base+o]:
//   y   = rescale(acc, m1, s1) + (b - b_zp)      acc brought to the bias scale
//   r   = max(y, 0)                               ReLU
//   out = clamp(rescale(r, m2, s2) + out_zp, 0, 255)
// where rescale(x, m, s) = round(x * m / 2^(31+s)) (Q31 multiplier, gemmlowp).
// The 8-bit biases of up to N_OFM output maps are cached in an on-chip
// memory that the host writes through bias_we/bias_addr/bias_data.
//
// Interface: start resets the pixel counter for a new iteration (cmd gives
// the flags and ofm_base). in_* is one beat of P_OL sums per output pixel,
// out_* one beat of P_OL codes per output pixel (only when acc_last).
// pix_done rises once out_h * out_w beats have been taken.
// Timing: one register stage, one pixel per cycle.
//
// From the published design: the accumulation of partial results, the bias
// subtraction of its zero point, the two rescales, ReLU and the 8-bit
// output. The rescale format, the clamp and the buffer layout are this
// design's choices.
module bias_relu_requant
  import acc_pkg::*;
#(
  parameter int unsigned P_OL        = 48,   // intra-layer parallelism
  parameter int unsigned N_OFM       = 96,   // output maps of the layer
  parameter int unsigned MAX_OUT_PIX = 3025  // 55 x 55 output pixels
) (
  input  logic       clk,
  input  logic       rst_n,
  input  layer_cfg_t cfg,
  input  iter_cmd_t  cmd,
  input  logic       start,
  // bias cache write port (host)
  input  logic                       bias_we,
  input  logic [$clog2(N_OFM)-1:0]   bias_addr,
  input  q8_t                        bias_data,
  // convolution sums
  input  logic       in_valid,
  output logic       in_ready,
  input  acc_t       in_data [P_OL],
  // output codes
  output logic       out_valid,
  input  logic       out_ready,
  output q8_t        out_data [P_OL],
  output logic       pix_done
);
  localparam int unsigned PW = $clog2(MAX_OUT_PIX);

  q8_t  bias_mem [N_OFM];
  acc_t psum     [MAX_OUT_PIX][P_OL];

  logic [PW:0] pix;
  logic        take;
  logic        emit;
  logic [31:0] npix;

  assign npix     = 32'(cfg.out_h) * 32'(cfg.out_w);
  assign in_ready = !pix_done && (!out_valid || out_ready);
  assign take     = in_valid && in_ready;
  assign emit     = take && cmd.acc_last;

  always_ff @(posedge clk) begin
    if (bias_we) bias_mem[bias_addr] <= bias_data;
  end

  // sum over the input-map groups seen so far
  acc_t total [P_OL];
  q8_t  code  [P_OL];
  always_comb begin
    for (int o = 0; o < P_OL; o++) begin
      logic signed [63:0] y, r, z;
      total[o] = cmd.acc_first ? in_data[o]
                               : in_data[o] + psum[PW'(pix)][o];
      y = rescale(64'(total[o]), cfg.m1, cfg.s1)
        + 64'($signed({1'b0, bias_mem[32'(cmd.ofm_base) + 32'(o)]}))
        - 64'($signed({1'b0, cfg.b_zp}));
      r = (y < 0) ? 64'sd0 : y;
      z = rescale(r, cfg.m2, cfg.s2) + 64'($signed({1'b0, cfg.out_zp}));
      code[o] = (z > 64'sd255) ? 8'd255 : q8_t'(z);
    end
  end

  always_ff @(posedge clk) begin
    if (take && !cmd.acc_last)
      for (int o = 0; o < P_OL; o++) psum[PW'(pix)][o] <= total[o];
    if (emit)
      for (int o = 0; o < P_OL; o++) out_data[o] <= code[o];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix       <= '0;
      pix_done  <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      if (start) begin
        pix      <= '0;
        pix_done <= 1'b0;
      end else if (take) begin
        pix <= pix + 1'b1;
        if (32'(pix) == npix - 1) pix_done <= 1'b1;
      end
      if (emit)           out_valid <= 1'b1;
      else if (out_ready) out_valid <= 1'b0;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   start |-> (32'(cmd.ofm_base) + P_OL <= N_OFM));
endmodule
