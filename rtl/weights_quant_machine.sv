// weights_quant_machine: removes the weight zero point from the 8-bit weight
// codes that arrive from main memory over the weights DMA stream:
// v = w - w_zp, 9-bit signed, one weight per beat.
//
// Interface: valid/ready stream in (one 8-bit code per beat), valid/ready
// stream out (one 9-bit signed value per beat).
// Timing: one register stage; one weight per cycle.
//
// The subtraction of the zero point follows the published design; the one-weight beat
// and the handshake are this design's choices.
module weights_quant_machine
  import acc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  q8_t  w_zp,
  input  logic in_valid,
  output logic in_ready,
  input  q8_t  in_data,
  output logic out_valid,
  input  logic out_ready,
  output qv_t  out_data
);
  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (in_valid && in_ready)
      out_data <= $signed({1'b0, in_data}) - $signed({1'b0, w_zp});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        out_valid <= 1'b0;
    else if (in_ready) out_valid <= in_valid;
  end
endmodule
