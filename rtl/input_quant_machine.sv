// input_quant_machine: removes the input zero point from the codes the
// DataSaver replays, so that the convolutional core multiplies plain signed
// values: v = q - in_zp, with q and in_zp 8-bit unsigned and v 9-bit signed.
// All P_IFM lanes of a beat are converted together.
//
// Interface: valid/ready stream in, valid/ready stream out.
// Timing: one register stage; one beat per cycle; a full output register
// that is not being read holds the input (in_ready low).
//
// The subtraction of the zero point follows the published design; the register stage
// and the handshake are this design's choices.
module input_quant_machine
  import acc_pkg::*;
#(
  parameter int unsigned P_IFM = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  q8_t  in_zp,
  input  logic in_valid,
  output logic in_ready,
  input  q8_t  in_data [P_IFM],
  output logic out_valid,
  input  logic out_ready,
  output qv_t  out_data [P_IFM]
);
  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (in_valid && in_ready)
      for (int l = 0; l < P_IFM; l++)
        out_data[l] <= $signed({1'b0, in_data[l]}) - $signed({1'b0, in_zp});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        out_valid <= 1'b0;
    else if (in_ready) out_valid <= in_valid;
  end
endmodule
