// stream_fifo: synchronous first-in first-out queue with valid/ready on both
// sides. The accelerator is a dataflow design in which every core talks to the
// next through such a queue, so a core that stalls (the convolutional core
// waiting for weights, the max-pooling core scanning its buffer) only fills
// the queue in front of it.
//
// Interface: in_valid/in_ready/in_data push a word when both are high;
// out_valid/out_ready/out_data pop the oldest word when both are high.
// Timing: a pushed word can be popped on the next cycle (no fall-through).
// A push and a pop may happen in the same cycle, also when the queue is full.
// DEPTH must be a power of two. The depth is this design's choice.
module stream_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wr_ptr, rd_ptr;
  logic             push, pop;

  assign out_valid = (wr_ptr != rd_ptr);
  assign in_ready  = ((wr_ptr - rd_ptr) != (AW+1)'(DEPTH)) || out_ready;
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rd_ptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (push) wr_ptr <= wr_ptr + 1'b1;
      if (pop)  rd_ptr <= rd_ptr + 1'b1;
    end
  end

  // The queue never overflows nor underflows.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (wr_ptr - rd_ptr) <= (AW+1)'(DEPTH));
endmodule
