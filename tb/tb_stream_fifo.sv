// tb_stream_fifo: self-checking test of the FIFO queue. Random push and pop
// pressure on both sides; every popped word is compared with a reference
// queue. Also checks that a full queue refuses a push when nothing is popped
// and that a pushed word is visible one cycle later.
module tb_stream_fifo;
  localparam int W = 8, D = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  int checks = 0, failures = 0;
  logic [W-1:0] ref_q [$];

  stream_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // fill it without popping
    for (int i = 0; i < D; i++) begin
      in_valid = 1; in_data = W'(8'hA0 + i);
      checks++; if (!in_ready) failures++;
      @(posedge clk); ref_q.push_back(in_data); @(negedge clk);
    end
    in_valid = 1; in_data = 8'hFF;
    checks++; if (in_ready) begin failures++; $display("full FIFO accepted a push"); end
    in_valid = 0;
    // random traffic
    for (int n = 0; n < 3000; n++) begin
      in_valid  = ($urandom_range(0, 3) != 0);
      out_ready = ($urandom_range(0, 2) != 0);
      in_data   = W'($urandom);
      @(posedge clk);
      if (out_valid && out_ready) begin
        logic [W-1:0] exp;
        exp = ref_q.pop_front();
        checks++;
        if (out_data !== exp) begin
          failures++;
          if (failures < 10) $display("pop %0d: got %h expected %h", n, out_data, exp);
        end
      end
      if (in_valid && in_ready) ref_q.push_back(in_data);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
