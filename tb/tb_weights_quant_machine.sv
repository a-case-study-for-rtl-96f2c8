// tb_weights_quant_machine: self-checking test of the weight zero-point
// subtraction. Random weight codes and zero points, random back-pressure;
// every output must equal code - zero_point, in order, with none lost.
module tb_weights_quant_machine;
  import acc_pkg::*;
  logic clk = 0, rst_n = 0;
  q8_t  w_zp, in_data;
  logic in_valid, in_ready, out_valid, out_ready;
  qv_t  out_data;
  int checks = 0, failures = 0, sent = 0, got = 0;
  int exp_q [$];

  weights_quant_machine dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; w_zp = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int z = 0; z < 3; z++) begin
      w_zp = (z == 0) ? 8'd0 : (z == 1) ? 8'd255 : 8'd77;
      for (int n = 0; n < 1000; n++) begin
        @(negedge clk);
        in_valid  = ($urandom_range(0, 3) != 0);
        out_ready = ($urandom_range(0, 3) != 0);
        in_data   = 8'($urandom);
        @(posedge clk);
        if (out_valid && out_ready) begin
          int e;
          e = exp_q.pop_front();
          checks++; got++;
          if (int'(out_data) != e) begin
            failures++;
            if (failures < 10) $display("got %0d expected %0d", out_data, e);
          end
        end
        if (in_valid && in_ready) begin
          exp_q.push_back(int'(in_data) - int'(w_zp));
          sent++;
        end
      end
      @(negedge clk); in_valid = 0; out_ready = 1;
      @(posedge clk);
      if (out_valid) begin
        int e; e = exp_q.pop_front(); checks++; got++;
        if (int'(out_data) != e) failures++;
      end
    end
    checks++;
    if (sent != got) begin failures++; $display("sent %0d got %0d", sent, got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
