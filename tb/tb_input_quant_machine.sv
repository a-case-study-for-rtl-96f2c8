// tb_input_quant_machine: self-checking test of the input zero-point
// subtraction. Random codes and zero points on all lanes, random back-pressure;
// every output beat must equal code - zero_point, in order, with no beat lost.
module tb_input_quant_machine;
  import acc_pkg::*;
  localparam int P = 4;
  logic clk = 0, rst_n = 0;
  q8_t  in_zp;
  logic in_valid, in_ready, out_valid, out_ready;
  q8_t  in_data [P];
  qv_t  out_data [P];
  int checks = 0, failures = 0, sent = 0, got = 0;
  int exp_q [$];

  input_quant_machine #(.P_IFM(P)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_zp = 8'd128;
    foreach (in_data[l]) in_data[l] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int z = 0; z < 3; z++) begin
      in_zp = (z == 0) ? 8'd0 : (z == 1) ? 8'd255 : 8'($urandom);
      for (int n = 0; n < 1000; n++) begin
        @(negedge clk);
        in_valid  = ($urandom_range(0, 3) != 0);
        out_ready = ($urandom_range(0, 3) != 0);
        foreach (in_data[l]) in_data[l] = 8'($urandom);
        @(posedge clk);
        if (out_valid && out_ready) begin
          for (int l = 0; l < P; l++) begin
            int e;
            e = exp_q.pop_front();
            checks++;
            if (int'(out_data[l]) != e) begin
              failures++;
              if (failures < 10) $display("lane %0d got %0d expected %0d", l, out_data[l], e);
            end
          end
          got++;
        end
        if (in_valid && in_ready) begin
          for (int l = 0; l < P; l++) exp_q.push_back(int'(in_data[l]) - int'(in_zp));
          sent++;
        end
      end
      // drain before changing the zero point
      @(negedge clk); in_valid = 0; out_ready = 1;
      @(posedge clk);
      if (out_valid) begin
        for (int l = 0; l < P; l++) begin
          int e; e = exp_q.pop_front(); checks++;
          if (int'(out_data[l]) != e) failures++;
        end
        got++;
      end
    end
    checks++;
    if (sent != got) begin failures++; $display("sent %0d got %0d", sent, got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
