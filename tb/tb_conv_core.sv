// tb_conv_core: self-checking test of the MAC array. For two filter sizes
// (3 and 5, the same hardware) it loads random weights, feeds random windows
// and compares every output sum with a sum of products computed here. It also
// checks that inputs are refused until all weights are loaded, that one
// window of k*k beats takes k*k cycles when nothing stalls (one ce per
// window), and that results survive output back-pressure.
module tb_conv_core;
  import acc_pkg::*;
  localparam int PI = 2, PO = 3, KM = 5, NW = 20;
  logic clk = 0, rst_n = 0;
  logic [K_W-1:0] k;
  logic start, w_valid, w_ready, w_loaded, x_valid, x_ready, out_valid, out_ready, ce;
  qv_t  w_data;
  qv_t  x_data [PI];
  acc_t out_data [PO];
  int checks = 0, failures = 0;

  int wref [PO][PI][KM*KM];
  int xref [NW][PI][KM*KM];

  conv_core #(.P_IFM(PI), .P_OL(PO), .K_MAX(KM)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // collect and check the outputs
  int win_out = 0, ce_cnt = 0;
  always @(posedge clk) if (rst_n) begin
    if (ce) ce_cnt++;
    if (out_valid && out_ready) begin
      for (int o = 0; o < PO; o++) begin
        int e;
        e = 0;
        for (int i = 0; i < PI; i++)
          for (int t = 0; t < int'(k) * int'(k); t++) e += xref[win_out][i][t] * wref[o][i][t];
        checks++;
        if (out_data[o] !== e) begin
          failures++;
          if (failures < 10) $display("k=%0d win %0d map %0d: got %0d expected %0d", k, win_out, o, out_data[o], e);
        end
      end
      win_out++;
    end
  end

  task automatic run(input int kk_sz, input bit stall_out);
    int kk, t0, t1;
    kk = kk_sz * kk_sz;
    @(negedge clk);
    k = K_W'(kk_sz); start = 1;
    @(negedge clk); start = 0;
    for (int o = 0; o < PO; o++) for (int i = 0; i < PI; i++) for (int t = 0; t < kk; t++)
      wref[o][i][t] = $urandom_range(0, 510) - 255;
    for (int n = 0; n < NW; n++) for (int i = 0; i < PI; i++) for (int t = 0; t < kk; t++)
      xref[n][i][t] = $urandom_range(0, 510) - 255;
    // offer input before the weights: it must be refused
    x_valid = 1;
    for (int i = 0; i < PI; i++) x_data[i] = qv_t'(xref[0][i][0]);
    #1; checks++;
    if (x_ready) begin failures++; $display("input accepted before weights"); end
    x_valid = 0;
    for (int o = 0; o < PO; o++) for (int i = 0; i < PI; i++) for (int t = 0; t < kk; t++) begin
      w_valid = 1; w_data = qv_t'(wref[o][i][t]);
      @(posedge clk); @(negedge clk);
    end
    w_valid = 0;
    checks++; if (!w_loaded) begin failures++; $display("weights not loaded"); end
    win_out = 0; ce_cnt = 0;
    out_ready = 1;
    t0 = $time;
    for (int n = 0; n < NW; n++) for (int t = 0; t < kk; t++) begin
      x_valid = 1;
      for (int i = 0; i < PI; i++) x_data[i] = qv_t'(xref[n][i][t]);
      if (stall_out) out_ready = ($urandom_range(0, 1) == 1);
      #1;
      while (!x_ready) begin
        @(negedge clk);
        if (stall_out) out_ready = ($urandom_range(0, 1) == 1);
        #1;
      end
      @(negedge clk);
    end
    x_valid = 0; out_ready = 1;
    t1 = $time;
    repeat (3) @(negedge clk);
    checks++;
    if (win_out != NW || ce_cnt != NW) begin
      failures++; $display("windows out %0d ce %0d expected %0d", win_out, ce_cnt, NW);
    end
    if (!stall_out) begin
      checks++;
      if ((t1 - t0) != NW * kk * 10) begin
        failures++; $display("k=%0d: %0d windows took %0d cycles, expected %0d", kk_sz, NW, (t1 - t0) / 10, NW * kk);
      end
    end
  endtask

  initial begin
    start = 0; w_valid = 0; x_valid = 0; out_ready = 1; k = 3; w_data = 0;
    foreach (x_data[i]) x_data[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(3, 0);
    run(5, 0);
    run(3, 1);
    run(1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
