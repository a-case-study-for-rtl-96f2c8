// tb_bias_relu_requant: self-checking test of the bias, ReLU and
// requantization core. A 4 x 3 output map of 3 output maps is computed in
// three input-map groups (first group writes partial sums, the middle one adds,
// the last one adds and emits); then a single-group iteration on the second
// group of output maps. Expected codes are computed here with 64-bit integer
// arithmetic: round(x*m/2^(31+s)), bias minus its zero point, ReLU, output
// zero point, clamp to 255. Random back-pressure on the output.
module tb_bias_relu_requant;
  import acc_pkg::*;
  localparam int PO = 3, NOFM = 6, NPIX = 12;
  logic clk = 0, rst_n = 0;
  layer_cfg_t cfg;
  iter_cmd_t cmd;
  logic start, bias_we, in_valid, in_ready, out_valid, out_ready, pix_done;
  logic [$clog2(NOFM)-1:0] bias_addr;
  q8_t bias_data;
  acc_t in_data [PO];
  q8_t out_data [PO];
  int checks = 0, failures = 0, relu_zero = 0, sat = 0;
  int bias [NOFM];
  longint sums [NPIX][PO];

  bias_relu_requant #(.P_OL(PO), .N_OFM(NOFM), .MAX_OUT_PIX(NPIX)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rs(longint x, longint m, int s);
    longint p;
    p = x * m + (64'sd1 <<< (30 + s));
    return p >>> (31 + s);
  endfunction

  function automatic int expected(longint acc, int b);
    longint y, z;
    y = rs(acc, longint'(cfg.m1), int'(cfg.s1)) + b - int'(cfg.b_zp);
    if (y < 0) y = 0;
    z = rs(y, longint'(cfg.m2), int'(cfg.s2)) + int'(cfg.out_zp);
    if (z > 255) z = 255;
    return int'(z);
  endfunction

  task automatic iteration(input int ofm_base, input int ngroups);
    int got;
    foreach (sums[p, o]) sums[p][o] = 0;
    for (int g = 0; g < ngroups; g++) begin
      @(negedge clk);
      cmd = '0;
      cmd.ofm_base = CH_W'(ofm_base); cmd.acc_first = (g == 0); cmd.acc_last = (g == ngroups - 1);
      start = 1; @(negedge clk); start = 0;
      got = 0;
      fork
        for (int p = 0; p < NPIX; p++) begin
          in_valid = 1;
          for (int o = 0; o < PO; o++) begin
            int v;
            v = $urandom_range(0, 200000) - 100000;
            if ($urandom_range(0, 9) == 0) v = v * 2000;   // drives the output into saturation
            in_data[o] = v; sums[p][o] += v;
          end
          #1;
          while (!in_ready) begin @(negedge clk); #1; end
          @(negedge clk);
        end
        if (cmd.acc_last)
          while (got < NPIX) begin
            out_ready = ($urandom_range(0, 2) != 0);
            @(posedge clk);
            if (out_valid && out_ready) begin
              for (int o = 0; o < PO; o++) begin
                int e;
                e = expected(sums[got][o], bias[ofm_base + o]);
                checks++;
                if (e == int'(cfg.out_zp)) relu_zero++;
                if (e == 255) sat++;
                if (int'(out_data[o]) != e) begin
                  failures++;
                  if (failures < 10) $display("pix %0d map %0d: got %0d expected %0d", got, o, out_data[o], e);
                end
              end
              got++;
            end
            @(negedge clk);
          end
      join
      in_valid = 0;
      @(negedge clk);
      checks++; if (!pix_done) begin failures++; $display("pix_done low"); end
      if (!cmd.acc_last) begin
        checks++; if (out_valid) begin failures++; $display("output from a non-final group"); end
      end
    end
    out_ready = 1;
  endtask

  initial begin
    cfg = '0;
    cfg.out_h = 4; cfg.out_w = 3;
    cfg.b_zp = 8'd120; cfg.out_zp = 8'd5;
    cfg.m1 = 32'h5000_0000; cfg.s1 = 6'd4;
    cfg.m2 = 32'h6100_0000; cfg.s2 = 6'd1;
    start = 0; bias_we = 0; in_valid = 0; out_ready = 1; bias_addr = 0; bias_data = 0; cmd = '0;
    foreach (in_data[o]) in_data[o] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NOFM; i++) begin
      @(negedge clk);
      bias[i] = $urandom_range(0, 255);
      bias_we = 1; bias_addr = ($bits(bias_addr))'(i); bias_data = q8_t'(bias[i]);
    end
    @(negedge clk); bias_we = 0;
    iteration(0, 3);
    iteration(3, 1);
    checks++;
    if (relu_zero == 0 || sat == 0) begin
      failures++; $display("ReLU clamp seen %0d times, saturation %0d times", relu_zero, sat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
