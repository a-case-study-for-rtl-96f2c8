// tb_dcnn_accelerator: end-to-end test of the accelerator at reduced size
// (2 x 3 MAC array, filters up to 5 x 5). The host side is modelled here:
// it programs the layer, writes the biases, streams the input maps once and
// then runs every (input group, output group) iteration, streaming weights.
// Two layers run on the same hardware:
//   A: 6 x 6 x 5 input, 3 x 3 filters, stride 1, padding 1, 6 output maps,
//      no pooling: 3 input groups x 2 output groups (partial-sum
//      accumulation, padding, pooling bypass);
//   B: 15 x 15 x 2 input, 5 x 5 filters, stride 2, 3 output maps, max
//      pooling 3 x 3 by 2: one iteration.
// Every output code is compared with a reference computed here from the
// gemmlowp arithmetic. The convolution time of a stall-free iteration must be
// out_h * out_w * k*k cycles. Each mechanism is counted and must happen:
// weight-load stall, output back-pressure, partial-sum accumulation, padding,
// pooling (scan of the map), pooling bypass, ReLU clamp,
// and the change of filter size.
module tb_dcnn_accelerator;
  import acc_pkg::*;
  localparam int PI = 2, PO = 3, KM = 5, MIP = 225, MG = 3, MOP = 36, NOFM = 6;

  logic clk = 0, rst_n = 0;
  layer_cfg_t cfg;
  iter_cmd_t cmd;
  logic load_start, in_valid, in_ready, loaded, bias_we, iter_start, busy, iter_done;
  logic w_valid, w_ready, out_valid, out_ready;
  q8_t  in_data, bias_data, w_data;
  logic [$clog2(NOFM)-1:0] bias_addr;
  q8_t  out_data [PO];
  int checks = 0, failures = 0;

  dcnn_accelerator #(.P_IFM(PI), .P_OL(PO), .K_MAX(KM), .MAX_IN_PIX(MIP), .MAX_GRP(MG),
                     .MAX_OUT_PIX(MOP), .N_OFM(NOFM)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_wstall = 0, n_backpressure = 0, n_partial = 0, n_pad = 0, n_pool = 0, n_bypass = 0;
  int n_scanhold = 0, n_relu = 0, n_pos = 0, n_k3 = 0, n_k5 = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.x_valid && !dut.w_loaded) n_wstall++;
    if (out_valid && !out_ready) n_backpressure++;
    if (dut.u_data_saver.adv && !dut.u_data_saver.in_map) n_pad++;
    if (dut.u_pool.scan_adv) n_scanhold++;
    if (iter_start && !cmd.acc_last) n_partial++;
    if (iter_start && cmd.acc_last && cfg.pool_en) n_pool++;
    if (iter_start && cmd.acc_last && !cfg.pool_en) n_bypass++;
    if (dut.cv_ce && cfg.k == 3) n_k3++;
    if (dut.cv_ce && cfg.k == 5) n_k5++;
  end

  // ---------------- reference data ----------------
  int img [15][15][5];
  int wts [NOFM][5][5][5];   // [ofm][channel][ky][kx]
  int bias [NOFM];

  function automatic longint rs(longint x, longint m, int s);
    return (x * m + (64'sd1 <<< (30 + s))) >>> (31 + s);
  endfunction

  function automatic int conv_code(int o, int oy, int ox);
    longint acc, y, z;
    acc = 0;
    for (int c = 0; c < int'(cfg.in_ch); c++)
      for (int ky = 0; ky < int'(cfg.k); ky++)
        for (int kx = 0; kx < int'(cfg.k); kx++) begin
          int iy, ix;
          iy = oy * int'(cfg.stride) + ky - int'(cfg.pad);
          ix = ox * int'(cfg.stride) + kx - int'(cfg.pad);
          if (iy >= 0 && ix >= 0 && iy < int'(cfg.in_h) && ix < int'(cfg.in_w))
            acc += longint'(img[iy][ix][c] - int'(cfg.in_zp)) * (wts[o][c][ky][kx] - int'(cfg.w_zp));
        end
    y = rs(acc, longint'(cfg.m1), int'(cfg.s1)) + bias[o] - int'(cfg.b_zp);
    if (y < 0) y = 0;
    z = rs(y, longint'(cfg.m2), int'(cfg.s2)) + int'(cfg.out_zp);
    return (z > 255) ? 255 : int'(z);
  endfunction

  function automatic int expected(int o, int py, int px);
    int m;
    if (!cfg.pool_en) return conv_code(o, py, px);
    m = 0;
    for (int wy = 0; wy < int'(cfg.pool_k); wy++)
      for (int wx = 0; wx < int'(cfg.pool_k); wx++) begin
        int v;
        v = conv_code(o, py * int'(cfg.pool_s) + wy, px * int'(cfg.pool_s) + wx);
        if (v > m) m = v;
      end
    return m;
  endfunction

  // ---------------- host model ----------------
  task automatic load_layer();
    @(negedge clk); load_start = 1; @(negedge clk); load_start = 0;
    for (int y = 0; y < int'(cfg.in_h); y++)
      for (int x = 0; x < int'(cfg.in_w); x++)
        for (int c = 0; c < int'(cfg.in_ch); c++) begin
          in_valid = 1; in_data = q8_t'(img[y][x][c]);
          #1; while (!in_ready) begin @(negedge clk); #1; end
          @(negedge clk);
        end
    in_valid = 0;
    for (int o = 0; o < NOFM; o++) begin
      bias_we = 1; bias_addr = ($bits(bias_addr))'(o); bias_data = q8_t'(bias[o]);
      @(negedge clk);
    end
    bias_we = 0;
  endtask

  task automatic iteration(input int g, input int og, input bit first, input bit last,
                           input bit press, input bit time_it);
    int kk, nout, got, ow, t_first, t_last, wdelay;
    bit seen_first;
    kk   = int'(cfg.k) * int'(cfg.k);
    ow   = cfg.pool_en ? int'(cfg.pool_ow) : int'(cfg.out_w);
    nout = !last ? 0 : cfg.pool_en ? int'(cfg.pool_oh) * int'(cfg.pool_ow)
                                   : int'(cfg.out_h) * int'(cfg.out_w);
    @(negedge clk);
    cmd = '0; cmd.ifm_group = CH_W'(g); cmd.ofm_base = CH_W'(og * PO);
    cmd.acc_first = first; cmd.acc_last = last;
    iter_start = 1; @(negedge clk); iter_start = 0;
    got = 0; seen_first = 0;
    wdelay = time_it ? 0 : 20;
    fork
      begin   // weights stream, starting late so that the core must wait
        repeat (wdelay) @(negedge clk);
        for (int o = 0; o < PO; o++)
          for (int i = 0; i < PI; i++)
            for (int t = 0; t < kk; t++) begin
              int c;
              c = g * PI + i;
              w_valid = 1;
              w_data  = (c < int'(cfg.in_ch)) ? q8_t'(wts[og * PO + o][c][t / int'(cfg.k)][t % int'(cfg.k)])
                                              : q8_t'($urandom);
              #1; while (!w_ready) begin @(negedge clk); #1; end
              @(negedge clk);
            end
        w_valid = 0;
      end
      while (got < nout) begin   // output stream
        out_ready = press ? ($urandom_range(0, 2) != 0) : 1'b1;
        @(posedge clk);
        if (out_valid && out_ready) begin
          for (int o = 0; o < PO; o++) begin
            int e;
            e = expected(og * PO + o, got / ow, got % ow);
            checks++;
            if (e == int'(cfg.out_zp)) n_relu++; else n_pos++;
            if (int'(out_data[o]) != e) begin
              failures++;
              if (failures < 10) $display("g%0d og%0d out %0d map %0d: got %0d expected %0d",
                                          g, og, got, o, out_data[o], e);
            end
          end
          got++;
        end
        @(negedge clk);
      end
      begin   // convolution timing
        do begin
          @(posedge clk);
          if (dut.x_valid && dut.x_ready && !seen_first) begin seen_first = 1; t_first = $time; end
          if (dut.cv_ce) t_last = $time;
        end while (busy);
      end
    join
    out_ready = 1;
    while (busy) @(negedge clk);
    if (time_it) begin
      checks++;
      if ((t_last - t_first) / 10 != int'(cfg.out_h) * int'(cfg.out_w) * kk - 1) begin
        failures++;
        $display("convolution took %0d cycles, expected %0d", (t_last - t_first) / 10 + 1,
                 int'(cfg.out_h) * int'(cfg.out_w) * kk);
      end
    end
    checks++;
    if (out_valid) begin failures++; $display("extra output beat"); end
  endtask

  initial begin
    load_start = 0; in_valid = 0; in_data = 0; bias_we = 0; bias_addr = 0; bias_data = 0;
    iter_start = 0; cmd = '0; w_valid = 0; w_data = 0; out_ready = 1;
    foreach (img[y, x, c]) img[y][x][c] = $urandom_range(0, 255);
    foreach (wts[o, c, ky, kx]) wts[o][c][ky][kx] = $urandom_range(0, 255);
    foreach (bias[o]) bias[o] = $urandom_range(0, 255);
    cfg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // layer A: 3 input groups, 2 output groups, padding, no pooling
    cfg.in_h = 6; cfg.in_w = 6; cfg.in_ch = 5; cfg.k = 3; cfg.stride = 1; cfg.pad = 1;
    cfg.out_h = 6; cfg.out_w = 6; cfg.pool_en = 0;
    cfg.in_zp = 8'd128; cfg.w_zp = 8'd120; cfg.b_zp = 8'd128; cfg.out_zp = 8'd3;
    cfg.m1 = 32'h4000_0000; cfg.s1 = 6'd6; cfg.m2 = 32'h5000_0000; cfg.s2 = 6'd0;
    load_layer();
    for (int og = 0; og < 2; og++)
      for (int g = 0; g < 3; g++)
        iteration(g, og, g == 0, g == 2, og == 1, og == 0 && g == 0);

    // layer B: one iteration, 5 x 5 filters, stride 2, max pooling
    cfg.in_h = 15; cfg.in_w = 15; cfg.in_ch = 2; cfg.k = 5; cfg.stride = 2; cfg.pad = 0;
    cfg.out_h = 6; cfg.out_w = 6; cfg.pool_en = 1; cfg.pool_k = 3; cfg.pool_s = 2;
    cfg.pool_oh = 2; cfg.pool_ow = 2;
    cfg.in_zp = 8'd90; cfg.w_zp = 8'd130; cfg.b_zp = 8'd100; cfg.out_zp = 8'd10;
    cfg.m1 = 32'h6000_0000; cfg.s1 = 6'd7; cfg.m2 = 32'h4000_0000; cfg.s2 = 6'd0;
    load_layer();
    iteration(0, 0, 1, 1, 0, 1);
    iteration(0, 1, 1, 1, 1, 0);

    $display("weight-load stall %0d, back-pressure %0d, partial-sum iterations %0d, padded taps %0d",
             n_wstall, n_backpressure, n_partial, n_pad);
    $display("pooled iterations %0d, bypass iterations %0d, scan cycles %0d, ReLU zeros %0d, positive %0d, k=3 windows %0d, k=5 windows %0d",
             n_pool, n_bypass, n_scanhold, n_relu, n_pos, n_k3, n_k5);
    if (n_wstall == 0)       begin failures++; $display("no weight-load stall"); end
    if (n_backpressure == 0) begin failures++; $display("no back-pressure"); end
    if (n_partial == 0)      begin failures++; $display("no partial-sum iteration"); end
    if (n_pad == 0)          begin failures++; $display("no padding"); end
    if (n_pool == 0)         begin failures++; $display("no pooling"); end
    if (n_bypass == 0)       begin failures++; $display("no bypass"); end
    if (n_scanhold == 0)     begin failures++; $display("no pooling scan"); end
    if (n_relu == 0 || n_pos == 0) begin failures++; $display("no ReLU clamp or no positive output"); end
    if (n_k3 == 0 || n_k5 == 0) begin failures++; $display("filter size not switched"); end
    checks += 9;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
