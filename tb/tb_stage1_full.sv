// tb_stage1_full: the accelerator at its default size (Stage1: Conv1 and
// Max1) runs one complete layer: a 227 x 227 x 3 input, 96 filters of
// 11 x 11 with stride 4 (55 x 55 outputs), bias, ReLU, requantization and
// 3 x 3 / 2 max pooling to 27 x 27, in the two iterations of 48 output maps
// that the 3 x 48 MAC array needs. All 2 x 27 x 27 x 48 output codes are
// compared with a reference computed here, and each iteration's convolution
// must take 55 * 55 * 121 cycles.
module tb_stage1_full;
  import acc_pkg::*;
  localparam int H = 227, C = 3, K = 11, S = 4, OH = 55, PH = 27, NO = 96, PO = 48;

  logic clk = 0, rst_n = 0;
  layer_cfg_t cfg;
  iter_cmd_t cmd;
  logic load_start, in_valid, in_ready, loaded, bias_we, iter_start, busy, iter_done;
  logic w_valid, w_ready, out_valid, out_ready;
  q8_t  in_data, bias_data, w_data;
  logic [6:0] bias_addr;
  q8_t  out_data [PO];
  int checks = 0, failures = 0;

  dcnn_accelerator dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned img [H][H][C];
  byte unsigned wts [NO][C][K][K];
  byte unsigned bias [NO];
  byte unsigned code [OH][OH];   // conv output codes of one output map

  function automatic longint rs(longint x, longint m, int s);
    return (x * m + (64'sd1 <<< (30 + s))) >>> (31 + s);
  endfunction

  // reference pooled map of output map o
  task automatic ref_map(input int o, output byte unsigned pooled [PH][PH]);
    int nk, ns, nc, no, np;
    nk = int'(cfg.k); ns = int'(cfg.stride); nc = int'(cfg.in_ch);
    no = int'(cfg.out_h); np = int'(cfg.pool_oh);
    for (int oy = 0; oy < no; oy++)
      for (int ox = 0; ox < no; ox++) begin
        longint acc, y, z;
        acc = 0;
        for (int c = 0; c < nc; c++)
          for (int ky = 0; ky < nk; ky++)
            for (int kx = 0; kx < nk; kx++)
              acc += (int'(img[oy*ns + ky][ox*ns + kx][c]) - int'(cfg.in_zp))
                   * (int'(wts[o][c][ky][kx]) - int'(cfg.w_zp));
        y = rs(acc, longint'(cfg.m1), int'(cfg.s1)) + int'(bias[o]) - int'(cfg.b_zp);
        if (y < 0) y = 0;
        z = rs(y, longint'(cfg.m2), int'(cfg.s2)) + int'(cfg.out_zp);
        code[oy][ox] = (z > 255) ? 8'd255 : 8'(z);
      end
    for (int py = 0; py < np; py++)
      for (int px = 0; px < np; px++) begin
        byte unsigned m;
        m = 0;
        for (int wy = 0; wy < int'(cfg.pool_k); wy++)
          for (int wx = 0; wx < int'(cfg.pool_k); wx++)
            if (code[2*py + wy][2*px + wx] > m) m = code[2*py + wy][2*px + wx];
        pooled[py][px] = m;
      end
  endtask

  byte unsigned expect_q [PO][PH][PH];
  int n_pos = 0, n_zero = 0;

  initial begin
    int got, t_first, t_last;
    bit seen;
    load_start = 0; in_valid = 0; in_data = 0; bias_we = 0; bias_addr = 0; bias_data = 0;
    iter_start = 0; cmd = '0; w_valid = 0; w_data = 0; out_ready = 1;
    foreach (img[y, x, c]) img[y][x][c] = 8'($urandom);
    foreach (wts[o, c, ky, kx]) wts[o][c][ky][kx] = 8'($urandom);
    foreach (bias[o]) bias[o] = 8'($urandom);
    cfg = '0;
    cfg.in_h = H; cfg.in_w = H; cfg.in_ch = C; cfg.k = K; cfg.stride = S; cfg.pad = 0;
    cfg.out_h = OH; cfg.out_w = OH; cfg.pool_en = 1; cfg.pool_k = 3; cfg.pool_s = 2;
    cfg.pool_oh = PH; cfg.pool_ow = PH;
    cfg.in_zp = 8'd128; cfg.w_zp = 8'd128; cfg.b_zp = 8'd128; cfg.out_zp = 8'd0;
    cfg.m1 = 32'h4000_0000; cfg.s1 = 6'd10; cfg.m2 = 32'h6000_0000; cfg.s2 = 6'd0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    @(negedge clk); load_start = 1; @(negedge clk); load_start = 0;
    for (int y = 0; y < int'(cfg.in_h); y++) for (int x = 0; x < int'(cfg.in_w); x++)
      for (int c = 0; c < int'(cfg.in_ch); c++) begin
      in_valid = 1; in_data = img[y][x][c];
      @(negedge clk);
    end
    in_valid = 0;
    checks++; if (!loaded) begin failures++; $display("input not loaded"); end
    for (int o = 0; o < NO; o++) begin
      bias_we = 1; bias_addr = 7'(o); bias_data = bias[o];
      @(negedge clk);
    end
    bias_we = 0;

    for (int og = 0; og < NO / PO; og++) begin
      for (int o = 0; o < PO; o++) begin
        byte unsigned pm [PH][PH];
        ref_map(og * PO + o, pm);
        foreach (pm[y, x]) expect_q[o][y][x] = pm[y][x];
      end
      @(negedge clk);
      cmd = '0; cmd.ofm_base = CH_W'(og * PO); cmd.acc_first = 1; cmd.acc_last = 1;
      iter_start = 1; @(negedge clk); iter_start = 0;
      got = 0; seen = 0;
      fork
        begin
          int nk;
          nk = int'(cfg.k);
          for (int o = 0; o < PO; o++) for (int i = 0; i < int'(cfg.in_ch); i++)
            for (int ky = 0; ky < nk; ky++) for (int kx = 0; kx < nk; kx++) begin
              w_valid = 1; w_data = wts[og * PO + o][i][ky][kx];
              @(negedge clk);
            end
          w_valid = 0;
        end
        do begin
          @(posedge clk);
          if (dut.x_valid && dut.x_ready && !seen) begin seen = 1; t_first = $time; end
          if (dut.cv_ce) t_last = $time;
          if (out_valid) begin
            for (int o = 0; o < PO; o++) begin
              checks++;
              if (out_data[o] == 0) n_zero++; else n_pos++;
              if (out_data[o] != expect_q[o][got / PH][got % PH]) begin
                failures++;
                if (failures < 10) $display("group %0d pixel %0d map %0d: got %0d expected %0d",
                                            og, got, o, out_data[o], expect_q[o][got / PH][got % PH]);
              end
            end
            got++;
          end
        end while (busy);
      join
      checks++;
      if (got != PH * PH) begin failures++; $display("group %0d: %0d output pixels", og, got); end
      checks++;
      if ((t_last - t_first) / 10 + 1 != OH * OH * K * K) begin
        failures++;
        $display("convolution took %0d cycles, expected %0d", (t_last - t_first) / 10 + 1, OH * OH * K * K);
      end
      $display("group %0d done at cycle %0d", og, $time / 10);
    end
    $display("positive outputs %0d, zero outputs %0d", n_pos, n_zero);
    checks++;
    if (n_pos == 0 || n_zero == 0) begin failures++; $display("ReLU never clamped or never passed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
