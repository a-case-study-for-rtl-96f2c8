// stage_runner: test helper that builds the accelerator with the parameters
// of one stage and runs part of that stage's layer on it, acting as the
// host: it loads the input maps once, writes the biases, then runs
// N_OG_RUN output groups, each over all input groups (partial-sum
// accumulation when there is more than one), streaming the weights of every
// iteration. Every output code is compared with a reference computed here
// (zero-point arithmetic, gemmlowp rescale, ReLU, clamp, max pooling).
// Interface: results on checks/failures once done rises.
module stage_runner
  import acc_pkg::*;
#(
  parameter int P_IFM = 2, P_OL = 2, K = 3, H = 8, CIN = 4, COUT = 4, STRIDE = 1, PAD = 1,
  parameter int OH = 8, POOL = 0, PH = 3, N_OG_RUN = 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int NG = (CIN + P_IFM - 1) / P_IFM;

  layer_cfg_t cfg;
  iter_cmd_t cmd;
  logic load_start, in_valid, in_ready, loaded, bias_we, iter_start, busy, iter_done;
  logic w_valid, w_ready, out_valid, out_ready;
  q8_t  in_data, bias_data, w_data;
  logic [$clog2(COUT)-1:0] bias_addr;
  q8_t  out_data [P_OL];

  dcnn_accelerator #(.P_IFM(P_IFM), .P_OL(P_OL), .K_MAX(K), .MAX_IN_PIX(H*H), .MAX_GRP(NG),
                     .MAX_OUT_PIX(OH*OH), .N_OFM(COUT)) dut (.*);

  byte unsigned img [H][H][CIN];
  byte unsigned wts [COUT][CIN][K][K];
  byte unsigned bias [COUT];
  byte unsigned code [OH][OH];
  byte unsigned expect_q [P_OL][OH][OH];

  function automatic longint rs(longint x, longint m, int s);
    return (x * m + (64'sd1 <<< (30 + s))) >>> (31 + s);
  endfunction

  // reference output map o (pooled if pooling is on); runtime loop bounds
  task automatic ref_map(input int o, output byte unsigned res [OH][OH]);
    int nk, ns, np, nc, no, nh, pk, ps, npo;
    nk = int'(cfg.k); ns = int'(cfg.stride); np = int'(cfg.pad); nc = int'(cfg.in_ch);
    no = int'(cfg.out_h); nh = int'(cfg.in_h); pk = int'(cfg.pool_k); ps = int'(cfg.pool_s);
    npo = int'(cfg.pool_oh);
    for (int oy = 0; oy < no; oy++)
      for (int ox = 0; ox < no; ox++) begin
        longint acc, y, z;
        acc = 0;
        for (int c = 0; c < nc; c++)
          for (int ky = 0; ky < nk; ky++)
            for (int kx = 0; kx < nk; kx++) begin
              int iy, ix;
              iy = oy * ns + ky - np; ix = ox * ns + kx - np;
              if (iy >= 0 && ix >= 0 && iy < nh && ix < nh)
                acc += (int'(img[iy][ix][c]) - int'(cfg.in_zp))
                     * (int'(wts[o][c][ky][kx]) - int'(cfg.w_zp));
            end
        y = rs(acc, longint'(cfg.m1), int'(cfg.s1)) + int'(bias[o]) - int'(cfg.b_zp);
        if (y < 0) y = 0;
        z = rs(y, longint'(cfg.m2), int'(cfg.s2)) + int'(cfg.out_zp);
        code[oy][ox] = (z > 255) ? 8'd255 : 8'(z);
      end
    if (!cfg.pool_en) begin
      for (int y = 0; y < no; y++) for (int x = 0; x < no; x++) res[y][x] = code[y][x];
    end else begin
      for (int py = 0; py < npo; py++)
        for (int px = 0; px < npo; px++) begin
          byte unsigned m;
          m = 0;
          for (int wy = 0; wy < pk; wy++)
            for (int wx = 0; wx < pk; wx++)
              if (code[py*ps + wy][px*ps + wx] > m) m = code[py*ps + wy][px*ps + wx];
          res[py][px] = m;
        end
    end
  endtask

  initial begin
    int got, ow, nout, nk, ng;
    done = 0; checks = 0; failures = 0;
    load_start = 0; in_valid = 0; in_data = 0; bias_we = 0; bias_addr = 0; bias_data = 0;
    iter_start = 0; cmd = '0; w_valid = 0; w_data = 0; out_ready = 1;
    foreach (img[y, x, c]) img[y][x][c] = 8'($urandom);
    foreach (wts[o, c, ky, kx]) wts[o][c][ky][kx] = 8'($urandom);
    foreach (bias[o]) bias[o] = 8'($urandom);
    cfg = '0;
    cfg.in_h = DIM_W'(H); cfg.in_w = DIM_W'(H); cfg.in_ch = CH_W'(CIN); cfg.k = K_W'(K);
    cfg.stride = 3'(STRIDE); cfg.pad = 3'(PAD); cfg.out_h = DIM_W'(OH); cfg.out_w = DIM_W'(OH);
    cfg.pool_en = (POOL != 0); cfg.pool_k = 3; cfg.pool_s = 2;
    cfg.pool_oh = DIM_W'(PH); cfg.pool_ow = DIM_W'(PH);
    cfg.in_zp = 8'd128; cfg.w_zp = 8'd128; cfg.b_zp = 8'd128; cfg.out_zp = 8'd0;
    cfg.m1 = 32'h4000_0000; cfg.s1 = 6'd12; cfg.m2 = 32'h6000_0000; cfg.s2 = 6'd0;
    nk = K; ng = NG;
    ow = POOL ? PH : OH;
    nout = ow * ow;
    wait (rst_n);
    @(negedge clk); load_start = 1; @(negedge clk); load_start = 0;
    for (int y = 0; y < int'(cfg.in_h); y++) for (int x = 0; x < int'(cfg.in_w); x++)
      for (int c = 0; c < int'(cfg.in_ch); c++) begin
        in_valid = 1; in_data = img[y][x][c];
        @(negedge clk);
      end
    in_valid = 0;
    checks++; if (!loaded) begin failures++; $display("%m: input not loaded"); end
    for (int o = 0; o < COUT; o++) begin
      bias_we = 1; bias_addr = ($bits(bias_addr))'(o); bias_data = bias[o];
      @(negedge clk);
    end
    bias_we = 0;

    for (int og = 0; og < N_OG_RUN; og++) begin
      for (int o = 0; o < P_OL; o++) begin
        byte unsigned pm [OH][OH];
        ref_map(og * P_OL + o, pm);
        for (int y = 0; y < ow; y++) for (int x = 0; x < ow; x++) expect_q[o][y][x] = pm[y][x];
      end
      for (int g = 0; g < ng; g++) begin
        @(negedge clk);
        cmd = '0; cmd.ifm_group = CH_W'(g); cmd.ofm_base = CH_W'(og * P_OL);
        cmd.acc_first = (g == 0); cmd.acc_last = (g == ng - 1);
        iter_start = 1; @(negedge clk); iter_start = 0;
        got = 0;
        fork
          begin
            for (int o = 0; o < P_OL; o++) for (int i = 0; i < P_IFM; i++)
              for (int ky = 0; ky < nk; ky++) for (int kx = 0; kx < nk; kx++) begin
                int c;
                c = g * P_IFM + i;
                w_valid = 1;
                w_data = (c < CIN) ? wts[og * P_OL + o][c][ky][kx] : 8'd0;
                @(negedge clk);
              end
            w_valid = 0;
          end
          do begin
            @(posedge clk);
            if (out_valid) begin
              for (int o = 0; o < P_OL; o++) begin
                checks++;
                if (out_data[o] != expect_q[o][got / ow][got % ow]) begin
                  failures++;
                  if (failures < 10) $display("%m: group %0d/%0d pixel %0d map %0d: got %0d expected %0d",
                                              og, g, got, o, out_data[o], expect_q[o][got / ow][got % ow]);
                end
              end
              got++;
            end
          end while (busy);
        join
        if (g == ng - 1) begin
          checks++;
          if (got != nout) begin failures++; $display("%m: %0d output pixels, expected %0d", got, nout); end
        end
      end
    end
    done = 1;
  end
endmodule
