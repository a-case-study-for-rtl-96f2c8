// tb_data_saver: self-checking test of the input cache and window replay.
// Loads a random 6 x 7 x 5 input (NHWC stream, random gaps), then replays
// every input-map group with a 3 x 3 window, stride 2, padding 1, under random
// back-pressure, and compares each beat with the input pixel computed here
// (zero point for padded taps and for lanes past the last map). A second
// pass replays group 0 with stride 1 and no padding, reusing the cached
// data without reloading it. The number of beats is checked too.
module tb_data_saver;
  import acc_pkg::*;
  localparam int PI = 2, H = 6, W = 7, C = 5, NG = 3;
  logic clk = 0, rst_n = 0;
  layer_cfg_t cfg;
  logic load_start, in_valid, in_ready, loaded, run_start, out_valid, out_ready, run_done;
  q8_t in_data;
  logic [CH_W-1:0] ifm_group;
  q8_t out_data [PI];
  int checks = 0, failures = 0;
  int img [H][W][C];

  data_saver #(.P_IFM(PI), .MAX_PIX(H*W), .MAX_GRP(NG)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_val(int g, int l, int oy, int ox, int ky, int kx);
    int iy, ix, c;
    iy = oy * int'(cfg.stride) + ky - int'(cfg.pad);
    ix = ox * int'(cfg.stride) + kx - int'(cfg.pad);
    c  = g * PI + l;
    if (iy < 0 || ix < 0 || iy >= H || ix >= W || c >= C) return int'(cfg.in_zp);
    return img[iy][ix][c];
  endfunction

  task automatic replay(input int g);
    int n, total;
    int oy, ox, ky, kx;
    total = int'(cfg.out_h) * int'(cfg.out_w) * int'(cfg.k) * int'(cfg.k);
    @(negedge clk);
    ifm_group = CH_W'(g); run_start = 1;
    @(negedge clk); run_start = 0;
    n = 0;
    while (n < total) begin
      out_ready = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (out_valid && out_ready) begin
        kx = n % int'(cfg.k); ky = (n / int'(cfg.k)) % int'(cfg.k);
        ox = (n / (int'(cfg.k) * int'(cfg.k))) % int'(cfg.out_w);
        oy = n / (int'(cfg.k) * int'(cfg.k) * int'(cfg.out_w));
        for (int l = 0; l < PI; l++) begin
          checks++;
          if (int'(out_data[l]) != expect_val(g, l, oy, ox, ky, kx)) begin
            failures++;
            if (failures < 10) $display("g%0d beat %0d lane %0d: got %0d expected %0d", g, n, l,
                                        out_data[l], expect_val(g, l, oy, ox, ky, kx));
          end
        end
        n++;
      end
      @(negedge clk);
    end
    out_ready = 1;
    repeat (4) @(posedge clk);
    checks++;
    if (out_valid) begin failures++; $display("extra beat after %0d", total); end
  endtask

  initial begin
    cfg = '0;
    cfg.in_h = H; cfg.in_w = W; cfg.in_ch = C; cfg.k = 3; cfg.stride = 2; cfg.pad = 1;
    cfg.out_h = 3; cfg.out_w = 4; cfg.in_zp = 8'd100;
    load_start = 0; in_valid = 0; in_data = 0; run_start = 0; ifm_group = 0; out_ready = 0;
    foreach (img[y, x, c]) img[y][x][c] = $urandom_range(0, 255);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); load_start = 1; @(negedge clk); load_start = 0;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) for (int c = 0; c < C; c++) begin
      while ($urandom_range(0, 3) == 0) @(negedge clk);
      in_valid = 1; in_data = q8_t'(img[y][x][c]);
      #1;
      if (!in_ready) begin failures++; $display("load refused"); end
      @(negedge clk); in_valid = 0;
    end
    checks++; if (!loaded) begin failures++; $display("not loaded"); end
    checks++; if (in_ready) begin failures++; $display("still taking input"); end
    for (int g = 0; g < NG; g++) replay(g);
    cfg.stride = 1; cfg.pad = 0; cfg.out_h = H - 2; cfg.out_w = W - 2;
    replay(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
