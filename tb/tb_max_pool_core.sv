// tb_max_pool_core: self-checking test of the max-pooling core. Two maps of
// 7 x 5 codes are pooled 3 x 3 with stride 2 (3 x 2 results), then 2 x 2
// with stride 2 on a second map, then passed through with pooling disabled.
// Inputs arrive with random gaps and the output sees random back-pressure;
// every result is compared with the maximum computed here. The test also
// checks that the input is held while the core scans its buffer.
module tb_max_pool_core;
  import acc_pkg::*;
  localparam int PO = 2, OH = 7, OW = 5;
  logic clk = 0, rst_n = 0;
  layer_cfg_t cfg;
  logic in_valid, in_ready, out_valid, out_ready;
  q8_t in_data [PO];
  q8_t out_data [PO];
  int checks = 0, failures = 0, held = 0;
  int img [OH][OW][PO];

  max_pool_core #(.P_OL(PO), .MAX_OUT_PIX(OH*OW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && dut.state == dut.SCAN && in_valid && !in_ready) held++;

  task automatic run(input bit en, input int pk, input int ps);
    int nout, got;
    cfg.pool_en = en; cfg.pool_k = 3'(pk); cfg.pool_s = 3'(ps);
    cfg.pool_oh = DIM_W'((OH - pk) / ps + 1); cfg.pool_ow = DIM_W'((OW - pk) / ps + 1);
    nout = en ? int'(cfg.pool_oh) * int'(cfg.pool_ow) : OH * OW;
    foreach (img[y, x, o]) img[y][x][o] = $urandom_range(0, 255);
    got = 0;
    fork
      begin
        for (int y = 0; y < OH; y++) for (int x = 0; x < OW; x++) begin
          @(negedge clk);
          while ($urandom_range(0, 3) == 0) @(negedge clk);
          in_valid = 1;
          for (int o = 0; o < PO; o++) in_data[o] = q8_t'(img[y][x][o]);
          #1;
          while (!in_ready) begin @(negedge clk); #1; end
          @(posedge clk); #1; in_valid = 0;
        end
        // one more beat offered right after the map: it must wait for the scan
        if (en) begin
          @(negedge clk); in_valid = 1; #1;
          while (!in_ready) begin @(negedge clk); #1; end
          in_valid = 0;
        end
      end
      while (got < nout) begin
        @(negedge clk);
        out_ready = ($urandom_range(0, 2) != 0);
        @(posedge clk);
        if (out_valid && out_ready) begin
          int py, px;
          py = got / (en ? int'(cfg.pool_ow) : OW);
          px = got % (en ? int'(cfg.pool_ow) : OW);
          for (int o = 0; o < PO; o++) begin
            int m;
            m = 0;
            if (en) begin
              for (int wy = 0; wy < pk; wy++) for (int wx = 0; wx < pk; wx++)
                if (img[py*ps + wy][px*ps + wx][o] > m) m = img[py*ps + wy][px*ps + wx][o];
            end else m = img[py][px][o];
            checks++;
            if (int'(out_data[o]) != m) begin
              failures++;
              if (failures < 10) $display("en=%0d out %0d map %0d: got %0d expected %0d", en, got, o, out_data[o], m);
            end
          end
          got++;
        end
      end
    join
    out_ready = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("extra output"); end
  endtask

  initial begin
    cfg = '0; cfg.out_h = OH; cfg.out_w = OW;
    in_valid = 0; out_ready = 1;
    foreach (in_data[o]) in_data[o] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1, 3, 2);
    run(1, 2, 2);
    run(0, 3, 2);
    checks++;
    if (held == 0) begin failures++; $display("input never held during a scan"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
