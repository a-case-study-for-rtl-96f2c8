// tb_stage_workloads: runs the accelerator built with the parallelism of
// other stages of the network, on their real layer sizes:
//   Stage2_1: 27 x 27 x 96 input, 5 x 5 filters, padding 2, max pooling
//             3 x 3 / 2 to 13 x 13, 96 x 3 MACs; the first 2 of its
//             42 iterations (output maps 0..5);
//   Stage3:   13 x 13 x 256 input, 3 x 3 filters, padding 1, no pooling,
//             128 x 2 MACs, two input groups accumulated per output group;
//             the first 4 of its 384 iterations (output maps 0..3);
//   Stage3_4_5 build (128 x 1 MACs) on the Conv5 layer: 13 x 13 x 384 input,
//             3 input groups accumulated, output maps 0..1 (6 iterations).
// Every output code is compared with a reference (see stage_runner).
module tb_stage_workloads;
  logic clk = 0, rst_n = 0;
  logic done2, done3, done5;
  int c2, f2, c3, f3, c5, f5;

  always #5 clk = ~clk;

  stage_runner #(.P_IFM(96), .P_OL(3), .K(5), .H(27), .CIN(96), .COUT(126), .STRIDE(1), .PAD(2),
                 .OH(27), .POOL(1), .PH(13), .N_OG_RUN(2))
    u_stage2_1 (.clk, .rst_n, .done(done2), .checks(c2), .failures(f2));

  stage_runner #(.P_IFM(128), .P_OL(2), .K(3), .H(13), .CIN(256), .COUT(384), .STRIDE(1), .PAD(1),
                 .OH(13), .POOL(0), .PH(6), .N_OG_RUN(2))
    u_stage3 (.clk, .rst_n, .done(done3), .checks(c3), .failures(f3));

  stage_runner #(.P_IFM(128), .P_OL(1), .K(3), .H(13), .CIN(384), .COUT(256), .STRIDE(1), .PAD(1),
                 .OH(13), .POOL(1), .PH(6), .N_OG_RUN(2))
    u_stage345 (.clk, .rst_n, .done(done5), .checks(c5), .failures(f5));

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c3 + c5, f2 + f3 + f5 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done2 && done3 && done5);
    $display("Stage2_1: %0d checks, %0d failures; Stage3: %0d checks, %0d failures; Stage3_4_5: %0d checks, %0d failures",
             c2, f2, c3, f3, c5, f5);
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c3 + c5, f2 + f3 + f5);
    $finish;
  end
endmodule
