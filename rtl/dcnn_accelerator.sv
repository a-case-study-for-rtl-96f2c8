// dcnn_accelerator: one convolution stage of the face-detection network: a
// convolutional layer with 8-bit quantized inputs and weights, followed by
// bias addition, ReLU, requantization to 8 bits and (optionally) max
// pooling. It is a dataflow pipeline whose cores talk through FIFO queues:
//
//   input stream -> data_saver -> FIFO -> input_quant_machine --+
//                                                               v
//   weights stream -> weights_quant_machine -----------------> conv_core
//                                                               |
//                                                              FIFO
//                                                               v
//   output stream <- max_pool_core <- FIFO <- bias_relu_requant
//
// The defaults are those of Stage1 of the network (Conv1 and Max1): 3 input
// maps of 227 x 227, 96 filters of 11 x 11 applied 48 at a time
// (intra-layer parallelism 48) to 3 input maps at a time (intra-feature-map
// parallelism 3), 55 x 55 convolution outputs pooled 3 x 3 by 2 to 27 x 27;
// such a layer takes 2 iterations.
//
// Use, as the host CPU would: program cfg and write the biases; pulse
// load_start and stream the input maps (the DataSaver keeps them for all
// iterations of the layer); then, for every (input group, output group)
// pair, pulse iter_start with cmd and stream P_OL * P_IFM * k*k weights.
// iter_done pulses when the iteration has consumed all its pixels and, for
// the last input group, emitted all its output beats (one beat = one pixel
// of P_OL output maps, in raster order). busy is high in between.
//
// Timing: the convolution takes k*k cycles per output pixel when no stream
// stalls; pooling adds pool_k*pool_k cycles per pooled pixel after the map.
// One clock drives all cores (on the FPGA the convolutional core has a
// faster clock of its own; that crossing is not modelled).
module dcnn_accelerator
  import acc_pkg::*;
#(
  parameter int unsigned P_IFM       = 3,      // intra-feature-map parallelism
  parameter int unsigned P_OL        = 48,     // intra-layer parallelism
  parameter int unsigned K_MAX       = 11,     // largest filter size
  parameter int unsigned MAX_IN_PIX  = 51529,  // 227 x 227
  parameter int unsigned MAX_GRP     = 1,      // input-map groups cached
  parameter int unsigned MAX_OUT_PIX = 3025,   // 55 x 55
  parameter int unsigned N_OFM       = 96,     // output maps of the layer
  parameter int unsigned FIFO_DEPTH  = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  layer_cfg_t               cfg,
  // input data stream (DMA)
  input  logic                     load_start,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  q8_t                      in_data,
  output logic                     loaded,
  // bias cache (host writes)
  input  logic                     bias_we,
  input  logic [$clog2(N_OFM)-1:0] bias_addr,
  input  q8_t                      bias_data,
  // iteration control
  input  logic                     iter_start,
  input  iter_cmd_t                cmd,
  output logic                     busy,
  output logic                     iter_done,
  // weights stream (DMA)
  input  logic                     w_valid,
  output logic                     w_ready,
  input  q8_t                      w_data,
  // output data stream (DMA)
  output logic                     out_valid,
  input  logic                     out_ready,
  output q8_t                      out_data [P_OL]
);
  iter_cmd_t cmd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          cmd_q <= '0;
    else if (iter_start) cmd_q <= cmd;
  end

  // ---------------- DataSaver and input quantization ----------------
  logic ds_valid, ds_ready;
  q8_t  ds_data [P_IFM];
  logic ds_done;

  data_saver #(.P_IFM(P_IFM), .MAX_PIX(MAX_IN_PIX), .MAX_GRP(MAX_GRP)) u_data_saver (
    .clk, .rst_n, .cfg,
    .load_start, .in_valid, .in_ready, .in_data, .loaded,
    .run_start(iter_start), .ifm_group(cmd.ifm_group),
    .out_valid(ds_valid), .out_ready(ds_ready), .out_data(ds_data),
    .run_done(ds_done)
  );

  logic [P_IFM*8-1:0] ds_vec, dq_vec;
  logic dq_valid, dq_ready;
  q8_t  dq_data [P_IFM];
  always_comb
    for (int l = 0; l < P_IFM; l++) begin
      ds_vec[l*8 +: 8] = ds_data[l];
      dq_data[l]       = dq_vec[l*8 +: 8];
    end

  stream_fifo #(.WIDTH(P_IFM*8), .DEPTH(FIFO_DEPTH)) u_fifo_in (
    .clk, .rst_n,
    .in_valid(ds_valid), .in_ready(ds_ready), .in_data(ds_vec),
    .out_valid(dq_valid), .out_ready(dq_ready), .out_data(dq_vec)
  );

  logic x_valid, x_ready;
  qv_t  x_data [P_IFM];
  input_quant_machine #(.P_IFM(P_IFM)) u_iqm (
    .clk, .rst_n, .in_zp(cfg.in_zp),
    .in_valid(dq_valid), .in_ready(dq_ready), .in_data(dq_data),
    .out_valid(x_valid), .out_ready(x_ready), .out_data(x_data)
  );

  // ---------------- weights quantization ----------------
  logic wq_valid, wq_ready;
  qv_t  wq_data;
  weights_quant_machine u_wqm (
    .clk, .rst_n, .w_zp(cfg.w_zp),
    .in_valid(w_valid), .in_ready(w_ready), .in_data(w_data),
    .out_valid(wq_valid), .out_ready(wq_ready), .out_data(wq_data)
  );

  // ---------------- convolutional core ----------------
  logic cv_valid, cv_ready, cv_ce, w_loaded;
  acc_t cv_data [P_OL];
  conv_core #(.P_IFM(P_IFM), .P_OL(P_OL), .K_MAX(K_MAX)) u_conv (
    .clk, .rst_n, .k(cfg.k), .start(iter_start),
    .w_valid(wq_valid), .w_ready(wq_ready), .w_data(wq_data), .w_loaded,
    .x_valid, .x_ready, .x_data,
    .out_valid(cv_valid), .out_ready(cv_ready), .out_data(cv_data), .ce(cv_ce)
  );

  logic [P_OL*ACC_W-1:0] cv_vec, cq_vec;
  logic cq_valid, cq_ready;
  acc_t cq_data [P_OL];
  always_comb
    for (int o = 0; o < P_OL; o++) begin
      cv_vec[o*ACC_W +: ACC_W] = cv_data[o];
      cq_data[o]               = cq_vec[o*ACC_W +: ACC_W];
    end

  stream_fifo #(.WIDTH(P_OL*ACC_W), .DEPTH(FIFO_DEPTH)) u_fifo_conv (
    .clk, .rst_n,
    .in_valid(cv_valid), .in_ready(cv_ready), .in_data(cv_vec),
    .out_valid(cq_valid), .out_ready(cq_ready), .out_data(cq_vec)
  );

  // ---------------- bias, ReLU, requantization ----------------
  logic br_valid, br_ready, pix_done;
  q8_t  br_data [P_OL];
  bias_relu_requant #(.P_OL(P_OL), .N_OFM(N_OFM), .MAX_OUT_PIX(MAX_OUT_PIX)) u_bias (
    .clk, .rst_n, .cfg, .cmd(iter_start ? cmd : cmd_q), .start(iter_start),
    .bias_we, .bias_addr, .bias_data,
    .in_valid(cq_valid), .in_ready(cq_ready), .in_data(cq_data),
    .out_valid(br_valid), .out_ready(br_ready), .out_data(br_data),
    .pix_done
  );

  logic [P_OL*8-1:0] br_vec, bq_vec;
  logic bq_valid, bq_ready;
  q8_t  bq_data [P_OL];
  always_comb
    for (int o = 0; o < P_OL; o++) begin
      br_vec[o*8 +: 8] = br_data[o];
      bq_data[o]       = bq_vec[o*8 +: 8];
    end

  stream_fifo #(.WIDTH(P_OL*8), .DEPTH(FIFO_DEPTH)) u_fifo_out (
    .clk, .rst_n,
    .in_valid(br_valid), .in_ready(br_ready), .in_data(br_vec),
    .out_valid(bq_valid), .out_ready(bq_ready), .out_data(bq_vec)
  );

  // ---------------- max pooling ----------------
  max_pool_core #(.P_OL(P_OL), .MAX_OUT_PIX(MAX_OUT_PIX)) u_pool (
    .clk, .rst_n, .cfg,
    .in_valid(bq_valid), .in_ready(bq_ready), .in_data(bq_data),
    .out_valid, .out_ready, .out_data
  );

  // ---------------- iteration control ----------------
  logic [31:0] out_cnt, out_exp;
  assign out_exp = !cmd_q.acc_last ? 32'd0
                 : cfg.pool_en     ? 32'(cfg.pool_oh) * 32'(cfg.pool_ow)
                                   : 32'(cfg.out_h) * 32'(cfg.out_w);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      iter_done <= 1'b0;
      out_cnt   <= '0;
    end else begin
      iter_done <= 1'b0;
      if (iter_start) begin
        busy    <= 1'b1;
        out_cnt <= '0;
      end else if (busy) begin
        if (out_valid && out_ready) out_cnt <= out_cnt + 1;
        if (pix_done && out_cnt == out_exp) begin
          busy      <= 1'b0;
          iter_done <= 1'b1;
        end
      end
    end
  end

  // A new iteration starts only when the previous one is over and the
  // input maps are in the DataSaver.
  assert property (@(posedge clk) disable iff (!rst_n) iter_start |-> (!busy && loaded));
endmodule
