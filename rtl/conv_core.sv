// conv_core: the convolutional core. An array of P_OL x P_IFM multiply-
// accumulate units (one DSP each on the FPGA) convolves P_IFM input feature
// maps with the filters of P_OL output feature maps. MAC (o, i) computes
// the convolution of input map i with the (o, i) slice of filter o for one
// output pixel at a time: the k*k taps of the window arrive one per beat and
// the MAC accumulates them internally, so the same MAC consumes every element
// of a window (time-multiplexing of one DSP over the taps). All P_OL MACs of
// lane i see the same input value (intra-layer parallelism: different filters
// on the same input); the P_IFM partial results of output map o are added by
// an accumulation tree (intra-feature-map parallelism). The window-complete
// strobe ce is the clock enable of that tree and of the output: it fires once
// every k*k accepted beats, the sub-multiple of the clock that depends on the
// filter size. Layers with different filter sizes up to K_MAX run on the
// same hardware by programming k.
//
// Weights: after start, P_OL * P_IFM * k*k weights (already zero-point free)
// are taken from w_* in the order output map, input map, tap (ky, kx raster).
// Input beats are refused (x_ready low) until all weights are in: that is
// the weight-load stall.
// Inputs: x_* beats of P_IFM values, k*k per output pixel, as the DataSaver
// replays them. Outputs: one beat of P_OL 32-bit sums per output pixel.
//
// Timing: a window of k*k beats is accepted in k*k cycles; its sums are on
// out_data the cycle after its last beat. When the output is not taken, the
// core holds its input.
//
// The MAC array, internal accumulation, accumulation tree and clock enable
// follow the published design. The beat format, weight order and the load-then-compute
// sequence are this design's choices; the faster clock of this core on the
// FPGA is not modelled (a single clock drives the whole accelerator).
module conv_core
  import acc_pkg::*;
#(
  parameter int unsigned P_IFM = 3,   // intra-feature-map parallelism
  parameter int unsigned P_OL  = 48,  // intra-layer parallelism
  parameter int unsigned K_MAX = 11   // largest filter size
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [K_W-1:0] k,
  input  logic           start,
  // weights from the weights quantization machine
  input  logic           w_valid,
  output logic           w_ready,
  input  qv_t            w_data,
  output logic           w_loaded,
  // inputs from the input quantization machine
  input  logic           x_valid,
  output logic           x_ready,
  input  qv_t            x_data [P_IFM],
  // convolution results
  output logic           out_valid,
  input  logic           out_ready,
  output acc_t           out_data [P_OL],
  output logic           ce
);
  localparam int unsigned KK  = K_MAX * K_MAX;
  localparam int unsigned EW  = $clog2(KK + 1);

  // Weight store: one word per filter tap holding the weights of all
  // P_OL x P_IFM MACs for that tap, so a single read per cycle feeds the
  // whole array. MAC (o, i) owns bits [(o*P_IFM+i)*QV_W +: QV_W].
  localparam int unsigned WW = P_OL * P_IFM * QV_W;
  logic [WW-1:0] wmem [KK];
  logic [WW-1:0] wtap;
  acc_t acc  [P_OL][P_IFM];

  logic [EW-1:0] kk;
  assign kk = EW'(k) * EW'(k);

  // ---------------- weight loading ----------------
  logic [$clog2(P_OL+1)-1:0]  wl_o;
  logic [$clog2(P_IFM+1)-1:0] wl_i;
  logic [EW-1:0]              wl_e;

  assign w_ready = !w_loaded;

  always_ff @(posedge clk) begin
    if (w_valid && w_ready)
      wmem[wl_e][(32'(wl_o) * P_IFM + 32'(wl_i)) * QV_W +: QV_W] <= w_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_loaded <= 1'b1;
      wl_o <= '0; wl_i <= '0; wl_e <= '0;
    end else if (start) begin
      w_loaded <= 1'b0;
      wl_o <= '0; wl_i <= '0; wl_e <= '0;
    end else if (w_valid && w_ready) begin
      if (wl_e == kk - 1'b1) begin
        wl_e <= '0;
        if (wl_i == ($bits(wl_i))'(P_IFM - 1)) begin
          wl_i <= '0;
          if (wl_o == ($bits(wl_o))'(P_OL - 1)) begin
            wl_o     <= '0;
            w_loaded <= 1'b1;
          end else begin
            wl_o <= wl_o + 1'b1;
          end
        end else begin
          wl_i <= wl_i + 1'b1;
        end
      end else begin
        wl_e <= wl_e + 1'b1;
      end
    end
  end

  // ---------------- MAC array ----------------
  logic [EW-1:0] e;          // tap index inside the current window
  logic          take;
  logic          last_tap;

  assign x_ready  = w_loaded && !(out_valid && !out_ready);
  assign take     = x_valid && x_ready;
  assign last_tap = (e == kk - 1'b1);

  // products and window sums of the beat being taken
  acc_t prod [P_OL][P_IFM];
  acc_t tree [P_OL];
  assign wtap = wmem[e];
  always_comb begin
    for (int o = 0; o < P_OL; o++) begin
      tree[o] = '0;
      for (int i = 0; i < P_IFM; i++) begin
        prod[o][i] = ACC_W'(x_data[i])
                   * ACC_W'($signed(wtap[(o * P_IFM + i) * QV_W +: QV_W]));
        tree[o]    = tree[o] + ((e == '0) ? prod[o][i] : acc[o][i] + prod[o][i]);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (take)
      for (int o = 0; o < P_OL; o++)
        for (int i = 0; i < P_IFM; i++)
          acc[o][i] <= (e == '0) ? prod[o][i] : acc[o][i] + prod[o][i];
    if (take && last_tap)
      for (int o = 0; o < P_OL; o++) out_data[o] <= tree[o];
  end

  assign ce = take && last_tap;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e         <= '0;
      out_valid <= 1'b0;
    end else begin
      if (start) e <= '0;
      else if (take) e <= last_tap ? '0 : e + 1'b1;
      if (ce)             out_valid <= 1'b1;
      else if (out_ready) out_valid <= 1'b0;
    end
  end

  // The filter must fit the array of stored taps.
  assert property (@(posedge clk) disable iff (!rst_n) start |-> (k != '0 && 32'(k) <= K_MAX));
endmodule
