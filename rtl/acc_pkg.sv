// acc_pkg: types and constants shared by the blocks of the convolution
// accelerator (DataSaver, quantization machines, convolutional core,
// bias/ReLU/requantization core, max-pooling core).
//
// layer_cfg_t is the layer description the host CPU programs before it runs a
// stage. The accelerator computes none of the derived sizes (output height and
// width, pooled height and width): software supplies them, which keeps
// dividers out of the hardware. iter_cmd_t describes one "iteration", one
// call of the stage logic: one group of input feature maps (as wide as the
// intra-feature-map parallelism) against one group of output feature maps (as
// wide as the intra-layer parallelism).
//
// Quantization follows the gemmlowp scheme: real = scale * (q - zero_point),
// 8-bit unsigned codes, rescaling by a Q31 multiplier and a right shift.
package acc_pkg;

  // Widths of the configuration fields. They bound the largest layer that
  // can be programmed: 511 x 511 pixels, 1023 channels, filters up to 15 x 15.
  localparam int unsigned DIM_W   = 9;
  localparam int unsigned CH_W    = 10;
  localparam int unsigned K_W     = 4;
  localparam int unsigned ACC_W   = 32;   // MAC accumulator width
  localparam int unsigned QV_W    = 9;    // q - zero_point, signed

  typedef logic [7:0]             q8_t;   // 8-bit quantized code
  typedef logic signed [QV_W-1:0] qv_t;   // zero-point-free value
  typedef logic signed [ACC_W-1:0] acc_t;

  typedef struct packed {
    logic [DIM_W-1:0] in_h;      // input feature-map height
    logic [DIM_W-1:0] in_w;      // input feature-map width
    logic [CH_W-1:0]  in_ch;     // number of input feature maps
    logic [K_W-1:0]   k;         // convolution filter size (k x k)
    logic [2:0]       stride;    // convolution stride
    logic [2:0]       pad;       // zero padding on each border
    logic [DIM_W-1:0] out_h;     // convolution output height
    logic [DIM_W-1:0] out_w;     // convolution output width
    logic             pool_en;   // max pooling after this layer
    logic [2:0]       pool_k;    // pooling window (pool_k x pool_k)
    logic [2:0]       pool_s;    // pooling stride
    logic [DIM_W-1:0] pool_oh;   // pooled output height
    logic [DIM_W-1:0] pool_ow;   // pooled output width
    q8_t              in_zp;     // input zero point
    q8_t              w_zp;      // weight zero point
    q8_t              b_zp;      // bias zero point
    q8_t              out_zp;    // output zero point
    logic [31:0]      m1;        // Q31 multiplier: accumulator -> bias scale
    logic [5:0]       s1;        // extra right shift of the first rescale
    logic [31:0]      m2;        // Q31 multiplier: bias scale -> output scale
    logic [5:0]       s2;        // extra right shift of the second rescale
  } layer_cfg_t;

  typedef struct packed {
    logic [CH_W-1:0] ifm_group;  // which group of input maps to convolve
    logic [CH_W-1:0] ofm_base;   // index of the first output map of the group
    logic            acc_first;  // first input-map group of this output group
    logic            acc_last;   // last input-map group: finish and emit
  } iter_cmd_t;

  // gemmlowp-style rescale: round(x * m / 2^(31+s)), m a Q31 multiplier.
  function automatic logic signed [63:0] rescale(input logic signed [63:0] x,
                                                 input logic [31:0] m,
                                                 input logic [5:0] s);
    logic signed [95:0] p;
    logic [6:0] sh;
    sh = 7'd31 + 7'(s);
    p  = 96'(x) * $signed({64'd0, m});
    p  = p + (96'sd1 <<< (sh - 7'd1));
    return 64'(p >>> sh);
  endfunction

endpackage
