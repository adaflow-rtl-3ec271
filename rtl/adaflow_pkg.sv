// adaflow_pkg: types, constants and the default network description shared by
// the flexible dataflow modules and the accelerator top.
//
// The default network is the CNV topology (six 3x3 convolutions, two 2x2 max
// pools, three fully connected layers) on 3x32x32 images, with 2-bit weights and
// 2-bit activations (CNVW2A2) and an 8-bit image input. The per-layer folding
// (PE, SIMD) follows the usual published folding of this network for FINN; the
// last layer uses PE=2 so that its 10 outputs divide evenly.
//
// Every flexible module has a 16-bit port that carries its current channel
// count; CFG_W is that width.
package adaflow_pkg;

  localparam int unsigned CFG_W = 16;   // width of a runtime channel-count port
  typedef logic [CFG_W-1:0] ch_t;

  localparam int unsigned WR_ADDR_W = 16; // weight/threshold write address width

  // Which memory of an MVTU a host write goes to.
  typedef enum logic {
    MEM_WEIGHT = 1'b0,
    MEM_THRESH = 1'b1
  } mem_sel_e;

  // Default CNV layer table (index 0 = first convolution).
  localparam int unsigned CNV_NL = 9;
  typedef int unsigned cnv_arr_t [CNV_NL];

  localparam cnv_arr_t CNV_K    = '{3, 3, 3, 3, 3, 3, 1, 1, 1};
  localparam cnv_arr_t CNV_IFM  = '{32, 30, 14, 12, 5, 3, 1, 1, 1};
  localparam cnv_arr_t CNV_COUT = '{64, 64, 128, 128, 256, 256, 512, 512, 10};
  localparam cnv_arr_t CNV_PE   = '{16, 32, 16, 16, 4, 1, 1, 1, 2};
  localparam cnv_arr_t CNV_SIMD = '{3, 32, 32, 32, 32, 32, 4, 8, 1};
  // 1 = a 2x2 max pool follows this layer
  localparam cnv_arr_t CNV_POOL = '{0, 1, 0, 1, 0, 0, 0, 0, 0};

  localparam int unsigned CNV_CIN0   = 3;   // image channels
  localparam int unsigned CNV_IN0_W  = 8;   // image pixel bits
  localparam int unsigned CNV_ABITS  = 2;   // activation bits
  localparam int unsigned CNV_WBITS  = 2;   // weight bits (signed)
  localparam int unsigned CNV_ACC_W  = 16;  // accumulator / threshold bits

  function automatic int unsigned imax(int unsigned a, int unsigned b);
    return (a > b) ? a : b;
  endfunction

  // Number of thresholds of an activation of 'bits' bits.
  function automatic int unsigned n_thresh(int unsigned bits);
    return (1 << bits) - 1;
  endfunction

endpackage
