// dcnn_pkg: sizes and helper functions shared by the DCNN accelerator.
// Activations and weights are 6-bit sign-magnitude words: bit 5 is the sign,
// bits 4:0 the magnitude (the 5-bit quantised network is held in 6 bits).
// A product is a sign plus a 10-bit magnitude. Partial sums, bias values and
// quantisation thresholds are ACC_W-bit two's complement (ACC_W is this
// design's choice; the source gives no accumulator width).
package dcnn_pkg;
  localparam int DW     = 6;          // stored data width (sign + magnitude)
  localparam int MW     = DW - 1;     // magnitude width
  localparam int PW     = 2 * MW;     // product magnitude width
  localparam int SPW    = PW + 1;     // signed product width (two's complement)
  localparam int LANES  = 64;         // input channels read in parallel
  localparam int NK     = 4;          // convolution kernels per pass
  localparam int NSLOT  = 5;          // data sent per channel per clock (in1..in5)
  localparam int NPOS   = 9;          // 3x3 kernel positions
  localparam int FCW    = 8;          // FC weight words per kernel per step
  localparam int ACC_W  = 24;         // accumulator / threshold width
  localparam int NTHR   = 31;         // thresholds d1..d31 of the Q/A unit
  localparam int QW     = 5;          // Q/A output width (0..31)

  typedef logic [DW-1:0]        sm_t;     // sign-magnitude datum
  typedef logic signed [SPW-1:0] prod_t;  // product as two's complement
  typedef logic signed [ACC_W-1:0] acc_t;

  // Side-band that travels with every beat of data from INPUT CU to OUTPUT CU.
  typedef struct packed {
    logic valid;   // beat carries data
    logic phase;   // 0: first clock of a window / FC step, 1: second clock
    logic first;   // first beat of an output value (load bias or partial sum)
    logic last;    // last beat of an output value (result complete)
  } beat_t;

  // One entry of the layer table read by TOP CU (Algorithm 1 hyper-parameters).
  typedef struct packed {
    logic        conv;        // cov_en: convolution (1) or fully connected (0)
    logic        pool;        // pool_en: 2x2 max pooling after the layer
    logic [15:0] n;           // input feature-map size (conv)
    logic [15:0] cin_groups;  // ceil(inchan_num / 64)
    logic [15:0] kgroups;     // cov_num / 4, or fcout_num / 4 rounded up
    logic [15:0] fc_steps;    // fcin_num / 512 (FC)
    logic [15:0] rom_base;    // ROM entry of the first output channel
    logic [15:0] nvalid;      // real outputs of the layer (SOFTMAX range)
  } layer_t;

  // Sign-magnitude product (sign, magnitude) to two's complement.
  function automatic prod_t sm_prod(input logic sgn, input logic [PW-1:0] mag);
    prod_t m;
    m = prod_t'({1'b0, mag});
    return sgn ? -m : m;
  endfunction

  // 6-bit sign-magnitude to signed integer.
  function automatic int sm2int(input sm_t v);
    return v[DW-1] ? -int'(v[MW-1:0]) : int'(v[MW-1:0]);
  endfunction
endpackage
