// hmix_pkg: types and constants shared by the HMix MLP-Mixer accelerator.
//
// The systolic array is N x N (16 x 16) with INT8 operands and INT32 partial
// sums, as in the document. The pipeline latencies of the helper units are
// this design's own choices; the controller uses them to line up the
// staggered streams, so a unit whose latency changes must change here too.
// The quantization parameters (b, c pairs and the I-GELU constants) are
// computed offline by the host and handed to the accelerator as one struct.
package hmix_pkg;

  localparam int unsigned N         = 16;  // systolic array rows = columns = banks
  localparam int unsigned DATA_W    = 8;   // INT8 activations and weights
  localparam int unsigned ACC_W     = 32;  // INT32 accumulation
  localparam int unsigned WIDE_W    = 64;  // GELU output / REQUANT input width

  // Pipeline latencies in clock cycles (design choices).
  localparam int unsigned MEM_LAT   = 1;   // registered BRAM read
  localparam int unsigned TU_LAT    = 1;   // transpose unit buffer stage
  localparam int unsigned GELU_LAT  = 3;
  localparam int unsigned REQ_LAT   = 2;
  localparam int unsigned SCALE_LAT = 1;
  localparam int unsigned LN_LAT    = 2;   // LayerNorm second-pass latency

  // Which MLP of the mixer layer is run.
  typedef enum logic {
    MIX_TM = 1'b0,   // token mixing: operates along the patch dimension
    MIX_CM = 1'b1    // channel mixing: operates along the channel dimension
  } mix_mode_e;

  // Control word broadcast to every PE.
  typedef struct packed {
    logic is_mode;   // 1: input stationary (second MLP layer)
    logic drain;     // OS only: psum registers shift one PE to the right
  } pe_ctrl_t;

  // Offline quantization constants.
  typedef struct packed {
    logic signed [31:0] gelu_qb;     // floor(b / S'), I-POLY offset
    logic signed [63:0] gelu_qc;     // floor(c / (a S'^2)), I-POLY constant
    logic signed [63:0] gelu_q1;     // floor(1 / S_erf)
    logic        [31:0] gelu_qclip;  // -b / S', clip limit of |q|
    logic        [15:0] rq_hid_b;    // REQUANT of GELU output to INT8 hidden
    logic        [5:0]  rq_hid_c;
    logic        [15:0] rq_out_b;    // REQUANT of final psum to INT8 output
    logic        [5:0]  rq_out_c;
    logic        [15:0] sc_b;        // SCALE of INT8 residual into psum domain
    logic        [5:0]  sc_c;
    logic        [4:0]  ln_recip_sh; // reciprocal = (2 << ln_recip_sh) / sigma
    logic        [5:0]  ln_out_sh;   // right shift of the normalized product
  } qparams_t;

  // Saturate a signed value to INT8.
  function automatic logic signed [7:0] sat8(input logic signed [127:0] v);
    if (v > 127)       return 8'sd127;
    else if (v < -128) return -8'sd128;
    else               return v[7:0];
  endfunction

endpackage
