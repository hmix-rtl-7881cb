// tb_hmix_top: end-to-end test of three cascaded mixer layers (each token
// mixing then channel mixing, as in the full model) on a reduced model: 20 tokens (padded to 32), 32 channels,
// hidden sizes 32 (TM) and 48 (CM). The array, TUs and all units are at their
// full 16-lane size. See hmix_e2e_body.svh for what is checked.
// The dataflow checked follows the document; the small sizes, host
// protocol and quantization constants are this bench's own.
module tb_hmix_top;
  localparam int unsigned TOKENS     = 20;
  localparam int unsigned CHANNELS   = 32;
  localparam int unsigned TM_HIDDEN  = 32;
  localparam int unsigned CM_HIDDEN  = 48;
  localparam int unsigned LAYERS     = 3;
  localparam int unsigned RQ_HID_C   = 22;
  localparam int unsigned RQ_OUT_C   = 6;
  localparam int unsigned SC_B       = 40;
  localparam longint      MAX_CYCLES = 600000;

  `include "hmix_e2e_body.svh"

  hmix_top #(
    .TOKENS(TOKENS), .CHANNELS(CHANNELS), .TM_HIDDEN(TM_HIDDEN), .CM_HIDDEN(CM_HIDDEN)
  ) dut (.*);
endmodule
