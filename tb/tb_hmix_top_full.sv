// tb_hmix_top_full: the end-to-end test at the design's default size, the
// Mixer-B/16 layer shape (196 tokens, 768 channels, hidden 384 for token
// mixing and 3072 for channel mixing). It runs one complete mixer layer,
// token mixing followed by channel mixing, and compares every OBRAM word
// with the reference model. See hmix_e2e_body.svh.
// The sizes are the document's Mixer-B/16 sizes; the host protocol and
// constants are this bench's own.
module tb_hmix_top_full;
  localparam int unsigned TOKENS     = 196;
  localparam int unsigned CHANNELS   = 768;
  localparam int unsigned TM_HIDDEN  = 384;
  localparam int unsigned CM_HIDDEN  = 3072;
  localparam int unsigned LAYERS     = 1;
  localparam int unsigned RQ_HID_C   = 24;
  localparam int unsigned RQ_OUT_C   = 9;
  localparam int unsigned SC_B       = 320;
  localparam longint      MAX_CYCLES = 8000000;

  `include "hmix_e2e_body.svh"

  hmix_top dut (.*);
endmodule
