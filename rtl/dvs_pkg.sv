// Shared types and constants of the DVS camera interface.
//
// The frame buffer holds 64x64 pixels, one 32-bit word per pixel, with 16
// two-bit slots per word (one slot per event frame). Slot contents use the
// ternary code of cutie_pkg: 00 = no event, 01 = last event positive,
// 11 = last event negative. The configuration is presented as a struct of
// static inputs; the register map that would hold it is this design's choice
// and not part of the documented peripheral.
package dvs_pkg;

  localparam int unsigned FB_WORDS  = 4096;  // 64 x 64 pixels
  localparam int unsigned FB_WIDTH  = 32;    // 16 slots x 2 bits
  localparam int unsigned FB_SLOTS  = 16;    // c_curr wraps from 15 to 0
  localparam int unsigned FRAME_DIM = 64;

  // One event from the camera front end.
  typedef struct packed {
    logic [7:0] x;
    logic [7:0] y;
    logic       pol;   // 1: brightness increase (+1), 0: decrease (-1)
  } dvs_event_t;

  typedef struct packed {
    logic        event_mode;    // 1: write each event as one 32-bit word
    logic [3:0]  c_in;          // frames per CNN input window, 1..15
    logic [3:0]  s_win;         // frames between two windows, 1..15
    logic [1:0]  ds_shift;      // downsampling: coordinates are shifted right by this
    logic [31:0] dest_addr;     // byte address the output is written to
    logic [15:0] evt_buf_words; // event mode: ring length in words (0 = 65536)
  } dvs_cfg_t;

  // 32-bit word written per event in event mode.
  function automatic logic [31:0] event_word(dvs_event_t e);
    return {15'd0, e.pol, e.y, e.x};
  endfunction

endpackage
