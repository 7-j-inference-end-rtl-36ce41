// Shared types and helpers of the ternary accelerator.
//
// A ternary value {-1, 0, +1} travels as two bits in two's-complement form:
// 2'b00 = 0, 2'b01 = +1, 2'b11 = -1 (2'b10 is never produced and reads as 0).
// Bit 0 is therefore "non-zero" and bit 1 is "negative", which is what the
// popcount datapath of the output channel compute units uses directly.
// The two-bit encoding is this design's choice; the frame buffer of the DVS
// interface uses the same one, so its words can be copied into the activation
// memory unchanged.
package cutie_pkg;

  typedef logic [1:0] tern_t;

  localparam tern_t T_ZERO = 2'b00;
  localparam tern_t T_POS  = 2'b01;
  localparam tern_t T_NEG  = 2'b11;

  // Kernel window: 3x3 for the 2D layers; 1D layers use the first taps.
  localparam int unsigned TAPS = 9;

  // Per-layer configuration of the layer sequencer.
  typedef struct packed {
    logic       is_1d;     // 1: 1D (TCN) layer on one line, 0: 3x3 2D layer
    logic       pad_same;  // 2D: same (1) / valid (0); 1D: causal same (1) / valid (0)
    logic       pool;      // 2D only: 2x2 max pooling after the convolution
    logic       src_tcn;   // 1D only: input line is read from the TCN buffer
    logic       to_tcn;    // 2D only: the 1x1 output vector is pushed to the TCN buffer
    logic       last;      // final layer: pre-activations are the class scores
    logic [6:0] in_w;      // input width (2D: height equals width), 1..64
    logic [4:0] ksize;     // 1D kernel size, 1..9
    logic [4:0] dil;       // 1D dilation, >= 1
  } layer_cfg_t;

  // Integer value of a ternary code.
  function automatic int tern_val(tern_t t);
    if (!t[0]) return 0;
    return t[1] ? -1 : 1;
  endfunction

  // Larger of two ternary values (used by max pooling).
  function automatic tern_t tern_max(tern_t a, tern_t b);
    return (tern_val(a) >= tern_val(b)) ? a : b;
  endfunction

endpackage
