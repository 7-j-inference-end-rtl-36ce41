// Line buffer of the ternary accelerator: three feature-map lines, from which
// kernel windows are dispatched.
//
// Each line holds W_MAX pixels, a pixel being a vector of N_CH ternary
// values. Lines are written one pixel per cycle. Every input pixel is loaded
// once per layer; the window for each output pixel is then gathered from the
// stored lines without touching the activation memory again, as described
// for the documented accelerator's 3-line buffer.
//   2D mode: window tap 3*r + c is pixel (column cx-1+c) of the line in slot
//            row_slot[r]; taps on a row marked invalid or outside columns
//            0..width-1 are zero (zero padding).
//   1D mode: line slot 0 holds a time sequence; tap j < ksize is the pixel at
//            time t - dil*(ksize-1-j), zero when that is negative (causal
//            padding); taps j >= ksize are zero.
// The 1D use of the buffer for the dilated, causal TCN layers is this
// design's choice. Gathering is combinational; writes take effect at the
// clock edge.
module cutie_linebuf
  import cutie_pkg::*;
#(
  parameter int unsigned N_CH  = 96,
  parameter int unsigned W_MAX = 64
) (
  input  logic                        clk_i,
  // line write
  input  logic                        we_i,
  input  logic [1:0]                  wslot_i,
  input  logic [$clog2(W_MAX)-1:0]    wcol_i,
  input  tern_t [N_CH-1:0]            wdata_i,
  // window selection
  input  logic                        mode_1d_i,
  input  logic [2:0][1:0]             row_slot_i,
  input  logic [2:0]                  row_valid_i,
  input  logic [7:0]                  cx_i,
  input  logic [7:0]                  width_i,
  input  logic [7:0]                  t_i,
  input  logic [4:0]                  ksize_i,
  input  logic [4:0]                  dil_i,
  output tern_t [TAPS-1:0][N_CH-1:0]  win_o
);

  tern_t [N_CH-1:0] lines [3][W_MAX];

  always_ff @(posedge clk_i) begin
    if (we_i) lines[wslot_i][wcol_i] <= wdata_i;
  end

  always_comb begin
    int col;
    for (int j = 0; j < int'(TAPS); j++) begin
      win_o[j] = '0;
      if (mode_1d_i) begin
        col = int'(t_i) - int'(dil_i) * (int'(ksize_i) - 1 - j);
        if (j < int'(ksize_i) && col >= 0 && col < int'(W_MAX))
          win_o[j] = lines[0][col];
      end else if (j < 9) begin
        col = int'(cx_i) - 1 + (j % 3);
        if (row_valid_i[j / 3] && col >= 0 && col < int'(width_i) && col < int'(W_MAX))
          win_o[j] = lines[row_slot_i[j / 3]][col];
      end
    end
  end

endmodule
