// Output channel compute unit (OCU) of the ternary accelerator.
//
// One OCU computes one output channel of one output pixel per cycle, fully
// unrolled: the pre-activation
//     z = sum over taps t and input channels i of  x[t][i] * w[t][i]
// over the whole TAPS x N_CH kernel window, and the ternary activation
//     y = -1 if z < t_lo,  0 if t_lo <= z < t_hi,  +1 if z >= t_hi.
// Ternary products are formed with bit logic (a product is non-zero when
// both operands are, and negative when their signs differ) and z is the
// difference of two popcounts, as the documented accelerator describes for
// ternary dot products. The OCU keeps its own buffer with the filter and the
// two thresholds of every layer, so weights are loaded only once.
// The popcount formulation, the flip-flop weight buffer (the documented
// accelerator uses latches) and one full kernel per buffer write are this
// design's choices.
//
// Timing: z_o and y_o are combinational in win_i and layer_i; a buffer write
// (wr_en_i) takes effect at the next clock edge.
module cutie_ocu
  import cutie_pkg::*;
#(
  parameter int unsigned N_CH     = 96,
  parameter int unsigned N_LAYERS = 9,
  parameter int unsigned ZW       = 12
) (
  input  logic                            clk_i,
  // weight and threshold buffer write
  input  logic                            wr_en_i,
  input  logic [$clog2(N_LAYERS)-1:0]     wr_layer_i,
  input  tern_t [TAPS-1:0][N_CH-1:0]      wr_w_i,
  input  logic signed [ZW-1:0]            wr_tlo_i,
  input  logic signed [ZW-1:0]            wr_thi_i,
  // compute
  input  logic [$clog2(N_LAYERS)-1:0]     layer_i,
  input  tern_t [TAPS-1:0][N_CH-1:0]      win_i,
  output logic signed [ZW-1:0]            z_o,
  output tern_t                           y_o
);

  localparam int unsigned NW = TAPS * N_CH;

  logic [2*NW-1:0]      wbuf [N_LAYERS];
  logic signed [ZW-1:0] tlo  [N_LAYERS];
  logic signed [ZW-1:0] thi  [N_LAYERS];

  always_ff @(posedge clk_i) begin
    if (wr_en_i) begin
      wbuf[wr_layer_i] <= wr_w_i;
      tlo[wr_layer_i]  <= wr_tlo_i;
      thi[wr_layer_i]  <= wr_thi_i;
    end
  end

  logic [2*NW-1:0] w_flat, x_flat;
  logic [NW-1:0]   x_nz, x_sg, w_nz, w_sg, p_nz, p_neg, p_pos;

  assign w_flat = wbuf[layer_i];
  assign x_flat = win_i;

  always_comb begin
    for (int n = 0; n < int'(NW); n++) begin
      x_nz[n] = x_flat[2*n];
      x_sg[n] = x_flat[2*n+1];
      w_nz[n] = w_flat[2*n];
      w_sg[n] = w_flat[2*n+1];
    end
  end

  assign p_nz  = x_nz & w_nz;
  assign p_neg = p_nz & (x_sg ^ w_sg);
  assign p_pos = p_nz & ~p_neg;

  assign z_o = ZW'($countones(p_pos)) - ZW'($countones(p_neg));

  always_comb begin
    if (z_o < tlo[layer_i])       y_o = T_NEG;
    else if (z_o >= thi[layer_i]) y_o = T_POS;
    else                          y_o = T_ZERO;
  end

endmodule
