// TCN buffer of the ternary accelerator: the last DEPTH output vectors of the
// 2D CNN, from which the TCN reads its input window.
//
// A push stores one N_CH-channel vector at the write pointer and advances it
// (circularly), overwriting the oldest vector. A read with window length
// n_win_i and index rd_t_i returns the vector pushed (n_win_i-1-rd_t_i) pushes
// ago, so rd_t_i = 0 is the oldest and n_win_i-1 the newest vector of the
// window. Vectors that were never pushed read as zero after reset. The
// 24-vector depth follows the documented accelerator; the organisation is
// this design's choice. Reads are combinational.
module cutie_tcn_buf
  import cutie_pkg::*;
#(
  parameter int unsigned N_CH  = 96,
  parameter int unsigned DEPTH = 24
) (
  input  logic                      clk_i,
  input  logic                      rst_ni,
  input  logic                      push_i,
  input  tern_t [N_CH-1:0]          push_data_i,
  input  logic [$clog2(DEPTH+1)-1:0] n_win_i,
  input  logic [$clog2(DEPTH)-1:0]  rd_t_i,
  output tern_t [N_CH-1:0]          rd_data_o
);

  tern_t [N_CH-1:0] buf_q [DEPTH];
  logic [$clog2(DEPTH)-1:0] wp_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      wp_q <= '0;
      for (int i = 0; i < int'(DEPTH); i++) buf_q[i] <= '0;
    end else if (push_i) begin
      buf_q[wp_q] <= push_data_i;
      wp_q        <= (32'(wp_q) == DEPTH - 1) ? '0 : wp_q + 1'b1;
    end
  end

  always_comb begin
    int idx;
    idx = int'(wp_q) - int'(n_win_i) + int'(rd_t_i);
    if (idx < 0) idx = idx + int'(DEPTH);
    if (idx >= int'(DEPTH)) idx = idx - int'(DEPTH);
    rd_data_o = buf_q[idx];
  end

endmodule
