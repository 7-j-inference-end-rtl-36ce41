// 2x2 max-pooling unit of the ternary accelerator.
//
// Takes the activation stream of a convolution in raster order (x fastest)
// and, when pooling is enabled, emits one pixel per 2x2 block at coordinates
// (y/2, x/2), each channel being the largest of the four values. A row buffer
// of W_MAX/2 partial maxima carries the first row of each block to the second
// one. Pooling the thresholded activations gives the same result as
// thresholding the pooled pre-activations (the order the network is
// specified in), because the ternary threshold function never decreases
// with its argument; pooling after thresholding only needs two-bit values.
// That reordering and the row buffer are this design's choices. With pooling
// disabled the stream passes unchanged.
//
// Timing: one cycle from in_valid_i to out_valid_o.
module cutie_pool
  import cutie_pkg::*;
#(
  parameter int unsigned N_CH  = 96,
  parameter int unsigned W_MAX = 64
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              pool_en_i,
  input  logic              in_valid_i,
  input  logic [7:0]        in_x_i,
  input  logic [7:0]        in_y_i,
  input  tern_t [N_CH-1:0]  in_data_i,
  output logic              out_valid_o,
  output logic [7:0]        out_x_o,
  output logic [7:0]        out_y_o,
  output tern_t [N_CH-1:0]  out_data_o
);

  tern_t [N_CH-1:0] rowbuf [W_MAX/2];
  tern_t [N_CH-1:0] merged;
  logic [$clog2(W_MAX/2)-1:0] bx;

  assign bx = in_x_i[$clog2(W_MAX/2):1];

  always_comb begin
    for (int c = 0; c < int'(N_CH); c++) merged[c] = tern_max(rowbuf[bx][c], in_data_i[c]);
  end

  always_ff @(posedge clk_i) begin
    if (in_valid_i && pool_en_i) begin
      if (!in_y_i[0] && !in_x_i[0]) rowbuf[bx] <= in_data_i;
      else                          rowbuf[bx] <= merged;
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      out_valid_o <= 1'b0;
      out_x_o     <= '0;
      out_y_o     <= '0;
      out_data_o  <= '0;
    end else if (!pool_en_i) begin
      out_valid_o <= in_valid_i;
      out_x_o     <= in_x_i;
      out_y_o     <= in_y_i;
      out_data_o  <= in_data_i;
    end else begin
      out_valid_o <= in_valid_i && in_x_i[0] && in_y_i[0];
      out_x_o     <= in_x_i >> 1;
      out_y_o     <= in_y_i >> 1;
      out_data_o  <= merged;
    end
  end

endmodule
