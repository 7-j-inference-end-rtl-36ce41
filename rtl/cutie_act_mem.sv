// Activation memory bank of the ternary accelerator.
//
// DEPTH words, one per feature-map pixel (address 64*y + x), each holding the
// N_CH ternary channels of that pixel. One write port with a per-channel
// write mask and one read port with one cycle of latency, as a single SRAM
// bank with separate read and write ports would have. The documented
// accelerator keeps its activations in internal memories; their organisation
// here (two such banks used in ping-pong fashion, pixel-wise words) is this
// design's choice.
module cutie_act_mem
  import cutie_pkg::*;
#(
  parameter int unsigned N_CH  = 96,
  parameter int unsigned DEPTH = 4096
) (
  input  logic                     clk_i,
  input  logic                     we_i,
  input  logic [$clog2(DEPTH)-1:0] waddr_i,
  input  tern_t [N_CH-1:0]         wdata_i,
  input  logic [N_CH-1:0]          wmask_i,
  input  logic                     re_i,
  input  logic [$clog2(DEPTH)-1:0] raddr_i,
  output tern_t [N_CH-1:0]         rdata_o
);

  tern_t [N_CH-1:0] mem [DEPTH];

  always_ff @(posedge clk_i) begin
    if (we_i) begin
      for (int c = 0; c < int'(N_CH); c++)
        if (wmask_i[c]) mem[waddr_i][c] <= wdata_i[c];
    end
    if (re_i) rdata_o <= mem[raddr_i];
  end

endmodule
