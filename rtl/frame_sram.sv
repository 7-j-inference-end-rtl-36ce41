// Frame-buffer memory of the DVS interface: 4096 words of 32 bits, one port.
//
// Model of the SRAM macro that stores up to 15 event frames, one word per
// pixel of the 64x64 frame. Every write carries a per-bit write mask, which is
// what lets the event writer set a single two-bit frame slot and the readout
// clear stale slots without a read-modify-write. Size and bit-selection
// follow the documented peripheral; the single port and the one-cycle read
// latency are this design's choice (typical of a single-port macro).
//
// Timing: a read (req & !we) returns the word on rdata in the next cycle and
// rdata holds until the next read. A write (req & we) updates only the bits
// whose bmask bit is set.
module frame_sram #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk_i,
  input  logic                     req_i,
  input  logic                     we_i,
  input  logic [$clog2(DEPTH)-1:0] addr_i,
  input  logic [WIDTH-1:0]         wdata_i,
  input  logic [WIDTH-1:0]         bmask_i,
  output logic [WIDTH-1:0]         rdata_o
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk_i) begin
    if (req_i) begin
      if (we_i) begin
        for (int b = 0; b < int'(WIDTH); b++)
          if (bmask_i[b]) mem[addr_i][b] <= wdata_i[b];
      end else begin
        rdata_o <= mem[addr_i];
      end
    end
  end

endmodule
