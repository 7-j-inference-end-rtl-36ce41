// Arbitration of the single frame-buffer port between the event writer (WR,
// requester 0) and the window readout (RD, requester 1).
//
// Each requester presents a complete access (we, address, data, bit mask) and
// holds it until it sees its grant. When both request in the same cycle the
// grant alternates (round robin), so neither a burst of events nor a running
// readout can starve the other; with a single requester it is granted at
// once. The documented peripheral only names this unit; the round-robin
// policy is this design's choice. The grant is combinational and the chosen
// access goes to the memory in the same cycle.
module fb_arbiter #(
  parameter int unsigned AW = 12,
  parameter int unsigned DW = 32
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  // requester 0: event writer
  input  logic          req0_i,
  input  logic          we0_i,
  input  logic [AW-1:0] addr0_i,
  input  logic [DW-1:0] wdata0_i,
  input  logic [DW-1:0] bmask0_i,
  output logic          gnt0_o,
  // requester 1: readout
  input  logic          req1_i,
  input  logic          we1_i,
  input  logic [AW-1:0] addr1_i,
  input  logic [DW-1:0] wdata1_i,
  input  logic [DW-1:0] bmask1_i,
  output logic          gnt1_o,
  // memory side
  output logic          req_o,
  output logic          we_o,
  output logic [AW-1:0] addr_o,
  output logic [DW-1:0] wdata_o,
  output logic [DW-1:0] bmask_o,
  // both requested in this cycle (one of them waits)
  output logic          conflict_o
);

  logic last1_q;  // requester 1 won the last conflict

  always_comb begin
    gnt0_o = 1'b0;
    gnt1_o = 1'b0;
    if (req0_i && req1_i) begin
      if (last1_q) gnt0_o = 1'b1;
      else         gnt1_o = 1'b1;
    end else begin
      gnt0_o = req0_i;
      gnt1_o = req1_i;
    end
  end

  assign conflict_o = req0_i && req1_i;
  assign req_o   = gnt0_o || gnt1_o;
  assign we_o    = gnt1_o ? we1_i    : we0_i;
  assign addr_o  = gnt1_o ? addr1_i  : addr0_i;
  assign wdata_o = gnt1_o ? wdata1_i : wdata0_i;
  assign bmask_o = gnt1_o ? bmask1_i : bmask0_i;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)         last1_q <= 1'b0;
    else if (conflict_o) last1_q <= gnt1_o;
  end

endmodule
