// Event writer (WR) of the DVS interface.
//
// Turns one camera event into one masked frame-buffer write. The coordinates
// are first downsampled by a right shift (the documented network uses a
// factor of 2, a shift of 1). An event at downsampled (y, x) writes the
// ternary code of its polarity into bits [2*c_curr+1 : 2*c_curr] of word
// 64*y + x, where c_curr is the slot of the frame being recorded. A later
// event on the same pixel in the same frame overwrites the earlier one, so a
// pixel ends up with the polarity of its most recent event. These rules
// follow the documented peripheral. Events whose downsampled coordinates
// fall outside the 64x64 frame are dropped (accepted without a write), which
// is this design's choice.
//
// Interface: valid/ready event input; the write request goes to the
// frame-buffer arbiter and the event is accepted in the cycle of the grant.
// Purely combinational.
module dvs_event_writer
  import dvs_pkg::*;
  import cutie_pkg::*;
(
  input  logic             evt_valid_i,
  input  dvs_event_t       evt_i,
  output logic             evt_ready_o,
  input  logic [1:0]       ds_shift_i,
  input  logic [3:0]       c_curr_i,
  // frame-buffer request
  output logic             req_o,
  output logic [11:0]      addr_o,
  output logic [31:0]      wdata_o,
  output logic [31:0]      bmask_o,
  input  logic             gnt_i,
  // status
  output logic             written_o,  // an event was written this cycle
  output logic             dropped_o   // an out-of-frame event was discarded
);

  logic [7:0] xd, yd;
  logic       in_frame;

  assign xd       = evt_i.x >> ds_shift_i;
  assign yd       = evt_i.y >> ds_shift_i;
  assign in_frame = (xd < 8'(FRAME_DIM)) && (yd < 8'(FRAME_DIM));

  assign req_o   = evt_valid_i && in_frame;
  assign addr_o  = {yd[5:0], xd[5:0]};
  assign wdata_o = {16{evt_i.pol ? T_POS : T_NEG}};
  assign bmask_o = 32'h3 << {c_curr_i, 1'b0};

  assign evt_ready_o = in_frame ? gnt_i : 1'b1;
  assign written_o   = req_o && gnt_i;
  assign dropped_o   = evt_valid_i && !in_frame;

endmodule
