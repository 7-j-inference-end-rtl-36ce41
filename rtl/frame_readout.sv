// Window readout (RD) of the DVS interface.
//
// When started, it streams the most recent C_in complete frames out of the
// frame buffer, one 32-bit word per pixel, to consecutive byte addresses
// dest_addr + 4*i (i = 64*y + x). For each word it
//   1. reads the word,
//   2. rotates it right so that the oldest frame of the window lands in
//      bits [1:0] (frame k of the window in bits [2k+1:2k]) and clears bits
//      [31 : 2*C_in],
//   3. clears, with one masked write, the slots that the next window will not
//      use, so old events cannot leak into later frames,
//   4. hands the word to the memory write port and waits for its acceptance.
// The rotate/mask/clear scheme follows the documented peripheral. Slot
// indices: with c_act the slot of the frame being recorded when the readout
// starts, the window is slots c_act-C_in .. c_act-1 (mod 16) and the cleared
// slots are c_act-max(C_in,s_win) .. that plus s_win-1. For s_win <= C_in
// these are the s_win oldest frames of the window. The exact rotation amount
// and the sequential (non-pipelined) access pattern, about four cycles per
// word, are this design's choices.
//
// Interface: start_i (one cycle) latches c_act, C_in and s_win; busy_o is high
// until done_o pulses after the last word was accepted. wipe_i (one cycle,
// while idle) instead writes zero to every word, one word per granted cycle,
// without output and without done_o; the interface uses it after reset so
// that the first windows do not carry power-up contents (this design's
// choice). wdata_o is always zero: the readout only ever writes to clear
// slots, and bmask_o selects which bits are cleared.
module frame_readout #(
  parameter int unsigned WORDS = 4096
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        start_i,
  input  logic        wipe_i,
  input  logic [3:0]  c_act_i,
  input  logic [3:0]  c_in_i,
  input  logic [3:0]  s_win_i,
  input  logic [31:0] dest_addr_i,
  // frame-buffer port (through the arbiter)
  output logic        req_o,
  output logic        we_o,
  output logic [11:0] addr_o,
  output logic [31:0] wdata_o,
  output logic [31:0] bmask_o,
  input  logic        gnt_i,
  input  logic [31:0] rdata_i,
  // memory write port
  output logic        m_valid_o,
  output logic [31:0] m_addr_o,
  output logic [31:0] m_data_o,
  input  logic        m_ready_i,
  // status
  output logic        busy_o,
  output logic        done_o
);

  typedef enum logic [2:0] {S_IDLE, S_READ, S_CAP, S_CLEAR, S_OUT, S_WIPE} state_e;
  state_e state_q;

  logic [11:0] idx_q;
  logic [3:0]  c_act_q, c_in_q, s_win_q;
  logic [31:0] dest_q, word_q;

  logic [3:0]  oldest, clr_base, span;
  logic [63:0] dbl;
  logic [31:0] rot, keep_mask, clr_mask;

  // oldest slot of the window, and the first slot to clear
  assign oldest   = c_act_q - c_in_q;
  assign span     = (c_in_q > s_win_q) ? c_in_q : s_win_q;
  assign clr_base = c_act_q - span;

  // rotate right by 2*oldest
  assign dbl       = {rdata_i, rdata_i} >> {oldest, 1'b0};
  assign rot       = dbl[31:0];
  assign keep_mask = (c_in_q == 4'd0) ? 32'h0 : (32'hFFFF_FFFF >> (6'd32 - {1'b0, c_in_q, 1'b0}));

  always_comb begin
    clr_mask = '0;
    for (int k = 0; k < 16; k++) begin
      if (4'(k) < s_win_q) clr_mask[{4'(clr_base + 4'(k)), 1'b0} +: 2] = 2'b11;
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= S_IDLE;
      idx_q   <= '0;
      c_act_q <= '0;
      c_in_q  <= '0;
      s_win_q <= '0;
      dest_q  <= '0;
      word_q  <= '0;
      done_o  <= 1'b0;
    end else begin
      done_o <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start_i) begin
          c_act_q <= c_act_i;
          c_in_q  <= c_in_i;
          s_win_q <= s_win_i;
          dest_q  <= dest_addr_i;
          idx_q   <= '0;
          state_q <= S_READ;
        end else if (wipe_i) begin
          idx_q   <= '0;
          state_q <= S_WIPE;
        end
        S_WIPE: if (gnt_i) begin
          if (32'(idx_q) == WORDS - 1) state_q <= S_IDLE;
          idx_q <= idx_q + 1'b1;
        end
        S_READ:  if (gnt_i) state_q <= S_CAP;
        S_CAP: begin
          word_q  <= rot & keep_mask;
          state_q <= S_CLEAR;
        end
        S_CLEAR: if (gnt_i) state_q <= S_OUT;
        S_OUT: if (m_ready_i) begin
          if (32'(idx_q) == WORDS - 1) begin
            state_q <= S_IDLE;
            done_o  <= 1'b1;
          end else begin
            idx_q   <= idx_q + 1'b1;
            state_q <= S_READ;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign req_o   = (state_q == S_READ) || (state_q == S_CLEAR) || (state_q == S_WIPE);
  assign we_o    = (state_q == S_CLEAR) || (state_q == S_WIPE);
  assign addr_o  = idx_q;
  assign wdata_o = '0;
  assign bmask_o = (state_q == S_WIPE) ? 32'hFFFF_FFFF : clr_mask;

  assign m_valid_o = (state_q == S_OUT);
  assign m_addr_o  = dest_q + {18'd0, idx_q, 2'b00};
  assign m_data_o  = word_q;
  assign busy_o    = (state_q != S_IDLE);

endmodule
