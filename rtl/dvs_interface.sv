// DVS camera interface: turns the camera's event stream into ternary event
// frames and streams CNN input windows to memory.
//
// Frame mode (cfg.event_mode = 0). A 4-bit wrapping counter c_curr names the
// frame-buffer slot of the frame being recorded; each new-frame tick
// (frame_tick_i, from the frame timer or a software trigger) advances it.
// Events are written into slot c_curr by the event writer. After every s_win
// frames the readout is started: it streams the C_in most recent complete
// frames to cfg.dest_addr and clears the slots that are no longer needed. When
// the readout has finished, irq_o (the data-ready interrupt) pulses.
// Event mode (cfg.event_mode = 1). Each event is written as one 32-bit word
// (dvs_pkg::event_word) to consecutive addresses of a ring of
// cfg.evt_buf_words words starting at cfg.dest_addr; the frame buffer is
// not used.
// The two modes, the 15-frame buffer, the slot scheme, the s_win trigger and
// the data-ready interrupt follow the documented peripheral. The event-word
// layout, the overrun rule and the configuration as static inputs are this
// design's choices. The camera's
// physical protocol is not documented and is left to a front end that
// delivers events as a valid/ready stream.
//
// After reset the frame buffer is wiped (one word per cycle); events are held
// off (evt_ready_o low) until the wipe has finished.
// A tick that arrives while a readout is still running advances c_curr as
// usual; if that tick would start the next readout it is dropped and
// overrun_o pulses.
module dvs_interface
  import dvs_pkg::*;
#(
  parameter int unsigned FB_DEPTH = 4096
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  dvs_cfg_t    cfg_i,
  // event stream from the camera front end
  input  logic        evt_valid_i,
  input  dvs_event_t  evt_i,
  output logic        evt_ready_o,
  // start of a new frame interval
  input  logic        frame_tick_i,
  // memory write port
  output logic        m_valid_o,
  output logic [31:0] m_addr_o,
  output logic [31:0] m_data_o,
  input  logic        m_ready_i,
  // data-ready interrupt (window streamed out)
  output logic        irq_o,
  // status
  output logic [3:0]  c_curr_o,
  output logic        readout_busy_o,
  output logic        fb_conflict_o,
  output logic        evt_dropped_o,
  output logic        overrun_o
);

  // ---------------- frame slot and window scheduling ----------------
  logic [3:0]  c_curr_q, frames_q;
  logic        rd_start, rd_busy, rd_done;

  logic        tick_fm;
  logic        win_due;

  assign tick_fm = frame_tick_i && !cfg_i.event_mode;
  assign win_due = tick_fm && (frames_q + 4'd1 >= cfg_i.s_win);
  assign rd_start = win_due && !rd_busy;

  // distinguishes a window readout from the wipe after reset
  logic rd_started_q;
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)       rd_started_q <= 1'b0;
    else if (rd_start) rd_started_q <= 1'b1;
    else if (rd_done)  rd_started_q <= 1'b0;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      c_curr_q  <= '0;
      frames_q  <= '0;
    end else begin
      if (tick_fm) begin
        c_curr_q <= c_curr_q + 4'd1;
        frames_q <= win_due ? 4'd0 : frames_q + 4'd1;
      end
    end
  end

  assign c_curr_o  = c_curr_q;
  assign overrun_o = win_due && rd_busy;

  // ---------------- frame buffer ----------------
  logic        wr_req, wr_gnt, rd_req, rd_we, rd_gnt;
  logic [11:0] wr_addr, rd_addr, fb_addr;
  logic [31:0] wr_wdata, wr_bmask, rd_wdata, rd_bmask, fb_wdata, fb_bmask, fb_rdata;
  logic        fb_req, fb_we;
  logic        wr_evt_valid, wr_evt_ready;

  logic wipe_pending_q, wiping;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) wipe_pending_q <= 1'b1;
    else         wipe_pending_q <= 1'b0;
  end
  assign wiping = wipe_pending_q || (rd_busy && !rd_started_q);

  assign wr_evt_valid = evt_valid_i && !cfg_i.event_mode && !wiping;

  dvs_event_writer u_wr (
    .evt_valid_i (wr_evt_valid),
    .evt_i       (evt_i),
    .evt_ready_o (wr_evt_ready),
    .ds_shift_i  (cfg_i.ds_shift),
    .c_curr_i    (c_curr_q),
    .req_o       (wr_req),
    .addr_o      (wr_addr),
    .wdata_o     (wr_wdata),
    .bmask_o     (wr_bmask),
    .gnt_i       (wr_gnt),
    .written_o   (),
    .dropped_o   (evt_dropped_o)
  );

  logic        rd_m_valid;
  logic [31:0] rd_m_addr, rd_m_data;
  logic        rd_m_ready;

  // The readout starts on the tick that ends the window; the new active slot
  // is the incremented counter.
  frame_readout #(.WORDS(FB_DEPTH)) u_rd (
    .clk_i       (clk_i),
    .rst_ni      (rst_ni),
    .start_i     (rd_start),
    .wipe_i      (wipe_pending_q),
    .c_act_i     (c_curr_q + 4'd1),
    .c_in_i      (cfg_i.c_in),
    .s_win_i     (cfg_i.s_win),
    .dest_addr_i (cfg_i.dest_addr),
    .req_o       (rd_req),
    .we_o        (rd_we),
    .addr_o      (rd_addr),
    .wdata_o     (rd_wdata),
    .bmask_o     (rd_bmask),
    .gnt_i       (rd_gnt),
    .rdata_i     (fb_rdata),
    .m_valid_o   (rd_m_valid),
    .m_addr_o    (rd_m_addr),
    .m_data_o    (rd_m_data),
    .m_ready_i   (rd_m_ready),
    .busy_o      (rd_busy),
    .done_o      (rd_done)
  );

  fb_arbiter #(.AW(12), .DW(32)) u_arb (
    .clk_i      (clk_i),
    .rst_ni     (rst_ni),
    .req0_i     (wr_req),
    .we0_i      (1'b1),
    .addr0_i    (wr_addr),
    .wdata0_i   (wr_wdata),
    .bmask0_i   (wr_bmask),
    .gnt0_o     (wr_gnt),
    .req1_i     (rd_req),
    .we1_i      (rd_we),
    .addr1_i    (rd_addr),
    .wdata1_i   (rd_wdata),
    .bmask1_i   (rd_bmask),
    .gnt1_o     (rd_gnt),
    .req_o      (fb_req),
    .we_o       (fb_we),
    .addr_o     (fb_addr),
    .wdata_o    (fb_wdata),
    .bmask_o    (fb_bmask),
    .conflict_o (fb_conflict_o)
  );

  frame_sram #(.DEPTH(FB_DEPTH), .WIDTH(32)) u_sram (
    .clk_i   (clk_i),
    .req_i   (fb_req),
    .we_i    (fb_we),
    .addr_i  (fb_addr),
    .wdata_i (fb_wdata),
    .bmask_i (fb_bmask),
    .rdata_o (fb_rdata)
  );

  assign readout_busy_o = rd_busy;

  // ---------------- event-word mode ----------------
  logic [15:0] ev_idx_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) ev_idx_q <= '0;
    else if (cfg_i.event_mode && evt_valid_i && m_ready_i) begin
      if (cfg_i.evt_buf_words != 16'd0 && ev_idx_q == cfg_i.evt_buf_words - 16'd1) ev_idx_q <= '0;
      else ev_idx_q <= ev_idx_q + 16'd1;
    end
  end

  // ---------------- memory write port and interrupt ----------------
  always_comb begin
    if (cfg_i.event_mode) begin
      m_valid_o   = evt_valid_i;
      m_addr_o    = cfg_i.dest_addr + {14'd0, ev_idx_q, 2'b00};
      m_data_o    = event_word(evt_i);
      evt_ready_o = m_ready_i;
      rd_m_ready  = 1'b0;
    end else begin
      m_valid_o   = rd_m_valid;
      m_addr_o    = rd_m_addr;
      m_data_o    = rd_m_data;
      evt_ready_o = wr_evt_ready && !wiping;
      rd_m_ready  = m_ready_i;
    end
  end

  assign irq_o = rd_done;

endmodule
