// Testbench of dvs_interface with the full 64x64 frame buffer.
//
// A model outside the design keeps, for every frame interval, the code of the
// last event on each downsampled pixel. At every window the testbench
// predicts the 4096 streamed words (frame k of the window in bits
// [2k+1:2k], frames before the first one zero) and compares them and their
// addresses. Runs over more than 16 frames, so stale events would leak back in
// if the slot clearing were wrong. Phases: C_in=4/s_win=3 (the example
// configuration) with write-port stalls; C_in=15/s_win=15 (network 3 of the
// evaluation); and event mode with a ring of 8 words. Also checks that the
// interrupt follows every window's last word and that port conflicts and
// dropped events occur.
module tb_dvs_interface;
  import dvs_pkg::*;
  logic clk = 0, rst_n = 0;
  dvs_cfg_t cfg;
  logic evt_valid = 0, evt_ready, tick = 0;
  dvs_event_t evt;
  logic m_valid, m_ready;
  logic [31:0] m_addr, m_data;
  logic irq, rd_busy, conflict, dropped, overrun;
  logic [3:0] c_curr;
  logic ready_rand = 0, r_rand;
  int checks = 0, failures = 0;

  dvs_interface dut (.clk_i(clk), .rst_ni(rst_n), .cfg_i(cfg), .evt_valid_i(evt_valid), .evt_i(evt),
    .evt_ready_o(evt_ready), .frame_tick_i(tick), .m_valid_o(m_valid), .m_addr_o(m_addr), .m_data_o(m_data),
    .m_ready_i(m_ready), .irq_o(irq), .c_curr_o(c_curr), .readout_busy_o(rd_busy), .fb_conflict_o(conflict),
    .evt_dropped_o(dropped), .overrun_o(overrun));

  always #5 clk = ~clk;
  always_ff @(posedge clk) r_rand <= ($urandom % 4) != 0;
  assign m_ready = !ready_rand || r_rand;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 15) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  localparam int MAXF = 64;
  logic [1:0] frames [MAXF][4096];
  int nframe;            // index of the frame being recorded
  int since_win;         // ticks since the last window
  int win_events, evts;  // events of the finished window / of the current one
  logic [31:0] exp_word [4096];
  int sent_total;
  int nout, n_windows, n_irq, n_conf, n_drop, ev_words;
  bit expect_irq;

  function automatic void predict(int f, int c_in);
    for (int a = 0; a < 4096; a++) begin
      exp_word[a] = 0;
      for (int k = 0; k < c_in; k++) begin
        int g;
        g = f - c_in + k;
        if (g >= 0) exp_word[a] |= 32'(frames[g][a]) << (2 * k);
      end
    end
  endfunction

  bit last_acc;
  always @(posedge clk) last_acc = evt_valid && evt_ready;

  always @(posedge clk) if (rst_n) begin
    if (conflict) n_conf++;
    if (dropped) n_drop++;
    // an event accepted this cycle belongs to the frame before any tick of this cycle
    if (evt_valid && evt_ready && !cfg.event_mode) begin
      int x, y;
      x = int'(evt.x) >> cfg.ds_shift; y = int'(evt.y) >> cfg.ds_shift;
      if (x < 64 && y < 64) begin
        frames[nframe][64 * y + x] = evt.pol ? 2'b01 : 2'b11;
        evts++;
      end
    end
    if (evt_valid && evt_ready && cfg.event_mode) begin
      chk(m_valid && m_addr == cfg.dest_addr + 32'(4 * (ev_words % int'(cfg.evt_buf_words))), "event word address");
      chk(m_data == {15'd0, evt.pol, evt.y, evt.x}, "event word data");
      ev_words++;
    end
    if (m_valid && m_ready && !cfg.event_mode) begin
      chk(m_addr == cfg.dest_addr + 32'(4 * nout), "window word address");
      if (m_data != exp_word[nout]) begin
        chk(0, $sformatf("window %0d word %0d got %h exp %h", n_windows, nout, m_data, exp_word[nout]));
      end else checks++;
      nout++;
    end
    if (irq) begin
      n_irq++;
      chk(nout == 4096, "interrupt after the last word");
    end
    if (tick && !cfg.event_mode) begin
      nframe++;
      for (int a = 0; a < 4096; a++) frames[nframe][a] = 0;
      since_win++;
      if (since_win == int'(cfg.s_win)) begin
        since_win = 0;
        chk(nout == 0 || nout == 4096, "previous window complete");
        predict(nframe, int'(cfg.c_in));
        nout = 0;
        n_windows++;
        evts = 0;
      end
    end
  end

  task automatic run_frames(int nf, int per_frame, int frame_cycles);
    for (int f = 0; f < nf; f++) begin
      int sent;
      sent = 0;
      for (int c = 0; c < frame_cycles; c++) begin
        @(negedge clk);
        tick = 0;
        if (!evt_valid || last_acc) begin
          evt_valid = (sent < per_frame) && ($urandom % 8 == 0);
          evt.x = 8'($urandom % 140); evt.y = 8'($urandom % 140); evt.pol = 1'($urandom);
          if (evt_valid) begin sent++; sent_total++; end
        end
      end
      @(negedge clk);
      // finish the pending event before the tick so it lands in this frame
      while (evt_valid && !last_acc) @(negedge clk);
      evt_valid = 0;
      tick = 1;
      @(negedge clk);
      tick = 0;
    end
  endtask

  task automatic reset_dut();
    rst_n = 0;
    nframe = 0; since_win = 0; evts = 0; nout = 0; ev_words = 0;
    for (int a = 0; a < 4096; a++) frames[0][a] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (4200) @(negedge clk);   // wipe of the frame buffer
  endtask

  initial begin
    cfg = '0;
    cfg.c_in = 4; cfg.s_win = 3; cfg.ds_shift = 1; cfg.dest_addr = 32'h1C00_0000;
    cfg.evt_buf_words = 16'd8;
    // phase 1: example configuration, random stalls on the write port
    ready_rand = 1;
    reset_dut();
    for (int f = 0; f < 20; f++) run_frames(1, (f % 5 == 0) ? 10 : 70, 20000);
    run_frames(1, 0, 20000);
    // phase 2: C_in = s_win = 15
    ready_rand = 0;
    cfg.c_in = 15; cfg.s_win = 15;
    reset_dut();
    run_frames(31, 40, 17000);
    run_frames(1, 0, 17000);
    chk(n_windows >= 8, "windows streamed");
    // the window started by the last tick of phase 1 is cut off by the reset
    chk(n_irq == n_windows - 1, "one interrupt per completed window");
    chk(n_conf > 0, "port conflicts exercised");
    chk(n_drop > 0, "out-of-frame events dropped");
    // phase 3: event mode
    cfg.event_mode = 1; cfg.dest_addr = 32'h0000_1000;
    ready_rand = 1;
    reset_dut();
    sent_total = 0;
    run_frames(2, 30, 400);
    chk(ev_words == sent_total && ev_words > 20, $sformatf("event words written: %0d", ev_words));
    $display("windows %0d irq %0d conflicts %0d drops %0d", n_windows, n_irq, n_conf, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
