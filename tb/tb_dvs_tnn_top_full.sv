// Full-size end-to-end testbench of dvs_tnn_top: the top is instantiated
// with all parameters at their defaults (96 channels, 9 layers, TCN buffer of
// 24 vectors, 11 classes). The activation port carries 16 channels per word,
// so the input layer's remaining 80 channels are zero.
//
// Flow as in tb_dvs_tnn_top (C_in = 4, s_win = 4, TCN window of 5): random
// DVS events are recorded by a frame model, each window's expected input is
// run through the reference network (first layer 32 output channels, the
// others 96) and the 11 class scores and the class index are compared with
// the accelerator's. Eight windows are streamed; two of them come early so
// their readouts stall behind the busy accelerator, one is quiet. Then one window goes to system memory with
// back-pressure and a lost (overrun) window, and event words are written.
module tb_dvs_tnn_top_full;
  import cutie_pkg::*;
  import dvs_pkg::*;
  import tnn_ref_pkg::*;

  localparam int NC = 96, NL = 9, NCL = 11, ZWD = 12;
  localparam int CIN = 4, SWIN = 4, NTCN = 5;
  localparam int PERIOD = 7500;
  localparam int N_WIN = 8;
  localparam logic [31:0] ACT_BASE = 32'h1040_0000;

  logic clk = 0, rst_n = 0;
  dvs_cfg_t dcfg;
  logic evt_valid = 0, evt_ready;
  dvs_event_t evt;
  logic timer_en = 0, sw_tick = 0;
  logic mem_valid, mem_ready;
  logic [31:0] mem_addr, mem_data;
  logic wt_we = 0, cfg_we = 0, autostart = 0, cstart = 0;
  logic [3:0] wt_layer = 0, cfg_layer = 0;
  logic [$clog2(NC)-1:0] wt_ocu = 0;
  tern_t [TAPS-1:0][NC-1:0] wt_w;
  logic signed [ZWD-1:0] wt_tlo, wt_thi;
  layer_cfg_t cfg_data;
  logic irq_dvs, irq_cutie, cbusy, overrun, conflict, dropped, rd_busy;
  logic signed [ZWD-1:0] scores [NCL];
  logic [3:0] cls, c_curr;
  logic ready_rand = 0, r_rand;
  int checks = 0, failures = 0;

  dvs_tnn_top dut (
    .clk_i(clk), .rst_ni(rst_n), .dvs_cfg_i(dcfg), .evt_valid_i(evt_valid), .evt_i(evt), .evt_ready_o(evt_ready),
    .timer_en_i(timer_en), .timer_period_i(32'(period)), .sw_frame_tick_i(sw_tick),
    .mem_valid_o(mem_valid), .mem_addr_o(mem_addr), .mem_data_o(mem_data), .mem_ready_i(mem_ready),
    .wt_we_i(wt_we), .wt_layer_i(wt_layer), .wt_ocu_i(wt_ocu), .wt_w_i(wt_w), .wt_tlo_i(wt_tlo), .wt_thi_i(wt_thi),
    .cfg_we_i(cfg_we), .cfg_layer_i(cfg_layer), .cfg_data_i(cfg_data), .autostart_i(autostart),
    .cutie_start_i(cstart), .irq_dvs_o(irq_dvs), .irq_cutie_o(irq_cutie), .cutie_busy_o(cbusy),
    .scores_o(scores), .class_o(cls), .c_curr_o(c_curr), .overrun_o(overrun),
    .fb_conflict_o(conflict), .evt_dropped_o(dropped),
    .readout_busy_o(rd_busy));

  always #5 clk = ~clk;
  always_ff @(posedge clk) r_rand <= ($urandom % 3) != 0;
  assign mem_ready = !ready_rand || r_rand;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 15) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (PERIOD * SWIN * (N_WIN + 6) + 200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- frame model ----------------
  logic [1:0] frames [SWIN * (N_WIN + 2) + 8][4096];
  int nframe, since_win, evts;
  // expected inputs of windows whose readout has started but whose interrupt
  // has not been seen yet
  int snap [2][CIN][64][64];
  int snap_wr, snap_rd;
  int run_in [CIN][64][64];
  int period = PERIOD;
  int n_overrun_p1;
  int n_tick, n_win, n_irq, n_inf, n_conf, n_drop, n_stall, n_ext, n_ext_stall, n_overrun, n_wrap;
  int n_ext_exp;
  bit last_acc;

  always @(posedge clk) last_acc = evt_valid && evt_ready;

  always @(posedge clk) if (rst_n) begin
    if (conflict) n_conf++;
    if (dropped) n_drop++;
    if (overrun) n_overrun++;
    if (dut.m_valid && dut.to_act && !dut.act_ready) n_stall++;
    if (mem_valid && mem_ready) n_ext++;
    if (mem_valid && !mem_ready) n_ext_stall++;
    if (evt_valid && evt_ready && !dcfg.event_mode) begin
      int x, y;
      x = int'(evt.x) >> 1; y = int'(evt.y) >> 1;
      if (x < 64 && y < 64) begin
        frames[nframe][64 * y + x] = evt.pol ? 2'b01 : 2'b11;
        evts++;
      end
    end
    if (irq_dvs) begin
      n_irq++;
      run_in = snap[snap_rd % 2];
      snap_rd++;
    end
    if (irq_cutie && autostart) begin
      int best;
      for (int c = 0; c < NC; c++)
        for (int y = 0; y < 64; y++)
          for (int x = 0; x < 64; x++) fm[c][y][x] = (c < CIN) ? run_in[c][y][x] : 0;
      run(NC);
      best = 0;
      for (int k = 0; k < NCL; k++) begin
        chk(scores[k] == ZWD'(tnn_ref_pkg::scores[k]),
            $sformatf("inference %0d score %0d got %0d exp %0d", n_inf, k, scores[k], tnn_ref_pkg::scores[k]));
        if (tnn_ref_pkg::scores[k] > tnn_ref_pkg::scores[best]) best = k;
      end
      chk(int'(cls) == best, $sformatf("inference %0d class %0d exp %0d", n_inf, cls, best));
      n_inf++;
    end
    if (dut.frame_tick && !dcfg.event_mode) begin
      n_tick++;
      if (c_curr == 4'd15) n_wrap++;
      nframe++;
      for (int a = 0; a < 4096; a++) frames[nframe][a] = 0;
      since_win++;
      if (since_win == SWIN) begin
        since_win = 0;
        n_win++;
        if (!rd_busy) begin
          chk(snap_wr - snap_rd < 2, "at most two windows outstanding");
          for (int k = 0; k < CIN; k++)
            for (int a = 0; a < 4096; a++)
              snap[snap_wr % 2][k][a / 64][a % 64] =
                (nframe - CIN + k >= 0) ? tern_val(frames[nframe - CIN + k][a]) : 0;
          snap_wr++;
        end
        evts = 0;
      end
    end
  end

  // event source: per_frame events spread over the frame, stopped before the tick
  task automatic drive_events(int cycles, int per_frame);
    int sent;
    sent = 0;
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      if (!evt_valid || last_acc) begin
        evt_valid = (sent < per_frame) && ($urandom % 16 == 0) && (c < cycles - 20);
        evt.x = 8'($urandom % 140); evt.y = 8'($urandom % 140); evt.pol = 1'($urandom);
        if (evt_valid) sent++;
      end
    end
    while (evt_valid && !last_acc) @(negedge clk);
    evt_valid = 0;
  endtask

  initial begin
    int tcn_pushes_before;
    dcfg = '0;
    dcfg.c_in = 4'(CIN); dcfg.s_win = 4'(SWIN); dcfg.ds_shift = 1; dcfg.dest_addr = ACT_BASE;
    dcfg.evt_buf_words = 16'd16;
    nframe = 0;
    for (int a = 0; a < 4096; a++) frames[0][a] = 0;
    reset_hist();
    gen_network(64, CIN, NC, NTCN, 32 < NC ? 32 : NC);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l < n_layers; l++) begin
      @(negedge clk); cfg_we = 1; cfg_layer = 4'(l); cfg_data = lc[l];
      for (int o = 0; o < NC; o++) begin
        @(negedge clk); cfg_we = 0; wt_we = 1; wt_layer = 4'(l); wt_ocu = $clog2(NC)'(o);
        for (int t = 0; t < TAPS; t++) for (int i = 0; i < NC; i++) wt_w[t][i] = to_tern(w[l][o][t][i]);
        wt_tlo = ZWD'(tlo[l][o]); wt_thi = ZWD'(thi[l][o]);
      end
      @(negedge clk); wt_we = 0;
    end
    repeat (4200) @(negedge clk);   // frame-buffer wipe after reset
    // phase 1: frames into the accelerator
    autostart = 1;
    @(negedge clk); timer_en = 1;
    for (int f = 0; f < SWIN * N_WIN; f++) begin
      // window 3 is quiet; windows 5 and 6 come early, so their readouts wait for the busy accelerator
      period = (f / SWIN == 5 || f / SWIN == 6) ? PERIOD - 1500 : PERIOD;
      drive_events(period - 2, ((f / SWIN) % 5 == 3) ? 40 : 220);
      @(posedge dut.frame_tick);
    end
    timer_en = 0;
    repeat (50) @(negedge clk);
    while (rd_busy || snap_wr != snap_rd) @(negedge clk);
    repeat (5) @(negedge clk);
    while (cbusy) @(negedge clk);
    repeat (10) @(negedge clk);
    n_overrun_p1 = n_overrun;
    chk(snap_wr == snap_rd, "every started window ended");
    // phase 2: one window to system memory with back-pressure, no inference
    autostart = 0; ready_rand = 1;
    dcfg.dest_addr = 32'h1C01_0000;
    n_ext = 0;
    for (int f = 0; f < SWIN; f++) begin
      drive_events(300, 10);
      @(negedge clk); sw_tick = 1; @(negedge clk); sw_tick = 0;
    end
    // frame ticks while the readout is still running: the window is lost
    repeat (3) @(negedge clk);
    for (int f = 0; f < SWIN; f++) begin
      @(negedge clk); sw_tick = 1; @(negedge clk); sw_tick = 0;
    end
    while (rd_busy) @(negedge clk);
    chk(n_ext == 4096, $sformatf("window words to system memory: %0d", n_ext));
    // phase 3: event words to system memory
    dcfg.event_mode = 1; n_ext = 0;
    drive_events(2000, 40);
    repeat (5) @(negedge clk);
    chk(n_ext > 20 && n_ext <= 40, $sformatf("event words: %0d", n_ext));

    $display("ticks %0d windows %0d irq %0d inferences %0d conflicts %0d drops %0d",
             n_tick, n_win, n_irq, n_inf, n_conf, n_drop);
    $display("accelerator stalls %0d system-memory stalls %0d overruns %0d slot wraps %0d tcn pushes %0d",
             n_stall, n_ext_stall, n_overrun, n_wrap, hist_wp);
    chk(n_inf >= 6, "inferences run");
    chk(n_conf >= 1, "mechanism: frame-buffer port conflict");
    chk(n_drop >= 1, "mechanism: out-of-frame event dropped");
    chk(n_stall >= 1, "mechanism: readout stalled by busy accelerator");
    chk(n_ext_stall >= 1, "mechanism: system-memory back-pressure");
    chk(n_wrap >= 1, "mechanism: slot counter wrap");
    chk(n_overrun_p1 == 0, "no window overrun while frames stream to the accelerator");
    chk(n_overrun > 0, "mechanism: window overrun while the readout is busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
