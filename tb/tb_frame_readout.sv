// Testbench of frame_readout with a small frame buffer (64 words): fills the
// memory with random slots, runs windows with random C_in, s_win and active
// slot, with random grant and write-port stalls, and checks every streamed
// word and address, the clearing of the stale slots in memory, and the
// four-cycles-per-word rate when nothing stalls.
module tb_frame_readout;
  localparam int WORDS = 64;
  logic clk = 0, rst_n = 0;
  logic start = 0, wipe = 0, req, we, gnt, m_valid, m_ready, busy, done;
  logic [3:0] c_act, c_in, s_win;
  logic [31:0] dest, wdata, bmask, rdata, m_addr, m_data;
  logic [11:0] addr;
  // memory port mux: testbench preload or readout
  logic tb_req = 0, tb_we = 0;
  logic [11:0] tb_addr = 0;
  logic [31:0] tb_wdata = 0;
  logic grant_rand = 0, ready_rand = 0;
  int checks = 0, failures = 0;
  logic [31:0] init [WORDS];

  frame_readout #(.WORDS(WORDS)) dut (.clk_i(clk), .rst_ni(rst_n), .start_i(start), .wipe_i(wipe), .c_act_i(c_act),
    .c_in_i(c_in), .s_win_i(s_win), .dest_addr_i(dest), .req_o(req), .we_o(we), .addr_o(addr),
    .wdata_o(wdata), .bmask_o(bmask), .gnt_i(gnt), .rdata_i(rdata), .m_valid_o(m_valid),
    .m_addr_o(m_addr), .m_data_o(m_data), .m_ready_i(m_ready), .busy_o(busy), .done_o(done));

  logic g_rand, r_rand;
  always_ff @(posedge clk) begin g_rand <= $urandom % 3 != 0; r_rand <= $urandom % 3 != 0; end
  assign gnt     = req && (!grant_rand || g_rand);
  assign m_ready = !ready_rand || r_rand;

  frame_sram #(.DEPTH(4096), .WIDTH(32)) mem (.clk_i(clk), .req_i(tb_req || gnt), .we_i(tb_req ? tb_we : we),
    .addr_i(tb_req ? tb_addr : addr), .wdata_i(tb_req ? tb_wdata : wdata), .bmask_i(tb_req ? 32'hFFFF_FFFF : bmask),
    .rdata_o(rdata));

  always #5 clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nout;
  logic [31:0] exp_word [WORDS];
  always @(posedge clk) begin
    if (m_valid && m_ready) begin
      chk(m_addr == dest + 32'(4 * nout), $sformatf("address of word %0d", nout));
      chk(m_data == exp_word[nout], $sformatf("word %0d got %h exp %h", nout, m_data, exp_word[nout]));
      nout++;
    end
  end

  initial begin
    int cyc, span, slot;
    logic [31:0] clr;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 24; run++) begin
      c_in  = 4'(1 + $urandom % 15);
      s_win = 4'(1 + $urandom % 15);
      if (run < 4) begin c_in = 4; s_win = 3; end   // the configuration drawn in the figure
      if (int'(c_in) + int'(s_win) > 16 && int'(s_win) > int'(c_in)) s_win = 4'(16 - int'(c_in));
      c_act = 4'($urandom);
      dest  = $urandom & 32'hFFFF_FFFC;
      grant_rand = run % 2; ready_rand = (run / 2) % 2;
      // preload
      for (int a = 0; a < WORDS; a++) begin
        @(negedge clk); tb_req = 1; tb_we = 1; tb_addr = 12'(a); tb_wdata = $urandom; init[a] = tb_wdata;
      end
      @(negedge clk); tb_req = 0;
      // expected words: window frame k is slot c_act - c_in + k
      span = (c_in > s_win) ? int'(c_in) : int'(s_win);
      clr = 0;
      for (int j = 0; j < int'(s_win); j++) begin
        slot = (int'(c_act) - span + j + 32) % 16;
        clr |= 32'h3 << (2 * slot);
      end
      for (int a = 0; a < WORDS; a++) begin
        exp_word[a] = 0;
        for (int k = 0; k < int'(c_in); k++) begin
          slot = (int'(c_act) - int'(c_in) + k + 32) % 16;
          exp_word[a] |= ((init[a] >> (2 * slot)) & 32'h3) << (2 * k);
        end
      end
      nout = 0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(posedge clk); #1; cyc++; end
      chk(nout == WORDS, "all words streamed");
      if (!grant_rand && !ready_rand) chk(cyc == 4 * WORDS + 1, $sformatf("cycles %0d for %0d words", cyc, WORDS));
      // stale slots cleared, other slots kept
      for (int a = 0; a < WORDS; a++) begin
        @(negedge clk); tb_req = 1; tb_we = 0; tb_addr = 12'(a);
        @(negedge clk); tb_req = 0;
        chk(rdata == (init[a] & ~clr), $sformatf("cleared word %0d got %h exp %h", a, rdata, init[a] & ~clr));
      end
    end
    // wipe: every word becomes zero, nothing is streamed, no done pulse
    nout = 0;
    grant_rand = 1;
    @(negedge clk); wipe = 1;
    @(negedge clk); wipe = 0;
    cyc = 0;
    while (busy) begin @(posedge clk); #1; cyc++; chk(!done, "no done after wipe"); end
    chk(nout == 0, "wipe streams nothing");
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk); tb_req = 1; tb_we = 0; tb_addr = 12'(a);
      @(negedge clk); tb_req = 0;
      chk(rdata == 0, $sformatf("wiped word %0d is %h", a, rdata));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
