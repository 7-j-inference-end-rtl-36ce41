// Testbench of fb_arbiter: random requests from both sides; checks that a lone
// request is granted, that conflicts alternate between the requesters, and
// that the granted access reaches the memory side.
module tb_fb_arbiter;
  logic clk = 0, rst_n = 0;
  logic req0, we0, req1, we1, gnt0, gnt1, req, we, conflict;
  logic [11:0] a0, a1, a;
  logic [31:0] d0, d1, m0, m1, d, m;
  int checks = 0, failures = 0;

  fb_arbiter dut (.clk_i(clk), .rst_ni(rst_n), .req0_i(req0), .we0_i(we0), .addr0_i(a0), .wdata0_i(d0),
    .bmask0_i(m0), .gnt0_o(gnt0), .req1_i(req1), .we1_i(we1), .addr1_i(a1), .wdata1_i(d1), .bmask1_i(m1),
    .gnt1_o(gnt1), .req_o(req), .we_o(we), .addr_o(a), .wdata_o(d), .bmask_o(m), .conflict_o(conflict));

  always #5 clk = ~clk;

  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_winner = 0;   // requester 1 has not won yet: first conflict goes to 1
    int conflicts = 0;
    req0 = 0; req1 = 0; we0 = 0; we1 = 0; a0 = 0; a1 = 0; d0 = 0; d1 = 0; m0 = 0; m1 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      req0 = $urandom % 2; req1 = $urandom % 2; we0 = $urandom % 2; we1 = $urandom % 2;
      a0 = 12'($urandom); a1 = 12'($urandom); d0 = $urandom; d1 = $urandom; m0 = $urandom; m1 = $urandom;
      #1;
      chk(!(gnt0 && gnt1), "both granted");
      chk(req == (req0 || req1), "req_o");
      chk(conflict == (req0 && req1), "conflict_o");
      if (req0 && !req1) chk(gnt0, "lone req0 not granted");
      if (req1 && !req0) chk(gnt1, "lone req1 not granted");
      if (req0 && req1) begin
        conflicts++;
        chk(last_winner == 1 ? gnt0 : gnt1, "round robin order");
        last_winner = gnt1 ? 1 : 0;
      end
      if (gnt0) chk(we == we0 && a == a0 && d == d0 && m == m0, "mux 0");
      if (gnt1) chk(we == we1 && a == a1 && d == d1 && m == m1, "mux 1");
    end
    chk(conflicts > 100, "conflicts exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
