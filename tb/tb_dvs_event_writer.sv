// Testbench of dvs_event_writer: random events, slots and downsampling
// factors; checks word address 64y+x of the downsampled pixel, the two-bit
// mask at slot c_curr, the polarity code, and that out-of-frame events are
// dropped without a write.
module tb_dvs_event_writer;
  import dvs_pkg::*;
  logic evt_valid, evt_ready, req, gnt, written, dropped;
  dvs_event_t evt;
  logic [1:0] ds;
  logic [3:0] c;
  logic [11:0] addr;
  logic [31:0] wdata, bmask;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  dvs_event_writer dut (.evt_valid_i(evt_valid), .evt_i(evt), .evt_ready_o(evt_ready), .ds_shift_i(ds),
    .c_curr_i(c), .req_o(req), .addr_o(addr), .wdata_o(wdata), .bmask_o(bmask), .gnt_i(gnt),
    .written_o(written), .dropped_o(dropped));

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xd, yd, drops = 0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      evt_valid = $urandom % 4 != 0;
      evt.x = 8'($urandom); evt.y = 8'($urandom); evt.pol = $urandom % 2;
      ds = 2'($urandom % 3); c = 4'($urandom); gnt = $urandom % 2;
      #1;
      xd = int'(evt.x) / (1 << ds); yd = int'(evt.y) / (1 << ds);
      if (xd < 64 && yd < 64) begin
        chk(req == evt_valid, "req");
        chk(addr == 12'(64 * yd + xd), "address");
        chk(bmask == (32'h3 << (2 * c)), "mask");
        chk(((wdata >> (2 * c)) & 3) == (evt.pol ? 1 : 3), "polarity code");
        chk(evt_ready == gnt, "ready follows grant");
        chk(written == (evt_valid && gnt), "written");
        chk(!dropped, "not dropped");
      end else begin
        if (evt_valid) drops++;
        chk(!req, "no write for out-of-frame event");
        chk(evt_ready, "out-of-frame event accepted");
        chk(dropped == evt_valid, "dropped flag");
      end
    end
    chk(drops > 50, "drops exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
