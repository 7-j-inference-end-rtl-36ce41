// Testbench of frame_timer: checks that ticks come exactly every period
// cycles for several periods and that a disabled timer stays silent.
module tb_frame_timer;
  logic clk = 0, rst_n = 0, en = 0, tick;
  logic [31:0] period = 0;
  int checks = 0, failures = 0;
  frame_timer dut (.clk_i(clk), .rst_ni(rst_n), .enable_i(en), .period_i(period), .tick_o(tick));
  always #5 clk = ~clk;

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
    int last, cyc, nt;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (50) begin @(posedge clk); #1; chk(!tick, "silent when disabled"); end
    for (int p = 1; p <= 40; p += 13) begin
      @(negedge clk); en = 0; period = 32'(p);
      @(negedge clk); en = 1;
      last = -1; cyc = 0; nt = 0;
      while (nt < 6) begin
        @(posedge clk); #1; cyc++;
        if (tick) begin
          if (last >= 0) chk(cyc - last == p, $sformatf("period %0d spacing %0d", p, cyc - last));
          last = cyc; nt++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
