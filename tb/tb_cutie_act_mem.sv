// Testbench of cutie_act_mem (16 channels, 256 words): random writes with
// channel masks and reads against a model; checks the one-cycle read latency.
module tb_cutie_act_mem;
  import cutie_pkg::*;
  localparam int NC = 16, D = 256;
  logic clk = 0, we = 0, re = 0;
  logic [7:0] wa = 0, ra = 0;
  tern_t [NC-1:0] wd, rd;
  logic [NC-1:0] wm;
  tern_t [NC-1:0] model [D];
  int checks = 0, failures = 0;

  cutie_act_mem #(.N_CH(NC), .DEPTH(D)) dut (.clk_i(clk), .we_i(we), .waddr_i(wa), .wdata_i(wd), .wmask_i(wm),
    .re_i(re), .raddr_i(ra), .rdata_o(rd));

  always #5 clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 15) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tern_t [NC-1:0] e;
    for (int a = 0; a < D; a++) begin
      @(negedge clk); we = 1; wa = 8'(a); wm = '1; wd = tern_t'(0);
      for (int c = 0; c < NC; c++) wd[c] = tern_t'($urandom);
      model[a] = wd;
    end
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      we = $urandom % 2; wa = 8'($urandom % 32); wm = NC'($urandom);
      for (int c = 0; c < NC; c++) wd[c] = tern_t'($urandom);
      re = $urandom % 2; ra = 8'($urandom % 32);
      e = model[ra];
      if (we) for (int c = 0; c < NC; c++) if (wm[c]) model[wa][c] = wd[c];
      if (re) begin
        @(negedge clk); we = 0; re = 0;
        chk(rd == e, $sformatf("read %0d", ra));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
