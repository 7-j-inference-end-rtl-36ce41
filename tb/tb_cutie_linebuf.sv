// Testbench of cutie_linebuf (8 channels, 16-pixel lines): fills the three
// lines with random pixels and checks 2D windows (all row slot orders, rows
// marked invalid, columns at both edges) and 1D windows (kernel sizes 1..9,
// dilations 1..4, causal zero padding) against direct indexing.
module tb_cutie_linebuf;
  import cutie_pkg::*;
  localparam int NC = 8, WM = 16;
  logic clk = 0, we = 0, m1d = 0;
  logic [1:0] ws = 0;
  logic [3:0] wc = 0;
  tern_t [NC-1:0] wd;
  logic [2:0][1:0] rs;
  logic [2:0] rv;
  logic [7:0] cx, width, t;
  logic [4:0] ks, dl;
  tern_t [TAPS-1:0][NC-1:0] win;
  tern_t [NC-1:0] model [3][WM];
  int checks = 0, failures = 0;

  cutie_linebuf #(.N_CH(NC), .W_MAX(WM)) dut (.clk_i(clk), .we_i(we), .wslot_i(ws), .wcol_i(wc), .wdata_i(wd),
    .mode_1d_i(m1d), .row_slot_i(rs), .row_valid_i(rv), .cx_i(cx), .width_i(width), .t_i(t), .ksize_i(ks),
    .dil_i(dl), .win_o(win));

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
    for (int s = 0; s < 3; s++) for (int c = 0; c < WM; c++) begin
      @(negedge clk); we = 1; ws = 2'(s); wc = 4'(c);
      for (int i = 0; i < NC; i++) wd[i] = tern_t'($urandom % 4 == 2 ? 0 : $urandom % 4);
      model[s][c] = wd;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 2000; n++) begin
      m1d = 0;
      for (int r = 0; r < 3; r++) rs[r] = 2'($urandom % 3);
      rv = 3'($urandom);
      width = 8'(4 + $urandom % (WM - 3));
      cx = 8'($urandom % int'(width));
      #1;
      for (int j = 0; j < 9; j++) begin
        int col;
        tern_t [NC-1:0] e;
        col = int'(cx) - 1 + j % 3;
        e = (rv[j / 3] && col >= 0 && col < int'(width)) ? model[rs[j / 3]][col] : '0;
        chk(win[j] == e, $sformatf("2D tap %0d", j));
      end
      @(negedge clk);
      m1d = 1;
      ks = 5'(1 + $urandom % 9); dl = 5'(1 + $urandom % 4); t = 8'($urandom % WM);
      #1;
      for (int j = 0; j < 9; j++) begin
        int col;
        tern_t [NC-1:0] e;
        col = int'(t) - int'(dl) * (int'(ks) - 1 - j);
        e = (j < int'(ks) && col >= 0) ? model[0][col] : '0;
        chk(win[j] == e, $sformatf("1D tap %0d k %0d d %0d t %0d", j, ks, dl, t));
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
