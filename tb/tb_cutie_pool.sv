// Testbench of cutie_pool (8 channels): streams random ternary feature maps
// of several widths in raster order, with and without pooling, and checks
// each output pixel's position and per-channel maximum over its 2x2 block.
module tb_cutie_pool;
  import cutie_pkg::*;
  localparam int NC = 8, WM = 16;
  logic clk = 0, rst_n = 0, pen = 0, iv = 0, ov;
  logic [7:0] ix = 0, iy = 0, ox, oy;
  tern_t [NC-1:0] id, od;
  int checks = 0, failures = 0;
  int img [WM][WM][NC];
  int nout, wdt;

  cutie_pool #(.N_CH(NC), .W_MAX(WM)) dut (.clk_i(clk), .rst_ni(rst_n), .pool_en_i(pen), .in_valid_i(iv),
    .in_x_i(ix), .in_y_i(iy), .in_data_i(id), .out_valid_o(ov), .out_x_o(ox), .out_y_o(oy), .out_data_o(od));

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

  always @(posedge clk) if (rst_n && ov) begin
    int px, py;
    if (pen) begin
      px = nout % (wdt / 2); py = nout / (wdt / 2);
      chk(int'(ox) == px && int'(oy) == py, "pooled position");
      for (int c = 0; c < NC; c++) begin
        int m;
        m = img[2 * py][2 * px][c];
        if (img[2 * py][2 * px + 1][c] > m) m = img[2 * py][2 * px + 1][c];
        if (img[2 * py + 1][2 * px][c] > m) m = img[2 * py + 1][2 * px][c];
        if (img[2 * py + 1][2 * px + 1][c] > m) m = img[2 * py + 1][2 * px + 1][c];
        chk(tern_val(od[c]) == m, $sformatf("max at (%0d,%0d) ch %0d", py, px, c));
      end
    end else begin
      px = nout % wdt; py = nout / wdt;
      chk(int'(ox) == px && int'(oy) == py, "pass-through position");
      for (int c = 0; c < NC; c++) chk(tern_val(od[c]) == img[py][px][c], "pass-through value");
    end
    nout++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 12; run++) begin
      wdt = 2 << (run % 4);
      pen = run < 8;
      nout = 0;
      for (int y = 0; y < wdt; y++) for (int x = 0; x < wdt; x++)
        for (int c = 0; c < NC; c++) img[y][x][c] = int'($urandom % 3) - 1;
      for (int y = 0; y < wdt; y++) for (int x = 0; x < wdt; x++) begin
        // idle cycles inside the stream
        if ($urandom % 4 == 0) begin @(negedge clk); iv = 0; end
        @(negedge clk); iv = 1; ix = 8'(x); iy = 8'(y);
        for (int c = 0; c < NC; c++) id[c] = (img[y][x][c] > 0) ? T_POS : ((img[y][x][c] < 0) ? T_NEG : T_ZERO);
      end
      @(negedge clk); iv = 0;
      @(negedge clk);
      chk(nout == (pen ? wdt * wdt / 4 : wdt * wdt), "output count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
