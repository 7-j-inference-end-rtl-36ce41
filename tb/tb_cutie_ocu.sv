// Testbench of cutie_ocu at the full size (96 input channels, 9 layers):
// random ternary windows, weights and thresholds for every layer; checks the
// pre-activation against an integer dot product and the ternary activation
// against the two thresholds, including values right at the thresholds.
module tb_cutie_ocu;
  import cutie_pkg::*;
  localparam int NC = 96, NL = 9, ZWD = 12;
  logic clk = 0, we = 0;
  logic [3:0] wl = 0, layer = 0;
  tern_t [TAPS-1:0][NC-1:0] wv, win;
  logic signed [ZWD-1:0] tl, th, z;
  tern_t y;
  int checks = 0, failures = 0;
  int wm [NL][TAPS][NC];
  int tlm [NL], thm [NL];

  cutie_ocu #(.N_CH(NC), .N_LAYERS(NL), .ZW(ZWD)) dut (.clk_i(clk), .wr_en_i(we), .wr_layer_i(wl), .wr_w_i(wv),
    .wr_tlo_i(tl), .wr_thi_i(th), .layer_i(layer), .win_i(win), .z_o(z), .y_o(y));

  always #5 clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 15) $display("FAIL: %s", msg); end
  endtask

  function automatic int tv(int r);
    return (r == 0) ? 0 : (r == 1 ? 1 : -1);
  endfunction

  function automatic tern_t enc(int v);
    return (v > 0) ? T_POS : ((v < 0) ? T_NEG : T_ZERO);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xv [TAPS][NC];
    int zr, ye, dense;
    for (int l = 0; l < NL; l++) begin
      dense = l % 3;   // 0: sparse, 1: medium, 2: all non-zero
      @(negedge clk);
      for (int t = 0; t < TAPS; t++) for (int i = 0; i < NC; i++) begin
        wm[l][t][i] = (dense == 2) ? ((($urandom % 2) == 0) ? 1 : -1) : tv(int'($urandom % (dense == 0 ? 6 : 3)) % 3);
        wv[t][i] = enc(wm[l][t][i]);
      end
      tlm[l] = -int'($urandom % 40); thm[l] = int'($urandom % 40);
      we = 1; wl = 4'(l); tl = ZWD'(tlm[l]); th = ZWD'(thm[l]);
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 3000; n++) begin
      layer = 4'($urandom % NL);
      for (int t = 0; t < TAPS; t++) for (int i = 0; i < NC; i++) begin
        xv[t][i] = (n % 50 == 0) ? wm[layer][t][i] : tv(int'($urandom % 3));
        win[t][i] = enc(xv[t][i]);
      end
      if (n % 50 == 25) for (int t = 0; t < TAPS; t++) for (int i = 0; i < NC; i++) begin
        xv[t][i] = -wm[layer][t][i]; win[t][i] = enc(xv[t][i]);
      end
      zr = 0;
      for (int t = 0; t < TAPS; t++) for (int i = 0; i < NC; i++) zr += xv[t][i] * wm[layer][t][i];
      #1;
      chk(int'(z) == zr, $sformatf("z got %0d exp %0d", z, zr));
      ye = (zr < tlm[layer]) ? -1 : ((zr >= thm[layer]) ? 1 : 0);
      chk(tern_val(y) == ye, $sformatf("y got %0d exp %0d (z %0d)", tern_val(y), ye, zr));
      @(negedge clk);
    end
    // threshold edges: adjust one layer's thresholds around a known z
    for (int n = 0; n < 40; n++) begin
      int zt;
      layer = 0;
      for (int t = 0; t < TAPS; t++) for (int i = 0; i < NC; i++) begin
        xv[t][i] = tv(int'($urandom % 3)); win[t][i] = enc(xv[t][i]);
      end
      zt = 0;
      for (int t = 0; t < TAPS; t++) for (int i = 0; i < NC; i++) zt += xv[t][i] * wm[0][t][i];
      @(negedge clk); we = 1; wl = 0; wv = '0;
      for (int t = 0; t < TAPS; t++) for (int i = 0; i < NC; i++) wv[t][i] = enc(wm[0][t][i]);
      tl = ZWD'(zt + (n % 2)); th = ZWD'(zt + 1 - (n % 2));
      tlm[0] = zt + (n % 2); thm[0] = zt + 1 - (n % 2);
      @(negedge clk); we = 0; #1;
      ye = (zt < tlm[0]) ? -1 : ((zt >= thm[0]) ? 1 : 0);
      chk(tern_val(y) == ye, $sformatf("edge y got %0d exp %0d", tern_val(y), ye));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
