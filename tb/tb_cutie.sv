// Testbench of the accelerator at reduced size (8 channels, 16x16 input,
// TCN window of 5): loads a random network with the design's layer structure
// (two same-padded 2D layers with pooling, a valid 2D layer with pooling to
// 1x1, three causal dilated 1D layers, a final 1D layer), runs seven
// inferences on random ternary inputs and compares all class scores and the
// class index with the reference model. The TCN buffer fills up over the
// inferences, so the 1D layers see growing windows. Also checks that the
// compute phase takes one cycle per output pixel and the total latency.
module tb_cutie;
  import cutie_pkg::*;
  import tnn_ref_pkg::*;

  localparam int NC = 8, WM = 16, NL = 9, NCL = 8, ZWD = 12, CIN = 4, NTCN = 5;

  logic clk = 0, rst_n = 0;
  logic wt_we = 0, cfg_we = 0, act_we = 0, start = 0;
  logic [3:0] wt_layer = 0, cfg_layer = 0;
  logic [2:0] wt_ocu = 0;
  tern_t [TAPS-1:0][NC-1:0] wt_w;
  logic signed [ZWD-1:0] wt_tlo, wt_thi;
  layer_cfg_t cfg_data;
  logic [7:0] act_addr = 0;
  logic [31:0] act_wdata = 0;
  logic act_ready, busy, done;
  logic signed [ZWD-1:0] scores [NCL];
  logic [2:0] cls;
  int checks = 0, failures = 0;

  cutie #(.N_CH(NC), .W_MAX(WM), .N_LAYERS(NL), .TCN_DEPTH(24), .N_CLASSES(NCL), .ZW(ZWD)) dut (
    .clk_i(clk), .rst_ni(rst_n), .wt_we_i(wt_we), .wt_layer_i(wt_layer), .wt_ocu_i(wt_ocu), .wt_w_i(wt_w),
    .wt_tlo_i(wt_tlo), .wt_thi_i(wt_thi), .cfg_we_i(cfg_we), .cfg_layer_i(cfg_layer), .cfg_data_i(cfg_data),
    .act_we_i(act_we), .act_addr_i(act_addr), .act_wdata_i(act_wdata), .act_ready_o(act_ready),
    .start_i(start), .busy_o(busy), .done_o(done), .scores_o(scores), .class_o(cls));

  always #5 clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 15) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int comp_cycles;
  always @(posedge clk) if (dut.computing) comp_cycles++;

  initial begin
    int exp_cycles, exp_comp, cyc, best;
    int inp [NC][WM][WM];
    reset_hist();
    gen_network(WM, CIN, NC, NTCN, 6);
    // expected latency of this design: per layer 1 + rows*(W+2) + out_rows*(1+out_w) + 3, plus start and finish
    exp_cycles = 2; exp_comp = 0;
    for (int l = 0; l < n_layers; l++) begin
      int wi, hi, wo, ho;
      wi = int'(lc[l].in_w);
      hi = lc[l].is_1d ? 1 : wi;
      if (lc[l].is_1d) wo = lc[l].pad_same ? wi : wi - (int'(lc[l].ksize) - 1) * int'(lc[l].dil);
      else             wo = lc[l].pad_same ? wi : wi - 2;
      ho = lc[l].is_1d ? 1 : wo;
      exp_cycles += 1 + hi * (wi + 2) + ho * (1 + wo) + 3;
      exp_comp += wo * ho;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // configuration
    for (int l = 0; l < n_layers; l++) begin
      @(negedge clk); cfg_we = 1; cfg_layer = 4'(l); cfg_data = lc[l];
      for (int o = 0; o < NC; o++) begin
        @(negedge clk); cfg_we = 0; wt_we = 1; wt_layer = 4'(l); wt_ocu = 3'(o);
        for (int t = 0; t < TAPS; t++) for (int i = 0; i < NC; i++) wt_w[t][i] = to_tern(w[l][o][t][i]);
        wt_tlo = ZWD'(tlo[l][o]); wt_thi = ZWD'(thi[l][o]);
      end
      @(negedge clk); wt_we = 0;
    end
    for (int n = 0; n < 7; n++) begin
      // random sparse input frames
      for (int y = 0; y < WM; y++)
        for (int x = 0; x < WM; x++) begin
          logic [31:0] word;
          word = 0;
          for (int c = 0; c < NC; c++) begin
            inp[c][y][x] = (c < CIN && $urandom % 3 == 0) ? rnd_tern() : 0;
            fm[c][y][x] = inp[c][y][x];
            word |= 32'(to_tern(inp[c][y][x])) << (2 * c);
          end
          @(negedge clk); act_we = 1; act_addr = 8'(y * WM + x); act_wdata = word;
          chk(act_ready, "activation port ready while idle");
        end
      @(negedge clk); act_we = 0; start = 1;
      @(negedge clk); start = 0;
      comp_cycles = 0; cyc = 1;
      while (!done) begin @(posedge clk); #1; cyc++; end
      run(NC);
      best = 0;
      for (int k = 0; k < NCL; k++) begin
        chk(scores[k] == ZWD'(tnn_ref_pkg::scores[k]),
            $sformatf("inference %0d score %0d got %0d exp %0d", n, k, scores[k], tnn_ref_pkg::scores[k]));
        if (tnn_ref_pkg::scores[k] > tnn_ref_pkg::scores[best]) best = k;
      end
      chk(int'(cls) == best, $sformatf("class got %0d exp %0d", cls, best));
      chk(comp_cycles == exp_comp, $sformatf("compute cycles %0d exp %0d", comp_cycles, exp_comp));
      chk(cyc == exp_cycles, $sformatf("latency %0d exp %0d", cyc, exp_cycles));
      if (n == 6) $display("scores of last inference: %0d %0d %0d %0d, latency %0d cycles", scores[0], scores[1], scores[2], scores[3], cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
