// Testbench of cutie_tcn_buf (8 channels, 24 vectors): pushes random vectors
// past several wrap-arounds and checks every window position for window
// lengths 1..24, including the zeros of never-written entries after reset.
module tb_cutie_tcn_buf;
  import cutie_pkg::*;
  localparam int NC = 8, D = 24;
  logic clk = 0, rst_n = 0, push = 0;
  tern_t [NC-1:0] pd, rd;
  logic [4:0] nw, rt;
  tern_t [NC-1:0] hist [$];
  int checks = 0, failures = 0;

  cutie_tcn_buf #(.N_CH(NC), .DEPTH(D)) dut (.clk_i(clk), .rst_ni(rst_n), .push_i(push), .push_data_i(pd),
    .n_win_i(nw), .rd_t_i(rt), .rd_data_o(rd));

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
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 80; n++) begin
      // check windows
      for (int k = 0; k < 10; k++) begin
        int len, idx;
        tern_t [NC-1:0] e;
        len = 1 + int'($urandom % D);
        @(negedge clk); push = 0; nw = 5'(len); rt = 5'($urandom % len);
        idx = hist.size() - len + int'(rt);   // position in push order
        e = (idx >= 0) ? hist[idx] : '0;
        #1 chk(rd == e, $sformatf("window %0d pos %0d after %0d pushes", len, rt, hist.size()));
      end
      @(negedge clk); push = 1;
      for (int c = 0; c < NC; c++) pd[c] = tern_t'($urandom % 4 == 2 ? 0 : $urandom % 4);
      hist.push_back(pd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
