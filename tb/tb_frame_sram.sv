// Testbench of frame_sram: random masked writes and reads against a model
// array; checks the one-cycle read latency and that unmasked bits keep their
// old value.
module tb_frame_sram;
  localparam int DEPTH = 4096;
  logic clk = 0, req = 0, we = 0;
  logic [11:0] addr = 0;
  logic [31:0] wdata = 0, bmask = 0, rdata;
  int checks = 0, failures = 0;
  logic [31:0] model [DEPTH];

  frame_sram #(.DEPTH(DEPTH), .WIDTH(32)) dut (.clk_i(clk), .req_i(req), .we_i(we), .addr_i(addr),
    .wdata_i(wdata), .bmask_i(bmask), .rdata_o(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp;
    // initialise every word
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); req = 1; we = 1; addr = 12'(a); bmask = '1; wdata = $urandom; model[a] = wdata;
    end
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      req = ($urandom % 4) != 0; we = $urandom % 2; addr = 12'($urandom % 64);
      wdata = $urandom; bmask = $urandom;
      if (req && we) begin
        model[addr] = (model[addr] & ~bmask) | (wdata & bmask);
      end else if (req) begin
        exp = model[addr];
        @(negedge clk); req = 0;
        checks++;
        if (rdata !== exp) begin
          failures++;
          if (failures < 10) $display("read mismatch addr %0d got %h exp %h", addr, rdata, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
