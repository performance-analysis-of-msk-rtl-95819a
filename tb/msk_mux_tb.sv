// msk_mux_tb: self-checking test of the registered 2-to-1 channel multiplexer.
//
// Applies random data on both inputs and a random select each cycle and checks
// that result equals the selected input of the previous clock edge (one clock
// of latency) and does not change between edges.
module msk_mux_tb;
  localparam int unsigned WIDTH = 8;

  logic clk = 1'b0;
  logic [WIDTH-1:0] data1x = '0, data0x = '0, result;
  logic sel = 1'b0;
  logic [WIDTH-1:0] expected;
  int checks = 0, failures = 0, n_sel1 = 0, n_sel0 = 0;

  msk_mux #(.WIDTH(WIDTH)) dut (.clk, .data1x, .data0x, .sel, .result);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int k = 0; k < 500; k++) begin
      data1x = WIDTH'($urandom);
      data0x = WIDTH'($urandom);
      sel    = 1'($urandom);
      expected = sel ? data1x : data0x;
      if (sel) n_sel1++; else n_sel0++;
      @(posedge clk);
      #1;
      checks++;
      if (result !== expected) begin
        failures++;
        $display("FAIL k=%0d sel=%0b result=%h expected=%h", k, sel, result, expected);
      end
      // inputs change before the next edge: result must hold
      data1x = ~data1x;
      data0x = ~data0x;
      sel    = ~sel;
      #2;
      checks++;
      if (result !== expected) begin
        failures++;
        $display("FAIL k=%0d result changed between edges", k);
      end
      @(negedge clk);
    end
    checks++;
    if (n_sel1 == 0 || n_sel0 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
