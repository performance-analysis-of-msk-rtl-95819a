// msk_adder_tb: self-checking test of the registered sample adder.
//
// Checks dataa + datab modulo 2^WIDTH one clock after the operands, for
// random operands and for the signed corner values, and that the result holds
// between clock edges.
module msk_adder_tb;
  localparam int unsigned WIDTH = 8;

  logic clk = 1'b0;
  logic [WIDTH-1:0] dataa = '0, datab = '0, result;
  logic [WIDTH-1:0] expected;
  int checks = 0, failures = 0;

  msk_adder #(.WIDTH(WIDTH)) dut (.clk, .dataa, .datab, .result);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [WIDTH-1:0] a, input logic [WIDTH-1:0] b);
    int s;
    dataa = a;
    datab = b;
    s = int'(signed'(a)) + int'(signed'(b));
    expected = WIDTH'(s);
    @(posedge clk);
    #1;
    checks++;
    if (result !== expected) begin
      failures++;
      $display("FAIL %0d + %0d: result=%h expected=%h", signed'(a), signed'(b), result, expected);
    end
    dataa = ~a;
    #2;
    checks++;
    if (result !== expected) begin
      failures++;
      $display("FAIL result changed between edges");
    end
    @(negedge clk);
  endtask

  initial begin
    @(negedge clk);
    apply(8'sd127, 8'sd0);
    apply(8'sd100, 8'sd27);
    apply(-8'sd128, 8'sd0);
    apply(-8'sd100, -8'sd27);
    apply(8'sd123, -8'sd1);
    apply(8'sd127, 8'sd1);   // wraps
    for (int k = 0; k < 400; k++) apply(WIDTH'($urandom), WIDTH'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
