// msk_counter_tb: self-checking test of the shared sample-address counter.
//
// Holds reset for a few cycles, then runs three full ROM periods and compares
// the count after every rising edge with a cycle index kept by the bench
// (index mod SAMPLES). It also checks that reset returns the count to 0 from
// the middle of a period and that the wrap from SAMPLES-1 to 0 happens.
module msk_counter_tb;
  localparam int unsigned SAMPLES = 200;
  localparam int unsigned ADDR_W  = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [ADDR_W-1:0] count;
  int checks = 0, failures = 0, wraps = 0;

  msk_counter #(.SAMPLES(SAMPLES), .ADDR_W(ADDR_W)) dut (.clk, .rst_n, .count);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    check(count == 0, "count is 0 during reset");
    rst_n = 1'b1;
    for (int k = 0; k < 3 * SAMPLES + 17; k++) begin
      @(negedge clk);
      // after edge k the counter shows (k+1) mod SAMPLES
      check(int'(count) == (k + 1) % SAMPLES,
            $sformatf("cycle %0d count %0d expected %0d", k, count, (k + 1) % SAMPLES));
      if (count == 0) wraps++;
    end
    check(wraps == 3, $sformatf("wraps %0d expected 3", wraps));
    rst_n = 1'b0;
    @(negedge clk);
    check(count == 0, "count returns to 0 on reset");
    rst_n = 1'b1;
    @(negedge clk);
    check(count == 1, "count restarts after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
