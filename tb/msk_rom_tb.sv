// msk_rom_tb: self-checking test of the four waveform ROM tables.
//
// Instantiates the ROM once per table and reads every address. The expected
// samples are computed here from the waveform formulas with real arithmetic:
//   I bit 1 (I_ch_phase1) : round(127 * sin(pi*a/200) * cos(2*pi*a/50))
//   I bit 0 (I_ch_phase2) : the negative of I bit 1
//   Q bit 1 (Q_ch_phase1) : round(127 * sin(pi*m/200) * sin(2*pi*m/50)),
//                           m = (a + 100) mod 200 (halves exchanged)
//   Q bit 0 (Q_ch_phase2) : the negative of Q bit 1
// It also checks the sample values 123, -123, -1, 1 that the published
// simulation shows for the four tables at one instant (address 98 here),
// the one-clock read latency, and that addresses past the table read 0.
module msk_rom_tb;
  localparam int unsigned DEPTH  = 200;
  localparam int unsigned ADDR_W = 8;
  localparam int unsigned WIDTH  = 8;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  logic [ADDR_W-1:0] address = '0;
  logic [WIDTH-1:0] i1, i2, q1, q2;
  int checks = 0, failures = 0;

  msk_rom #(.DEPTH(DEPTH), .ADDR_W(ADDR_W), .WIDTH(WIDTH), .KIND(msk_pkg::I_CH_PHASE1))
    u_i1 (.clk, .address, .q(i1));
  msk_rom #(.DEPTH(DEPTH), .ADDR_W(ADDR_W), .WIDTH(WIDTH), .KIND(msk_pkg::I_CH_PHASE2))
    u_i2 (.clk, .address, .q(i2));
  msk_rom #(.DEPTH(DEPTH), .ADDR_W(ADDR_W), .WIDTH(WIDTH), .KIND(msk_pkg::Q_CH_PHASE1))
    u_q1 (.clk, .address, .q(q1));
  msk_rom #(.DEPTH(DEPTH), .ADDR_W(ADDR_W), .WIDTH(WIDTH), .KIND(msk_pkg::Q_CH_PHASE2))
    u_q2 (.clk, .address, .q(q2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(input real x);
    return int'($floor(x + 0.5));
  endfunction

  function automatic int i_ref(input int a);
    return rnd(127.0 * $sin(PI * a / 200.0) * $cos(2.0 * PI * a / 50.0));
  endfunction

  function automatic int q_ref(input int a);
    int m = (a + 100) % 200;
    return rnd(127.0 * $sin(PI * m / 200.0) * $sin(2.0 * PI * m / 50.0));
  endfunction

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int s8(input logic [WIDTH-1:0] v);
    return int'(signed'(v));
  endfunction

  initial begin
    @(negedge clk);
    for (int a = 0; a < int'(DEPTH); a++) begin
      address = ADDR_W'(a);
      @(posedge clk);
      #1;
      check(s8(i1), i_ref(a),  $sformatf("I_ch_phase1[%0d]", a));
      check(s8(i2), -i_ref(a), $sformatf("I_ch_phase2[%0d]", a));
      check(s8(q1), q_ref(a),  $sformatf("Q_ch_phase1[%0d]", a));
      check(s8(q2), -q_ref(a), $sformatf("Q_ch_phase2[%0d]", a));
      // new address before the next edge: output must not change yet
      address = ADDR_W'((a + 37) % DEPTH);
      #2;
      check(s8(i1), i_ref(a), $sformatf("I_ch_phase1[%0d] held", a));
      @(negedge clk);
    end
    // values printed in the published simulation
    address = 8'd98;
    @(posedge clk);
    #1;
    check(s8(i1), 123, "I bit-1 sample at 98");
    check(s8(i2), -123, "I bit-0 sample at 98");
    check(s8(q1), -1, "Q bit-1 sample at 98");
    check(s8(q2), 1, "Q bit-0 sample at 98");
    // replace technique: Q ROM address 0 is the middle of the Q waveform
    @(negedge clk);
    address = 8'd0;
    @(posedge clk);
    #1;
    check(s8(q1), q_ref(0), "Q_ch_phase1[0]");
    @(negedge clk);
    for (int a = int'(DEPTH); a < 256; a += 11) begin
      address = ADDR_W'(a);
      @(posedge clk);
      #1;
      check(s8(i1), 0, $sformatf("out-of-range address %0d", a));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
