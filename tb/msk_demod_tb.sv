// msk_demod_tb: recovers the message from the transmitter output with a
// conventional coherent MSK receiver and checks every bit.
//
// The receiver is a behavioural model in this bench, not part of the design.
// It correlates the msk samples over each channel bit (200 samples) with the
// textbook references
//   I : sin(pi*n/200) * cos(2*pi*n/50)   over n = 200p .. 200p+199
//   Q : -cos(pi*n/200) * sin(2*pi*n/50)  over n = 200p+100 .. 200p+299
// and decides on the sign. The transmitter's inversion rule turns the
// bit-to-bit sign change of the half-sine weight into a fixed polarity: the Q
// bits come out as sent and the I bits inverted, for every bit. (Without the
// rule, every other bit would be wrong.) The bench sends 16 random words (128
// bits) through msk_top at its default sizes and checks all recovered bits,
// that both polarities occur on both channels, and that each correlation is at
// least 90% of its noiseless ideal magnitude.
module msk_demod_tb;
  localparam int SAMPLES = 200;
  localparam int HALFP   = SAMPLES / 2;
  localparam int MSG_W   = 8;
  localparam int PAIRS   = MSG_W / 2;
  localparam int NWORDS  = 16;
  localparam int NPAIRS  = NWORDS * PAIRS;
  localparam int NCYC    = NPAIRS * SAMPLES;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [MSG_W-1:0] d_in = '0;
  logic d_ack, I_bit, Q_bit;
  logic [7:0] i1, i2, q1, q2, mux_i, mux_q, msk;
  logic [MSG_W-1:0] words [NWORDS];
  real corr_i [NPAIRS];
  real corr_q [NPAIRS];
  real ideal;
  int checks = 0, failures = 0, n_i1 = 0, n_i0 = 0, n_q1 = 0, n_q0 = 0;

  msk_top dut (
    .clk, .rst_n, .d_in, .d_ack, .I_bit, .Q_bit,
    .i1, .i2, .q1, .q2, .mux_i, .mux_q, .msk
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NCYC + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    int n, p;
    real s, ri, rq;
    logic bit_i, bit_q;
    foreach (words[w]) words[w] = MSG_W'($urandom);
    foreach (corr_i[j]) begin
      corr_i[j] = 0.0;
      corr_q[j] = 0.0;
    end
    // noiseless correlation of one full-amplitude channel bit with its reference
    ideal = 0.0;
    for (int m = 0; m < SAMPLES; m++)
      ideal += 127.0 * ($sin(PI * m / 200.0) * $cos(2.0 * PI * m / 50.0)) ** 2;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NCYC + 3; k++) begin
      d_in = words[(k / (PAIRS * SAMPLES)) % NWORDS];
      @(negedge clk);
      if (k >= 2 && k - 2 < NCYC) begin
        n  = k - 2;             // sample number now on msk
        s  = real'(signed'(msk));
        ri = $sin(PI * n / 200.0) * $cos(2.0 * PI * n / 50.0);
        rq = -$cos(PI * n / 200.0) * $sin(2.0 * PI * n / 50.0);
        corr_i[n / SAMPLES] += s * ri;
        if (n >= HALFP) begin
          p = (n - HALFP) / SAMPLES;
          if (p < NPAIRS) corr_q[p] += s * rq;
        end
      end
    end
    for (int j = 0; j < NPAIRS; j++) begin
      bit_i = words[j / PAIRS][2 * (j % PAIRS)];
      bit_q = words[j / PAIRS][2 * (j % PAIRS) + 1];
      // I polarity is fixed and inverted, Q polarity is as sent
      check((corr_i[j] < 0.0) == bit_i, $sformatf("I bit of pair %0d (corr %f)", j, corr_i[j]));
      check((corr_i[j] < 0.0 ? -corr_i[j] : corr_i[j]) > 0.9 * ideal,
            $sformatf("I correlation of pair %0d too small: %f of %f", j, corr_i[j], ideal));
      if (bit_i) n_i1++; else n_i0++;
      if (j < NPAIRS - 1) begin  // the last Q bit runs past the captured samples
        check((corr_q[j] > 0.0) == bit_q, $sformatf("Q bit of pair %0d (corr %f)", j, corr_q[j]));
        check((corr_q[j] < 0.0 ? -corr_q[j] : corr_q[j]) > 0.9 * ideal,
              $sformatf("Q correlation of pair %0d too small: %f of %f", j, corr_q[j], ideal));
        if (bit_q) n_q1++; else n_q0++;
      end
    end
    $display("recovered %0d I bits and %0d Q bits", NPAIRS, NPAIRS - 1);
    check(n_i1 > 0 && n_i0 > 0 && n_q1 > 0 && n_q0 > 0, "both bit values on both channels");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
