// msk_top_tb: end-to-end test of the MSK transmitter at its default sizes.
//
// Random message words (the first one fixed) are offered on d_in as the
// transmitter takes them. Every output sample is compared with two
// independent references:
//  - exact: the sample the two stored tables must produce, computed here from
//    the table formulas, the bit split (even bits I, odd bits Q, bit 0 first)
//    and the even-I / odd-Q inversion rule;
//  - analytic: the conventional MSK expression, with n the sample number,
//    T = 100 samples per message bit and a carrier period of 50 samples,
//      msk(n) = -127*aI(n)*sin(pi*n/2T)*cos(2*pi*n/50)
//               -127*aQ(n)*cos(pi*n/2T)*sin(2*pi*n/50)
//    where aI, aQ are the +/-1 levels of the I and Q bits (the Q bits delayed
//    by T; before the first Q bit aQ = +1). The rounded tables may differ from
//    it by at most 1.
// The timing checked is the design's: sample n leaves on the third clock edge
// after the counter shows address n. mux_i and mux_q are checked one clock
// earlier. The bench counts that every mechanism occurred: word hand-over,
// inverted and plain I and Q bits, both mux selections in both channels, the
// dummy Q half period and the Q switch half-way through a ROM period; a
// mechanism never seen is a failure.
module msk_top_tb;
  localparam int SAMPLES = 200;
  localparam int HALFP   = SAMPLES / 2;
  localparam int MSG_W   = 8;
  localparam int PAIRS   = MSG_W / 2;
  localparam int NWORDS  = 8;
  localparam int NCYC    = NWORDS * PAIRS * SAMPLES;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [MSG_W-1:0] d_in = '0;
  logic d_ack, I_bit, Q_bit;
  logic [7:0] i1, i2, q1, q2, mux_i, mux_q, msk;
  logic [MSG_W-1:0] words [NWORDS];

  int checks = 0, failures = 0;
  int n_ack = 0, n_i_inv = 0, n_i_pass = 0, n_q_inv = 0, n_q_pass = 0;
  int n_isel1 = 0, n_isel0 = 0, n_qsel1 = 0, n_qsel0 = 0, n_dummy = 0, n_qmid = 0;
  int max_err = 0;

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

  function automatic int rnd(input real x);
    return int'($floor(x + 0.5));
  endfunction

  // message bit levels
  function automatic logic i_bit_of(input int p);
    return words[p / PAIRS][2 * (p % PAIRS)];
  endfunction
  function automatic logic q_bit_of(input int p);
    return words[p / PAIRS][2 * (p % PAIRS) + 1];
  endfunction

  // exact I and Q node samples for sample number n
  function automatic int i_node(input int n);
    int  a = n % SAMPLES, p = n / SAMPLES;
    logic sel = (p % 2 == 1) ? i_bit_of(p) : ~i_bit_of(p);
    int  t = rnd(127.0 * $sin(PI * a / 200.0) * $cos(2.0 * PI * a / 50.0));
    return sel ? t : -t;
  endfunction
  function automatic int q_node(input int n);
    int  m = (n % SAMPLES + HALFP) % SAMPLES;
    logic sel;
    int  t = rnd(127.0 * $sin(PI * m / 200.0) * $sin(2.0 * PI * m / 50.0));
    if (n < HALFP) sel = 1'b0;
    else begin
      int p = (n - HALFP) / SAMPLES;
      sel = (p % 2 == 1) ? ~q_bit_of(p) : q_bit_of(p);
    end
    return sel ? t : -t;
  endfunction

  // conventional MSK expression
  function automatic real msk_analytic(input int n);
    real aI = i_bit_of(n / SAMPLES) ? 1.0 : -1.0;
    real aQ = (n < HALFP) ? 1.0 : (q_bit_of((n - HALFP) / SAMPLES) ? 1.0 : -1.0);
    return -127.0 * aI * $sin(PI * n / 200.0) * $cos(2.0 * PI * n / 50.0)
           -127.0 * aQ * $cos(PI * n / 200.0) * $sin(2.0 * PI * n / 50.0);
  endfunction

  function automatic int s8(input logic [7:0] v);
    return int'(signed'(v));
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    int n, err, exp_msk;
    real ana;
    logic q_prev;
    foreach (words[w]) words[w] = MSG_W'($urandom);
    words[0] = 8'b1011_0100;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    q_prev = 1'b0;
    for (int k = 0; k < NCYC + 3; k++) begin
      // inputs for edge k
      d_in = words[(k / (PAIRS * SAMPLES)) % NWORDS];
      #1;
      if (k < NCYC) check(d_ack == (k % (PAIRS * SAMPLES) == 0), $sformatf("d_ack at cycle %0d", k));
      if (k < NCYC && d_ack) n_ack++;
      @(negedge clk);
      // outputs after edge k: mux outputs hold sample k-1, msk sample k-2
      if (k >= 1 && k - 1 < NCYC) begin
        n = k - 1;
        check(s8(mux_i) == i_node(n), $sformatf("mux_i sample %0d: %0d vs %0d", n, s8(mux_i), i_node(n)));
        check(s8(mux_q) == q_node(n), $sformatf("mux_q sample %0d: %0d vs %0d", n, s8(mux_q), q_node(n)));
      end
      if (k >= 2 && k - 2 < NCYC) begin
        n = k - 2;
        exp_msk = i_node(n) + q_node(n);
        check(s8(msk) == exp_msk, $sformatf("msk sample %0d: %0d vs %0d", n, s8(msk), exp_msk));
        ana = msk_analytic(n);
        err = rnd(((real'(s8(msk)) - ana) < 0.0 ? ana - real'(s8(msk)) : real'(s8(msk)) - ana) * 100.0);
        if (err > max_err) max_err = err;
        check(err <= 100, $sformatf("msk sample %0d: %0d vs analytic %f", n, s8(msk), ana));
      end
      // mechanism counters, from the selects in use for sample k (set at edge k)
      if (k < NCYC) begin
        if (k % SAMPLES == 0) begin
          if ((k / SAMPLES) % 2 == 0) n_i_inv++; else n_i_pass++;
        end
        if (k >= HALFP && (k - HALFP) % SAMPLES == 0) begin
          if (((k - HALFP) / SAMPLES) % 2 == 1) n_q_inv++; else n_q_pass++;
        end
        if (k < HALFP) n_dummy++;
        if (I_bit) n_isel1++; else n_isel0++;
        if (Q_bit) n_qsel1++; else n_qsel0++;
        if (k % SAMPLES == HALFP && Q_bit != q_prev) n_qmid++;
        q_prev = Q_bit;
      end
    end
    $display("words %0d, I inverted/plain %0d/%0d, Q inverted/plain %0d/%0d",
             n_ack, n_i_inv, n_i_pass, n_q_inv, n_q_pass);
    $display("I sel 1/0 %0d/%0d, Q sel 1/0 %0d/%0d, dummy Q samples %0d, mid-period Q switches %0d",
             n_isel1, n_isel0, n_qsel1, n_qsel0, n_dummy, n_qmid);
    $display("largest deviation from the analytic MSK waveform: %0d.%02d LSB", max_err / 100, max_err % 100);
    check(n_ack == NWORDS, $sformatf("%0d words taken, expected %0d", n_ack, NWORDS));
    check(n_i_inv > 0, "inverted I bit seen");
    check(n_i_pass > 0, "plain I bit seen");
    check(n_q_inv > 0, "inverted Q bit seen");
    check(n_q_pass > 0, "plain Q bit seen");
    check(n_isel1 > 0 && n_isel0 > 0, "both I mux selections seen");
    check(n_qsel1 > 0 && n_qsel0 > 0, "both Q mux selections seen");
    check(n_dummy > 0, "dummy Q half period seen");
    check(n_qmid > 0, "Q switch half-way through a ROM period seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
