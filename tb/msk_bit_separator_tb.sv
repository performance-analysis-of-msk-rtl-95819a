// msk_bit_separator_tb: self-checking test of the I/Q bit separator.
//
// The bench plays the shared counter itself (count = cycle mod 200) and
// offers random message words, one per MSG_W/2 ROM periods. An independent
// model of the bit rule computes, for global pair number p,
//   I bit = word[2j], Q bit = word[2j+1]   (j = p mod 4, word = p / 4)
//   di = p odd ? I bit : NOT I bit,   dq = p odd ? NOT Q bit : Q bit
// and the bench checks di after every edge (it changes at count 0), dq (it
// changes at count 100, and is 0 before the first Q bit), and d_ack, which
// must be high exactly in the cycles where count is 0 at a word start. It
// counts that both inversion cases and both select values were exercised.
module msk_bit_separator_tb;
  localparam int SAMPLES = 200;
  localparam int unsigned ADDR_W  = 8;
  localparam int unsigned MSG_W   = 8;
  localparam int PAIRS   = MSG_W / 2;
  localparam int NWORDS  = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [ADDR_W-1:0] count = '0;
  logic [MSG_W-1:0]  d_in = '0;
  logic d_ack, di, dq;
  logic [MSG_W-1:0] words [NWORDS];
  int checks = 0, failures = 0;
  int n_inv_i = 0, n_pass_i = 0, n_inv_q = 0, n_pass_q = 0, n_ack = 0;
  int n_di1 = 0, n_di0 = 0, n_dq1 = 0, n_dq0 = 0;

  msk_bit_separator #(.SAMPLES(SAMPLES), .ADDR_W(ADDR_W), .MSG_W(MSG_W)) dut (
    .clk, .rst_n, .count, .d_in, .d_ack, .di, .dq
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NWORDS * PAIRS * SAMPLES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic exp_di(input int p);
    logic b = words[p / PAIRS][2 * (p % PAIRS)];
    return (p % 2 == 1) ? b : ~b;
  endfunction

  function automatic logic exp_dq(input int p);
    logic b = words[p / PAIRS][2 * (p % PAIRS) + 1];
    return (p % 2 == 1) ? ~b : b;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    foreach (words[w]) words[w] = MSG_W'($urandom);
    words[0] = 8'b1011_0100;   // fixed first word: both bit values on both channels
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < int'(NWORDS * PAIRS * SAMPLES); k++) begin
      // inputs for edge k
      count = ADDR_W'(k % SAMPLES);
      d_in  = words[k / (PAIRS * SAMPLES)];
      #1;
      check(d_ack == (k % (PAIRS * SAMPLES) == 0), $sformatf("d_ack at cycle %0d", k));
      if (d_ack) n_ack++;
      @(negedge clk);
      // outputs after edge k
      begin
        int p, pq;
        p = k / SAMPLES;
        check(di == exp_di(p), $sformatf("di at cycle %0d pair %0d", k, p));
        if (k % SAMPLES == 0) begin
          if (p % 2 == 0) n_inv_i++; else n_pass_i++;
        end
        if (di) n_di1++; else n_di0++;
        if (k < int'(SAMPLES / 2)) begin
          check(dq == 1'b0, $sformatf("dummy dq at cycle %0d", k));
        end else begin
          pq = (k - SAMPLES / 2) / SAMPLES;
          check(dq == exp_dq(pq), $sformatf("dq at cycle %0d pair %0d", k, pq));
          if ((k - SAMPLES / 2) % SAMPLES == 0) begin
            if (pq % 2 == 1) n_inv_q++; else n_pass_q++;
          end
          if (dq) n_dq1++; else n_dq0++;
        end
      end
    end
    check(n_ack == int'(NWORDS), $sformatf("%0d words taken, expected %0d", n_ack, NWORDS));
    check(n_inv_i > 0 && n_pass_i > 0, "both I inversion cases seen");
    check(n_inv_q > 0 && n_pass_q > 0, "both Q inversion cases seen");
    check(n_di1 > 0 && n_di0 > 0 && n_dq1 > 0 && n_dq0 > 0, "both select values seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
