// msk_bit_separator: serial-to-parallel split of the message into I and Q bits,
// with the bit inversion that lets half-sine weights be stored in ROM.
//
// A message word d_in of MSG_W bits is sent bit 0 first: even positions become
// I bits, odd positions Q bits, so each word gives MSG_W/2 I/Q bit pairs. One
// pair lasts one ROM period (SAMPLES clocks). The I bit of a pair starts at
// ROM address 0 and the Q bit at address SAMPLES/2, half a period later.
//
// The ROMs hold only the positive half-sine weight, while the true weight of
// a conventional MSK modulator changes sign from one bit to the next. The sign
// is folded into the data instead: with k the parity of the pair number
// (0 for the first pair after reset, running on across words),
//   k = 0 : di = NOT I bit, dq = Q bit
//   k = 1 : di = I bit,     dq = NOT Q bit
// which inverts the even I bits and the odd Q bits. This rule is the
// published design's; the bit order and word hand-over are this
// implementation's choices.
//
// Interface and timing: count is the shared ROM address. di is updated on the
// edge where count is 0 and dq on the edge where count is SAMPLES/2, so each
// select changes together with the ROM output of that address (the ROMs have
// one clock of latency). d_in is taken on the edge where count is 0 at the
// start of a word; d_ack is high in that cycle. Until the first Q bit starts,
// dq is 0 (a dummy Q bit). Reset is synchronous and active low.
module msk_bit_separator #(
  parameter int unsigned SAMPLES = msk_pkg::SAMPLES,
  parameter int unsigned ADDR_W  = msk_pkg::ADDR_W,
  parameter int unsigned MSG_W   = msk_pkg::MSG_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] count,
  input  logic [MSG_W-1:0]  d_in,
  output logic              d_ack,
  output logic              di,
  output logic              dq
);

  localparam int unsigned PAIRS  = MSG_W / 2;
  localparam int unsigned PAIR_W = (PAIRS > 1) ? $clog2(PAIRS) : 1;
  localparam logic [PAIR_W-1:0] LAST_PAIR = PAIR_W'(PAIRS - 1);
  localparam logic [ADDR_W-1:0] Q_START   = ADDR_W'(SAMPLES / 2);

  if (MSG_W % 2 != 0 || MSG_W < 2) begin : g_bad_width
    $error("msk_bit_separator: MSG_W must be even and at least 2");
  end

  logic [MSG_W-1:0]  word;   // word being sent
  logic [PAIR_W-1:0] pair;   // pair index within word
  logic              k;      // parity of the running pair number

  logic              i_start, q_start, load;
  logic [PAIR_W-1:0] pair_next;
  logic [MSG_W-1:0]  word_next;
  logic              k_next;

  assign i_start = (count == '0);
  assign q_start = (count == Q_START);
  assign load    = i_start && (pair == LAST_PAIR);
  assign d_ack   = load;

  always_comb begin
    pair_next = load ? '0   : pair + 1'b1;
    word_next = load ? d_in : word;
    k_next    = ~k;
  end

  // The shared address must stay inside one ROM period.
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n) 32'(count) < SAMPLES)
    else $error("count %0d outside 0..%0d", count, SAMPLES - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      word <= '0;
      pair <= LAST_PAIR;  // first count of 0 takes a new word
      k    <= 1'b1;       // first pair gets k = 0
      di   <= 1'b0;
      dq   <= 1'b0;
    end else begin
      if (i_start) begin
        word <= word_next;
        pair <= pair_next;
        k    <= k_next;
        di   <= word_next[2*pair_next] ^ ~k_next;
      end
      if (q_start) begin
        dq   <= word[2*pair+1] ^ k;
      end
    end
  end

endmodule
