// msk_top: MSK transmitter built from waveform ROMs and multiplexers, with a
// single address counter.
//
// An MSK signal is the sum of an I channel and a Q channel. In a conventional
// modulator each channel multiplies the +/-1 data bit by a half-sine weight and
// then by the carrier. Here the product of weight and carrier over one bit pair
// is stored, for both signs, in ROM: each channel becomes a binary modulator
// (two ROMs and a 2-to-1 multiplexer) and the adder sums the two channels.
//   counter        : ROM address 0 .. SAMPLES-1, shared by all four ROMs
//   bit_separator  : I and Q mux selects, with the even-I / odd-Q inversion
//   I_ch_phase1/2  : I node waveform for I bit 1 / 0
//   Q_ch_phase1/2  : Q node waveform for Q bit 1 / 0, halves exchanged so that
//                    the half-period delay of Q needs no second counter
//   I_ch_mux, Q_ch_mux, adder : registered
// Interface: d_in is a message word, taken when d_ack is high; every
// SAMPLES clocks two of its bits are sent, MSG_W/2 periods per word. msk is
// the signed output sample; i1, i2, q1, q2, mux_i, mux_q, I_bit and Q_bit
// expose the internal signals under their published names.
// Timing: an output sample leaves three clocks after its ROM address
// (ROM, mux and adder each register once). The structure, sizes and names
// follow the published design; the register stages, reset and word hand-over
// are this implementation's choices.
module msk_top #(
  parameter int unsigned SAMPLES = msk_pkg::SAMPLES,
  parameter int unsigned WIDTH   = msk_pkg::SAMPLE_W,
  parameter int unsigned ADDR_W  = msk_pkg::ADDR_W,
  parameter int unsigned MSG_W   = msk_pkg::MSG_W,
  parameter int unsigned CARRIER_PERIOD = msk_pkg::CARRIER_PERIOD,
  parameter int unsigned AMPLITUDE      = msk_pkg::AMPLITUDE
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [MSG_W-1:0] d_in,
  output logic             d_ack,
  output logic             I_bit,
  output logic             Q_bit,
  output logic [WIDTH-1:0] i1,
  output logic [WIDTH-1:0] i2,
  output logic [WIDTH-1:0] q1,
  output logic [WIDTH-1:0] q2,
  output logic [WIDTH-1:0] mux_i,
  output logic [WIDTH-1:0] mux_q,
  output logic [WIDTH-1:0] msk
);

  logic [ADDR_W-1:0] count;

  msk_counter #(.SAMPLES(SAMPLES), .ADDR_W(ADDR_W)) u_counter (
    .clk, .rst_n, .count
  );

  msk_bit_separator #(.SAMPLES(SAMPLES), .ADDR_W(ADDR_W), .MSG_W(MSG_W)) u_bit_separator (
    .clk, .rst_n, .count, .d_in, .d_ack, .di(I_bit), .dq(Q_bit)
  );

  msk_rom #(.DEPTH(SAMPLES), .ADDR_W(ADDR_W), .WIDTH(WIDTH),
            .CARRIER_PERIOD(CARRIER_PERIOD), .AMPLITUDE(AMPLITUDE), .KIND(msk_pkg::I_CH_PHASE1))
    u_i_ch_phase1 (.clk, .address(count), .q(i1));
  msk_rom #(.DEPTH(SAMPLES), .ADDR_W(ADDR_W), .WIDTH(WIDTH),
            .CARRIER_PERIOD(CARRIER_PERIOD), .AMPLITUDE(AMPLITUDE), .KIND(msk_pkg::I_CH_PHASE2))
    u_i_ch_phase2 (.clk, .address(count), .q(i2));
  msk_rom #(.DEPTH(SAMPLES), .ADDR_W(ADDR_W), .WIDTH(WIDTH),
            .CARRIER_PERIOD(CARRIER_PERIOD), .AMPLITUDE(AMPLITUDE), .KIND(msk_pkg::Q_CH_PHASE1))
    u_q_ch_phase1 (.clk, .address(count), .q(q1));
  msk_rom #(.DEPTH(SAMPLES), .ADDR_W(ADDR_W), .WIDTH(WIDTH),
            .CARRIER_PERIOD(CARRIER_PERIOD), .AMPLITUDE(AMPLITUDE), .KIND(msk_pkg::Q_CH_PHASE2))
    u_q_ch_phase2 (.clk, .address(count), .q(q2));

  msk_mux #(.WIDTH(WIDTH)) u_i_ch_mux (
    .clk, .data1x(i1), .data0x(i2), .sel(I_bit), .result(mux_i)
  );
  msk_mux #(.WIDTH(WIDTH)) u_q_ch_mux (
    .clk, .data1x(q1), .data0x(q2), .sel(Q_bit), .result(mux_q)
  );

  msk_adder #(.WIDTH(WIDTH)) u_adder (
    .clk, .dataa(mux_i), .datab(mux_q), .result(msk)
  );

endmodule
