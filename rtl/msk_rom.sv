// msk_rom: one synchronous waveform ROM of DEPTH signed samples.
//
// Four instances hold the stored MSK segments; KIND selects which one. With
// n = 0 .. DEPTH-1, A = AMPLITUDE, P = CARRIER_PERIOD and round() to nearest:
//   I_CH_PHASE1 (I bit 1) : round(A * sin(pi*n/DEPTH) * cos(2*pi*n/P))
//   Q_CH_PHASE1 (Q bit 1) : round(A * sin(pi*m/DEPTH) * sin(2*pi*m/P)),
//                           m = (n + DEPTH/2) mod DEPTH
//   I_CH_PHASE2, Q_CH_PHASE2 (bit 0) : the negative of the bit-1 table.
// The half-sine envelope spans one ROM period (one I or Q bit, two message
// bits); with the default sizes the carrier makes four cycles in it. The Q
// tables are stored with their two halves exchanged ("replace technique"), so
// that the Q ROMs can share the I address counter even though each Q bit
// starts half a period after the I bit. The table is computed at elaboration
// by a constant function, so it synthesizes as an initialised ROM.
//
// Timing: q shows the sample at the address of the previous clock edge.
// Addresses DEPTH and above read as 0.
// The sizes (200 samples of 8 bits), the table shapes and the exchange of the
// Q halves follow the published design. The carrier period of 50 samples was
// read off its plotted waveforms, and the scale 127 with rounding to nearest
// reproduces the sample values it prints; these are not stated as such.
module msk_rom #(
  parameter int unsigned       DEPTH          = msk_pkg::SAMPLES,
  parameter int unsigned       ADDR_W         = msk_pkg::ADDR_W,
  parameter int unsigned       WIDTH          = msk_pkg::SAMPLE_W,
  parameter int unsigned       CARRIER_PERIOD = msk_pkg::CARRIER_PERIOD,
  parameter int unsigned       AMPLITUDE      = msk_pkg::AMPLITUDE,
  parameter msk_pkg::rom_kind_t KIND          = msk_pkg::I_CH_PHASE1
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] address,
  output logic [WIDTH-1:0]  q
);

  localparam real PI = 3.14159265358979323846;

  typedef logic [WIDTH-1:0] table_t [DEPTH];

  function automatic table_t make_table();
    table_t t;
    for (int n = 0; n < int'(DEPTH); n++) begin
      int  m;
      real x;
      bit  q_ch, bit0;
      q_ch = (KIND == msk_pkg::Q_CH_PHASE1) || (KIND == msk_pkg::Q_CH_PHASE2);
      bit0 = (KIND == msk_pkg::I_CH_PHASE2) || (KIND == msk_pkg::Q_CH_PHASE2);
      m = q_ch ? (n + int'(DEPTH) / 2) % int'(DEPTH) : n;
      x = real'(AMPLITUDE) * $sin(PI * m / real'(DEPTH))
          * (q_ch ? $sin(2.0 * PI * m / real'(CARRIER_PERIOD))
                  : $cos(2.0 * PI * m / real'(CARRIER_PERIOD)));
      x = $floor(x + 0.5);
      t[n] = WIDTH'(bit0 ? -$rtoi(x) : $rtoi(x));
    end
    return t;
  endfunction

  localparam table_t ROM = make_table();

  always_ff @(posedge clk) begin
    if (32'(address) < DEPTH) q <= ROM[address];
    else                      q <= '0;
  end

endmodule
