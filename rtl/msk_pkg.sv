// msk_pkg: shared constants and the ROM table kinds of the ROM-and-multiplexer
// MSK transmitter.
//
// The transmitter plays stored MSK waveform segments from ROM instead of
// multiplying data, half-sine weights and carrier at run time. One ROM period
// is SAMPLES clocks and carries one I bit and one Q bit (two message bits);
// the Q bit boundary lies SAMPLES/2 clocks after the I bit boundary. Samples are
// signed two's complement, SAMPLE_W bits wide. The sizes (200 samples of 8 bits,
// 8-bit address and message word) follow the published design. The carrier
// period and amplitude were read off its plotted waveforms and printed sample
// values; the table kinds are named after its four ROMs.
package msk_pkg;

  localparam int unsigned SAMPLES  = 200;         // samples per ROM (one I/Q bit pair)
  localparam int unsigned ADDR_W   = 8;           // ROM address width
  localparam int unsigned SAMPLE_W = 8;           // bits per stored sample
  localparam int unsigned MSG_W    = 8;           // message bits per input word
  localparam int unsigned CARRIER_PERIOD = 50;    // samples per carrier cycle
  localparam int unsigned AMPLITUDE      = 127;   // peak sample value

  // Which stored segment a ROM holds: the I or Q node waveform for a
  // channel bit of 1 (phase1) or 0 (phase2).
  typedef enum logic [1:0] {
    I_CH_PHASE1 = 2'd0,
    I_CH_PHASE2 = 2'd1,
    Q_CH_PHASE1 = 2'd2,
    Q_CH_PHASE2 = 2'd3
  } rom_kind_t;

endpackage
