// msk_mux: registered 2-to-1 multiplexer of one channel.
//
// It is the heart of the binary-modulator view of MSK: the channel bit picks
// either the stored bit-1 segment (data1x) or the stored bit-0 segment
// (data0x), which replaces the two cascaded multipliers of a conventional
// modulator. result holds the chosen sample one clock after data and sel are
// presented. Port names follow the published design; the single register
// stage is this implementation's choice.
module msk_mux #(
  parameter int unsigned WIDTH = msk_pkg::SAMPLE_W
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] data1x,
  input  logic [WIDTH-1:0] data0x,
  input  logic             sel,
  output logic [WIDTH-1:0] result
);

  always_ff @(posedge clk) result <= sel ? data1x : data0x;

endmodule
