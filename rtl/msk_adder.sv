// msk_adder: registered adder combining the I node and Q node samples.
//
// result = dataa + datab modulo 2^WIDTH, one clock after the operands. The
// result keeps the operand width, as in the published design; the stored
// tables are scaled so that |I + Q| never exceeds 127 and the sum of two
// table samples does not wrap. The register stage is this implementation's
// choice.
module msk_adder #(
  parameter int unsigned WIDTH = msk_pkg::SAMPLE_W
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] dataa,
  input  logic [WIDTH-1:0] datab,
  output logic [WIDTH-1:0] result
);

  always_ff @(posedge clk) result <= dataa + datab;

endmodule
