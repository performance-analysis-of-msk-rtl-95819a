// msk_counter: the single sample-address counter of the transmitter.
//
// It steps once per clock through 0 .. SAMPLES-1 and wraps, addressing all four
// waveform ROMs at once. Because the two Q ROMs hold their samples with the
// halves exchanged, the half-bit delay of the Q channel needs no second
// counter. The count is 0 in the first cycle after reset (rst_n low, sampled
// on the rising edge). Sharing one counter follows the published design; the
// synchronous active-low reset is this implementation's choice.
module msk_counter #(
  parameter int unsigned SAMPLES = msk_pkg::SAMPLES,
  parameter int unsigned ADDR_W  = msk_pkg::ADDR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic [ADDR_W-1:0] count
);

  localparam logic [ADDR_W-1:0] LAST = ADDR_W'(SAMPLES - 1);

  a_count_range: assert property (@(posedge clk) disable iff (!rst_n) 32'(count) < SAMPLES)
    else $error("count %0d outside 0..%0d", count, SAMPLES - 1);

  always_ff @(posedge clk) begin
    if (!rst_n)             count <= '0;
    else if (count == LAST) count <= '0;
    else                    count <= count + 1'b1;
  end

endmodule
