// lfsr8: 8-bit pseudo-random pattern generator, one of the three random
// pattern generators of the BIST block (control byte, word address, data).
//
// A Fibonacci LFSR with taps for x^8 + x^6 + x^5 + x^4 + 1 (maximal length,
// 255 states). It shifts left by one place on every clock edge where
// `enable` is high; the new LSB is the XOR of bits 7, 5, 4 and 3. The
// active-high synchronous `reset` loads SEED (which must be non-zero). The
// pattern appears on `q` one cycle after the edge that produced it.
// The ports CLK, enable and reset follow the BIST schematic; the polynomial
// and the seed are this implementation's choice, the design names neither.
module lfsr8 #(
  parameter logic [7:0] SEED = 8'hA5
) (
  input  logic       CLK,
  input  logic       enable,
  input  logic       reset,
  output logic [7:0] q
);

  logic feedback;
  assign feedback = q[7] ^ q[5] ^ q[4] ^ q[3];

  always_ff @(posedge CLK) begin
    if (reset)       q <= SEED;
    else if (enable) q <= {q[6:0], feedback};
  end

  initial assert (SEED != 8'h00) else $error("lfsr8: SEED must be non-zero");

endmodule
