// parity_gen: parity generator for a bit vector.
//
// Produces the even-parity bit of a W-bit bit vector, i.e. the XOR of all
// its bits, as the parity generator placed in front of the data memory of
// each processing element. The XOR of the bits follows the published
// design; calling the result even parity and using it to check bit vectors
// and memory words (see modular_pe) is this design's reading. Purely
// combinational, no clock.
//
//   bv   W-bit input bit vector
//   par  XOR of all bits of bv (1 when bv holds an odd number of ones)
module parity_gen #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] bv,
  output logic         par
);

  always_comb begin
    par = 1'b0;
    for (int unsigned i = 0; i < W; i++) par ^= bv[i];
  end

endmodule
