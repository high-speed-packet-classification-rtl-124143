// valid_bits: the valid bits of the rules of one horizontal pipeline.
//
// One bit per rule held by the row. A rule whose valid bit is 0 can never
// produce a match: the bits are ANDed with the bit vector that leaves the
// row, for both concurrent packets. A deletion clears a bit, an insertion
// sets it once the rule's bit vectors have been written. After reset every
// rule is invalid (an empty rule set), which is this design's choice.
//
//   set_en / clr_en / idx  synchronous set or clear of bit idx (clear wins)
//   valid                  current valid bits, registered
//   bv_in -> bv_out        combinational AND with the valid bits
module valid_bits
  import pc_pkg::*;
#(
  parameter int unsigned RPE = 2,
  localparam int unsigned IW = (RPE > 1) ? $clog2(RPE) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       set_en,
  input  logic                       clr_en,
  input  logic [IW-1:0]              idx,
  output logic [RPE-1:0]             valid,
  input  logic [NLANE-1:0][RPE-1:0]  bv_in,
  output logic [NLANE-1:0][RPE-1:0]  bv_out
);

  always_ff @(posedge clk) begin
    if (!rst_n) valid <= '0;
    else if (clr_en) valid[idx] <= 1'b0;
    else if (set_en) valid[idx] <= 1'b1;
  end

  always_comb begin
    for (int p = 0; p < NLANE; p++) bv_out[p] = bv_in[p] & valid;
  end

endmodule
