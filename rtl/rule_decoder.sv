// rule_decoder: writes one rule's bit-vector bits into a PE data memory.
//
// A rule is given in one S-bit subfield as a ternary string, held as two
// binary strings: `value` (the non-wildcard digits) and `wc` (1 marks a
// wildcard digit). For every memory address k = 0 .. 2^S-1 the decoder
// computes whether k matches the ternary string (bit = 1) or not (bit = 0)
// and writes that single bit into column `rule` of word k. As in the source
// architecture, each bit of a bit vector sits in its own memory entry, the
// write port is single-ported, and a fixed 2^S write cycles are spent per
// update whatever the number of bits that actually change.
//
// Interface and timing:
//   start/rule/value/wc  sampled in a cycle where busy is low and start is 1
//   wr_en/wr_addr/wr_rule/wr_bit
//                        one bit write per cycle during the 2^S cycles after
//                        start
//   busy                 high during those 2^S cycles
//   done                 high together with the last write
// A start while busy is ignored. Reset (active low, synchronous) idles it.
module rule_decoder #(
  parameter int unsigned S   = 2,   // subfield width (stride)
  parameter int unsigned RPE = 2,   // rules held per processing element
  localparam int unsigned IW = (RPE > 1) ? $clog2(RPE) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [IW-1:0] rule,
  input  logic [S-1:0]  value,
  input  logic [S-1:0]  wc,
  output logic          wr_en,
  output logic [S-1:0]  wr_addr,
  output logic [IW-1:0] wr_rule,
  output logic          wr_bit,
  output logic          busy,
  output logic          done
);

  logic [S-1:0]  k_q;      // address being written
  logic [IW-1:0] rule_q;
  logic [S-1:0]  value_q;
  logic [S-1:0]  wc_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      k_q     <= '0;
      rule_q  <= '0;
      value_q <= '0;
      wc_q    <= '0;
    end else if (!busy) begin
      if (start) begin
        busy    <= 1'b1;
        k_q     <= '0;
        rule_q  <= rule;
        value_q <= value;
        wc_q    <= wc;
      end
    end else begin
      k_q <= k_q + 1'b1;
      if (k_q == '1) busy <= 1'b0;
    end
  end

  // Algorithm: bit k of the rule is 1 when k equals the rule on every
  // non-wildcard digit.
  always_comb begin
    wr_en   = busy;
    wr_addr = k_q;
    wr_rule = rule_q;
    wr_bit  = ((k_q ^ value_q) & ~wc_q) == '0;
    done    = busy && (k_q == '1);
  end

endmodule
