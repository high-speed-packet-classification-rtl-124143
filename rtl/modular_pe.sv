// modular_pe: modular processing element with parity generators.
//
// Matches an S-bit subfield of two packet headers against RPE rules in one
// clock cycle. The data memory holds 2^S words of RPE bits: word k is the
// bit vector (BV) of the rules that accept the subfield value k. Each
// packet's header bits address the memory directly through one of two read
// ports; the word read is ANDed with the BV that arrives from the PE on the
// left and the result is registered (output register, horizontal pipeline).
// The header bits are registered too and handed to the PE below (input
// register, vertical pipeline).
//
// A non-zero detector on each AND result gives the enable for the next PE:
// once a packet's BV is all zeros no rule of this row can still match, so
// the next PE leaves its memory unread for that packet and passes zeros.
//
// Parity: one parity generator per packet recomputes the parity of the
// incoming BV and compares it with the parity bit that travels with it; a
// parity bit is stored beside every memory word, generated when the word is
// written and compared when it is read. Either mismatch sets the packet's
// error flag, which travels on with the BV. The published design places
// parity generators on both input BVs and parity values on the memory
// contents; using them as an integrity check is this design's reading.
//
// Updates: a rule decoder rewrites one rule's bits over 2^S cycles through
// a single write port, while both read ports keep serving packets.
// The memory and its parity bits are cleared by reset (no rule matches).
//
// Timing: all outputs are registered, one cycle from input to output.
//   vld_in/hdr_in  -> vld_out/hdr_out   vertical pipeline (to the PE below)
//   en_in/bv_in/par_in/err_in -> en_out/bv_out/par_out/err_out  horizontal
//   upd_*          rule update, see rule_decoder
module modular_pe
  import pc_pkg::*;
#(
  parameter int unsigned S   = 2,   // subfield width (stride)
  parameter int unsigned RPE = 2,   // rules held by this PE
  localparam int unsigned IW = (RPE > 1) ? $clog2(RPE) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // vertical pipeline: packet header subfield
  input  logic [NLANE-1:0]           vld_in,
  input  logic [NLANE-1:0][S-1:0]    hdr_in,
  output logic [NLANE-1:0]           vld_out,
  output logic [NLANE-1:0][S-1:0]    hdr_out,
  // horizontal pipeline: bit vectors
  input  logic [NLANE-1:0]           en_in,
  input  logic [NLANE-1:0][RPE-1:0]  bv_in,
  input  logic [NLANE-1:0]           par_in,
  input  logic [NLANE-1:0]           err_in,
  output logic [NLANE-1:0]           en_out,
  output logic [NLANE-1:0][RPE-1:0]  bv_out,
  output logic [NLANE-1:0]           par_out,
  output logic [NLANE-1:0]           err_out,
  // rule update
  input  logic                       upd_start,
  input  logic [IW-1:0]              upd_rule,
  input  logic [S-1:0]               upd_value,
  input  logic [S-1:0]               upd_wc,
  output logic                       upd_busy,
  output logic                       upd_done
);

  localparam int unsigned DEPTH = 2 ** S;

  logic [RPE-1:0] mem     [DEPTH];   // data memory
  logic [DEPTH-1:0] mem_par;         // stored parity of each word

  // ---------------- rule decoder and write port ----------------
  logic          wr_en;
  logic [S-1:0]  wr_addr;
  logic [IW-1:0] wr_rule;
  logic          wr_bit;
  logic [RPE-1:0] wr_word;
  logic           wr_word_par;

  rule_decoder #(.S(S), .RPE(RPE)) u_dec (
    .clk, .rst_n,
    .start (upd_start),
    .rule  (upd_rule),
    .value (upd_value),
    .wc    (upd_wc),
    .wr_en, .wr_addr, .wr_rule, .wr_bit,
    .busy  (upd_busy),
    .done  (upd_done)
  );

  // a new update must not start while the decoder is still writing
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    upd_start |-> !upd_busy);

  always_comb begin
    wr_word          = mem[wr_addr];
    wr_word[wr_rule] = wr_bit;
  end

  parity_gen #(.W(RPE)) u_par_wr (.bv(wr_word), .par(wr_word_par));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < DEPTH; k++) mem[k] <= '0;
      mem_par <= '0;
    end else if (wr_en) begin
      mem[wr_addr]     <= wr_word;
      mem_par[wr_addr] <= wr_word_par;
    end
  end

  // ---------------- two read lanes ----------------
  logic [NLANE-1:0][RPE-1:0] rd_word, and_bv;
  logic [NLANE-1:0]          in_par, rd_par, out_par, err_now;

  for (genvar p = 0; p < NLANE; p++) begin : g_lane
    // read port p; skipped (all zeros) when the packet can no longer match
    assign rd_word[p] = en_in[p] ? mem[hdr_in[p]] : '0;
    assign and_bv[p]  = rd_word[p] & bv_in[p];

    parity_gen #(.W(RPE)) u_par_in  (.bv(bv_in[p]),   .par(in_par[p]));
    parity_gen #(.W(RPE)) u_par_rd  (.bv(rd_word[p]), .par(rd_par[p]));
    parity_gen #(.W(RPE)) u_par_out (.bv(and_bv[p]),  .par(out_par[p]));

    assign err_now[p] = en_in[p] &&
                        ((in_par[p] != par_in[p]) || (rd_par[p] != mem_par[hdr_in[p]]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vld_out <= '0;
      hdr_out <= '0;
      en_out  <= '0;
      bv_out  <= '0;
      par_out <= '0;
      err_out <= '0;
    end else begin
      vld_out <= vld_in;
      hdr_out <= hdr_in;
      for (int p = 0; p < NLANE; p++) begin
        en_out[p]  <= en_in[p] && (and_bv[p] != '0);
        bv_out[p]  <= and_bv[p];
        par_out[p] <= out_par[p];
        err_out[p] <= err_in[p] || err_now[p];
      end
    end
  end

endmodule
