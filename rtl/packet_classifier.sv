// packet_classifier: two-dimensional pipelined packet classification engine
// with modular processing elements, parity generators and dynamic updates.
//
// An L-bit packet header is classified against a rule set of N prioritized
// ternary rules (prefix or exact match per bit, wildcards allowed). The
// rules are spread over a grid of R = N/RPE rows and C = L/S columns of
// modular PEs. Column j looks at header bits [L-1-j*S -: S]; row l holds
// slots l*RPE .. l*RPE+RPE-1. Packet header bits flow down the columns
// (vertical pipeline, the PEs' input registers) and bit vectors flow right
// along the rows (horizontal pipeline, the PEs' output registers). At the
// end of each row the bit vector is ANDed with the row's valid bits and
// handed to the row's priority encoder, and the priority encoders form a
// third pipeline down the right edge, so the last one gives the final
// result: the matching valid rule of best (lowest) priority, its slot and
// its rule ID. Two packets enter in every clock cycle (lanes 0 and 1).
//
// The header subfield of column j is delayed by j cycles before it enters
// row 0, so that it meets the bit vector of its packet. Latency from
// pkt_vld to res_vld is R + C cycles; a new pair of packets can enter every
// cycle, also while a rule is being updated.
//
// Rule updates go through cmd_* (see update_ctrl): the rule decoders of
// one row rewrite a rule's bits in every column in parallel.
//
// Grid shape, dual-packet PE, rule decoders, valid bits and row priority
// encoders follow the published architecture; the rules-per-PE count RPE,
// the widths RID_W and PRI_W, the column skew, and the interface signals
// are this design's choices. res_err reports a parity mismatch seen along
// the packet's path.
module packet_classifier
  import pc_pkg::*;
#(
  parameter int unsigned L     = 4,   // packet header length in bits
  parameter int unsigned S     = 2,   // stride: header bits per PE
  parameter int unsigned N     = 8,   // rule set size
  parameter int unsigned RPE   = 2,   // rules per PE (rules per row)
  parameter int unsigned RID_W = 8,   // rule ID width
  parameter int unsigned PRI_W = 4,   // priority width, lower is better
  localparam int unsigned C      = L / S,
  localparam int unsigned R      = N / RPE,
  localparam int unsigned IW     = (RPE > 1) ? $clog2(RPE) : 1,
  localparam int unsigned SLOT_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // packets, two per cycle
  input  logic [NLANE-1:0]              pkt_vld,
  input  logic [NLANE-1:0][L-1:0]       pkt_hdr,
  // results, R + C cycles later
  output logic [NLANE-1:0]              res_vld,
  output logic [NLANE-1:0]              res_hit,
  output logic [NLANE-1:0][SLOT_W-1:0]  res_slot,
  output logic [NLANE-1:0][RID_W-1:0]   res_rid,
  output logic [NLANE-1:0][PRI_W-1:0]   res_pri,
  output logic [NLANE-1:0]              res_err,
  // rule updates
  input  logic                          cmd_valid,
  output logic                          cmd_ready,
  input  upd_op_e                       cmd_op,
  input  logic [RID_W-1:0]              cmd_rid,
  input  logic [L-1:0]                  cmd_value,
  input  logic [L-1:0]                  cmd_wc,
  input  logic [PRI_W-1:0]              cmd_pri,
  output logic                          rsp_valid,
  output upd_status_e                   rsp_status,
  output logic [SLOT_W-1:0]             rsp_slot
);

  initial begin
    assert (L % S == 0) else $error("L must be a multiple of S");
    assert (N % RPE == 0) else $error("N must be a multiple of RPE");
  end

  // ---------------- column skew of the header ----------------
  // col_vld/col_hdr[j]: what enters PE[0,j], delayed by j cycles
  logic [C-1:0][NLANE-1:0]          col_vld;
  logic [C-1:0][NLANE-1:0][S-1:0]   col_hdr;

  for (genvar j = 0; j < C; j++) begin : g_skew
    logic [j:0][NLANE-1:0]         dvld;
    logic [j:0][NLANE-1:0][S-1:0]  dhdr;
    for (genvar p = 0; p < NLANE; p++) begin : g_in
      assign dvld[0][p] = pkt_vld[p];
      assign dhdr[0][p] = pkt_hdr[p][L-1-j*S -: S];
    end
    for (genvar d = 1; d <= j; d++) begin : g_dly
      always_ff @(posedge clk) begin
        if (!rst_n) begin
          dvld[d] <= '0;
          dhdr[d] <= '0;
        end else begin
          dvld[d] <= dvld[d-1];
          dhdr[d] <= dhdr[d-1];
        end
      end
    end
    assign col_vld[j] = dvld[j];
    assign col_hdr[j] = dhdr[j];
  end

  // ---------------- update controller ----------------
  logic [N-1:0]              valid_all;
  logic [N-1:0][RID_W-1:0]   rid_tab;
  logic [R-1:0]              row_start, row_done, valid_set, valid_clr, pri_we;
  logic [IW-1:0]             dec_rule, valid_idx, pri_idx;
  logic [L-1:0]              dec_value, dec_wc;
  logic [PRI_W-1:0]          pri_val;

  update_ctrl #(
    .L(L), .N(N), .RPE(RPE), .RID_W(RID_W), .PRI_W(PRI_W)
  ) u_upd (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd_op, .cmd_rid, .cmd_value, .cmd_wc, .cmd_pri,
    .rsp_valid, .rsp_status, .rsp_slot,
    .valid (valid_all),
    .rid_tab,
    .row_start, .dec_rule, .dec_value, .dec_wc, .row_done,
    .valid_set, .valid_clr, .valid_idx,
    .pri_we, .pri_idx, .pri_val
  );

  // ---------------- the PE grid ----------------
  // vertical links: v_*[l][j] enters PE[l,j]; horizontal: h_*[l][j] enters PE[l,j]
  logic [R:0][C-1:0][NLANE-1:0]            v_vld;
  logic [R:0][C-1:0][NLANE-1:0][S-1:0]     v_hdr;
  logic [R-1:0][C:0][NLANE-1:0]            h_en, h_par, h_err;
  logic [R-1:0][C:0][NLANE-1:0][RPE-1:0]   h_bv;
  // priority encoder chain: p_*[l] enters the encoder of row l
  logic [R:0][NLANE-1:0]                   p_vld, p_hit, p_err;
  logic [R:0][NLANE-1:0][PRI_W-1:0]        p_pri;
  logic [R:0][NLANE-1:0][SLOT_W-1:0]       p_slot;

  logic                                    ones_par;
  parity_gen #(.W(RPE)) u_par_ones (.bv({RPE{1'b1}}), .par(ones_par));

  assign v_vld[0] = col_vld;
  assign v_hdr[0] = col_hdr;

  assign p_vld[0]  = '0;
  assign p_hit[0]  = '0;
  assign p_err[0]  = '0;
  assign p_pri[0]  = '0;
  assign p_slot[0] = '0;

  for (genvar l = 0; l < R; l++) begin : g_row
    logic [C-1:0] col_done;

    // a row starts from "all rules still possible"
    for (genvar p = 0; p < NLANE; p++) begin : g_row_in
      assign h_en[l][0][p]  = v_vld[l][0][p];
      assign h_bv[l][0][p]  = '1;
      assign h_par[l][0][p] = ones_par;
      assign h_err[l][0][p] = 1'b0;
    end

    for (genvar j = 0; j < C; j++) begin : g_col
      modular_pe #(.S(S), .RPE(RPE)) u_pe (
        .clk, .rst_n,
        .vld_in    (v_vld[l][j]),
        .hdr_in    (v_hdr[l][j]),
        .vld_out   (v_vld[l+1][j]),
        .hdr_out   (v_hdr[l+1][j]),
        .en_in     (h_en[l][j]),
        .bv_in     (h_bv[l][j]),
        .par_in    (h_par[l][j]),
        .err_in    (h_err[l][j]),
        .en_out    (h_en[l][j+1]),
        .bv_out    (h_bv[l][j+1]),
        .par_out   (h_par[l][j+1]),
        .err_out   (h_err[l][j+1]),
        .upd_start (row_start[l]),
        .upd_rule  (dec_rule),
        .upd_value (dec_value[L-1-j*S -: S]),
        .upd_wc    (dec_wc[L-1-j*S -: S]),
        .upd_busy  (),
        .upd_done  (col_done[j])
      );
    end

    // all columns of a row start together and finish together
    assign row_done[l] = &col_done;

    logic [RPE-1:0]              row_valid;
    logic [NLANE-1:0][RPE-1:0]   row_bv;

    valid_bits #(.RPE(RPE)) u_valid (
      .clk, .rst_n,
      .set_en (valid_set[l]),
      .clr_en (valid_clr[l]),
      .idx    (valid_idx),
      .valid  (row_valid),
      .bv_in  (h_bv[l][C]),
      .bv_out (row_bv)
    );
    assign valid_all[l*RPE +: RPE] = row_valid;

    prio_enc #(.RPE(RPE), .PRI_W(PRI_W), .SLOT_W(SLOT_W), .ROW(l)) u_prenc (
      .clk, .rst_n,
      .pri_we    (pri_we[l]),
      .pri_idx,
      .pri_val,
      .vld_in    (v_vld[l+1][C-1]),
      .bv_in     (row_bv),
      .err_in    (h_err[l][C]),
      .prev_hit  (p_hit[l]),
      .prev_pri  (p_pri[l]),
      .prev_slot (p_slot[l]),
      .prev_err  (p_err[l]),
      .vld_out   (p_vld[l+1]),
      .hit_out   (p_hit[l+1]),
      .pri_out   (p_pri[l+1]),
      .slot_out  (p_slot[l+1]),
      .err_out   (p_err[l+1])
    );
  end

  // ---------------- result ----------------
  always_comb begin
    res_vld  = p_vld[R];
    res_hit  = p_hit[R];
    res_slot = p_slot[R];
    res_pri  = p_pri[R];
    res_err  = p_err[R];
    for (int p = 0; p < NLANE; p++) res_rid[p] = rid_tab[p_slot[R][p]];
  end

endmodule
