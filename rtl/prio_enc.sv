// prio_enc: priority encoder of one row, chained down the rows.
//
// Holds a PRI_W-bit priority for each of the RPE rules of its row (a lower
// number is a higher priority). From the row's final bit vector it picks,
// through a binary comparator tree, the matching rule with the best
// priority, ties going to the lower slot,
// and merges it with the result handed down by the row above, which wins a
// tie since its slots are lower. The merged result is registered and passed
// to the row below; the last row's output is the classification result.
// Both concurrent packets are handled side by side.
//
// The published architecture places one priority encoder per row, chained
// vertically, and updates them through a tree structure when a rule's
// priority changes. Here the tree is a comparator tree evaluated on every
// lookup over priorities kept in registers, so a priority update is a
// single register write; that arrangement is this design's choice.
//
// Slot numbers are global: rule i of this row is slot ROW*RPE + i.
// Timing: one register stage, inputs of cycle t appear at the outputs in
// cycle t+1. pri_we writes priority pri_idx at the clock edge.
module prio_enc
  import pc_pkg::*;
#(
  parameter int unsigned RPE    = 2,
  parameter int unsigned PRI_W  = 4,
  parameter int unsigned SLOT_W = 3,
  parameter int unsigned ROW    = 0,
  localparam int unsigned IW = (RPE > 1) ? $clog2(RPE) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // priority update
  input  logic                          pri_we,
  input  logic [IW-1:0]                 pri_idx,
  input  logic [PRI_W-1:0]              pri_val,
  // this row
  input  logic [NLANE-1:0]              vld_in,
  input  logic [NLANE-1:0][RPE-1:0]     bv_in,
  input  logic [NLANE-1:0]              err_in,
  // from the row above
  input  logic [NLANE-1:0]              prev_hit,
  input  logic [NLANE-1:0][PRI_W-1:0]   prev_pri,
  input  logic [NLANE-1:0][SLOT_W-1:0]  prev_slot,
  input  logic [NLANE-1:0]              prev_err,
  // to the row below
  output logic [NLANE-1:0]              vld_out,
  output logic [NLANE-1:0]              hit_out,
  output logic [NLANE-1:0][PRI_W-1:0]   pri_out,
  output logic [NLANE-1:0][SLOT_W-1:0]  slot_out,
  output logic [NLANE-1:0]              err_out
);

  logic [RPE-1:0][PRI_W-1:0] pri_q;

  always_ff @(posedge clk) begin
    if (!rst_n) pri_q <= '0;
    else if (pri_we) pri_q[pri_idx] <= pri_val;
  end

  // Candidates are reduced pairwise in a binary tree of clog2(RPE) levels;
  // at every node the left (lower-slot) child wins unless the right one has
  // a strictly better priority. The row's winner is then merged with the
  // result from the row above in the same way.
  localparam int unsigned LEAVES = 2 ** ((RPE > 1) ? $clog2(RPE) : 0);

  logic [NLANE-1:0]              hit_d;
  logic [NLANE-1:0][PRI_W-1:0]   pri_d;
  logic [NLANE-1:0][SLOT_W-1:0]  slot_d;

  always_comb begin
    logic [LEAVES-1:0]              t_hit;
    logic [LEAVES-1:0][PRI_W-1:0]   t_pri;
    logic [LEAVES-1:0][SLOT_W-1:0]  t_slot;
    for (int p = 0; p < NLANE; p++) begin
      // leaves: the row's rules, padded with empty candidates
      for (int i = 0; i < LEAVES; i++) begin
        t_hit[i]  = (i < RPE) ? bv_in[p][i] : 1'b0;
        t_pri[i]  = (i < RPE) ? pri_q[i] : '0;
        t_slot[i] = SLOT_W'(ROW * RPE + i);
      end
      // tree levels: node i of a level combines nodes 2i and 2i+1
      for (int w = LEAVES / 2; w >= 1; w = w / 2) begin
        for (int i = 0; i < w; i++) begin
          if (!t_hit[2*i] || (t_hit[2*i+1] && t_pri[2*i+1] < t_pri[2*i])) begin
            t_hit[i]  = t_hit[2*i+1];
            t_pri[i]  = t_pri[2*i+1];
            t_slot[i] = t_slot[2*i+1];
          end else begin
            t_hit[i]  = t_hit[2*i];
            t_pri[i]  = t_pri[2*i];
            t_slot[i] = t_slot[2*i];
          end
        end
      end
      // merge with the row above, which owns the lower slots
      if (!prev_hit[p] || (t_hit[0] && t_pri[0] < prev_pri[p])) begin
        hit_d[p]  = t_hit[0];
        pri_d[p]  = t_pri[0];
        slot_d[p] = t_slot[0];
      end else begin
        hit_d[p]  = prev_hit[p];
        pri_d[p]  = prev_pri[p];
        slot_d[p] = prev_slot[p];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vld_out  <= '0;
      hit_out  <= '0;
      pri_out  <= '0;
      slot_out <= '0;
      err_out  <= '0;
    end else begin
      vld_out  <= vld_in;
      hit_out  <= hit_d & vld_in;
      pri_out  <= pri_d;
      slot_out <= slot_d;
      err_out  <= (err_in | prev_err) & vld_in;
    end
  end

endmodule
