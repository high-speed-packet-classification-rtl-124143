// update_ctrl: dynamic rule update controller.
//
// Takes one update command at a time and carries it out while packets keep
// flowing through the pipeline:
//
//   RID check       the command's rule ID is compared with the IDs of all
//                   valid slots at once.
//   modification    (UPD_WRITE, RID found) the rule decoders of the slot's
//                   row rewrite the rule's bit vectors in every subfield in
//                   parallel, 2^S cycles, and the slot's priority register
//                   is rewritten.
//   deletion        (UPD_DELETE, RID found) the slot's valid bit is cleared.
//   insertion       (UPD_WRITE, RID not found) validity check: the lowest
//                   slot whose valid bit is 0 is taken, written as in a
//                   modification, and only then its valid bit is set.
//
// The check steps and ordering follow the published update scheme; the
// command interface, the response codes, lowest-free-slot choice and the
// single-command-at-a-time sequencing are this design's choices.
//
// Interface:
//   cmd_valid/cmd_ready   command handshake, accepted when both are high
//   cmd_value/cmd_wc      rule over the L header bits: wc bit 1 = wildcard;
//                         bits [L-1 -: S] go to column 0, and so on
//   rsp_valid             one-cycle pulse with rsp_status and rsp_slot
//   valid                 valid bits of all N slots (from the rows)
//   row_start, dec_rule, dec_value, dec_wc   start of the rule decoders of
//                         one row (all columns); row_done from that row
//   valid_set/valid_clr/valid_idx            valid bit of one row
//   pri_we/pri_idx/pri_val                   priority register of one row
//   rid_tab               stored rule ID of every slot
// Latency, from the cycle a command is accepted to the response: deletion
// 2 cycles, modification 2^S + 3 cycles and
// insertion 2^S + 4 cycles, where 2^S is the
// decoders' write time.
module update_ctrl
  import pc_pkg::*;
#(
  parameter int unsigned L     = 4,
  parameter int unsigned N     = 8,
  parameter int unsigned RPE   = 2,
  parameter int unsigned RID_W = 8,
  parameter int unsigned PRI_W = 4,
  localparam int unsigned R      = N / RPE,
  localparam int unsigned IW     = (RPE > 1) ? $clog2(RPE) : 1,
  localparam int unsigned SLOT_W = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned RW     = (R > 1) ? $clog2(R) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // command
  input  logic                        cmd_valid,
  output logic                        cmd_ready,
  input  upd_op_e                     cmd_op,
  input  logic [RID_W-1:0]            cmd_rid,
  input  logic [L-1:0]                cmd_value,
  input  logic [L-1:0]                cmd_wc,
  input  logic [PRI_W-1:0]            cmd_pri,
  // response
  output logic                        rsp_valid,
  output upd_status_e                 rsp_status,
  output logic [SLOT_W-1:0]           rsp_slot,
  // rule set state
  input  logic [N-1:0]                valid,
  output logic [N-1:0][RID_W-1:0]     rid_tab,
  // rule decoders
  output logic [R-1:0]                row_start,
  output logic [IW-1:0]               dec_rule,
  output logic [L-1:0]                dec_value,
  output logic [L-1:0]                dec_wc,
  input  logic [R-1:0]                row_done,
  // valid bits
  output logic [R-1:0]                valid_set,
  output logic [R-1:0]                valid_clr,
  output logic [IW-1:0]               valid_idx,
  // priority registers
  output logic [R-1:0]                pri_we,
  output logic [IW-1:0]               pri_idx,
  output logic [PRI_W-1:0]            pri_val
);

  typedef enum logic [2:0] {
    S_IDLE, S_CHECK, S_WRITE, S_WAIT, S_VALIDATE, S_RESP
  } state_e;

  state_e               state;
  upd_op_e              op_q;
  logic [RID_W-1:0]     rid_q;
  logic [L-1:0]         value_q, wc_q;
  logic [PRI_W-1:0]     pri_q;
  logic [SLOT_W-1:0]    slot_q;
  logic                 insert_q;
  upd_status_e          status_q;

  // RID check and validity check, both over all slots in parallel
  logic                 rid_hit, free_hit;
  logic [SLOT_W-1:0]    rid_slot, free_slot;

  always_comb begin
    rid_hit   = 1'b0;
    rid_slot  = '0;
    free_hit  = 1'b0;
    free_slot = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (valid[i] && rid_tab[i] == rid_q) begin
        rid_hit  = 1'b1;
        rid_slot = SLOT_W'(i);
      end
      if (!valid[i]) begin
        free_hit  = 1'b1;
        free_slot = SLOT_W'(i);
      end
    end
  end

  // row and rule-in-row of the slot being updated
  logic [RW-1:0]     row_of_slot;
  logic [IW-1:0]     idx_of_slot;
  always_comb begin
    row_of_slot = RW'(slot_q / SLOT_W'(RPE));
    idx_of_slot = IW'(slot_q % SLOT_W'(RPE));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      op_q     <= UPD_WRITE;
      rid_q    <= '0;
      value_q  <= '0;
      wc_q     <= '0;
      pri_q    <= '0;
      slot_q   <= '0;
      insert_q <= 1'b0;
      status_q <= ST_INSERTED;
      rid_tab  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          op_q    <= cmd_op;
          rid_q   <= cmd_rid;
          value_q <= cmd_value;
          wc_q    <= cmd_wc;
          pri_q   <= cmd_pri;
          state   <= S_CHECK;
        end
        S_CHECK: begin
          if (op_q == UPD_DELETE) begin
            slot_q   <= rid_slot;
            status_q <= rid_hit ? ST_DELETED : ST_NOT_FOUND;
            state    <= S_RESP;
          end else if (rid_hit) begin
            slot_q   <= rid_slot;
            insert_q <= 1'b0;
            status_q <= ST_MODIFIED;
            state    <= S_WRITE;
          end else if (free_hit) begin
            slot_q   <= free_slot;
            insert_q <= 1'b1;
            status_q <= ST_INSERTED;
            state    <= S_WRITE;
          end else begin
            status_q <= ST_FULL;
            state    <= S_RESP;
          end
        end
        S_WRITE: state <= S_WAIT;
        S_WAIT: if (row_done[row_of_slot]) begin
          state <= insert_q ? S_VALIDATE : S_RESP;
        end
        S_VALIDATE: begin
          rid_tab[slot_q] <= rid_q;
          state           <= S_RESP;
        end
        S_RESP: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    cmd_ready  = (state == S_IDLE);
    rsp_valid  = (state == S_RESP);
    rsp_status = status_q;
    rsp_slot   = slot_q;

    dec_rule   = idx_of_slot;
    dec_value  = value_q;
    dec_wc     = wc_q;
    valid_idx  = idx_of_slot;
    pri_idx    = idx_of_slot;
    pri_val    = pri_q;

    row_start  = '0;
    valid_set  = '0;
    valid_clr  = '0;
    pri_we     = '0;
    if (state == S_WRITE) begin
      row_start[row_of_slot] = 1'b1;
      pri_we[row_of_slot]    = 1'b1;
    end
    if (state == S_VALIDATE) valid_set[row_of_slot] = 1'b1;
    if (state == S_RESP && status_q == ST_DELETED) valid_clr[row_of_slot] = 1'b1;
  end

  // handshake rules
  a_rsp_pulse: assert property (@(posedge clk) disable iff (!rst_n)
    rsp_valid |=> !rsp_valid);
  a_one_row: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(row_start) && $onehot0(valid_set | valid_clr));
  a_busy: assert property (@(posedge clk) disable iff (!rst_n)
    (cmd_valid && cmd_ready) |=> !cmd_ready);

endmodule
