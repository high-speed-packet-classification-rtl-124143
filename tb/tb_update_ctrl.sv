// tb_update_ctrl: checks the dynamic update controller (N = 8, 2 per row).
//
// The testbench plays the rows: it keeps the valid bits, priority registers
// and rule fields per slot as the controller drives them, and answers a
// row start with row_done after 2^S = 4 cycles, as the rule decoders do.
// Insertions fill the slots lowest first until the set is full (ST_FULL),
// re-writing an existing RID modifies it in place, deleting clears the
// valid bit and frees the slot for the next insertion, and deleting an
// unknown RID gives ST_NOT_FOUND. Responses, slots, the row and rule
// fields handed to the decoders, and the response latencies are checked.
module tb_update_ctrl;
  import pc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int L = 4, N = 8, RPE = 2, RID_W = 8, PRI_W = 4, R = N / RPE;
  localparam int DEC_CYC = 4;

  logic                     cmd_valid, cmd_ready, rsp_valid;
  upd_op_e                  cmd_op;
  logic [RID_W-1:0]         cmd_rid;
  logic [L-1:0]             cmd_value, cmd_wc, dec_value, dec_wc;
  logic [PRI_W-1:0]         cmd_pri, pri_val;
  upd_status_e              rsp_status;
  logic [2:0]               rsp_slot;
  logic [N-1:0]             valid;
  logic [N-1:0][RID_W-1:0]  rid_tab;
  logic [R-1:0]             row_start, row_done, valid_set, valid_clr, pri_we;
  logic [0:0]               dec_rule, valid_idx, pri_idx;

  update_ctrl #(.L(L), .N(N), .RPE(RPE), .RID_W(RID_W), .PRI_W(PRI_W)) dut (.*);

  // rows as seen from the controller
  int          busy_cnt [R];
  logic [L-1:0] f_value [N], f_wc [N];
  int          f_pri [N];
  int          n_start = 0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid <= '0;
      for (int r = 0; r < R; r++) busy_cnt[r] <= 0;
    end else begin
      for (int r = 0; r < R; r++) begin
        if (row_start[r]) begin
          busy_cnt[r] <= DEC_CYC;
          f_value[r*RPE + int'(dec_rule)] <= dec_value;
          f_wc[r*RPE + int'(dec_rule)]    <= dec_wc;
          n_start++;
        end else if (busy_cnt[r] > 0) busy_cnt[r] <= busy_cnt[r] - 1;
        if (pri_we[r]) f_pri[r*RPE + int'(pri_idx)] <= int'(pri_val);
        if (valid_clr[r]) valid[r*RPE + int'(valid_idx)] <= 1'b0;
        else if (valid_set[r]) valid[r*RPE + int'(valid_idx)] <= 1'b1;
      end
    end
  end
  always_comb for (int r = 0; r < R; r++) row_done[r] = (busy_cnt[r] == 1);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  // issue one command, wait for the response, return status/slot/latency
  task automatic cmd(input upd_op_e op, input int rid, input int v, input int w,
                     input int pri, output upd_status_e st, output int slot,
                     output int lat);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_rid = RID_W'(rid);
    cmd_value = L'(v); cmd_wc = L'(w); cmd_pri = PRI_W'(pri);
    lat = 0;
    @(negedge clk);
    cmd_valid = 0;
    while (!rsp_valid && lat < 50) begin
      @(negedge clk);
      lat++;
    end
    st = rsp_status; slot = int'(rsp_slot);
    lat++;
    @(negedge clk);   // let the response cycle's writes land
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    upd_status_e st;
    int slot, lat;
    cmd_valid = 0; cmd_op = UPD_WRITE; cmd_rid = 0; cmd_value = 0; cmd_wc = 0; cmd_pri = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(cmd_ready && valid == '0, "ready and empty after reset");

    // fill all 8 slots, RIDs 10..17
    for (int i = 0; i < N; i++) begin
      cmd(UPD_WRITE, 10 + i, i, 0, i, st, slot, lat);
      check(st == ST_INSERTED && slot == i, $sformatf("insert %0d -> slot %0d status %s", i, slot, st.name()));
      check(lat == DEC_CYC + 4, $sformatf("insertion latency %0d", lat));
      check(valid[i] && rid_tab[i] == RID_W'(10 + i), "slot validated with its RID");
      check(f_value[i] == L'(i) && f_pri[i] == i, "rule fields and priority written");
    end
    // set is full
    cmd(UPD_WRITE, 99, 0, 0, 0, st, slot, lat);
    check(st == ST_FULL, "insertion into a full set refused");
    // modify RID 13 in place
    cmd(UPD_WRITE, 13, 10, 3, 9, st, slot, lat);
    check(st == ST_MODIFIED && slot == 3, "modify keeps the slot");
    check(lat == DEC_CYC + 3, $sformatf("modification latency %0d", lat));
    check(f_value[3] == 4'b1010 && f_wc[3] == 4'b0011 && f_pri[3] == 9, "modified fields");
    check(valid == 8'hFF, "modification leaves valid bits alone");
    // delete RID 15, then 12
    cmd(UPD_DELETE, 15, 0, 0, 0, st, slot, lat);
    check(st == ST_DELETED && slot == 5 && valid == 8'hDF, "delete RID 15");
    check(lat == 2, $sformatf("deletion latency %0d", lat));
    cmd(UPD_DELETE, 12, 0, 0, 0, st, slot, lat);
    check(st == ST_DELETED && slot == 2 && valid == 8'hDB, "delete RID 12");
    // unknown and already-deleted RIDs
    cmd(UPD_DELETE, 77, 0, 0, 0, st, slot, lat);
    check(st == ST_NOT_FOUND, "delete unknown RID");
    cmd(UPD_DELETE, 15, 0, 0, 0, st, slot, lat);
    check(st == ST_NOT_FOUND && valid == 8'hDB, "delete a deleted RID");
    // re-inserting a deleted RID is an insertion into the lowest free slot
    cmd(UPD_WRITE, 15, 15, 0, 1, st, slot, lat);
    check(st == ST_INSERTED && slot == 2 && valid == 8'hDF && rid_tab[2] == 8'd15,
          "reuse of the lowest invalid slot");
    cmd(UPD_WRITE, 40, 0, 15, 2, st, slot, lat);
    check(st == ST_INSERTED && slot == 5 && valid == 8'hFF, "next free slot");
    // RID 12's slot now holds 15: RID 12 is gone
    cmd(UPD_WRITE, 12, 1, 1, 1, st, slot, lat);
    check(st == ST_FULL, "RID 12 not found, set full");
    check(n_start == 11, $sformatf("decoder starts %0d", n_start));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
