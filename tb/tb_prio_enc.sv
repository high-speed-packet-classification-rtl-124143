// tb_prio_enc: checks the row priority encoder (row 2, five rules per row,
// so the comparator tree has three levels with three empty leaves).
//
// Priorities are written through the update port, then random row bit
// vectors and random results from the row above are applied on both lanes.
// The registered output is compared one cycle later with a model that
// scans all candidates: lowest priority value wins, ties go to the lower
// slot, and the row above owns the lower slots.
module tb_prio_enc;
  import pc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int RPE = 5, PRI_W = 3, SLOT_W = 4, ROW = 2;

  logic                          pri_we;
  logic [2:0]                    pri_idx;
  logic [PRI_W-1:0]              pri_val;
  logic [NLANE-1:0]              vld_in, err_in, prev_hit, prev_err;
  logic [NLANE-1:0][RPE-1:0]     bv_in;
  logic [NLANE-1:0][PRI_W-1:0]   prev_pri, pri_out;
  logic [NLANE-1:0][SLOT_W-1:0]  prev_slot, slot_out;
  logic [NLANE-1:0]              vld_out, hit_out, err_out;

  prio_enc #(.RPE(RPE), .PRI_W(PRI_W), .SLOT_W(SLOT_W), .ROW(ROW)) dut (.*);

  int pri_m [RPE];
  int n_prev_wins = 0, n_row_wins = 0, n_ties = 0;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  task automatic set_pri(input int i, input int v);
    @(negedge clk);
    pri_we = 1; pri_idx = 3'(i); pri_val = PRI_W'(v);
    @(negedge clk);
    pri_we = 0;
    pri_m[i] = v;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pri_we = 0; pri_idx = 0; pri_val = 0;
    vld_in = 0; err_in = 0; prev_hit = 0; prev_err = 0; bv_in = 0; prev_pri = 0; prev_slot = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < RPE; i++) set_pri(i, 0);
    for (int t = 0; t < 2000; t++) begin
      logic [NLANE-1:0] eh, ee, ev;
      int ep [NLANE], es [NLANE];
      if (t % 50 == 0) for (int i = 0; i < RPE; i++) set_pri(i, $urandom_range(7));
      vld_in = 2'($urandom); err_in = 2'($urandom); prev_err = 2'($urandom);
      for (int p = 0; p < NLANE; p++) begin
        bv_in[p]     = RPE'($urandom);
        prev_hit[p]  = logic'($urandom_range(1));
        prev_pri[p]  = PRI_W'($urandom);
        prev_slot[p] = SLOT_W'($urandom_range(ROW * RPE - 1));
        // model
        eh[p] = prev_hit[p]; ep[p] = int'(prev_pri[p]); es[p] = int'(prev_slot[p]);
        for (int i = 0; i < RPE; i++) begin
          if (bv_in[p][i] && eh[p] && pri_m[i] == ep[p]) n_ties++;
          if (bv_in[p][i] && (!eh[p] || pri_m[i] < ep[p])) begin
            eh[p] = 1; ep[p] = pri_m[i]; es[p] = ROW * RPE + i;
          end
        end
        if (eh[p] && es[p] < ROW * RPE && bv_in[p] != 0) n_prev_wins++;
        if (es[p] >= ROW * RPE) n_row_wins++;
        ev[p] = vld_in[p];
        ee[p] = (err_in[p] | prev_err[p]) & vld_in[p];
        eh[p] = eh[p] & vld_in[p];
      end
      @(negedge clk);
      for (int p = 0; p < NLANE; p++) begin
        check(vld_out[p] == ev[p] && hit_out[p] == eh[p] && err_out[p] == ee[p],
              $sformatf("t%0d lane %0d flags", t, p));
        if (eh[p])
          check(int'(slot_out[p]) == es[p] && int'(pri_out[p]) == ep[p],
                $sformatf("t%0d lane %0d slot %0d pri %0d expected %0d %0d",
                          t, p, slot_out[p], pri_out[p], es[p], ep[p]));
      end
    end
    check(n_prev_wins > 0 && n_row_wins > 0 && n_ties > 0, "all selection cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
