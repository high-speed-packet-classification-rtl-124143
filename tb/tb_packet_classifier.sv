// tb_packet_classifier: end-to-end test of the packet classifier.
//
// The classifier runs at its default size (4-bit headers, stride 2, 8
// rules, 2 rules per PE: a 4 x 2 grid). Two random packets enter in every
// cycle, most cycles on both lanes, while a stream of random rule updates
// (insert, modify, delete, including refused ones) is applied through the
// command port. A model kept here holds the rule set and computes the
// expected result of every packet: the valid matching rule with the lowest
// priority value, ties to the lower slot.
//
// Checks:
//   * each result appears exactly R + C cycles after its packet, in order;
//   * packets that see no update during their flight get exactly the
//     model's result (hit, slot, priority, rule ID), with no parity error;
//   * packets in flight during an update of slot X: a result other than X
//     must be the best match among the other rules, and X may only win if
//     some mix of its old and new subfields matches the header;
//   * every update response (status and slot) is as the model predicts.
// Mechanisms counted, each must occur: insertion, modification, deletion,
// refused insertion (set full), refused deletion (unknown RID), two
// packets in one cycle, a lookup cut short (bit vector all zeros after
// column 0, so column 1 skips its memory read), a lookup during an update,
// a packet matching several rules, a winner chosen by priority over a
// lower slot, and a packet matching no rule.
module tb_packet_classifier;
  import pc_pkg::*;

  localparam int L = 4, S = 2, N = 8, RPE = 2, RID_W = 8, PRI_W = 4;
  localparam int C = L / S, R = N / RPE, LAT = R + C;
  localparam int SLOT_W = (N > 1) ? $clog2(N) : 1;
  localparam int NCMD = 300;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NLANE-1:0]              pkt_vld;
  logic [NLANE-1:0][L-1:0]       pkt_hdr;
  logic [NLANE-1:0]              res_vld, res_hit, res_err;
  logic [NLANE-1:0][SLOT_W-1:0]  res_slot;
  logic [NLANE-1:0][RID_W-1:0]   res_rid;
  logic [NLANE-1:0][PRI_W-1:0]   res_pri;
  logic                          cmd_valid, cmd_ready, rsp_valid;
  upd_op_e                       cmd_op;
  logic [RID_W-1:0]              cmd_rid;
  logic [L-1:0]                  cmd_value, cmd_wc;
  logic [PRI_W-1:0]              cmd_pri;
  upd_status_e                   rsp_status;
  logic [SLOT_W-1:0]             rsp_slot;

  packet_classifier dut (.*);

  // ---------------- rule set model ----------------
  typedef struct {
    bit          valid;
    int          rid;
    bit [L-1:0]  value;
    bit [L-1:0]  wc;
    int          pri;
  } rule_t;

  rule_t cur [N];       // rule set in force
  rule_t nxt [N];       // rule set after the command in flight

  typedef struct {
    bit hit;
    int slot;
    int pri;
    int nmatch;
    int lowest;         // lowest matching slot
  } res_t;

  function automatic bit rmatch(input rule_t r, input bit [L-1:0] h);
    return r.valid && (((h ^ r.value) & ~r.wc) == '0);
  endfunction

  function automatic res_t classify(input rule_t set [N], input bit [L-1:0] h, input int skip);
    res_t o;
    o.hit = 0; o.slot = 0; o.pri = 0; o.nmatch = 0; o.lowest = -1;
    for (int i = 0; i < N; i++) begin
      if (i == skip || !rmatch(set[i], h)) continue;
      o.nmatch++;
      if (o.lowest < 0) o.lowest = i;
      if (!o.hit || set[i].pri < o.pri) begin
        o.hit = 1; o.slot = i; o.pri = set[i].pri;
      end
    end
    return o;
  endfunction

  // can some mix of old and new subfields of slot x match header h?
  function automatic bit mix_match(input rule_t a, input rule_t b, input bit [L-1:0] h);
    for (int j = 0; j < C; j++) begin
      bit ma = 1, mb = 1;
      for (int k = L - 1 - j * S; k > L - 1 - (j + 1) * S; k--) begin
        if (!a.wc[k] && a.value[k] != h[k]) ma = 0;
        if (!b.wc[k] && b.value[k] != h[k]) mb = 0;
      end
      if (!ma && !mb) return 0;
    end
    return 1;
  endfunction

  // ---------------- packets in flight ----------------
  typedef struct {
    int         exit_cyc;
    bit [L-1:0] hdr;
    int         events;     // update count at entry
    bit         active;     // an update was in flight at entry
  } pkt_t;

  pkt_t q [NLANE][$];

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // update sequencing
  bit     active = 0;
  int     events = 0;
  int     upd_slot = 0;
  rule_t  old_x, new_x;
  int     quiet_until = 0;
  int     ncmd = 0;
  upd_status_e exp_status;
  int     exp_slot;

  // mechanism counters
  int n_ins = 0, n_mod = 0, n_del = 0, n_full = 0, n_nf = 0, n_dual = 0, n_skip = 0;
  int n_overlap = 0, n_multi = 0, n_prio = 0, n_miss = 0, n_strict = 0;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cyc, msg);
    end
  endtask

  task automatic check_result(input int p);
    pkt_t  k;
    res_t  e;
    bit    ovl;
    if (q[p].size() == 0) begin
      check(0, $sformatf("lane %0d result without a packet", p));
      return;
    end
    k = q[p].pop_front();
    check(k.exit_cyc == cyc, $sformatf("lane %0d latency: expected cycle %0d", p, k.exit_cyc));
    check(!res_err[p], $sformatf("lane %0d parity error", p));
    ovl = k.active || active || (events != k.events);
    if (!ovl) begin
      e = classify(cur, k.hdr, -1);
      n_strict++;
      if (e.nmatch > 1) n_multi++;
      if (e.hit && e.slot != e.lowest) n_prio++;
      if (!e.hit) n_miss++;
      check(res_hit[p] == e.hit, $sformatf("lane %0d hdr %b hit %b expected %b", p, k.hdr, res_hit[p], e.hit));
      if (e.hit)
        check(int'(res_slot[p]) == e.slot && int'(res_pri[p]) == e.pri &&
              int'(res_rid[p]) == cur[e.slot].rid,
              $sformatf("lane %0d hdr %b slot %0d pri %0d expected slot %0d pri %0d",
                        p, k.hdr, res_slot[p], res_pri[p], e.slot, e.pri));
    end else begin
      n_overlap++;
      e = classify(cur, k.hdr, upd_slot);   // rules other than the one updated
      if (res_hit[p] && int'(res_slot[p]) == upd_slot) begin
        check(mix_match(old_x, new_x, k.hdr) && (old_x.valid || new_x.valid),
              $sformatf("lane %0d slot %0d under update cannot match", p, upd_slot));
        check(int'(res_pri[p]) == old_x.pri || int'(res_pri[p]) == new_x.pri,
              "priority of the slot under update");
      end else begin
        check(res_hit[p] == e.hit, $sformatf("lane %0d during update: hit %b expected %b", p, res_hit[p], e.hit));
        if (e.hit)
          check(int'(res_slot[p]) == e.slot && int'(res_pri[p]) == e.pri,
                $sformatf("lane %0d during update: slot %0d expected %0d", p, res_slot[p], e.slot));
      end
    end
  endtask

  // choose and issue a random command, predicting its outcome
  task automatic issue_cmd();
    int rid, hit_slot, free_slot;
    bit del;
    rid = $urandom_range(1, N + 4);
    del = ($urandom_range(99) < 35);
    hit_slot = -1; free_slot = -1;
    for (int i = N - 1; i >= 0; i--) begin
      if (cur[i].valid && cur[i].rid == rid) hit_slot = i;
      if (!cur[i].valid) free_slot = i;
    end
    nxt = cur;
    cmd_valid = 1;
    cmd_op    = del ? UPD_DELETE : UPD_WRITE;
    cmd_rid   = RID_W'(rid);
    cmd_value = L'($urandom);
    // mostly prefix rules, some arbitrary ternary strings
    if ($urandom_range(3) != 0) cmd_wc = L'((1 << $urandom_range(L)) - 1);
    else                        cmd_wc = L'($urandom);
    cmd_pri   = PRI_W'($urandom_range(3));
    exp_slot  = 0;
    if (del) begin
      if (hit_slot >= 0) begin
        exp_status = ST_DELETED; exp_slot = hit_slot;
        nxt[hit_slot].valid = 0;
      end else exp_status = ST_NOT_FOUND;
    end else if (hit_slot >= 0 || free_slot >= 0) begin
      exp_slot   = (hit_slot >= 0) ? hit_slot : free_slot;
      exp_status = (hit_slot >= 0) ? ST_MODIFIED : ST_INSERTED;
      nxt[exp_slot].valid = 1;
      nxt[exp_slot].rid   = rid;
      nxt[exp_slot].value = cmd_value;
      nxt[exp_slot].wc    = cmd_wc;
      nxt[exp_slot].pri   = int'(cmd_pri);
    end else exp_status = ST_FULL;
    upd_slot = exp_slot;
    old_x    = cur[exp_slot];
    new_x    = nxt[exp_slot];
    active   = 1;
    events++;
    ncmd++;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pkt_vld = '0; pkt_hdr = '0;
    cmd_valid = 0; cmd_op = UPD_WRITE; cmd_rid = 0; cmd_value = 0; cmd_wc = 0; cmd_pri = 0;
    for (int i = 0; i < N; i++) cur[i] = '{valid: 0, rid: 0, value: '0, wc: '0, pri: 0};
    repeat (3) @(negedge clk);
    rst_n = 1;

    while (ncmd < NCMD || active || q[0].size() != 0 || q[1].size() != 0) begin
      @(negedge clk);
      // 1. results and responses of this cycle
      for (int p = 0; p < NLANE; p++) if (res_vld[p]) check_result(p);
      for (int l = 0; l < R; l++)
        for (int p = 0; p < NLANE; p++)
          if (dut.v_vld[l][1][p] && !dut.h_en[l][1][p]) n_skip++;
      if (rsp_valid) begin
        check(active, "response without a command");
        check(rsp_status == exp_status, $sformatf("status %s expected %s", rsp_status.name(), exp_status.name()));
        if (exp_status != ST_FULL && exp_status != ST_NOT_FOUND)
          check(int'(rsp_slot) == exp_slot, $sformatf("slot %0d expected %0d", rsp_slot, exp_slot));
        case (rsp_status)
          ST_INSERTED:  n_ins++;
          ST_MODIFIED:  n_mod++;
          ST_DELETED:   n_del++;
          ST_FULL:      n_full++;
          ST_NOT_FOUND: n_nf++;
          default: ;
        endcase
        cur = nxt;
        active = 0;
        quiet_until = cyc + LAT + 2 + $urandom_range(6);
      end
      // 2. next command
      cmd_valid = 0;
      if (!active && ncmd < NCMD && cyc >= quiet_until && cmd_ready) issue_cmd();
      // 3. next packets, none once all commands are done
      for (int p = 0; p < NLANE; p++) begin
        pkt_vld[p] = (ncmd < NCMD || active) && ($urandom_range(9) != 0);
        pkt_hdr[p] = L'($urandom);
        if (pkt_vld[p]) q[p].push_back('{exit_cyc: cyc + LAT, hdr: pkt_hdr[p],
                                          events: events, active: active});
      end
      if (pkt_vld == '1) n_dual++;
      if (cyc > 1000000) break;
    end
    repeat (LAT + 2) begin
      @(negedge clk);
      check(res_vld == '0, "no result after the last packet");
    end

    $display("updates: inserted %0d modified %0d deleted %0d full %0d not found %0d",
             n_ins, n_mod, n_del, n_full, n_nf);
    $display("lookups: exact %0d during update %0d, dual-lane cycles %0d, cut short %0d",
             n_strict, n_overlap, n_dual, n_skip);
    $display("         multi-match %0d, priority over lower slot %0d, no match %0d",
             n_multi, n_prio, n_miss);
    check(n_ins > 0,     "an insertion happened");
    check(n_mod > 0,     "a modification happened");
    check(n_del > 0,     "a deletion happened");
    check(n_full > 0,    "an insertion was refused, set full");
    check(n_nf > 0,      "a deletion was refused, RID unknown");
    check(n_dual > 0,    "two packets in one cycle");
    check(n_skip > 0,    "a lookup cut short by an all-zero bit vector");
    check(n_overlap > 0, "a lookup during an update");
    check(n_multi > 0,   "a packet matching several rules");
    check(n_prio > 0,    "priority chose a higher slot");
    check(n_miss > 0,    "a packet matching nothing");
    check(n_strict > 1000, "enough exactly checked lookups");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
