// tb_modular_pe: checks one modular PE (S = 2, three rules R0..R2).
//
// Rules are written through the rule decoder and then looked up on both
// read lanes at once, comparing bv_out, en_out, par_out and err_out with a
// model of the memory kept here. It replays the examples of the rule
// update scheme: R0 = "00", R1 = "01", R2 = "11"; R2 rewritten as "**";
// then R0 = "11", R1 = "**" and R2 rewritten from "**" to "1*". It checks
// that an update takes 2^S = 4 cycles, that lookups of the other rules stay
// correct during an update, that a disabled lane (en_in = 0) reads nothing,
// and that a wrong parity bit on the incoming bit vector raises err_out.
module tb_modular_pe;
  import pc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int S = 2, RPE = 3;

  logic [NLANE-1:0]           vld_in, vld_out, en_in, en_out, par_in, par_out, err_in, err_out;
  logic [NLANE-1:0][S-1:0]    hdr_in, hdr_out;
  logic [NLANE-1:0][RPE-1:0]  bv_in, bv_out;
  logic                       upd_start, upd_busy, upd_done;
  logic [1:0]                 upd_rule;
  logic [S-1:0]               upd_value, upd_wc;

  modular_pe #(.S(S), .RPE(RPE)) dut (.*);

  logic [RPE-1:0] model [4];

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  function automatic logic odd(input logic [RPE-1:0] v);
    return ^v;
  endfunction

  function automatic logic tmatch(input int k, input int v, input int w);
    for (int b = 0; b < S; b++) if (!w[b] && (k[b] != v[b])) return 1'b0;
    return 1'b1;
  endfunction

  // apply one lookup per lane, check the registered result one cycle later
  task automatic lookup(input int h0, input int h1, input logic [RPE-1:0] b0,
                        input logic [RPE-1:0] b1, input logic e0, input logic e1,
                        input logic [RPE-1:0] care);
    logic [NLANE-1:0][RPE-1:0] exp;
    vld_in = 2'b11; hdr_in[0] = 2'(h0); hdr_in[1] = 2'(h1);
    bv_in[0] = b0; bv_in[1] = b1; en_in = {e1, e0};
    par_in[0] = odd(b0); par_in[1] = odd(b1); err_in = '0;
    exp[0] = e0 ? (model[h0] & b0) : '0;
    exp[1] = e1 ? (model[h1] & b1) : '0;
    @(negedge clk);
    for (int p = 0; p < NLANE; p++) begin
      check((bv_out[p] & care) == (exp[p] & care),
            $sformatf("lane %0d hdr %0d bv_out %b expected %b", p, hdr_in[p], bv_out[p], exp[p]));
      if (care == '1) begin
        check(en_out[p] == (exp[p] != '0), $sformatf("lane %0d en_out", p));
        check(par_out[p] == odd(exp[p]), $sformatf("lane %0d par_out", p));
      end
      check(err_out[p] == 1'b0, $sformatf("lane %0d no parity error", p));
      check(hdr_out[p] == hdr_in[p] && vld_out[p], $sformatf("lane %0d header passed down", p));
    end
  endtask

  // write one rule and count the cycles; keeps lookups of the others going
  task automatic write_rule(input int r, input logic [S-1:0] v, input logic [S-1:0] w);
    int cyc = 0;
    logic [RPE-1:0] care;
    care = ~(RPE'(1) << r);
    @(negedge clk);
    upd_start = 1; upd_rule = 2'(r); upd_value = v; upd_wc = w;
    @(negedge clk);
    upd_start = 0;
    while (!upd_done && cyc < 20) begin
      lookup($urandom_range(3), $urandom_range(3), '1, '1, 1, 1, care);
      cyc++;
    end
    @(negedge clk);
    cyc++;
    for (int k = 0; k < 4; k++) model[k][r] = tmatch(k, int'(v), int'(w));
    check(cyc == 4, $sformatf("update takes 2^S = 4 cycles, took %0d", cyc));
  endtask

  task automatic check_array(input logic [RPE-1:0] e00, input logic [RPE-1:0] e01,
                             input logic [RPE-1:0] e10, input logic [RPE-1:0] e11);
    logic [RPE-1:0] e [4];
    e[0] = e00; e[1] = e01; e[2] = e10; e[3] = e11;
    for (int k = 0; k < 4; k++) begin
      check(model[k] == e[k], $sformatf("model word %0d", k));
      lookup(k, 3 - k, '1, '1, 1, 1, '1);
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vld_in = '0; hdr_in = '0; en_in = '0; bv_in = '0; par_in = '0; err_in = '0;
    upd_start = 0; upd_rule = 0; upd_value = 0; upd_wc = 0;
    for (int k = 0; k < 4; k++) model[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check_array(3'b000, 3'b000, 3'b000, 3'b000);   // empty after reset

    // R0 = "00", R1 = "01", R2 = "11"   (words listed as {R2,R1,R0})
    write_rule(0, 2'b00, 2'b00);
    write_rule(1, 2'b01, 2'b00);
    write_rule(2, 2'b11, 2'b00);
    check_array(3'b001, 3'b010, 3'b000, 3'b100);
    // R2 reused as "**"
    write_rule(2, 2'b00, 2'b11);
    check_array(3'b101, 3'b110, 3'b100, 3'b100);
    // R0 = "11", R1 = "**", R2 = "**" -> "1*"
    write_rule(0, 2'b11, 2'b00);
    write_rule(1, 2'b00, 2'b11);
    check_array(3'b110, 3'b110, 3'b110, 3'b111);
    write_rule(2, 2'b10, 2'b01);
    check_array(3'b010, 3'b010, 3'b110, 3'b111);

    // random lookups with partial incoming bit vectors and disabled lanes
    for (int t = 0; t < 200; t++)
      lookup($urandom_range(3), $urandom_range(3), 3'($urandom), 3'($urandom),
             logic'($urandom_range(1)), logic'($urandom_range(1)), '1);

    // corrupted parity on lane 1 only, lane 0 clean
    vld_in = 2'b11; hdr_in[0] = 2'd3; hdr_in[1] = 2'd3; en_in = 2'b11;
    bv_in[0] = 3'b111; bv_in[1] = 3'b011; err_in = '0;
    par_in[0] = odd(3'b111); par_in[1] = ~odd(3'b011);
    @(negedge clk);
    check(err_out == 2'b10, $sformatf("parity error flagged on lane 1 only, got %b", err_out));
    // a disabled lane does not check parity, an incoming error is kept
    en_in = 2'b01; par_in[1] = ~odd(3'b011); err_in = 2'b01;
    @(negedge clk);
    check(err_out == 2'b01, $sformatf("error passed on, disabled lane quiet, got %b", err_out));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
