// tb_valid_bits: checks rule validation and invalidation.
//
// Replays the deletion example (three rules, R0 and R1 valid, R1 deleted:
// 1,1,0 -> 1,0,0) and the insertion example (R2 validated: 1,1,0 -> 1,1,1),
// then random set/clear sequences against a model, checking that the bit
// vectors of both lanes are masked by the valid bits.
module tb_valid_bits;
  import pc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic set_en, clr_en;
  logic [1:0] idx;
  logic [2:0] valid;
  logic [NLANE-1:0][2:0] bv_in, bv_out;

  valid_bits #(.RPE(3)) dut (.clk, .rst_n, .set_en, .clr_en, .idx, .valid, .bv_in, .bv_out);

  logic [2:0] model;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  task automatic op(input logic s, input logic c, input int i);
    @(negedge clk);
    set_en = s; clr_en = c; idx = 2'(i);
    @(negedge clk);
    set_en = 0; clr_en = 0;
    if (c) model[i] = 1'b0;
    else if (s) model[i] = 1'b1;
    check(valid == model, $sformatf("valid %b expected %b", valid, model));
    for (int t = 0; t < 4; t++) begin
      bv_in[0] = 3'($urandom); bv_in[1] = 3'($urandom);
      #1;
      check(bv_out[0] == (bv_in[0] & model) && bv_out[1] == (bv_in[1] & model),
            "bit vectors masked");
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    set_en = 0; clr_en = 0; idx = 0; bv_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    model = '0;
    @(negedge clk);
    check(valid == 3'b000, "empty after reset");
    // deletion example: R0, R1 valid; delete R1
    op(1, 0, 0); op(1, 0, 1);
    check(valid == 3'b011, "R0 R1 valid");
    op(0, 1, 1);
    check(valid == 3'b001, "R1 deleted");
    // insertion example: R0, R1 valid, R2 validated
    op(1, 0, 1);
    op(1, 0, 2);
    check(valid == 3'b111, "R2 validated");
    // clear wins over set in the same cycle
    op(1, 1, 0);
    check(valid == 3'b110, "clear wins");
    for (int t = 0; t < 40; t++) begin
      op(logic'($urandom_range(1)), logic'($urandom_range(1)), $urandom_range(2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
