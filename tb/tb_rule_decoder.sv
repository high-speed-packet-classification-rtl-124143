// tb_rule_decoder: checks the bit-vector writes of the rule decoder.
//
// For S = 2 every ternary string over two digits (value/wildcard pairs) is
// decoded into a rule slot; the four single-bit writes are captured and
// compared with a digit-by-digit match computed here. The example of
// rewriting a rule to "1*" must give the bits 0,0,1,1 for addresses
// 00,01,10,11. The decoder must take exactly 2^S cycles, assert done with
// the last write, and ignore a start while busy. A second instance with
// S = 3 is checked the same way over random strings.
module tb_rule_decoder;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // S = 2, 4 rules
  logic       start2, wr_en2, wr_bit2, busy2, done2;
  logic [1:0] rule2, wr_rule2, value2, wc2, wr_addr2;
  rule_decoder #(.S(2), .RPE(4)) dut2 (
    .clk, .rst_n, .start(start2), .rule(rule2), .value(value2), .wc(wc2),
    .wr_en(wr_en2), .wr_addr(wr_addr2), .wr_rule(wr_rule2), .wr_bit(wr_bit2),
    .busy(busy2), .done(done2));

  // S = 3, 1 rule
  logic       start3, wr_en3, wr_bit3, busy3, done3;
  logic [0:0] rule3, wr_rule3;
  logic [2:0] value3, wc3, wr_addr3;
  rule_decoder #(.S(3), .RPE(1)) dut3 (
    .clk, .rst_n, .start(start3), .rule(rule3), .value(value3), .wc(wc3),
    .wr_en(wr_en3), .wr_addr(wr_addr3), .wr_rule(wr_rule3), .wr_bit(wr_bit3),
    .busy(busy3), .done(done3));

  function automatic logic ref_match(input int k, input int v, input int w, input int s);
    for (int b = 0; b < s; b++)
      if (!w[b] && (k[b] != v[b])) return 1'b0;
    return 1'b1;
  endfunction

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  // run one update on dut2 and compare every write; returns written bits
  task automatic run2(input int r, input logic [1:0] v, input logic [1:0] w, output logic [3:0] bits);
    int nwr = 0;
    logic [3:0] seen = '0;
    bits = '0;
    @(negedge clk);
    start2 = 1; rule2 = 2'(r); value2 = v; wc2 = w;
    @(negedge clk);
    start2 = 0; value2 = ~value2; wc2 = ~wc2;   // must have been latched
    for (int c = 0; c < 8 && busy2; c++) begin
      check(wr_en2, "wr_en while busy");
      check(wr_rule2 == 2'(r), "write goes to the rule slot");
      check(wr_bit2 == ref_match(int'(wr_addr2), int'(v), int'(w), 2),
            $sformatf("bit for k=%0d v=%0d w=%0d", wr_addr2, v, w));
      bits[wr_addr2] = wr_bit2;
      seen[wr_addr2] = 1'b1;
      nwr++;
      check(done2 == (nwr == 4), "done with the last write");
      if (c == 1) begin
        start2 = 1; rule2 = 2'(r + 1);       // start while busy: ignored
      end
      @(negedge clk);
      start2 = 0;
    end
    check(nwr == 4, $sformatf("2^S writes, got %0d", nwr));
    check(seen == 4'hF, "every address written");
    check(!wr_en2 && !busy2, "idle after 2^S cycles");
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] bits;
    start2 = 0; rule2 = 0; value2 = 0; wc2 = 0;
    start3 = 0; rule3 = 0; value3 = 0; wc3 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // the "1*" example: value 10, wildcard 01
    run2(2, 2'b10, 2'b01, bits);
    check(bits == 4'b1100, $sformatf("\"1*\" gives addresses 10,11 = 1, got %b", bits));
    // "11" -> only address 11; "**" -> all ones; "0*" -> 00,01
    run2(0, 2'b11, 2'b00, bits);
    check(bits == 4'b1000, "\"11\"");
    run2(1, 2'b00, 2'b11, bits);
    check(bits == 4'b1111, "\"**\"");
    run2(3, 2'b00, 2'b01, bits);
    check(bits == 4'b0011, "\"0*\"");
    // every value / wildcard pair
    for (int v = 0; v < 4; v++)
      for (int w = 0; w < 4; w++) run2(v, 2'(v), 2'(w), bits);

    // S = 3 instance, random ternary strings
    for (int t = 0; t < 20; t++) begin
      int v, w, nwr;
      v = $urandom_range(7); w = $urandom_range(7); nwr = 0;
      @(negedge clk);
      start3 = 1; value3 = 3'(v); wc3 = 3'(w);
      @(negedge clk);
      start3 = 0;
      while (busy3 && nwr < 16) begin
        check(wr_bit3 == ref_match(int'(wr_addr3), v, w, 3), "S=3 bit");
        check(int'(wr_addr3) == nwr, "S=3 addresses in order");
        nwr++;
        @(negedge clk);
      end
      check(nwr == 8, $sformatf("S=3 takes 8 cycles, got %0d", nwr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
