// tb_parity_gen: exhaustive check of the parity generator.
//
// Two instances, 8 and 5 bits wide, are driven with every input value and
// compared with a parity computed by counting ones.
module tb_parity_gen;
  int checks = 0, failures = 0;

  logic [7:0] bv8;
  logic [4:0] bv5;
  logic       par8, par5;

  parity_gen #(.W(8)) dut8 (.bv(bv8), .par(par8));
  parity_gen #(.W(5)) dut5 (.bv(bv5), .par(par5));

  function automatic logic ones_odd(input logic [31:0] v, input int w);
    int n = 0;
    for (int i = 0; i < w; i++) if (v[i]) n++;
    return logic'(n % 2);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      bv8 = 8'(v);
      bv5 = 5'(v);
      #1;
      checks++;
      if (par8 !== ones_odd(32'(v), 8)) begin
        failures++;
        $display("FAIL W=8 bv=%b par=%b", bv8, par8);
      end
      if (v < 32) begin
        checks++;
        if (par5 !== ones_odd(32'(v), 5)) begin
          failures++;
          $display("FAIL W=5 bv=%b par=%b", bv5, par5);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
