// tb_f2g_gate: exhaustive check of the Feynman double gate.
// Drives all 8 input patterns, compares with (a, a xor b, a xor c), checks
// parity preservation and that the mapping is one-to-one.
module tb_f2g_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  bit [7:0] seen;

  f2g_gate dut (.*);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] exp_out;
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      exp_out = {a, a ? !b : b, a ? !c : c};
      checks++;
      if ({p, q, r} !== exp_out) begin
        failures++;
        $display("FAIL in=%b out=%b exp=%b", 3'(v), {p, q, r}, exp_out);
      end
      checks++;
      if ((^{p, q, r}) !== (^3'(v))) begin
        failures++;
        $display("FAIL parity in=%b out=%b", 3'(v), {p, q, r});
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL output %b repeated", {p, q, r});
      end
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
