// tb_lmh_gate: exhaustive check of the LMH gate.
// Drives all 16 input patterns and compares the outputs with the gate's
// function (r is a multiplexer a ? b : c, s is r flipped by d), checks
// parity preservation and that the mapping is one-to-one.
module tb_lmh_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  bit [15:0] seen;

  lmh_gate dut (.*);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] exp_out;
    logic m;
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      m = a ? b : c;
      exp_out = {a, b != c, m, m != d};
      checks++;
      if ({p, q, r, s} !== exp_out) begin
        failures++;
        $display("FAIL in=%b out=%b exp=%b", 4'(v), {p, q, r, s}, exp_out);
      end
      checks++;
      if ((^{p, q, r, s}) !== (^4'(v))) begin
        failures++;
        $display("FAIL parity in=%b out=%b", 4'(v), {p, q, r, s});
      end
      checks++;
      if (seen[{p, q, r, s}]) begin
        failures++;
        $display("FAIL output %b repeated", {p, q, r, s});
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
