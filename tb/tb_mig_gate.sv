// tb_mig_gate: exhaustive check of the MIG gate.
// Drives all 16 input patterns and compares each output with the gate's
// equations written out bit by bit, checks that input and output parity
// agree, and that no two inputs give the same output (reversibility).
module tb_mig_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  bit [15:0] seen;

  mig_gate dut (.*);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] exp_out;
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      // truth table: p=a, q=a xor b, r=c flipped when a and b, s=d flipped when a and not b
      exp_out[3] = a;
      exp_out[2] = (a != b);
      exp_out[1] = (a && b) ? !c : c;
      exp_out[0] = (a && !b) ? !d : d;
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
