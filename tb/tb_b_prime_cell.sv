// tb_b_prime_cell: exhaustive check of the row-end cell.
// For all 32 input patterns z must be the low bit of a+b+c (add),
// a-b-c (subtract) or a (skip), and the XOR of z and the five garbage
// outputs must equal the XOR of the five inputs.
module tb_b_prime_cell;
  logic a, b, c, h, d, z;
  logic [4:0] g;
  int checks = 0, failures = 0;

  b_prime_cell dut (.*);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int res;
    for (int v = 0; v < 32; v++) begin
      {h, d, a, b, c} = 5'(v);
      #1;
      if (!h)     res = int'(a);
      else if (d) res = int'(a) - int'(b) - int'(c);
      else        res = int'(a) + int'(b) + int'(c);
      checks++;
      if (z !== res[0]) begin
        failures++;
        $display("FAIL h=%b d=%b a=%b b=%b c=%b z=%b exp=%b", h, d, a, b, c, z, res[0]);
      end
      checks++;
      if ((^{z, g}) !== (^{a, b, c, h, d})) begin
        failures++;
        $display("FAIL parity in=%b", 5'(v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
