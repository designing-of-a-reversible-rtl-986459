// tb_b_cell: exhaustive check of the add / subtract / skip cell.
// For all 32 input patterns it checks z and cout against integer
// arithmetic (a+b+c for add, a-b-c with borrow for subtract, z = a for
// skip), the pass-through outputs, and parity preservation of the whole
// cell including its seven garbage outputs.
module tb_b_cell;
  logic a, b, c, h, d, b_out, h_out, d_out, z, cout;
  logic [6:0] g;
  int checks = 0, failures = 0;

  b_cell dut (.*);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int res;
    logic exp_z, exp_c;
    for (int v = 0; v < 32; v++) begin
      {h, d, a, b, c} = 5'(v);
      #1;
      if (h && !d) begin
        res   = int'(a) + int'(b) + int'(c);
        exp_z = res[0];
        exp_c = res[1];
      end else if (h && d) begin
        res   = int'(a) - int'(b) - int'(c);   // -2 .. 1
        exp_z = res[0];
        exp_c = (res < 0);                     // borrow
      end else begin
        exp_z = a;
        exp_c = cout;                          // carry unused on skip
      end
      checks++;
      if (z !== exp_z) begin
        failures++;
        $display("FAIL h=%b d=%b a=%b b=%b c=%b z=%b exp=%b", h, d, a, b, c, z, exp_z);
      end
      checks++;
      if (cout !== exp_c) begin
        failures++;
        $display("FAIL h=%b d=%b a=%b b=%b c=%b cout=%b exp=%b", h, d, a, b, c, cout, exp_c);
      end
      checks++;
      if ({b_out, h_out, d_out} !== {b, h, d}) begin
        failures++;
        $display("FAIL pass-through %b", {b_out, h_out, d_out});
      end
      checks++;
      if ((^{b_out, h_out, d_out, z, cout, g}) !== (^{a, b, c, h, d})) begin
        failures++;
        $display("FAIL parity in=%b", 5'(v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
