// tb_c_cell: exhaustive check of the Booth recoding cell.
// For each multiplier bit pair it checks the Booth operation the controls
// select (01 add, 10 subtract, 00 and 11 skip), that the garbage outputs
// are the MIG gate's leftovers, and that the cell preserves parity.
module tb_c_cell;
  logic xi, xim1, h, d;
  logic [1:0] g;
  int checks = 0, failures = 0;

  c_cell dut (.*);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int booth_digit;   // x_(i-1) - x_i : +1 add, -1 subtract, 0 skip
    for (int v = 0; v < 4; v++) begin
      {xi, xim1} = 2'(v);
      #1;
      booth_digit = int'(xim1) - int'(xi);
      checks++;
      if (h !== (booth_digit != 0)) begin
        failures++;
        $display("FAIL pair=%b h=%b", {xi, xim1}, h);
      end
      checks++;
      if (booth_digit != 0 && d !== (booth_digit < 0)) begin
        failures++;
        $display("FAIL pair=%b d=%b", {xi, xim1}, d);
      end
      checks++;
      if (g !== {xi & xim1, xi}) begin
        failures++;
        $display("FAIL pair=%b garbage=%b", {xi, xim1}, g);
      end
      // constant inputs are 0, so input parity is xi ^ xim1
      checks++;
      if ((^{g, h, d}) !== (xi ^ xim1)) begin
        failures++;
        $display("FAIL parity pair=%b", {xi, xim1});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
