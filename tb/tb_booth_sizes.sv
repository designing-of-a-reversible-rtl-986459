// tb_booth_sizes: exhaustive test of the multiplier at the sizes its cost
// figures are given for (2, 4 and 8 bits) and at 3 bits, the size of the
// worked example.
//
// Every operand pair is applied to each instance and the product compared
// with the signed integer product modulo 2^(2n-1).  At 3 bits the pair
// x = 101 (-3), y = 010 (2) must give 11010 (-6).  The garbage bus width of
// each instance is checked against the garbage counts 36, 157 and 651 for
// 2, 4 and 8 bits, and the cost functions against the gate counts and
// quantum costs 22/101, 105/480, 451/2066, 1863/8550 for 2/4/8/16 bits.
module tb_booth_sizes;
  import booth_pkg::*;

  int checks = 0, failures = 0;

  logic [1:0] x2, y2;  logic [2:0]  p2;  logic [garbage_outputs(2)-1:0] g2;  logic [0:0] yo2;
  logic [2:0] x3, y3;  logic [4:0]  p3;  logic [garbage_outputs(3)-1:0] g3;  logic [1:0] yo3;
  logic [3:0] x4, y4;  logic [6:0]  p4;  logic [garbage_outputs(4)-1:0] g4;  logic [2:0] yo4;
  logic [7:0] x8, y8;  logic [14:0] p8;  logic [garbage_outputs(8)-1:0] g8;  logic [6:0] yo8;

  booth_multiplier #(.N(2)) u2 (.x(x2), .y(y2), .p(p2), .garbage(g2), .y_out(yo2));
  booth_multiplier #(.N(3)) u3 (.x(x3), .y(y3), .p(p3), .garbage(g3), .y_out(yo3));
  booth_multiplier #(.N(4)) u4 (.x(x4), .y(y4), .p(p4), .garbage(g4), .y_out(yo4));
  booth_multiplier #(.N(8)) u8 (.x(x8), .y(y8), .p(p8), .garbage(g8), .y_out(yo8));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input longint got, input longint want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  // product reduced modulo 2^w, as an unsigned number
  function automatic longint wrap(input longint v, input int w);
    return v & ((longint'(1) << w) - 1);
  endfunction

  initial begin
    // cost table
    expect_eq("gates n=2", longint'(num_gates(2)), 22);
    expect_eq("gates n=4", longint'(num_gates(4)), 105);
    expect_eq("gates n=8", longint'(num_gates(8)), 451);
    expect_eq("gates n=16", longint'(num_gates(16)), 1863);
    expect_eq("qc n=2", longint'(quantum_cost(2)), 101);
    expect_eq("qc n=4", longint'(quantum_cost(4)), 480);
    expect_eq("qc n=8", longint'(quantum_cost(8)), 2066);
    expect_eq("qc n=16", longint'(quantum_cost(16)), 8550);
    expect_eq("garbage n=2", longint'($bits(g2)), 36);
    expect_eq("garbage n=4", longint'($bits(g4)), 157);
    expect_eq("garbage n=8", longint'($bits(g8)), 651);

    // worked example at 3 bits
    x3 = 3'b101;
    y3 = 3'b010;
    #1;
    expect_eq("example 101 x 010", longint'(p3), longint'(5'b11010));

    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        x8 = 8'(a);  y8 = 8'(b);
        x4 = 4'(a);  y4 = 4'(b);
        x3 = 3'(a);  y3 = 3'(b);
        x2 = 2'(a);  y2 = 2'(b);
        #1;
        expect_eq("n=8", longint'(p8),
                  wrap(longint'($signed(x8)) * longint'($signed(y8)), 15));
        if (a < 16 && b < 16)
          expect_eq("n=4", longint'(p4),
                    wrap(longint'($signed(x4)) * longint'($signed(y4)), 7));
        if (a < 8 && b < 8)
          expect_eq("n=3", longint'(p3),
                    wrap(longint'($signed(x3)) * longint'($signed(y3)), 5));
        if (a < 4 && b < 4)
          expect_eq("n=2", longint'(p2),
                    wrap(longint'($signed(x2)) * longint'($signed(y2)), 3));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
