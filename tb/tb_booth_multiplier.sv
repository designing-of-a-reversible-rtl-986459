// tb_booth_multiplier: end-to-end test of the multiplier at its default
// size (N = 16, no parameter override).
//
// Applies the worked example -3 x 2, the corner operands (0, +-1, the most
// positive and most negative values, alternating patterns) in every
// combination, and then random operand pairs.  The expected product is the
// signed integer product of the operands reduced modulo 2^(2N-1).  It also
// checks that the multiplicand bits leaving the last row are y's low bits
// and that the garbage bus is as wide as the closed-form garbage count.
// The Booth operation of every row (add, subtract, skip) is worked out from
// the multiplier bits, and each of them, a negative multiplicand (sign
// extension), a negative product and the one wrapping pair must each occur.
module tb_booth_multiplier;
  import booth_pkg::*;

  localparam int unsigned N  = 16;
  localparam int unsigned PW = 2*N - 1;
  localparam int unsigned NUM_RANDOM = 20000;

  logic [N-1:0]                  x, y;
  logic [PW-1:0]                 p;
  logic [garbage_outputs(N)-1:0] garbage;
  logic [N-2:0]                  y_out;

  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0, n_skip = 0, n_neg_y = 0, n_neg_p = 0, n_wrap = 0;

  booth_multiplier dut (.*);

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [N-1:0] xv, input logic [N-1:0] yv);
    longint xs, ys, prod;
    logic [PW-1:0] exp_p;
    logic prev;
    x = xv;
    y = yv;
    #1;
    xs    = longint'($signed(xv));
    ys    = longint'($signed(yv));
    prod  = xs * ys;
    exp_p = PW'(prod);
    checks++;
    if (p !== exp_p) begin
      failures++;
      if (failures < 10)
        $display("FAIL x=%0d y=%0d p=%h exp=%h", xs, ys, p, exp_p);
    end
    checks++;
    if (y_out !== yv[N-2:0]) begin
      failures++;
      if (failures < 10) $display("FAIL y_out=%h y=%h", y_out, yv);
    end
    // mechanisms
    prev = 1'b0;
    for (int i = 0; i < N; i++) begin
      case ({xv[i], prev})
        2'b01:   n_add++;
        2'b10:   n_sub++;
        default: n_skip++;
      endcase
      prev = xv[i];
    end
    if (ys < 0) n_neg_y++;
    if (prod < 0) n_neg_p++;
    if (prod == (longint'(1) << (PW-1))) n_wrap++;
  endtask

  initial begin
    logic [N-1:0] corners [8];
    corners[0] = '0;
    corners[1] = N'(1);
    corners[2] = '1;                       // -1
    corners[3] = {1'b0, {(N-1){1'b1}}};    // most positive
    corners[4] = {1'b1, {(N-1){1'b0}}};    // most negative
    corners[5] = {(N/2){2'b01}};
    corners[6] = {(N/2){2'b10}};
    corners[7] = N'(3);

    checks++;
    if ($bits(garbage) != 2647) begin      // 16-bit garbage count
      failures++;
      $display("FAIL garbage width %0d", $bits(garbage));
    end

    // worked example: -3 x 2 = -6
    apply(-N'(3), N'(2));
    checks++;
    if ($signed(p) !== PW'(-6)) begin
      failures++;
      $display("FAIL example -3*2 gave %0d", $signed(p));
    end

    foreach (corners[i])
      foreach (corners[j])
        apply(corners[i], corners[j]);

    for (int t = 0; t < NUM_RANDOM; t++)
      apply(N'($urandom), N'($urandom));

    $display("rows: add=%0d subtract=%0d skip=%0d; negative y=%0d negative p=%0d wrap=%0d",
             n_add, n_sub, n_skip, n_neg_y, n_neg_p, n_wrap);
    if (n_add == 0)   begin failures++; $display("FAIL no add row");        end
    if (n_sub == 0)   begin failures++; $display("FAIL no subtract row");   end
    if (n_skip == 0)  begin failures++; $display("FAIL no skip row");       end
    if (n_neg_y == 0) begin failures++; $display("FAIL no negative y");     end
    if (n_neg_p == 0) begin failures++; $display("FAIL no negative p");     end
    if (n_wrap == 0)  begin failures++; $display("FAIL wrap pair not hit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
