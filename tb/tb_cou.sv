// Test of the common operations unit: random operands against
// (W + X*coef + Y + Z + 2) >>> alpha computed in 64-bit arithmetic, plus
// the design's DC and plane uses of F (eqs. 6, 12 and 13).
module tb_cou;
  import intra_pkg::*;

  cou_t w, x, y, z, f;
  logic [2:0] alpha;
  logic mul_en;
  coef_t coef;
  int checks = 0, failures = 0;

  cou dut (.*);

  function automatic longint model(longint a, longint b, longint c, longint d,
                                   int sh, bit me, longint k);
    longint s;
    s = a + (me ? b * k : b) + c + d + 2;
    return s >>> sh;
  endfunction

  task automatic chk(longint exp, string what);
    #1;
    checks++;
    if (longint'(f) != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, f, exp);
    end
  endtask

  initial begin
    // luma 4x4 DC, eq. (6): F(F(P0..P3,0), F(P16..P19,0), 0, -2, 3)
    begin
      longint s0, s1;
      w = 22'd200; x = 22'd100; y = 22'd50; z = 22'd31; alpha = 3'd0; mul_en = 1'b0; coef = '0;
      chk(383, "F(P0..P3,0)");
      s0 = longint'(f);
      w = 22'd17; x = 22'd255; y = 22'd0; z = 22'd9;
      chk(283, "F(P16..P19,0)");
      s1 = longint'(f);
      w = cou_t'(s0); x = cou_t'(s1); y = '0; z = -cou_t'(2); alpha = 3'd3;
      chk((381 + 281 + 4) >> 3, "DC F(R0,R1,0,-2,3)");
    end
    // plane difference, eq. (12): F(P(8+i), ~P(6-i), 1, -2, 0) = P(8+i) - P(6-i)
    w = 22'd40; x = ~cou_t'(22'd200); y = 22'd1; z = -cou_t'(2); alpha = 3'd0;
    chk(-160, "difference");
    // eq. (13): B = F(5*H, 0, 0, 30, 6) with the multiplier on X
    w = '0; x = -cou_t'(1234); y = '0; z = 22'd30; alpha = 3'd6; mul_en = 1'b1; coef = 7'sd5;
    chk((-1234 * 5 + 32) >>> 6, "B");
    for (int n = 0; n < 3000; n++) begin
      w = cou_t'($signed($urandom_range(0, 40000)) - 20000);
      x = cou_t'($signed($urandom_range(0, 20000)) - 10000);
      y = cou_t'($signed($urandom_range(0, 40000)) - 20000);
      z = cou_t'($signed($urandom_range(0, 400)) - 200);
      alpha = 3'($urandom_range(0, 6));
      mul_en = 1'($urandom_range(0, 1));
      coef = coef_t'($signed($urandom_range(0, 40)) - 7);
      chk(model(longint'(w), longint'(x), longint'(y), longint'(z), int'(alpha), mul_en, longint'(coef)),
          "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
