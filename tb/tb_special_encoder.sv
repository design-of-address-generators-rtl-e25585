// tb_special_encoder: self-checking test of the special encoder.
//
// Three instances: (1) two groups of 2 rails, checked exhaustively against the gate
// equations out2 = z3|z4, out1 = z1|z3&z4, out0 = z2|z3&~z4 for every input where at
// most one cascade is non-zero; (2) two groups of 5 rails (the r5p11 encoder),
// exhaustively against "v1 if v1 != 0, else v2+31 if v2 != 0, else 0"; (3) nine groups
// of 3 rails (the r3p12 encoder) with random single-hit and all-zero inputs.
module tb_special_encoder;
  int checks = 0, failures = 0;

  logic [1:0][1:0] va;  logic [2:0] oa;
  logic [1:0][4:0] vb;  logic [5:0] ob;
  logic [8:0][2:0] vc;  logic [5:0] oc;

  special_encoder #(.G(2), .R(2), .OUT_W(3)) u_a (.v(va), .vout(oa));
  special_encoder #(.G(2), .R(5), .OUT_W(6)) u_b (.v(vb), .vout(ob));
  special_encoder #(.G(9), .R(3), .OUT_W(6)) u_c (.v(vc), .vout(oc));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int a = 0; a < 16; a++) begin
      logic z1, z2, z3, z4;
      {z1, z2, z3, z4} = 4'(a);
      if ({z1, z2} != 0 && {z3, z4} != 0) continue;
      va[0] = {z1, z2};
      va[1] = {z3, z4};
      #1;
      check(oa, {z3 | z4, z1 | (z3 & z4), z2 | (z3 & ~z4)}, "example equations");
    end
    for (int a = 0; a < 32; a++) begin
      for (int b = 0; b < 32; b++) begin
        int exp;
        if (a != 0 && b != 0) continue;
        vb[0] = 5'(a);
        vb[1] = 5'(b);
        #1;
        exp = (a != 0) ? a : (b != 0) ? b + 31 : 0;
        check(ob, exp, "r5p11 encoder");
      end
    end
    for (int t = 0; t < 2000; t++) begin
      int g, val;
      vc = '0;
      g = $urandom_range(0, 8);
      val = $urandom_range(0, 7);
      if (t % 10 != 0) vc[g] = 3'(val);
      #1;
      check(oc, (t % 10 != 0 && val != 0) ? val + 7 * g : 0, "r3p12 encoder");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
