// tb_or_encoder: self-checking test of the OR encoder.
//
// (1) Two groups with 3 output bits: the last-cell words of the OR architecture (group 2
// stores its local address plus 3) combined with zero-extended group-1 words; the
// result must be the global address, out2 = z3, out1 = z1|z4, out0 = z2|z5.
// (2) Four groups with 6 output bits (r4p12 OR): random single hits and misses.
module tb_or_encoder;
  int checks = 0, failures = 0;

  logic [1:0][2:0] za;  logic [2:0] oa;
  logic [3:0][5:0] zb;  logic [5:0] ob;

  or_encoder #(.G(2), .OUT_W(3)) u_a (.z(za), .vout(oa));
  or_encoder #(.G(4), .OUT_W(6)) u_b (.z(zb), .vout(ob));

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
    // Group 1 local addresses 0..3 (2 bits), group 2 stores 0 or 4..6 (3 bits).
    for (int a = 0; a < 4; a++) begin
      for (int b = 0; b < 4; b++) begin
        logic z1, z2, z3, z4, z5;
        if (a != 0 && b != 0) continue;
        {z1, z2} = 2'(a);
        {z3, z4, z5} = (b == 0) ? 3'd0 : 3'(b + 3);
        za[0] = {1'b0, z1, z2};
        za[1] = {z3, z4, z5};
        #1;
        check(oa, {z3, z1 | z4, z2 | z5}, "OR equations");
        check(oa, (a != 0) ? a : (b != 0) ? b + 3 : 0, "OR global address");
      end
    end
    for (int t = 0; t < 2000; t++) begin
      int g, val;
      zb = '0;
      g = $urandom_range(0, 3);
      val = $urandom_range(1, 15);
      if (t % 8 != 0) zb[g] = 6'(val + 15 * g);
      #1;
      check(ob, (t % 8 != 0) ? val + 15 * g : 0, "r4p12 OR");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
