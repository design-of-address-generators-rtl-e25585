// tb_multi_lut_cascade_ag: end-to-end test of every published configuration.
//
// Runs ag_harness on the six generators of the evaluation, each with 48 inputs:
// r3p12 (63 vectors, 9 cascades of 5 levels), r4p12 and r4p12 OR (60 vectors,
// 4 cascades of 6 levels), r5p11 and r5p11 OR (62 vectors, 2 cascades of 8 levels) and
// r6p11 (63 vectors, 1 cascade of 9 levels), plus the 6-input worked example with 6
// vectors in both the plain and the OR architecture (2 cascades of 2 levels) and as a
// single cascade with 3 rails (1 cascade of 3 levels reading x1..x4, x5, x6).
// Each harness loads its cascades, streams lookups at one per clock and checks every
// address and its latency of S clocks. Counted mechanisms, each of which must occur:
// RAM loading through the write ports, hits in every cascade, misses, a lookup
// suppressed during a write, a single-group reload, and both output architectures.
module tb_multi_lut_cascade_ag;
  localparam int NH = 9;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [NH-1:0] done;
  int checks_h [NH], failures_h [NH], hits [NH], miss [NH], ghit [NH], blocked [NH],
      reload [NH], writes [NH];
  int or_runs = 0;

  ag_harness #(.N(48), .K(63), .R(3), .P(12), .OR_ARCH(0), .NLOOK(200)) h_r3p12 (
    .clk, .done(done[0]), .checks(checks_h[0]), .failures(failures_h[0]), .n_hits(hits[0]),
    .n_miss(miss[0]), .n_groups_hit(ghit[0]), .n_blocked(blocked[0]), .n_reload(reload[0]),
    .n_writes(writes[0]));
  ag_harness #(.N(48), .K(60), .R(4), .P(12), .OR_ARCH(0), .NLOOK(200)) h_r4p12 (
    .clk, .done(done[1]), .checks(checks_h[1]), .failures(failures_h[1]), .n_hits(hits[1]),
    .n_miss(miss[1]), .n_groups_hit(ghit[1]), .n_blocked(blocked[1]), .n_reload(reload[1]),
    .n_writes(writes[1]));
  ag_harness #(.N(48), .K(60), .R(4), .P(12), .OR_ARCH(1), .NLOOK(200)) h_r4p12or (
    .clk, .done(done[2]), .checks(checks_h[2]), .failures(failures_h[2]), .n_hits(hits[2]),
    .n_miss(miss[2]), .n_groups_hit(ghit[2]), .n_blocked(blocked[2]), .n_reload(reload[2]),
    .n_writes(writes[2]));
  ag_harness #(.N(48), .K(62), .R(5), .P(11), .OR_ARCH(0), .NLOOK(200)) h_r5p11 (
    .clk, .done(done[3]), .checks(checks_h[3]), .failures(failures_h[3]), .n_hits(hits[3]),
    .n_miss(miss[3]), .n_groups_hit(ghit[3]), .n_blocked(blocked[3]), .n_reload(reload[3]),
    .n_writes(writes[3]));
  ag_harness #(.N(48), .K(62), .R(5), .P(11), .OR_ARCH(1), .NLOOK(200)) h_r5p11or (
    .clk, .done(done[4]), .checks(checks_h[4]), .failures(failures_h[4]), .n_hits(hits[4]),
    .n_miss(miss[4]), .n_groups_hit(ghit[4]), .n_blocked(blocked[4]), .n_reload(reload[4]),
    .n_writes(writes[4]));
  ag_harness #(.N(48), .K(63), .R(6), .P(11), .OR_ARCH(0), .NLOOK(200)) h_r6p11 (
    .clk, .done(done[5]), .checks(checks_h[5]), .failures(failures_h[5]), .n_hits(hits[5]),
    .n_miss(miss[5]), .n_groups_hit(ghit[5]), .n_blocked(blocked[5]), .n_reload(reload[5]),
    .n_writes(writes[5]));
  ag_harness #(.N(6), .K(6), .R(2), .P(4), .OR_ARCH(0), .NLOOK(100)) h_ex (
    .clk, .done(done[6]), .checks(checks_h[6]), .failures(failures_h[6]), .n_hits(hits[6]),
    .n_miss(miss[6]), .n_groups_hit(ghit[6]), .n_blocked(blocked[6]), .n_reload(reload[6]),
    .n_writes(writes[6]));
  ag_harness #(.N(6), .K(6), .R(2), .P(4), .OR_ARCH(1), .NLOOK(100)) h_ex_or (
    .clk, .done(done[7]), .checks(checks_h[7]), .failures(failures_h[7]), .n_hits(hits[7]),
    .n_miss(miss[7]), .n_groups_hit(ghit[7]), .n_blocked(blocked[7]), .n_reload(reload[7]),
    .n_writes(writes[7]));

  ag_harness #(.N(6), .K(6), .R(3), .P(4), .OR_ARCH(0), .NLOOK(100)) h_ex_single (
    .clk, .done(done[8]), .checks(checks_h[8]), .failures(failures_h[8]), .n_hits(hits[8]),
    .n_miss(miss[8]), .n_groups_hit(ghit[8]), .n_blocked(blocked[8]), .n_reload(reload[8]),
    .n_writes(writes[8]));

  localparam int GROUPS [NH] = '{9, 4, 4, 2, 2, 1, 2, 2, 1};
  localparam bit IS_OR  [NH] = '{0, 0, 1, 0, 1, 0, 0, 1, 0};

  int checks = 0, failures = 0;

  task automatic need(bit cond, string what, int h);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL harness %0d: %s never happened", h, what);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired, done=%b", done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    wait (&done);
    for (int h = 0; h < NH; h++) begin
      checks   += checks_h[h];
      failures += failures_h[h];
      need(writes[h] > 0, "RAM load", h);
      need(hits[h] > 0, "hit", h);
      need(miss[h] > 0, "miss", h);
      need(ghit[h] == GROUPS[h], "hit in every cascade", h);
      need(blocked[h] > 0, "lookup during write", h);
      need(reload[h] > 0, "single-group reload", h);
      if (IS_OR[h]) or_runs++;
      $display("harness %0d: hits=%0d misses=%0d cascades hit=%0d writes=%0d", h, hits[h],
               miss[h], ghit[h], writes[h]);
    end
    need(or_runs > 0 && or_runs < NH, "both output architectures", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
