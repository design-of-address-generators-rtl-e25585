// tb_k1000_n32: a larger generator, 32 inputs and 1000 registered vectors.
//
// With r = 9 and p = 11 the vectors split into 2 groups of at most 511, each a cascade
// of 12 cells of 2^11 x 9 bits (442 Kbit in all). ag_harness loads both cascades, checks
// every registered vector, streams mixed hits and misses at one per clock with the
// 12-clock latency, suppresses a lookup during a write and reloads one group.
module tb_k1000_n32;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done;
  int checks_h, failures_h, hits, miss, ghit, blocked, reload, writes;
  int checks = 0, failures = 0;

  ag_harness #(.N(32), .K(1000), .R(9), .P(11), .OR_ARCH(0), .NLOOK(1000)) h (
    .clk, .done, .checks(checks_h), .failures(failures_h), .n_hits(hits), .n_miss(miss),
    .n_groups_hit(ghit), .n_blocked(blocked), .n_reload(reload), .n_writes(writes));

  task automatic need(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s never happened", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    wait (done);
    checks   += checks_h;
    failures += failures_h;
    need(writes > 0, "RAM load");
    need(hits > 0, "hit");
    need(miss > 0, "miss");
    need(ghit == 2, "hit in both cascades");
    need(blocked > 0, "lookup during write");
    need(reload > 0, "single-group reload");
    $display("hits=%0d misses=%0d cascades hit=%0d write clocks=%0d", hits, miss, ghit, writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
