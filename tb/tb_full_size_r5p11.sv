// tb_full_size_r5p11: end-to-end test of the generator at its default size.
//
// The generator is instantiated with all parameters at their defaults: the r5p11
// configuration, 48 inputs, 62 registered vectors, 2 cascades of 8 cells of 2^11 x 5
// bits, plain (special encoder) architecture. The sequence is that of ag_harness:
// load both cascades (2^11 write clocks), look up every registered vector, stream
// mixed hits and misses at one lookup per clock with exact latency checks (8 clocks),
// suppress a lookup during a write, reload one group with a changed vector, repeat.
// Each of these mechanisms must have happened at least once.
module tb_full_size_r5p11;
  // Defaults of multi_lut_cascade_ag, checked against the instance below.
  localparam int unsigned N       = 48;
  localparam int unsigned K       = 62;
  localparam int unsigned R       = 5;
  localparam int unsigned P       = 11;
  localparam bit          OR_ARCH = 1'b0;
  localparam int unsigned NLOOK   = 2000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks, failures, n_hits, n_miss, n_groups_hit, n_blocked, n_reload, n_writes;
  logic done;

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

  import addr_gen_pkg::*;
  import ag_tb_pkg::*;

  localparam int unsigned G     = num_groups(K, R);
  localparam int unsigned S     = num_levels(N, P, R);
  localparam int unsigned OUT_W = out_width(K, R);
  localparam int unsigned D_W   = OR_ARCH ? OUT_W : R;
  localparam int unsigned M     = 2 ** R - 1;

  logic                          rst_n;
  logic [G-1:0]                  we;
  logic [N-1:0]                  x;
  logic                          in_valid;
  logic [G-1:0][S-1:0][R-1:0]    c;
  logic [G-1:0][S-1:0][D_W-1:0]  d;
  logic [OUT_W-1:0]              addr;
  logic                          out_valid;

  multi_lut_cascade_ag dut (.*);

  int cyc = 0;
  vec_t all[$];
  bit          exp_valid [int];
  int unsigned exp_a     [int];
  bit          group_hit [G];

  function automatic vec_t group_vecs_q(int unsigned i, output vec_t q[$]);
    q = {};
    for (int unsigned t = i * M; t < (i + 1) * M && t < K; t++) q.push_back(all[t]);
    return '0;
  endfunction

  // One clock: check this cycle's outputs, then apply the next lookup.
  task automatic step(bit valid, vec_t xv);
    @(negedge clk);
    cyc++;
    checks++;
    if (out_valid !== (exp_valid.exists(cyc) ? exp_valid[cyc] : 1'b0)) begin
      failures++;
      $display("FAIL N%0d K%0d R%0d P%0d OR%0d cycle %0d: out_valid=%0b", N, K, R, P, OR_ARCH,
               cyc, out_valid);
    end else if (out_valid) begin
      if (addr !== OUT_W'(exp_a[cyc])) begin
        failures++;
        $display("FAIL N%0d K%0d R%0d P%0d OR%0d cycle %0d: addr=%0d expected %0d", N, K, R, P,
                 OR_ARCH, cyc, addr, exp_a[cyc]);
      end
      if (exp_a[cyc] != 0) begin
        n_hits++;
        group_hit[(exp_a[cyc] - 1) / M] = 1'b1;
      end else begin
        n_miss++;
      end
    end
    we = '0; in_valid = valid; x = N'(xv);
    if (valid) begin
      exp_valid[cyc + S] = 1'b1;
      exp_a[cyc + S]     = ref_addr(all, xv);
    end
  endtask

  // Write 2^P words into every cell of the cascades selected by mask.
  task automatic load(logic [G-1:0] mask);
    vec_t gv [G][$];
    for (int unsigned i = 0; i < G; i++) void'(group_vecs_q(i, gv[i]));
    for (int unsigned t = 0; t < 2 ** P; t++) begin
      @(negedge clk);
      cyc++;
      we = mask; in_valid = 1'b0;
      for (int unsigned j = 0; j < S; j++) begin
        int unsigned aw, xw, off, a;
        aw  = cell_addr_width(N, P, R, j);
        xw  = cell_x_width(N, P, R, j);
        off = cell_x_offset(P, R, j);
        a   = t % (2 ** aw);
        for (int unsigned b = 0; b < xw; b++) x[N-1-off-b] = a[xw-1-b];
        for (int unsigned i = 0; i < G; i++) begin
          if (mask[i]) begin
            int unsigned offs;
            offs = (OR_ARCH && i > 0) ? i * M : 0;
            c[i][j] = R'(a >> xw);
            d[i][j] = D_W'(cell_word(N, P, R, j, a, gv[i], offs));
          end else begin
            c[i][j] = R'($urandom);
            d[i][j] = D_W'($urandom);
          end
        end
      end
      n_writes++;
    end
  endtask

  task automatic run_lookups(int count);
    for (int i = 0; i < count; i++) begin
      int sel;
      vec_t xv;
      sel = $urandom_range(0, 2);
      xv = all[$urandom_range(0, K - 1)];
      if (sel == 1) xv[$urandom_range(0, N - 1)] ^= 1'b1;
      if (sel == 2) xv = rand_vec(N);
      step(1'b1, xv);
    end
    for (int i = 0; i < S + 2; i++) step(1'b0, '0);
  endtask

  initial begin
    done = 0; checks = 0; failures = 0; n_hits = 0; n_miss = 0; n_groups_hit = 0;
    n_blocked = 0; n_reload = 0; n_writes = 0;
    rst_n = 0; we = '0; x = '0; in_valid = 0; c = '0; d = '0;
    while (all.size() < K) begin
      vec_t nv;
      nv = rand_vec(N);
      if (ref_addr(all, nv) == 0) all.push_back(nv);
    end
    if (K > 1) all[1] = all[0] ^ 64'd1;
    if (K > M + 1) all[M] = all[0] ^ 64'd2;
    checks++;
    if ($bits(dut.x) != N || $bits(dut.addr) != OUT_W || $bits(dut.d) != G * S * D_W) begin
      failures++;
      $display("FAIL instance sizes differ from the r5p11 defaults");
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    load('1);
    foreach (all[i]) step(1'b1, all[i]);
    run_lookups(NLOOK);
    // A lookup applied while a write is in progress must not be reported.
    @(negedge clk);
    cyc++;
    we = '0; we[0] = 1'b1; in_valid = 1'b1;
    c = '0; d = '0; x = '1;  // writes one word of group 1
    for (int unsigned j = 0; j < S; j++) c[0][j] = '1;
    n_blocked++;
    for (int i = 0; i < S + 2; i++) step(1'b0, '0);
    // Restore group 1 (the word written above may have changed its function), then
    // replace one vector of the last group and reload that group only.
    load(G'(1));
    begin
      int unsigned idx;
      vec_t old;
      idx = K - 1;
      old = all[idx];
      do all[idx] = rand_vec(N); while (ref_addr(all, all[idx]) != idx + 1);
      load(G'(1) << (G - 1));
      n_reload++;
      step(1'b1, old);
      step(1'b1, all[idx]);
    end
    foreach (all[i]) step(1'b1, all[i]);
    run_lookups(NLOOK);
    for (int unsigned i = 0; i < G; i++) if (group_hit[i]) n_groups_hit++;
    need(n_writes > 0, "RAM load");
    need(n_hits > 0, "hit");
    need(n_miss > 0, "miss");
    need(n_groups_hit == G, "hit in every cascade");
    need(n_blocked > 0, "lookup during write");
    need(n_reload > 0, "single-group reload");
    $display("hits=%0d misses=%0d cascades hit=%0d write clocks=%0d", n_hits, n_miss,
             n_groups_hit, n_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
