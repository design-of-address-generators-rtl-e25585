// tb_lut_cascade: self-checking test of one LUT cascade.
//
// A 20-input cascade with p=6, r=3 (6 levels, the last cell with 2 primary inputs)
// holds 7 random registered vectors. Its cells are loaded through the write ports in
// 2^p clocks, with contents from ag_tb_pkg::cell_word. Lookups are then streamed one
// per clock: the registered vectors, vectors differing from one of them in a single
// bit (so the mismatch is found at every level), and random vectors. Each result is
// compared with the reference function and must appear exactly S clocks after its input.
// Finally one vector is replaced by reloading the cascade, and lookups are repeated.
module tb_lut_cascade;
  import addr_gen_pkg::*;
  import ag_tb_pkg::*;

  localparam int unsigned N = 20;
  localparam int unsigned P = 6;
  localparam int unsigned R = 3;
  localparam int unsigned S = num_levels(N, P, R);
  localparam int unsigned M = 2 ** R - 1;

  logic                 clk = 1'b0;
  logic                 rst_n;
  logic                 we;
  logic [N-1:0]         x;
  logic                 in_valid;
  logic [S-1:0][R-1:0]  c;
  logic [S-1:0][R-1:0]  d;
  logic [R-1:0]         v;
  logic                 out_valid;

  lut_cascade #(.N(N), .P(P), .R(R), .LAST_W(R)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  vec_t vecs[$];
  bit           exp_valid [int];
  int unsigned  exp_v     [int];

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One clock: check the outputs of this cycle, then apply the next inputs.
  task automatic step(bit valid, vec_t xv);
    @(negedge clk);
    cyc++;
    checks++;
    if (out_valid !== (exp_valid.exists(cyc) ? exp_valid[cyc] : 1'b0)) begin
      failures++;
      $display("FAIL cycle %0d: out_valid=%0b", cyc, out_valid);
    end else if (out_valid && v !== R'(exp_v[cyc])) begin
      failures++;
      $display("FAIL cycle %0d: v=%0d expected %0d", cyc, v, exp_v[cyc]);
    end
    we = 0; in_valid = valid; x = N'(xv);
    if (valid) begin
      exp_valid[cyc + S] = 1'b1;
      exp_v[cyc + S]     = ref_addr(vecs, xv);
    end
  endtask

  task automatic load();
    for (int unsigned t = 0; t < 2 ** P; t++) begin
      @(negedge clk);
      cyc++;
      we = 1; in_valid = 0;
      for (int unsigned j = 0; j < S; j++) begin
        int unsigned aw, xw, off, a;
        aw  = cell_addr_width(N, P, R, j);
        xw  = cell_x_width(N, P, R, j);
        off = cell_x_offset(P, R, j);
        a   = t % (2 ** aw);
        for (int unsigned b = 0; b < xw; b++) x[N-1-off-b] = a[xw-1-b];
        c[j] = R'(a >> xw);
        d[j] = R'(cell_word(N, P, R, j, a, vecs, 0));
      end
    end
  endtask

  task automatic run_lookups(int count);
    for (int i = 0; i < count; i++) begin
      int sel;
      vec_t xv;
      sel = $urandom_range(0, 2);
      xv = vecs[$urandom_range(0, vecs.size() - 1)];
      if (sel == 1) xv[$urandom_range(0, N - 1)] ^= 1'b1;
      if (sel == 2) xv = rand_vec(N);
      step(1'b1, xv);
    end
    for (int i = 0; i < S + 2; i++) step(1'b0, '0);
  endtask

  initial begin
    rst_n = 0; we = 0; x = '0; in_valid = 0; c = '0; d = '0;
    while (vecs.size() < M) begin
      vec_t nv;
      nv = rand_vec(N);
      if (ref_addr(vecs, nv) == 0) vecs.push_back(nv);
    end
    // Two vectors sharing a long prefix, so rails must separate them late.
    vecs[1] = vecs[0] ^ 64'd1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load();
    // Each registered vector once, in order.
    foreach (vecs[i]) step(1'b1, vecs[i]);
    run_lookups(400);
    // Replace vector 3 and reload: the old vector must now miss.
    begin
      vec_t old;
      old = vecs[2];
      do vecs[2] = rand_vec(N); while (ref_addr(vecs, vecs[2]) != 3);
      load();
      step(1'b1, old);
      step(1'b1, vecs[2]);
      checks++;
      if (ref_addr(vecs, old) != 0) begin
        failures++;
        $display("FAIL replacement vector collides");
      end
    end
    run_lookups(200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
