// tb_lut_cell: self-checking test of one cascade cell (RAM with lookup/write address mux).
//
// Writes random words at the write address (wr_addr) while rd_addr points elsewhere,
// then reads them back through rd_addr, comparing with a plain array model. Checks the
// one-clock read latency, that a write uses wr_addr and not rd_addr, that a lookup
// uses rd_addr and not wr_addr, and the read-first value during a write.
module tb_lut_cell;
  localparam int unsigned AW = 6;
  localparam int unsigned DW = 5;

  logic          clk = 1'b0;
  logic          we;
  logic [AW-1:0] rd_addr, wr_addr;
  logic [DW-1:0] wdata, q;

  int checks = 0, failures = 0;
  logic [DW-1:0] model [2 ** AW];

  lut_cell #(.ADDR_W(AW), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [DW-1:0] got, logic [DW-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    we = 0; rd_addr = 0; wr_addr = 0; wdata = 0;
    // Fill every word through the write address; rd_addr is held on a different word.
    for (int a = 0; a < 2 ** AW; a++) begin
      @(negedge clk);
      we = 1; wr_addr = AW'(a); rd_addr = AW'(a + 7); wdata = DW'($urandom);
      model[a] = wdata;
    end
    @(negedge clk);
    we = 0;
    // Lookups through rd_addr (wr_addr points elsewhere): one clock latency.
    for (int i = 0; i < 200; i++) begin
      logic [AW-1:0] ra;
      ra = AW'($urandom);
      rd_addr = ra; wr_addr = ~ra;
      @(negedge clk);
      check(q, model[ra], "lookup");
    end
    // Write with read-first output, then read back the new word.
    for (int i = 0; i < 50; i++) begin
      logic [AW-1:0] wa;
      logic [DW-1:0] old;
      wa = AW'($urandom);
      old = model[wa];
      we = 1; wr_addr = wa; rd_addr = ~wa; wdata = DW'($urandom);
      model[wa] = wdata;
      @(negedge clk);
      check(q, old, "read-first during write");
      we = 0; rd_addr = wa; wr_addr = ~wa;
      @(negedge clk);
      check(q, model[wa], "read after write");
      // The word at ~wa must not have been disturbed.
      rd_addr = ~wa;
      @(negedge clk);
      check(q, model[~wa], "neighbour untouched");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
