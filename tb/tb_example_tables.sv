// tb_example_tables: the 6-input, 6-vector worked example with hand-derived contents.
//
// The function maps 000001->1, 000101->2, 010101->3, 000111->4, 001011->5,
// 111111->6 (x1 first) and every other input to 0. It is realized with r=2, p=4: two
// cascades of two cells, cell 1 reading x1..x4, cell 2 reading the rails and x5,x6.
// The cell contents are written in their tabular form (not computed by the generic
// content generator): upper cascade cell 1 0000->0, 0001->1, 0101->2, else 3; cell 2
// (rails,x5x6) 0,01->1, 1,01->2, 2,01->3, else 0; lower cascade cell 1 0001->0,
// 0010->1, 1111->2, else 3; cell 2 0,11->1, 1,11->2, 2,11->3, else 0. In the OR
// architecture the lower last cell stores 4, 5, 6 instead of 1, 2, 3.
// Both architectures are loaded in 16 write clocks and then all 64 inputs are looked
// up back to back; each address must match the truth table 2 clocks after its input.
module tb_example_tables;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             rst_n;
  logic [1:0]       we;
  logic [5:0]       x;
  logic             in_valid;
  logic [1:0][1:0][1:0] c;
  logic [1:0][1:0][1:0] d0;   // plain architecture, 2-bit words
  logic [1:0][1:0][2:0] d1;   // OR architecture, 3-bit words
  logic [2:0]       a0, a1;
  logic             ov0, ov1;

  multi_lut_cascade_ag #(.N(6), .K(6), .R(2), .P(4), .OR_ARCH(1'b0)) u_plain (
    .clk, .rst_n, .we, .x, .in_valid, .c, .d(d0), .addr(a0), .out_valid(ov0));
  multi_lut_cascade_ag #(.N(6), .K(6), .R(2), .P(4), .OR_ARCH(1'b1)) u_or (
    .clk, .rst_n, .we, .x, .in_valid, .c, .d(d1), .addr(a1), .out_valid(ov1));

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int truth(logic [5:0] v);
    case (v)
      6'b000001: return 1;
      6'b000101: return 2;
      6'b010101: return 3;
      6'b000111: return 4;
      6'b001011: return 5;
      6'b111111: return 6;
      default:   return 0;
    endcase
  endfunction

  function automatic int upper1(logic [3:0] a);
    case (a)
      4'b0000: return 0;
      4'b0001: return 1;
      4'b0101: return 2;
      default: return 3;
    endcase
  endfunction

  function automatic int lower1(logic [3:0] a);
    case (a)
      4'b0001: return 0;
      4'b0010: return 1;
      4'b1111: return 2;
      default: return 3;
    endcase
  endfunction

  // Last cell: rails r and inputs x5x6; the group's vectors end in key.
  function automatic int last(logic [1:0] r, logic [1:0] x56, logic [1:0] key);
    return (x56 == key && r != 2'd3) ? int'(r) + 1 : 0;
  endfunction

  initial begin
    int exp [int];
    rst_n = 0; we = '0; x = '0; in_valid = 0; c = '0; d0 = '0; d1 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 16; t++) begin
      logic [3:0] a;
      int lo;
      a = 4'(t);
      @(negedge clk);
      we = 2'b11;
      x = {a, a[1:0]};
      c[0][1] = a[3:2];
      c[1][1] = a[3:2];
      d0[0][0] = 2'(upper1(a));
      d0[1][0] = 2'(lower1(a));
      d0[0][1] = 2'(last(a[3:2], a[1:0], 2'b01));
      lo       = last(a[3:2], a[1:0], 2'b11);
      d0[1][1] = 2'(lo);
      d1[0][0] = 3'(upper1(a));
      d1[1][0] = 3'(lower1(a));
      d1[0][1] = 3'(last(a[3:2], a[1:0], 2'b01));
      d1[1][1] = (lo != 0) ? 3'(lo + 3) : 3'd0;
    end
    for (int t = 0; t < 64 + 3; t++) begin
      @(negedge clk);
      if (exp.exists(t)) begin
        checks += 2;
        if (!ov0 || a0 != 3'(exp[t])) begin
          failures++;
          $display("FAIL plain: input %06b addr %0d valid %0b", 6'(t - 2), a0, ov0);
        end
        if (!ov1 || a1 != 3'(exp[t])) begin
          failures++;
          $display("FAIL OR: input %06b addr %0d valid %0b", 6'(t - 2), a1, ov1);
        end
      end
      we = '0;
      in_valid = (t < 64);
      x = 6'(t);
      if (t < 64) exp[t + 2] = truth(6'(t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
