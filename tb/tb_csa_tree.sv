// tb_csa_tree: self-checking test of the multi-operand carry-save tree.
// Checks, for random and corner-case operand sets, that sum + carry equals
// the sum of all operands modulo 2^W, computed here with a plain loop of
// additions. The default size (32 operands of 64 bits) is used, plus a
// small 7-operand, 12-bit instance that exercises the pass-through rows.
module tb_csa_tree;
  localparam int M  = 32, W  = 64;
  localparam int M2 = 7,  W2 = 12;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [M-1:0][W-1:0]   ops;
  logic [W-1:0]          s, c;
  logic [M2-1:0][W2-1:0] ops2;
  logic [W2-1:0]         s2, c2;
  int checks = 0, failures = 0;

  csa_tree dut (.ops(ops), .sum(s), .carry(c));
  csa_tree #(.M(M2), .W(W2)) dut2 (.ops(ops2), .sum(s2), .carry(c2));

  function automatic logic [W-1:0] ref_sum(input logic [M-1:0][W-1:0] v);
    logic [W-1:0] acc = '0;
    for (int i = 0; i < M; i++) acc += v[i];
    return acc;
  endfunction

  function automatic logic [W2-1:0] ref_sum2(input logic [M2-1:0][W2-1:0] v);
    logic [W2-1:0] acc = '0;
    for (int i = 0; i < M2; i++) acc += v[i];
    return acc;
  endfunction

  task automatic check;
    #1;
    checks++;
    if (s + c !== ref_sum(ops)) begin
      failures++;
      $display("FAIL M=%0d: got %h expected %h", M, s + c, ref_sum(ops));
    end
    checks++;
    if (W2'(s2 + c2) !== ref_sum2(ops2)) begin
      failures++;
      $display("FAIL M=%0d: got %h expected %h", M2, W2'(s2 + c2), ref_sum2(ops2));
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ops = '0; ops2 = '0;
    check();
    ops = '1; ops2 = '1;
    check();
    for (int k = 0; k < M; k++) begin   // one operand at a time
      ops = '0; ops[k] = '1;
      ops2 = '0; ops2[k % M2] = W2'(k + 1);
      check();
    end
    for (int t = 0; t < 2000; t++) begin
      @(posedge clk);
      for (int i = 0; i < M; i++) ops[i] = {$urandom(), $urandom()};
      for (int i = 0; i < M2; i++) ops2[i] = W2'($urandom());
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
