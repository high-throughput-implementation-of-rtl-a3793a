// tb_wallace_mult64: self-checking test of the 64x64 multiplier assembled
// from four 32x32 Wallace multipliers. The 128-bit product is compared with
// the * operator on zero-extended operands, for corner cases that stress the
// combining adders (all ones, carries out of the cross sum) and random data.
module tb_wallace_mult64;
  localparam int W = 64;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0]   a, b;
  logic [2*W-1:0] prod;
  int checks = 0, failures = 0;

  wallace_mult64 dut (.a(a), .b(b), .prod(prod));

  task automatic check;
    logic [2*W-1:0] exp_p;
    #1;
    exp_p = {{W{1'b0}}, a} * {{W{1'b0}}, b};
    checks++;
    if (prod !== exp_p) begin
      failures++;
      $display("FAIL a=%h b=%h got %h exp %h", a, b, prod, exp_p);
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
    a = '0; b = '0; check();
    a = '1; b = '1; check();
    a = 64'hFFFF_FFFF_0000_0000; b = 64'h0000_0000_FFFF_FFFF; check();
    a = 64'hFFFF_FFFF_FFFF_FFFF; b = 64'hFFFF_FFFF_0000_0001; check();
    a = 64'd12; b = 64'd5; check();
    for (int i = 0; i < W; i++) begin
      a = '1; b = W'(1) << i; check();
    end
    for (int t = 0; t < 5000; t++) begin
      @(posedge clk);
      a = {$urandom(), $urandom()}; b = {$urandom(), $urandom()};
      if (t % 4 == 1) a[W-1 -: 16] = '1;   // large operands for cross-sum carries
      if (t % 4 == 2) b[W-1 -: 16] = '1;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
