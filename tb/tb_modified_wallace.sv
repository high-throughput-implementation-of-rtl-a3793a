// tb_modified_wallace: self-checking test of the 32x32 Wallace-tree
// multiplier against the * operator, for corner cases (zero, one, all ones,
// single bits) and random operands.
module tb_modified_wallace;
  localparam int N = 32;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] prod;
  int checks = 0, failures = 0;

  modified_wallace dut (.a(a), .b(b), .prod(prod));

  task automatic check;
    logic [2*N-1:0] exp_p;
    #1;
    exp_p = {{N{1'b0}}, a} * {{N{1'b0}}, b};
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
    a = 1;  b = '1; check();
    for (int i = 0; i < N; i++) begin
      a = '1; b = N'(1) << i; check();
      a = N'(1) << i; b = '1; check();
    end
    for (int t = 0; t < 5000; t++) begin
      @(posedge clk);
      a = $urandom(); b = $urandom();
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
