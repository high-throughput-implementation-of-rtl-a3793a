// tb_pp_gen: self-checking test of partial-product generation. For random
// and corner operands each row i must equal (b[i] ? a : 0) shifted left by i,
// and the rows must add up to a*b (computed with the * operator).
module tb_pp_gen;
  localparam int N = 32;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]          a, b;
  logic [N-1:0][2*N-1:0] pp;
  int checks = 0, failures = 0;

  pp_gen dut (.a(a), .b(b), .pp(pp));

  task automatic check;
    logic [2*N-1:0] tot;
    #1;
    tot = '0;
    for (int i = 0; i < N; i++) begin
      logic [2*N-1:0] exp_row;
      exp_row = b[i] ? ({{N{1'b0}}, a} << i) : '0;
      tot += pp[i];
      checks++;
      if (pp[i] !== exp_row) begin
        failures++;
        $display("FAIL row %0d a=%h b=%h got %h exp %h", i, a, b, pp[i], exp_row);
      end
    end
    checks++;
    if (tot !== {{N{1'b0}}, a} * {{N{1'b0}}, b}) begin
      failures++;
      $display("FAIL sum a=%h b=%h", a, b);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0; check();
    a = '1; b = '1; check();
    a = 32'h8000_0001; b = 32'hAAAA_5555; check();
    for (int t = 0; t < 500; t++) begin
      @(posedge clk);
      a = $urandom(); b = $urandom();
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
