// tb_accumulator: self-checking test of the 129-bit PIPO accumulator
// register: it must load d on each rising edge, hold its value between
// edges, and clear to zero on an edge while rst is high.
module tb_accumulator;
  localparam int AW = 129;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          rst;
  logic [AW-1:0] d, q, expq;
  int checks = 0, failures = 0;

  accumulator dut (.clk(clk), .rst(rst), .d(d), .q(q));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; d = '1;
    @(posedge clk); #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset: q=%h", q); end
    rst = 1'b0;
    for (int t = 0; t < 1000; t++) begin
      d = {1'($urandom()), $urandom(), $urandom(), $urandom(), $urandom()};
      rst = (t % 97 == 50);
      expq = rst ? '0 : d;
      @(posedge clk); #1;
      checks++;
      if (q !== expq) begin failures++; $display("FAIL t=%0d q=%h exp %h", t, q, expq); end
      d = ~d;                                  // q must not follow d between edges
      #2;
      checks++;
      if (q !== expq) begin failures++; $display("FAIL hold t=%0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
