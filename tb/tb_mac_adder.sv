// tb_mac_adder: self-checking test of the accumulate adder. The 129-bit sum
// of a 128-bit product and a 129-bit accumulator value is compared with a
// reference built from 32-bit limbs and explicit carries, including carries
// into bit 128 and wrap-around past 129 bits.
module tb_mac_adder;
  localparam int PW = 128, AW = 129;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [PW-1:0] prod;
  logic [AW-1:0] acc, sum;
  int checks = 0, failures = 0;

  mac_adder dut (.prod(prod), .acc(acc), .sum(sum));

  function automatic logic [AW-1:0] ref_add(input logic [PW-1:0] x, input logic [AW-1:0] y);
    logic [AW-1:0] r;
    logic [32:0]   part;
    logic          cy = 1'b0;
    for (int i = 0; i < PW / 32; i++) begin
      part = {1'b0, x[32*i +: 32]} + {1'b0, y[32*i +: 32]} + 33'(cy);
      r[32*i +: 32] = part[31:0];
      cy = part[32];
    end
    r[AW-1] = y[AW-1] ^ cy;
    return r;
  endfunction

  task automatic check;
    #1;
    checks++;
    if (sum !== ref_add(prod, acc)) begin
      failures++;
      $display("FAIL prod=%h acc=%h got %h exp %h", prod, acc, sum, ref_add(prod, acc));
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
    prod = '0; acc = '0; check();
    prod = '1; acc = 1;  check();              // carry into bit 128
    prod = '1; acc = '1; check();              // wraps past 129 bits
    prod = 60; acc = 0;  check();
    for (int t = 0; t < 2000; t++) begin
      @(posedge clk);
      prod = {$urandom(), $urandom(), $urandom(), $urandom()};
      acc  = {1'($urandom()), $urandom(), $urandom(), $urandom(), $urandom()};
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
