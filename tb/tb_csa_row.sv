// tb_csa_row: self-checking test of the 3:2 row compressor. For every
// combination of three 4-bit rows (exhaustive) and for random 64-bit rows,
// sum + carry must equal x + y + z modulo 2^W, every sum bit must be the
// parity of its three input bits, and carry bit 0 must be zero.
module tb_csa_row;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]  x4, y4, z4, s4, c4;
  logic [63:0] x, y, z, s, c;
  int checks = 0, failures = 0;

  csa_row #(.W(4)) dut4 (.x(x4), .y(y4), .z(z4), .sum(s4), .carry(c4));
  csa_row          dut  (.x(x),  .y(y),  .z(z),  .sum(s),  .carry(c));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0; y = '0; z = '0;
    for (int i = 0; i < 4096; i++) begin
      {x4, y4, z4} = 12'(i);
      #1;
      checks++;
      if (4'(s4 + c4) !== 4'(x4 + y4 + z4) || s4 !== (x4 ^ y4 ^ z4) || c4[0] !== 1'b0) begin
        failures++;
        $display("FAIL x=%h y=%h z=%h sum=%h carry=%h", x4, y4, z4, s4, c4);
      end
    end
    for (int t = 0; t < 2000; t++) begin
      @(posedge clk);
      x = {$urandom(), $urandom()}; y = {$urandom(), $urandom()}; z = {$urandom(), $urandom()};
      #1;
      checks++;
      if (s + c !== x + y + z || s !== (x ^ y ^ z) || c[0] !== 1'b0) begin
        failures++;
        $display("FAIL x=%h y=%h z=%h", x, y, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
