// tb_mac64bit: end-to-end test of the 64-bit MAC at its full size.
// A reference model keeps the 129-bit running sum of a*b (the * operator on
// zero-extended operands) and is compared with {p_carry, p} after every
// clock edge, which also checks the rate (one MAC accepted per cycle) and
// the latency (the product of operands applied before an edge is in p right
// after it). The stimulus starts with a short run of small operands
// (12*5 = 60, ...), then random operands, runs of all-ones operands that
// push the sum past bit 127 into bit 128 and past 129 bits (wrap-around),
// and resets in the middle of a run. Each of these events is counted and a
// failure is counted for any event that never happened.
module tb_mac64bit;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst;
  logic [63:0]  a, b;
  logic [127:0] p;
  logic         p_carry;

  logic [128:0] model;
  int checks = 0, failures = 0;
  int n_mac = 0, n_reset = 0, n_carry128 = 0, n_wrap = 0;

  mac64bit dut (.clk(clk), .rst(rst), .a(a), .b(b), .p(p), .p_carry(p_carry));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // apply one operand pair (or a reset) for one cycle and check the result
  task automatic step(input logic [63:0] x, input logic [63:0] y, input logic r);
    logic [128:0] nxt;
    logic [129:0] wide;
    a = x; b = y; rst = r;
    wide = {66'b0, x} * {66'b0, y} + {1'b0, model};
    nxt  = wide[128:0];
    if (r) begin
      nxt = '0;
      n_reset++;
    end else begin
      n_mac++;
      if (!model[128] && nxt[128]) n_carry128++;
      if (wide[129]) n_wrap++;
    end
    @(posedge clk);
    #1;
    model = nxt;
    checks++;
    if ({p_carry, p} !== model) begin
      failures++;
      $display("FAIL a=%h b=%h rst=%b got %h expected %h", x, y, r, {p_carry, p}, model);
    end
  endtask

  initial begin
    model = '0;
    a = '0; b = '0; rst = 1'b1;
    @(posedge clk); #1;
    step('0, '0, 1'b1);
    // small operands, as in a short hand-checkable run
    step(64'd12, 64'd5, 1'b0);
    step(64'd10, 64'd2, 1'b0);
    step(64'd5,  64'd2, 1'b0);
    step(64'd10, 64'd3, 1'b0);
    step(64'd0,  64'd9, 1'b0);   // product zero: the sum holds
    // random operands with a reset in the middle
    for (int t = 0; t < 3000; t++) begin
      step({$urandom(), $urandom()}, {$urandom(), $urandom()}, t == 1500);
    end
    // all-ones operands: the sum crosses into bit 128 and then wraps
    step('0, '0, 1'b1);
    for (int t = 0; t < 6; t++) step('1, '1, 1'b0);
    step(64'hFFFF_FFFF_0000_0001, 64'hFFFF_FFFF_FFFF_FFFF, 1'b0);
    step(64'd1, 64'd1, 1'b0);

    $display("events: mac=%0d reset=%0d carry_into_bit128=%0d wrap=%0d",
             n_mac, n_reset, n_carry128, n_wrap);
    if (n_mac == 0)      begin failures++; $display("FAIL no accumulation"); end
    if (n_reset < 2)     begin failures++; $display("FAIL no reset during a run"); end
    if (n_carry128 == 0) begin failures++; $display("FAIL no carry into bit 128"); end
    if (n_wrap == 0)     begin failures++; $display("FAIL no wrap past 129 bits"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
