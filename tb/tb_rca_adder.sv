// tb_rca_adder: self-checking testbench for rca_adder, the ripple carry adder.
//
// Three instances of different widths (2, 13 and 64 bits; 13 does not fill
// the last block of a carry select adder, 2 is smaller than one block) are
// driven with the same operands, truncated to each width, and compared with
// {cout, sum} = a + b + cin computed with wide arithmetic. Exhaustive for
// 2 bits, then corner cases (all ones, alternating bits, carry across every
// block) and random operands with both carry-in values. The design is
// combinational: each vector is applied, 1 ns passes, the outputs are read.
// A watchdog ends the run with a failure if it has not finished in time.
module tb_rca_adder;

  int checks = 0;
  int failures = 0;

  logic [63:0] a, b;
  logic        cin;

  logic [1:0]  s2;   logic c2;
  logic [12:0] s13;  logic c13;
  logic [63:0] s64;  logic c64;

  rca_adder #(.W(2))  dut2  (.a(a[1:0]),  .b(b[1:0]),  .cin(cin), .sum(s2),  .cout(c2));
  rca_adder #(.W(13)) dut13 (.a(a[12:0]), .b(b[12:0]), .cin(cin), .sum(s13), .cout(c13));
  rca_adder #(.W(64)) dut64 (.a(a),       .b(b),       .cin(cin), .sum(s64), .cout(c64));

  task automatic apply(input logic [63:0] ta, input logic [63:0] tb, input logic tc);
    logic [2:0]  r2;
    logic [13:0] r13;
    logic [64:0] r64;
    a = ta; b = tb; cin = tc;
    #1;
    r2  = {1'b0, ta[1:0]}  + {1'b0, tb[1:0]}  + 3'(tc);
    r13 = {1'b0, ta[12:0]} + {1'b0, tb[12:0]} + 14'(tc);
    r64 = {1'b0, ta}       + {1'b0, tb}       + 65'(tc);
    checks += 3;
    if ({c2, s2} != r2) begin
      failures++;
      $display("FAIL W=2  a=%h b=%h cin=%0d got %h exp %h", ta[1:0], tb[1:0], tc, {c2, s2}, r2);
    end
    if ({c13, s13} != r13) begin
      failures++;
      $display("FAIL W=13 a=%h b=%h cin=%0d got %h exp %h", ta[12:0], tb[12:0], tc, {c13, s13}, r13);
    end
    if ({c64, s64} != r64) begin
      failures++;
      $display("FAIL W=64 a=%h b=%h cin=%0d got %h exp %h", ta, tb, tc, {c64, s64}, r64);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog: testbench did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // exhaustive over the 2-bit instance
    for (int i = 0; i < 32; i++)
      apply(64'(i[1:0]), 64'(i[3:2]), i[4]);
    // corner cases
    for (int c = 0; c < 2; c++) begin
      apply('1, '1, c[0]);
      apply('1, '0, c[0]);
      apply('0, '1, c[0]);
      apply('0, '0, c[0]);
      apply({32{2'b01}}, {32{2'b10}}, c[0]);
      apply({32{2'b10}}, {32{2'b01}}, c[0]);
      apply({32{2'b10}}, {32{2'b10}}, c[0]);
      // a carry generated in bit k and propagated all the way up
      for (int k = 0; k < 64; k++)
        apply(~64'(0) >> (63 - k) << (63 - k) | (64'(1) << k), ~(64'(1) << k) | (64'(1) << k), c[0]);
    end
    // single carry injected at the bottom of a string of propagates
    for (int k = 0; k < 64; k++)
      apply(64'(1) << k, (~64'(0)) << k, 1'b0);
    // random
    for (int n = 0; n < 2000; n++)
      apply({$urandom(), $urandom()}, {$urandom(), $urandom()}, 1'($urandom()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
