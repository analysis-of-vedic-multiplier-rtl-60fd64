// tb_vedic_mult: self-checking testbench for vedic_mult.
//
// For every one of the five adder topologies: an 8x8 multiplier is checked
// exhaustively (all 65536 operand pairs), a 32x32 multiplier with corner cases
// and random operands, and a 2x2 multiplier (the recursion's leaf alone)
// exhaustively. Every product must equal a * b computed with wide arithmetic.
module tb_vedic_mult;
  import vedic_pkg::*;

  localparam adder_e KINDS [5] = '{ADD_RCA, ADD_BEC, ADD_RCA_CSA, ADD_SQRT_CSA, ADD_CBL};

  int checks = 0;
  int failures = 0;

  logic [31:0] a, b;
  logic [15:0] p8 [5];
  logic [63:0] p32 [5];
  logic [3:0]  p2 [5];

  for (genvar k = 0; k < 5; k++) begin : g_kind
    vedic_mult #(.N(2),  .ADDER(KINDS[k])) dut2  (.a(a[1:0]), .b(b[1:0]), .p(p2[k]));
    vedic_mult #(.N(8),  .ADDER(KINDS[k])) dut8  (.a(a[7:0]), .b(b[7:0]), .p(p8[k]));
    vedic_mult #(.N(32), .ADDER(KINDS[k])) dut32 (.a(a),      .b(b),      .p(p32[k]));
  end

  task automatic apply(input logic [31:0] ta, input logic [31:0] tb);
    logic [63:0] e32;
    logic [15:0] e8;
    logic [3:0]  e2;
    a = ta; b = tb;
    #1;
    e32 = 64'(ta) * 64'(tb);
    e8  = 16'(ta[7:0]) * 16'(tb[7:0]);
    e2  = 4'(ta[1:0]) * 4'(tb[1:0]);
    for (int k = 0; k < 5; k++) begin
      checks += 3;
      if (p32[k] != e32) begin
        failures++;
        $display("FAIL N=32 kind=%0d %h*%h got %h exp %h", k, ta, tb, p32[k], e32);
      end
      if (p8[k] != e8) begin
        failures++;
        $display("FAIL N=8 kind=%0d %h*%h got %h exp %h", k, ta[7:0], tb[7:0], p8[k], e8);
      end
      if (p2[k] != e2) begin
        failures++;
        $display("FAIL N=2 kind=%0d %h*%h got %h exp %h", k, ta[1:0], tb[1:0], p2[k], e2);
      end
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog: testbench did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // exhaustive over 8 bits; the upper bits walk through other patterns
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        apply({24'($urandom()), 8'(i)}, {24'($urandom()), 8'(j)});
    apply('1, '1);
    apply('1, 32'h1);
    apply(32'h8000_0000, 32'h8000_0000);
    apply(32'hffff_0000, 32'h0000_ffff);
    for (int n = 0; n < 3000; n++)
      apply($urandom(), $urandom());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
