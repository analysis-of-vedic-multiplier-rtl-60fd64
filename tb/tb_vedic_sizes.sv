// tb_vedic_sizes: the multiplier at the other sizes of the comparison.
//
// The comparison covers 8, 16, 32 and 64-bit multipliers, each built with the
// five adder topologies. The 64-bit one is tested by tb_vedic_top; this
// testbench instantiates vedic_top with N = 8, 16 and 32 and checks all five
// products of each against a * b: exhaustively for 8 bits, and with corner
// cases and random operands for 16 and 32 bits. The design is combinational;
// each operand pair is applied, 1 time unit passes, the products are read.
module tb_vedic_sizes;

  int checks = 0;
  int failures = 0;

  logic [31:0] a, b;
  logic [15:0] p8  [5];
  logic [31:0] p16 [5];
  logic [63:0] p32 [5];

  vedic_top #(.N(8)) dut8 (
    .a(a[7:0]), .b(b[7:0]),
    .p_rca(p8[0]), .p_bec(p8[1]), .p_csa(p8[2]), .p_sqrt(p8[3]), .p_cbl(p8[4])
  );
  vedic_top #(.N(16)) dut16 (
    .a(a[15:0]), .b(b[15:0]),
    .p_rca(p16[0]), .p_bec(p16[1]), .p_csa(p16[2]), .p_sqrt(p16[3]), .p_cbl(p16[4])
  );
  vedic_top #(.N(32)) dut32 (
    .a(a), .b(b),
    .p_rca(p32[0]), .p_bec(p32[1]), .p_csa(p32[2]), .p_sqrt(p32[3]), .p_cbl(p32[4])
  );

  task automatic apply(input logic [31:0] ta, input logic [31:0] tb);
    logic [15:0] e8;
    logic [31:0] e16;
    logic [63:0] e32;
    a = ta; b = tb;
    #1;
    e8  = 16'(ta[7:0])  * 16'(tb[7:0]);
    e16 = 32'(ta[15:0]) * 32'(tb[15:0]);
    e32 = 64'(ta)       * 64'(tb);
    for (int k = 0; k < 5; k++) begin
      checks += 3;
      if (p8[k] != e8) begin
        failures++;
        $display("FAIL N=8 variant %0d: %h*%h got %h exp %h", k, ta[7:0], tb[7:0], p8[k], e8);
      end
      if (p16[k] != e16) begin
        failures++;
        $display("FAIL N=16 variant %0d: %h*%h got %h exp %h", k, ta[15:0], tb[15:0], p16[k], e16);
      end
      if (p32[k] != e32) begin
        failures++;
        $display("FAIL N=32 variant %0d: %h*%h got %h exp %h", k, ta, tb, p32[k], e32);
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
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        apply({24'($urandom()), 8'(i)}, {24'($urandom()), 8'(j)});
    apply('1, '1);
    apply('0, '1);
    apply(32'h8000_8000, 32'hffff_ffff);
    apply(32'h0000_ffff, 32'hffff_0000);
    for (int n = 0; n < 5000; n++)
      apply($urandom(), $urandom());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
