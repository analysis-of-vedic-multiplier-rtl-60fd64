// tb_vedic_combine: self-checking testbench for vedic_combine, the combining
// stage of the Vedic multiplier.
//
// For every one of the five adder topologies, a 16-bit stage (the size of the
// method's block diagram) and a 4-bit stage (the smallest, whose high adder
// operand has no zero padding) are fed the four sub-products of random and
// corner-case operands. The sub-products are computed here with the * operator
// and the stage's 2N-bit output must equal the full product. The testbench
// also counts how often each carry of the stage is set (adder 1 carry, adder 2
// carry, both, i.e. the half adder's carry) for the 16-bit stage, and fails if
// any of them never happened.
module tb_vedic_combine;
  import vedic_pkg::*;

  localparam adder_e KINDS [5] = '{ADD_RCA, ADD_BEC, ADD_RCA_CSA, ADD_SQRT_CSA, ADD_CBL};

  int checks = 0;
  int failures = 0;
  int n_c1 = 0, n_c2 = 0, n_both = 0;

  logic [15:0] a16, b16;
  logic [3:0]  a4, b4;
  logic [15:0] mm16, ml16, lm16, ll16;
  logic [3:0]  mm4, ml4, lm4, ll4;
  logic [31:0] p16 [5];
  logic [7:0]  p4 [5];

  assign mm16 = 16'(a16[15:8] * b16[15:8]);
  assign ml16 = 16'(a16[15:8] * b16[7:0]);
  assign lm16 = 16'(a16[7:0]  * b16[15:8]);
  assign ll16 = 16'(a16[7:0]  * b16[7:0]);
  assign mm4  = 4'(a4[3:2] * b4[3:2]);
  assign ml4  = 4'(a4[3:2] * b4[1:0]);
  assign lm4  = 4'(a4[1:0] * b4[3:2]);
  assign ll4  = 4'(a4[1:0] * b4[1:0]);

  for (genvar k = 0; k < 5; k++) begin : g_kind
    vedic_combine #(.N(16), .ADDER(KINDS[k])) dut16 (
      .mm(mm16), .ml(ml16), .lm(lm16), .ll(ll16), .p(p16[k])
    );
    vedic_combine #(.N(4), .ADDER(KINDS[k])) dut4 (
      .mm(mm4), .ml(ml4), .lm(lm4), .ll(ll4), .p(p4[k])
    );
  end

  task automatic apply(input logic [15:0] ta, input logic [15:0] tb);
    logic [31:0] e16;
    logic [7:0]  e4;
    logic [16:0] s1, s2;
    a16 = ta; b16 = tb; a4 = ta[3:0]; b4 = tb[3:0];
    #1;
    e16 = 32'(ta) * 32'(tb);
    e4  = 8'(ta[3:0]) * 8'(tb[3:0]);
    for (int k = 0; k < 5; k++) begin
      checks += 2;
      if (p16[k] != e16) begin
        failures++;
        $display("FAIL N=16 kind=%0d %h*%h got %h exp %h", k, ta, tb, p16[k], e16);
      end
      if (p4[k] != e4) begin
        failures++;
        $display("FAIL N=4 kind=%0d %h*%h got %h exp %h", k, ta[3:0], tb[3:0], p4[k], e4);
      end
    end
    // carries of the 16-bit stage, worked out from the sub-products
    s1 = 17'(ml16) + 17'(lm16);
    s2 = 17'({mm16[7:0], ll16[15:8]}) + 17'(s1[15:0]);
    if (s1[16]) n_c1++;
    if (s2[16]) n_c2++;
    if (s1[16] && s2[16]) n_both++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog: testbench did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, '0);
    apply('1, '1);
    apply('1, 16'h0001);
    apply(16'h8000, 16'h8000);
    for (int i = 0; i < 256; i++)
      apply(16'(i) | 16'hff00, 16'(~i));
    for (int n = 0; n < 5000; n++)
      apply(16'($urandom()), 16'($urandom()));
    $display("stage carries: adder1=%0d adder2=%0d both=%0d", n_c1, n_c2, n_both);
    if (n_c1 == 0 || n_c2 == 0 || n_both == 0) begin
      failures++;
      $display("FAIL a carry of the combining stage was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
