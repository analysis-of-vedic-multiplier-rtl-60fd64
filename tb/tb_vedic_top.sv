// tb_vedic_top: end-to-end testbench of the five-variant Vedic multiplier at
// its default size, 64 x 64 bits.
//
// Operands are corner cases (zero, one, all ones, single high bits, halves of
// ones), a vector that sets both carries of the top combining stage, and
// random operands, some with all-ones halves. All five products (RCA, BEC,
// RCA-CSA, SQRT-CSA and CBL adders) must equal a * b computed with 128-bit
// arithmetic. For the top-level combining stage the testbench works out from
// the operands how often the crosswise adder carries out, how often the
// middle adder carries out, and how often both do (the half adder's carry
// reaching the top adder); a case that never happened counts as a failure.
// The design is combinational: 1 ns after each operand change the products
// are compared. A watchdog fails the run if it does not finish.
module tb_vedic_top;

  localparam int N = 64;
  localparam int H = N / 2;

  int checks = 0;
  int failures = 0;
  int n_c1 = 0, n_c2 = 0, n_both = 0, n_none = 0;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p [5];

  vedic_top dut (
    .a(a), .b(b),
    .p_rca(p[0]), .p_bec(p[1]), .p_csa(p[2]), .p_sqrt(p[3]), .p_cbl(p[4])
  );

  task automatic apply(input logic [N-1:0] ta, input logic [N-1:0] tb);
    logic [2*N-1:0] e;
    logic [N:0]     s1, s2;
    logic [N-1:0]   mm, ml, lm, ll;
    a = ta; b = tb;
    #1;
    e = (2*N)'(ta) * (2*N)'(tb);
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (p[k] != e) begin
        failures++;
        $display("FAIL variant %0d: %h * %h got %h exp %h", k, ta, tb, p[k], e);
      end
    end
    mm = N'(ta[N-1:H]) * N'(tb[N-1:H]);
    ml = N'(ta[N-1:H]) * N'(tb[H-1:0]);
    lm = N'(ta[H-1:0]) * N'(tb[N-1:H]);
    ll = N'(ta[H-1:0]) * N'(tb[H-1:0]);
    s1 = (N+1)'(ml) + (N+1)'(lm);
    s2 = (N+1)'({mm[H-1:0], ll[N-1:H]}) + (N+1)'(s1[N-1:0]);
    if (s1[N]) n_c1++;
    if (s2[N]) n_c2++;
    if (s1[N] && s2[N]) n_both++;
    if (!s1[N] && !s2[N]) n_none++;
  endtask

  function automatic logic [N-1:0] rnd();
    return {$urandom(), $urandom()};
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog: testbench did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, '0);
    apply('1, '0);
    apply('1, N'(1));
    apply('1, '1);
    apply({1'b1, {(N-1){1'b0}}}, {1'b1, {(N-1){1'b0}}});
    apply({{H{1'b1}}, {H{1'b0}}}, {{H{1'b0}}, {H{1'b1}}});
    apply(64'hd9ed_17e3_cc0e_95ee, 64'hee52_bdb6_d102_0a15);
    for (int k = 0; k < N; k++)
      apply(N'(1) << k, '1);
    for (int n = 0; n < 3000; n++) begin
      logic [N-1:0] ra, rb;
      ra = rnd();
      rb = rnd();
      if (n % 4 == 1) ra[N-1:H] = '1;
      if (n % 4 == 2) rb[H-1:0] = '1;
      apply(ra, rb);
    end
    $display("top stage: adder1 carry=%0d adder2 carry=%0d both=%0d neither=%0d",
             n_c1, n_c2, n_both, n_none);
    if (n_c1 == 0 || n_c2 == 0 || n_both == 0 || n_none == 0) begin
      failures++;
      $display("FAIL a carry case of the top combining stage never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
