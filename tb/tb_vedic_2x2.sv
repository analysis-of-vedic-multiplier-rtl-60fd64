// tb_vedic_2x2: exhaustive self-checking testbench for vedic_2x2.
// All 16 operand pairs are applied; p must equal a * b.
module tb_vedic_2x2;

  int checks = 0;
  int failures = 0;
  logic [1:0] a, b;
  logic [3:0] p;

  vedic_2x2 dut (.a(a), .b(b), .p(p));

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog: testbench did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        a = 2'(i); b = 2'(j);
        #1;
        checks++;
        if (p != 4'(i * j)) begin
          failures++;
          $display("FAIL %0d * %0d: got %0d", i, j, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
