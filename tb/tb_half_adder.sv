// tb_half_adder: exhaustive self-checking testbench for half_adder.
// All four input pairs are applied; {cout, sum} must equal a + b.
module tb_half_adder;

  int checks = 0;
  int failures = 0;
  logic a, b, sum, cout;

  half_adder dut (.a(a), .b(b), .sum(sum), .cout(cout));

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog: testbench did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      a = i[0]; b = i[1];
      #1;
      checks++;
      if ({cout, sum} != 2'(i[0]) + 2'(i[1])) begin
        failures++;
        $display("FAIL a=%0d b=%0d got cout=%0d sum=%0d", a, b, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
