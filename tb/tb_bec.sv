// tb_bec: exhaustive self-checking testbench for bec, the Binary to Excess-1
// Converter. Instances of 1, 5 and 9 bits get every input value; the output
// must be the input plus one, modulo 2^W.
module tb_bec;

  int checks = 0;
  int failures = 0;
  logic [8:0] b;
  logic [0:0] x1;
  logic [4:0] x5;
  logic [8:0] x9;

  bec #(.W(1)) dut1 (.b(b[0:0]), .x(x1));
  bec #(.W(5)) dut5 (.b(b[4:0]), .x(x5));
  bec #(.W(9)) dut9 (.b(b),      .x(x9));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog: testbench did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      b = 9'(i);
      #1;
      checks += 3;
      if (x1 != 1'(i + 1)) begin failures++; $display("FAIL W=1 b=%0d x=%0d", i[0], x1); end
      if (x5 != 5'(i + 1)) begin failures++; $display("FAIL W=5 b=%0d x=%0d", i[4:0], x5); end
      if (x9 != 9'(i + 1)) begin failures++; $display("FAIL W=9 b=%0d x=%0d", i, x9); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
