// Self-checking testbench for half_adder: all four input pairs, checked
// against a + b = sum + 2*carry.
module tb_half_adder;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic a, b, sum, carry;
  half_adder dut (.a, .b, .sum, .carry);

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (int'(a) + int'(b) != int'(sum) + 2 * int'(carry)) begin
        failures++;
        $display("FAIL a=%0b b=%0b -> sum=%0b carry=%0b", a, b, sum, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
