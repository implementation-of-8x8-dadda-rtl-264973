// Self-checking testbench for full_adder: all eight input triples, checked
// against a + b + c = sum + 2*carry.
module tb_full_adder;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic a, b, c, sum, carry;
  full_adder dut (.a, .b, .c, .sum, .carry);

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (int'(a) + int'(b) + int'(c) != int'(sum) + 2 * int'(carry)) begin
        failures++;
        $display("FAIL abc=%0b%0b%0b -> sum=%0b carry=%0b", a, b, c, sum, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
