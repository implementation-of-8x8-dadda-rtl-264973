// Self-checking testbench for comp42_approx2 (approximate Design 2).
// All 16 input states against the reference rules of dadda_ref_pkg, plus the
// error profile against the exact count: wrong in exactly the four states
// 0000, 1100, 0011 and 1111, each by 1.
module tb_comp42_approx2;
  import dadda_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic x1, x2, x3, x4, sum, carry;
  comp42_approx2 dut (.x1, .x2, .x3, .x4, .sum, .carry);

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ed;
    logic [2:0] exp_o;
    logic wrong_expected;
    for (int v = 0; v < 16; v++) begin
      {x1, x2, x3, x4} = 4'(v);
      #1;
      exp_o = ref_c42(2, x1, x2, x3, x4, 1'b0);
      checks++;
      if ({carry, sum} != exp_o[1:0]) begin
        failures++;
        $display("FAIL x=%04b -> carry=%0b sum=%0b expected %02b", v[3:0], carry, sum, exp_o[1:0]);
      end
      ed = (int'(x1) + int'(x2) + int'(x3) + int'(x4)) - (int'(sum) + 2 * int'(carry));
      wrong_expected = (v == 0) || (v == 4'b1100) || (v == 4'b0011) || (v == 4'b1111);
      checks++;
      if ((ed != 0) != wrong_expected || ed > 1 || ed < -1) begin
        failures++;
        $display("FAIL x=%04b error %0d", v[3:0], ed);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
