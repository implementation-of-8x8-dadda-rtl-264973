// Self-checking testbench for comp42_approx1 (approximate Design 1).
// All 32 input states against the reference rules of dadda_ref_pkg, plus the
// error profile against the exact count: carry always equals cin, 12 of the
// 32 results are wrong, and none is off by more than 1.
module tb_comp42_approx1;
  import dadda_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic x1, x2, x3, x4, cin, sum, carry, cout;
  comp42_approx1 dut (.x1, .x2, .x3, .x4, .cin, .sum, .carry, .cout);

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_err, max_ed, ed;
    logic [2:0] exp_o;
    n_err = 0;
    max_ed = 0;
    for (int v = 0; v < 32; v++) begin
      {x1, x2, x3, x4, cin} = 5'(v);
      #1;
      exp_o = ref_c42(1, x1, x2, x3, x4, cin);
      checks++;
      if ({cout, carry, sum} != exp_o) begin
        failures++;
        $display("FAIL x=%0b%0b%0b%0b cin=%0b -> %03b expected %03b", x1, x2, x3, x4, cin,
                 {cout, carry, sum}, exp_o);
      end
      checks++;
      if (carry != cin) begin
        failures++;
        $display("FAIL carry differs from cin");
      end
      ed = (int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(cin))
         - (int'(sum) + 2 * (int'(carry) + int'(cout)));
      if (ed < 0) ed = -ed;
      if (ed != 0) n_err++;
      if (ed > max_ed) max_ed = ed;
    end
    checks++;
    if (n_err != 12 || max_ed != 1) begin
      failures++;
      $display("FAIL error profile: %0d wrong of 32, max distance %0d", n_err, max_ed);
    end
    $display("Design 1: %0d of 32 results wrong, largest error distance %0d", n_err, max_ed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
