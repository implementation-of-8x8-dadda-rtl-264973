// Self-checking testbench for comp42_exact.
// All 32 input states: checks x1+x2+x3+x4+cin = sum + 2*(carry+cout), that
// cout does not depend on cin (no rippling chain), and that carry equals cin
// in exactly 24 of the 32 states, the property the approximate Design 1
// builds on.
module tb_comp42_exact;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic x1, x2, x3, x4, cin, sum, carry, cout;
  comp42_exact dut (.x1, .x2, .x3, .x4, .cin, .sum, .carry, .cout);

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int   same_as_cin = 0;
  logic cout_c0;

  initial begin
    for (int v = 0; v < 16; v++) begin
      for (int ci = 0; ci < 2; ci++) begin
        {x1, x2, x3, x4} = 4'(v);
        cin = 1'(ci);
        #1;
        checks++;
        if (int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(cin)
            != int'(sum) + 2 * (int'(carry) + int'(cout))) begin
          failures++;
          $display("FAIL x=%04b cin=%0b -> cout=%0b carry=%0b sum=%0b", v[3:0], cin, cout, carry, sum);
        end
        if (ci == 0) cout_c0 = cout;
        else begin
          checks++;
          if (cout != cout_c0) begin
            failures++;
            $display("FAIL cout depends on cin at x=%04b", v[3:0]);
          end
        end
        if (carry == cin) same_as_cin++;
      end
    end
    checks++;
    if (same_as_cin != 24) begin
      failures++;
      $display("FAIL carry == cin in %0d of 32 states, expected 24", same_as_cin);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
