// Self-checking testbench for cpa at its default width of 15: corner cases
// (zero, all ones, full-length carry ripple) and random operands, checked
// against {cout, s} = x + y.
module tb_cpa;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [14:0] x, y, s;
  logic        cout;
  cpa dut (.x, .y, .s, .cout);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [14:0] vx, vy);
    int unsigned expv;
    x = vx;
    y = vy;
    #1;
    expv = int'(vx) + int'(vy);
    checks++;
    if ({cout, s} != 16'(expv)) begin
      failures++;
      $display("FAIL %0d + %0d -> %0d", vx, vy, {cout, s});
    end
  endtask

  initial begin
    check('0, '0);
    check('1, '0);
    check('1, 15'd1);        // carry ripples through every bit
    check('1, '1);
    check(15'h2aaa, 15'h1555);
    for (int n = 0; n < 20000; n++) begin
      check(15'($urandom), 15'($urandom));
      if (n % 100 == 0) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
