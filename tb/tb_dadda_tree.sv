// Self-checking testbench for dadda_tree, one instance per compressor kind.
// For every operand pair the partial-product matrix is formed here and fed
// to the three trees. The exact tree's two rows must add up to a*b; each
// approximate tree's rows must match, bit for bit, the reference reduction
// of dadda_ref_pkg. Also checks that every row bit is used at least once
// (the rows are 15 bits wide and no column is left idle).
module tb_dadda_tree;
  import dadda_pkg::*;
  import dadda_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] a, b;
  logic [7:0][7:0] pp;
  logic [14:0] r0 [3];
  logic [14:0] r1 [3];

  dadda_tree #(.KIND(COMP_EXACT))   dut_ex (.pp, .row0(r0[0]), .row1(r1[0]));
  dadda_tree #(.KIND(COMP_DESIGN1)) dut_d1 (.pp, .row0(r0[1]), .row1(r1[1]));
  dadda_tree #(.KIND(COMP_DESIGN2)) dut_d2 (.pp, .row0(r0[2]), .row1(r1[2]));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [14:0] e0, e1;
    logic [14:0] seen0, seen1;
    seen0 = '0;
    seen1 = '0;
    for (int va = 0; va < 256; va++) begin
      for (int vb = 0; vb < 256; vb++) begin
        a = 8'(va);
        b = 8'(vb);
        for (int j = 0; j < 8; j++)
          for (int i = 0; i < 8; i++) pp[j][i] = a[i] & b[j];
        #1;
        checks++;
        if (32'(r0[0]) + 32'(r1[0]) != 32'(va * vb)) begin
          failures++;
          if (failures < 10) $display("FAIL exact tree a=%0d b=%0d rows %h %h", va, vb, r0[0], r1[0]);
        end
        for (int k = 1; k <= 2; k++) begin
          ref_rows(k, a, b, e0, e1);
          checks++;
          if (r0[k] != e0 || r1[k] != e1) begin
            failures++;
            if (failures < 10)
              $display("FAIL kind %0d a=%0d b=%0d rows %h %h expected %h %h", k, va, vb,
                       r0[k], r1[k], e0, e1);
          end
        end
        seen0 |= r0[0];
        seen1 |= r1[0];
      end
      @(posedge clk);
    end
    checks++;
    if (seen0 != '1 || seen1 != 15'h7ffe) begin
      failures++;
      $display("FAIL row bits never set: row0 %h row1 %h", ~seen0, ~seen1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
