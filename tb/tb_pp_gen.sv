// Self-checking testbench for pp_gen: every operand pair; each partial
// product bit is checked, and the weighted sum of all 64 bits must be a*b.
module tb_pp_gen;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] a, b;
  logic [7:0][7:0] pp;
  pp_gen dut (.a, .b, .pp);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bad_bits;
    int unsigned total;
    for (int va = 0; va < 256; va++) begin
      for (int vb = 0; vb < 256; vb++) begin
        a = 8'(va);
        b = 8'(vb);
        #1;
        bad_bits = 0;
        total = 0;
        for (int j = 0; j < 8; j++)
          for (int i = 0; i < 8; i++) begin
            if (pp[j][i] != (a[i] && b[j])) bad_bits++;
            if (pp[j][i]) total += 1 << (i + j);
          end
        checks++;
        if (bad_bits != 0 || total != va * vb) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d: %0d wrong bits, sum %0d", va, vb, bad_bits, total);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
