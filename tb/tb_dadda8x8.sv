// Self-checking testbench for dadda8x8 over all 65,536 operand pairs.
// The default instance (Design 1) and a Design 2 instance are compared with
// the reference model of dadda_ref_pkg; an instance with exact compressors
// must give a*b. The error statistics of both approximate multipliers
// (error rate, mean error distance, normalised mean error distance, largest
// error) are printed and checked to be non-trivial: both must be wrong for
// some inputs and right for most.
module tb_dadda8x8;
  import dadda_pkg::*;
  import dadda_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]  a, b;
  logic [15:0] p_def, p_d2, p_ex;

  dadda8x8                          dut_def (.a, .b, .p(p_def));
  dadda8x8 #(.KIND(COMP_DESIGN2))   dut_d2  (.a, .b, .p(p_d2));
  dadda8x8 #(.KIND(COMP_EXACT))     dut_ex  (.a, .b, .p(p_ex));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_err [2];
    longint sum_ed [2];
    int max_ed [2];
    int ed, exact;
    logic [15:0] got;
    n_err = '{0, 0};
    sum_ed = '{0, 0};
    max_ed = '{0, 0};
    for (int va = 0; va < 256; va++) begin
      for (int vb = 0; vb < 256; vb++) begin
        a = 8'(va);
        b = 8'(vb);
        #1;
        exact = va * vb;
        checks++;
        if (p_ex != 16'(exact)) begin
          failures++;
          if (failures < 10) $display("FAIL exact a=%0d b=%0d p=%0d", va, vb, p_ex);
        end
        for (int k = 1; k <= 2; k++) begin
          got = (k == 1) ? p_def : p_d2;
          checks++;
          if (got != ref_mult(k, a, b)) begin
            failures++;
            if (failures < 10)
              $display("FAIL design %0d a=%0d b=%0d p=%0d expected %0d", k, va, vb, got,
                       ref_mult(k, a, b));
          end
          ed = int'(got) - exact;
          if (ed < 0) ed = -ed;
          if (ed != 0) n_err[k-1]++;
          sum_ed[k-1] += ed;
          if (ed > max_ed[k-1]) max_ed[k-1] = ed;
        end
      end
      @(posedge clk);
    end
    for (int k = 0; k < 2; k++) begin
      $display("Design %0d multiplier: error rate %0.2f%%, MED %0.2f, NMED %0.5f, max ED %0d",
               k + 1, 100.0 * n_err[k] / 65536.0, real'(sum_ed[k]) / 65536.0,
               real'(sum_ed[k]) / 65536.0 / 65025.0, max_ed[k]);
      checks++;
      if (n_err[k] == 0 || n_err[k] == 65536) begin
        failures++;
        $display("FAIL design %0d: implausible error count %0d", k + 1, n_err[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
