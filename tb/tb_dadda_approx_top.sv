// End-to-end testbench for dadda_approx_top: pixel-wise multiplication of
// two 8-bit greyscale images, the image-enhancement use of the multiplier.
//
// Two 256x256 test images are generated here: a smooth sky-like gradient
// with bright blobs, and a brightness mask (a radial vignette with stripes).
// Every pixel pair goes through the top; the exact output must equal a*b,
// and the Design 1 and Design 2 outputs must match the reference model of
// dadda_ref_pkg. The output image is the product scaled back to 8 bits
// (product >> 8). For each approximate design the testbench reports the
// error rate, the mean error distance of the 16-bit product and the PSNR of
// the 8-bit output image against the exact one.
//
// Mechanisms counted, each of which must occur at least once:
//   approx1_wrong / approx2_wrong - a pixel where the approximate product
//                                   differs from the exact one
//   approx1_right / approx2_right - a pixel where it happens to be exact
//   zero_operand                  - a pixel with a zero operand
//   full_scale                    - a pixel with both operands at 255
// The top has no parameters, so this is also the full-size run.
module tb_dadda_approx_top;
  import dadda_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int W = 256;
  localparam int H = 256;

  logic [7:0]  a, b;
  logic [15:0] p_design1, p_design2, p_exact;

  dadda_approx_top dut (.a, .b, .p_design1, .p_design2, .p_exact);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // synthetic image 1: vertical sky gradient plus three soft bright blobs
  function automatic logic [7:0] img1(input int x, input int y);
    int v, dx, dy, d2;
    int cx [3] = '{70, 160, 210};
    int cy [3] = '{60, 150, 40};
    int r2 [3] = '{1600, 3600, 900};
    v = 90 + (y * 100) / H;
    for (int i = 0; i < 3; i++) begin
      dx = x - cx[i];
      dy = y - cy[i];
      d2 = dx * dx + dy * dy;
      if (d2 < r2[i]) v += ((r2[i] - d2) * 150) / r2[i];
    end
    if (x == 0 && y == 0) v = 255;         // one saturated pixel
    return (v > 255) ? 8'd255 : 8'(v);
  endfunction

  // synthetic image 2: radial vignette with a band of stripes
  function automatic logic [7:0] img2(input int x, input int y);
    int v, dx, dy;
    dx = x - W / 2;
    dy = y - H / 2;
    v = 255 - (dx * dx + dy * dy) / 64;
    if (y >= 200 && y < 232 && ((x / 8) % 2 == 1)) v = 0;
    if (x == 0 && y == 0) v = 255;
    return (v < 0) ? 8'd0 : 8'(v);
  endfunction

  int n_wrong [2], n_right [2], n_zero, n_full;
  longint sum_ed [2];
  real sse [2];

  initial begin
    int exact, ed, o_ex, o_ap;
    logic [15:0] got;
    real mse, psnr;
    n_wrong = '{0, 0};
    n_right = '{0, 0};
    sum_ed = '{0, 0};
    sse = '{0.0, 0.0};
    n_zero = 0;
    n_full = 0;
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < W; x++) begin
        a = img1(x, y);
        b = img2(x, y);
        #1;
        exact = int'(a) * int'(b);
        if (a == 0 || b == 0) n_zero++;
        if (a == 8'd255 && b == 8'd255) n_full++;
        checks++;
        if (p_exact != 16'(exact)) begin
          failures++;
          if (failures < 10) $display("FAIL exact (%0d,%0d) %0d*%0d -> %0d", x, y, a, b, p_exact);
        end
        for (int k = 1; k <= 2; k++) begin
          got = (k == 1) ? p_design1 : p_design2;
          checks++;
          if (got != ref_mult(k, a, b)) begin
            failures++;
            if (failures < 10)
              $display("FAIL design %0d (%0d,%0d) %0d*%0d -> %0d expected %0d", k, x, y, a, b,
                       got, ref_mult(k, a, b));
          end
          ed = int'(got) - exact;
          if (ed < 0) ed = -ed;
          if (ed != 0) n_wrong[k-1]++;
          else n_right[k-1]++;
          sum_ed[k-1] += ed;
          o_ex = exact >> 8;
          o_ap = int'(got) >> 8;
          sse[k-1] += real'((o_ap - o_ex) * (o_ap - o_ex));
        end
      end
      @(posedge clk);
    end

    for (int k = 0; k < 2; k++) begin
      mse = sse[k] / real'(W * H);
      psnr = (mse == 0.0) ? 99.0 : 10.0 * $log10(255.0 * 255.0 / mse);
      $display("Design %0d image product: %0d of %0d pixels wrong, MED %0.1f, output PSNR %0.2f dB",
               k + 1, n_wrong[k], W * H, real'(sum_ed[k]) / real'(W * H), psnr);
    end
    $display("mechanisms: approx1_wrong=%0d approx1_right=%0d approx2_wrong=%0d approx2_right=%0d zero_operand=%0d full_scale=%0d",
             n_wrong[0], n_right[0], n_wrong[1], n_right[1], n_zero, n_full);
    checks++;
    if (n_wrong[0] == 0 || n_right[0] == 0 || n_wrong[1] == 0 || n_right[1] == 0
        || n_zero == 0 || n_full == 0) begin
      failures++;
      $display("FAIL a counted mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
