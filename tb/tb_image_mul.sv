// tb_image_mul: pixel-wise multiplication of two generated 64 x 64 8-bit
// grey-scale images (a smooth gradient and a ring pattern), as in blending
// or masking. Each product is scaled back to 8 bits (p >> 8). Every pixel of
// every design is checked against the bit-level queue model, and the PSNR of
// each design's image against the exactly multiplied one is reported and
// required to be at least 30 dB (a threshold chosen here for 8-bit images).
module tb_image_mul;
  import mul_ref_pkg::*;

  localparam int N = 8;
  localparam int W = 64;
  localparam int KIND [4] = '{0, 0, 1, 2};
  localparam int CORR [4] = '{1, 2, 2, 2};

  logic [N-1:0]        a, b;
  logic [3:0][2*N-1:0] p;
  int checks = 0, failures = 0;
  real sq_err [4];

  approx_mul_top dut (.a(a), .b(b), .p(p));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ex, ap, dx, dy;
    real psnr;
    for (int d = 0; d < 4; d++) sq_err[d] = 0.0;
    for (int y = 0; y < W; y++)
      for (int x = 0; x < W; x++) begin
        a = N'((x * 255) / (W - 1));                       // horizontal gradient
        dx = x - W/2;
        dy = y - W/2;
        b = N'(128 + ((dx*dx + dy*dy) % 256) / 2);         // concentric rings
        #1;
        ex = (int'(a) * int'(b)) >> N;
        for (int d = 0; d < 4; d++) begin
          checks++;
          if (p[d] != 16'(ref_mul(N, KIND[d], CORR[d], N - 1, N - 1, 1'b1, a, b))) begin
            failures++;
            if (failures < 10) $display("FAIL design %0d pixel (%0d,%0d)", d + 1, x, y);
          end
          ap = int'(p[d]) >> N;
          sq_err[d] += real'((ap - ex) * (ap - ex));
        end
      end
    for (int d = 0; d < 4; d++) begin
      psnr = (sq_err[d] == 0.0) ? 99.0
           : 10.0 * $log10(255.0 * 255.0 / (sq_err[d] / real'(W * W)));
      $display("design %0d: PSNR %0.2f dB", d + 1, psnr);
      checks++;
      if (psnr < 30.0) begin
        failures++;
        $display("FAIL design %0d PSNR below 30 dB", d + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
