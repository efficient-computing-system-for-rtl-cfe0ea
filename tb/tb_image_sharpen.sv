// End-to-end testbench of the image sharpening engine at its default size
// (225 x 225 pixels, 16-bit multipliers). Two frames of a generated test
// image (blocks of black and white, gradients and pseudo-random texture)
// are streamed with random idle cycles between pixels. Every output pixel
// is compared with an integer model of the same arithmetic (approximate
// products from the reference multiplier model, exact sums), and its
// arrival time is checked: two clock edges after the pixel that completes
// its window. The PSNR of the approximate result against the same filter
// with exact products is printed.
// Counted mechanisms, each of which must occur: +-3 Booth digits (the
// approximated case), clamping at 0 and at 255, idle input cycles, line
// wrap and frame wrap.
module tb_image_sharpen;
  import r8anbm_ref_pkg::*;

  localparam int W = 225;
  localparam int H = 225;
  localparam int FRAMES = 2;
  localparam int G [5][5] = '{'{1,  4,  7,  4, 1},
                             '{4, 16, 26, 16, 4},
                             '{7, 26, 41, 26, 7},
                             '{4, 16, 26, 16, 4},
                             '{1,  4,  7,  4, 1}};

  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic pix_valid = 1'b0;
  logic [7:0] pix_in = '0;
  logic out_valid, frame_done;
  logic [7:0] out_pix;

  image_sharpen dut (
    .clk(clk), .rst_n(rst_n), .pix_valid(pix_valid), .pix_in(pix_in),
    .out_valid(out_valid), .out_pix(out_pix), .frame_done(frame_done)
  );

  always #5 clk = ~clk;

  int img [FRAMES][H][W];

  typedef struct { longint due; int value; int exact; } exp_t;
  exp_t q[$];

  longint cyc = 0;
  int n_approx = 0, n_clamp_lo = 0, n_clamp_hi = 0, n_idle = 0;
  int n_line_wrap = 0, n_frame_done = 0, n_out = 0;
  real sq_err = 0.0;

  function automatic int pixel_of(int f, int r, int c);
    int v;
    if (((r / 30) + (c / 30) + f) % 3 == 0) v = 255;
    else if (((r / 30) + (c / 30)) % 3 == 1) v = 0;
    else v = (r * 3 + c * 2 + f * 17) % 256;
    if (r % 50 > 40) v = int'($urandom_range(0, 255));
    return v;
  endfunction

  // expected result centred on (r, c)
  function automatic void model(int f, int r, int c, output int res, output int ex);
    longint s_apx, s_ex, blur, sharp;
    s_apx = 0; s_ex = 0;
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++) begin
        int p;
        p = img[f][r-2+i][c-2+j];
        s_apx += approx_mul(longint'(G[i][j]), longint'(p), 16);
        s_ex  += G[i][j] * p;
      end
    blur  = (s_apx * 3841) >>> 20;
    sharp = 2 * img[f][r][c] - blur;
    res = (sharp < 0) ? 0 : (sharp > 255) ? 255 : int'(sharp);
    blur  = (s_ex * 3841) >>> 20;
    sharp = 2 * img[f][r][c] - blur;
    ex  = (sharp < 0) ? 0 : (sharp > 255) ? 255 : int'(sharp);
  endfunction

  initial begin
    #5_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  // checker: sample after each rising edge
  always @(negedge clk) begin
    if (rst_n) begin
      if (frame_done) n_frame_done++;
      if (out_valid) begin
        n_out++;
        checks++;
        if (q.size() == 0) begin
          failures++;
          $display("unexpected output at cycle %0d", cyc);
        end else begin
          exp_t e;
          e = q.pop_front();
          if (e.due != cyc || int'(out_pix) != e.value) begin
            failures++;
            if (failures < 10)
              $display("output mismatch cycle %0d (due %0d): got %0d exp %0d",
                       cyc, e.due, out_pix, e.value);
          end
          sq_err += real'((e.value - e.exact) * (e.value - e.exact));
        end
      end else if (q.size() != 0 && q[0].due < cyc) begin
        failures++;
        checks++;
        $display("missing output due at cycle %0d", q[0].due);
        void'(q.pop_front());
      end
    end
  end

  initial begin
    for (int f = 0; f < FRAMES; f++)
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) img[f][r][c] = pixel_of(f, r, c);

    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int f = 0; f < FRAMES; f++) begin
      for (int r = 0; r < H; r++) begin
        for (int c = 0; c < W; c++) begin
          @(negedge clk);
          while ($urandom_range(0, 9) == 0) begin
            pix_valid = 1'b0;
            pix_in = 8'($urandom);
            n_idle++;
            @(negedge clk);
          end
          pix_valid = 1'b1;
          pix_in = 8'(img[f][r][c]);
          if (c == W - 1) n_line_wrap++;
          if (r >= 4 && c >= 4) begin
            exp_t e;
            model(f, r - 2, c - 2, e.value, e.exact);
            // accepted at the coming rising edge, whose count is cyc + 1;
            // the result is registered two edges later
            e.due = cyc + 3;
            q.push_back(e);
            if (e.value == 0) n_clamp_lo++;
            if (e.value == 255) n_clamp_hi++;
            for (int i = 0; i < 5; i++)
              if (approx_digits(longint'(img[f][r-i][c]), 16) != 0) n_approx++;
          end
        end
      end
    end
    @(negedge clk);
    pix_valid = 1'b0;
    repeat (5) @(negedge clk);

    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("%0d outputs never arrived", q.size());
    end
    checks++;
    if (n_out != FRAMES * (W - 4) * (H - 4)) begin
      failures++;
      $display("output count %0d", n_out);
    end
    checks++;
    if (n_frame_done != FRAMES) failures++;
    // every mechanism must have happened
    checks++; if (n_approx == 0)    begin failures++; $display("no +-3 digit seen"); end
    checks++; if (n_clamp_lo == 0)  begin failures++; $display("no clamp at 0"); end
    checks++; if (n_clamp_hi == 0)  begin failures++; $display("no clamp at 255"); end
    checks++; if (n_idle == 0)      begin failures++; $display("no idle cycle"); end
    checks++; if (n_line_wrap == 0) begin failures++; $display("no line wrap"); end

    $display("outputs %0d, +-3 digits in window columns %0d, clamp0 %0d, clamp255 %0d, idle %0d, lines %0d, frames %0d",
             n_out, n_approx, n_clamp_lo, n_clamp_hi, n_idle, n_line_wrap, n_frame_done);
    if (sq_err > 0.0)
      $display("PSNR of approximate vs exact-product sharpening: %0.2f dB",
               10.0 * $log10(255.0 * 255.0 / (sq_err / real'(n_out))));
    else
      $display("approximate and exact-product sharpening agree on every pixel");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
