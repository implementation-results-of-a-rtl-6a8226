// tb_window_spectrum -- spectral test of the window stage at its default size.
//
// Streams one 1024-sample frame of a complex tone that falls halfway between two FFT bins
// (bin 100.5, amplitude 8000, the case that leaks most), starting at window position 0.
// It then takes a direct DFT, in the testbench, of both the raw frame and the windowed
// output frame. The check is the point of a window: leakage 20 bins away from the tone,
// measured against the tone's own bin, must be at least 20 dB lower with the window than
// without it. It also checks the window's coherent gain: the tone bin of the windowed
// frame must be about half that of the raw frame (a triangular window averages 1/2).
module tb_window_spectrum;

  localparam int    LEN  = 1024;
  localparam int    LAT  = 4;
  localparam real   F    = 100.5;
  localparam real   AMP  = 8000.0;
  localparam real   PI   = 3.14159265358979323846;

  logic               clk = 1'b0;
  logic               rst_n;
  logic signed [13:0] re_in, im_in, re_out, im_out;
  logic [9:0]         win_addr;

  int checks = 0, failures = 0;
  real xr [LEN], xi [LEN], yr [LEN], yi [LEN];

  fft_window dut (
    .clk(clk), .rst_n(rst_n), .re_in(re_in), .im_in(im_in),
    .re_out(re_out), .im_out(im_out), .win_addr(win_addr)
  );

  always #5 clk = ~clk;

  // Power of bin m of a LEN-point DFT of the raw frame (windowed = 0) or of the
  // windowed output frame (windowed = 1).
  function automatic real bin_power(bit windowed, int m);
    real sr = 0.0, si = 0.0;
    for (int n = 0; n < LEN; n++) begin
      real ph, r, i;
      ph = -2.0 * PI * real'(m) * real'(n) / real'(LEN);
      r  = windowed ? yr[n] : xr[n];
      i  = windowed ? yi[n] : xi[n];
      sr += r * $cos(ph) - i * $sin(ph);
      si += r * $sin(ph) + i * $cos(ph);
    end
    return sr * sr + si * si;
  endfunction

  initial begin
    repeat (LEN + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real raw_leak, win_leak, gain;
    rst_n = 1'b0;
    re_in = '0;
    im_in = '0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < LEN + LAT - 1; k++) begin
      if (k < LEN) begin
        real ph;
        ph = 2.0 * PI * F * real'(k) / real'(LEN);
        xr[k] = real'($rtoi(AMP * $cos(ph) + (AMP * $cos(ph) >= 0 ? 0.5 : -0.5)));
        xi[k] = real'($rtoi(AMP * $sin(ph) + (AMP * $sin(ph) >= 0 ? 0.5 : -0.5)));
        re_in = 14'($rtoi(xr[k]));
        im_in = 14'($rtoi(xi[k]));
      end
      @(negedge clk);
      if (k >= LAT - 1) begin
        yr[k - (LAT - 1)] = real'(re_out);
        yi[k - (LAT - 1)] = real'(im_out);
      end
    end
    raw_leak = 10.0 * $log10(bin_power(1'b0, 120) / bin_power(1'b0, 100));
    win_leak = 10.0 * $log10(bin_power(1'b1, 120) / bin_power(1'b1, 100));
    gain     = $sqrt(bin_power(1'b1, 100) / bin_power(1'b0, 100));
    $display("leakage 20 bins away: raw %0.1f dB, windowed %0.1f dB; tone-bin gain %0.3f",
             raw_leak, win_leak, gain);
    checks++;
    if (win_leak > raw_leak - 20.0) begin
      failures++;
      $display("window does not lower the leakage by 20 dB");
    end
    // Coherent gain of the Bartlett window is 1/2; at half-bin offset the windowed tone
    // loses less of its peak than the raw one does, so the ratio lies a little above 1/2.
    checks++;
    if (gain < 0.45 || gain > 0.85) begin
      failures++;
      $display("tone-bin gain %0.3f outside 0.45..0.85", gain);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
