// tb_fft_window -- end-to-end, self-checking testbench of the window datapath at its
// default size (14-bit samples, 1024 x 10-bit Bartlett window).
//
// A complex sample is applied every clock for a little over three frames: random
// samples mixed with full-scale corner values. A reference model, written
// independently of the RTL, follows the window position (restarted by reset, wrapping
// every 1024 samples), takes the coefficient from the plain description of the Bartlett
// window (0..511 then 511..0), and forms floor(coef * sample / 512). Every output is
// compared with the model's value for the sample clocked in exactly four rising edges
// earlier, which checks the latency along with the arithmetic. Reset is pulsed once in
// the middle of a frame.
//
// Mechanisms counted, each of which must happen at least once: window wrap-around,
// window restart by reset in mid-frame, product truncation rounding a negative value
// downwards, and the window peak applied to a full-scale sample.
module tb_fft_window;

  localparam int LEN    = 1024;
  localparam int NCYC   = 3 * LEN + 700;
  localparam int RST_AT = 2 * LEN + 300;   // cycle at which reset is pulsed in mid-frame
  localparam int LAT    = 4;

  logic               clk = 1'b0;
  logic               rst_n;
  logic signed [13:0] re_in, im_in, re_out, im_out;
  logic [9:0]         win_addr;

  int checks = 0, failures = 0;
  int wraps = 0, restarts = 0, neg_floor = 0, peak_full = 0;

  // Per-cycle record of what was clocked in at rising edge k.
  int in_re [NCYC];
  int in_im [NCYC];
  int in_w  [NCYC];

  int model_addr;

  fft_window dut (
    .clk(clk), .rst_n(rst_n), .re_in(re_in), .im_in(im_in),
    .re_out(re_out), .im_out(im_out), .win_addr(win_addr)
  );

  always #5 clk = ~clk;

  function automatic int bartlett(int a);
    return (a < LEN / 2) ? a : (LEN - 1 - a);
  endfunction

  function automatic int model(int w, int x);
    return int'($floor(real'(w * x) / 512.0));
  endfunction

  function automatic int rand_sample(int k);
    case (k % 97)
      0: return -8192;
      1: return 8191;
      2: return -1;
      default: return int'($urandom_range(0, 16383)) - 8192;
    endcase
  endfunction

  initial begin
    repeat (NCYC + 50) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    re_in = '0;
    im_in = '0;
    model_addr = 0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NCYC; k++) begin
      // Set up sample k before rising edge k.
      if (k == RST_AT) begin
        rst_n = 1'b0;
        #1;
        if (model_addr != 0) restarts++;
        model_addr = 0;
      end else if (k == RST_AT + 2) begin
        rst_n = 1'b1;
      end
      in_re[k] = rand_sample(k);
      in_im[k] = rand_sample(k + 50);
      in_w[k]  = bartlett(model_addr);
      re_in = 14'(in_re[k]);
      im_in = 14'(in_im[k]);
      checks++;
      if (int'(win_addr) != model_addr) begin
        failures++;
        if (failures < 10) $display("cycle %0d: win_addr %0d, expected %0d", k, win_addr, model_addr);
      end
      @(posedge clk);
      if (rst_n) begin
        if (model_addr == LEN - 1) begin model_addr = 0; wraps++; end
        else model_addr++;
      end
      @(negedge clk);
      // Output now reflects the sample clocked in LAT-1 edges before this one.
      if (k >= LAT - 1) begin
        automatic int j  = k - (LAT - 1);
        automatic int er = model(in_w[j], in_re[j]);
        automatic int ei = model(in_w[j], in_im[j]);
        checks += 2;
        if (int'(re_out) != er || int'(im_out) != ei) begin
          failures++;
          if (failures < 10)
            $display("sample %0d (w=%0d): out (%0d,%0d) expected (%0d,%0d)",
                     j, in_w[j], re_out, im_out, er, ei);
        end
        if (in_w[j] * in_re[j] < 0 && (in_w[j] * in_re[j]) % 512 != 0) neg_floor++;
        if (in_w[j] == 511 && (in_re[j] == -8192 || in_re[j] == 8191 ||
                               in_im[j] == -8192 || in_im[j] == 8191)) peak_full++;
      end
    end
    $display("mechanisms: wraps=%0d restarts=%0d neg_floor=%0d peak_full=%0d",
             wraps, restarts, neg_floor, peak_full);
    checks += 4;
    if (wraps == 0)     begin failures++; $display("window wrap never happened"); end
    if (restarts == 0)  begin failures++; $display("mid-frame restart never happened"); end
    if (neg_floor == 0) begin failures++; $display("negative truncation never happened"); end
    if (peak_full == 0) begin failures++; $display("peak with full-scale input never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
