// fft_window -- time-domain window applied to complex samples ahead of an FFT.
//
// A spectral window tapers each block of FFT input so that a strong signal leaks less
// energy into the side lobes of neighbouring FFT bins. Every clock this block takes one
// complex sample (re_in, im_in, N-bit signed), multiplies both parts by the window
// coefficient for that sample's position in the frame and hands on the result at the
// same width.
//
// Structure (one sample per clock, no stalls):
//   - input registers for the real and imaginary samples;
//   - window_rom: coefficient ROM and its address counter, followed by a coefficient
//     register, so that the registered sample and the registered coefficient line up;
//   - two win_mult signed multipliers (two-clock pipeline), one per component;
//   - truncation of the (N+WIN_W)-bit product to bits [N+WIN_W-2 : WIN_W-1], i.e. an
//     arithmetic shift right by WIN_W-1 (rounding towards minus infinity) with the
//     redundant top sign bit dropped. Since the largest coefficient is 2**(WIN_W-1)-1,
//     this gives a gain of just under 1 at the window peak;
//   - output registers.
//
// Timing: a sample presented before rising edge k leaves on re_out/im_out after edge
// k+3 (four register stages: input, two multiplier stages, output; latency 4 clocks).
// The first sample clocked in after rst_n is released is multiplied by coefficient 0,
// the next by coefficient 1, and so on, wrapping every WIN_LEN samples. rst_n clears
// only the address counter; the data registers have no reset, so re_out/im_out carry
// meaningless values for the first four clocks.
//
// Following the specification: 14-bit samples, a 1024 x 10-bit Bartlett ROM with an
// address counter cleared by reset, input and coefficient registers, two pipelined
// signed multipliers with 24-bit products, truncation to product bits 22..9, output
// registers. This design's choices: the active-low asynchronous reset, the win_addr
// output and the way the multipliers are pipelined (see win_mult).
//
// Lint reports the low WIN_W-1 bits and the top bit of each product as unused: that is
// the truncation, and intended.
module fft_window
  import window_pkg::*;
#(
  parameter int unsigned N       = DATA_W_DEF,
  parameter int unsigned WIN_LEN = WIN_LEN_DEF,
  parameter int unsigned WIN_W   = WIN_W_DEF,
  localparam int unsigned AW     = $clog2(WIN_LEN),
  localparam int unsigned P_W    = N + WIN_W
) (
  input  logic                clk,
  input  logic                rst_n,     // active low: restarts the window at coefficient 0
  input  logic signed [N-1:0] re_in,
  input  logic signed [N-1:0] im_in,
  output logic signed [N-1:0] re_out,
  output logic signed [N-1:0] im_out,
  output logic [AW-1:0]       win_addr   // window position of the sample now being registered
);

  logic signed [N-1:0]     re_reg, im_reg;
  logic        [WIN_W-1:0] coef;
  logic signed [WIN_W-1:0] win_reg;
  logic signed [P_W-1:0]   re_prod, im_prod;

  window_rom #(.WIN_LEN(WIN_LEN), .WIN_W(WIN_W)) u_rom (
    .clk  (clk),
    .rst_n(rst_n),
    .addr (win_addr),
    .coef (coef)
  );

  always_ff @(posedge clk) begin
    re_reg  <= re_in;
    im_reg  <= im_in;
    win_reg <= coef;
  end

  win_mult #(.A_W(WIN_W), .B_W(N)) u_mult_re (
    .clk(clk), .a(win_reg), .b(re_reg), .p(re_prod)
  );

  win_mult #(.A_W(WIN_W), .B_W(N)) u_mult_im (
    .clk(clk), .a(win_reg), .b(im_reg), .p(im_prod)
  );

  // Truncate: keep product bits [P_W-2 : WIN_W-1].
  always_ff @(posedge clk) begin
    re_out <= re_prod[P_W-2 -: N];
    im_out <= im_prod[P_W-2 -: N];
  end

endmodule
