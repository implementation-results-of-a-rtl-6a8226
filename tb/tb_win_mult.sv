// tb_win_mult -- self-checking testbench for the two-stage pipelined multiplier.
//
// Drives a new operand pair every clock (corner values first, then random ones) and
// checks each product, computed here with plain integer arithmetic, exactly two rising
// edges later. A pair is also held for one clock only and the product checked not to
// appear one edge too early, which pins the latency at two clocks.
module tb_win_mult;

  localparam int NPAIRS = 2000;

  logic              clk = 1'b0;
  logic signed [9:0]  a;
  logic signed [13:0] b;
  logic signed [23:0] p;

  int checks = 0, failures = 0;
  int av [NPAIRS];
  int bv [NPAIRS];

  win_mult dut (.clk(clk), .a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  initial begin
    repeat (NPAIRS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cn [8] = '{0, 1, -1, 511, -512, 8191, -8192, 255};
    for (int i = 0; i < NPAIRS; i++) begin
      if (i < 64) begin
        av[i] = cn[i % 8];
        bv[i] = cn[(i / 8) % 8];
        if (av[i] > 511 || av[i] < -512) av[i] = 511;
      end else begin
        av[i] = int'($urandom_range(0, 1023)) - 512;
        bv[i] = int'($urandom_range(0, 16383)) - 8192;
      end
    end
    for (int i = 0; i < NPAIRS + 2; i++) begin
      @(negedge clk);
      if (i >= 2) begin
        checks++;
        if (int'(p) != av[i-2] * bv[i-2]) begin
          failures++;
          if (failures < 10)
            $display("pair %0d: %0d * %0d gave %0d", i - 2, av[i-2], bv[i-2], p);
        end
      end
      if (i < NPAIRS) begin
        a = 10'(av[i]);
        b = 14'(bv[i]);
      end
    end
    // Latency: flush with zeros, then present one pair for a single clock.
    a = '0; b = '0;
    repeat (3) @(negedge clk);
    a = 10'sd300; b = -14'sd5000;
    @(negedge clk);
    a = '0; b = '0;
    checks++;
    if (p != 0) begin failures++; $display("product after one edge: %0d", p); end
    @(negedge clk);
    checks++;
    if (int'(p) != -1500000) begin failures++; $display("product after two edges: %0d", p); end
    @(negedge clk);
    checks++;
    if (p != 0) begin failures++; $display("product after three edges: %0d", p); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
