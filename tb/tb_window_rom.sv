// tb_window_rom -- self-checking testbench for window_rom at its default size.
//
// The expected contents come from the plain description of the 1024-point Bartlett
// window: 0, 1, ..., 511 over the first half and 511, 510, ..., 0 over the second.
// The test checks, every clock, that the address counter steps by one from 0 after
// reset, wraps from 1023 to 0, and that coef is the word at that address; it then
// pulls reset low in the middle of a frame and checks that the count restarts at 0.
module tb_window_rom;

  localparam int unsigned LEN = 1024;

  logic       clk = 1'b0;
  logic       rst_n;
  logic [9:0] addr;
  logic [9:0] coef;

  int checks = 0, failures = 0;
  int wraps = 0, restarts = 0;
  int exp_addr;

  window_rom dut (.clk(clk), .rst_n(rst_n), .addr(addr), .coef(coef));

  always #5 clk = ~clk;

  function automatic int exp_coef(int a);
    return (a < LEN / 2) ? a : (LEN - 1 - a);
  endfunction

  task automatic check_now();
    checks++;
    if (addr !== 10'(exp_addr) || coef !== 10'(exp_coef(exp_addr))) begin
      failures++;
      if (failures < 10)
        $display("mismatch: addr=%0d coef=%0d expected addr=%0d coef=%0d",
                 addr, coef, exp_addr, exp_coef(exp_addr));
    end
  endtask

  // Watchdog
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    exp_addr = 0;
    check_now();
    rst_n = 1'b1;
    // Two full frames and a bit: every address twice, two wraps.
    for (int i = 0; i < 2 * LEN + 100; i++) begin
      @(negedge clk);
      if (exp_addr == LEN - 1) begin exp_addr = 0; wraps++; end
      else exp_addr++;
      check_now();
    end
    // Reset in the middle of a frame (asynchronous: takes effect at once).
    rst_n = 1'b0;
    #1;
    if (exp_addr != 0) restarts++;
    exp_addr = 0;
    check_now();
    @(negedge clk);
    check_now();
    rst_n = 1'b1;
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      exp_addr++;
      check_now();
    end
    checks++;
    if (wraps < 2 || restarts < 1) begin
      failures++;
      $display("mechanisms not exercised: wraps=%0d restarts=%0d", wraps, restarts);
    end
    $display("wraps=%0d restarts=%0d", wraps, restarts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
