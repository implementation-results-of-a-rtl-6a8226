// window_rom -- window coefficient ROM with its own address counter.
//
// A WIN_LEN x WIN_W ROM holds one window coefficient per FFT input sample. A counter
// steps through the ROM one address per clock and wraps from WIN_LEN-1 back to 0, so the
// window repeats every WIN_LEN samples without any control from outside. rst_n clears
// the counter (asynchronously, active low), which is how the surrounding system aligns
// the start of the window with the start of an FFT frame.
//
// The ROM read is combinational: coef is the word at the current counter value, addr.
// The caller registers it (the datapath puts it in a pipeline register next to the data).
// The contents are the Bartlett window of window_pkg::bartlett_coef, computed when the
// ROM is initialised, which an FPGA turns into initialised block memory.
//
// Every coefficient is non-negative, so the top bit of coef is always 0 and synthesis
// keeps only WIN_W-1 bits of each word.
//
// Timing: after rst_n rises, addr = 0 until the first rising clk edge, then 1, 2, ...
//
// Following the specification: 1024 x 10-bit ROM, counter that cycles sequentially
// through the locations, reset zeroing the address, unregistered address and output,
// Bartlett contents with peak 511. This design's choices: the active-low asynchronous
// clear (the counter's clear input is wired to the reset line), and computing the
// contents in SystemVerilog rather than loading a memory file.
module window_rom
  import window_pkg::*;
#(
  parameter int unsigned WIN_LEN = WIN_LEN_DEF,
  parameter int unsigned WIN_W   = WIN_W_DEF,
  localparam int unsigned AW     = $clog2(WIN_LEN)
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [AW-1:0]    addr,
  output logic [WIN_W-1:0] coef
);

  logic [WIN_W-1:0] rom [WIN_LEN];

  initial begin
    for (int unsigned i = 0; i < WIN_LEN; i++)
      rom[i] = WIN_W'(bartlett_coef(i, WIN_LEN, WIN_W));
  end

  // Address counter: wraps at WIN_LEN (also when WIN_LEN is not a power of two).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          addr <= '0;
    else if (addr == AW'(WIN_LEN - 1))   addr <= '0;
    else                                 addr <= addr + 1'b1;
  end

  assign coef = rom[addr];

endmodule
