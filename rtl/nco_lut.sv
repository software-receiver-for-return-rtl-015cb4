// Waveform generator of the quadrature NCO: a ROM holding one full period of a
// sine wave, N = 2^AW samples, sample n = round(2047 * sin(2*pi*n/N)) for the
// default 12-bit width. The cosine generator is the same ROM read a quarter
// period ahead (cos[n] = sin[n + N/4]), selected with QUARTER = 1.
//
// Interface: addr is the phase-accumulator address; data is registered, so it
// appears one clock after addr. The table is loaded from a hex file (one
// two's-complement word per line, N lines) at elaboration.
module nco_lut #(
  parameter int    AW      = 10,
  parameter int    DW      = 12,
  parameter bit    QUARTER = 1'b0,
  parameter string INIT    = "rtl/nco_sine_lut.hex"
) (
  input  logic                 clk,
  input  logic [AW-1:0]        addr,
  output logic signed [DW-1:0] data
);

  logic [DW-1:0] rom [2**AW];

  initial $readmemh(INIT, rom);

  logic [AW-1:0] a;
  assign a = QUARTER ? AW'(addr + AW'(2**(AW-2))) : addr;

  always_ff @(posedge clk) data <= signed'(rom[a]);

endmodule
