// Quadrature numerically controlled oscillator.
//
// The tuning word ("phase") is captured in the phase register every clock; the
// phase accumulator adds it once per clock, and its top AW bits address a sine
// and a cosine look-up table. The output frequency is
// f_NCO = f_clk * phase_word / 2^PHASE_W with a step of f_clk / 2^PHASE_W.
// This is the register / adder / accumulator / two-generator structure of the
// receiver description; the widths (32-bit word, 1024-entry table, 12-bit
// samples) and the phase truncation to the table address are this design's
// choice.
//
// Timing: a new phase_word reaches the accumulator one clock after it is
// applied; sin_out/cos_out follow the accumulator by one clock (registered ROM).
// Reset clears both registers, so the first output after reset is
// sin(0) = 0, cos(0) = 2047.
module nco import dfe_pkg::*; #(
  parameter int PHASE_W_P = PHASE_W,
  parameter int AW        = LUT_AW,
  parameter int DW        = LUT_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [PHASE_W_P-1:0]  phase_word,
  output logic signed [DW-1:0]  sin_out,
  output logic signed [DW-1:0]  cos_out
);

  logic [PHASE_W_P-1:0] phase_reg;
  logic [PHASE_W_P-1:0] phase_acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_reg <= '0;
      phase_acc <= '0;
    end else begin
      phase_reg <= phase_word;
      phase_acc <= phase_acc + phase_reg;
    end
  end

  logic [AW-1:0] lut_addr;
  assign lut_addr = phase_acc[PHASE_W_P-1 -: AW];

  nco_lut #(.AW(AW), .DW(DW), .QUARTER(1'b0)) u_sin (.clk, .addr(lut_addr), .data(sin_out));
  nco_lut #(.AW(AW), .DW(DW), .QUARTER(1'b1)) u_cos (.clk, .addr(lut_addr), .data(cos_out));

endmodule
