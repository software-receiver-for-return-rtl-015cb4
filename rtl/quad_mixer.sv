// Quadrature mixer: the two digital multipliers that heterodyne the real input
// samples with the NCO waveforms, i_out = x*cos and q_out = -x*sin, so that a
// component at +f_NCO is moved to 0 Hz. The negated sine and the scaling are
// this design's choice: each full-precision product is shifted right
// arithmetically by IN_W+LO_W-1-OUT_W bits (truncation) and registered.
//
// Timing: outputs are registered, one clock after the inputs.
module quad_mixer #(
  parameter int IN_W  = 10,
  parameter int LO_W  = 12,
  parameter int OUT_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  x,
  input  logic signed [LO_W-1:0]  lo_cos,
  input  logic signed [LO_W-1:0]  lo_sin,
  output logic signed [OUT_W-1:0] i_out,
  output logic signed [OUT_W-1:0] q_out
);

  localparam int PW    = IN_W + LO_W;
  localparam int SHIFT = PW - 1 - OUT_W;

  logic signed [PW-1:0] p_cos, p_sin, i_full, q_full;

  always_comb begin
    p_cos  = PW'(x) * PW'(lo_cos);
    p_sin  = PW'(x) * PW'(lo_sin);
    i_full = p_cos >>> SHIFT;
    q_full = (-p_sin) >>> SHIFT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_out <= '0;
      q_out <= '0;
    end else begin
      i_out <= OUT_W'(i_full);
      q_out <= OUT_W'(q_full);
    end
  end

endmodule
