// Square-root raised-cosine matched filter with DSP-programmable taps.
//
// A direct-form FIR of NTAPS taps at the decimated rate. Its coefficients are
// written one at a time through coef_we/coef_addr/coef_data, so the controlling
// processor can set any roll-off (0.25 for DOCSIS, 0.3 for DVB) and bandwidth;
// this filter does not change the sample rate. The direct-form structure, the
// tap count, the Q1.15 coefficient format and the round-half-up / saturate
// output stage are this design's choices.
//
//   y[n] = sat( (sum_{i=0}^{NTAPS-1} c[i] * x[n-i] + 2^(COEF_FRAC-1)) >> COEF_FRAC )
//
// Timing: in_valid shifts x into the delay line; out_valid and out_data follow
// two clocks later. Coefficients reset to zero.
module srrc_filter import dfe_pkg::*; #(
  parameter int NTAPS_P     = NTAPS,
  parameter int IN_W        = MIX_W,
  parameter int COEF_W_P    = COEF_W,
  parameter int COEF_FRAC_P = COEF_FRAC,
  parameter int OUT_W_P     = OUT_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        coef_we,
  input  logic [$clog2(NTAPS_P)-1:0]  coef_addr,
  input  logic signed [COEF_W_P-1:0]  coef_data,
  input  logic                        in_valid,
  input  logic signed [IN_W-1:0]      in_data,
  output logic                        out_valid,
  output logic signed [OUT_W_P-1:0]   out_data
);

  localparam int ACC_W = IN_W + COEF_W_P + $clog2(NTAPS_P);

  logic signed [COEF_W_P-1:0] coef  [NTAPS_P];
  logic signed [IN_W-1:0]     delay [NTAPS_P];
  logic                       v1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NTAPS_P; i++) coef[i] <= '0;
    end else if (coef_we && (int'(coef_addr) < NTAPS_P)) begin
      coef[coef_addr] <= coef_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NTAPS_P; i++) delay[i] <= '0;
      v1 <= 1'b0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        delay[0] <= in_data;
        for (int i = 1; i < NTAPS_P; i++) delay[i] <= delay[i-1];
      end
    end
  end

  logic signed [ACC_W-1:0] acc, rounded;
  localparam logic signed [ACC_W-1:0] OMAX = ACC_W'((64'sd1 <<< (OUT_W_P-1)) - 1);
  localparam logic signed [ACC_W-1:0] OMIN = -ACC_W'(64'sd1 <<< (OUT_W_P-1));

  always_comb begin
    acc = '0;
    for (int i = 0; i < NTAPS_P; i++) acc = acc + ACC_W'(delay[i]) * ACC_W'(coef[i]);
    rounded = (acc + ACC_W'(64'sd1 <<< (COEF_FRAC_P-1))) >>> COEF_FRAC_P;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= v1;
      if (v1) begin
        if (rounded > OMAX)      out_data <= OUT_W_P'(OMAX);
        else if (rounded < OMIN) out_data <= OUT_W_P'(OMIN);
        else                     out_data <= OUT_W_P'(rounded);
      end
    end
  end

endmodule
