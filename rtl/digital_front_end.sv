// Digital front end of one upstream channel.
//
// Selects one channel out of the digitized 5-65 MHz upstream band and delivers
// it as decimated complex baseband: the quadrature NCO and two multipliers move
// the channel's carrier to 0 Hz (I = x*cos, Q = -x*sin), an I and a Q CIC filter
// decimate by the programmable factor D_k, and an I and a Q SRRC matched filter
// shape the result. This chain follows the receiver's block diagram; the
// controlling processor sets the NCO tuning word, the decimation index and the
// matched-filter taps (shared by I and Q).
//
// Interface: one adc_data sample per clock. out_valid pulses once every D_k
// clocks with out_i/out_q. An input sample is registered once to line up with
// the registered NCO table output, and the mixer registers the products, so a
// sample reaches the CIC integrators two clocks after it arrives; the SRRC
// filter adds 2 clocks after each CIC output strobe.
//
// Lint tools report rst_n as used both asynchronously and synchronously: the
// synchronous use is only the disable condition of the two I/Q lock-step
// assertions below.
module digital_front_end import dfe_pkg::*; #(
  parameter int IN_W      = ADC_W,
  parameter int PHASE_W_P = PHASE_W,
  parameter int NTAPS_P   = NTAPS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic signed [IN_W-1:0]     adc_data,
  input  logic [PHASE_W_P-1:0]       phase_word,
  input  logic [DEC_SEL_W-1:0]       dec_sel,
  input  logic                       coef_we,
  input  logic [$clog2(NTAPS_P)-1:0] coef_addr,
  input  logic signed [COEF_W-1:0]   coef_data,
  output logic                       out_valid,
  output logic signed [OUT_W-1:0]    out_i,
  output logic signed [OUT_W-1:0]    out_q
);

  // The ROM output lags the accumulator by one clock; delay the samples to match
  // so that the sample entering the accumulator's cycle meets its own phase.
  logic signed [IN_W-1:0]  x_d;
  logic signed [LUT_W-1:0] lo_sin, lo_cos;
  logic signed [MIX_W-1:0] mix_i, mix_q;
  logic                    mix_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_d   <= '0;
      mix_v <= 1'b0;
    end else begin
      x_d   <= adc_data;
      mix_v <= 1'b1;
    end
  end

  nco #(.PHASE_W_P(PHASE_W_P), .AW(LUT_AW), .DW(LUT_W)) u_nco (
    .clk, .rst_n, .phase_word, .sin_out(lo_sin), .cos_out(lo_cos)
  );

  quad_mixer #(.IN_W(IN_W), .LO_W(LUT_W), .OUT_W(MIX_W)) u_mix (
    .clk, .rst_n, .x(x_d), .lo_cos, .lo_sin, .i_out(mix_i), .q_out(mix_q)
  );

  logic                    cic_v_i, cic_v_q;
  logic signed [MIX_W-1:0] cic_i, cic_q;

  cic_decimator #(.IN_W(MIX_W), .STAGES(CIC_N)) u_cic_i (
    .clk, .rst_n, .dec_sel, .in_valid(mix_v), .in_data(mix_i), .out_valid(cic_v_i), .out_data(cic_i)
  );
  cic_decimator #(.IN_W(MIX_W), .STAGES(CIC_N)) u_cic_q (
    .clk, .rst_n, .dec_sel, .in_valid(mix_v), .in_data(mix_q), .out_valid(cic_v_q), .out_data(cic_q)
  );

  logic srrc_v_q;

  srrc_filter #(.NTAPS_P(NTAPS_P), .IN_W(MIX_W), .COEF_W_P(COEF_W), .COEF_FRAC_P(COEF_FRAC), .OUT_W_P(OUT_W)) u_srrc_i (
    .clk, .rst_n, .coef_we, .coef_addr, .coef_data,
    .in_valid(cic_v_i), .in_data(cic_i), .out_valid, .out_data(out_i)
  );
  srrc_filter #(.NTAPS_P(NTAPS_P), .IN_W(MIX_W), .COEF_W_P(COEF_W), .COEF_FRAC_P(COEF_FRAC), .OUT_W_P(OUT_W)) u_srrc_q (
    .clk, .rst_n, .coef_we, .coef_addr, .coef_data,
    .in_valid(cic_v_q), .in_data(cic_q), .out_valid(srrc_v_q), .out_data(out_q)
  );

  // The I and Q paths run in lock step.
  assert property (@(posedge clk) disable iff (!rst_n) cic_v_i == cic_v_q);
  assert property (@(posedge clk) disable iff (!rst_n) out_valid == srrc_v_q);

endmodule
