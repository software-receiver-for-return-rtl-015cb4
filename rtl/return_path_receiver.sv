// Multi-channel upstream (return path) receiver front end.
//
// N_IN input ports each carry the whole upstream band, digitized by an external
// 10-bit ADC at 153.6 MHz (one sample per clock). A software-controlled switch
// hands any input port to each of N_CH digital front ends, and each front end
// tunes to one upstream channel and delivers it as decimated, matched-filtered
// complex baseband for the demodulating processor. The default 4 inputs and
// 16 front ends are the single-chip configuration of the receiver description.
// The processor programs everything through the cfg_* write bus (address map in
// dfe_cfg_regs).
//
// Timing: the switch adds one clock ahead of each front end; see
// digital_front_end for the rest. ch_valid[j] pulses once every D_k clocks of
// channel j's selected decimation factor.
//
// Lint tools report rst_n as used both asynchronously and synchronously: the
// synchronous use is only the disable condition of the front ends' assertions.
module return_path_receiver import dfe_pkg::*; #(
  parameter int N_IN = 4,
  parameter int N_CH = 16,
  localparam int CHW = (N_CH > 1) ? $clog2(N_CH) : 1,
  localparam int SW  = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [ADC_W-1:0]  adc_data [N_IN],
  input  logic                     cfg_we,
  input  logic [CHW-1:0]           cfg_ch,
  input  logic [CFG_AW-1:0]        cfg_addr,
  input  logic [CFG_DW-1:0]        cfg_wdata,
  output logic [N_CH-1:0]          ch_valid,
  output logic signed [OUT_W-1:0]  ch_i [N_CH],
  output logic signed [OUT_W-1:0]  ch_q [N_CH]
);

  localparam int TAW = $clog2(NTAPS);

  logic [PHASE_W-1:0]       phase_word [N_CH];
  logic [DEC_SEL_W-1:0]     dec_sel    [N_CH];
  logic [SW-1:0]            in_sel     [N_CH];
  logic [N_CH-1:0]          coef_we;
  logic [TAW-1:0]           coef_addr;
  logic signed [COEF_W-1:0] coef_data;
  logic signed [ADC_W-1:0]  fe_in      [N_CH];

  dfe_cfg_regs #(.N_CH(N_CH), .N_IN(N_IN), .PHASE_W_P(PHASE_W), .NTAPS_P(NTAPS)) u_regs (
    .clk, .rst_n, .cfg_we, .cfg_ch, .cfg_addr, .cfg_wdata,
    .phase_word, .dec_sel, .in_sel, .coef_we, .coef_addr, .coef_data
  );

  input_switch #(.N_IN(N_IN), .N_CH(N_CH), .W(ADC_W)) u_switch (
    .clk, .rst_n, .in_data(adc_data), .sel(in_sel), .out_data(fe_in)
  );

  for (genvar j = 0; j < N_CH; j++) begin : g_fe
    digital_front_end #(.IN_W(ADC_W), .PHASE_W_P(PHASE_W), .NTAPS_P(NTAPS)) u_fe (
      .clk, .rst_n,
      .adc_data  (fe_in[j]),
      .phase_word(phase_word[j]),
      .dec_sel   (dec_sel[j]),
      .coef_we   (coef_we[j]),
      .coef_addr,
      .coef_data,
      .out_valid (ch_valid[j]),
      .out_i     (ch_i[j]),
      .out_q     (ch_q[j])
    );
  end

endmodule
