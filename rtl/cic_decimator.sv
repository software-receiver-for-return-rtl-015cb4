// Decimating cascaded integrator-comb (CIC) filter with a programmable factor.
//
// Three sections, as in the receiver description: STAGES integrators running at
// the input (ADC) rate, a rate change that keeps one of every D_k integrator
// outputs, and STAGES comb sections (differential delay 1) running at the
// decimated rate. The response is H(z) = ((1 - z^-D) / (1 - z^-1))^STAGES, with
// no multipliers. D_k is one of NUM_DEC factors chosen by dec_sel (k-1).
//
// All registers are ACC_W = IN_W + ceil(STAGES*log2(max D)) bits wide, so the
// two's-complement wrap-around of the integrators cancels in the combs. The
// output is the comb result shifted right by ceil(STAGES*log2(D_k)) for the
// selected factor, which keeps the DC gain D_k^STAGES / 2^shift in (0.5, 1] and
// the output in IN_W bits. The number of stages, the factor table and this
// scaling are this design's choices; the description gives the structure and
// that there are eight factors.
//
// Timing: one out_valid pulse per D_k accepted input samples. Integrators are
// pipelined (one register per stage), which delays the response by STAGES-1
// input samples but does not change it. Changing dec_sel restarts the
// decimation counter: the sample arriving in the clock of the change is
// integrated but not counted, so the first output of the new factor comes
// D_k + 1 clocks after the change. The comb delays keep their old contents,
// so the first few outputs after a change are a transient.
module cic_decimator import dfe_pkg::*; #(
  parameter int IN_W   = MIX_W,
  parameter int STAGES = CIC_N
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [DEC_SEL_W-1:0]   dec_sel,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] in_data,
  output logic                   out_valid,
  output logic signed [IN_W-1:0] out_data
);

  localparam int unsigned DMAX = dec_max(DEC_TABLE);
  localparam int ACC_W = IN_W + cic_growth(DMAX, STAGES);
  localparam int CNT_W = $clog2(DMAX);

  typedef int shift_table_t [NUM_DEC];
  function automatic shift_table_t make_shifts();
    shift_table_t s;
    for (int i = 0; i < NUM_DEC; i++) s[i] = cic_growth(DEC_TABLE[i], STAGES);
    return s;
  endfunction
  localparam shift_table_t SHIFT = make_shifts();

  // ---------------- integrator section (input rate)
  logic signed [ACC_W-1:0] integ [STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < STAGES; i++) integ[i] <= '0;
    end else if (in_valid) begin
      integ[0] <= integ[0] + ACC_W'(in_data);
      for (int i = 1; i < STAGES; i++) integ[i] <= integ[i] + integ[i-1];
    end
  end

  // ---------------- rate change
  logic [CNT_W-1:0]     cnt;
  logic [DEC_SEL_W-1:0] sel_q;
  logic [CNT_W-1:0]     cnt_last;
  logic                 tick;

  assign cnt_last = CNT_W'(DEC_TABLE[sel_q] - 1);
  assign tick     = in_valid && (cnt == cnt_last) && (dec_sel == sel_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      sel_q <= '0;
    end else begin
      sel_q <= dec_sel;
      if (dec_sel != sel_q)  cnt <= '0;
      else if (in_valid)     cnt <= (cnt == cnt_last) ? '0 : cnt + 1'b1;
    end
  end

  // ---------------- comb section (decimated rate)
  logic signed [ACC_W-1:0] comb_dly [STAGES];
  logic signed [ACC_W-1:0] comb     [STAGES+1];
  logic signed [ACC_W-1:0] scaled;

  always_comb begin
    comb[0] = integ[STAGES-1];
    for (int i = 0; i < STAGES; i++) comb[i+1] = comb[i] - comb_dly[i];
    scaled = comb[STAGES] >>> SHIFT[sel_q];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < STAGES; i++) comb_dly[i] <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= tick;
      if (tick) begin
        for (int i = 0; i < STAGES; i++) comb_dly[i] <= comb[i];
        out_data <= IN_W'(scaled);
      end
    end
  end

endmodule
