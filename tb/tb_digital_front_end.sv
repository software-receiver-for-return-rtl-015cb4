// End-to-end testbench of one digital front end.
// The input is a real tone x[n] = round(A*cos(2*pi*f*n/f_clk + phi)); the NCO is
// tuned near f and the matched filter is loaded with SRRC taps (roll-off 0.25,
// 2 samples per symbol). Expected values are worked out from the signal chain's
// gains, independently of the RTL:
//   |I + jQ| = A*2047/64 * D^4/2^ceil(4*log2 D) * (sum of taps)/2^15 * droop(f_off)
// where droop is the 4-stage CIC passband droop at the offset frequency. Checks:
// the magnitude of every settled output, strong rejection of a tone outside the
// channel, rotation of the output phasor for an in-channel offset, and the
// output rate (exactly one sample per D clocks).
module tb_digital_front_end;
  import dfe_pkg::*;
  import tb_util_pkg::*;

  localparam real FS = 153.6e6;
  localparam real A  = 400.0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [ADC_W-1:0] adc_data = '0;
  logic [PHASE_W-1:0] phase_word = '0;
  logic [DEC_SEL_W-1:0] dec_sel = '0;
  logic coef_we = 1'b0;
  logic [$clog2(NTAPS)-1:0] coef_addr = '0;
  logic signed [COEF_W-1:0] coef_data = '0;
  logic out_valid;
  logic signed [OUT_W-1:0] out_i, out_q;
  int checks = 0, failures = 0;

  digital_front_end dut (.clk, .rst_n, .adc_data, .phase_word, .dec_sel, .coef_we, .coef_addr, .coef_data,
                         .out_valid, .out_i, .out_q);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // tone generator, one sample per clock
  real f_tone = 0.0, ph = 0.3;
  always @(negedge clk) begin
    adc_data = ADC_W'(int'($floor(A * $cos(ph) + 0.5)));
    ph = ph + 2.0 * PI * f_tone / FS;
    if (ph > 2.0 * PI) ph = ph - 2.0 * PI;
  end

  int tap_sum;

  function automatic real cic_droop(real f_off, int d);
    real r, x;
    x = PI * f_off * real'(d) / FS;
    if (x == 0.0) return 1.0;
    r = $sin(x) / (real'(d) * $sin(x / real'(d)));
    return r * r * r * r;
  endfunction

  // Run one case: returns through failures. Skips `settle` outputs.
  task automatic run_case(string name, int sel, real f_nco, real f_off, int n_out, real lo, real hi, bit want_rotation);
    int d, seen, last, sign_changes, prev_sign;
    real m_exp, mag, g;
    d = int'(DEC_TABLE[sel]);
    phase_word = PHASE_W'(longint'($floor(f_nco / FS * 4294967296.0 + 0.5)));
    f_tone = f_nco + f_off;
    dec_sel = DEC_SEL_W'(sel);
    g = real'(d)**4 / real'(64'd1 << cic_growth(d, CIC_N));
    m_exp = A * 2047.0 / 64.0 * g * real'(tap_sum) / 32768.0 * cic_droop(f_off, d);
    seen = 0; last = -1; sign_changes = 0; prev_sign = 0;
    for (int n = 0; seen < n_out + 45; n++) begin
      @(negedge clk);
      if (out_valid) begin
        seen++;
        if (seen > 45) begin        // CIC and SRRC have settled
          mag = $sqrt(real'(out_i) * real'(out_i) + real'(out_q) * real'(out_q));
          checks++;
          if (mag < lo * m_exp || mag > hi * m_exp) begin
            failures++;
            if (failures < 10) $display("%s: |y| = %f, expected %f..%f", name, mag, lo*m_exp, hi*m_exp);
          end
          checks++;
          if (n - last != d) begin failures++; $display("%s: output spacing %0d, expected %0d", name, n - last, d); end
          if (prev_sign != 0 && (out_i < 0 ? -1 : 1) != prev_sign) sign_changes++;
          prev_sign = out_i < 0 ? -1 : 1;
        end
        last = n;
      end
    end
    if (want_rotation) begin
      checks++;
      if (sign_changes < 2) begin failures++; $display("%s: output phasor does not rotate", name); end
    end
    $display("%s: expected |y| = %f", name, m_exp);
  endtask

  initial begin
    tap_sum = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NTAPS; i++) begin
      @(negedge clk);
      coef_we = 1'b1; coef_addr = $clog2(NTAPS)'(i); coef_data = COEF_W'(srrc_tap(i, NTAPS, 0.25, 2.0));
      tap_sum += srrc_tap(i, NTAPS, 0.25, 2.0);
    end
    @(negedge clk) coef_we = 1'b0;
    // 6.4 MHz channel at 30 MHz, tone on the carrier: constant baseband
    run_case("D1 on carrier", 0, 30.0e6, 0.0, 60, 0.96, 1.04, 1'b0);
    // tone 4.5 MHz off the carrier, outside the +-4 MHz channel: rejected
    run_case("D1 out of band", 0, 30.0e6, 4.5e6, 60, 0.0, 0.10, 1'b0);
    // 1.6 MHz channel at 41.3 MHz, tone 0.2 MHz off: rotating phasor
    run_case("D3 offset", 2, 41.3e6, 0.2e6, 40, 0.93, 1.05, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
