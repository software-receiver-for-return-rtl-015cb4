// Workload testbench: every upstream channel width of the two standards on one
// front end at its default parameters.
//   DOCSIS 6.4, 3.2, 1.6, 0.8, 0.4, 0.2 MHz: 5.12 .. 0.16 Msym/s, D_1..D_6,
//          SRRC roll-off 0.25 at 2 samples per symbol.
//   DVB    4, 2, 1 MHz: 3.088, 1.544, 0.772 Msym/s, D_1..D_3, roll-off 0.3 at
//          10.24/3.088 = 3.32 samples per symbol.
// (The symbol rates are those of the two standards.) For each width the test
// puts a tone on the carrier and checks the output magnitude against the chain
// gain (A*2047/64 * 0.7725 * sum(taps)/2^15), then moves the tone one channel
// width above the carrier, into the neighbouring channel, and checks that it is
// rejected to below 5 % of the in-band magnitude. It also checks the output
// rate of one sample per D_k clocks.
module tb_channel_widths;
  import dfe_pkg::*;
  import tb_util_pkg::*;

  localparam real FS = 153.6e6;
  localparam real A  = 400.0;
  localparam real FC = 25.6e6;       // carrier, a multiple of 5.12 MHz

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [ADC_W-1:0] adc_data = '0;
  logic [PHASE_W-1:0] phase_word = '0;
  logic [DEC_SEL_W-1:0] dec_sel = '0;
  logic coef_we = 1'b0;
  logic [$clog2(NTAPS)-1:0] coef_addr = '0;
  logic signed [COEF_W-1:0] coef_data = '0;
  logic out_valid;
  logic signed [OUT_W-1:0] out_i, out_q;
  int checks = 0, failures = 0, widths_run = 0;

  digital_front_end dut (.clk, .rst_n, .adc_data, .phase_word, .dec_sel, .coef_we, .coef_addr, .coef_data,
                         .out_valid, .out_i, .out_q);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real f_tone = FC, ph = 0.7;
  always @(negedge clk) begin
    adc_data = ADC_W'(int'($floor(A * $cos(ph) + 0.5)));
    ph = ph + 2.0 * PI * f_tone / FS;
    if (ph > 2.0 * PI) ph = ph - 2.0 * PI;
  end

  // Smallest and largest settled output magnitude over n outputs; checks spacing.
  task automatic measure(string name, int d, int n, output real mag_min, output real mag_max);
    int seen, last, cyc;
    real mag;
    seen = 0; last = -1; cyc = 0; mag_min = 1.0e9; mag_max = 0.0;
    while (seen < n + 45) begin
      @(negedge clk);
      cyc++;
      if (out_valid) begin
        seen++;
        if (seen > 45) begin
          mag = $sqrt(real'(out_i) * real'(out_i) + real'(out_q) * real'(out_q));
          if (mag < mag_min) mag_min = mag;
          if (mag > mag_max) mag_max = mag;
          checks++;
          if (cyc - last != d) begin failures++; $display("%s: spacing %0d, expected %0d", name, cyc - last, d); end
        end
        last = cyc;
      end
    end
  endtask

  task automatic run_width(string name, int sel, real width, real alpha, real sps);
    int d, tsum;
    real m_exp, lo, hi, rlo, rhi;
    d = int'(DEC_TABLE[sel]);
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    tsum = 0;
    for (int i = 0; i < NTAPS; i++) begin
      @(negedge clk);
      coef_we = 1'b1; coef_addr = $clog2(NTAPS)'(i); coef_data = COEF_W'(srrc_tap(i, NTAPS, alpha, sps));
      tsum += srrc_tap(i, NTAPS, alpha, sps);
    end
    @(negedge clk) coef_we = 1'b0;
    dec_sel = DEC_SEL_W'(sel);
    phase_word = PHASE_W'(longint'($floor(FC / FS * 4294967296.0 + 0.5)));
    m_exp = A * 2047.0 / 64.0 * real'(d)**4 / real'(64'd1 << cic_growth(d, CIC_N)) * real'(tsum) / 32768.0;
    f_tone = FC;
    measure(name, d, 16, lo, hi);
    checks++;
    if (lo < 0.95 * m_exp || hi > 1.05 * m_exp) begin
      failures++; $display("%s: in-band |y| %f..%f, expected %f", name, lo, hi, m_exp);
    end
    f_tone = FC + width;             // neighbouring channel
    measure(name, d, 16, rlo, rhi);
    checks++;
    if (rhi > 0.05 * m_exp) begin
      failures++; $display("%s: adjacent-channel tone passes at %f (in-band %f)", name, rhi, m_exp);
    end
    $display("%-12s D=%0d in-band |y| %f..%f (expected %f), adjacent channel %.1f dB", name, d, lo, hi, m_exp,
             20.0 * $log10((rhi + 1.0) / m_exp));
    widths_run++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    run_width("DOCSIS 6.4", 0, 6.4e6, 0.25, 2.0);
    run_width("DOCSIS 3.2", 1, 3.2e6, 0.25, 2.0);
    run_width("DOCSIS 1.6", 2, 1.6e6, 0.25, 2.0);
    run_width("DOCSIS 0.8", 3, 0.8e6, 0.25, 2.0);
    run_width("DOCSIS 0.4", 4, 0.4e6, 0.25, 2.0);
    run_width("DOCSIS 0.2", 5, 0.2e6, 0.25, 2.0);
    run_width("DVB 4", 0, 4.0e6, 0.3, 10.24 / 3.088);
    run_width("DVB 2", 1, 2.0e6, 0.3, 10.24 / 3.088);
    run_width("DVB 1", 2, 1.0e6, 0.3, 10.24 / 3.088);
    checks++;
    if (widths_run != 9) begin failures++; $display("only %0d widths ran", widths_run); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
