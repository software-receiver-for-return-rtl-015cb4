// End-to-end testbench of the receiver with every parameter at its default
// (4 inputs, 16 front ends).
//
// Input port p carries two tones, at 10.24*(p+1) MHz and 10.24*(p+2) MHz (their
// doubles fall on nulls of every CIC factor), with amplitudes that differ from
// port to port. All configuration goes through the processor write bus. Front
// end j = 4p+q takes port p (not its reset default) and
//   q=0: tunes to the first tone of port p, D_1 = 15
//   q=1: tunes to the second tone, D_2 = 30
//   q=2: tunes 0.1 MHz above the first tone, D_3 = 60 (rotating phasor)
//   q=3: tunes to 10.24*((p+3) mod 4 + 1) MHz, a tone that exists only on
//        other ports, D_4 = 120 (must stay near zero: the switch isolates them)
// Taps are SRRC with roll-off 0.25 at 2 samples per symbol. In a second phase
// the processor moves front end 3 to port 2 (its tone then appears), changes
// front end 0 to D_2 and reloads front end 5 with roll-off-0.3 taps. In a third
// phase front ends 8..11 switch to the narrow factors D_5..D_8 (240..1920).
// Expected magnitudes come from the chain's gains, as in the single front end
// test: A*2047/64 * D^4/2^ceil(4*log2 D) * sum(taps)/2^15 * CIC droop.
// Each mechanism (input routing, switch change, each decimation factor, factor
// change, coefficient reload, rejection of an absent tone, offset rotation) is
// counted, and one that never happened counts as a failure.
module tb_return_path_receiver;
  import dfe_pkg::*;
  import tb_util_pkg::*;

  localparam int N_IN = 4, N_CH = 16;
  localparam real FS = 153.6e6;
  localparam int SETTLE = 45;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [ADC_W-1:0] adc_data [N_IN];
  logic cfg_we = 1'b0;
  logic [3:0] cfg_ch = '0;
  logic [CFG_AW-1:0] cfg_addr = '0;
  logic [CFG_DW-1:0] cfg_wdata = '0;
  logic [N_CH-1:0] ch_valid;
  logic signed [OUT_W-1:0] ch_i [N_CH];
  logic signed [OUT_W-1:0] ch_q [N_CH];
  int checks = 0, failures = 0;

  return_path_receiver dut (.clk, .rst_n, .adc_data, .cfg_we, .cfg_ch, .cfg_addr, .cfg_wdata, .ch_valid, .ch_i, .ch_q);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus: two tones per input port
  real f1 [N_IN], f2 [N_IN], a1 [N_IN], a2 [N_IN], ph1 [N_IN], ph2 [N_IN];
  initial for (int p = 0; p < N_IN; p++) begin
    f1[p] = 10.24e6 * real'(p + 1);  f2[p] = 10.24e6 * real'(p + 2);
    a1[p] = 150.0 + 30.0 * real'(p); a2[p] = 200.0 - 20.0 * real'(p);
    ph1[p] = 0.1 * real'(p); ph2[p] = 1.0 + 0.2 * real'(p);
  end
  always @(negedge clk) for (int p = 0; p < N_IN; p++) begin
    adc_data[p] = ADC_W'(int'($floor(a1[p] * $cos(ph1[p]) + a2[p] * $cos(ph2[p]) + 0.5)));
    ph1[p] += 2.0 * PI * f1[p] / FS; if (ph1[p] > 2.0 * PI) ph1[p] -= 2.0 * PI;
    ph2[p] += 2.0 * PI * f2[p] / FS; if (ph2[p] > 2.0 * PI) ph2[p] -= 2.0 * PI;
  end

  // ---------------- per-channel expectation
  real m_lo [N_CH], m_hi [N_CH];
  int  dch [N_CH], seen [N_CH], last [N_CH], sgn [N_CH], rot [N_CH], measured [N_CH];
  int  ev_route, ev_switch, ev_dec_change, ev_reload, ev_reject, ev_rotate;
  int  ev_dec [NUM_DEC];
  int  tsum25, tsum30;
  int  cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic real cic_droop(real f_off, int d);
    real r, x;
    x = PI * f_off * real'(d) / FS;
    if (x == 0.0) return 1.0;
    r = $sin(x) / (real'(d) * $sin(x / real'(d)));
    return r * r * r * r;
  endfunction

  function automatic real chain_gain(int d, int tsum, real f_off);
    return 2047.0 / 64.0 * real'(d)**4 / real'(64'd1 << cic_growth(d, CIC_N)) * real'(tsum) / 32768.0 * cic_droop(f_off, d);
  endfunction

  always @(negedge clk) if (rst_n) for (int j = 0; j < N_CH; j++) if (ch_valid[j]) begin
    real mag;
    seen[j]++;
    if (seen[j] > SETTLE) begin
      mag = $sqrt(real'(ch_i[j]) * real'(ch_i[j]) + real'(ch_q[j]) * real'(ch_q[j]));
      checks++;
      measured[j]++;
      if (mag < m_lo[j] || mag > m_hi[j]) begin
        failures++;
        if (failures < 20) $display("ch %0d: |y| = %f, expected %f..%f", j, mag, m_lo[j], m_hi[j]);
      end
      checks++;
      if (cyc - last[j] != dch[j]) begin failures++; $display("ch %0d: spacing %0d, expected %0d", j, cyc - last[j], dch[j]); end
      else ev_dec[$clog2(dch[j] / 15)]++;
      if (sgn[j] != 0 && (ch_i[j] < 0 ? -1 : 1) != sgn[j]) rot[j]++;
      sgn[j] = ch_i[j] < 0 ? -1 : 1;
    end
    last[j] = cyc;
  end

  task automatic wr(int ch, int addr, int d);
    @(negedge clk);
    cfg_we = 1'b1; cfg_ch = 4'(ch); cfg_addr = CFG_AW'(addr); cfg_wdata = d;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  function automatic int pw(real f);
    return int'(longint'($floor(f / FS * 4294967296.0 + 0.5)));
  endfunction

  // expectation for a tone of amplitude a at offset f_off, or for rejection
  task automatic expect_tone(int j, real a, int d, int tsum, real f_off);
    m_lo[j] = 0.94 * a * chain_gain(d, tsum, f_off);
    m_hi[j] = 1.06 * a * chain_gain(d, tsum, f_off);
    dch[j] = d; seen[j] = 0; sgn[j] = 0; rot[j] = 0;
  endtask
  task automatic expect_nothing(int j, int d);
    m_lo[j] = 0.0; m_hi[j] = 0.02 * 150.0 * chain_gain(d, tsum25, 0.0);
    dch[j] = d; seen[j] = 0; sgn[j] = 0; rot[j] = 0;
  endtask

  task automatic load_taps(int j, real alpha);
    for (int i = 0; i < NTAPS; i++) wr(j, 256 + i, srrc_tap(i, NTAPS, alpha, 2.0));
  endtask

  task automatic wait_outputs(int j, int n);
    while (measured[j] < n) @(negedge clk);
  endtask

  initial begin
    tsum25 = 0; tsum30 = 0;
    for (int i = 0; i < NTAPS; i++) begin tsum25 += srrc_tap(i, NTAPS, 0.25, 2.0); tsum30 += srrc_tap(i, NTAPS, 0.3, 2.0); end
    ev_route = 0; ev_switch = 0; ev_dec_change = 0; ev_reload = 0; ev_reject = 0; ev_rotate = 0;
    for (int k = 0; k < NUM_DEC; k++) ev_dec[k] = 0;
    for (int j = 0; j < N_CH; j++) begin
      m_lo[j] = 0.0; m_hi[j] = 1.0e9; dch[j] = 15; seen[j] = -1000000; last[j] = 0; sgn[j] = 0; rot[j] = 0; measured[j] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // ---------------- phase 1: program all sixteen front ends
    for (int j = 0; j < N_CH; j++) begin
      int p, q;
      p = j / 4; q = j % 4;
      load_taps(j, 0.25);
      wr(j, 2, p);
      if (p != j % N_IN) ev_route++;
      wr(j, 1, q);
      case (q)
        0: wr(j, 0, pw(f1[p]));
        1: wr(j, 0, pw(f2[p]));
        2: wr(j, 0, pw(f1[p] + 0.1e6));
        default: wr(j, 0, pw(10.24e6 * real'((p + 3) % 4 + 1)));
      endcase
    end
    for (int j = 0; j < N_CH; j++) begin
      int p, q;
      p = j / 4; q = j % 4;
      case (q)
        0: expect_tone(j, a1[p], 15, tsum25, 0.0);
        1: expect_tone(j, a2[p], 30, tsum25, 0.0);
        2: expect_tone(j, a1[p], 60, tsum25, -0.1e6);
        default: expect_nothing(j, 120);
      endcase
    end
    for (int j = 0; j < N_CH; j++) wait_outputs(j, 12);
    for (int j = 0; j < N_CH; j++) begin
      if (j % 4 == 3) ev_reject++;
      if (j % 4 == 2 && rot[j] >= 2) ev_rotate++;
    end
    // ---------------- phase 2: reconfigure while running
    wr(3, 2, 2);                     // front end 3 now listens to port 2 (tone 40.96 MHz = f2[2])
    expect_tone(3, a2[2], 120, tsum25, 0.0);
    ev_switch++;
    wr(0, 1, 1);                     // front end 0: D_1 -> D_2
    expect_tone(0, a1[0], 30, tsum25, 0.0);
    ev_dec_change++;
    load_taps(5, 0.3);               // front end 5: DVB roll-off
    expect_tone(5, a2[1], 30, tsum30, 0.0);
    ev_reload++;
    for (int j = 0; j < N_CH; j++) measured[j] = 0;
    wait_outputs(3, 10); wait_outputs(0, 10); wait_outputs(5, 10);
    // ---------------- phase 3: the narrow factors D_5..D_8 on front ends 8..11
    wr(8, 1, 4);  expect_tone(8, a1[2], 240, tsum25, 0.0);
    wr(9, 1, 5);  expect_tone(9, a2[2], 480, tsum25, 0.0);
    wr(10, 0, pw(f1[2])); wr(10, 1, 6); expect_tone(10, a1[2], 960, tsum25, 0.0);
    wr(11, 1, 7); expect_nothing(11, 1920);
    ev_dec_change += 4;
    for (int j = 8; j < 12; j++) measured[j] = 0;
    for (int j = 8; j < 12; j++) wait_outputs(j, 4);
    // ---------------- mechanisms
    checks++; if (ev_route == 0)      begin failures++; $display("no routed input"); end
    checks++; if (ev_switch == 0)     begin failures++; $display("no switch change"); end
    checks++; if (ev_dec_change == 0) begin failures++; $display("no factor change"); end
    checks++; if (ev_reload == 0)     begin failures++; $display("no coefficient reload"); end
    checks++; if (ev_reject != 4)     begin failures++; $display("rejection cases %0d", ev_reject); end
    checks++; if (ev_rotate != 4)     begin failures++; $display("rotating outputs %0d of 4", ev_rotate); end
    for (int k = 0; k < NUM_DEC; k++) begin
      checks++; if (ev_dec[k] == 0) begin failures++; $display("factor D_%0d never ran", k + 1); end
    end
    $display("events: routed %0d, switch %0d, factor change %0d, reload %0d, rejected %0d, rotating %0d, outputs at D_1..D_8: %0d %0d %0d %0d %0d %0d %0d %0d, clocks %0d",
             ev_route, ev_switch, ev_dec_change, ev_reload, ev_reject, ev_rotate,
             ev_dec[0], ev_dec[1], ev_dec[2], ev_dec[3], ev_dec[4], ev_dec[5], ev_dec[6], ev_dec[7], cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
