// Self-checking testbench of the CIC decimator.
// The reference is non-recursive: the impulse response h is the STAGES-fold
// convolution of a length-D boxcar, and output m (taken at input sample
// n_m = m*D - 1, counted from 0) must equal
//   floor( sum_k h[k] * x[n_m - STAGES - k] / 2^ceil(STAGES*log2 D) ),
// the STAGES-sample offset being the integrator pipeline. Checked for several
// factors with random full-scale input and input-valid gaps, plus the output
// rate (exactly one output per D accepted samples) and a restart of the
// decimation counter when the factor is switched.
module tb_cic_decimator;
  import dfe_pkg::*;
  localparam int S = CIC_N;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [DEC_SEL_W-1:0] dec_sel = '0;
  logic in_valid = 1'b0;
  logic signed [MIX_W-1:0] in_data = '0;
  logic out_valid;
  logic signed [MIX_W-1:0] out_data;
  int checks = 0, failures = 0;

  cic_decimator dut (.clk, .rst_n, .dec_sel, .in_valid, .in_data, .out_valid, .out_data);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint h [];
  int     x [$];      // accepted samples since reset
  int     n_acc;      // accepted sample count

  function automatic void make_h(int d);
    longint t [];
    h = new[1]; h[0] = 1;
    for (int s = 0; s < S; s++) begin
      t = new[h.size() + d - 1];
      foreach (t[i]) t[i] = 0;
      foreach (h[i]) for (int j = 0; j < d; j++) t[i+j] += h[i];
      h = t;
    end
  endfunction

  function automatic longint floor_shift(longint v, int sh);
    return v >>> sh;   // arithmetic shift = floor division by 2^sh
  endfunction

  int outs_seen, last_out_n, cur_d, cur_sh, gap_fail;

  // Collect outputs: compare with the reference as soon as they appear.
  bit value_check = 1'b1;
  always @(negedge clk) if (rst_n && out_valid && value_check) begin
    longint y;
    int n_m;
    outs_seen++;
    n_m = outs_seen * cur_d - 1;
    y = 0;
    for (int k = 0; k < h.size(); k++) begin
      int idx;
      idx = n_m - S - k;
      if (idx >= 0) y += h[k] * longint'(x[idx]);
    end
    checks++;
    if (longint'(out_data) != floor_shift(y, cur_sh)) begin
      failures++;
      if (failures < 10) $display("D=%0d out %0d = %0d, expected %0d", cur_d, outs_seen, out_data, floor_shift(y, cur_sh));
    end
  end

  task automatic run(int sel, int n_out, bit gaps, bit fullscale);
    rst_n = 1'b0;
    dec_sel = DEC_SEL_W'(sel);
    cur_d = int'(DEC_TABLE[sel]);
    cur_sh = cic_growth(DEC_TABLE[sel], S);
    make_h(cur_d);
    x.delete(); outs_seen = 0; n_acc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (outs_seen < n_out) begin
      @(negedge clk);
      in_valid = gaps ? ($urandom % 4 != 0) : 1'b1;
      if (fullscale) in_data = ($urandom % 2) ? 16'sh7FFF : -16'sh8000;
      else           in_data = MIX_W'($urandom);
      if (in_valid) begin x.push_back(int'(in_data)); n_acc++; end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (4) @(negedge clk);
    checks++;                     // rate: outputs = floor(accepted / D)
    if (outs_seen != n_acc / cur_d) begin
      failures++; $display("D=%0d: %0d outputs for %0d samples", cur_d, outs_seen, n_acc);
    end
  endtask

  initial begin
    int cnt, prev;
    repeat (3) @(negedge clk);
    run(0, 200, 1'b0, 1'b0);
    run(0, 100, 1'b1, 1'b0);
    run(1, 100, 1'b1, 1'b0);
    run(3, 40,  1'b0, 1'b1);
    run(5, 20,  1'b0, 1'b0);
    run(7, 12,  1'b0, 1'b1);
    // Output spacing after a factor switch: D_1 then D_3, counted in clocks.
    rst_n = 1'b0; dec_sel = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1; in_valid = 1'b1; in_data = 16'sd100; value_check = 1'b0;
    cnt = 0; prev = -1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      if (n == 200) dec_sel = 3'd2;
      if (n >= 210 && out_valid) begin
        checks++;
        if (prev >= 0 && n - prev != 60) begin failures++; $display("spacing %0d, expected 60", n - prev); end
        // the sample of the switching clock is not counted: first output 61 clocks on
        if (prev < 0 && n - 200 != 61) begin failures++; $display("first output %0d clocks after switch, expected 61", n - 200); end
        prev = n;
      end
    end
    in_valid = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
