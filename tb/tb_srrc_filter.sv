// Self-checking testbench of the SRRC matched filter.
// Writes random (and then square-root raised-cosine) coefficients through the
// write port, feeds random samples with random gaps, and compares every output
// with a convolution computed in the testbench, including round-half-up and
// saturation, and with the two-clock latency from in_valid to out_valid.
module tb_srrc_filter;
  import dfe_pkg::*;
  localparam int T = NTAPS;

  logic clk = 1'b0, rst_n = 1'b0;
  logic coef_we = 1'b0;
  logic [$clog2(T)-1:0] coef_addr = '0;
  logic signed [COEF_W-1:0] coef_data = '0;
  logic in_valid = 1'b0;
  logic signed [MIX_W-1:0] in_data = '0;
  logic out_valid;
  logic signed [OUT_W-1:0] out_data;
  int checks = 0, failures = 0, saturations = 0;

  srrc_filter dut (.clk, .rst_n, .coef_we, .coef_addr, .coef_data, .in_valid, .in_data, .out_valid, .out_data);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int c [T];
  int hist [$];
  int exp_q [$];      // expected outputs
  int vpipe [2];      // valid pipeline model, counts clocks

  task automatic write_coef(int i, int v);
    @(negedge clk);
    coef_we = 1'b1; coef_addr = $clog2(T)'(i); coef_data = COEF_W'(v); c[i] = v;
    @(negedge clk);
    coef_we = 1'b0;
  endtask

  function automatic int expected();
    longint acc;
    acc = 0;
    for (int i = 0; i < T; i++) if (hist.size() > i) acc += longint'(c[i]) * longint'(hist[hist.size()-1-i]);
    acc = (acc + (64'sd1 <<< (COEF_FRAC-1))) >>> COEF_FRAC;
    if (acc > 32767)  begin saturations++; acc = 32767;  end
    if (acc < -32768) begin saturations++; acc = -32768; end
    return int'(acc);
  endfunction

  // Latency check: out_valid must be in_valid delayed by two clocks.
  logic v_d1 = 1'b0, v_d2 = 1'b0;
  always @(posedge clk) begin v_d2 <= v_d1; v_d1 <= in_valid; end
  always @(negedge clk) if (rst_n) begin
    if (out_valid !== v_d2) begin failures++; $display("out_valid latency wrong"); end
    if (out_valid) begin
      int e;
      e = exp_q.pop_front();
      checks++;
      if (int'(out_data) != e) begin
        failures++;
        if (failures < 10) $display("out %0d expected %0d", out_data, e);
      end
    end
  end

  task automatic stream(int n, int amp);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      in_valid = ($urandom % 3 != 0);
      in_data = MIX_W'(int'($urandom % (2*amp+1)) - amp);
      if (in_valid) begin hist.push_back(int'(in_data)); exp_q.push_back(expected()); end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    for (int i = 0; i < T; i++) c[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // coefficients are zero after reset
    stream(50, 30000);
    // random coefficients, small then full-scale input (saturation)
    for (int i = 0; i < T; i++) write_coef(i, int'($urandom % 8001) - 4000);
    stream(400, 3000);
    for (int i = 0; i < T; i++) write_coef(i, int'($urandom % 40001) - 20000);
    stream(400, 32767);
    // SRRC, roll-off 0.25, 2 samples per symbol, DC gain 1
    for (int i = 0; i < T; i++) write_coef(i, tb_util_pkg::srrc_tap(i, T, 0.25, 2.0));
    stream(400, 20000);
    checks++;
    if (saturations == 0) begin failures++; $display("saturation never exercised"); end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d outputs missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
