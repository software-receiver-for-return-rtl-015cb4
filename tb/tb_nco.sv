// Self-checking testbench of the quadrature NCO.
// A mirror model of the phase register and accumulator predicts the table
// address of every clock; the expected sine and cosine are computed with real
// arithmetic, round(2047*sin(2*pi*a/1024)), independently of the ROM file.
// It also checks the output frequency f_clk*phase/2^32 by counting periods,
// and the one-clock reaction of the phase register to a new tuning word.
module tb_nco;
  import dfe_pkg::*;

  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [PHASE_W-1:0] phase_word = '0;
  logic signed [LUT_W-1:0] sin_out, cos_out;

  int checks = 0, failures = 0;

  nco dut (.clk, .rst_n, .phase_word, .sin_out, .cos_out);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mirror model
  logic [PHASE_W-1:0] m_reg, m_acc;
  logic [LUT_AW-1:0]  m_addr_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_reg <= '0; m_acc <= '0; m_addr_q <= '0;
    end else begin
      m_reg    <= phase_word;
      m_acc    <= m_acc + m_reg;
      m_addr_q <= m_acc[PHASE_W-1 -: LUT_AW];
    end
  end

  function automatic int ref_sin(int a);
    return int'($floor(2047.0 * $sin(2.0 * PI * real'(a) / 1024.0) + 0.5));
  endfunction

  bit compare_on = 1'b0;
  always @(negedge clk) if (compare_on) begin
    int es, ec;
    es = ref_sin(int'(m_addr_q));
    ec = ref_sin(int'(LUT_AW'(m_addr_q + 10'd256)));
    checks++;
    if (int'(sin_out) != es || int'(cos_out) != ec) begin
      failures++;
      if (failures < 10) $display("mismatch addr=%0d sin=%0d exp=%0d cos=%0d exp=%0d", m_addr_q, sin_out, es, cos_out, ec);
    end
  end

  int crossings;
  logic signed [LUT_W-1:0] prev_sin;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    @(negedge clk) compare_on = 1'b1;
    // 1) period-64 tone: phase = 2^32/64
    phase_word = 32'h0400_0000;
    repeat (10) @(negedge clk);
    crossings = 0; prev_sin = sin_out;
    repeat (640) begin
      @(negedge clk);
      if (prev_sin < 0 && sin_out >= 0) crossings++;
      prev_sin = sin_out;
    end
    checks++;
    if (crossings != 10) begin failures++; $display("period count %0d, expected 10", crossings); end
    // 2) arbitrary tuning words, including a non-integer period
    phase_word = 32'h1234_5678;
    repeat (500) @(negedge clk);
    phase_word = 32'hF000_0001;           // negative frequency
    repeat (500) @(negedge clk);
    phase_word = 32'd858993459;           // 153.6 MHz * w / 2^32 = 30.72 MHz
    crossings = 0; prev_sin = sin_out;
    repeat (1000) begin
      @(negedge clk);
      if (prev_sin < 0 && sin_out >= 0) crossings++;
      prev_sin = sin_out;
    end
    checks++;                              // 1000 clocks * 0.2 cycles/clock = 200 periods
    if (crossings < 199 || crossings > 201) begin failures++; $display("30.72 MHz tone: %0d periods", crossings); end
    compare_on = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
