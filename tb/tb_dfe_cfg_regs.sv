// Self-checking testbench of the configuration registers: reset values, random
// writes to every channel's phase word, decimation index and input select
// (checked against a shadow copy), coefficient writes forwarded to exactly the
// addressed channel one clock later, and writes to unused addresses ignored.
module tb_dfe_cfg_regs;
  import dfe_pkg::*;
  localparam int N_CH = 16, N_IN = 4, TAW = $clog2(NTAPS);

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we = 1'b0;
  logic [3:0] cfg_ch = '0;
  logic [CFG_AW-1:0] cfg_addr = '0;
  logic [CFG_DW-1:0] cfg_wdata = '0;
  logic [PHASE_W-1:0]    phase_word [N_CH];
  logic [DEC_SEL_W-1:0]  dec_sel    [N_CH];
  logic [1:0]            in_sel     [N_CH];
  logic [N_CH-1:0]       coef_we;
  logic [TAW-1:0]        coef_addr;
  logic signed [COEF_W-1:0] coef_data;
  int checks = 0, failures = 0;

  logic [PHASE_W-1:0]   s_phase [N_CH];
  logic [DEC_SEL_W-1:0] s_dec   [N_CH];
  logic [1:0]           s_in    [N_CH];

  dfe_cfg_regs #(.N_CH(N_CH), .N_IN(N_IN)) dut (.clk, .rst_n, .cfg_we, .cfg_ch, .cfg_addr, .cfg_wdata,
    .phase_word, .dec_sel, .in_sel, .coef_we, .coef_addr, .coef_data);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_regs();
    for (int j = 0; j < N_CH; j++) begin
      checks++;
      if (phase_word[j] != s_phase[j] || dec_sel[j] != s_dec[j] || in_sel[j] != s_in[j]) begin
        failures++;
        if (failures < 10) $display("ch %0d: phase %h/%h dec %0d/%0d in %0d/%0d", j, phase_word[j], s_phase[j], dec_sel[j], s_dec[j], in_sel[j], s_in[j]);
      end
    end
  endtask

  task automatic wr(int ch, int addr, logic [31:0] d);
    @(negedge clk);
    cfg_we = 1'b1; cfg_ch = 4'(ch); cfg_addr = CFG_AW'(addr); cfg_wdata = d;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  initial begin
    for (int j = 0; j < N_CH; j++) begin s_phase[j] = '0; s_dec[j] = '0; s_in[j] = 2'(j % N_IN); end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check_regs();
    for (int n = 0; n < 600; n++) begin
      int ch, kind;
      logic [31:0] d;
      ch = $urandom % N_CH; kind = $urandom % 5; d = $urandom;
      case (kind)
        0: begin wr(ch, 0, d); s_phase[ch] = d; end
        1: begin wr(ch, 1, d); s_dec[ch] = d[2:0]; end
        2: begin wr(ch, 2, d); s_in[ch] = d[1:0]; end
        3: begin wr(ch, 3 + ($urandom % 200), d); end        // unused address
        default: begin
          int t;
          t = $urandom % NTAPS;
          @(negedge clk);
          cfg_we = 1'b1; cfg_ch = 4'(ch); cfg_addr = CFG_AW'(256 + t); cfg_wdata = d;
          @(negedge clk);
          cfg_we = 1'b0;
          checks++;
          if (coef_we != (16'd1 << ch) || int'(coef_addr) != t || coef_data != COEF_W'(d)) begin
            failures++;
            if (failures < 10) $display("coef write ch %0d tap %0d: we=%b addr=%0d data=%h", ch, t, coef_we, coef_addr, coef_data);
          end
          @(negedge clk);
          checks++;
          if (coef_we != '0) begin failures++; $display("coef_we held"); end
        end
      endcase
      check_regs();
    end
    // a tap index past the filter length is ignored
    wr(3, 256 + NTAPS, 32'h1234);
    checks++;
    if (coef_we != '0) begin failures++; $display("out-of-range tap forwarded"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
