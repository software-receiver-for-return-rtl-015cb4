// Configuration registers through which the controlling processor programs the
// front ends: per channel, the NCO tuning word, the decimation index (k-1 of
// D_k) and the input port taken from the switch; matched-filter coefficient
// writes are passed on to the addressed channel. That the processor sets these
// quantities follows the receiver description; the write bus and the address
// map below are this design's choice.
//
//   cfg_addr 0x000  phase word  (PHASE_W bits)
//            0x001  dec_sel     (DEC_SEL_W bits)
//            0x002  in_sel      ($clog2(N_IN) bits)
//            0x100+i SRRC tap i (COEF_W bits, Q1.15), i < NTAPS
//
// Timing: a write with cfg_we high is visible on the register outputs the next
// clock; coefficient writes appear on coef_we/coef_addr/coef_data the next clock
// and are stored by the filter one clock later. Reset clears the registers,
// except that channel j's input select resets to j mod N_IN.
// Lint tools report rst_n as used both asynchronously and synchronously: the
// synchronous use is only the disable condition of the one-hot assertion.
module dfe_cfg_regs import dfe_pkg::*; #(
  parameter int N_CH      = 16,
  parameter int N_IN      = 4,
  parameter int PHASE_W_P = PHASE_W,
  parameter int NTAPS_P   = NTAPS,
  localparam int CHW      = (N_CH > 1) ? $clog2(N_CH) : 1,
  localparam int SW       = (N_IN > 1) ? $clog2(N_IN) : 1,
  localparam int TAW      = $clog2(NTAPS_P)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    cfg_we,
  input  logic [CHW-1:0]          cfg_ch,
  input  logic [CFG_AW-1:0]       cfg_addr,
  input  logic [CFG_DW-1:0]       cfg_wdata,
  output logic [PHASE_W_P-1:0]    phase_word [N_CH],
  output logic [DEC_SEL_W-1:0]    dec_sel    [N_CH],
  output logic [SW-1:0]           in_sel     [N_CH],
  output logic [N_CH-1:0]         coef_we,
  output logic [TAW-1:0]          coef_addr,
  output logic signed [COEF_W-1:0] coef_data
);

  logic is_coef;
  assign is_coef = (cfg_addr >= CFG_COEF0) && (int'(CFG_AW'(cfg_addr - CFG_COEF0)) < NTAPS_P);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < N_CH; j++) begin
        phase_word[j] <= '0;
        dec_sel[j]    <= '0;
        in_sel[j]     <= SW'(j % N_IN);
      end
      coef_we   <= '0;
      coef_addr <= '0;
      coef_data <= '0;
    end else begin
      coef_we <= '0;
      if (cfg_we && int'(cfg_ch) < N_CH) begin
        unique case (1'b1)
          cfg_addr == CFG_PHASE:   phase_word[cfg_ch] <= cfg_wdata[PHASE_W_P-1:0];
          cfg_addr == CFG_DEC_SEL: dec_sel[cfg_ch]    <= cfg_wdata[DEC_SEL_W-1:0];
          cfg_addr == CFG_IN_SEL:  in_sel[cfg_ch]     <= cfg_wdata[SW-1:0];
          is_coef: begin
            coef_we[cfg_ch] <= 1'b1;
            coef_addr       <= TAW'(cfg_addr - CFG_COEF0);
            coef_data       <= cfg_wdata[COEF_W-1:0];
          end
          default: ;
        endcase
      end
    end
  end

  // At most one channel receives a coefficient write per clock.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(coef_we));

endmodule
