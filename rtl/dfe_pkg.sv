// Shared constants and helper functions of the upstream receiver front end.
//
// The receiver digitizes the whole 5-65 MHz upstream band with a 10-bit ADC at
// 153.6 MHz (values taken from the receiver description) and selects single
// channels with per-channel digital front ends (NCO + mixers, decimating CIC,
// SRRC matched filter). The word lengths below other than the ADC width, the
// number of CIC stages and the eight decimation factors D_1..D_8 are this
// design's own choices; the description only states that there are eight
// programmable factors.
//
// D_k = 15 * 2^(k-1): 153.6 MHz / 15 = 10.24 MHz, i.e. two samples per symbol at
// 5.12 Msym/s, and each further step halves the output rate (2.56, 1.28, 0.64,
// 0.32, 0.16 Msym/s at two samples per symbol for k = 2..6).
package dfe_pkg;

  localparam int ADC_W     = 10;   // ADC resolution
  localparam int PHASE_W   = 32;   // NCO tuning word width (k)
  localparam int LUT_AW    = 10;   // log2 of NCO table length N
  localparam int LUT_W     = 12;   // NCO sample width (signed)
  localparam int MIX_W     = 16;   // mixer output / CIC input and output width
  localparam int CIC_N     = 4;    // number of integrator and comb stages (P)
  localparam int NUM_DEC   = 8;    // number of selectable decimation factors
  localparam int DEC_SEL_W = $clog2(NUM_DEC);
  localparam int NTAPS     = 33;   // SRRC filter length
  localparam int COEF_W    = 16;   // SRRC coefficient width (Q1.15)
  localparam int COEF_FRAC = 15;
  localparam int OUT_W     = 16;   // baseband output width
  localparam int CFG_AW    = 9;    // configuration address width
  localparam int CFG_DW    = 32;   // configuration data width

  typedef int unsigned dec_table_t [NUM_DEC];
  localparam dec_table_t DEC_TABLE = '{15, 30, 60, 120, 240, 480, 960, 1920};

  // Configuration address map of one channel.
  localparam logic [CFG_AW-1:0] CFG_PHASE   = 9'h000;  // NCO tuning word
  localparam logic [CFG_AW-1:0] CFG_DEC_SEL = 9'h001;  // decimation index k-1
  localparam logic [CFG_AW-1:0] CFG_IN_SEL  = 9'h002;  // input port of the switch
  localparam logic [CFG_AW-1:0] CFG_COEF0   = 9'h100;  // SRRC tap 0; tap i at 0x100+i

  // ceil(n * log2(d)): bit growth of an n-stage CIC decimating by d.
  function automatic int cic_growth(int unsigned d, int n);
    longint unsigned p;
    p = 1;
    for (int i = 0; i < n; i++) p = p * d;
    return $clog2(p);
  endfunction

  // Largest factor of a decimation table.
  function automatic int unsigned dec_max(dec_table_t t);
    int unsigned m;
    m = 0;
    for (int i = 0; i < NUM_DEC; i++) if (t[i] > m) m = t[i];
    return m;
  endfunction

endpackage
