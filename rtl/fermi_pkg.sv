// fermi_pkg -- constants and types shared by the FERMI front-end readout module.
//
// A FERMI module serves nine calorimeter channels. Each channel digitises its
// compressed analog signal with a 10-bit ADC and expands it through a look-up
// table to a linear 16-bit sample; these numbers follow the published design.
// The memory depth (13 address bits), the coefficient formats of the two
// digital filters and the configuration register map are this design's own
// choices, made where the published description gives no figure.
//
// Configuration bus (cfg_we / cfg_addr / cfg_wdata, one write per clock):
//   cfg_addr[19:16] target (cfg_target_e), [15:12] channel (15 = all channels),
//   [11:0] index within the target.
package fermi_pkg;

  localparam int unsigned N_CH        = 9;   // channels per module
  localparam int unsigned ADC_BITS    = 10;  // ADC output word
  localparam int unsigned SAMPLE_BITS = 16;  // linear sample after the LUT
  localparam int unsigned SUM_BITS    = 20;  // nine 16-bit samples
  localparam int unsigned ADDR_BITS   = 13;  // 8192 samples per channel memory
  localparam int unsigned FIR_W       = 32;  // first-level FIR output (signed)
  localparam int unsigned AMP_W       = 32;  // second-level filter output (signed)
  localparam int unsigned ECC_W       = 22;  // 16 data + 5 Hamming + 1 parity
  localparam int unsigned MAX_FRAME   = 8;   // longest time frame, samples
  localparam int unsigned CFG_AW      = 20;
  localparam int unsigned CFG_DW      = 32;

  typedef logic [SAMPLE_BITS-1:0] sample_t;
  typedef logic [ADDR_BITS-1:0]   addr_t;

  // One barrel-shifter term of a first-level FIR coefficient: when en is set
  // it contributes (neg ? -1 : +1) * 2^(1-shift), i.e. 2, 1, 1/2 ... 1/64.
  typedef struct packed {
    logic       en;
    logic       neg;
    logic [2:0] shift;
  } bs_term_t;

  // A coefficient is the sum of two terms (two barrel shifters per tap).
  typedef struct packed {
    bs_term_t a;
    bs_term_t b;
  } bs_coef_t;

  // Fractional bits carried inside the first-level FIR.
  localparam int unsigned BS_FRAC = 6;

  typedef enum logic [3:0] {
    CFG_LUT      = 4'd0,  // index[9:0] = ADC code, data[15:0] = sample
    CFG_THR      = 4'd1,  // data[15:0] = threshold
    CFG_L1COEF   = 4'd2,  // index[3] = filter (0 timing, 1 energy), index[2:0] = tap
    CFG_PILEUP   = 4'd3,  // data[7:0] = pile-up window in crossings
    CFG_L2COEF   = 4'd4,  // index[6] = bank, index[5:4] = subfilter, index[2:0] = tap
    CFG_L2RANK   = 4'd5,  // data[1:0] = r-1 of the order-statistic operator
    CFG_PATCH    = 4'd6,  // index[1:0] = entry, data[16] = valid, data[12:0] = address
    CFG_ECCFLIP  = 4'd7   // data[21:0] = diagnostic codeword flip mask
  } cfg_target_e;

  // Word sent to the second and third-level trigger.
  typedef struct packed {
    logic                 reduced;  // 1: filtered amplitude, 0: raw sample
    logic [3:0]           chan;
    logic [2:0]           idx;      // sample index within the frame (raw only)
    logic                 err;      // uncorrectable memory error in the data
    logic [AMP_W-1:0]     data;     // raw sample (zero extended) or amplitude
  } ro_word_t;

  // Extended Hamming (22,16) code of the channel memories. Codeword bit 0 is
  // the overall parity; bits 1..21 are Hamming positions, with check bits at
  // the powers of two (1, 2, 4, 8, 16) and data bits, LSB first, elsewhere.
  function automatic logic [ECC_W-1:0] secded_encode(input logic [15:0] d);
    logic [ECC_W-1:0] c;
    int k;
    c = '0;
    k = 0;
    for (int p = 1; p < ECC_W; p++)
      if ((p & (p - 1)) != 0) begin
        c[p] = d[k];
        k++;
      end
    for (int b = 0; b < 5; b++)
      for (int p = 1; p < ECC_W; p++)
        if (((p >> b) & 1) != 0 && p != (1 << b)) c[1 << b] ^= c[p];
    c[0] = ^c[ECC_W-1:1];
    return c;
  endfunction

  typedef struct packed {
    logic [15:0] data;
    logic        sec;   // a single error was corrected
    logic        ded;   // a double error was detected, data invalid
  } secded_result_t;

  function automatic secded_result_t secded_decode(input logic [ECC_W-1:0] cw);
    secded_result_t r;
    logic [4:0]       syn;
    logic             par;
    logic [ECC_W-1:0] c;
    int k;
    syn = '0;
    for (int p = 1; p < ECC_W; p++)
      if (cw[p]) syn ^= 5'(p);
    par = ^cw;
    c = cw;
    r.sec = 1'b0;
    r.ded = 1'b0;
    if (syn != 0 && par) begin
      if (int'(syn) < ECC_W) c[syn] = ~c[syn];
      else r.ded = 1'b1;                 // points outside the word
      r.sec = ~r.ded;
    end else if (syn == 0 && par) begin
      r.sec = 1'b1;                      // the overall parity bit itself
    end else if (syn != 0) begin
      r.ded = 1'b1;
    end
    k = 0;
    r.data = '0;
    for (int p = 1; p < ECC_W; p++)
      if ((p & (p - 1)) != 0) begin
        r.data[k] = c[p];
        k++;
      end
    return r;
  endfunction

endpackage
