// afosh_filter -- second-level trigger filter: adaptive FIR / order-statistic hybrid.
//
// The second-level filter measures the pulse amplitude of one channel with
// full precision from the time frame kept for an accepted event, even when
// the sampling instants jitter. It runs a bank of NSUB linear FIR subfilters
// over the frame, each tuned to a different jitter condition, and then an
// order-statistic operator ranks their outputs and passes the r-th largest.
// Two coefficient banks let the controller pick, event by event, between the
// normal set and a set for pile-up. The FIR bank, the order-statistic
// operator and the two banks are the published structure; the number of
// subfilters, taps and coefficient bits are this design's choices.
//
//   y_j = sum_{i<len} h[bank][j][i] * x_i ,  amp = r-th largest of {y_j}
//
// Equal outputs are ranked by subfilter index (lower index counts as larger).
// Samples beyond NTAP in a frame contribute nothing.
//
// Interface: the frame arrives as a stream x with in_valid, in_first on its
// first and in_last on its last sample (both on a one-sample frame); `bank`
// and `r_sel` (= r-1) are taken with the first sample. Configuration writes
// cfg_coef (signed) to h[cfg_bank][cfg_sub][cfg_tap]; reset clears it.
//
// Timing: amp with out_valid follows two clocks after the in_last sample. A
// new frame may start in the clock right after in_last.
module afosh_filter
  import fermi_pkg::*;
#(
  parameter int unsigned NSUB = 4,
  parameter int unsigned NTAP = MAX_FRAME,
  parameter int unsigned CW   = 12,
  parameter int unsigned XW   = SAMPLE_BITS,
  parameter int unsigned OW   = AMP_W,
  parameter int unsigned SW   = (NSUB > 1) ? $clog2(NSUB) : 1,
  parameter int unsigned TW   = (NTAP > 1) ? $clog2(NTAP) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cfg_we,
  input  logic                 cfg_bank,
  input  logic [SW-1:0]        cfg_sub,
  input  logic [TW-1:0]        cfg_tap,
  input  logic signed [CW-1:0] cfg_coef,
  input  logic [SW-1:0]        r_sel,
  input  logic                 bank,
  input  logic                 in_valid,
  input  logic                 in_first,
  input  logic                 in_last,
  input  logic [XW-1:0]        x,
  output logic                 out_valid,
  output logic signed [OW-1:0] amp
);

  logic signed [CW-1:0] h [2][NSUB][NTAP];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < 2; b++)
        for (int j = 0; j < NSUB; j++)
          for (int i = 0; i < NTAP; i++) h[b][j][i] <= '0;
    end else if (cfg_we && int'(cfg_sub) < NSUB && int'(cfg_tap) < NTAP) begin
      h[cfg_bank][cfg_sub][cfg_tap] <= cfg_coef;
    end
  end

  // ---- FIR bank: one multiply-accumulate per subfilter and sample
  logic                 bank_q;
  logic [SW-1:0]        r_q;
  logic [TW:0]          idx;        // tap of the next sample, saturates at NTAP
  logic signed [OW-1:0] acc [NSUB];
  logic                 fin;        // acc holds a finished frame

  logic          bank_e;
  logic [TW:0]   idx_e;
  assign bank_e = in_first ? bank : bank_q;
  assign idx_e  = in_first ? '0 : idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bank_q <= 1'b0;
      r_q    <= '0;
      idx    <= '0;
      fin    <= 1'b0;
      for (int j = 0; j < NSUB; j++) acc[j] <= '0;
    end else begin
      fin <= in_valid && in_last;
      if (in_valid) begin
        if (in_first) begin
          bank_q <= bank;
          r_q    <= r_sel;
        end
        if (int'(idx_e) < NTAP) idx <= idx_e + 1'b1;
        else                    idx <= idx_e;
        for (int j = 0; j < NSUB; j++) begin
          logic signed [OW-1:0] p;
          p = (int'(idx_e) < NTAP)
                ? OW'(h[bank_e][j][idx_e[TW-1:0]]) * OW'($signed({1'b0, x}))
                : '0;
          acc[j] <= (in_first ? '0 : acc[j]) + p;
        end
      end
    end
  end

  // ---- order-statistic operator: the subfilter whose rank equals r-1
  logic signed [OW-1:0] sel;
  always_comb begin
    sel = '0;
    for (int j = 0; j < NSUB; j++) begin
      int unsigned rank;
      rank = 0;
      for (int i = 0; i < NSUB; i++)
        if (acc[i] > acc[j] || (acc[i] == acc[j] && i < j)) rank++;
      if (rank == int'(r_q)) sel = acc[j];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      amp       <= '0;
    end else begin
      out_valid <= fin;
      if (fin) amp <= sel;
    end
  end

endmodule
