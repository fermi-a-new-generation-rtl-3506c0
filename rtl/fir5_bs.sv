// fir5_bs -- five-tap FIR filter built from barrel shifters instead of multipliers.
//
// The first-level trigger filters run at the bunch-crossing rate, so each
// coefficient is restricted to what two barrel shifters can make: each of the
// two terms of a tap is the input shifted to 2^(1-s), s = 0..7 (2 down to
// 1/64), optionally negated, or switched off. Their sum covers the range
// (-4, 4), and (-3, 3) densely, fine enough for the trigger without a
// multiplier. Five taps and the two-shifter structure follow the published
// design; the shift range is this design's choice.
//
//   y[n] = sum_{k=0..TAPS-1} c_k * x[n-k],  c_k = t_a + t_b
//
// y carries FRAC = 6 fractional bits (y = 64 * the real-valued result), so
// every term is exact. x is unsigned, y is signed.
//
// Timing: x with in_valid at t enters the delay line; y with out_valid at t+1
// is the output for that sample. Samples without in_valid do not advance it.
module fir5_bs
  import fermi_pkg::*;
#(
  parameter int unsigned DW   = SUM_BITS,
  parameter int unsigned TAPS = 5,
  parameter int unsigned OW   = DW + 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  bs_coef_t            coef [TAPS],
  input  logic                in_valid,
  input  logic [DW-1:0]       x,
  output logic                out_valid,
  output logic signed [OW-1:0] y
);

  logic [DW-1:0] hist [1:TAPS-1];   // hist[k] = x[n-k]
  logic [DW-1:0] dl   [TAPS];       // tap inputs, dl[0] = newest sample

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k < TAPS; k++) hist[k] <= '0;
    end else if (in_valid) begin
      hist[1] <= x;
      for (int k = 2; k < TAPS; k++) hist[k] <= hist[k-1];
    end
  end

  always_comb begin
    dl[0] = x;
    for (int k = 1; k < TAPS; k++) dl[k] = hist[k];
  end

  function automatic logic signed [OW-1:0] bs_term(input bs_term_t t, input logic [DW-1:0] v);
    logic signed [OW-1:0] m;
    m = (OW'(v) << (BS_FRAC + 1)) >>> t.shift;
    if (!t.en) return '0;
    return t.neg ? -m : m;
  endfunction

  logic signed [OW-1:0] acc;
  always_comb begin
    acc = '0;
    for (int k = 0; k < TAPS; k++)
      acc = acc + bs_term(coef[k].a, dl[k]) + bs_term(coef[k].b, dl[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= acc;
    end
  end

endmodule
