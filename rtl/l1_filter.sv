// l1_filter -- first-level trigger filter of a FERMI module.
//
// Timing and energy are extracted separately from the channel sum so that the
// two algorithms can be tuned independently: a five-tap FIR optimised for
// timing feeds a three-point maximum finder whose flag marks the bunch
// crossing of a pulse, and a second five-tap FIR optimised for amplitude
// gives the energy sent to the first-level trigger. Both FIRs use the
// barrel-shifter coefficient format (fir5_bs). This two-branch structure is
// the published one; the alignment of the energy with the flag and the
// coefficient register interface are this design's.
//
// Configuration: cfg_we writes cfg_coef to tap cfg_tap of the timing filter
// (cfg_sel = 0) or the energy filter (cfg_sel = 1). Reset clears all taps.
//
// Timing: sum n with in_valid at clock t; at t+2 out_valid is high and
// `pulse` and `energy` both refer to sample n-1, the candidate peak.
module l1_filter
  import fermi_pkg::*;
#(
  parameter int unsigned DW = SUM_BITS,
  parameter int unsigned OW = DW + 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cfg_we,
  input  logic                 cfg_sel,
  input  logic [2:0]           cfg_tap,
  input  bs_coef_t             cfg_coef,
  input  logic                 in_valid,
  input  logic [DW-1:0]        sum,
  output logic                 out_valid,
  output logic                 pulse,
  output logic signed [OW-1:0] energy
);

  bs_coef_t coef_t [5];
  bs_coef_t coef_e [5];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 5; k++) begin
        coef_t[k] <= '0;
        coef_e[k] <= '0;
      end
    end else if (cfg_we && cfg_tap < 3'd5) begin
      if (cfg_sel) coef_e[cfg_tap] <= cfg_coef;
      else         coef_t[cfg_tap] <= cfg_coef;
    end
  end

  logic                 t_valid, e_valid;
  logic signed [OW-1:0] t_y, e_y, t_peak;

  fir5_bs #(.DW(DW), .TAPS(5), .OW(OW)) u_fir_time (
    .clk, .rst_n, .coef(coef_t), .in_valid, .x(sum), .out_valid(t_valid), .y(t_y)
  );

  fir5_bs #(.DW(DW), .TAPS(5), .OW(OW)) u_fir_energy (
    .clk, .rst_n, .coef(coef_e), .in_valid, .x(sum), .out_valid(e_valid), .y(e_y)
  );

  max3_finder #(.W(OW)) u_max3 (
    .clk, .rst_n, .in_valid(t_valid), .y(t_y), .out_valid(out_valid), .flag(pulse), .peak(t_peak)
  );

  // energy of sample n-1, in step with the maximum finder
  logic signed [OW-1:0] e_d1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_d1   <= '0;
      energy <= '0;
    end else if (e_valid) begin
      e_d1   <= e_y;
      energy <= e_d1;
    end
  end

endmodule
