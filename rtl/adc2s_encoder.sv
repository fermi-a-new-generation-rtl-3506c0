// adc2s_encoder -- synchronisation and coding stage of the two-stage pipelined ADC.
//
// The two-stage converter resolves each sample in two steps: a coarse flash
// gives M_BITS most significant bits, a DAC subtracts that level from the
// input, and a subranging flash converts the residue into F_BITS more bits.
// The coarse flash carries one redundant bit (m = 5 with n1 + n2 = 6 for a
// 10-bit result), so the fine range spans two coarse steps and small coarse
// errors are absorbed. This block aligns the coarse bits with the fine bits
// of the same sample and combines the 11 bits into the 10-bit output word.
//
// Coding (this design's choice): the fine code is offset by half a coarse
// step, so   code = coarse * 2^(OUT-M) + fine - 2^(OUT-M-1),  clamped to the
// output range. The fine bits are taken to arrive one clock after the coarse
// bits of the same sample (the residue is converted in the next pipeline
// stage); in_valid marks the coarse bits.
//
// Timing: a sample whose coarse bits are present at clock t has its fine
// bits at t+1 and its code on `code` with out_valid from t+2.
module adc2s_encoder #(
  parameter int unsigned M_BITS   = 5,
  parameter int unsigned F_BITS   = 6,
  parameter int unsigned OUT_BITS = 10
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [M_BITS-1:0]   coarse,
  input  logic [F_BITS-1:0]   fine,
  output logic                out_valid,
  output logic [OUT_BITS-1:0] code
);

  localparam int unsigned STEP = OUT_BITS - M_BITS;     // LSBs per coarse step
  localparam int          HALF = 1 << (STEP - 1);
  localparam int          MAXC = (1 << OUT_BITS) - 1;

  logic [M_BITS-1:0] coarse_q;
  logic              valid_q;

  // Digital correction of the overlapping bit.
  logic [OUT_BITS-1:0] corrected;
  always_comb begin
    int signed v;
    v = (int'(coarse_q) << STEP) + int'(fine) - HALF;
    if (v < 0)         corrected = '0;
    else if (v > MAXC) corrected = OUT_BITS'(MAXC);
    else               corrected = OUT_BITS'(v);
  end

  // Synchronisation: hold the coarse bits until the fine bits arrive.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coarse_q  <= '0;
      valid_q   <= 1'b0;
      out_valid <= 1'b0;
      code      <= '0;
    end else begin
      coarse_q  <= coarse;
      valid_q   <= in_valid;
      out_valid <= valid_q;
      if (valid_q) code <= corrected;
    end
  end

endmodule
