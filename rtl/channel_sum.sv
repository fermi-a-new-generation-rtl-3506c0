// channel_sum -- summing unit of the first-level trigger, with a modulo-3 check.
//
// Every bunch crossing the nine thresholded channel samples are added into
// one trigger sum, which feeds the first-level filters. Arithmetic units are
// protected by a residue code: the residue modulo 3 of the sum must equal the
// sum of the input residues modulo 3, and `res_err` reports a mismatch to the
// module controller. Summing thresholded channels and a modulo-3 code for
// arithmetic follow the published design; the register stage and the sum
// width (which cannot overflow) are this design's.
//
// Timing: in_valid at t gives sum, res_err and out_valid at t+1.
module channel_sum #(
  parameter int unsigned N_CH = 9,
  parameter int unsigned W    = 16,
  parameter int unsigned SW   = W + $clog2(N_CH)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [N_CH-1:0][W-1:0] samples,
  output logic                  out_valid,
  output logic [SW-1:0]         sum,
  output logic                  res_err
);

  logic [SW-1:0] s;
  logic [1:0]    r_in;     // residue predicted from the inputs

  always_comb begin
    int unsigned racc;
    s    = '0;
    racc = 0;
    for (int i = 0; i < N_CH; i++) begin
      s    = s + SW'(samples[i]);
      racc = racc + (32'(samples[i]) % 3);
    end
    r_in = 2'(racc % 3);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sum       <= '0;
      res_err   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        sum     <= s;
        res_err <= (2'(32'(s) % 3) != r_in);
      end
    end
  end

endmodule
