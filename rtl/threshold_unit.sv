// threshold_unit -- per-channel threshold in front of the trigger sum.
//
// Only channel values well above the noise level contribute to the module's
// trigger sum. A sample strictly greater than the programmable threshold
// `thr` is passed on; any other sample contributes zero. `above` tells which
// case applied. The thresholding follows the published design; the strict
// comparison and the register stage are this design's choices.
//
// Timing: one clock, in_valid at t gives out_valid at t+1.
module threshold_unit #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] thr,
  input  logic         in_valid,
  input  logic [W-1:0] sample,
  output logic         out_valid,
  output logic [W-1:0] out,
  output logic         above
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out       <= '0;
      above     <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        above <= sample > thr;
        out   <= (sample > thr) ? sample : '0;
      end
    end
  end

endmodule
