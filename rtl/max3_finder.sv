// max3_finder -- three-point maximum finder behind the first-level timing filter.
//
// The timing filter's output peaks at the bunch crossing of a pulse. This
// block keeps the last three filter outputs and flags the middle one when it
// is a local maximum: y[n-1] > y[n-2] and y[n-1] >= y[n]. The three-point
// maximum finder is the published structure; the tie rule (the first of two
// equal values wins) and the requirement y[n-1] > 0, which keeps a flat
// zero baseline from being flagged, are this design's choices.
//
// Timing: when y[n] arrives with in_valid at clock t, `flag` and `peak`
// (= y[n-1]) describe sample n-1 at t+1; out_valid marks every such output.
module max3_finder #(
  parameter int unsigned W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] y,
  output logic                out_valid,
  output logic                flag,
  output logic signed [W-1:0] peak
);

  logic signed [W-1:0] y1, y2;      // y[n-1], y[n-2]

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y1        <= '0;
      y2        <= '0;
      out_valid <= 1'b0;
      flag      <= 1'b0;
      peak      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        y1   <= y;
        y2   <= y1;
        flag <= (y1 > y2) && (y1 >= y) && (y1 > 0);
        peak <= y1;
      end else begin
        flag <= 1'b0;
      end
    end
  end

endmodule
