// pileup_detect -- module-level pile-up warning.
//
// When two pulses arrive close together their shapes overlap and the
// second-level filter must treat the event differently (other coefficients,
// or full readout). This block measures the distance, in bunch crossings,
// between successive pulse-detect flags and raises `pileup` together with a
// flag that follows the previous one within `window` crossings. The warning
// follows the published design; measuring "close" as a programmable window
// is this design's reading.
//
// Timing: `pileup` is registered, high in the clock after the second flag.
// The distance counter saturates, so flags far apart never count as pile-up.
module pileup_detect #(
  parameter int unsigned CW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [CW-1:0] window,
  input  logic          pulse,
  output logic          pileup
);

  logic [CW-1:0] gap;      // crossings since the last flag
  logic          seen;      // a flag has been seen

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gap    <= '1;
      seen   <= 1'b0;
      pileup <= 1'b0;
    end else begin
      pileup <= pulse && seen && (gap < window);
      if (pulse) begin
        gap  <= '0;
        seen <= 1'b1;
      end else if (gap != '1) begin
        gap  <= gap + 1'b1;
      end
    end
  end

endmodule
