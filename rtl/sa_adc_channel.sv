// sa_adc_channel -- control logic of one successive-approximation ADC channel.
//
// A channel of the parallel SA converter consists of a sample-and-hold, an
// auto-zeroed comparator, a shift register and a DAC; the register drives the
// DAC and its content is the result. The S/H, comparator and DAC are analog
// and stay outside this module: it drives `sample`, `autozero` and
// `dac_code`, and reads the comparator decision on `comp` (1 when the held
// input is at or above the DAC level).
//
// A conversion started by `start` takes K_AZ + N_BITS clocks: the S/H samples
// in the start clock, the comparator auto-zeroes for K_AZ clocks (the start
// clock being the first), then one bit is tried per clock, most significant
// first, with the trial code being the
// bits decided so far plus the bit under test. The comparator decision of a
// clock is stored at its end. `done` is high, with the result on `code`, in
// the clock after the last trial, K_AZ + N_BITS clocks after start; a new
// start may be given in that clock.
// The k + n count follows the published design (4 + 10 = 14 comparators);
// the binary-search trial order is the usual one and this design's choice.
module sa_adc_channel #(
  parameter int unsigned N_BITS = 10,
  parameter int unsigned K_AZ   = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              comp,
  output logic              sample,
  output logic              autozero,
  output logic [N_BITS-1:0] dac_code,
  output logic              done,
  output logic [N_BITS-1:0] code
);

  localparam int unsigned CW = $clog2(K_AZ + N_BITS + 1);

  logic [CW-1:0]     phase;     // 0 idle, 1..K_AZ-1 auto-zero, then bit trials
  logic [N_BITS-1:0] sar;       // shift register: bits decided so far
  logic [N_BITS-1:0] trial;     // one-hot bit under test

  assign sample   = start;
  assign autozero = start || ((phase >= 1) && (phase < CW'(K_AZ)));
  assign dac_code = sar | trial;

  always_comb begin
    trial = '0;
    if (phase >= CW'(K_AZ))
      trial[N_BITS - 1 - (int'(phase) - K_AZ)] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      sar   <= '0;
      done  <= 1'b0;
      code  <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        phase <= CW'(1);
        sar   <= '0;
      end else if (phase != 0) begin
        if (phase >= CW'(K_AZ)) begin
          if (comp) sar <= sar | trial;
        end
        if (phase == CW'(K_AZ + N_BITS - 1)) begin
          phase <= '0;
          done  <= 1'b1;
          code  <= comp ? (sar | trial) : sar;
        end else begin
          phase <= phase + 1'b1;
        end
      end
    end
  end

endmodule
