// psa_adc -- digital core of the parallel successive-approximation ADC (PSA-ADC).
//
// A PSA-ADC reaches a high sample rate with slow converters: N_SA = K_AZ +
// N_BITS identical SA channels share the analog input and are started in
// rotation, one per clock, so each has K_AZ clocks to auto-zero its
// comparator and N_BITS clocks to resolve its bits, and one conversion
// finishes every clock. An output register collects the finished word each
// clock. With the published figures (10 bits, 14 comparators) k = 4.
//
// The S/H circuits, comparators, DACs and the common reference voltage
// generator are analog; this core drives per channel the S/H strobe
// `sample`, the auto-zero phase and the DAC code, and reads one comparator
// decision per channel on `comp`.
//
// Timing: while `enable` is high, channel (t mod N_SA) samples the input at
// clock t; its result appears on `dout` with out_valid at clock
// t + K_AZ + N_BITS + 1. The rotating start order is this design's choice.
module psa_adc #(
  parameter int unsigned N_BITS = 10,
  parameter int unsigned K_AZ   = 4,
  parameter int unsigned N_SA   = K_AZ + N_BITS
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         enable,
  input  logic [N_SA-1:0]              comp,
  output logic [N_SA-1:0]              sample,
  output logic [N_SA-1:0]              autozero,
  output logic [N_SA-1:0][N_BITS-1:0]  dac_code,
  output logic                         out_valid,
  output logic [N_BITS-1:0]            dout
);

  localparam int unsigned PW = (N_SA > 1) ? $clog2(N_SA) : 1;

  logic [PW-1:0]             slot;    // channel that samples in this clock
  logic [N_SA-1:0]           start;
  logic [N_SA-1:0]           done;
  logic [N_SA-1:0][N_BITS-1:0] code;

  always_comb begin
    start = '0;
    if (enable) start[slot] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                            slot <= '0;
    else if (enable)                       slot <= (slot == PW'(N_SA - 1)) ? '0 : slot + 1'b1;
  end

  for (genvar i = 0; i < N_SA; i++) begin : g_ch
    sa_adc_channel #(.N_BITS(N_BITS), .K_AZ(K_AZ)) u_ch (
      .clk      (clk),
      .rst_n    (rst_n),
      .start    (start[i]),
      .comp     (comp[i]),
      .sample   (sample[i]),
      .autozero (autozero[i]),
      .dac_code (dac_code[i]),
      .done     (done[i]),
      .code     (code[i])
    );
  end

  // Output register: at most one channel finishes per clock.
  logic [N_BITS-1:0] sel_code;
  always_comb begin
    sel_code = '0;
    for (int i = 0; i < N_SA; i++)
      if (done[i]) sel_code = code[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      dout      <= '0;
    end else begin
      out_valid <= |done;
      if (|done) dout <= sel_code;
    end
  end

endmodule
