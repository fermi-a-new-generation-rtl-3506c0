// expansion_lut -- linearising and calibrating look-up table of one channel.
//
// The analog front end compresses the 15-16 bit input dynamic range with a
// piecewise-linear amplifier so that a 10-bit ADC suffices. This table undoes
// the compression: it maps every ADC code to a linear 16-bit sample, and since
// the table is written by the module controller it can also hold each
// channel's absolute calibration. The function follows the published design;
// the RAM organisation and the one-clock read latency are this design's.
//
// Interface: a sample code presented with in_valid at clock t gives `sample`
// with out_valid at t+1. cfg_we writes cfg_data at cfg_addr; the table has no
// reset content and must be loaded before use.
module expansion_lut #(
  parameter int unsigned IN_BITS  = 10,
  parameter int unsigned OUT_BITS = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [IN_BITS-1:0]  code,
  output logic                out_valid,
  output logic [OUT_BITS-1:0] sample,
  input  logic                cfg_we,
  input  logic [IN_BITS-1:0]  cfg_addr,
  input  logic [OUT_BITS-1:0] cfg_data
);

  logic [OUT_BITS-1:0] table_q [2**IN_BITS];

  always_ff @(posedge clk) begin
    if (cfg_we) table_q[cfg_addr] <= cfg_data;
    if (in_valid) sample <= table_q[code];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
