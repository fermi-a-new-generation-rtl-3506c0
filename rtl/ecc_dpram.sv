// ecc_dpram -- dual-port sample memory of one channel, protected by SEC-DED.
//
// Every expanded sample is written at the address supplied by the external
// memory management unit and waits there for the first and second-level
// trigger decisions; the readout controller reads it on the second port while
// writing goes on. Each word is stored as an extended Hamming (22,16)
// codeword: a single flipped bit is corrected on reading (`sec`), two flipped
// bits are detected and flag the data as invalid (`ded`). ECC on the memories
// and its single-correct/double-detect rule follow the published design; the
// code layout (see fermi_pkg) and the depth are this design's choices.
//
// `flip` is a diagnostic mask XORed into the codeword as it is written, so
// that the controller can plant errors and check the correction.
//
// Timing: write in the clock of `we`; a read issued with `re` at t delivers
// rdata/sec/ded with rvalid at t+1. A read and a write of the same address in
// one clock return the old word.
module ecc_dpram
  import fermi_pkg::*;
#(
  parameter int unsigned DEPTH = 2**ADDR_BITS,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [15:0]       wdata,
  input  logic [ECC_W-1:0]  flip,
  input  logic              re,
  input  logic [AW-1:0]     raddr,
  output logic              rvalid,
  output logic [15:0]       rdata,
  output logic              sec,
  output logic              ded
);

  logic [ECC_W-1:0] mem [DEPTH];
  logic [ECC_W-1:0] rword;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= secded_encode(wdata) ^ flip;
    if (re) rword <= mem[raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rvalid <= 1'b0;
    else        rvalid <= re;
  end

  secded_result_t dec;
  assign dec   = secded_decode(rword);
  assign rdata = dec.data;
  assign sec   = dec.sec;
  assign ded   = dec.ded;

endmodule
