// fermi_channel -- one of the nine identical acquisition channels of a FERMI module.
//
// The channel takes the raw coarse and fine bits of its two-stage ADC, forms
// the 10-bit code (adc2s_encoder), expands it to a linear 16-bit sample in the
// programmable table (expansion_lut), and then sends the sample two ways: to
// the threshold (threshold_unit) whose output feeds the module's trigger sum,
// and into the channel's ECC-protected dual-port memory (ecc_dpram) at the
// write address handed out by the external address generator. A small
// associative memory (patch_cam) stands in for faulty memory cells. This
// chain is the published one; the register stages are this design's.
//
// Configuration: cfg_we with cfg_target/cfg_index/cfg_wdata (see fermi_pkg)
// loads the table, the threshold, the patch entries and the diagnostic ECC
// flip mask of this channel.
//
// Timing: coarse bits and their write address at clock t (adc_valid), fine
// bits at t+1; the sample is written to memory at t+3 and its thresholded
// value leaves on trig_sample at t+4. A read issued at t (rd_en) returns at
// t+1 (rd_valid), from the patch memory when its address is patched.
module fermi_channel
  import fermi_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // two-stage ADC
  input  logic              adc_valid,
  input  logic [4:0]        adc_coarse,
  input  logic [5:0]        adc_fine,
  input  addr_t             wr_addr,
  // to the trigger sum
  output logic              trig_valid,
  output sample_t           trig_sample,
  // readout port
  input  logic              rd_en,
  input  addr_t             rd_addr,
  output logic              rd_valid,
  output sample_t           rd_data,
  output logic              rd_sec,
  output logic              rd_ded,
  // configuration
  input  logic              cfg_we,
  input  cfg_target_e       cfg_target,
  input  logic [11:0]       cfg_index,
  input  logic [CFG_DW-1:0] cfg_wdata
);

  // ---- configuration registers
  sample_t          thr;
  logic [ECC_W-1:0] flip;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      thr  <= '1;
      flip <= '0;
    end else if (cfg_we) begin
      if (cfg_target == CFG_THR)     thr  <= cfg_wdata[SAMPLE_BITS-1:0];
      if (cfg_target == CFG_ECCFLIP) flip <= cfg_wdata[ECC_W-1:0];
    end
  end

  // ---- ADC coding
  logic                enc_valid;
  logic [ADC_BITS-1:0] code;

  adc2s_encoder #(.M_BITS(5), .F_BITS(6), .OUT_BITS(ADC_BITS)) u_enc (
    .clk, .rst_n,
    .in_valid  (adc_valid),
    .coarse    (adc_coarse),
    .fine      (adc_fine),
    .out_valid (enc_valid),
    .code      (code)
  );

  // write address follows its sample through encoder and table
  addr_t addr_d [3];
  always_ff @(posedge clk) begin
    addr_d[0] <= wr_addr;
    addr_d[1] <= addr_d[0];
    addr_d[2] <= addr_d[1];
  end

  // ---- expansion
  logic    lin_valid;
  sample_t lin;

  expansion_lut #(.IN_BITS(ADC_BITS), .OUT_BITS(SAMPLE_BITS)) u_lut (
    .clk, .rst_n,
    .in_valid  (enc_valid),
    .code      (code),
    .out_valid (lin_valid),
    .sample    (lin),
    .cfg_we    (cfg_we && cfg_target == CFG_LUT),
    .cfg_addr  (cfg_index[ADC_BITS-1:0]),
    .cfg_data  (cfg_wdata[SAMPLE_BITS-1:0])
  );

  // ---- threshold for the trigger sum
  logic above;
  threshold_unit #(.W(SAMPLE_BITS)) u_thr (
    .clk, .rst_n,
    .thr       (thr),
    .in_valid  (lin_valid),
    .sample    (lin),
    .out_valid (trig_valid),
    .out       (trig_sample),
    .above     (above)
  );

  // ---- storage
  logic    mem_rvalid, mem_sec, mem_ded, cam_hit;
  sample_t mem_rdata, cam_rdata;

  ecc_dpram #(.DEPTH(2**ADDR_BITS)) u_mem (
    .clk, .rst_n,
    .we     (lin_valid),
    .waddr  (addr_d[2]),
    .wdata  (lin),
    .flip   (flip),
    .re     (rd_en),
    .raddr  (rd_addr),
    .rvalid (mem_rvalid),
    .rdata  (mem_rdata),
    .sec    (mem_sec),
    .ded    (mem_ded)
  );

  patch_cam #(.N_ENT(4), .AW(ADDR_BITS), .DW(SAMPLE_BITS)) u_cam (
    .clk, .rst_n,
    .cfg_we    (cfg_we && cfg_target == CFG_PATCH),
    .cfg_idx   (cfg_index[1:0]),
    .cfg_valid (cfg_wdata[16]),
    .cfg_addr  (cfg_wdata[ADDR_BITS-1:0]),
    .we        (lin_valid),
    .waddr     (addr_d[2]),
    .wdata     (lin),
    .re        (rd_en),
    .raddr     (rd_addr),
    .hit       (cam_hit),
    .rdata     (cam_rdata)
  );

  assign rd_valid = mem_rvalid;
  assign rd_data  = cam_hit ? cam_rdata : mem_rdata;
  assign rd_sec   = cam_hit ? 1'b0 : mem_sec;
  assign rd_ded   = cam_hit ? 1'b0 : mem_ded;

endmodule
