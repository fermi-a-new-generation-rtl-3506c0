// fermi_top -- FERMI front-end readout module: nine calorimeter channels and their common service logic.
//
// Every bunch crossing (25 ns) each of the nine channels converts its analog
// sample, expands it to a linear 16-bit value and stores it in its memory at
// the address supplied by the external address generator. In parallel the
// thresholded channel values are summed; the first-level filter finds pulses
// in the sum (timing FIR + maximum finder) and measures their energy (energy
// FIR) for the first-level trigger, and the pile-up detector warns of pulses
// close together. When an event is accepted, the readout controller reads its
// time frame back and sends it to the second and third-level triggers either
// in full or reduced by the second-level (AFOSH) filter to one amplitude per
// channel. This partition (channel ASICs, service ASIC) is the published one.
//
// The analog front end and the analog halves of the ADCs are outside: the
// channel inputs are the raw coarse/fine bits of each two-stage ADC. The
// digital core of the alternative converter, the parallel SA ADC, stands
// beside the module with its own ports (psa_*), for evaluation.
//
// Configuration (this design's register map, see fermi_pkg): cfg_we writes
// cfg_wdata to cfg_addr = {target, channel (15 = all), index}.
//
// Timing: coarse bits of crossing n with adc_valid and wr_addr at clock t;
// sum at t+5; l1_valid/l1_pulse/l1_energy for crossing n at t+8 (the flag
// and energy describe the crossing one earlier than the newest sum, see
// l1_filter); l1_pileup one clock after the flag.
module fermi_top
  import fermi_pkg::*;
#(
  parameter int unsigned PSA_BITS = ADC_BITS,
  parameter int unsigned PSA_KAZ  = 4,
  parameter int unsigned PSA_N    = PSA_KAZ + PSA_BITS
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // two-stage ADC raw bits, one set per channel
  input  logic                          adc_valid,
  input  logic [N_CH-1:0][4:0]          adc_coarse,
  input  logic [N_CH-1:0][5:0]          adc_fine,
  input  addr_t                         wr_addr,
  // configuration
  input  logic                          cfg_we,
  input  logic [CFG_AW-1:0]             cfg_addr,
  input  logic [CFG_DW-1:0]             cfg_wdata,
  // first-level trigger
  output logic                          l1_valid,
  output logic                          l1_pulse,
  output logic signed [FIR_W-1:0]       l1_energy,
  output logic                          l1_pileup,
  output logic [SUM_BITS-1:0]           trig_sum,
  output logic                          sum_err,
  // readout command and pointers
  input  logic                          cmd_valid,
  output logic                          cmd_ready,
  input  logic                          cmd_full,
  input  logic                          cmd_bank,
  input  logic [3:0]                    cmd_len,
  input  logic                          ptr_valid,
  output logic                          ptr_ready,
  input  addr_t                         ptr,
  // data out to the second and third-level triggers
  output logic                          ro_valid,
  output ro_word_t                      ro_word,
  output logic                          ro_busy,
  output logic                          ecc_sec,
  output logic                          ecc_ded,
  // parallel SA ADC core
  input  logic                          psa_enable,
  input  logic [PSA_N-1:0]              psa_comp,
  output logic [PSA_N-1:0]              psa_sample,
  output logic [PSA_N-1:0]              psa_autozero,
  output logic [PSA_N-1:0][PSA_BITS-1:0] psa_dac_code,
  output logic                          psa_valid,
  output logic [PSA_BITS-1:0]           psa_dout
);

  // ---- configuration decode
  cfg_target_e cfg_target;
  logic [3:0]  cfg_chan;
  logic [11:0] cfg_index;
  assign cfg_target = cfg_target_e'(cfg_addr[19:16]);
  assign cfg_chan   = cfg_addr[15:12];
  assign cfg_index  = cfg_addr[11:0];

  logic [7:0] pileup_window;
  logic [1:0] l2_rank;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pileup_window <= '0;
      l2_rank       <= '0;
    end else if (cfg_we) begin
      if (cfg_target == CFG_PILEUP) pileup_window <= cfg_wdata[7:0];
      if (cfg_target == CFG_L2RANK) l2_rank       <= cfg_wdata[1:0];
    end
  end

  // ---- channels
  logic    [N_CH-1:0] trig_valid;
  sample_t            trig_sample [N_CH];
  logic               rd_en;
  addr_t              rd_addr;
  logic    [N_CH-1:0] rd_valid, rd_sec, rd_ded;
  sample_t            rd_data [N_CH];

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    fermi_channel u_ch (
      .clk, .rst_n,
      .adc_valid   (adc_valid),
      .adc_coarse  (adc_coarse[c]),
      .adc_fine    (adc_fine[c]),
      .wr_addr     (wr_addr),
      .trig_valid  (trig_valid[c]),
      .trig_sample (trig_sample[c]),
      .rd_en       (rd_en),
      .rd_addr     (rd_addr),
      .rd_valid    (rd_valid[c]),
      .rd_data     (rd_data[c]),
      .rd_sec      (rd_sec[c]),
      .rd_ded      (rd_ded[c]),
      .cfg_we      (cfg_we && (cfg_chan == 4'hF || cfg_chan == 4'(c))),
      .cfg_target  (cfg_target),
      .cfg_index   (cfg_index),
      .cfg_wdata   (cfg_wdata)
    );
  end

  // ---- trigger sum
  logic [N_CH-1:0][SAMPLE_BITS-1:0] sum_in;
  always_comb
    for (int c = 0; c < N_CH; c++) sum_in[c] = trig_sample[c];

  logic sum_valid;
  channel_sum #(.N_CH(N_CH), .W(SAMPLE_BITS), .SW(SUM_BITS)) u_sum (
    .clk, .rst_n,
    .in_valid  (trig_valid[0]),
    .samples   (sum_in),
    .out_valid (sum_valid),
    .sum       (trig_sum),
    .res_err   (sum_err)
  );

  // ---- first-level filter and pile-up warning
  l1_filter #(.DW(SUM_BITS), .OW(FIR_W)) u_l1 (
    .clk, .rst_n,
    .cfg_we    (cfg_we && cfg_target == CFG_L1COEF),
    .cfg_sel   (cfg_index[3]),
    .cfg_tap   (cfg_index[2:0]),
    .cfg_coef  (bs_coef_t'(cfg_wdata[$bits(bs_coef_t)-1:0])),
    .in_valid  (sum_valid),
    .sum       (trig_sum),
    .out_valid (l1_valid),
    .pulse     (l1_pulse),
    .energy    (l1_energy)
  );

  pileup_detect #(.CW(8)) u_pileup (
    .clk, .rst_n,
    .window (pileup_window),
    .pulse  (l1_pulse),
    .pileup (l1_pileup)
  );

  // ---- readout and second-level filter
  logic                    f_valid, f_first, f_last, f_bank, f_out_valid;
  sample_t                 f_x;
  logic signed [AMP_W-1:0] f_amp;

  readout_ctrl #(.NCH(N_CH), .MF(MAX_FRAME)) u_ro (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd_full, .cmd_bank, .cmd_len,
    .ptr_valid, .ptr_ready, .ptr,
    .rd_en, .rd_addr,
    .rd_valid    (rd_valid[0]),
    .rd_data     (rd_data),
    .rd_ded      (rd_ded),
    .f_valid, .f_first, .f_last, .f_bank, .f_x,
    .f_out_valid, .f_amp,
    .out_valid   (ro_valid),
    .out_word    (ro_word),
    .busy        (ro_busy)
  );

  afosh_filter #(.NSUB(4), .NTAP(MAX_FRAME), .CW(12), .XW(SAMPLE_BITS), .OW(AMP_W)) u_l2 (
    .clk, .rst_n,
    .cfg_we    (cfg_we && cfg_target == CFG_L2COEF),
    .cfg_bank  (cfg_index[6]),
    .cfg_sub   (cfg_index[5:4]),
    .cfg_tap   (cfg_index[2:0]),
    .cfg_coef  (cfg_wdata[11:0]),
    .r_sel     (l2_rank),
    .bank      (f_bank),
    .in_valid  (f_valid),
    .in_first  (f_first),
    .in_last   (f_last),
    .x         (f_x),
    .out_valid (f_out_valid),
    .amp       (f_amp)
  );

  // ECC status of the reads, one clock after the read
  assign ecc_sec = |(rd_sec & rd_valid);
  assign ecc_ded = |(rd_ded & rd_valid);

  // ---- alternative converter core
  psa_adc #(.N_BITS(PSA_BITS), .K_AZ(PSA_KAZ), .N_SA(PSA_N)) u_psa (
    .clk, .rst_n,
    .enable    (psa_enable),
    .comp      (psa_comp),
    .sample    (psa_sample),
    .autozero  (psa_autozero),
    .dac_code  (psa_dac_code),
    .out_valid (psa_valid),
    .dout      (psa_dout)
  );

endmodule
