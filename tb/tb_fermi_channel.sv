// tb_fermi_channel -- self-checking test of one acquisition channel.
//
// The table is loaded with a three-segment expansion, the threshold is set,
// one memory address is patched. Random input levels are converted by a
// behavioural two-stage ADC (coarse error up to +-15 LSB) and written at
// consecutive addresses, part of them with one or two codeword bits flipped
// through the diagnostic mask. The thresholded sample must appear four
// clocks after the coarse bits; reading back every address must return the
// expanded sample with the right ECC flags, and the patched address must be
// served clean from the patch memory.
module tb_fermi_channel;
  import fermi_pkg::*;
  logic clk = 0, rst_n = 0;
  logic adc_valid = 0;
  logic [4:0] adc_coarse = 0;
  logic [5:0] adc_fine = 0;
  addr_t wr_addr = 0;
  logic trig_valid;
  sample_t trig_sample;
  logic rd_en = 0;
  addr_t rd_addr = 0;
  logic rd_valid, rd_sec, rd_ded;
  sample_t rd_data;
  logic cfg_we = 0;
  cfg_target_e cfg_target = CFG_LUT;
  logic [11:0] cfg_index = 0;
  logic [CFG_DW-1:0] cfg_wdata = 0;
  int checks = 0, failures = 0;

  fermi_channel dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expand(int c);
    if (c < 512) return c * 2;
    if (c < 768) return 1024 + (c - 512) * 16;
    return 5120 + (c - 768) * 230;
  endfunction

  task automatic cfg(cfg_target_e t, int idx, int d);
    @(negedge clk);
    cfg_we = 1; cfg_target = t; cfg_index = 12'(idx); cfg_wdata = CFG_DW'(d);
    @(negedge clk) cfg_we = 0;
  endtask

  localparam int THR = 900, PATCH = 37, NS = 1500;
  int vin [NS];
  int nflip [NS];
  int exp_trig [$];
  int n_trig = 0, n_zero = 0;

  always @(posedge clk) if (rst_n && trig_valid) begin
    int e;
    checks++;
    e = exp_trig.pop_front();
    if (int'(trig_sample) != e) begin
      failures++;
      $display("trigger sample %0d expected %0d", trig_sample, e);
    end
    if (e == 0) n_zero++; else n_trig++;
  end

  initial begin
    int c, f, pf, cc;
    int n_sec, n_ded;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      cfg_we = 1; cfg_target = CFG_LUT; cfg_index = 12'(i); cfg_wdata = CFG_DW'(expand(i));
    end
    cfg(CFG_THR, 0, THR);
    cfg(CFG_PATCH, 2, 32'h10000 | PATCH);
    pf = 0;
    for (int i = 0; i <= NS; i++) begin
      @(negedge clk);
      adc_fine = 6'(pf);
      if (i < NS) begin
        vin[i]  = $urandom_range(0, 1023);
        nflip[i] = (i % 5 == 1) ? 1 : (i % 5 == 3) ? 2 : 0;
        cc = (vin[i] + int'($urandom_range(0, 30)) - 15) >>> 5;
        cc = cc < 0 ? 0 : cc > 31 ? 31 : cc;
        adc_valid = 1; adc_coarse = 5'(cc); wr_addr = addr_t'(i);
        pf = vin[i] - cc * 32 + 16;
        exp_trig.push_back(expand(vin[i]) > THR ? expand(vin[i]) : 0);
        // the flip mask must be in place when the sample reaches memory (t+3)
        fork
          begin
            automatic int k = i;
            repeat (2) @(negedge clk);
            cfg_we = 1; cfg_target = CFG_ECCFLIP; cfg_index = 0;
            cfg_wdata = (nflip[k] == 0) ? 0 : (nflip[k] == 1) ? (1 << (k % 22)) : (3 << (k % 21));
          end
        join_none
      end else begin
        adc_valid = 0;
      end
    end
    repeat (6) @(negedge clk);
    cfg_we = 0;
    n_sec = 0; n_ded = 0;
    for (int i = 0; i < NS; i++) begin
      @(negedge clk);
      rd_en = 1; rd_addr = addr_t'(i);
      @(negedge clk);
      rd_en = 0;
      checks++;
      if (i == PATCH) begin
        if (!rd_valid || rd_data != sample_t'(expand(vin[i])) || rd_sec || rd_ded) begin
          failures++;
          $display("patched address: data %0d expected %0d sec %0b ded %0b", rd_data, expand(vin[i]), rd_sec, rd_ded);
        end
      end else if (!rd_valid || (nflip[i] < 2 && rd_data != sample_t'(expand(vin[i])))
                   || rd_sec != (nflip[i] == 1) || rd_ded != (nflip[i] == 2)) begin
        failures++;
        $display("address %0d flips %0d: data %0d expected %0d sec %0b ded %0b",
                 i, nflip[i], rd_data, expand(vin[i]), rd_sec, rd_ded);
      end
      n_sec += rd_sec;
      n_ded += rd_ded;
    end
    checks++;
    if (n_trig == 0 || n_zero == 0 || n_sec == 0 || n_ded == 0 || exp_trig.size() != 0) begin
      failures++;
      $display("passed %0d, suppressed %0d, corrected %0d, detected %0d", n_trig, n_zero, n_sec, n_ded);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
