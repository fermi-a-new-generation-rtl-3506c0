// tb_fermi_top -- end-to-end test of a FERMI module at its default size.
//
// The test configures the module over its configuration bus (expansion
// table, thresholds, both first-level FIRs, pile-up window, both
// second-level coefficient banks and rank, one patch entry, diagnostic ECC
// flips on three channels), then records 2000 bunch crossings of nine
// channels carrying calorimeter-like pulses, some of them piled up, through
// behavioural two-stage ADCs. An independent integer model predicts the
// first-level pulse flags, energies and pile-up warnings. The frames around
// detected pulses are then read out in full and reduced with either bank,
// and every word is compared with the model. The parallel SA converter core
// converts a random stream beside it. Each mechanism (threshold
// suppression, pulse detection, pile-up, ECC correction and detection,
// patched cell, full and reduced readout with both banks, PSA conversion)
// is counted and must occur at least once.
module tb_fermi_top;
  import fermi_pkg::*;
  localparam int NX = 2000;             // crossings recorded
  localparam int THR = 40;
  localparam int PATCH_CH = 2, PATCH_ADDR = 22;
  localparam int NSA = 14;

  logic clk = 0, rst_n = 0;
  logic adc_valid = 0;
  logic [N_CH-1:0][4:0] adc_coarse = '0;
  logic [N_CH-1:0][5:0] adc_fine = '0;
  addr_t wr_addr = 0;
  logic cfg_we = 0;
  logic [CFG_AW-1:0] cfg_addr = 0;
  logic [CFG_DW-1:0] cfg_wdata = 0;
  logic l1_valid, l1_pulse, l1_pileup, sum_err;
  logic signed [FIR_W-1:0] l1_energy;
  logic [SUM_BITS-1:0] trig_sum;
  logic cmd_valid = 0, cmd_ready, cmd_full = 0, cmd_bank = 0;
  logic [3:0] cmd_len = 0;
  logic ptr_valid = 0, ptr_ready;
  addr_t ptr = 0;
  logic ro_valid, ro_busy, ecc_sec, ecc_ded;
  ro_word_t ro_word;
  logic psa_enable = 0;
  logic [NSA-1:0] psa_comp, psa_sample, psa_autozero;
  logic [NSA-1:0][9:0] psa_dac_code;
  logic psa_valid;
  logic [9:0] psa_dout;
  int checks = 0, failures = 0;

  fermi_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ model
  function automatic int expand(int c);
    if (c < 512) return c * 2;
    if (c < 768) return 1024 + (c - 512) * 16;
    return 5120 + (c - 768) * 230;
  endfunction

  function automatic bs_coef_t mk(bit ea, bit na, int sa);
    bs_coef_t c;
    c.a = '{ea, na, 3'(sa)};
    c.b = '{1'b0, 1'b0, 3'd0};
    return c;
  endfunction

  function automatic longint term(bs_term_t t, longint v);
    longint m;
    if (!t.en) return 0;
    m = v * (longint'(1) << (7 - int'(t.shift)));
    return t.neg ? -m : m;
  endfunction

  bs_coef_t ct [5], ce [5];
  int  h [2][4][8];
  localparam int RSEL = 1;

  int vin [NX][N_CH];             // ADC level per crossing and channel
  longint yt [NX + 2], ye [NX + 1];
  bit  flag_m [NX];
  bit  pile_m [NX];
  int  flags [$];

  // counters of the mechanisms
  int n_suppr = 0, n_flag = 0, n_pile = 0, n_sec = 0, n_ded = 0, n_patch = 0;
  int n_full = 0, n_red [2] = '{0, 0}, n_psa = 0;

  task automatic cfg(int target, int chan, int idx, int data);
    @(negedge clk);
    cfg_we = 1; cfg_addr = {4'(target), 4'(chan), 12'(idx)}; cfg_wdata = CFG_DW'(data);
    @(negedge clk) cfg_we = 0;
  endtask

  // ------------------------------------------------------------ first-level monitor
  int n_l1 = 0;
  always @(posedge clk) if (rst_n && l1_valid) begin
    int k;
    k = n_l1;                    // outputs describe crossing k-1
    if (k >= 1 && k <= NX) begin
      checks++;
      if (l1_pulse != flag_m[k-1] || longint'(l1_energy) != ye[k]) begin
        failures++;
        $display("crossing %0d: pulse %0b (model %0b) energy %0d (model %0d)",
                 k - 1, l1_pulse, flag_m[k-1], l1_energy, ye[k]);
      end
    end
    n_flag += l1_pulse;
    n_l1++;
  end
  int n_l1p = 0;
  always @(posedge clk) if (rst_n) begin
    n_pile += l1_pileup;
    if (sum_err) begin failures++; $display("residue check fired"); end
  end

  // ------------------------------------------------------------ readout monitor
  ro_word_t exp_q [$];
  bit       chk_data [$];
  always @(posedge clk) if (rst_n && ro_valid) begin
    ro_word_t e;
    bit cd;
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("unexpected readout word");
    end else begin
      e  = exp_q.pop_front();
      cd = chk_data.pop_front();
      if (ro_word.reduced != e.reduced || ro_word.chan != e.chan || ro_word.idx != e.idx ||
          ro_word.err != e.err || (cd && ro_word.data != e.data)) begin
        failures++;
        $display("readout word %p expected %p", ro_word, e);
      end
      if (!e.reduced) n_full++;
      if (!e.reduced && e.chan == 4'(PATCH_CH) && !ro_word.err) n_patch++;
    end
  end
  always @(posedge clk) if (rst_n) begin
    n_sec += ecc_sec;
    n_ded += ecc_ded;
  end

  // ------------------------------------------------------------ PSA converter beside the module
  int psa_held [NSA];
  int psa_vin = 0;
  int psa_q [$];
  always_comb for (int i = 0; i < NSA; i++) psa_comp[i] = (psa_held[i] >= int'(psa_dac_code[i]));
  always @(posedge clk) begin
    for (int i = 0; i < NSA; i++)
      if (psa_sample[i]) begin
        psa_held[i] <= psa_vin;
        psa_q.push_back(psa_vin);
      end
    if (rst_n && psa_valid) begin
      int e;
      checks++;
      e = psa_q.pop_front();
      if (int'(psa_dout) != e) begin
        failures++;
        $display("PSA output %0d expected %0d", psa_dout, e);
      end
      n_psa++;
    end
  end

  // ------------------------------------------------------------ stimulus
  initial begin
    int shape [6] = '{0, 250, 1000, 650, 350, 150};
    int pf [N_CH];
    int cc, s;
    for (int i = 0; i < NSA; i++) psa_held[i] = 0;
    // pulses: every 40 crossings, random channels and heights; every 5th piles up
    for (int n = 0; n < NX; n++)
      for (int c = 0; c < N_CH; c++) vin[n][c] = int'($urandom_range(0, 6));
    for (int p = 20; p + 10 < NX; p += 40) begin
      for (int rep = 0; rep < (((p / 40) % 5 == 0) ? 2 : 1); rep++)
        for (int c = 0; c < N_CH; c++)
          if (c == 0 || $urandom_range(0, 2) == 0) begin
            int a;
            a = $urandom_range(100, 500);
            for (int k = 0; k < 6; k++) begin
              vin[p + 4 * rep + k][c] += a * shape[k] / 1000;
              if (vin[p + 4 * rep + k][c] > 1023) vin[p + 4 * rep + k][c] = 1023;
            end
          end
    end
    // model of the trigger path
    ct = '{mk(1,1,2), mk(0,0,0), mk(1,0,1), mk(1,0,1), mk(1,1,2)};
    ce = '{mk(1,0,3), mk(1,0,2), mk(1,0,1), mk(1,0,2), mk(1,0,3)};
    yt[0] = 0; yt[1] = 0; ye[0] = 0;
    for (int n = 0; n < NX; n++) begin
      longint at, ae;
      at = 0; ae = 0;
      for (int k = 0; k < 5; k++) begin
        longint sk;
        sk = 0;
        if (n - k >= 0)
          for (int c = 0; c < N_CH; c++) begin
            int e;
            e = expand(vin[n - k][c]);
            sk += (e > THR) ? e : 0;
          end
        at += term(ct[k].a, sk);
        ae += term(ce[k].a, sk);
      end
      yt[n + 2] = at;
      ye[n + 1] = ae;
      for (int c = 0; c < N_CH; c++) if (vin[n][c] > 0 && expand(vin[n][c]) <= THR) n_suppr++;
    end
    for (int n = 0; n < NX; n++) begin
      // flag for crossing n uses y[n-1], y[n], y[n+1]; the last crossing has no successor
      flag_m[n] = (n + 1 < NX) && (yt[n + 2] > yt[n + 1]) && (yt[n + 2] >= yt[n + 3]) && (yt[n + 2] > 0);
      if (flag_m[n]) flags.push_back(n);
    end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 8; j++) begin
        h[0][i][j] = (j >= 1 && j <= 3) ? 40 + 10 * i - 5 * j : -3 * i;
        h[1][i][j] = (j == 2) ? 100 + 20 * i : (j == 1 || j == 3) ? -10 * i : 0;
      end

    // ---------------- configuration
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = {4'(CFG_LUT), 4'hF, 12'(i)}; cfg_wdata = CFG_DW'(expand(i));
    end
    cfg(CFG_THR, 15, 0, THR);
    for (int k = 0; k < 5; k++) cfg(CFG_L1COEF, 0, k, int'(ct[k]));
    for (int k = 0; k < 5; k++) cfg(CFG_L1COEF, 0, 8 + k, int'(ce[k]));
    cfg(CFG_PILEUP, 0, 0, 6);
    for (int b = 0; b < 2; b++)
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 8; j++) cfg(CFG_L2COEF, 0, b * 64 + i * 16 + j, h[b][i][j] & 'hFFF);
    cfg(CFG_L2RANK, 0, 0, RSEL);
    cfg(CFG_PATCH, PATCH_CH, 0, 32'h10000 | PATCH_ADDR);
    cfg(CFG_ECCFLIP, 4, 0, 1 << 7);          // single error in every word of channel 4
    cfg(CFG_ECCFLIP, 5, 0, 'b1000001000);    // double error in channel 5
    cfg(CFG_ECCFLIP, PATCH_CH, 0, 'b11);     // double error in channel 2

    // ---------------- acquisition, PSA converter running alongside
    for (int c = 0; c < N_CH; c++) pf[c] = 0;
    for (int n = 0; n <= NX; n++) begin
      @(negedge clk);
      psa_enable = 1;
      psa_vin = $urandom_range(0, 1023);
      for (int c = 0; c < N_CH; c++) adc_fine[c] = 6'(pf[c]);
      if (n < NX) begin
        adc_valid = 1; wr_addr = addr_t'(n);
        for (int c = 0; c < N_CH; c++) begin
          cc = (vin[n][c] + int'($urandom_range(0, 30)) - 15) >>> 5;
          cc = cc < 0 ? 0 : cc > 31 ? 31 : cc;
          adc_coarse[c] = 5'(cc);
          pf[c] = vin[n][c] - cc * 32 + 16;
        end
      end else adc_valid = 0;
    end
    @(negedge clk) psa_enable = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (n_l1 != NX) begin failures++; $display("%0d first-level outputs for %0d crossings", n_l1, NX); end
    // pile-up model: flags within 6 crossings of the previous one
    begin
      int np;
      np = 0;
      for (int i = 1; i < flags.size(); i++) if (flags[i] - flags[i-1] <= 6) np++;
      checks++;
      if (np != n_pile) begin failures++; $display("pile-up %0d, model %0d", n_pile, np); end
    end

    // ---------------- readout of the frames around detected pulses
    for (int f = 0; f < flags.size() && f < 24; f++) begin
      int p0, len, mode, b;
      int pt [$];
      p0  = flags[f] - 3 < 0 ? 0 : flags[f] - 3;   // the timing FIR delays the peak by ~3
      len = 5;
      mode = f % 3;                         // 0 full, 1 reduced bank 0, 2 reduced bank 1
      b = (mode == 2);
      pt.delete();
      for (int i = 0; i < len; i++) pt.push_back(p0 + i < NX ? p0 + i : NX - 1);
      for (int c = 0; c < N_CH; c++) begin
        ro_word_t w;
        bit chan_bad;
        chan_bad = (c == 5) || (c == PATCH_CH);
        if (mode == 0) begin
          for (int i = 0; i < len; i++) begin
            w = '0;
            w.chan = 4'(c); w.idx = 3'(i);
            w.err = (c == 5) || (c == PATCH_CH && pt[i] != PATCH_ADDR);
            w.data = AMP_W'(expand(vin[pt[i]][c]));
            exp_q.push_back(w);
            chk_data.push_back(!w.err);
          end
        end else begin
          longint y [4];
          w = '0;
          w.reduced = 1; w.chan = 4'(c);
          w.err = chan_bad;                   // every frame holds a bad word there
          for (int j = 0; j < 4; j++) begin
            y[j] = 0;
            for (int i = 0; i < len; i++) y[j] += longint'(h[b][j][i]) * expand(vin[pt[i]][c]);
          end
          for (int j = 0; j < 4; j++) begin
            int rank;
            rank = 0;
            for (int i = 0; i < 4; i++) if (y[i] > y[j] || (y[i] == y[j] && i < j)) rank++;
            if (rank == RSEL) w.data = AMP_W'(y[j]);
          end
          exp_q.push_back(w);
          chk_data.push_back(!chan_bad);
          n_red[b]++;
        end
      end
      // command then pointers
      @(negedge clk);
      while (!cmd_ready) @(negedge clk);
      cmd_valid = 1; cmd_full = (mode == 0); cmd_bank = b[0]; cmd_len = 4'(len);
      @(negedge clk) cmd_valid = 0;
      for (int i = 0; i < len; i++) begin
        ptr_valid = 1; ptr = addr_t'(pt[i]);
        while (!ptr_ready) @(negedge clk);
        @(negedge clk);
        ptr_valid = 0;
      end
      @(negedge clk);
      while (ro_busy) @(negedge clk);
    end
    repeat (10) @(negedge clk);

    // ---------------- every mechanism must have happened
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d readout words missing", exp_q.size()); end
    $display("suppressed %0d, pulses %0d, pile-up %0d, corrected %0d, detected %0d, patched %0d",
             n_suppr, n_flag, n_pile, n_sec, n_ded, n_patch);
    $display("full words %0d, reduced bank0 %0d, reduced bank1 %0d, PSA words %0d",
             n_full, n_red[0], n_red[1], n_psa);
    foreach (n_red[i]) begin
      checks++;
      if (n_red[i] == 0) begin failures++; $display("reduced readout with bank %0d never ran", i); end
    end
    checks++; if (n_suppr == 0) begin failures++; $display("threshold never suppressed"); end
    checks++; if (n_flag  == 0) begin failures++; $display("no pulse detected"); end
    checks++; if (n_pile  == 0) begin failures++; $display("no pile-up"); end
    checks++; if (n_sec   == 0) begin failures++; $display("no ECC correction"); end
    checks++; if (n_ded   == 0) begin failures++; $display("no ECC detection"); end
    checks++; if (n_patch == 0) begin failures++; $display("patch memory never used"); end
    checks++; if (n_full  == 0) begin failures++; $display("no full readout"); end
    checks++; if (n_psa   == 0) begin failures++; $display("PSA converter idle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
