// tb_fermi_workload -- storage and readout workload of a FERMI module at 40 MHz.
//
// The module records every bunch crossing on nine channels while a
// behavioural address generator hands out memory locations from a pool of
// free pointers, as the module's environment does:
//   * each crossing takes one pointer from the pool;
//   * 1 % of the crossings are accepted by the (modelled) first-level
//     trigger, whose decision arrives 80 crossings (2 us) later; an accepted
//     crossing keeps the 8-sample time frame around it (3 before, 4 after);
//   * every other location returns to the pool once no frame can claim it;
//   * an accepted frame waits 80000 crossings (2 ms) for the second-level
//     decision and is then read out, alternately in full and reduced, while
//     recording goes on through the memories' other port; its locations then
//     return to the pool.
// The test records 400000 crossings (10 ms); accepts stop early enough for
// every accepted frame to be read before the end. It checks that the pool
// never runs dry with the default 8192-word memories, that every readout
// word matches the recorded sample or the second-level model, and that a
// frame takes fewer clocks to read than the mean spacing of accepts (100).
// It reports the peak number of locations in use and the longest wait of a
// frame behind earlier ones.
module tb_fermi_workload;
  import fermi_pkg::*;
  localparam int NX       = 400000;   // crossings recorded
  localparam int L1_LAT   = 80;       // first-level latency, crossings
  localparam int L2_LAT   = 80000;    // second-level latency, crossings
  localparam int FLEN     = 8;        // frame: a-3 … a+4
  localparam int ACC_END  = NX - L2_LAT - 5000;  // last crossing that may be accepted
  localparam int DEPTH    = 2 ** ADDR_BITS;
  localparam int THR      = 65535;    // nothing enters the trigger sum

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
  logic [13:0] psa_comp = '0, psa_sample, psa_autozero;
  logic [13:0][9:0] psa_dac_code;
  logic psa_valid;
  logic [9:0] psa_dout;
  int checks = 0, failures = 0;

  fermi_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (NX + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- signal model
  function automatic int vin(int n, int c);
    int unsigned h;
    h = int'(n) * 32'd2654435761 + int'(c) * 32'd40503 + 32'd12345;
    return int'((h >> 9) & 32'd1023);
  endfunction

  function automatic int expand(int code);
    return code * 64 + 5;            // linear calibration loaded into the tables
  endfunction

  int h2 [4][8];                      // second-level coefficients, bank 0

  // ---------------------------------------------------------------- address generator
  int free_q [$];
  int ptr_of [NX];
  bit accept [NX];
  int refcnt [DEPTH];
  int in_use = 0, max_in_use = 0;
  bit pool_empty = 0;

  typedef struct { int a; int due; } frame_t;
  frame_t l2_q [$];
  int n_acc = 0;
  int crossing = 0;

  // ---------------------------------------------------------------- readout monitor
  ro_word_t exp_q [$];
  int n_full = 0, n_red = 0;
  always @(posedge clk) if (rst_n && ro_valid) begin
    ro_word_t e;
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("unexpected readout word");
    end else begin
      e = exp_q.pop_front();
      if (ro_word != e) begin
        failures++;
        $display("readout word %p expected %p", ro_word, e);
      end
      if (e.reduced) n_red++; else n_full++;
    end
  end

  // ---------------------------------------------------------------- configuration and recording
  initial begin
    int pf [N_CH];
    int cc;
    for (int i = 0; i < DEPTH; i++) begin
      free_q.push_back(i);
      refcnt[i] = 0;
    end
    for (int j = 0; j < 4; j++)
      for (int i = 0; i < 8; i++) h2[j][i] = (i == 3 + (j % 2)) ? 4 + j : (i >= 2 && i <= 5) ? 1 : 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = {4'(CFG_LUT), 4'hF, 12'(i)}; cfg_wdata = CFG_DW'(expand(i));
    end
    @(negedge clk);
    cfg_addr = {4'(CFG_THR), 4'hF, 12'd0}; cfg_wdata = THR;
    for (int j = 0; j < 4; j++)
      for (int i = 0; i < 8; i++) begin
        @(negedge clk);
        cfg_addr = {4'(CFG_L2COEF), 4'd0, 12'(j * 16 + i)}; cfg_wdata = CFG_DW'(h2[j][i]);
      end
    @(negedge clk);
    cfg_addr = {4'(CFG_L2RANK), 4'd0, 12'd0}; cfg_wdata = 0;     // the largest
    @(negedge clk) cfg_we = 0;

    for (int c = 0; c < N_CH; c++) pf[c] = 0;
    for (int n = 0; n <= NX; n++) begin
      @(negedge clk);
      crossing = n;
      for (int c = 0; c < N_CH; c++) adc_fine[c] = 6'(pf[c]);
      if (n < NX) begin
        if (free_q.size() == 0) begin
          pool_empty = 1;
          ptr_of[n] = 0;
        end else begin
          ptr_of[n] = free_q.pop_front();
          in_use++;
          if (in_use > max_in_use) max_in_use = in_use;
        end
        accept[n] = (n >= 3) && (n < ACC_END) && ($urandom_range(0, 99) == 0);
        adc_valid = 1; wr_addr = addr_t'(ptr_of[n]);
        for (int c = 0; c < N_CH; c++) begin
          cc = (vin(n, c) + int'($urandom_range(0, 30)) - 15) >>> 5;
          cc = cc < 0 ? 0 : cc > 31 ? 31 : cc;
          adc_coarse[c] = 5'(cc);
          pf[c] = vin(n, c) - cc * 32 + 16;
        end
      end else adc_valid = 0;
      // first-level decision on crossing n - L1_LAT: an accepted frame holds its locations
      if (n - L1_LAT >= 0 && n - L1_LAT < NX && accept[n - L1_LAT]) begin
        int a;
        a = n - L1_LAT;
        for (int k = a - 3; k <= a + 4; k++) refcnt[ptr_of[k]]++;
        l2_q.push_back('{a: a, due: n + L2_LAT});
        n_acc++;
      end
      // a location no frame can claim any more returns to the pool
      if (n - L1_LAT - 4 >= 0 && n - L1_LAT - 4 < NX) begin
        int x;
        x = n - L1_LAT - 4;
        if (refcnt[ptr_of[x]] == 0) begin
          free_q.push_back(ptr_of[x]);
          in_use--;
        end
      end
    end
  end

  // ---------------------------------------------------------------- second-level readout
  initial begin
    int n_frames, lag_max, t0, dt;
    longint busy_clk;
    frame_t f;
    n_frames = 0; lag_max = 0; busy_clk = 0;
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      if (crossing >= NX && (l2_q.size() == 0 || l2_q[0].due > crossing)) break;
      if (l2_q.size() != 0 && l2_q[0].due <= crossing && cmd_ready) begin
        bit full;
        f = l2_q.pop_front();
        full = (n_frames % 2 == 0);
        for (int c = 0; c < N_CH; c++) begin
          ro_word_t w;
          if (full) begin
            for (int i = 0; i < FLEN; i++) begin
              w = '0;
              w.chan = 4'(c); w.idx = 3'(i);
              w.data = AMP_W'(expand(vin(f.a - 3 + i, c)));
              exp_q.push_back(w);
            end
          end else begin
            longint y, best;
            best = 0;
            for (int j = 0; j < 4; j++) begin
              y = 0;
              for (int i = 0; i < FLEN; i++) y += longint'(h2[j][i]) * expand(vin(f.a - 3 + i, c));
              if (j == 0 || y > best) best = y;
            end
            w = '0;
            w.reduced = 1; w.chan = 4'(c); w.data = AMP_W'(best);
            exp_q.push_back(w);
          end
        end
        t0 = crossing;
        cmd_valid = 1; cmd_full = full; cmd_bank = 0; cmd_len = 4'(FLEN);
        @(negedge clk) cmd_valid = 0;
        for (int i = 0; i < FLEN; i++) begin
          ptr_valid = 1; ptr = addr_t'(ptr_of[f.a - 3 + i]);
          while (!ptr_ready) @(negedge clk);
          @(negedge clk);
          ptr_valid = 0;
        end
        while (ro_busy) @(negedge clk);
        // frame read: its locations go back to the pool
        for (int k = f.a - 3; k <= f.a + 4; k++) begin
          refcnt[ptr_of[k]]--;
          if (refcnt[ptr_of[k]] == 0) begin
            free_q.push_back(ptr_of[k]);
            in_use--;
          end
        end
        dt = crossing - t0;
        busy_clk += longint'(dt);
        if (t0 - f.due > lag_max) lag_max = t0 - f.due;
        n_frames++;
      end
    end
    repeat (10) @(negedge clk);
    $display("accepted %0d frames, read %0d (full words %0d, reduced words %0d)",
             n_acc, n_frames, n_full, n_red);
    $display("peak locations in use %0d of %0d, mean readout %0d clocks per frame, longest wait %0d crossings",
             max_in_use, DEPTH, (n_frames != 0) ? busy_clk / longint'(n_frames) : 0, lag_max);
    checks++;
    if (pool_empty) begin failures++; $display("the pointer pool ran dry"); end
    checks++;
    if (n_frames != n_acc || n_frames < 1000 || n_full == 0 || n_red == 0 || exp_q.size() != 0) begin
      failures++;
      $display("too few frames read or words missing (%0d left)", exp_q.size());
    end
    checks++;
    if (n_frames == 0 || busy_clk >= longint'(n_frames) * 100) begin
      failures++;
      $display("readout slower than the accept rate");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
