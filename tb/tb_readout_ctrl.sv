// tb_readout_ctrl -- self-checking test of the time-frame readout controller.
//
// The nine channel memories are modelled here (one-clock read, contents a
// function of channel and address, a few addresses marked uncorrectable),
// and so is the second-level filter (it returns the sum of the frame's
// samples two clocks after the last one). Commands with random lengths,
// modes and banks, and their pointer lists, are sent with random gaps.
// Full readout must give N_CH * len raw words, channel-major, each two clocks
// after its read; reduced readout one sum per channel; error flags must
// follow the marked addresses; the bank must reach the filter.
module tb_readout_ctrl;
  import fermi_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, cmd_full = 0, cmd_bank = 0;
  logic [3:0] cmd_len = 0;
  logic ptr_valid = 0, ptr_ready;
  addr_t ptr = 0;
  logic rd_en, rd_valid = 0;
  addr_t rd_addr;
  sample_t rd_data [N_CH];
  logic [N_CH-1:0] rd_ded = '0;
  logic f_valid, f_first, f_last, f_bank, f_out_valid = 0;
  sample_t f_x;
  logic signed [AMP_W-1:0] f_amp = 0;
  logic out_valid, busy;
  ro_word_t out_word;
  int checks = 0, failures = 0;

  readout_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sample_t memval(int c, int a);
    return sample_t'((a * 7 + c * 1000 + 13) & 16'hFFFF);
  endfunction
  function automatic bit bad(int c, int a);
    return ((a + c) % 53) == 0;
  endfunction

  // memory model
  int cycle = 0;
  int rd_cycle [$];
  always @(posedge clk) begin
    cycle <= cycle + 1;
    rd_valid <= rd_en;
    if (rd_en) begin
      for (int c = 0; c < N_CH; c++) begin
        rd_data[c] <= memval(c, int'(rd_addr));
        rd_ded[c]  <= bad(c, int'(rd_addr));
      end
      rd_cycle.push_back(cycle);
    end
  end

  // filter model: sum of the frame, two clocks after the last sample
  longint acc = 0;
  logic l1 = 0;
  logic exp_bank;
  int bank_err = 0;
  always @(posedge clk) begin
    l1 <= f_valid && f_last;
    f_out_valid <= l1;
    if (l1) f_amp <= AMP_W'(acc);
    if (f_valid) begin
      acc <= (f_first ? 0 : acc) + longint'(f_x);
      if (f_bank != exp_bank) bank_err++;
    end
  end

  ro_word_t exp_q [$];
  int       exp_rd [$];      // index of the read behind a raw word
  int n_full = 0, n_red = 0, n_err = 0;

  always @(posedge clk) if (rst_n && out_valid) begin
    ro_word_t e;
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("unexpected word");
    end else begin
      e = exp_q.pop_front();
      if (out_word != e) begin
        failures++;
        $display("word %p expected %p", out_word, e);
      end
      if (!e.reduced) begin
        int rc;
        rc = rd_cycle.pop_front();
        if (cycle - rc != 2) begin
          failures++;
          $display("raw word %0d clocks after its read", cycle - rc);
        end
        n_full++;
      end else begin
        n_red++;
        // drop the reads of this channel's frame
      end
      n_err += e.err;
    end
  end

  initial begin
    int len, nc;
    int ptrs [$];
    ro_word_t w;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    nc = 300;
    for (int k = 0; k < nc; k++) begin
      len = $urandom_range(1, 8);
      ptrs.delete();
      for (int i = 0; i < len; i++) ptrs.push_back(int'($urandom_range(0, 8191)));
      @(negedge clk);
      while (!cmd_ready) @(negedge clk);
      cmd_valid = 1; cmd_full = (k % 2 == 0); cmd_bank = 1'($urandom); cmd_len = 4'(len);
      exp_bank = cmd_bank;
      for (int c = 0; c < N_CH; c++) begin
        longint s;
        logic er;
        s = 0; er = 0;
        for (int i = 0; i < len; i++) begin
          if (cmd_full) begin
            w = '0;
            w.chan = 4'(c); w.idx = 3'(i); w.err = bad(c, ptrs[i]);
            w.data = AMP_W'(memval(c, ptrs[i]));
            exp_q.push_back(w);
          end
          s += longint'(memval(c, ptrs[i]));
          er |= bad(c, ptrs[i]);
        end
        if (!cmd_full) begin
          w = '0;
          w.reduced = 1; w.chan = 4'(c); w.err = er; w.data = AMP_W'(s);
          exp_q.push_back(w);
        end
      end
      @(negedge clk) cmd_valid = 0;
      for (int i = 0; i < len; i++) begin
        repeat ($urandom_range(0, 2)) @(negedge clk);
        ptr_valid = 1; ptr = addr_t'(ptrs[i]);
        while (!ptr_ready) @(negedge clk);
        @(negedge clk);
        ptr_valid = 0;
      end
      if (!cmd_full) begin
        // reduced frames: reads are not matched to words
        wait (!busy);
        rd_cycle.delete();
      end
    end
    @(negedge clk);
    wait (!busy);
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || n_full == 0 || n_red == 0 || n_err == 0 || bank_err != 0) begin
      failures++;
      $display("left %0d, full %0d, reduced %0d, errors %0d, bank mismatches %0d",
               exp_q.size(), n_full, n_red, n_err, bank_err);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
