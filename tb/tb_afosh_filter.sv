// tb_afosh_filter -- self-checking test of the second-level (FIR / order-statistic) filter.
//
// Both coefficient banks are loaded with random signed coefficients (a few
// subfilters are made equal to exercise the tie rule). Frames of 1 to 10
// samples (taps past the eighth contribute nothing) are streamed with random
// bank and rank, back to back or with gaps. For each frame the model
// computes every subfilter's inner product, ranks them and expects the r-th
// largest exactly two clocks after the frame's last sample.
module tb_afosh_filter;
  localparam int NS = 4, NT = 8;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0, cfg_bank = 0;
  logic [1:0] cfg_sub = 0;
  logic [2:0] cfg_tap = 0;
  logic signed [11:0] cfg_coef = 0;
  logic [1:0] r_sel = 0;
  logic bank = 0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic [15:0] x = 0;
  logic out_valid;
  logic signed [31:0] amp;
  int checks = 0, failures = 0;

  afosh_filter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int h [2][NS][NT];
  longint exp_q [$];
  int     exp_t [$];
  int cycle = 0, n_out = 0;
  int n_bank [2] = '{0, 0};

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && out_valid) begin
      longint e;
      int t;
      checks++;
      n_out++;
      e = exp_q.pop_front();
      t = exp_t.pop_front();
      if (longint'(amp) != e || cycle - t != 2) begin
        failures++;
        $display("amp %0d expected %0d, %0d clocks after last", amp, e, cycle - t);
      end
    end
  end

  initial begin
    int len, b, r, nfr;
    longint y [NS];
    int xs [$];
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int bb = 0; bb < 2; bb++)
      for (int j = 0; j < NS; j++)
        for (int i = 0; i < NT; i++) begin
          h[bb][j][i] = int'($urandom_range(0, 4095)) - 2048;
          if (j == 3) h[bb][j][i] = h[bb][1][i];     // subfilters 1 and 3 tie
          @(negedge clk);
          cfg_we = 1; cfg_bank = bb[0]; cfg_sub = 2'(j); cfg_tap = 3'(i); cfg_coef = 12'(h[bb][j][i]);
        end
    @(negedge clk) cfg_we = 0;
    nfr = 600;
    for (int f = 0; f < nfr; f++) begin
      len = $urandom_range(1, 10);
      b = $urandom_range(0, 1);
      r = $urandom_range(0, NS - 1);
      n_bank[b]++;
      xs.delete();
      for (int i = 0; i < len; i++) xs.push_back(int'($urandom_range(0, 65535)));
      for (int j = 0; j < NS; j++) begin
        y[j] = 0;
        for (int i = 0; i < len && i < NT; i++) y[j] += longint'(h[b][j][i]) * xs[i];
      end
      // r-th largest, ties ranked by index
      for (int j = 0; j < NS; j++) begin
        int rank;
        rank = 0;
        for (int i = 0; i < NS; i++) if (y[i] > y[j] || (y[i] == y[j] && i < j)) rank++;
        if (rank == r) exp_q.push_back(y[j]);
      end
      for (int i = 0; i < len; i++) begin
        in_valid = 1; in_first = (i == 0); in_last = (i == len - 1);
        x = 16'(xs[i]);
        bank = (i == 0) ? b[0] : ~b[0];      // only the first sample's bank counts
        r_sel = (i == 0) ? 2'(r) : 2'(~r);
        if (i == len - 1) exp_t.push_back(cycle);
        @(negedge clk);
      end
      in_valid = 0; in_first = 0; in_last = 0;
      if ($urandom_range(0, 1) == 0) repeat ($urandom_range(1, 3)) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    checks++;
    if (n_out != nfr || n_bank[0] == 0 || n_bank[1] == 0) begin
      failures++;
      $display("%0d results for %0d frames", n_out, nfr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
