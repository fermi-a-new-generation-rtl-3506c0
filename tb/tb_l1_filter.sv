// tb_l1_filter -- self-checking test of the first-level trigger filter.
//
// Both FIRs are programmed through the configuration port (a matched-shape
// timing filter and a simple amplitude filter), then a channel-sum stream of
// calorimeter-like pulses (rise over two crossings, slow decay) at random
// times and heights, on a small noise floor, is applied. An integer model of
// both FIRs and of the maximum finder predicts, for every output, the flag
// and the energy of the crossing before the newest one; pulses must be found.
module tb_l1_filter;
  import fermi_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0, cfg_sel = 0;
  logic [2:0] cfg_tap = 0;
  bs_coef_t cfg_coef = '0;
  logic in_valid = 0;
  logic [19:0] sum = 0;
  logic out_valid, pulse;
  logic signed [31:0] energy;
  int checks = 0, failures = 0;

  l1_filter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bs_coef_t ct [5], ce [5];

  function automatic bs_coef_t mk(bit ea, bit na, int sa, bit eb, bit nb, int sb);
    bs_coef_t c;
    c.a = '{ea, na, 3'(sa)};
    c.b = '{eb, nb, 3'(sb)};
    return c;
  endfunction

  function automatic longint term(bs_term_t t, longint v);
    longint m;
    if (!t.en) return 0;
    m = v * (longint'(1) << (7 - int'(t.shift)));
    return t.neg ? -m : m;
  endfunction

  function automatic longint fir(bs_coef_t c [5], longint h [5]);
    longint a = 0;
    for (int k = 0; k < 5; k++) a += term(c[k].a, h[k]) + term(c[k].b, h[k]);
    return a;
  endfunction

  longint hist [5];
  longint yt [$], ye [$];
  int n_out = 0, n_flag = 0;

  always @(posedge clk) if (rst_n && out_valid) begin
    longint t0, t1, t2, e1;
    int k;
    k = n_out;
    t0 = yt[k + 2]; t1 = yt[k + 1]; t2 = yt[k];   // yt has two leading zeros
    e1 = ye[k];                                    // ye has one leading zero
    checks++;
    if (pulse != ((t1 > t2) && (t1 >= t0) && (t1 > 0)) || longint'(energy) != e1) begin
      failures++;
      $display("output %0d: pulse %0b energy %0d expected %0d", k, pulse, energy, e1);
    end
    n_flag += pulse;
    n_out++;
  end

  initial begin
    int amp [$];
    int s;
    int shape [6] = '{0, 300, 1000, 700, 400, 200};   // per mille
    int tstart [$];
    // timing: taps 0..4 = -1/2, 0, 1, 1, -1/2 ; energy: 1/4, 1/2, 1, 1/2, 1/4
    ct = '{mk(1,1,2,0,0,0), mk(0,0,0,0,0,0), mk(1,0,1,0,0,0), mk(1,0,1,0,0,0), mk(1,1,2,0,0,0)};
    ce = '{mk(1,0,3,0,0,0), mk(1,0,2,0,0,0), mk(1,0,1,0,0,0), mk(1,0,2,0,0,0), mk(1,0,3,0,0,0)};
    for (int k = 0; k < 5; k++) hist[k] = 0;
    yt.push_back(0); yt.push_back(0);
    ye.push_back(0);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 10; k++) begin
      @(negedge clk);
      cfg_we = 1; cfg_sel = (k >= 5); cfg_tap = 3'(k % 5); cfg_coef = (k < 5) ? ct[k] : ce[k - 5];
    end
    @(negedge clk) cfg_we = 0;
    for (int n = 0; n < 3000; n++) begin
      if (n % 37 == 5) begin
        tstart.push_back(n);
        amp.push_back(int'($urandom_range(100, 500000)));
      end
      s = int'($urandom_range(0, 20));
      for (int p = 0; p < tstart.size(); p++)
        if (n - tstart[p] >= 0 && n - tstart[p] < 6) s += amp[p] / 1000 * shape[n - tstart[p]];
      sum = 20'(s > 1048575 ? 1048575 : s);
      in_valid = 1;
      for (int k = 4; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = longint'(sum);
      yt.push_back(fir(ct, hist));
      ye.push_back(fir(ce, hist));
      @(negedge clk);
    end
    in_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (n_out != 3000 || n_flag < 50) begin
      failures++;
      $display("%0d outputs, %0d pulses flagged", n_out, n_flag);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
