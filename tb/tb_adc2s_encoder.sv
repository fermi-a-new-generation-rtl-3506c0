// tb_adc2s_encoder -- self-checking test of the two-stage ADC coding stage.
//
// A behavioural model of the analog half converts random input levels: the
// coarse flash is given an error of up to +-15 LSB, the fine flash converts
// the true residue. The corrected 10-bit word must equal the input level
// exactly, two clocks after the coarse bits. Clamping at both ends of the
// range is checked with out-of-range raw codes.
module tb_adc2s_encoder;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [4:0] coarse = 0;
  logic [5:0] fine = 0;
  logic out_valid;
  logic [9:0] code;
  int checks = 0, failures = 0;

  adc2s_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int vin [$];
  int pend_fine = -1;   // residue code of the previous sample

  // analog model: coarse bits now, fine bits of the same sample next clock
  task automatic convert(input int v, input int err, output int c, output int f);
    int cc;
    cc = (v + err) >>> 5;
    if (cc < 0) cc = 0;
    if (cc > 31) cc = 31;
    c = cc;
    f = v - cc * 32 + 16;
  endtask

  int exp_q [$];
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("unexpected output %0d", code);
    end else begin
      int e;
      e = exp_q.pop_front();
      if (code !== 10'(e)) begin
        failures++;
        $display("code %0d expected %0d", code, e);
      end
    end
  end

  initial begin
    int c, f, prevf;
    int v;
    int n_in;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    prevf = 0;
    n_in = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      v = $urandom_range(0, 1023);
      convert(v, int'($urandom_range(0, 30)) - 15, c, f);
      in_valid = 1;
      coarse   = 5'(c);
      fine     = 6'(prevf);
      prevf    = f;
      exp_q.push_back(v);
    end
    // clamp checks: coarse 0 with fine 0, coarse 31 with fine 63
    @(negedge clk); coarse = 0;  fine = 6'(prevf); prevf = 0;  exp_q.push_back(0);
    @(negedge clk); coarse = 31; fine = 6'(prevf); prevf = 63; exp_q.push_back(1023);
    @(negedge clk); in_valid = 0; fine = 6'(prevf);
    repeat (4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d words missing", exp_q.size());
    end
    // latency: a lone sample must appear exactly two clocks after its coarse bits
    @(negedge clk);
    convert(700, 3, c, f);
    in_valid = 1; coarse = 5'(c);
    exp_q.push_back(700);
    @(negedge clk); in_valid = 0; fine = 6'(f);
    @(posedge clk); #1;
    checks++;
    if (!out_valid || code != 10'd700) begin
      failures++;
      $display("latency: out_valid=%0b code=%0d two clocks after coarse", out_valid, code);
    end
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
