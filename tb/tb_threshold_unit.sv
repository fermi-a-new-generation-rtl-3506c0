// tb_threshold_unit -- self-checking test of the channel threshold.
//
// Random samples around random thresholds, including equality: a sample
// passes only when strictly greater than the threshold, otherwise zero is
// sent, one clock later.
module tb_threshold_unit;
  logic clk = 0, rst_n = 0;
  logic [15:0] thr = 0, sample = 0, out;
  logic in_valid = 0, out_valid, above;
  int checks = 0, failures = 0;

  threshold_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, t, e;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      t = $urandom_range(0, 65535);
      case (i % 4)
        0: s = t;
        1: s = (t < 65535) ? t + 1 : t;
        default: s = $urandom_range(0, 65535);
      endcase
      thr = 16'(t); sample = 16'(s); in_valid = 1;
      e = (s > t) ? s : 0;
      @(negedge clk);
      checks++;
      if (!out_valid || out != 16'(e) || above != (s > t)) begin
        failures++;
        $display("sample %0d thr %0d: out %0d above %0b", s, t, out, above);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
