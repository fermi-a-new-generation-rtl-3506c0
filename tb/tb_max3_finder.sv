// tb_max3_finder -- self-checking test of the three-point maximum finder.
//
// A stream of random values (with many repeats and sign changes) is fed in;
// after each input y[n] the flag must say, one clock later, whether y[n-1]
// is greater than y[n-2], at least y[n], and positive, with peak = y[n-1].
module tb_max3_finder;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [31:0] y = 0, peak;
  logic out_valid, flag;
  int checks = 0, failures = 0;

  max3_finder dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v [3];
    int n_flag;
    logic e;
    v = '{0, 0, 0};
    n_flag = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 10000; i++) begin
      v[2] = v[1];
      v[1] = v[0];
      v[0] = int'($urandom_range(0, 8)) - 3;
      y = v[0];
      in_valid = 1;
      e = (v[1] > v[2]) && (v[1] >= v[0]) && (v[1] > 0);
      @(negedge clk);
      checks++;
      if (!out_valid || flag != e || peak != v[1]) begin
        failures++;
        $display("values %0d %0d %0d: flag %0b expected %0b", v[2], v[1], v[0], flag, e);
      end
      n_flag += flag;
    end
    checks++;
    if (n_flag == 0) begin failures++; $display("never flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
