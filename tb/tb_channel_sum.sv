// tb_channel_sum -- self-checking test of the summing unit and its residue check.
//
// Random and extreme (all zero, all full scale) sets of nine samples; the sum
// must be their exact total one clock later and the modulo-3 check must stay
// quiet on a fault-free adder.
module tb_channel_sum;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [8:0][15:0] samples = '0;
  logic out_valid, res_err;
  logic [19:0] sum;
  int checks = 0, failures = 0;

  channel_sum dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      e = 0;
      for (int c = 0; c < 9; c++) begin
        int v;
        v = (i == 0) ? 0 : (i == 1) ? 65535 : (($urandom_range(0, 3) == 0) ? 0 : int'($urandom_range(0, 65535)));
        samples[c] = 16'(v);
        e += v;
      end
      in_valid = 1;
      @(negedge clk);
      checks++;
      if (!out_valid || sum != 20'(e) || res_err) begin
        failures++;
        $display("sum %0d expected %0d, res_err %0b", sum, e, res_err);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
