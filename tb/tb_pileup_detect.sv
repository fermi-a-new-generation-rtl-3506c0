// tb_pileup_detect -- self-checking test of the pile-up warning.
//
// Pulse flags are sent at random distances (2 to 41 crossings) with a window
// of 6, then 0; pileup must follow a flag one clock later exactly when the
// distance to the previous flag is at most the window. The first flag after
// reset never counts.
module tb_pileup_detect;
  logic clk = 0, rst_n = 0;
  logic [7:0] window = 8'd6;
  logic pulse = 0, pileup;
  int checks = 0, failures = 0;

  pileup_detect dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, n_pu;
    logic first;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    first = 1; n_pu = 0;
    for (int i = 0; i < 2000; i++) begin
      if (i == 1500) window = 0;
      d = (i == 0) ? 3 : (i % 2 == 0) ? int'($urandom_range(1, 8)) : int'($urandom_range(1, 40));
      repeat (d - 1) begin
        @(negedge clk);
        checks++;
        if (pileup) begin failures++; $display("pileup without a flag"); end
      end
      @(negedge clk) pulse = 1;
      @(negedge clk) pulse = 0;
      checks++;
      if (pileup != (!first && d + 1 <= int'(window))) begin
        failures++;
        $display("flag after %0d crossings, window %0d: pileup %0b", d + 1, window, pileup);
      end
      n_pu += pileup;
      first = 0;
    end
    checks++;
    if (n_pu == 0) begin failures++; $display("no pile-up seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
