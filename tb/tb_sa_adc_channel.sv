// tb_sa_adc_channel -- self-checking test of one successive-approximation channel.
//
// A behavioural S/H and comparator hold a random input level at the start
// strobe and compare it with the channel's DAC code. Each conversion must
// return the held level, with `done` exactly K_AZ + N_BITS clocks after the
// start and the auto-zero phase lasting K_AZ clocks. Conversions are started
// back to back, as in the parallel converter.
module tb_sa_adc_channel;
  localparam int N = 10, K = 4;
  logic clk = 0, rst_n = 0;
  logic start = 0, comp;
  logic sample, autozero, done;
  logic [N-1:0] dac_code, code;
  int checks = 0, failures = 0;
  int held = 0;

  sa_adc_channel #(.N_BITS(N), .K_AZ(K)) dut (.*);

  always #5 clk = ~clk;
  assign comp = (held >= int'(dac_code));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, az;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      v = (i == 0) ? 0 : (i == 1) ? 1023 : int'($urandom_range(0, 1023));
      @(negedge clk);
      start = 1;
      held  = v;
      az    = 1;            // the start clock auto-zeroes too
      @(negedge clk);
      start = 0;
      for (int t = 1; t < K + N; t++) begin
        checks++;
        if (done) begin
          // result of the previous conversion may be visible in clock 1 only
        end
        if (autozero != (t < K)) begin
          failures++;
          $display("autozero=%0b in clock %0d", autozero, t);
        end
        az += autozero;
        @(negedge clk);
      end
      // clock K+N after the start: done with the held value
      checks++;
      if (!done || code != N'(v)) begin
        failures++;
        $display("conversion %0d: done=%0b code=%0d expected %0d", i, done, code, v);
      end
      checks++;
      if (az != K) begin
        failures++;
        $display("auto-zero lasted %0d clocks", az);
      end
      // next start comes in this same clock (back to back)
      start = 1;
      held  = int'($urandom_range(0, 1023));
      @(negedge clk);
      start = 0;
      // finish it quietly to keep the loop simple
      repeat (K + N - 1) @(negedge clk);
      checks++;
      if (!done || code != N'(held)) begin
        failures++;
        $display("back-to-back conversion: code=%0d expected %0d", code, held);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
