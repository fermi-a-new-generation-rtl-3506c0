// tb_psa_adc -- self-checking test of the parallel successive-approximation ADC core.
//
// A behavioural model samples a new random level into the S/H of whichever
// channel strobes `sample`, and drives each channel's comparator from its own
// held level and DAC code. With the converter enabled continuously the core
// must deliver one word per clock, in input order, each equal to the level
// sampled K_AZ + N_BITS + 1 clocks earlier.
module tb_psa_adc;
  localparam int N = 10, K = 4, NS = N + K;
  logic clk = 0, rst_n = 0, enable = 0;
  logic [NS-1:0] comp, sample, autozero;
  logic [NS-1:0][N-1:0] dac_code;
  logic out_valid;
  logic [N-1:0] dout;
  int checks = 0, failures = 0;
  int held [NS];
  int cycle = 0;

  psa_adc #(.N_BITS(N), .K_AZ(K)) dut (.*);

  always #5 clk = ~clk;
  always_comb for (int i = 0; i < NS; i++) comp[i] = (held[i] >= int'(dac_code[i]));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_q [$];
  int exp_t [$];
  int nout = 0;
  int vin;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    for (int i = 0; i < NS; i++)
      if (rst_n && sample[i]) begin
        held[i] <= vin;
        exp_q.push_back(vin);
        exp_t.push_back(cycle);
        checks++;
        if ($countones(sample) != 1) begin
          failures++;
          $display("%0d channels sample at once", $countones(sample));
        end
      end
    if (rst_n && out_valid) begin
      int e, t;
      checks++;
      nout++;
      e = exp_q.pop_front();
      t = exp_t.pop_front();
      if (dout != N'(e) || cycle - t != K + N + 1) begin
        failures++;
        $display("dout=%0d expected %0d, latency %0d", dout, e, cycle - t);
      end
    end
  end

  initial begin
    for (int i = 0; i < NS; i++) held[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      enable = 1;
      vin = (i % 97 == 0) ? 1023 : int'($urandom_range(0, 1023));
    end
    @(negedge clk) enable = 0;
    repeat (NS + 5) @(posedge clk);
    checks++;
    if (nout != 3000) begin
      failures++;
      $display("%0d words out, 3000 expected", nout);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
