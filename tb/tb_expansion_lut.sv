// tb_expansion_lut -- self-checking test of the expansion look-up table.
//
// The table is loaded with a piecewise-linear expansion (the inverse of a
// three-segment compressor: gains 1, 8 and 64 above codes 0, 512 and 768)
// plus a per-test calibration offset, then random codes are looked up and
// compared with the formula one clock later. A rewrite of single entries
// must take effect.
module tb_expansion_lut;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [9:0] code = 0;
  logic out_valid;
  logic [15:0] sample;
  logic cfg_we = 0;
  logic [9:0] cfg_addr = 0;
  logic [15:0] cfg_data = 0;
  int checks = 0, failures = 0;

  expansion_lut dut (.*);
  always #5 clk = ~clk;

  function automatic int expand(int c);
    if (c < 512) return c + 7;
    if (c < 768) return 512 + (c - 512) * 8 + 7;
    return 2560 + (c - 768) * 64 + 7 > 65535 ? 65535 : 2560 + (c - 768) * 64 + 7;
  endfunction

  int tbl [1024];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 1024; i++) begin
      tbl[i] = expand(i);
      @(negedge clk);
      cfg_we = 1; cfg_addr = 10'(i); cfg_data = 16'(tbl[i]);
    end
    @(negedge clk) cfg_we = 0;
    for (int i = 0; i < 3000; i++) begin
      int c;
      c = (i < 1024) ? i : int'($urandom_range(0, 1023));
      if (i == 2000) begin
        cfg_we = 1; cfg_addr = 10'd100; cfg_data = 16'hBEEF; tbl[100] = 'hBEEF;
        @(negedge clk) cfg_we = 0;
      end
      in_valid = 1; code = 10'(c);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || sample != 16'(tbl[c])) begin
        failures++;
        $display("code %0d: sample %0d expected %0d (valid %0b)", c, sample, tbl[c], out_valid);
      end
    end
    in_valid = 1; code = 10'd100;
    @(negedge clk) in_valid = 0;
    checks++;
    if (sample != 16'hBEEF) begin
      failures++;
      $display("rewritten entry reads %h", sample);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
