// tb_fir5_bs -- self-checking test of the barrel-shifter FIR filter.
//
// Random coefficient sets (each tap two terms +-2^(1-s) or off) are applied
// to random input streams, including full-scale inputs with the largest
// coefficients. The output, with 6 fractional bits, must equal the exact
// convolution computed here with integer arithmetic, one clock after each
// sample; clocks without in_valid must not advance the delay line.
module tb_fir5_bs;
  import fermi_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  bs_coef_t coef [5];
  logic [19:0] x = 0;
  logic out_valid;
  logic signed [31:0] y;
  int checks = 0, failures = 0;

  fir5_bs dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint term(bs_term_t t, longint v);
    longint m;
    if (!t.en) return 0;
    m = v * (longint'(1) << (7 - int'(t.shift)));
    return t.neg ? -m : m;
  endfunction

  longint hist [5];

  initial begin
    longint e;
    for (int k = 0; k < 5; k++) hist[k] = 0;
    for (int k = 0; k < 5; k++) coef[k] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int set = 0; set < 40; set++) begin
      for (int k = 0; k < 5; k++) begin
        coef[k] = bs_coef_t'($urandom);
        if (set == 0) coef[k] = '{a: '{1'b1, 1'b0, 3'd0}, b: '{1'b1, 1'b0, 3'd0}};  // +4 each
        if (set == 1) coef[k] = '{a: '{1'b1, 1'b1, 3'd0}, b: '{1'b1, 1'b1, 3'd0}};  // -4 each
      end
      for (int i = 0; i < 200; i++) begin
        x = (set < 2) ? 20'hFFFFF : 20'($urandom);
        in_valid = ($urandom_range(0, 4) != 0);
        if (in_valid) begin
          for (int k = 4; k > 0; k--) hist[k] = hist[k-1];
          hist[0] = longint'(x);
        end
        e = 0;
        for (int k = 0; k < 5; k++) e += term(coef[k].a, hist[k]) + term(coef[k].b, hist[k]);
        @(negedge clk);
        if (in_valid) begin
          checks++;
          if (!out_valid || longint'(y) != e) begin
            failures++;
            $display("set %0d sample %0d: y %0d expected %0d", set, i, y, e);
          end
        end
        in_valid = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
