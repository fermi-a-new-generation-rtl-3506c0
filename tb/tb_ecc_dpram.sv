// tb_ecc_dpram -- self-checking test of the SEC-DED channel memory.
//
// Random words are written to random addresses with no, one or two bits of
// the stored codeword flipped through the diagnostic mask (every bit position
// is used for single flips). Reading back must return the written word with
// sec set for one flip, ded set for two, neither for none, one clock after
// the read. Reads and writes run in the same clocks on the two ports.
module tb_ecc_dpram;
  logic clk = 0, rst_n = 0;
  logic we = 0, re = 0;
  logic [12:0] waddr = 0, raddr = 0;
  logic [15:0] wdata = 0;
  logic [21:0] flip = 0;
  logic rvalid, sec, ded;
  logic [15:0] rdata;
  int checks = 0, failures = 0;

  ecc_dpram dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int         n_sec = 0, n_ded = 0;
  logic [15:0] ref_d [8192];
  int          ref_f [8192];
  logic        written [8192];

  initial begin
    int a, nf, b1, b2;
    for (int i = 0; i < 8192; i++) written[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      // write port
      a  = $urandom_range(0, 8191);
      nf = i % 3;
      b1 = i % 22;
      b2 = (b1 + 1 + int'($urandom_range(0, 20))) % 22;
      we = 1; waddr = 13'(a); wdata = 16'($urandom);
      flip = '0;
      if (nf >= 1) flip[b1] = 1'b1;
      if (nf == 2) flip[b2] = 1'b1;
      ref_d[a] = wdata; ref_f[a] = nf; written[a] = 1;
      // read port: an address written earlier
      a = $urandom_range(0, 8191);
      re = written[a] && (a != int'(waddr));
      raddr = 13'(a);
      @(negedge clk);
      we = 0;
      if (re) begin
        checks++;
        if (!rvalid || (ref_f[a] < 2 && rdata != ref_d[a]) || sec != (ref_f[a] == 1) || ded != (ref_f[a] == 2)) begin
          failures++;
          $display("addr %0d flips %0d: data %h exp %h sec %0b ded %0b", a, ref_f[a], rdata, ref_d[a], sec, ded);
        end
        n_sec += (ref_f[a] == 1);
        n_ded += (ref_f[a] == 2);
      end
      re = 0;
    end
    checks++;
    if (n_sec == 0 || n_ded == 0) begin
      failures++;
      $display("single errors read %0d, double errors read %0d", n_sec, n_ded);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
