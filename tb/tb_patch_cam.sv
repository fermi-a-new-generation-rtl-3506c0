// tb_patch_cam -- self-checking test of the associative patch memory.
//
// Entries are programmed for a few addresses; a stream of random writes and
// reads (biased towards the patched addresses) must give a hit exactly for
// patched addresses, returning the last data written there, one clock after
// the read. Disabling an entry must end its hits.
module tb_patch_cam;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0, cfg_valid = 0;
  logic [1:0] cfg_idx = 0;
  logic [12:0] cfg_addr = 0, waddr = 0, raddr = 0;
  logic we = 0, re = 0, hit;
  logic [15:0] wdata = 0, rdata;
  int checks = 0, failures = 0;

  patch_cam dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pa [4] = '{17, 4000, 8191, 0};
  logic pv [4];
  logic [15:0] pd [4];
  int nhit = 0;

  function automatic int find(int a);
    for (int i = 0; i < 4; i++) if (pv[i] && pa[i] == a) return i;
    return -1;
  endfunction

  task automatic program_entry(int i, logic v);
    @(negedge clk);
    cfg_we = 1; cfg_idx = 2'(i); cfg_valid = v; cfg_addr = 13'(pa[i]);
    pv[i] = v;
    @(negedge clk) cfg_we = 0;
  endtask

  initial begin
    int a, e, wa;
    logic [15:0] ed;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 4; i++) pv[i] = 0;
    for (int i = 0; i < 3; i++) program_entry(i, 1);
    for (int i = 0; i < 3; i++) begin       // first writes to the patched cells
      @(negedge clk);
      we = 1; waddr = 13'(pa[i]); wdata = 16'($urandom); pd[i] = wdata;
    end
    for (int n = 0; n < 4000; n++) begin
      if (n == 2000) begin
        we = 0;
        program_entry(1, 0);
      end
      @(negedge clk);
      // read first: a write in the same clock is seen by later reads only
      a = ($urandom_range(0, 1) == 0) ? pa[$urandom_range(0, 3)] : int'($urandom_range(0, 8191));
      re = 1; raddr = 13'(a);
      e = find(a);
      ed = (e >= 0) ? pd[e] : '0;
      wa = ($urandom_range(0, 1) == 0) ? pa[$urandom_range(0, 3)] : int'($urandom_range(0, 8191));
      we = 1; waddr = 13'(wa); wdata = 16'($urandom);
      if (find(wa) >= 0) pd[find(wa)] = wdata;
      @(negedge clk);
      we = 0; re = 0;
      checks++;
      if (hit != (e >= 0) || (e >= 0 && rdata != ed)) begin
        failures++;
        $display("read %0d: hit %0b data %h expected entry %0d", a, hit, rdata, e);
      end
      nhit += hit;
    end
    checks++;
    if (nhit == 0) begin failures++; $display("no hits"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
