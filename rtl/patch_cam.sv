// patch_cam -- associative patch memory beside a channel's data memory.
//
// A few memory cells found faulty can be taken out of service without losing
// the locations: the controller enters their addresses here, after which a
// write to such an address is also captured in the entry's own data register,
// and a read of it is answered from that register (`hit`) instead of from the
// memory. The same entries serve diagnostics. The idea follows the published
// design; N_ENT and the programming interface are this design's choices.
//
// Interface: cfg_we loads entry cfg_idx with {cfg_valid, cfg_addr}. Writes
// are captured in the clock of `we`; a read issued with `re` at t gives
// hit/rdata at t+1, the same latency as ecc_dpram. Reset clears all entries.
module patch_cam #(
  parameter int unsigned N_ENT = 4,
  parameter int unsigned AW    = 13,
  parameter int unsigned DW    = 16,
  parameter int unsigned IW    = (N_ENT > 1) ? $clog2(N_ENT) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_we,
  input  logic [IW-1:0] cfg_idx,
  input  logic          cfg_valid,
  input  logic [AW-1:0] cfg_addr,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic          hit,
  output logic [DW-1:0] rdata
);

  logic [N_ENT-1:0]         ent_valid;
  logic [N_ENT-1:0][AW-1:0] ent_addr;
  logic [N_ENT-1:0][DW-1:0] ent_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ent_valid <= '0;
      ent_addr  <= '0;
      ent_data  <= '0;
      hit       <= 1'b0;
      rdata     <= '0;
    end else begin
      if (cfg_we) begin
        ent_valid[cfg_idx] <= cfg_valid;
        ent_addr[cfg_idx]  <= cfg_addr;
      end
      for (int i = 0; i < N_ENT; i++)
        if (we && ent_valid[i] && ent_addr[i] == waddr) ent_data[i] <= wdata;
      hit <= 1'b0;
      if (re)
        for (int i = 0; i < N_ENT; i++)
          if (ent_valid[i] && ent_addr[i] == raddr) begin
            hit   <= 1'b1;
            rdata <= ent_data[i];
          end
    end
  end

endmodule
