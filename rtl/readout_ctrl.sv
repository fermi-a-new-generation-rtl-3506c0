// readout_ctrl -- time-frame readout of a FERMI module towards the second and third-level triggers.
//
// After a first-level accept, the samples of the event's time frame sit in the
// nine channel memories at locations handed out by the external address
// generator. This controller takes a readout command, then the frame's
// memory pointers (one per sample, oldest first), and reads the frame channel
// by channel. In full readout the samples leave unchanged (the second filter
// is bypassed); in reduced readout each channel's samples stream through the
// second-level filter (afosh_filter) and one amplitude per channel leaves.
// The output multiplexer sends whichever the command asked for. Full and
// reduced readout, the pointer-based memory and the bypass follow the
// published design; the command/pointer handshakes, the channel-major order
// and the output word (ro_word_t) are this design's.
//
// Handshakes: a command is taken when cmd_valid && cmd_ready; cmd_len (1 to
// MAX_FRAME) pointers are then taken on ptr_valid && ptr_ready. The output
// has no back-pressure: the link is assumed to accept one word per clock.
// out_word.err is set when a sample read had an uncorrectable ECC error.
//
// Timing: reads start the clock after the last pointer, one per clock,
// N_CH * len of them. A raw word leaves two clocks after its read; an
// amplitude leaves four clocks after the read of the channel's last sample.
module readout_ctrl
  import fermi_pkg::*;
#(
  parameter int unsigned NCH = N_CH,
  parameter int unsigned MF  = MAX_FRAME
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // command
  input  logic                 cmd_valid,
  output logic                 cmd_ready,
  input  logic                 cmd_full,
  input  logic                 cmd_bank,
  input  logic [3:0]           cmd_len,
  // pointers from the address generator
  input  logic                 ptr_valid,
  output logic                 ptr_ready,
  input  addr_t                ptr,
  // channel memories
  output logic                 rd_en,
  output addr_t                rd_addr,
  input  logic                 rd_valid,
  input  sample_t              rd_data [NCH],
  input  logic [NCH-1:0]       rd_ded,
  // second-level filter
  output logic                 f_valid,
  output logic                 f_first,
  output logic                 f_last,
  output logic                 f_bank,
  output sample_t              f_x,
  input  logic                 f_out_valid,
  input  logic signed [AMP_W-1:0] f_amp,
  // output multiplexer
  output logic                 out_valid,
  output ro_word_t             out_word,
  output logic                 busy
);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_READ, S_DRAIN} state_e;

  state_e       state;
  logic         full_q, bank_q;
  logic [3:0]   len_q;
  addr_t        ptrs [MF];
  logic [3:0]   np;               // pointers loaded
  logic [3:0]   ch;               // channel being read
  logic [3:0]   si;               // sample index being read
  logic [1:0]   drain;

  assign cmd_ready = (state == S_IDLE);
  assign ptr_ready = (state == S_LOAD);
  assign busy      = (state != S_IDLE);

  // ---- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      full_q <= 1'b0;
      bank_q <= 1'b0;
      len_q  <= 4'd1;
      np     <= '0;
      ch     <= '0;
      si     <= '0;
      drain  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          full_q <= cmd_full;
          bank_q <= cmd_bank;
          len_q  <= (cmd_len == 0) ? 4'd1 : (cmd_len > 4'(MF)) ? 4'(MF) : cmd_len;
          np     <= '0;
          state  <= S_LOAD;
        end
        S_LOAD: if (ptr_valid) begin
          np <= np + 1'b1;
          if (np + 1'b1 == len_q) begin
            ch    <= '0;
            si    <= '0;
            state <= S_READ;
          end
        end
        S_READ: begin
          if (si + 1'b1 == len_q) begin
            si <= '0;
            if (ch == 4'(NCH - 1)) begin
              drain <= '0;
              state <= S_DRAIN;
            end else begin
              ch <= ch + 1'b1;
            end
          end else begin
            si <= si + 1'b1;
          end
        end
        S_DRAIN: begin
          drain <= drain + 1'b1;
          if (drain == 2'd3) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_LOAD && ptr_valid) ptrs[np[$clog2(MF)-1:0]] <= ptr;
  end

  assign rd_en   = (state == S_READ);
  assign rd_addr = ptrs[si[$clog2(MF)-1:0]];

  // ---- read return: what the read of the previous clock was
  logic       r_full, r_first, r_last;
  logic [3:0] r_ch;
  logic [2:0] r_idx;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_full  <= 1'b0;
      r_first <= 1'b0;
      r_last  <= 1'b0;
      r_ch    <= '0;
      r_idx   <= '0;
    end else begin
      r_full  <= full_q;
      r_first <= (si == 0);
      r_last  <= (si + 1'b1 == len_q);
      r_ch    <= ch;
      r_idx   <= si[2:0];
    end
  end

  sample_t r_data;
  logic    r_ded;
  assign r_data = rd_data[r_ch];
  assign r_ded  = rd_ded[r_ch];

  // ---- to the second-level filter (reduced readout)
  assign f_valid = rd_valid && !r_full;
  assign f_first = r_first;
  assign f_last  = r_last;
  assign f_bank  = bank_q;
  assign f_x     = r_data;

  // channel and error tag of a frame, delayed to meet the filter output
  logic       err_acc;
  logic       t1_v, t2_v, t1_e, t2_e;
  logic [3:0] t1_ch, t2_ch;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_acc <= 1'b0;
      {t1_v, t2_v, t1_e, t2_e} <= '0;
      t1_ch <= '0;
      t2_ch <= '0;
    end else begin
      if (f_valid) err_acc <= (r_first ? 1'b0 : err_acc) | r_ded;
      t1_v  <= f_valid && r_last;
      t1_e  <= (r_first ? 1'b0 : err_acc) | r_ded;
      t1_ch <= r_ch;
      t2_v  <= t1_v;
      t2_e  <= t1_e;
      t2_ch <= t1_ch;
    end
  end

  // ---- output multiplexer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_word  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (f_out_valid && t2_v) begin
        out_valid         <= 1'b1;
        out_word.reduced  <= 1'b1;
        out_word.chan     <= t2_ch;
        out_word.idx      <= '0;
        out_word.err      <= t2_e;
        out_word.data     <= f_amp;
      end else if (rd_valid && r_full) begin
        out_valid         <= 1'b1;
        out_word.reduced  <= 1'b0;
        out_word.chan     <= r_ch;
        out_word.idx      <= r_idx;
        out_word.err      <= r_ded;
        out_word.data     <= AMP_W'(r_data);
      end
    end
  end

endmodule
