// rvt_input_mem_ctrl: the two-bank input memory interface.
//
// Write side: the packed-word toggle from the framegrabber clock domain is
// synchronised with two flip-flops; on each edge the held word is captured
// into a one-word pending register. Consecutive words of a frame go to
// alternate banks: word index j is stored in bank j[0] at address
// base + j/2. Two frame regions per bank alternate between frames.
//
// Read side: for every window top row r (0 .. IMG_H-WIN) and every word
// column w (0 .. WPL-1) the sequencer reads the WIN words (r+i, w),
// i = 0..WIN-1, one per clock. WPL = 103 is odd, so consecutive reads always
// hit alternate banks, each bank is read at most every other cycle, and the
// pending write goes to its bank in a cycle when that bank is not read
// (never more than one cycle of wait). Before each window row the sequencer
// waits until line r+WIN-1 of the frame has been written, which is what
// lets processing start after only WIN lines instead of a whole frame.
//
// The read data come back RD_LAT cycles after the address (synchronous
// pipelined SRAM) and are passed on with the row-in-column index (rd_i_o)
// and the column index within the frame (rd_k_o = r*WPL + w).
//
// Timing: one read per clock while not waiting; 11 clocks per neighbourhood
// column. stall_o is high in wait cycles, wr_defer_o when a write had to
// give way to a read, overrun_o (sticky) if the writer laps the reader or a
// word arrives before the previous one was written.
//
// Word interleaving, alternating reads and the wait for written lines follow
// the described memory interface. The toggle synchroniser, the two frame
// regions and the read latency are this design's choices. The memory clock
// must take each held word within five framegrabber clocks.
module rvt_input_mem_ctrl
  import rvt_pkg::*;
#(
  parameter int unsigned IMG_W  = 512,
  parameter int unsigned IMG_H  = 512,
  parameter int unsigned ADDR_W = 19,
  parameter int unsigned RD_LAT = 2,
  localparam int unsigned WPL   = (IMG_W + PIX_PER_WORD - 1) / PIX_PER_WORD,
  localparam int unsigned KW    = $clog2(IMG_H * WPL + 1)
) (
  input  logic              clk,          // memory clock
  input  logic              rst_n,
  // from rvt_data_packer (framegrabber clock domain, held stable)
  input  logic [WORD_W-1:0] pk_word_i,
  input  logic              pk_sof_i,
  input  logic              pk_eol_i,
  input  logic              pk_tgl_i,
  // two synchronous single-port SRAM banks
  output logic              mem_en_o    [2],
  output logic              mem_we_o    [2],
  output logic [ADDR_W-1:0] mem_addr_o  [2],
  output logic [WORD_W-1:0] mem_wdata_o [2],
  input  logic [WORD_W-1:0] mem_rdata_i [2],
  // word stream to the neighbourhood buffer
  output logic              rd_valid_o,
  output logic [WORD_W-1:0] rd_data_o,
  output logic [3:0]        rd_i_o,
  output logic [KW-1:0]     rd_k_o,
  // status
  output logic              stall_o,
  output logic              wr_defer_o,
  output logic              overrun_o
);

  localparam int unsigned FRAME_WORDS = IMG_H * WPL;
  localparam int unsigned REGION      = (FRAME_WORDS + 1) / 2;
  localparam int unsigned ROWS        = IMG_H - WIN + 1;   // window top rows
  localparam int unsigned LW          = $clog2(IMG_H + 1);
  localparam int unsigned RW          = $clog2(ROWS + 1);
  localparam int unsigned WW          = $clog2(WPL + 1);

  // ---------------- write side ----------------
  logic [2:0]        tsync;
  logic              pend;
  logic [WORD_W-1:0] pend_word;
  logic              pend_eol, pend_fbit;
  logic [KW-1:0]     pend_idx, wr_next;
  logic [7:0]        wr_fcnt;
  logic [LW-1:0]     wr_lines;
  wire               tgl_edge = tsync[2] ^ tsync[1];

  // ---------------- read side ----------------
  logic [7:0]        rd_fcnt;
  logic [RW-1:0]     r;
  logic [WW-1:0]     w;
  logic [3:0]        i;
  logic [KW-1:0]     col_base, cur;
  logic              rd_issue, rd_bank, row_ok;
  logic [ADDR_W-1:0] rd_addr;

  always_comb begin
    row_ok = (wr_fcnt == rd_fcnt && 32'(wr_lines) >= 32'(r) + WIN) ||
             (wr_fcnt == rd_fcnt + 8'd1);
    rd_issue = !((i == 0) && (w == 0) && !row_ok);
    rd_bank  = cur[0];
    rd_addr  = ADDR_W'(cur >> 1) + (rd_fcnt[0] ? ADDR_W'(REGION) : '0);
  end
  assign stall_o = !rd_issue;

  wire wr_bank = pend_idx[0];
  wire wr_go   = pend && !(rd_issue && rd_bank == wr_bank);
  assign wr_defer_o = pend && !wr_go;

  always_comb begin
    for (int b = 0; b < 2; b++) begin
      mem_en_o[b]    = (rd_issue && rd_bank == b[0]) || (wr_go && wr_bank == b[0]);
      mem_we_o[b]    = !(rd_issue && rd_bank == b[0]);
      mem_addr_o[b]  = (rd_issue && rd_bank == b[0]) ? rd_addr
                     : ADDR_W'(pend_idx >> 1) + (pend_fbit ? ADDR_W'(REGION) : '0);
      mem_wdata_o[b] = pend_word;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tsync <= '0; pend <= 1'b0; pend_word <= '0; pend_eol <= 1'b0; pend_fbit <= 1'b0;
      pend_idx <= '0; wr_next <= '0; wr_fcnt <= '0; wr_lines <= '0; overrun_o <= 1'b0;
    end else begin
      tsync <= {tsync[1:0], pk_tgl_i};
      if (wr_go) begin
        pend <= 1'b0;
        if (pend_eol) wr_lines <= wr_lines + 1'b1;
      end
      if (tgl_edge) begin
        if (pend && !wr_go) overrun_o <= 1'b1;
        pend      <= 1'b1;
        pend_word <= pk_word_i;
        pend_eol  <= pk_eol_i;
        if (pk_sof_i) begin
          pend_idx  <= '0;
          wr_next   <= KW'(1);
          wr_fcnt   <= wr_fcnt + 8'd1;
          pend_fbit <= ~wr_fcnt[0];
          wr_lines  <= '0;
        end else begin
          pend_idx <= wr_next;
          wr_next  <= wr_next + 1'b1;
        end
      end
      if (wr_fcnt == rd_fcnt + 8'd2) overrun_o <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_fcnt <= 8'd1; r <= '0; w <= '0; i <= '0; col_base <= '0; cur <= '0;
    end else if (rd_issue) begin
      if (i != 4'(WIN - 1)) begin
        i   <= i + 1'b1;
        cur <= cur + KW'(WPL);
      end else begin
        i <= '0;
        if (w == WW'(WPL - 1)) begin
          w <= '0;
          if (r == RW'(ROWS - 1)) begin
            r <= '0; col_base <= '0; cur <= '0; rd_fcnt <= rd_fcnt + 8'd1;
          end else begin
            r <= r + 1'b1; col_base <= col_base + 1'b1; cur <= col_base + 1'b1;
          end
        end else begin
          w <= w + 1'b1; col_base <= col_base + 1'b1; cur <= col_base + 1'b1;
        end
      end
    end
  end

  // read return pipeline
  logic          q_v [RD_LAT];
  logic          q_b [RD_LAT];
  logic [3:0]    q_i [RD_LAT];
  logic [KW-1:0] q_k [RD_LAT];
  always_ff @(posedge clk) begin
    if (!rst_n) for (int s = 0; s < RD_LAT; s++) q_v[s] <= 1'b0;
    else begin
      q_v[0] <= rd_issue;
      for (int s = 1; s < RD_LAT; s++) q_v[s] <= q_v[s-1];
    end
    q_b[0] <= rd_bank; q_i[0] <= i; q_k[0] <= col_base;
    for (int s = 1; s < RD_LAT; s++) begin
      q_b[s] <= q_b[s-1]; q_i[s] <= q_i[s-1]; q_k[s] <= q_k[s-1];
    end
  end
  assign rd_valid_o = q_v[RD_LAT-1];
  assign rd_data_o  = mem_rdata_i[q_b[RD_LAT-1]];
  assign rd_i_o     = q_i[RD_LAT-1];
  assign rd_k_o     = q_k[RD_LAT-1];

  // a bank never sees a read and a write in the same cycle
  for (genvar b = 0; b < 2; b++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     !(rd_issue && rd_bank == b && wr_go && wr_bank == b));
  end

endmodule
