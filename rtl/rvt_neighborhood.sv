// rvt_neighborhood: 11x15 neighbourhood buffer and window issue.
//
// Holds the current neighbourhood, 11 rows by 15 columns, as three 11x5
// sections (one packed word per row per section), plus a fill bank that
// collects the next column of 11 words as they arrive from the input
// memory, one per clock. When the 11th word of a column arrives the
// neighbourhood shifts left by five pixels in one clock: sections 1 and 2
// move to 0 and 1, and the fill bank (with the word just arriving) becomes
// section 2. The fill bank is then free for the next column while the
// current neighbourhood is processed.
//
// After each shift the five 11x11 windows whose centres are the five pixels
// of the middle section (window j covers columns j..j+10) are sent to the
// Direction pipeline on five consecutive clocks, with a tag holding the
// centre pixel's grey value, its address in the padded frame and a
// first-of-frame flag. Columns arrive every 11 clocks at the fastest, so
// five results per 11 clocks is the steady rate.
//
// The neighbourhood slides over the word stream without regard to line
// ends: windows that straddle two lines produce results that the host is
// expected to ignore, as do the frame edges. The very first column of a
// frame (rd_k_i == 0) has no middle section yet and issues nothing.
//
// Centre address: the middle word of column k is word k-1, whose first
// pixel is at 5*(k-1) in the padded frame; the centre is five rows lower,
// so address = 5*(k-1) + 5*W_PAD + j with W_PAD = 5*WPL (515).
//
// The three sections, the one-clock shift and the five-window issue follow
// the described buffer; keeping everything in registers and the tag format
// are this design's choices.
module rvt_neighborhood
  import rvt_pkg::*;
#(
  parameter int unsigned IMG_W  = 512,
  parameter int unsigned IMG_H  = 512,
  parameter int unsigned ADDR_W = 19,
  localparam int unsigned WPL   = (IMG_W + PIX_PER_WORD - 1) / PIX_PER_WORD,
  localparam int unsigned KW    = $clog2(IMG_H * WPL + 1),
  localparam int unsigned TAG_W = 1 + ADDR_W + PIX_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rd_valid_i,
  input  logic [WORD_W-1:0] rd_data_i,
  input  logic [3:0]        rd_i_i,
  input  logic [KW-1:0]     rd_k_i,
  output logic              win_valid_o,
  output logic [PIX_W-1:0]  win_o [WIN][WIN],
  output logic [TAG_W-1:0]  tag_o          // {first, address, centre pixel}
);

  localparam int unsigned W_PAD = WPL * PIX_PER_WORD;

  logic [PIX_W-1:0] nb   [WIN][NB_W];
  logic [PIX_W-1:0] fill [WIN-1][PIX_PER_WORD];
  logic [2:0]       j;          // window being issued
  logic             issuing;
  logic [KW-1:0]    mid_k;

  function automatic logic [PIX_W-1:0] pix_of(input logic [WORD_W-1:0] wd, input int n);
    return wd[n*PIX_W +: PIX_W];
  endfunction

  always_ff @(posedge clk) begin
    if (rd_valid_i) begin
      if (rd_i_i != 4'(WIN - 1)) begin
        for (int n = 0; n < PIX_PER_WORD; n++) fill[rd_i_i][n] <= pix_of(rd_data_i, n);
      end else begin
        for (int row = 0; row < WIN; row++) begin
          for (int c = 0; c < 2 * PIX_PER_WORD; c++) nb[row][c] <= nb[row][c + PIX_PER_WORD];
          for (int n = 0; n < PIX_PER_WORD; n++)
            nb[row][2 * PIX_PER_WORD + n] <= (row == WIN - 1) ? pix_of(rd_data_i, n) : fill[row][n];
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      issuing <= 1'b0; j <= '0; mid_k <= '0;
    end else begin
      if (issuing) begin
        j <= j + 1'b1;
        if (j == 3'(PIX_PER_WORD - 1)) issuing <= 1'b0;
      end
      if (rd_valid_i && rd_i_i == 4'(WIN - 1) && rd_k_i != '0) begin
        issuing <= 1'b1;
        j       <= '0;
        mid_k   <= rd_k_i - 1'b1;
      end
    end
  end

  // window mux: columns j .. j+10 of the neighbourhood
  always_comb begin
    for (int row = 0; row < WIN; row++)
      for (int c = 0; c < WIN; c++)
        win_o[row][c] = nb[row][32'(j) + c];
  end

  logic [ADDR_W-1:0] addr;
  assign addr        = ADDR_W'(mid_k) * ADDR_W'(PIX_PER_WORD) + ADDR_W'(PIX_PER_WORD * W_PAD) + ADDR_W'(j);
  assign win_valid_o = issuing;
  assign tag_o       = {mid_k == '0 && j == '0, addr, nb[WIN/2][32'(j) + WIN/2]};

  // a new column must not arrive while windows are still being issued
  assert property (@(posedge clk) disable iff (!rst_n)
                   (rd_valid_i && rd_i_i == 4'(WIN - 1)) |-> (!issuing || j == 3'(PIX_PER_WORD - 1)));

endmodule
