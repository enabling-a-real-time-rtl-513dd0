// rvt_data_packer: packs framegrabber pixels into 64-bit memory words.
//
// Runs on the framegrabber clock and takes one 12-bit pixel per valid cycle
// in raster order. Five consecutive pixels of a line go into one 64-bit
// word: pixel n of the word sits in bits [12n+11:12n] and bits [63:60] are
// zero. A line of IMG_W pixels is padded with zero pixels up to a multiple
// of five (512 -> 515), so no word holds pixels of two lines: the last word
// of a line is sent early with its free slots zero.
//
// line_sync_i and frame_sync_i are taken as one-cycle pulses that come with
// the first pixel of a line and of a frame. Pixels before the first
// frame_sync_i are ignored.
//
// Output: when a word is complete, word_o, sof_o (first word of a frame)
// and eol_o (last word of a line) are updated together and ready_tgl_o
// toggles. They then hold for at least five framegrabber clocks, which gives
// the memory-clock side time to synchronise the toggle and take the word.
// Signalling READY as a toggle is this design's choice for the clock
// crossing; the packing itself follows the described scheme.
module rvt_data_packer
  import rvt_pkg::*;
#(
  parameter int unsigned IMG_W = 512
) (
  input  logic              clk,          // framegrabber clock
  input  logic              rst_n,
  input  logic [PIX_W-1:0]  pix_i,
  input  logic              pix_valid_i,
  input  logic              line_sync_i,
  input  logic              frame_sync_i,
  output logic [WORD_W-1:0] word_o,
  output logic              sof_o,
  output logic              eol_o,
  output logic              ready_tgl_o
);

  localparam int unsigned CW = $clog2(IMG_W + 1);

  logic [PIX_W-1:0] acc [PIX_PER_WORD];
  logic [2:0]       slot;
  logic [CW-1:0]    col;
  logic             armed, first_pending;

  logic [2:0]       slot_e;
  logic [CW-1:0]    col_e;
  logic             emit, last_pix;
  logic [WORD_W-1:0] packed_w;

  always_comb begin
    slot_e   = line_sync_i ? '0 : slot;
    col_e    = line_sync_i ? '0 : col;
    last_pix = (col_e == CW'(IMG_W - 1));
    emit     = (slot_e == 3'(PIX_PER_WORD - 1)) || last_pix;
    packed_w = '0;
    for (int n = 0; n < PIX_PER_WORD; n++)
      packed_w[n*PIX_W +: PIX_W] = (3'(n) == slot_e) ? pix_i
                                 : (3'(n) < slot_e) ? acc[n] : '0;
  end

  wire take = pix_valid_i && (armed || frame_sync_i);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      slot <= '0; col <= '0; armed <= 1'b0; first_pending <= 1'b0;
      word_o <= '0; sof_o <= 1'b0; eol_o <= 1'b0; ready_tgl_o <= 1'b0;
      for (int n = 0; n < PIX_PER_WORD; n++) acc[n] <= '0;
    end else if (take) begin
      armed <= 1'b1;
      acc[slot_e] <= pix_i;
      col  <= col_e + 1'b1;
      slot <= emit ? '0 : slot_e + 1'b1;
      if (frame_sync_i) first_pending <= 1'b1;
      if (emit) begin
        word_o        <= packed_w;
        sof_o         <= frame_sync_i || first_pending;
        eol_o         <= last_pix;
        ready_tgl_o   <= ~ready_tgl_o;
        first_pending <= 1'b0;
      end
    end
  end

  // a frame or line must start on a line boundary of the packer
  assert property (@(posedge clk) disable iff (!rst_n)
                   (pix_valid_i && frame_sync_i) |-> line_sync_i);

endmodule
