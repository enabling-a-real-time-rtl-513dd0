// rvt_smart_camera: FPGA top of the real-time template-filter "smart camera".
//
// The FPGA sits between the framegrabber and the host. It receives 12-bit
// pixels at the framegrabber clock (25 MHz), stores them in two on-board
// 64-bit SRAM banks, and, running on the faster memory clock (65 MHz),
// computes for every pixel the largest response of the sixteen 11x11
// direction templates. For each pixel one 32-bit word {pixel, direction,
// response/2} is written to the 32-bit output SRAM, from which the host pulls
// the frame by DMA after the FPGA raises the trigger register.
//
// Data path:
//   rvt_data_packer    (fg clock) 5 pixels -> 64-bit word, lines padded to 515
//   rvt_input_mem_ctrl (mem clock) word-interleaved writes to bank 0/1,
//                      column reads of 11 words, waits for lines to arrive
//   rvt_neighborhood   11x15 buffer, five 11x11 windows per 11 clocks
//   rvt_direction      8 response units + comparator tree, 11-cycle pipeline
//   rvt_result_writer  32-bit result word to the output SRAM
//   rvt_host_if        DMA trigger / acknowledge and round-trip counter
//
// The SRAM banks, the framegrabber, the PCI/DMA controller and the clock
// sources are board parts outside this module; their signals are ports.
// The in_mem_* ports connect to synchronous single-port SRAMs with RD_LAT
// cycles of read latency. rst_ni is synchronised into both clock domains.
// IMG_W must pad to an odd number of words per line (512 -> 103) so that
// column reads alternate between the banks.
//
// The partitioning and the clock rates follow the described system; the
// reset scheme and the default DMA trigger count are this design's choices.
// A few output bits are constant by construction: the spare top bits of the
// packed word and address bits above the frame regions.
module rvt_smart_camera
  import rvt_pkg::*;
#(
  parameter int unsigned IMG_W  = 512,
  parameter int unsigned IMG_H  = 512,
  parameter int unsigned ADDR_W = 19,
  parameter int unsigned RD_LAT = 2,
  localparam int unsigned WPL   = (IMG_W + PIX_PER_WORD - 1) / PIX_PER_WORD,
  localparam int unsigned N_RES = (IMG_H - WIN + 1) * WPL * PIX_PER_WORD - PIX_PER_WORD,
  parameter int unsigned TRIGGER_AT = N_RES - N_RES / 32
) (
  input  logic              fg_clk_i,
  input  logic              mclk_i,
  input  logic              rst_ni,
  // framegrabber
  output logic              fg_clk_o,
  input  logic [PIX_W-1:0]  fg_pix_i,
  input  logic              fg_valid_i,
  input  logic              fg_line_sync_i,
  input  logic              fg_frame_sync_i,
  // input SRAM banks 0 and 1
  output logic              in_mem_en_o    [2],
  output logic              in_mem_we_o    [2],
  output logic [ADDR_W-1:0] in_mem_addr_o  [2],
  output logic [WORD_W-1:0] in_mem_wdata_o [2],
  input  logic [WORD_W-1:0] in_mem_rdata_i [2],
  // output SRAM (32-bit)
  output logic              out_mem_we_o,
  output logic [ADDR_W-1:0] out_mem_addr_o,
  output logic [OUT_W-1:0]  out_mem_wdata_o,
  // host register interface
  input  logic              host_ack_i,
  output logic              host_trigger_o,
  output logic [31:0]       host_lat_cycles_o,
  output logic              host_lat_valid_o,
  // status
  output logic              stall_o,
  output logic              wr_defer_o,
  output logic              overrun_o
);

  localparam int unsigned KW    = $clog2(IMG_H * WPL + 1);
  localparam int unsigned TAG_W = 1 + ADDR_W + PIX_W;

  if (WPL % 2 == 0) begin : g_bad_width
    $error("IMG_W must pad to an odd number of words per line");
  end

  assign fg_clk_o = fg_clk_i;

  // reset synchronisers
  logic [1:0] fg_rs, m_rs;
  always_ff @(posedge fg_clk_i or negedge rst_ni)
    if (!rst_ni) fg_rs <= '0; else fg_rs <= {fg_rs[0], 1'b1};
  always_ff @(posedge mclk_i or negedge rst_ni)
    if (!rst_ni) m_rs <= '0; else m_rs <= {m_rs[0], 1'b1};
  wire fg_rst_n = fg_rs[1];
  wire m_rst_n  = m_rs[1];

  logic [WORD_W-1:0] pk_word;
  logic              pk_sof, pk_eol, pk_tgl;

  rvt_data_packer #(.IMG_W(IMG_W)) u_pack (
    .clk(fg_clk_i), .rst_n(fg_rst_n),
    .pix_i(fg_pix_i), .pix_valid_i(fg_valid_i),
    .line_sync_i(fg_line_sync_i), .frame_sync_i(fg_frame_sync_i),
    .word_o(pk_word), .sof_o(pk_sof), .eol_o(pk_eol), .ready_tgl_o(pk_tgl)
  );

  logic              rd_valid;
  logic [WORD_W-1:0] rd_data;
  logic [3:0]        rd_i;
  logic [KW-1:0]     rd_k;

  rvt_input_mem_ctrl #(.IMG_W(IMG_W), .IMG_H(IMG_H), .ADDR_W(ADDR_W), .RD_LAT(RD_LAT)) u_imem (
    .clk(mclk_i), .rst_n(m_rst_n),
    .pk_word_i(pk_word), .pk_sof_i(pk_sof), .pk_eol_i(pk_eol), .pk_tgl_i(pk_tgl),
    .mem_en_o(in_mem_en_o), .mem_we_o(in_mem_we_o), .mem_addr_o(in_mem_addr_o),
    .mem_wdata_o(in_mem_wdata_o), .mem_rdata_i(in_mem_rdata_i),
    .rd_valid_o(rd_valid), .rd_data_o(rd_data), .rd_i_o(rd_i), .rd_k_o(rd_k),
    .stall_o(stall_o), .wr_defer_o(wr_defer_o), .overrun_o(overrun_o)
  );

  logic             win_valid;
  logic [PIX_W-1:0] win [WIN][WIN];
  logic [TAG_W-1:0] win_tag;

  rvt_neighborhood #(.IMG_W(IMG_W), .IMG_H(IMG_H), .ADDR_W(ADDR_W)) u_nb (
    .clk(mclk_i), .rst_n(m_rst_n),
    .rd_valid_i(rd_valid), .rd_data_i(rd_data), .rd_i_i(rd_i), .rd_k_i(rd_k),
    .win_valid_o(win_valid), .win_o(win), .tag_o(win_tag)
  );

  logic              d_valid;
  logic [RESP_W-1:0] d_resp;
  logic [3:0]        d_dir;
  logic [TAG_W-1:0]  d_tag;

  rvt_direction #(.TAG_W(TAG_W)) u_dir (
    .clk(mclk_i), .rst_n(m_rst_n),
    .in_valid_i(win_valid), .win_i(win), .tag_i(win_tag),
    .out_valid_o(d_valid), .resp_o(d_resp), .dir_o(d_dir), .tag_o(d_tag)
  );

  logic written, frame_first;

  rvt_result_writer #(.ADDR_W(ADDR_W)) u_wr (
    .clk(mclk_i), .rst_n(m_rst_n),
    .valid_i(d_valid), .resp_i(d_resp), .dir_i(d_dir), .tag_i(d_tag),
    .out_we_o(out_mem_we_o), .out_addr_o(out_mem_addr_o), .out_wdata_o(out_mem_wdata_o),
    .written_o(written), .frame_first_o(frame_first)
  );

  rvt_host_if #(.TRIGGER_AT(TRIGGER_AT)) u_host (
    .clk(mclk_i), .rst_n(m_rst_n),
    .written_i(written), .frame_first_i(frame_first), .host_ack_i(host_ack_i),
    .trigger_o(host_trigger_o), .lat_cycles_o(host_lat_cycles_o), .lat_valid_o(host_lat_valid_o)
  );

endmodule
