// rvt_result_writer: output memory interface.
//
// Each Direction result is packed into one 32-bit word,
// {pixel[11:0], direction[3:0], response[16:1]}: the 17-bit response loses
// its least significant bit so that a result fits a 32-bit word and two
// results go per 64-bit PCI transfer. The word is written to the 32-bit
// output SRAM at the centre pixel's address in the padded 512 x 515 frame,
// so the host can index results by pixel. One frame region is used and
// overwritten every frame; the DMA to the host reads it while it is being
// written. The field order within the word is this design's choice.
//
// Timing: one registered write per input result (one clock latency).
// written_o pulses with every write, frame_first_o with the first write of
// a frame (tag flag from the neighbourhood buffer).
module rvt_result_writer
  import rvt_pkg::*;
#(
  parameter int unsigned ADDR_W = 19,
  localparam int unsigned TAG_W = 1 + ADDR_W + PIX_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              valid_i,
  input  logic [RESP_W-1:0] resp_i,
  input  logic [3:0]        dir_i,
  input  logic [TAG_W-1:0]  tag_i,
  output logic              out_we_o,
  output logic [ADDR_W-1:0] out_addr_o,
  output logic [OUT_W-1:0]  out_wdata_o,
  output logic              written_o,
  output logic              frame_first_o
);

  result_t res;
  always_comb begin
    res.pix  = tag_i[PIX_W-1:0];
    res.dir  = dir_i;
    res.resp = resp_i[RESP_W-1:1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_we_o <= 1'b0; frame_first_o <= 1'b0; out_addr_o <= '0; out_wdata_o <= '0;
    end else begin
      out_we_o      <= valid_i;
      frame_first_o <= valid_i && tag_i[TAG_W-1];
      if (valid_i) begin
        out_addr_o  <= tag_i[PIX_W +: ADDR_W];
        out_wdata_o <= res;
      end
    end
  end
  assign written_o = out_we_o;

endmodule
