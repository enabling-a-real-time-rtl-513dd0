// rvt_host_if: DMA trigger handshake with the host.
//
// Counts the results written for the current frame. When the count reaches
// TRIGGER_AT the trigger register goes high; the host polls it, answers with
// a one-cycle acknowledge (host_ack_i), and the trigger drops until the next
// frame reaches the same count. After acknowledging, the host runs the DMA
// of the whole result frame. Because the DMA (two results per 66 MHz PCI
// cycle) is faster than results are produced, it is started late enough that
// it cannot overtake the writes and ends just after the last result: with N
// results per frame and a production/DMA rate ratio q, the start count must
// be at least N*(1-q). For N = 258525 and q = 33 ms frame time against
// about 2 ms DMA time (q ~ 1/16), the default TRIGGER_AT = N - N/32 keeps a
// margin for the host's polling delay.
//
// A cycle counter measures trigger-to-acknowledge time: lat_cycles_o holds
// the last measured round trip and lat_valid_o pulses when it is updated.
// The host acknowledge is taken to be synchronous to this clock.
//
// The trigger/acknowledge protocol and the round-trip counter follow the
// described host interface; the trigger count is this design's own estimate.
module rvt_host_if #(
  parameter int unsigned TRIGGER_AT = 250447,
  parameter int unsigned CNT_W      = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        written_i,       // one result stored
  input  logic        frame_first_i,   // first result of a frame stored
  input  logic        host_ack_i,
  output logic        trigger_o,
  output logic [31:0] lat_cycles_o,
  output logic        lat_valid_o
);

  logic [CNT_W-1:0] cnt;
  logic             armed;
  logic [31:0]      lat;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0; armed <= 1'b0; trigger_o <= 1'b0; lat <= '0;
      lat_cycles_o <= '0; lat_valid_o <= 1'b0;
    end else begin
      lat_valid_o <= 1'b0;
      if (frame_first_i) begin
        cnt   <= CNT_W'(1);
        armed <= 1'b1;
      end else if (written_i) begin
        cnt <= cnt + 1'b1;
      end
      if (armed && written_i && !frame_first_i && cnt == CNT_W'(TRIGGER_AT - 1)) begin
        trigger_o <= 1'b1;
        armed     <= 1'b0;
        lat       <= '0;
      end else if (trigger_o) begin
        lat <= lat + 1'b1;
      end
      if (host_ack_i && trigger_o) begin
        trigger_o    <= 1'b0;
        lat_cycles_o <= lat + 1'b1;
        lat_valid_o  <= 1'b1;
      end
    end
  end

endmodule
