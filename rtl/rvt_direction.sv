// rvt_direction: maximum-response search over all sixteen templates.
//
// Takes one 11x11 pixel window per clock, registers it, routes the 28 taps
// of each of the eight unique templates (positions from rvt_pkg::tap_pos)
// to eight rvt_response units, and finds the largest of their eight
// |response| values with a three-level pipelined comparator tree. The
// direction label is the template index d (0..7), plus 8 when the
// complement template gave the response, so it covers all 16 directions.
// On equal responses the lower template index wins.
//
// A tag (TAG_W bits, e.g. pixel address and grey value) travels with each
// window so the result can be stored without a separate delay line.
//
// Timing: one window per clock, DIR_LAT = 11 cycles from in_valid_i to
// out_valid_o (1 input register, 7 response stages, 3 comparator levels).
//
// The eight units, the tap network and the registered comparator tree follow
// the described Direction unit; the tie rule and the tag are this design's.
module rvt_direction
  import rvt_pkg::*;
#(
  parameter int unsigned TAG_W = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid_i,
  input  logic [PIX_W-1:0]   win_i [WIN][WIN],
  input  logic [TAG_W-1:0]   tag_i,
  output logic               out_valid_o,
  output logic [RESP_W-1:0]  resp_o,
  output logic [3:0]         dir_o,
  output logic [TAG_W-1:0]   tag_o
);

  logic [PIX_W-1:0] win_q [WIN][WIN];
  logic             in_vq;

  always_ff @(posedge clk) win_q <= win_i;
  always_ff @(posedge clk) begin
    if (!rst_n) in_vq <= 1'b0;
    else        in_vq <= in_valid_i;
  end

  logic [RESP_W-1:0] r_resp [NUNIQ];
  logic              r_cmpl [NUNIQ];
  logic              r_vld  [NUNIQ];

  for (genvar d = 0; d < NUNIQ; d++) begin : g_tpl
    logic [PIX_W-1:0] taps [4][NTAP];
    for (genvar g = 0; g < 4; g++) begin : g_grp
      for (genvar k = 0; k < NTAP; k++) begin : g_tap
        localparam logic [7:0] POS = tap_pos(d, g, k);
        assign taps[g][k] = win_q[POS[7:4]][POS[3:0]];
      end
    end
    rvt_response u_resp (
      .clk        (clk),
      .rst_n      (rst_n),
      .in_valid_i (in_vq),
      .p1_i       (taps[0]),
      .p2_i       (taps[1]),
      .n1_i       (taps[2]),
      .n2_i       (taps[3]),
      .out_valid_o(r_vld[d]),
      .resp_o     (r_resp[d]),
      .cmpl_o     (r_cmpl[d])
    );
  end

  // Comparator tree: 8 -> 4 -> 2 -> 1, a register after each level.
  typedef struct packed {
    logic [RESP_W-1:0] resp;
    logic [3:0]        dir;
  } cand_t;

  cand_t lv0 [8];
  cand_t lv1 [4];
  cand_t lv2 [2];
  cand_t lv3;

  always_comb
    for (int d = 0; d < 8; d++) lv0[d] = '{resp: r_resp[d], dir: {r_cmpl[d], 3'(d)}};

  function automatic cand_t pick(input cand_t a, input cand_t b);
    return (b.resp > a.resp) ? b : a;
  endfunction

  always_ff @(posedge clk) begin
    for (int i = 0; i < 4; i++) lv1[i] <= pick(lv0[2*i], lv0[2*i+1]);
    for (int i = 0; i < 2; i++) lv2[i] <= pick(lv1[2*i], lv1[2*i+1]);
    lv3 <= pick(lv2[0], lv2[1]);
  end

  assign resp_o = lv3.resp;
  assign dir_o  = lv3.dir;

  // valid and tag delay matching the datapath
  logic [2:0]       cv;
  logic [TAG_W-1:0] tag_pipe [DIR_LAT];

  always_ff @(posedge clk) begin
    if (!rst_n) cv <= '0;
    else        cv <= {cv[1:0], r_vld[0]};
  end
  assign out_valid_o = cv[2];

  always_ff @(posedge clk) begin
    tag_pipe[0] <= tag_i;
    for (int i = 1; i < DIR_LAT; i++) tag_pipe[i] <= tag_pipe[i-1];
  end
  assign tag_o = tag_pipe[DIR_LAT-1];

endmodule
