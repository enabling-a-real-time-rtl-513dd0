// rvt_response: one direction-template unit.
//
// Computes the response of one unique template and of its complement (the
// same template with the sign flipped) and returns the larger of the two.
// The 28 tap pixels arrive split into four groups of seven by coefficient
// (+1, +2, -1, -2). Each group is summed by a three-level adder tree, the
// x2 groups are shifted left by one, and the two positive and two negative
// partial sums are added into POS and NEG (both kept as magnitudes). Two
// subtractors form POS-NEG and NEG-POS while a comparator decides which is
// non-negative; the last stage selects it. cmpl_o is high when the
// complement template (NEG side) gave the response; on a tie the template
// itself is reported.
//
// Timing: fully pipelined, one set of taps per clock, RESP_LAT = 7 cycles
// from in_valid_i to out_valid_o. Stages: tree level 1, 2, 3, shift, POS/NEG
// add, subtract+compare, select. The stage structure follows the described
// Response unit; the exact register placement is this design's choice.
module rvt_response
  import rvt_pkg::*;
#(
  parameter int unsigned PIX_W_P = PIX_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid_i,
  input  logic [PIX_W_P-1:0]   p1_i [NTAP],   // coefficient +1
  input  logic [PIX_W_P-1:0]   p2_i [NTAP],   // coefficient +2
  input  logic [PIX_W_P-1:0]   n1_i [NTAP],   // coefficient -1
  input  logic [PIX_W_P-1:0]   n2_i [NTAP],   // coefficient -2
  output logic                 out_valid_o,
  output logic [PIX_W_P+4:0]   resp_o,        // |response|
  output logic                 cmpl_o         // 1: complement template won
);

  localparam int unsigned W1 = PIX_W_P + 1;
  localparam int unsigned W2 = PIX_W_P + 2;
  localparam int unsigned W3 = PIX_W_P + 3;
  localparam int unsigned W4 = PIX_W_P + 4;
  localparam int unsigned W5 = PIX_W_P + 5;

  logic [RESP_LAT-1:0] vld;

  // Stage 1..3: adder trees, one per group (7 -> 4 -> 2 -> 1).
  logic [W1-1:0] l1 [4][4];
  logic [W2-1:0] l2 [4][2];
  logic [W3-1:0] l3 [4];
  // Stage 4: x2 shift for the +2 / -2 groups.
  logic [W4-1:0] sh [4];
  // Stage 5: POS / NEG magnitudes.
  logic [W5-1:0] pos, neg;
  // Stage 6: both differences and the comparison.
  logic [W5-1:0] d_pn, d_np;
  logic          neg_gt;

  logic [PIX_W_P-1:0] grp [4][NTAP];
  always_comb begin
    grp[0] = p1_i;
    grp[1] = p2_i;
    grp[2] = n1_i;
    grp[3] = n2_i;
  end

  always_ff @(posedge clk) begin
    for (int g = 0; g < 4; g++) begin
      l1[g][0] <= W1'(grp[g][0]) + W1'(grp[g][1]);
      l1[g][1] <= W1'(grp[g][2]) + W1'(grp[g][3]);
      l1[g][2] <= W1'(grp[g][4]) + W1'(grp[g][5]);
      l1[g][3] <= W1'(grp[g][6]);
      l2[g][0] <= W2'(l1[g][0]) + W2'(l1[g][1]);
      l2[g][1] <= W2'(l1[g][2]) + W2'(l1[g][3]);
      l3[g]    <= W3'(l2[g][0]) + W3'(l2[g][1]);
    end
    sh[0] <= W4'(l3[0]);
    sh[1] <= {l3[1], 1'b0};
    sh[2] <= W4'(l3[2]);
    sh[3] <= {l3[3], 1'b0};
    pos    <= W5'(sh[0]) + W5'(sh[1]);
    neg    <= W5'(sh[2]) + W5'(sh[3]);
    d_pn   <= pos - neg;
    d_np   <= neg - pos;
    neg_gt <= neg > pos;
    resp_o <= neg_gt ? d_np : d_pn;
    cmpl_o <= neg_gt;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[RESP_LAT-2:0], in_valid_i};
  end
  assign out_valid_o = vld[RESP_LAT-1];

endmodule
