// tb_rvt_neighborhood: self-checking test of the 11x15 neighbourhood
// buffer. Feeds columns of 11 random words (with the column index k, random
// idle cycles between columns and inside columns) and checks every issued
// window pixel by pixel against a model built from the stored columns:
// window j of column k covers pixels j..j+10 of words k-2, k-1, k. Also
// checks the tag (centre pixel, address 5*(k-1) + 5*515 + j, first flag),
// that five windows follow on consecutive clocks one clock after the column
// completes, and that column 0 of a frame issues nothing.
module tb_rvt_neighborhood;
  import rvt_pkg::*;
  localparam int WP = 515;
  localparam int NCOL = 300;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rd_valid, win_valid;
  logic [63:0] rd_data;
  logic [3:0] rd_i;
  logic [15:0] rd_k;
  logic [PIX_W-1:0] win [WIN][WIN];
  logic [31:0] tag;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  rvt_neighborhood dut (.clk, .rst_n, .rd_valid_i(rd_valid), .rd_data_i(rd_data), .rd_i_i(rd_i),
                        .rd_k_i(rd_k), .win_valid_o(win_valid), .win_o(win), .tag_o(tag));

  logic [63:0] cols [NCOL][WIN];
  int kseq [NCOL];
  int exp_k [$], exp_j [$], exp_c [$], exp_col [$];

  function automatic logic [11:0] px(int col, int row, int c);
    return cols[col + c / 5][row][(c % 5) * 12 +: 12];
  endfunction

  always @(posedge clk) if (rst_n && win_valid) begin
    checks++;
    if (exp_k.size() == 0) begin failures++; $display("unexpected window"); end
    else begin
      int k, j, c0, col; bit bad;
      k = exp_k.pop_front(); j = exp_j.pop_front(); c0 = exp_c.pop_front(); col = exp_col.pop_front();
      bad = (cyc != c0);
      if (col >= 2) begin
      for (int row = 0; row < WIN; row++)
        for (int c = 0; c < WIN; c++)
          if (win[row][c] != px(col - 2, row, c + j)) bad = 1;
      if (tag[11:0] != px(col - 2, 5, 5 + j)) bad = 1;
      end
      if (tag[30:12] != 19'(5 * (k - 1) + 5 * WP + j)) bad = 1;
      if (tag[31] != (k == 1 && j == 0)) bad = 1;
      if (bad) begin failures++; if (failures < 10) $display("window k=%0d j=%0d wrong (cyc %0d exp %0d)", k, j, cyc, c0); end
    end
  end

  initial begin
    rd_valid = 0; rd_data = 0; rd_i = 0; rd_k = 0;
    for (int n = 0; n < NCOL; n++) begin
      kseq[n] = (n < 150) ? n + 200 : n - 150;     // second part restarts a frame at k = 0
      for (int row = 0; row < WIN; row++) cols[n][row] = {4'h0, 60'({$urandom, $urandom})};
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NCOL; n++) begin
      for (int row = 0; row < WIN; row++) begin
        @(negedge clk);
        rd_valid = 1; rd_data = cols[n][row]; rd_i = 4'(row); rd_k = 16'(kseq[n]);
        if (row == WIN - 1 && kseq[n] != 0)
          for (int j = 0; j < 5; j++) begin
            exp_k.push_back(kseq[n]); exp_j.push_back(j); exp_c.push_back(cyc + 1 + j); exp_col.push_back(n);
          end
        if (row != WIN - 1 && $urandom_range(0, 9) == 0) begin
          @(negedge clk); rd_valid = 0;
        end
      end
      @(negedge clk); rd_valid = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    repeat (10) @(posedge clk);
    checks++;
    if (exp_k.size() != 0) begin failures++; $display("%0d windows missing", exp_k.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
