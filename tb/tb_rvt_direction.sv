// tb_rvt_direction: self-checking test of the 16-direction maximum search.
// Feeds random 11x11 windows (and synthetic oriented stripes) back to back,
// computes all sixteen template sums from rvt_pkg::coef in the testbench,
// picks the largest, and checks response, label, tag and the 11-cycle
// latency. Also checks the template set itself: 28 taps per template, seven
// of each weight, and template d+8 = -template d.
module tb_rvt_direction;
  import rvt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, out_valid;
  logic [PIX_W-1:0] win [WIN][WIN];
  logic [31:0] tag_in, tag_out;
  logic [RESP_W-1:0] resp;
  logic [3:0] dir;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  rvt_direction #(.TAG_W(32)) dut (.clk, .rst_n, .in_valid_i(in_valid), .win_i(win), .tag_i(tag_in),
                      .out_valid_o(out_valid), .resp_o(resp), .dir_o(dir), .tag_o(tag_out));

  int exp_r [$], exp_d [$], exp_c [$];
  logic [31:0] exp_t [$];
  int dir_seen [16];

  task automatic ref_model(input int id);
    int best_r, best_d;
    best_r = -1; best_d = 0;
    for (int u = 0; u < 8; u++) begin
      int s, r, lbl;
      s = 0;
      for (int i = 0; i < WIN; i++)
        for (int j = 0; j < WIN; j++) s += coef(u, i, j) * int'(win[i][j]);
      r = s < 0 ? -s : s;
      lbl = s < 0 ? u + 8 : u;
      if (r > best_r) begin best_r = r; best_d = lbl; end
    end
    exp_r.push_back(best_r); exp_d.push_back(best_d); exp_c.push_back(cyc + 1);
    exp_t.push_back(tag_in);
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_r.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      int er, ed, ec; logic [31:0] et;
      er = exp_r.pop_front(); ed = exp_d.pop_front(); ec = exp_c.pop_front(); et = exp_t.pop_front();
      dir_seen[ed]++;
      if (int'(resp) != er || int'(dir) != ed || tag_out != et || cyc - ec != DIR_LAT - 1) begin
        failures++;
        $display("mismatch resp=%0d/%0d dir=%0d/%0d lat=%0d", resp, er, dir, ed, cyc - ec + 1);
      end
    end
  end

  initial begin
    // template set sanity
    for (int d = 0; d < 8; d++) begin
      int cnt [5];
      for (int c = 0; c < 5; c++) cnt[c] = 0;
      for (int i = 0; i < WIN; i++)
        for (int j = 0; j < WIN; j++) begin
          cnt[coef(d, i, j) + 2]++;
          if (coef(d + 8, i, j) != -coef(d, i, j)) failures++;
        end
      checks++;
      if (cnt[0] != 7 || cnt[1] != 7 || cnt[3] != 7 || cnt[4] != 7) begin
        failures++; $display("template %0d has wrong tap counts", d);
      end
    end
    in_valid = 0; tag_in = 0;
    for (int i = 0; i < WIN; i++) for (int j = 0; j < WIN; j++) win[i][j] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      in_valid = (n % 7) != 3;     // a few bubbles
      tag_in = $urandom;
      if (n % 2 == 0) begin
        for (int i = 0; i < WIN; i++) for (int j = 0; j < WIN; j++) win[i][j] = PIX_W'($urandom);
      end else begin
        // oriented edge: bright on one side of a line through the centre
        int a;
        a = $urandom_range(0, 15);
        for (int i = 0; i < WIN; i++) for (int j = 0; j < WIN; j++)
          win[i][j] = (coef(a, i, j) > 0) ? 12'd3000 + PIX_W'($urandom_range(0, 50))
                                          : 12'd200 + PIX_W'($urandom_range(0, 50));
      end
      if (in_valid) ref_model(n);
    end
    @(negedge clk) in_valid = 0;
    repeat (30) @(posedge clk);
    checks++;
    if (exp_r.size() != 0) begin failures++; $display("missing outputs"); end
    for (int d = 0; d < 16; d++) begin
      checks++;
      if (dir_seen[d] == 0) begin failures++; $display("direction %0d never chosen", d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
