// tb_rvt_smart_camera_full: end-to-end test of the smart-camera top (full 512 x 512 frames, default parameters).
//
// A framegrabber model streams 2 frames of 512 x 512 12-bit pixels at
// 25 MHz with line and frame blanking; the design runs at 65 MHz against
// behavioural models of the two input SRAM banks. Every result written to
// the output memory is checked against a reference computed here from the
// frame data: grey value, direction label and response/2 of the largest of
// the sixteen template sums for the window centred on the written address
// in the zero-padded frame. It also checks the result count per frame, the
// 15-cycle latency from the last read of a neighbourhood column to its first
// result, the minimum spacing of 11 clocks between groups of five results,
// the DMA trigger/acknowledge handshake with its round-trip counter, and
// that the first result of a frame is stored within 2 us of the end of
// its 11th line (the delay from first pixel to first result is printed).
// Each mechanism (waiting for lines, a write giving way to a read, reads of
// both banks, line padding, frame-region swap, complement template,
// trigger/ack) is counted and must occur at least once.
module tb_rvt_smart_camera_full;
  import rvt_pkg::*;

  localparam int IMG_W = 512;
  localparam int IMG_H = 512;
  localparam int NF    = 2;
  localparam int WPL   = (IMG_W + 4) / 5;
  localparam int WP    = WPL * 5;
  localparam int ROWS  = IMG_H - WIN + 1;
  localparam int N_RES = ROWS * WPL * 5 - 5;
  localparam int TRIG  = N_RES - N_RES / 32;
  localparam int H_BLANK = 16;
  localparam int V_BLANK = 200;
  localparam int FSZ   = IMG_H * WP;
  localparam int DEPTH = (FSZ / 5 + 1);     // two regions of FSZ/10 words
  localparam int LAT   = 15;

  logic fg_clk = 0, mclk = 0, rst_n = 0;
  always #20 fg_clk = ~fg_clk;           // 25 MHz
  always #7.692 mclk = ~mclk;            // 65 MHz

  logic [PIX_W-1:0] fg_pix;
  logic fg_valid, fg_ls, fg_fs, fg_clk_o;
  logic in_en [2], in_we [2];
  logic [18:0] in_addr [2];
  logic [63:0] in_wdata [2], in_rdata [2];
  logic out_we;
  logic [18:0] out_addr;
  logic [31:0] out_wdata;
  logic host_ack, trig, lat_v, stall, wdefer, overrun;
  logic [31:0] lat_cyc;

  rvt_smart_camera  dut (
    .fg_clk_i(fg_clk), .mclk_i(mclk), .rst_ni(rst_n), .fg_clk_o(fg_clk_o),
    .fg_pix_i(fg_pix), .fg_valid_i(fg_valid), .fg_line_sync_i(fg_ls), .fg_frame_sync_i(fg_fs),
    .in_mem_en_o(in_en), .in_mem_we_o(in_we), .in_mem_addr_o(in_addr),
    .in_mem_wdata_o(in_wdata), .in_mem_rdata_i(in_rdata),
    .out_mem_we_o(out_we), .out_mem_addr_o(out_addr), .out_mem_wdata_o(out_wdata),
    .host_ack_i(host_ack), .host_trigger_o(trig), .host_lat_cycles_o(lat_cyc),
    .host_lat_valid_o(lat_v), .stall_o(stall), .wr_defer_o(wdefer), .overrun_o(overrun)
  );

  for (genvar b = 0; b < 2; b++) begin : g_mem
    sram_model #(.DW(64), .AW(19), .DEPTH(DEPTH), .RD_LAT(2)) u_sram (
      .clk(mclk), .check(dut.m_rst_n), .en(in_en[b]), .we(in_we[b]), .addr(in_addr[b]),
      .wdata(in_wdata[b]), .rdata(in_rdata[b]));
  end

  int checks = 0, failures = 0;
  int n_stall = 0, n_defer = 0, n_rd [2], n_pad = 0, n_region1 = 0, n_cmpl = 0, n_trig = 0, n_ack = 0;
  int n_lat = 0, n_gap11 = 0;

  // frame images in the padded layout (pad columns are zero)
  logic [PIX_W-1:0] img [NF][FSZ];
  int tap_off [8][4][7];

  function automatic int pix_at(int f, int a);
    if (a < 0 || a >= FSZ) return 0;
    return int'(img[f][a]);
  endfunction

  initial begin
    for (int d = 0; d < 8; d++) for (int g = 0; g < 4; g++) for (int k = 0; k < 7; k++) begin
      logic [7:0] p;
      p = tap_pos(d, g, k);
      tap_off[d][g][k] = (int'(p[7:4]) - 5) * WP + (int'(p[3:0]) - 5);
    end
    for (int f = 0; f < NF; f++)
      for (int y = 0; y < IMG_H; y++)
        for (int x = 0; x < WP; x++) begin
          int v;
          // random texture plus dark diagonal and horizontal "vessels"
          v = $urandom_range(1500, 2600);
          if (((x + y + 7 * f) % 23) < 3) v = v - 1200;
          if (((y + f) % 17) < 2) v = v - 900;
          if (x >= IMG_W) v = 0;
          img[f][y * WP + x] = PIX_W'(v);
        end
  end

  real t_start [NF], t_line11 [NF];

  // ---------------- framegrabber model ----------------
  initial begin
    fg_pix = 0; fg_valid = 0; fg_ls = 0; fg_fs = 0;
    repeat (5) @(posedge fg_clk);
    rst_n = 1;
    repeat (20) @(posedge fg_clk);
    for (int f = 0; f < NF; f++) begin
      for (int y = 0; y < IMG_H; y++) begin
        for (int x = 0; x < IMG_W; x++) begin
          @(negedge fg_clk);
          fg_valid = 1; fg_pix = img[f][y * WP + x];
          fg_ls = (x == 0); fg_fs = (x == 0 && y == 0);
          if (x == 0 && y == 0) t_start[f] = $realtime;
          if (x == IMG_W - 1 && y == WIN - 1) t_line11[f] = $realtime;
        end
        @(negedge fg_clk);
        fg_valid = 0; fg_ls = 0; fg_fs = 0;
        repeat (H_BLANK) @(negedge fg_clk);
      end
      repeat (V_BLANK) @(negedge fg_clk);
    end
  end

  // ---------------- memory-side observation ----------------
  int cyc = 0;
  int rd_cnt = 0;
  int col_rd_cyc [int];
  int rd_col = 0;
  always @(posedge mclk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (stall) n_stall++;
      if (wdefer) n_defer++;
      for (int b = 0; b < 2; b++) begin
        if (in_en[b] && !in_we[b]) n_rd[b]++;
        if (in_en[b] && in_we[b] && in_wdata[b][63:24] == '0 && in_wdata[b][23:0] != '0) n_pad++;
        if (in_en[b] && in_addr[b] >= 19'(FSZ / 10)) n_region1++;
      end
      // record the cycle of the last (11th) read of each column
      if ((in_en[0] && !in_we[0]) || (in_en[1] && !in_we[1])) begin
        rd_cnt++;
        if (rd_cnt % WIN == 0) begin
          col_rd_cyc[rd_col] = cyc;
          rd_col = (rd_col + 1) % (ROWS * WPL);
        end
      end
      checks++;
      if (overrun) begin failures++; $display("overrun flagged"); end
    end
  end

  // ---------------- result checking ----------------
  int frame = 0, nres = 0, last_grp_cyc = -1000;
  always @(posedge mclk) if (rst_n && out_we) begin
    int a, k, j, best_r, best_d;
    result_t r;
    r = out_wdata;
    a = int'(out_addr);
    j = (a - 5 * WP) % 5;
    k = (a - 5 * WP) / 5 + 1;
    if (j == 0) begin
      checks++;
      if (!col_rd_cyc.exists(k) || cyc - col_rd_cyc[k] != LAT) begin
        failures++; $display("latency %0d for column %0d", cyc - col_rd_cyc[k], k);
      end else n_lat++;
      checks++;
      if (cyc - last_grp_cyc < 11) begin failures++; $display("groups closer than 11 cycles"); end
      if (cyc - last_grp_cyc == 11) n_gap11++;
      last_grp_cyc = cyc;
    end
    if (nres == 0) begin
      // first result of a frame: soon after the 11th line has been delivered
      checks++;
      $display("frame %0d: first result %0.1f us after the first pixel, %0.2f us after line 11",
               frame, ($realtime - t_start[frame]) / 1000.0, ($realtime - t_line11[frame]) / 1000.0);
      if ($realtime - t_line11[frame] > 2000.0 || $realtime < t_line11[frame]) begin
        failures++; $display("first result too late or too early");
      end
    end
    checks++;
    if (a != 5 * WP + nres) begin
      failures++; $display("frame %0d result %0d at address %0d", frame, nres, a);
    end
    if (a >= 5 * WP + 5) begin
      best_r = -1; best_d = 0;
      for (int d = 0; d < 8; d++) begin
        int s, rr;
        s = 0;
        for (int kk = 0; kk < 7; kk++)
          s += pix_at(frame, a + tap_off[d][0][kk]) + 2 * pix_at(frame, a + tap_off[d][1][kk])
             - pix_at(frame, a + tap_off[d][2][kk]) - 2 * pix_at(frame, a + tap_off[d][3][kk]);
        rr = s < 0 ? -s : s;
        if (rr > best_r) begin best_r = rr; best_d = s < 0 ? d + 8 : d; end
      end
      checks++;
      if (int'(r.pix) != pix_at(frame, a) || int'(r.dir) != best_d || int'(r.resp) != best_r / 2) begin
        failures++;
        if (failures < 10)
          $display("frame %0d addr %0d: pix %0d/%0d dir %0d/%0d resp %0d/%0d", frame, a,
                   r.pix, pix_at(frame, a), r.dir, best_d, r.resp, best_r / 2);
      end
      if (r.dir >= 8) n_cmpl++;
    end
    nres++;
    if (nres == N_RES) begin nres = 0; frame++; end
  end

  // ---------------- host model ----------------
  int trig_cyc = 0, ack_cyc = 0, trig_res = 0;
  initial begin
    host_ack = 0;
    wait (rst_n);
    repeat (10) @(posedge mclk);
    forever begin
      @(posedge mclk);
      if (trig) begin
        int wait_c;
        n_trig++;
        trig_res = nres;
        checks++;
        if (trig_res != TRIG) begin failures++; $display("trigger after %0d results, expected %0d", trig_res, TRIG); end
        trig_cyc = cyc;
        wait_c = $urandom_range(5, 60);
        repeat (wait_c) @(posedge mclk);
        @(negedge mclk) host_ack = 1;
        @(negedge mclk) host_ack = 0;
        ack_cyc = wait_c + 1;
        @(posedge mclk);
        while (!lat_v) @(posedge mclk);
        checks++; n_ack++;
        if (int'(lat_cyc) != ack_cyc + 1) begin
          failures++; $display("round trip %0d, expected %0d", lat_cyc, ack_cyc + 1);
        end
        checks++;
        if (trig) begin failures++; $display("trigger not cleared"); end
      end
    end
  end

  task automatic need(input string what, input int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin failures++; $display("mechanism never happened: %s", what); end
  endtask

  initial begin
    wait (frame == NF);
    repeat (100) @(posedge mclk);
    checks++;
    if (n_trig != NF) begin failures++; $display("%0d triggers for %0d frames", n_trig, NF); end
    need("wait for lines (cycles)", n_stall);
    need("write deferred by read", n_defer);
    need("reads bank 0", n_rd[0]);
    need("reads bank 1", n_rd[1]);
    need("padded line-end words", n_pad);
    need("frame region 1 accesses", n_region1);
    need("complement template wins", n_cmpl);
    need("DMA trigger/ack", n_ack);
    need("groups 11 cycles apart", n_gap11);
    need("latency checks", n_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(100_000_000);
    failures++;
    $display("watchdog expired: frame %0d result %0d", frame, nres);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
