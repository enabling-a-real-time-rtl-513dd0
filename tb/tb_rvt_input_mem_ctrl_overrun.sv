// tb_rvt_input_mem_ctrl_overrun: the input memory interface with a memory
// clock that is too slow. Words arrive every five 25 MHz clocks as in normal
// operation, but the memory clock runs at 16.7 MHz, so the 11-fold re-reads
// of 40-line frames take longer than a frame. The writer must eventually
// lap the reader, and the interface must raise its sticky overrun flag;
// before that point the read stream must still return the right words.
module tb_rvt_input_mem_ctrl_overrun;
  import rvt_pkg::*;
  localparam int IMG_W = 32, IMG_H = 40, NF = 5;
  localparam int WPL = (IMG_W + 4) / 5;
  localparam int ROWS = IMG_H - WIN + 1;
  localparam int KW = $clog2(IMG_H * WPL + 1);

  logic sclk = 0, mclk = 0, rst_n = 0;
  always #20 sclk = ~sclk;
  always #30 mclk = ~mclk;

  logic [63:0] pk_word; logic pk_sof, pk_eol, pk_tgl;
  logic en [2], we [2];
  logic [18:0] addr [2];
  logic [63:0] wdata [2], rdata [2];
  logic rd_valid, stall, defer, overrun;
  logic [63:0] rd_data; logic [3:0] rd_i; logic [KW-1:0] rd_k;
  int checks = 0, failures = 0;

  rvt_input_mem_ctrl #(.IMG_W(IMG_W), .IMG_H(IMG_H)) dut (
    .clk(mclk), .rst_n, .pk_word_i(pk_word), .pk_sof_i(pk_sof), .pk_eol_i(pk_eol), .pk_tgl_i(pk_tgl),
    .mem_en_o(en), .mem_we_o(we), .mem_addr_o(addr), .mem_wdata_o(wdata), .mem_rdata_i(rdata),
    .rd_valid_o(rd_valid), .rd_data_o(rd_data), .rd_i_o(rd_i), .rd_k_o(rd_k),
    .stall_o(stall), .wr_defer_o(defer), .overrun_o(overrun));

  for (genvar b = 0; b < 2; b++) begin : g_mem
    sram_model #(.DW(64), .AW(19), .DEPTH(IMG_H * WPL + 2), .RD_LAT(2)) u (
      .clk(mclk), .check(rst_n), .en(en[b]), .we(we[b]), .addr(addr[b]), .wdata(wdata[b]), .rdata(rdata[b]));
  end

  logic [63:0] words [NF][IMG_H * WPL];
  initial for (int f = 0; f < NF; f++) for (int n = 0; n < IMG_H * WPL; n++)
    words[f][n] = {$urandom, $urandom};

  bit sent_all = 0;
  initial begin
    pk_word = 0; pk_sof = 0; pk_eol = 0; pk_tgl = 0;
    repeat (4) @(posedge sclk);
    rst_n = 1;
    repeat (10) @(posedge sclk);
    for (int f = 0; f < NF; f++) begin
      for (int y = 0; y < IMG_H; y++) begin
        for (int w = 0; w < WPL; w++) begin
          repeat (5) @(posedge sclk);
          pk_word <= words[f][y * WPL + w];
          pk_sof  <= (y == 0 && w == 0);
          pk_eol  <= (w == WPL - 1);
          pk_tgl  <= ~pk_tgl;
        end
        repeat (12) @(posedge sclk);
      end
      repeat (100) @(posedge sclk);
    end
    sent_all = 1;
  end

  // the first frame is read before any overwrite can happen: check it
  int f = 0, r = 0, w = 0, i = 0;
  always @(posedge mclk) if (rst_n && rd_valid && f == 0) begin
    checks++;
    if (rd_data != words[0][(r + i) * WPL + w]) begin
      failures++; if (failures < 5) $display("row %0d col %0d i %0d wrong", r, w, i);
    end
    if (i < WIN - 1) i++;
    else begin
      i = 0;
      if (w < WPL - 1) w++;
      else begin w = 0; if (r < ROWS - 1) r++; else f++; end
    end
  end

  initial begin
    wait (sent_all);
    repeat (50) @(posedge mclk);
    checks++;
    if (!overrun) begin failures++; $display("overrun not flagged"); end
    checks++;
    if (f == 0) begin failures++; $display("first frame not read completely"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
