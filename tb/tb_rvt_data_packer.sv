// tb_rvt_data_packer: self-checking test of the pixel packer.
// Sends three frames of random pixels with random gaps inside lines and
// blanking between lines, and checks every emitted word against words built
// here: five pixels per word at bits [12n+11:12n], lines padded with zero
// pixels, correct start-of-frame and end-of-line flags, and one toggle per
// word. Pixels sent before the first frame sync must be ignored.
module tb_rvt_data_packer;
  import rvt_pkg::*;
  localparam int IMG_W = 23;            // pads to 25: last word holds 3 pixels
  localparam int IMG_H = 4;
  localparam int WPL   = (IMG_W + 4) / 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [PIX_W-1:0] pix;
  logic valid, ls, fs, sof, eol, tgl, tgl_q;
  logic [63:0] word;
  int checks = 0, failures = 0;

  rvt_data_packer #(.IMG_W(IMG_W)) dut (.clk, .rst_n, .pix_i(pix), .pix_valid_i(valid),
    .line_sync_i(ls), .frame_sync_i(fs), .word_o(word), .sof_o(sof), .eol_o(eol), .ready_tgl_o(tgl));

  logic [63:0] exp_w [$];
  bit exp_sof [$], exp_eol [$];

  always @(posedge clk) begin
    tgl_q <= tgl;
    if (rst_n && tgl != tgl_q) begin
      checks++;
      if (exp_w.size() == 0) begin failures++; $display("unexpected word"); end
      else begin
        logic [63:0] ew; bit es, ee;
        ew = exp_w.pop_front(); es = exp_sof.pop_front(); ee = exp_eol.pop_front();
        if (word != ew || sof != es || eol != ee) begin
          failures++; $display("word %h/%h sof %b/%b eol %b/%b", word, ew, sof, es, eol, ee);
        end
      end
    end
  end

  initial begin
    pix = 0; valid = 0; ls = 0; fs = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // stray pixels before the first frame
    for (int x = 0; x < 7; x++) begin
      @(negedge clk); valid = 1; pix = PIX_W'($urandom); ls = (x == 0);
    end
    @(negedge clk); valid = 0; ls = 0;
    for (int f = 0; f < 3; f++)
      for (int y = 0; y < IMG_H; y++) begin
        logic [63:0] w; int slot;
        w = 0; slot = 0;
        for (int x = 0; x < IMG_W; x++) begin
          @(negedge clk);
          valid = 1; pix = PIX_W'($urandom); ls = (x == 0); fs = (x == 0 && y == 0);
          w[slot*12 +: 12] = pix;
          if (slot == 4 || x == IMG_W - 1) begin
            exp_w.push_back(w); exp_sof.push_back(y == 0 && x < 5); exp_eol.push_back(x == IMG_W - 1);
            w = 0; slot = 0;
          end else slot++;
          // occasional gap (pixel not valid)
          if ($urandom_range(0, 5) == 0) begin
            @(negedge clk); valid = 0; ls = 0; fs = 0;
          end
        end
        @(negedge clk); valid = 0; ls = 0; fs = 0;
        repeat ($urandom_range(1, 6)) @(negedge clk);
      end
    repeat (5) @(posedge clk);
    checks++;
    if (exp_w.size() != 0) begin failures++; $display("%0d words missing", exp_w.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
