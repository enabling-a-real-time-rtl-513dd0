// tb_rvt_result_writer: self-checking test of the output memory interface.
// Random results with random gaps; checks one clock later that the write
// enable, address (from the tag) and data word {pixel, direction,
// response[16:1]} are right, and that frame_first_o follows the tag flag.
module tb_rvt_result_writer;
  import rvt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic valid, we, written, ff;
  logic [RESP_W-1:0] resp;
  logic [3:0] dir;
  logic [31:0] tag, wdata;
  logic [18:0] addr;
  int checks = 0, failures = 0;

  rvt_result_writer dut (.clk, .rst_n, .valid_i(valid), .resp_i(resp), .dir_i(dir), .tag_i(tag),
    .out_we_o(we), .out_addr_o(addr), .out_wdata_o(wdata), .written_o(written), .frame_first_o(ff));

  bit pv; logic [31:0] pw; logic [18:0] pa; bit pf;
  initial begin
    valid = 0; resp = 0; dir = 0; tag = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      valid = $urandom_range(0, 3) != 0;
      resp = RESP_W'($urandom); dir = 4'($urandom); tag = $urandom;
      pv = valid; pa = tag[30:12]; pf = valid && tag[31];
      pw = {tag[11:0], dir, resp[16:1]};
      @(posedge clk); #1;
      checks++;
      if (we != pv || written != pv || ff != pf || (pv && (addr != pa || wdata != pw))) begin
        failures++;
        if (failures < 10) $display("we %b/%b addr %0d/%0d data %h/%h", we, pv, addr, pa, wdata, pw);
      end
    end
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
