// tb_rvt_response: self-checking test of one template unit.
// Drives a new random tap set every clock (plus all-max and tie corner
// cases), computes |sum(+1) + 2*sum(+2) - sum(-1) - 2*sum(-2)| and the
// complement flag in the testbench, and checks them 7 cycles later.
module tb_rvt_response;
  import rvt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, out_valid, cmpl;
  logic [PIX_W-1:0] p1 [NTAP], p2 [NTAP], n1 [NTAP], n2 [NTAP];
  logic [RESP_W-1:0] resp;
  int checks = 0, failures = 0;

  rvt_response dut (.clk, .rst_n, .in_valid_i(in_valid), .p1_i(p1), .p2_i(p2),
                    .n1_i(n1), .n2_i(n2), .out_valid_o(out_valid), .resp_o(resp), .cmpl_o(cmpl));

  int exp_resp [$];
  bit exp_cmpl [$];
  int exp_cyc [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic drive(input int mode);
    int s = 0;
    for (int k = 0; k < NTAP; k++) begin
      case (mode)
        1: begin p1[k] = '1; p2[k] = '1; n1[k] = 0; n2[k] = 0; end
        2: begin p1[k] = 0; p2[k] = 0; n1[k] = '1; n2[k] = '1; end
        3: begin p1[k] = 7; p2[k] = 9; n1[k] = 7; n2[k] = 9; end
        default: begin p1[k] = PIX_W'($urandom); p2[k] = PIX_W'($urandom);
                 n1[k] = PIX_W'($urandom); n2[k] = PIX_W'($urandom); end
      endcase
      s += int'(p1[k]) + 2*int'(p2[k]) - int'(n1[k]) - 2*int'(n2[k]);
    end
    exp_resp.push_back(s < 0 ? -s : s);
    exp_cmpl.push_back(s < 0);
    exp_cyc.push_back(cyc + 1);
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_resp.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      int er, ec; bit eb;
      er = exp_resp.pop_front(); eb = exp_cmpl.pop_front(); ec = exp_cyc.pop_front();
      if (int'(resp) != er || cmpl != eb || cyc - ec != RESP_LAT - 1) begin
        failures++;
        $display("mismatch resp=%0d exp=%0d cmpl=%b exp=%b lat=%0d", resp, er, cmpl, eb, cyc - ec + 1);
      end
    end
  end

  initial begin
    in_valid = 0;
    for (int k = 0; k < NTAP; k++) begin p1[k] = 0; p2[k] = 0; n1[k] = 0; n2[k] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      in_valid = 1;
      drive(n < 4 ? n : 0);
    end
    @(negedge clk) in_valid = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (exp_resp.size() != 0) begin failures++; $display("missing outputs: %0d", exp_resp.size()); end
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
