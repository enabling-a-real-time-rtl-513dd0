// tb_rvt_host_if: self-checking test of the DMA trigger handshake.
// Streams results for several frames (random gaps, random frame lengths
// above the trigger count), acknowledges each trigger after a random delay
// and checks: the trigger rises on the clock after the TRIGGER_AT-th result
// of a frame and only once per frame, it drops on the acknowledge, and the
// reported round trip equals the measured trigger-to-acknowledge cycles.
module tb_rvt_host_if;
  localparam int TRIG = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic written, first, ack, trig, lat_v;
  logic [31:0] lat;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  rvt_host_if #(.TRIGGER_AT(TRIG)) dut (.clk, .rst_n, .written_i(written), .frame_first_i(first),
    .host_ack_i(ack), .trigger_o(trig), .lat_cycles_o(lat), .lat_valid_o(lat_v));

  int nres = 0, n_trig = 0, rise_cyc = 0, frames = 0;
  bit trig_q = 0;
  int got_lat = 0, got_exp = 0; bit got = 0;
  always @(posedge clk) if (rst_n) begin
    trig_q <= trig;
    if (lat_v) begin got = 1; got_lat = int'(lat); got_exp = cyc - rise_cyc; end
    if (trig && !trig_q) begin
      n_trig++; rise_cyc = cyc;
      checks++;
      if (nres != TRIG) begin failures++; $display("trigger after %0d results", nres); end
    end
  end

  // host: acknowledge after a random delay
  initial begin
    ack = 0;
    wait (rst_n);
    forever begin
      int d, t0;
      @(posedge clk);
      if (trig) begin
        t0 = cyc;
        d = $urandom_range(0, 40);
        repeat (d) @(posedge clk);
        @(negedge clk) ack = 1;
        @(negedge clk) ack = 0;
        repeat (3) @(posedge clk);
        checks++;
        if (!got || got_lat != got_exp || trig) begin
          failures++; $display("round trip %0d exp %0d valid %b trig %b", got_lat, got_exp, got, trig);
        end
        got = 0;
      end
    end
  end

  initial begin
    written = 0; first = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 6; f++) begin
      int len;
      len = TRIG + $urandom_range(10, 60);
      for (int n = 0; n < len; n++) begin
        @(negedge clk);
        written = 1; first = (n == 0);
        if (n == 0) nres = 1; else nres++;
        @(negedge clk);
        written = 0; first = 0;
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      frames++;
      repeat (50) @(negedge clk);
    end
    repeat (60) @(posedge clk);
    checks++;
    if (n_trig != frames) begin failures++; $display("%0d triggers for %0d frames", n_trig, frames); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
