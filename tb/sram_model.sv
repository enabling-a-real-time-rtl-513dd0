// sram_model: behavioural model of one on-board synchronous SRAM bank
// (ZBT-style, single port, one access per clock). A read presented with
// en=1, we=0 returns its data RD_LAT clocks later; a write with en=1, we=1
// stores wdata at the clock edge. The memory starts cleared. Accesses
// outside DEPTH are flagged while check is high.
module sram_model #(
  parameter int unsigned DW     = 64,
  parameter int unsigned AW     = 19,
  parameter int unsigned DEPTH  = 1 << 16,
  parameter int unsigned RD_LAT = 2
) (
  input  logic          clk,
  input  logic          check,    // enables the address-range check
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];
  logic [DW-1:0] pipe [RD_LAT];
  initial for (int a = 0; a < DEPTH; a++) mem[a] = '0;
  always_ff @(posedge clk) begin
    if (en && we) mem[32'(addr) % DEPTH] <= wdata;
    pipe[0] <= (en && !we) ? mem[32'(addr) % DEPTH] : pipe[0];
    for (int s = 1; s < RD_LAT; s++) pipe[s] <= pipe[s-1];
  end
  assign rdata = pipe[RD_LAT-1];
  always_ff @(posedge clk)
    if (en && check) assert (32'(addr) < DEPTH) else $error("SRAM address %0d out of range (we=%b)", addr, we);
endmodule
