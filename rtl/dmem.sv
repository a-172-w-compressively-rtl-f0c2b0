// dmem: data memory bank with one write port and one read port.
//
// Used for the two 12 x 512 sample banks DMEM0/DMEM1 (ping-pong) and for the
// 18 x 64 memory that holds the LSP coefficients. Writes take effect at the
// clock edge; reads are synchronous with one cycle of latency (rdata_o holds
// mem[raddr_i] of the previous cycle), as a typical SRAM macro behaves. The
// sizes are the original ASIC's; the port arrangement is this design's. The array
// is initialised to zero so unwritten words read as zero.
module dmem #(
  parameter int unsigned WIDTH = 12,
  parameter int unsigned DEPTH = 512,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we_i,
  input  logic [AW-1:0]    waddr_i,
  input  logic [WIDTH-1:0] wdata_i,
  input  logic             re_i,
  input  logic [AW-1:0]    raddr_i,
  output logic [WIDTH-1:0] rdata_o
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we_i) mem[waddr_i] <= wdata_i;
    if (re_i) rdata_o <= mem[raddr_i];
  end

endmodule
