// pe_regfile: register file of one processing element.
//
// NREGS registers of DATA_W bits with four combinational read ports (two
// operands for each of the two functional units of a VLIW bundle) and two
// write ports: port 0 for ALU / immediate results, port 1 for data returning
// from the tile SRAM. Writes happen on the rising clock edge when the column
// clock enable `en` is high. When both ports write the same register, port 0
// wins because it belongs to the younger instruction. Reads return the value
// before the edge (no internal forwarding; the PE forwards load data itself).
// Register count and port count are this design's choices; the tile is only
// said to contain a register file.
module pe_regfile #(
  parameter int NREGS  = 16,
  parameter int DATA_W = 16,
  parameter int NRD    = 4,
  localparam int AW    = $clog2(NREGS)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  input  logic [NRD-1:0][AW-1:0]     raddr,
  output logic [NRD-1:0][DATA_W-1:0] rdata,
  input  logic                       we0,
  input  logic [AW-1:0]              waddr0,
  input  logic [DATA_W-1:0]          wdata0,
  input  logic                       we1,
  input  logic [AW-1:0]              waddr1,
  input  logic [DATA_W-1:0]          wdata1
);

  logic [NREGS-1:0][DATA_W-1:0] regs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs <= '0;
    end else if (en) begin
      if (we1) regs[waddr1] <= wdata1;
      if (we0) regs[waddr0] <= wdata0;
    end
  end

  always_comb begin
    for (int i = 0; i < NRD; i++) rdata[i] = regs[raddr[i]];
  end

endmodule
