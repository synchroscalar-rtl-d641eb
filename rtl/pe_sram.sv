// pe_sram: local data SRAM of one processing element.
//
// BYTES of storage organised as lines of LINE_W bits (one line is one
// transfer on the column bus), with a write mask per 16-bit lane so that
// single words can be stored. Single port, synchronous: a request with `we`
// low returns the addressed line on `rdata` after the next rising edge
// (read-first); a request with `we` high writes the enabled lanes. `rdata`
// holds its value between reads. Written as an array standing for an SRAM
// macro. The 32 kB size follows the tile memory assumed in the source power
// model; the line organisation is this design's choice.
module pe_sram #(
  parameter int BYTES  = 32768,
  parameter int LINE_W = 128,
  localparam int LANES = LINE_W / 16,
  localparam int LINES = BYTES * 8 / LINE_W,
  localparam int AW    = $clog2(LINES)
) (
  input  logic              clk,
  input  logic              req,
  input  logic              we,
  input  logic [AW-1:0]     addr,
  input  logic [LANES-1:0]  wmask,
  input  logic [LINE_W-1:0] wdata,
  output logic [LINE_W-1:0] rdata
);

  logic [LINE_W-1:0] mem [LINES];

  always_ff @(posedge clk) begin
    if (req) begin
      if (we) begin
        for (int l = 0; l < LANES; l++)
          if (wmask[l]) mem[addr][l*16 +: 16] <= wdata[l*16 +: 16];
      end else begin
        rdata <= mem[addr];
      end
    end
  end

endmodule
