// pe_mac: second functional unit of the tile DSP engine.
//
// A signed 16 x 16 multiplier feeding a 40-bit accumulator (8 guard bits over
// the 32-bit product, as in common 16-bit DSPs). Operations: MAC (acc += a*b),
// MSU (acc -= a*b), MUL (acc = a*b) and CLR (acc = 0). The accumulator updates
// on the clock edge when the column enable `en` is high and is visible on
// `acc` from the next cycle. Reset clears it.
// The tile is described as having two functional units; making the second one
// a multiply-accumulator and its widths are this design's choices.
module pe_mac
  import ss_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  mac_op_e                  op,
  input  logic [DATA_W-1:0]        a,
  input  logic [DATA_W-1:0]        b,
  output logic signed [ACC_W-1:0]  acc
);

  logic signed [2*DATA_W-1:0] prod;
  assign prod = $signed(a) * $signed(b);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
    end else if (en) begin
      unique case (op)
        MAC_MAC: acc <= acc + ACC_W'(prod);
        MAC_MSU: acc <= acc - ACC_W'(prod);
        MAC_MUL: acc <= ACC_W'(prod);
        MAC_CLR: acc <= '0;
        default: ;
      endcase
    end
  end

endmodule
