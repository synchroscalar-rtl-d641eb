// pe_alu: first functional unit of the tile DSP engine (combinational).
//
// 16-bit integer operations of a small DSP: add, subtract, logic, shifts by
// b[3:0], signed min/max, move, saturating absolute value, and the read-out
// of the MAC accumulator as a saturated Q15 value (acc >>> 15 clipped to the
// 16-bit signed range). The result `y` is valid in the same cycle.
// The tile is described as a 16-bit VLIW DSP with two functional units; the
// exact operation set of this unit is this design's choice.
module pe_alu
  import ss_pkg::*;
(
  input  alu_op_e                  op,
  input  logic [DATA_W-1:0]        a,
  input  logic [DATA_W-1:0]        b,
  input  logic signed [ACC_W-1:0]  acc,
  output logic [DATA_W-1:0]        y
);

  always_comb begin
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_SHL:   y = a << b[3:0];
      ALU_SHRA:  y = DATA_W'($signed(a) >>> b[3:0]);
      ALU_MIN:   y = ($signed(a) < $signed(b)) ? a : b;
      ALU_MAX:   y = ($signed(a) > $signed(b)) ? a : b;
      ALU_MOV:   y = a;
      ALU_RDACC: y = sat_acc(acc);
      ALU_ABS:   y = (a == 16'h8000) ? 16'h7fff : (a[DATA_W-1] ? -a : a);
      default:   y = '0;
    endcase
  end

endmodule
