// ss_tb_pkg: the column kernel shared by the column and top-level benches,
// and a reference model of its results.
//
// Every tile p holds 8 samples x (SRAM line 0) and 8 coefficients h (line 1)
// and computes y = sat16((sum x[i]*h[i]) >>> 15) in a zero-overhead loop whose
// MAC uses a load forwarded from the previous cycle. y is stored in lane 0 of
// line 2 (other lanes 0) and loaded into the transmit buffer. Then three bus
// steps:
//   step 0  boundary 1 on: two messages at once, tile 0 -> tile 3 (upper
//           group) and tile 4 -> tile 7 (lower group); receivers store line 3.
//   step 1  all segmenters off: tile 5 broadcasts to tiles 1, 2, 6 (line 4)
//           and to the SIMD controller, which branches if the value is not 0.
//   step 2  column-specific (HB_PUT in column 0 with tile 0 sending, HB_GET in
//           the others with tile 1 receiving); receivers store line 6.
// If the branch falls through, tile lines 5 get 0x0bad.
package ss_tb_pkg;
  import ss_pkg::*;

  localparam int PROG_LEN = 27;
  // decoded cycles + initial fetch, branch taken
  localparam int KERNEL_CYCLES = 55;

  function automatic logic [31:0] kernel(int i);
    case (i)
      0:  return enc_i(OP_LI, 0, 0, 0);
      1:  return enc_i(OP_LI, 1, 0, 0);
      2:  return enc_i(OP_LI, 2, 0, 8);
      3:  return enc_i(OP_LI, 15, 0, 1);
      4:  return enc_bundle(ALU_NOP, 0, 0, 0, MAC_CLR, 0, 0);
      5:  return enc_loop(8, 9);
      6:  return enc_i(OP_LD, 3, 1, 0);
      7:  return enc_i(OP_LD, 4, 2, 0);
      8:  return enc_bundle(ALU_ADD, 1, 1, 15, MAC_MAC, 3, 4);
      9:  return enc_i(OP_ADDI, 2, 2, 1);
      10: return enc_bundle(ALU_RDACC, 5, 0, 0, MAC_NOP, 0, 0);
      11: return enc_i(OP_ST, 5, 0, 16);
      12: return enc_i(OP_LI, 6, 0, 2);
      13: return enc_i(OP_LDTX, 0, 6, 0);
      14: return enc_i(OP_COMM, 0, 0, 0);
      15: return enc_i(OP_LI, 7, 0, 3);
      16: return enc_i(OP_STRX, 0, 7, 0);
      17: return enc_i(OP_COMM, 0, 0, 0);
      18: return enc_i(OP_LI, 8, 0, 4);
      19: return enc_i(OP_STRX, 0, 8, 0);
      20: return enc_i(OP_BNZ, 0, 0, 23);
      21: return enc_i(OP_LI, 9, 0, 16'h0bad);
      22: return enc_i(OP_ST, 9, 0, 40);
      23: return enc_i(OP_COMM, 0, 0, 0);
      24: return enc_i(OP_LI, 10, 0, 6);
      25: return enc_i(OP_STRX, 0, 10, 0);
      default: return enc_i(OP_HALT, 0, 0, 0);
    endcase
  endfunction

  // segment schedule entry {seg_on[2:0], simd_rx, hb[1:0]}
  function automatic logic [5:0] seg_entry(int step, bit hb_source);
    case (step)
      0: return {3'b010, 1'b0, HB_NONE};
      1: return {3'b000, 1'b1, HB_NONE};
      default: return {3'b111, 1'b0, hb_source ? HB_PUT : HB_GET};
    endcase
  endfunction

  function automatic comm_act_e comm_entry(int step, int p, bit hb_source);
    case (step)
      0: return (p == 0 || p == 4) ? C_SEND : (p == 3 || p == 7) ? C_RECV : C_IDLE;
      1: return (p == 5) ? C_SEND : (p == 1 || p == 2 || p == 6) ? C_RECV : C_IDLE;
      default: return hb_source ? ((p == 0) ? C_SEND : C_IDLE) : ((p == 1) ? C_RECV : C_IDLE);
    endcase
  endfunction

  // reference dot product of one tile
  function automatic logic [15:0] dot(logic [127:0] x, logic [127:0] h);
    logic signed [39:0] acc;
    acc = 0;
    for (int i = 0; i < 8; i++) acc = acc + 40'($signed(x[i*16 +: 16]) * $signed(h[i*16 +: 16]));
    return sat_acc(acc);
  endfunction

  function automatic logic [127:0] rnd_line(bit positive);
    logic [127:0] v;
    for (int i = 0; i < 8; i++) begin
      // 12-bit magnitudes keep the Q15 result inside 16 bits (no saturation)
      v[i*16 +: 16] = 16'($urandom % 4096);
      if (!positive && $urandom % 2 == 1) v[i*16 +: 16] = -v[i*16 +: 16];
    end
    return v;
  endfunction
endpackage
