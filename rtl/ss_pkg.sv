// ss_pkg: shared widths, instruction encoding and helper encoders for the
// Synchroscalar tile array.
//
// A column's SIMD controller fetches 32-bit instruction words. Two formats:
//   bundle (bit 31 = 1): one ALU operation and one MAC operation issued together
//     [30:27] alu_op  [26:23] rd  [22:19] ra  [18:15] rb
//     [14:12] mac_op  [11:8]  ma  [7:4]   mb   [3:0] zero
//   single (bit 31 = 0): [30:26] opcode, [25:22] rd, [21:18] ra, [15:0] imm
//     LOOP puts its iteration count in [25:16] and the last body address in imm.
// The 16-bit data width and the two functional units follow the tile
// description (a 16-bit VLIW DSP with two units); the opcode map, register
// count and field layout are this design's own choices.
package ss_pkg;

  localparam int DATA_W  = 16;
  localparam int ACC_W   = 40;
  localparam int NREGS   = 16;
  localparam int INSTR_W = 32;

  typedef enum logic [3:0] {
    ALU_NOP   = 4'd0,
    ALU_ADD   = 4'd1,
    ALU_SUB   = 4'd2,
    ALU_AND   = 4'd3,
    ALU_OR    = 4'd4,
    ALU_XOR   = 4'd5,
    ALU_SHL   = 4'd6,   // a << b[3:0]
    ALU_SHRA  = 4'd7,   // a >>> b[3:0]
    ALU_MIN   = 4'd8,   // signed
    ALU_MAX   = 4'd9,   // signed
    ALU_MOV   = 4'd10,  // a
    ALU_RDACC = 4'd11,  // saturate16(acc >>> 15)
    ALU_ABS   = 4'd12   // |a|, saturating
  } alu_op_e;

  typedef enum logic [2:0] {
    MAC_NOP = 3'd0,
    MAC_MAC = 3'd1,     // acc += a*b
    MAC_MSU = 3'd2,     // acc -= a*b
    MAC_MUL = 3'd3,     // acc  = a*b
    MAC_CLR = 3'd4      // acc  = 0
  } mac_op_e;

  typedef enum logic [4:0] {
    OP_NOP   = 5'd0,
    // computation: forwarded to the PEs
    OP_LI    = 5'd1,    // rd = imm
    OP_ADDI  = 5'd2,    // rd = ra + imm
    OP_LD    = 5'd3,    // rd = mem16[ra + imm]          (result one cycle later)
    OP_ST    = 5'd4,    // mem16[ra + imm] = rd
    OP_LDTX  = 5'd5,    // tx_buf = line[ra + imm]       (one cycle later)
    OP_STRX  = 5'd6,    // line[ra + imm] = rx_buf
    OP_COMM  = 5'd7,    // one statically scheduled bus step
    // control: executed by the SIMD controller
    OP_JMP   = 5'd16,   // pc = imm
    OP_BZ    = 5'd17,   // if (creg == 0) pc = imm
    OP_BNZ   = 5'd18,   // if (creg != 0) pc = imm
    OP_LOOP  = 5'd19,   // repeat [pc+1 .. imm] count times
    OP_CSYNC = 5'd20,   // restart the communication schedule at step 0
    OP_HALT  = 5'd21
  } op_e;

  // Per-tile communication action for one schedule step.
  typedef enum logic [1:0] {
    C_IDLE = 2'd0,
    C_SEND = 2'd1,
    C_RECV = 2'd2,
    C_BOTH = 2'd3       // send, and also capture the bus (keeps a copy of a broadcast)
  } comm_act_e;

  // Horizontal-bus action of a column for one schedule step.
  typedef enum logic [1:0] {
    HB_NONE = 2'd0,
    HB_PUT  = 2'd1,     // capture segment 0 and keep driving it on the horizontal bus
    HB_GET  = 2'd2,     // drive segment 0 with the horizontal bus value
    HB_REL  = 2'd3      // stop driving the horizontal bus
  } hb_act_e;

  // Control instructions (opcode 16 and up) stay in the SIMD controller.
  function automatic logic is_control(logic [1:0] top2);
    return !top2[1] && top2[0];
  endfunction

  // ---- encoders (usable by software models and testbenches) ----
  function automatic logic [31:0] enc_bundle(alu_op_e aop, logic [3:0] rd, logic [3:0] ra,
                                             logic [3:0] rb, mac_op_e mop, logic [3:0] ma,
                                             logic [3:0] mb);
    return {1'b1, aop, rd, ra, rb, mop, ma, mb, 4'd0};
  endfunction

  function automatic logic [31:0] enc_i(op_e op, logic [3:0] rd, logic [3:0] ra,
                                        logic [15:0] imm);
    return {1'b0, op, rd, ra, 2'b00, imm};
  endfunction

  function automatic logic [31:0] enc_loop(logic [9:0] count, logic [15:0] last);
    return {1'b0, OP_LOOP, count, last};
  endfunction

  // Host configuration targets of a column.
  typedef enum logic [2:0] {
    CFG_IMEM    = 3'd0,   // addr = instruction address, wdata[31:0]
    CFG_SEGTBL  = 3'd1,   // addr = step, wdata = {seg_on, simd_rx, hb}
    CFG_SEGLEN  = 3'd2,   // wdata = schedule length (0 = full table)
    CFG_COMMTBL = 3'd3,   // tile cfg_pe, addr = step, wdata[1:0] = comm_act_e
    CFG_SRAM    = 3'd4    // tile cfg_pe, addr = line, wdata = line
  } cfg_sel_e;

  // Saturating Q15 read-out of a 40-bit accumulator.
  function automatic logic [DATA_W-1:0] sat_acc(logic signed [ACC_W-1:0] acc);
    logic signed [ACC_W-1:0] s;
    s = acc >>> 15;
    if (s > 40'sd32767)       return 16'h7fff;
    else if (s < -40'sd32768) return 16'h8000;
    else                      return s[DATA_W-1:0];
  endfunction

endpackage
