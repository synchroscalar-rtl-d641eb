// tb_aes128: AES-128 encryption on one default column, one 16-byte block per
// tile, all eight tiles running the same program on their own block and key
// (SIMD). Bytes are held one per 16-bit word.
//   SubBytes + ShiftRows: 16 table look-ups through a ShiftRows index table
//                         and the S-box table (state -> T);
//   MixColumns:           per column, with t = a0^a1^a2^a3,
//                         b_i = a_i ^ t ^ xtime(a_i ^ a_(i+1)), xtime from a
//                         256-entry table (T -> U);
//   AddRoundKey:          XOR with the round key held in the tile's SRAM.
// Rounds 1..9 form an outer loop closed by BNZ: tile 0 counts the rounds and
// sends the count to the SIMD controller over the bus each round; the final
// round (no MixColumns) follows the loop. The tables and the expanded keys are
// loaded by the host; the bench computes them itself: the S-box as the
// GF(2^8) inverse followed by the affine map, xtime as multiplication by x
// modulo x^8+x^4+x^3+x+1, and the standard key expansion.
// Tile 0 encrypts the FIPS-197 example block, whose ciphertext is compared
// with the published value; the other tiles encrypt random blocks under random
// keys, compared with a software AES in this bench. The exact cycle count is
// checked too.
module tb_aes128;
  import ss_pkg::*;
  localparam int S = 0, T = 16, U = 32, SR = 48, CNT = 64, RK = 128, SBOX = 512, XT = 768;
  logic clk = 0, rst_n = 0, start = 0, halted;
  logic cfg_we = 0, cfg_rd = 0; cfg_sel_e cfg_sel = CFG_IMEM; logic [2:0] cfg_pe = 0;
  logic [15:0] cfg_addr = 0; logic [127:0] cfg_wdata = 0, cfg_rdata;
  logic [127:0] hb_drv_data;
  logic hb_drv_en, obs_comm, obs_br_stall, obs_loop_back, obs_fwd, obs_hb_get, bus_conflict;
  logic [2:0] obs_seg_on;
  logic [31:0] prog [$];
  logic [7:0] sbox [256], xtime [256];
  logic [7:0] pt [8][16], key [8][16], rk [8][176], ct [8][16];
  logic [15:0] img [1024];
  int checks = 0, failures = 0, cyc = 0, stalls = 0, expected_cycles = 0;
  bit running = 0;

  ss_column dut (.clk, .rst_n, .en(1'b1), .start, .halted, .cfg_we, .cfg_rd, .cfg_sel, .cfg_pe,
                 .cfg_addr, .cfg_wdata, .cfg_rdata, .hb_val('0), .hb_drv_en, .hb_drv_data,
                 .obs_comm, .obs_seg_on, .obs_br_stall, .obs_loop_back, .obs_fwd, .obs_hb_get,
                 .bus_conflict);
  always #5 clk = ~clk;
  initial begin #3000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) if (running && !halted) begin
    cyc++;
    if (obs_br_stall) stalls++;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask
  task automatic cfg(cfg_sel_e s, int pe, int addr, logic [127:0] v);
    @(negedge clk); cfg_we = 1; cfg_sel = s; cfg_pe = 3'(pe); cfg_addr = 16'(addr); cfg_wdata = v;
    @(negedge clk); cfg_we = 0;
  endtask
  task automatic rd(int pe, int line, output logic [127:0] q);
    @(negedge clk); cfg_rd = 1; cfg_sel = CFG_SRAM; cfg_pe = 3'(pe); cfg_addr = 16'(line);
    @(negedge clk); cfg_rd = 0; q = cfg_rdata;
  endtask

  // ------------------------------------------------------------ reference AES
  function automatic logic [7:0] xt(logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction
  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = xt(a);
    end
    return p;
  endfunction
  task automatic make_tables();
    for (int a = 0; a < 256; a++) begin
      logic [7:0] inv, s;
      inv = 0;
      for (int b = 1; b < 256; b++) if (gmul(8'(a), 8'(b)) == 8'h01) inv = 8'(b);
      s = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]} ^ {inv[4:0], inv[7:5]} ^ {inv[3:0], inv[7:4]} ^ 8'h63;
      sbox[a] = s;
      xtime[a] = xt(8'(a));
    end
  endtask
  task automatic expand(int t);
    logic [7:0] rcon = 8'h01;
    for (int i = 0; i < 16; i++) rk[t][i] = key[t][i];
    for (int w = 4; w < 44; w++) begin
      logic [7:0] tmp [4];
      for (int j = 0; j < 4; j++) tmp[j] = rk[t][4*(w-1) + j];
      if (w % 4 == 0) begin
        logic [7:0] t0;
        t0 = tmp[0];
        tmp[0] = sbox[tmp[1]] ^ rcon; tmp[1] = sbox[tmp[2]]; tmp[2] = sbox[tmp[3]]; tmp[3] = sbox[t0];
        rcon = xt(rcon);
      end
      for (int j = 0; j < 4; j++) rk[t][4*w + j] = rk[t][4*(w-4) + j] ^ tmp[j];
    end
  endtask
  task automatic encrypt(int t);
    logic [7:0] s [16], n [16];
    for (int i = 0; i < 16; i++) s[i] = pt[t][i] ^ rk[t][i];
    for (int r = 1; r <= 10; r++) begin
      for (int c = 0; c < 4; c++)
        for (int row = 0; row < 4; row++) n[4*c + row] = sbox[s[4*((c + row) % 4) + row]];
      if (r < 10)
        for (int c = 0; c < 4; c++) begin
          logic [7:0] a [4];
          for (int row = 0; row < 4; row++) a[row] = n[4*c + row];
          for (int row = 0; row < 4; row++)
            n[4*c + row] = gmul(a[row], 8'h02) ^ gmul(a[(row+1)%4], 8'h03) ^ a[(row+2)%4] ^ a[(row+3)%4];
        end
      for (int i = 0; i < 16; i++) s[i] = n[i] ^ rk[t][16*r + i];
    end
    for (int i = 0; i < 16; i++) ct[t][i] = s[i];
  endtask

  // ---------------------------------------------------------------- program
  int dyn = 0, mult = 1;   // decoded instructions, scaled by how often a part runs
  function automatic void emit(logic [31:0] w); prog.push_back(w); dyn += mult; endfunction
  task automatic loop_head(int count, int body);
    emit(enc_loop(10'(count), 16'(prog.size() + body)));
    dyn += mult * (count - 1) * body;
  endtask
  function automatic logic [31:0] b_alu(alu_op_e op, int rd, int ra, int rb);
    return enc_bundle(op, 4'(rd), 4'(ra), 4'(rb), MAC_NOP, 0, 0);
  endfunction
  task automatic sub_shift();
    emit(enc_i(OP_LI, 1, 0, 0));
    loop_head(16, 5);
    emit(enc_i(OP_LD, 2, 1, 16'(SR)));
    emit(enc_i(OP_LD, 3, 2, 16'(S)));
    emit(enc_i(OP_LD, 4, 3, 16'(SBOX)));
    emit(enc_i(OP_ST, 4, 1, 16'(T)));
    emit(b_alu(ALU_ADD, 1, 1, 15));
  endtask
  task automatic mix();
    emit(enc_i(OP_LI, 1, 0, 0));
    loop_head(4, 28);
    for (int j = 0; j < 4; j++) emit(enc_i(OP_LD, 4'(2 + j), 1, 16'(T + j)));
    emit(b_alu(ALU_XOR, 6, 2, 3));
    emit(b_alu(ALU_XOR, 7, 4, 5));
    emit(b_alu(ALU_XOR, 6, 6, 7));
    for (int j = 0; j < 4; j++) begin
      emit(b_alu(ALU_XOR, 7, 2 + j, 2 + (j + 1) % 4));
      emit(enc_i(OP_LD, 7, 7, 16'(XT)));
      emit(b_alu(ALU_XOR, 7, 7, 6));
      emit(b_alu(ALU_XOR, 7, 7, 2 + j));
      emit(enc_i(OP_ST, 7, 1, 16'(U + j)));
    end
    emit(enc_i(OP_ADDI, 1, 1, 4));
  endtask
  task automatic add_key(int src);
    emit(enc_i(OP_LI, 1, 0, 0));
    emit(b_alu(ALU_MOV, 5, 14, 0));
    loop_head(16, 6);
    emit(enc_i(OP_LD, 2, 1, 16'(src)));
    emit(enc_i(OP_LD, 3, 5, 0));
    emit(b_alu(ALU_XOR, 2, 2, 3));
    emit(enc_i(OP_ST, 2, 1, 16'(S)));
    emit(b_alu(ALU_ADD, 1, 1, 15));
    emit(b_alu(ALU_ADD, 5, 5, 15));
    emit(enc_i(OP_ADDI, 14, 14, 16));
  endtask
  task automatic build();
    int top;
    emit(enc_i(OP_LI, 0, 0, 0));
    emit(enc_i(OP_LI, 15, 0, 1));
    emit(enc_i(OP_LI, 14, 0, 16'(RK)));
    emit(enc_i(OP_LI, 12, 0, 9));
    add_key(S);
    top = prog.size();
    mult = 9;
    sub_shift();
    mix();
    add_key(U);
    emit(enc_i(OP_ADDI, 12, 12, 16'hffff));
    emit(enc_i(OP_ST, 12, 0, 16'(CNT)));
    emit(enc_i(OP_LI, 1, 0, 16'(CNT / 8)));
    emit(enc_i(OP_LDTX, 0, 1, 0));
    emit(enc_i(OP_COMM, 0, 0, 0));
    emit(enc_i(OP_BNZ, 0, 0, 16'(top)));
    mult = 1;
    sub_shift();
    add_key(T);
    emit(enc_i(OP_HALT, 0, 0, 0));
    expected_cycles = 1 + dyn + 9;   // one stall per conditional branch
  endtask

  initial begin
    logic [127:0] q, v;
    make_tables();
    chk(sbox[8'h00] == 8'h63 && sbox[8'h53] == 8'hed && sbox[8'hff] == 8'h16, "S-box spot values");
    for (int t = 0; t < 8; t++)
      for (int i = 0; i < 16; i++) begin
        pt[t][i] = (t == 0) ? 8'(17 * i) : 8'($urandom);
        key[t][i] = (t == 0) ? 8'(i) : 8'($urandom);
      end
    for (int t = 0; t < 8; t++) begin expand(t); encrypt(t); end
    chk({ct[0][0], ct[0][1], ct[0][2], ct[0][3], ct[0][4], ct[0][5], ct[0][6], ct[0][7],
         ct[0][8], ct[0][9], ct[0][10], ct[0][11], ct[0][12], ct[0][13], ct[0][14], ct[0][15]}
        == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "reference model against FIPS-197 example");
    build();
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (prog[i]) cfg(CFG_IMEM, 0, i, 128'(prog[i]));
    cfg(CFG_SEGTBL, 0, 0, 128'({3'b000, 1'b1, HB_NONE}));
    cfg(CFG_SEGLEN, 0, 0, 128'd1);
    for (int t = 0; t < 8; t++) begin
      cfg(CFG_COMMTBL, t, 0, 128'(t == 0 ? C_SEND : C_IDLE));
      for (int a = 0; a < 1024; a++) img[a] = '0;
      for (int i = 0; i < 16; i++) img[S + i] = 16'(pt[t][i]);
      for (int c = 0; c < 4; c++)
        for (int row = 0; row < 4; row++) img[SR + 4*c + row] = 16'(4*((c + row) % 4) + row);
      for (int i = 0; i < 176; i++) img[RK + i] = 16'(rk[t][i]);
      for (int a = 0; a < 256; a++) begin img[SBOX + a] = 16'(sbox[a]); img[XT + a] = 16'(xtime[a]); end
      for (int l = 0; l < 128; l++) begin
        for (int w = 0; w < 8; w++) v[w*16 +: 16] = img[8*l + w];
        cfg(CFG_SRAM, t, l, v);
      end
    end
    @(negedge clk); start = 1; @(negedge clk); start = 0; running = 1;
    while (!halted) @(negedge clk);
    running = 0;
    for (int t = 0; t < 8; t++)
      for (int l = 0; l < 2; l++) begin
        rd(t, (S / 8) + l, q);
        for (int w = 0; w < 8; w++)
          chk(q[w*16 +: 16] == 16'(ct[t][8*l + w]), $sformatf("tile %0d byte %0d", t, 8*l + w));
      end
    chk(cyc == expected_cycles, $sformatf("cycles %0d exp %0d", cyc, expected_cycles));
    chk(stalls == 9, "one branch stall per round loop");
    $display("AES-128: 8 blocks in %0d cycles, %0d instructions", cyc, prog.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
