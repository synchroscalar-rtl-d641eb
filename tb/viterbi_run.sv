// viterbi_run: the add-compare-select part of a K=7, rate-1/2 Viterbi decoder
// (generators 133 and 171 octal, 64 states) on one ss_column of ROWS x 2
// tiles, reporting its own check counts (used by tb_viterbi for every column
// size). With NPE = 2*ROWS tiles, tile t owns the SPT = 64/NPE new states
// SPT*t .. SPT*t+SPT-1. Every trellis step:
//   1. each tile computes the four branch metrics |r0 - e0| + |r1 - e1| of the
//      received soft pair (a 4-iteration zero-overhead loop);
//   2. each tile runs add-compare-select for its SPT states, reading the old
//      metrics from its full copy of the metric vector through per-tile
//      address tables, writing its new metrics to its own lines and the
//      decisions (m1 - m0, sign = survivor) to its decision area;
//   3. the new metrics are exchanged: a tile's metrics fill LPT = ceil(SPT/8)
//      lines, and in schedule step j tile j/LPT broadcasts its line j%LPT
//      (send-and-receive) while every tile stores the bus as line j. The copy
//      of state s then sits at line (s/SPT)*LPT + (s%SPT)/8, word (s%SPT)%8;
//   4. tile 0 counts down the steps and sends the count to the SIMD
//      controller over the bus; BNZ closes the outer loop.
// Checks every decision word and the final metrics of every tile against a
// reference decoder written here, traces back from the hardware's decisions
// and compares the decoded bits with the transmitted ones, and checks the
// exact cycle count.
module viterbi_run
  import ss_pkg::*;
#(
  parameter int ROWS = 4
) (
  input  logic clk,
  input  logic go,
  output logic done,
  output int   checks,
  output int   failures,
  output int   cycles
);
  localparam int NPE = 2 * ROWS;
  localparam int NB  = (ROWS > 1) ? ROWS - 1 : 1;
  localparam int PW  = $clog2(NPE);
  localparam int SPT = 64 / NPE, LPT = (SPT + 7) / 8, NX = NPE * LPT;
  localparam int NSTEPS = 24, A = 64;
  localparam int NEWPM = 128, BM = 160, E0T = 168, E1T = 172, CNT = 176,
                 P0T = 192, P1T = 224, O0T = 256, O1T = 288, RX = 320, DEC = 512;
  logic rst_n = 0, start = 0, halted;
  logic cfg_we = 0, cfg_rd = 0; cfg_sel_e cfg_sel = CFG_IMEM; logic [PW-1:0] cfg_pe = 0;
  logic [15:0] cfg_addr = 0; logic [127:0] cfg_wdata = 0, cfg_rdata;
  logic [127:0] hb_drv_data;
  logic hb_drv_en, obs_comm, obs_br_stall, obs_loop_back, obs_fwd, obs_hb_get, bus_conflict;
  logic [NB-1:0] obs_seg_on;
  logic [31:0] prog [$];
  logic [15:0] rx [NSTEPS][2];
  logic [15:0] pm [64], ref_dec [NSTEPS][64];
  logic [15:0] img [512];
  bit bits [NSTEPS];
  int cyc = 0, stalls = 0, bcast = 0, conflicts = 0;
  int expected_cycles, dyn = 0, mult = 1;
  bit running = 0;

  ss_column #(.ROWS(ROWS)) dut (
    .clk, .rst_n, .en(1'b1), .start, .halted, .cfg_we, .cfg_rd, .cfg_sel, .cfg_pe,
    .cfg_addr, .cfg_wdata, .cfg_rdata, .hb_val('0), .hb_drv_en, .hb_drv_data,
    .obs_comm, .obs_seg_on, .obs_br_stall, .obs_loop_back, .obs_fwd, .obs_hb_get, .bus_conflict);

  always @(posedge clk) if (running && !halted) begin
    cyc++;
    if (obs_br_stall) stalls++;
    if (obs_comm && obs_seg_on == '0) bcast++;
    if (bus_conflict) conflicts++;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL Viterbi ROWS=%0d: %s", ROWS, what); end
  endtask
  task automatic cfg(cfg_sel_e s, int pe, int addr, logic [127:0] v);
    @(negedge clk); cfg_we = 1; cfg_sel = s; cfg_pe = PW'(pe); cfg_addr = 16'(addr); cfg_wdata = v;
    @(negedge clk); cfg_we = 0;
  endtask
  task automatic rd(int pe, int line, output logic [127:0] q);
    @(negedge clk); cfg_rd = 1; cfg_sel = CFG_SRAM; cfg_pe = PW'(pe); cfg_addr = 16'(line);
    @(negedge clk); cfg_rd = 0; q = cfg_rdata;
  endtask

  // encoder outputs for old state s (6 bits, newest input in bit 0) and input b
  function automatic int sym(int s, int b);
    logic [6:0] r; int g0, g1;
    r = {s[5:0], b[0]};
    g0 = ^(r & 7'o133); g1 = ^(r & 7'o171);
    return 2 * g0 + g1;
  endfunction
  function automatic logic [15:0] e_of(int g);
    return g ? 16'(A) : 16'(-A);
  endfunction
  function automatic logic [15:0] abs16(logic [15:0] v);
    return v[15] ? -v : v;
  endfunction
  // word address of state s in the gathered copy of the metrics
  function automatic int pm_addr(int s);
    return 8 * ((s / SPT) * LPT + (s % SPT) / 8) + (s % SPT) % 8;
  endfunction

  function automatic void emit(logic [31:0] w); prog.push_back(w); dyn += mult; endfunction
  task automatic loop_head(int count, int body);
    emit(enc_loop(10'(count), 16'(prog.size() + body)));
    dyn += mult * (count - 1) * body;
  endtask
  function automatic logic [31:0] b_alu(alu_op_e op, int rd, int ra, int rb);
    return enc_bundle(op, 4'(rd), 4'(ra), 4'(rb), MAC_NOP, 0, 0);
  endfunction

  task automatic build();
    int top;
    emit(enc_i(OP_LI, 0, 0, 0));
    emit(enc_i(OP_LI, 15, 0, 1));
    emit(enc_i(OP_LI, 14, 0, 16'(DEC)));
    emit(enc_i(OP_LI, 13, 0, 16'(RX)));
    emit(enc_i(OP_LI, 12, 0, 16'(NSTEPS)));
    emit(enc_i(OP_LI, 8, 0, 16'(LPT - 1)));
    top = prog.size();
    mult = NSTEPS;
    // 1. branch metrics
    emit(enc_i(OP_LD, 9, 13, 0));
    emit(enc_i(OP_LD, 10, 13, 1));
    emit(enc_i(OP_LI, 1, 0, 0));
    loop_head(4, 9);
    emit(enc_i(OP_LD, 5, 1, 16'(E0T)));
    emit(enc_i(OP_LD, 6, 1, 16'(E1T)));
    emit(b_alu(ALU_SUB, 5, 9, 5));
    emit(b_alu(ALU_SUB, 6, 10, 6));
    emit(b_alu(ALU_ABS, 5, 5, 0));
    emit(b_alu(ALU_ABS, 6, 6, 0));
    emit(b_alu(ALU_ADD, 5, 5, 6));
    emit(enc_i(OP_ST, 5, 1, 16'(BM)));
    emit(b_alu(ALU_ADD, 1, 1, 15));
    // 2. add-compare-select over this tile's states
    emit(enc_i(OP_LI, 1, 0, 0));
    emit(b_alu(ALU_MOV, 4, 14, 0));
    loop_head(SPT, 16);
    emit(enc_i(OP_LD, 5, 1, 16'(P0T)));                 // address of pm[p0]
    emit(enc_i(OP_LD, 7, 1, 16'(P1T)));                 // address of pm[p1]
    emit(enc_i(OP_LD, 2, 1, 16'(O0T)));                 // o0
    emit(enc_i(OP_LD, 3, 1, 16'(O1T)));                 // o1
    emit(enc_i(OP_LD, 9, 5, 0));
    emit(enc_i(OP_LD, 10, 7, 0));
    emit(enc_i(OP_LD, 11, 2, 16'(BM)));
    emit(enc_i(OP_LD, 6, 3, 16'(BM)));
    emit(b_alu(ALU_ADD, 9, 9, 11));
    emit(b_alu(ALU_ADD, 10, 10, 6));
    emit(b_alu(ALU_MIN, 11, 10, 9));
    emit(enc_i(OP_ST, 11, 1, 16'(NEWPM)));
    emit(enc_bundle(ALU_SUB, 6, 10, 9, MAC_NOP, 0, 0));
    emit(enc_i(OP_ST, 6, 4, 0));
    emit(enc_bundle(ALU_ADD, 1, 1, 15, MAC_NOP, 0, 0));
    emit(enc_bundle(ALU_ADD, 4, 4, 15, MAC_NOP, 0, 0));
    // 3. metric exchange: step j sends line j%LPT of tile j/LPT, stored as line j
    emit(enc_i(OP_LI, 2, 0, 0));
    loop_head(NX, 5);
    emit(b_alu(ALU_AND, 3, 2, 8));
    emit(enc_i(OP_LDTX, 0, 3, 16'(NEWPM / 8)));
    emit(enc_i(OP_COMM, 0, 0, 0));
    emit(enc_i(OP_STRX, 0, 2, 0));
    emit(b_alu(ALU_ADD, 2, 2, 15));
    // 4. step bookkeeping and outer loop through the bus
    emit(enc_i(OP_ADDI, 13, 13, 2));
    emit(enc_i(OP_ADDI, 14, 14, 16'(SPT)));
    emit(enc_i(OP_ADDI, 12, 12, 16'hffff));
    emit(enc_i(OP_ST, 12, 0, 16'(CNT)));
    emit(enc_i(OP_LI, 1, 0, 16'(CNT / 8)));
    emit(enc_i(OP_LDTX, 0, 1, 0));
    emit(enc_i(OP_COMM, 0, 0, 0));
    emit(enc_i(OP_BNZ, 0, 0, 16'(top)));
    mult = 1;
    emit(enc_i(OP_HALT, 0, 0, 0));
    expected_cycles = 1 + dyn + NSTEPS;   // one stall per conditional branch
  endtask

  initial begin
    logic [127:0] q, v; int best, s;
    logic [15:0] npm [64];
    checks = 0; failures = 0; done = 0; cycles = 0;
    // transmitted bits and received soft values
    s = 0;
    for (int k = 0; k < NSTEPS; k++) begin
      int o;
      bits[k] = $urandom % 2;
      o = sym(s, bits[k]);
      rx[k][0] = e_of(o / 2) + 16'($signed(5'($urandom)));
      rx[k][1] = e_of(o % 2) + 16'($signed(5'($urandom)));
      s = ((s << 1) | bits[k]) & 63;
    end
    // reference add-compare-select (ties keep the path from p0)
    for (int i = 0; i < 64; i++) pm[i] = (i == 0) ? 16'd0 : 16'd1000;
    for (int k = 0; k < NSTEPS; k++) begin
      logic [15:0] bm [4];
      for (int o = 0; o < 4; o++) bm[o] = abs16(rx[k][0] - e_of(o / 2)) + abs16(rx[k][1] - e_of(o % 2));
      for (int n = 0; n < 64; n++) begin
        logic [15:0] m0, m1; int p0;
        p0 = n >> 1;
        m0 = pm[p0] + bm[sym(p0, n & 1)];
        m1 = pm[p0 + 32] + bm[sym(p0 + 32, n & 1)];
        npm[n] = ($signed(m1) < $signed(m0)) ? m1 : m0;
        ref_dec[k][n] = m1 - m0;
      end
      pm = npm;
    end
    build();
    wait (go);
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (prog[i]) cfg(CFG_IMEM, 0, i, 128'(prog[i]));
    for (int j = 0; j < NX; j++) cfg(CFG_SEGTBL, 0, j, 128'({{NB{1'b0}}, 1'b0, HB_NONE}));
    cfg(CFG_SEGTBL, 0, NX, 128'({{NB{1'b0}}, 1'b1, HB_NONE}));
    cfg(CFG_SEGLEN, 0, 0, 128'(NX + 1));
    for (int p = 0; p < NPE; p++) begin
      for (int j = 0; j < NX; j++) cfg(CFG_COMMTBL, p, j, 128'(j / LPT == p ? C_BOTH : C_RECV));
      cfg(CFG_COMMTBL, p, NX, 128'(p == 0 ? C_SEND : C_IDLE));
      for (int a = 0; a < 512; a++) img[a] = '0;
      for (int st = 0; st < 64; st++) img[pm_addr(st)] = (st == 0) ? 16'd0 : 16'd1000;
      for (int i = 0; i < SPT; i++) begin
        int n; n = SPT * p + i;
        img[P0T + i] = 16'(pm_addr(n >> 1));
        img[P1T + i] = 16'(pm_addr((n >> 1) + 32));
        img[O0T + i] = 16'(sym(n >> 1, n & 1));
        img[O1T + i] = 16'(sym((n >> 1) + 32, n & 1));
      end
      for (int o = 0; o < 4; o++) begin img[E0T + o] = e_of(o / 2); img[E1T + o] = e_of(o % 2); end
      for (int k = 0; k < NSTEPS; k++) begin img[RX + 2*k] = rx[k][0]; img[RX + 2*k + 1] = rx[k][1]; end
      for (int l = 0; l < 64; l++) begin
        for (int w = 0; w < 8; w++) v[w*16 +: 16] = img[8*l + w];
        cfg(CFG_SRAM, p, l, v);
      end
    end
    @(negedge clk); start = 1; @(negedge clk); start = 0; running = 1;
    while (!halted) @(negedge clk);
    running = 0;
    // decisions: tile p, step k, state SPT*p+i at word DEC + SPT*k + i
    for (int p = 0; p < NPE; p++)
      for (int k = 0; k < NSTEPS; k++)
        for (int i = 0; i < SPT; i++) begin
          int a; a = DEC + SPT * k + i;
          if (i == 0 || a % 8 == 0) rd(p, a / 8, q);
          chk(q[(a % 8)*16 +: 16] == ref_dec[k][SPT*p + i], $sformatf("decision step %0d state %0d: %h exp %h", k, SPT*p + i, q[(a % 8)*16 +: 16], ref_dec[k][SPT*p + i]));
        end
    // final metrics, in every tile's gathered copy
    for (int p = 0; p < NPE; p++)
      for (int st = 0; st < 64; st++) begin
        if (st == 0 || pm_addr(st) % 8 == 0) rd(p, pm_addr(st) / 8, q);
        chk(q[(pm_addr(st) % 8)*16 +: 16] == pm[st], $sformatf("tile %0d metric %0d", p, st));
      end
    best = 0;
    for (int n = 1; n < 64; n++) if ($signed(pm[n]) < $signed(pm[best])) best = n;
    // traceback from the hardware's decisions
    s = best;
    for (int k = NSTEPS - 1; k >= 0; k--) begin
      logic [15:0] d; int a;
      a = DEC + SPT * k + s % SPT;
      rd(s / SPT, a / 8, q);
      d = q[(a % 8)*16 +: 16];
      chk((s & 1) == bits[k], $sformatf("decoded bit %0d", k));
      s = (s >> 1) + (d[15] ? 32 : 0);
    end
    chk(cyc == expected_cycles, $sformatf("cycles %0d exp %0d", cyc, expected_cycles));
    chk(stalls == NSTEPS, "one branch stall per trellis step");
    chk(bcast == NSTEPS * (NX + 1), "broadcast steps");
    chk(conflicts == 0, "no bus conflicts");
    cycles = cyc;
    $display("Viterbi K=7 on %0dx2 tiles (%0d states per tile): %0d trellis steps in %0d cycles (%0d per bit)",
             ROWS, SPT, NSTEPS, cyc, cyc / NSTEPS);
    done = 1;
  end
endmodule
