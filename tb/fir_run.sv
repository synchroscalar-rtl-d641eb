// fir_run: a 128-tap FIR filter on one ss_column of ROWS x 2 tiles, reporting
// its own check counts (used by tb_fir128 for every column size).
// With NPE = 2*ROWS tiles, tile t holds TPT = 128/NPE taps. For every output n
// each tile forms its partial sum
//   p_t(n) = sat16((sum_k h[TPT*t+k] * x[n-TPT*t-k]) >>> 15)
// in a TPT-iteration zero-overhead loop. Then a tree reduction of
// LV = log2(NPE) bus steps puts the full sum into tile 0. In level d tile p
// with p mod 2^(d+1) = 2^d sends its running sum to tile p - 2^d. Tile p sits
// on segment p/2, so a level-d pair spans 2^d segments, and segmenter k is on
// exactly when (k+1) mod 2^d = 0: level 0 keeps every segment separate (ROWS
// messages at once), and the last level joins the whole bus.
// With SEG = 0 the segmenters are never used: every message of a level gets
// its own bus step on the joined bus (NPE-1 steps instead of LV), one COMM
// per step; each receiver still gets exactly one message per level, so it
// stores its receive buffer once after the level's last step.
// The program is unrolled over the outputs because the controller has one
// loop level. Checks every output against a reference computed here with the
// same Q15 partial-sum arithmetic, the number of bus steps, and the exact
// cycle count.
module fir_run
  import ss_pkg::*;
#(
  parameter int ROWS = 4,
  parameter bit SEG  = 1'b1
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
  localparam int TAPS = 128, TPT = TAPS / NPE, LV = $clog2(NPE);
  localparam int NSTEP = SEG ? LV : NPE - 1;
  localparam int NOUT = 7, XBASE = 0, HBASE = 512, PLINE = 100, OUTW = 1000;
  logic rst_n = 0, start = 0, halted;
  logic cfg_we = 0, cfg_rd = 0; cfg_sel_e cfg_sel = CFG_IMEM; logic [PW-1:0] cfg_pe = 0;
  logic [15:0] cfg_addr = 0; logic [127:0] cfg_wdata = 0, cfg_rdata;
  logic [127:0] hb_drv_data;
  logic hb_drv_en, obs_comm, obs_br_stall, obs_loop_back, obs_fwd, obs_hb_get, bus_conflict;
  logic [NB-1:0] obs_seg_on;
  logic [31:0] prog [$];
  logic signed [15:0] x [NOUT], h [TAPS];
  logic [15:0] yref [NOUT];
  int cyc = 0, loops = 0, steps = 0, conflicts = 0;
  bit running = 0;

  ss_column #(.ROWS(ROWS), .IMEM_DEPTH(512)) dut (
    .clk, .rst_n, .en(1'b1), .start, .halted, .cfg_we, .cfg_rd, .cfg_sel, .cfg_pe,
    .cfg_addr, .cfg_wdata, .cfg_rdata, .hb_val('0), .hb_drv_en, .hb_drv_data,
    .obs_comm, .obs_seg_on, .obs_br_stall, .obs_loop_back, .obs_fwd, .obs_hb_get, .bus_conflict);

  always @(posedge clk) if (running && !halted) begin
    cyc++;
    if (obs_loop_back) loops++;
    if (obs_comm) steps++;
    if (bus_conflict) conflicts++;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL FIR ROWS=%0d: %s", ROWS, what); end
  endtask
  task automatic cfg(cfg_sel_e s, int pe, int addr, logic [127:0] v);
    @(negedge clk); cfg_we = 1; cfg_sel = s; cfg_pe = PW'(pe); cfg_addr = 16'(addr); cfg_wdata = v;
    @(negedge clk); cfg_we = 0;
  endtask
  task automatic rd(int pe, int line, output logic [127:0] q);
    @(negedge clk); cfg_rd = 1; cfg_sel = CFG_SRAM; cfg_pe = PW'(pe); cfg_addr = 16'(line);
    @(negedge clk); cfg_rd = 0; q = cfg_rdata;
  endtask

  function automatic logic signed [15:0] xs(int i);
    return (i < 0 || i >= NOUT) ? 16'sd0 : x[i];
  endfunction

  // partial sum of tile t for output n
  function automatic logic [15:0] part(int t, int n);
    logic signed [39:0] acc = 0;
    for (int k = 0; k < TPT; k++) acc = acc + 40'(h[TPT*t+k] * xs(n - TPT*t - k));
    return sat_acc(acc);
  endfunction

  task automatic reduce_step(int d, bit last);
    prog.push_back(enc_i(OP_LDTX, 0, 6, 0));
    repeat (SEG ? 1 : NPE >> (d + 1)) prog.push_back(enc_i(OP_COMM, 0, 0, 0));
    prog.push_back(enc_i(OP_STRX, 0, 6, 1));
    prog.push_back(enc_i(OP_LD, 7, 0, 16'(PLINE*8 + 8)));
    prog.push_back(enc_bundle(ALU_ADD, 5, 5, 7, MAC_NOP, 0, 0));
    if (!last) prog.push_back(enc_i(OP_ST, 5, 0, 16'(PLINE*8)));
  endtask

  initial begin
    logic [127:0] q, v; int decoded;
    checks = 0; failures = 0; done = 0; cycles = 0;
    for (int i = 0; i < NOUT; i++) x[i] = 16'($signed(12'($urandom)));
    for (int k = 0; k < TAPS; k++) h[k] = 16'($signed(12'($urandom)));
    for (int n = 0; n < NOUT; n++) begin
      yref[n] = 0;
      for (int t = 0; t < NPE; t++) yref[n] = yref[n] + part(t, n);
    end
    // program
    prog.push_back(enc_i(OP_LI, 0, 0, 0));
    prog.push_back(enc_i(OP_LI, 15, 0, 1));
    prog.push_back(enc_i(OP_LI, 6, 0, 16'(PLINE)));
    for (int n = 0; n < NOUT; n++) begin
      prog.push_back(enc_i(OP_LI, 1, 0, 16'(XBASE + n + TPT - 1)));
      prog.push_back(enc_i(OP_LI, 2, 0, 16'(HBASE)));
      prog.push_back(enc_bundle(ALU_NOP, 0, 0, 0, MAC_CLR, 0, 0));
      prog.push_back(enc_loop(10'(TPT), 16'(prog.size() + 4)));
      prog.push_back(enc_i(OP_LD, 3, 1, 0));
      prog.push_back(enc_i(OP_LD, 4, 2, 0));
      prog.push_back(enc_bundle(ALU_SUB, 1, 1, 15, MAC_MAC, 3, 4));
      prog.push_back(enc_i(OP_ADDI, 2, 2, 1));
      prog.push_back(enc_bundle(ALU_RDACC, 5, 0, 0, MAC_NOP, 0, 0));
      prog.push_back(enc_i(OP_ST, 5, 0, 16'(PLINE*8)));
      for (int d = 0; d < LV; d++) reduce_step(d, d == LV - 1);
      prog.push_back(enc_i(OP_ST, 5, 0, 16'(OUTW + n)));
    end
    prog.push_back(enc_i(OP_HALT, 0, 0, 0));
    chk(prog.size() <= 512, "program fits the instruction memory");
    // decoded instructions: the loop body of 4 runs TPT times
    decoded = prog.size() + NOUT * (TPT - 1) * 4;
    wait (go);
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (prog[i]) cfg(CFG_IMEM, 0, i, 128'(prog[i]));
    if (SEG) begin
      for (int d = 0; d < LV; d++) begin
        logic [NB-1:0] son;
        for (int k = 0; k < NB; k++) son[k] = ((k + 1) % (1 << d)) == 0;
        cfg(CFG_SEGTBL, 0, d, 128'({son, 1'b0, HB_NONE}));
      end
    end else begin
      for (int j = 0; j < NSTEP; j++) cfg(CFG_SEGTBL, 0, j, 128'({{NB{1'b0}}, 1'b0, HB_NONE}));
    end
    cfg(CFG_SEGLEN, 0, 0, 128'(NSTEP));
    for (int p = 0; p < NPE; p++) begin
      if (SEG) begin
        for (int d = 0; d < LV; d++)
          cfg(CFG_COMMTBL, p, d, 128'((p % (2 << d)) == (1 << d) ? C_SEND :
                                      (p % (2 << d)) == 0        ? C_RECV : C_IDLE));
      end else begin
        // level d, message m: sender (2m+1)*2^d, receiver 2m*2^d
        int j;
        j = 0;
        for (int d = 0; d < LV; d++)
          for (int m = 0; m < (NPE >> (d + 1)); m++) begin
            cfg(CFG_COMMTBL, p, j, 128'(p == (2*m + 1) << d ? C_SEND : p == (2*m) << d ? C_RECV : C_IDLE));
            j++;
          end
      end
      // samples: word j holds x[j - TPT*p - (TPT-1)]; taps: word HBASE+k holds h[TPT*p+k]
      for (int l = 0; l < (NOUT + TPT + 6) / 8; l++) begin
        for (int w = 0; w < 8; w++) v[w*16 +: 16] = xs(l*8 + w - TPT*p - (TPT - 1));
        cfg(CFG_SRAM, p, XBASE/8 + l, v);
      end
      for (int l = 0; l < (TPT + 7) / 8; l++) begin
        for (int w = 0; w < 8; w++) v[w*16 +: 16] = (l*8 + w < TPT) ? h[TPT*p + l*8 + w] : 16'sd0;
        cfg(CFG_SRAM, p, HBASE/8 + l, v);
      end
      cfg(CFG_SRAM, p, PLINE, '0);
      cfg(CFG_SRAM, p, PLINE + 1, '0);
    end
    @(negedge clk); start = 1; @(negedge clk); start = 0; running = 1;
    while (!halted) @(negedge clk);
    running = 0;
    rd(0, OUTW/8, q);
    for (int n = 0; n < NOUT; n++) begin
      if ((OUTW + n) % 8 == 0 && n > 0) rd(0, (OUTW + n)/8, q);
      chk(q[((OUTW + n) % 8)*16 +: 16] == yref[n], $sformatf("y[%0d] = %h exp %h", n, q[((OUTW + n) % 8)*16 +: 16], yref[n]));
    end
    chk(cyc == 1 + decoded, $sformatf("cycles %0d exp %0d", cyc, 1 + decoded));
    chk(loops == NOUT * (TPT - 1), "zero-overhead loop-backs");
    chk(steps == NOUT * NSTEP, "reduction bus steps");
    chk(conflicts == 0, "no bus conflict");
    cycles = cyc;
    $display("FIR128 on %0dx2 tiles (%0d taps per tile), %s bus: %0d outputs in %0d cycles, %0d bus steps per output",
             ROWS, TPT, SEG ? "segmented" : "unsegmented", NOUT, cyc, NSTEP);
    done = 1;
  end
endmodule
