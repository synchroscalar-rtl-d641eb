// tile_cfg_run: runs a small kernel on one ss_column of ROWS x 2 tiles and
// reports its own check counts (used by tb_tile_configs for every column
// size). Kernel: an 8-tap dot product per tile in a zero-overhead loop, then
//   step 0  all segmenters on: ROWS messages at once, tile 2s -> tile 2s+1
//           inside every segment s
//   step 1  all segmenters off: the last tile broadcasts to every other tile
//           and to the SIMD controller, which branches over a marker store.
// Checks the results, the transfers, the branch and the exact cycle count.
// The data are word-addressed, so the same kernel runs at any bus width
// BUS_W (a line is BUS_W/16 words); used by tb_bus_widths for that sweep.
// The transmit/receive lines are 32..35, the result is word 0 of line 32.
module tile_cfg_run
  import ss_pkg::*;
#(
  parameter int ROWS  = 4,
  parameter int BUS_W = 128
) (
  input  logic clk,
  input  logic go,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int NPE = 2 * ROWS;
  localparam int NB  = (ROWS > 1) ? ROWS - 1 : 1;
  localparam int PW  = $clog2(NPE);
  localparam int LANES = BUS_W / 16;
  logic rst_n = 0, start = 0, halted;
  logic cfg_we = 0, cfg_rd = 0; cfg_sel_e cfg_sel = CFG_IMEM; logic [PW-1:0] cfg_pe = 0;
  logic [15:0] cfg_addr = 0; logic [BUS_W-1:0] cfg_wdata = 0, cfg_rdata;
  logic [BUS_W-1:0] hb_drv_data;
  logic hb_drv_en, obs_comm, obs_br_stall, obs_loop_back, obs_fwd, obs_hb_get, bus_conflict;
  logic [NB-1:0] obs_seg_on;
  logic [31:0] prog [$];
  logic [15:0] y [NPE];
  int cyc = 0, par = 0, conflicts = 0;
  bit running = 0;

  logic [15:0] img [16];
  ss_column #(.ROWS(ROWS), .BUS_W(BUS_W)) dut (
    .clk, .rst_n, .en(1'b1), .start, .halted, .cfg_we, .cfg_rd, .cfg_sel, .cfg_pe,
    .cfg_addr, .cfg_wdata, .cfg_rdata, .hb_val('0), .hb_drv_en, .hb_drv_data,
    .obs_comm, .obs_seg_on, .obs_br_stall, .obs_loop_back, .obs_fwd, .obs_hb_get, .bus_conflict);

  always @(posedge clk) if (running && !halted) begin
    cyc++;
    if (obs_comm && obs_seg_on == '1) par++;
    if (bus_conflict) conflicts++;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL ROWS=%0d BUS_W=%0d: %s", ROWS, BUS_W, what); end
  endtask
  task automatic cfg(cfg_sel_e s, int pe, int addr, logic [BUS_W-1:0] v);
    @(negedge clk); cfg_we = 1; cfg_sel = s; cfg_pe = PW'(pe); cfg_addr = 16'(addr); cfg_wdata = v;
    @(negedge clk); cfg_we = 0;
  endtask
  task automatic rd(int pe, int line, output logic [BUS_W-1:0] q);
    @(negedge clk); cfg_rd = 1; cfg_sel = CFG_SRAM; cfg_pe = PW'(pe); cfg_addr = 16'(line);
    @(negedge clk); cfg_rd = 0; q = cfg_rdata;
  endtask

  initial begin
    logic [BUS_W-1:0] q, v; int target;
    checks = 0; failures = 0; done = 0;
    prog = '{enc_i(OP_LI, 0, 0, 0), enc_i(OP_LI, 1, 0, 0), enc_i(OP_LI, 2, 0, 8),
             enc_i(OP_LI, 15, 0, 1), enc_bundle(ALU_NOP, 0, 0, 0, MAC_CLR, 0, 0),
             enc_loop(8, 9), enc_i(OP_LD, 3, 1, 0), enc_i(OP_LD, 4, 2, 0),
             enc_bundle(ALU_ADD, 1, 1, 15, MAC_MAC, 3, 4), enc_i(OP_ADDI, 2, 2, 1),
             enc_bundle(ALU_RDACC, 5, 0, 0, MAC_NOP, 0, 0), enc_i(OP_ST, 5, 0, 16'(32 * LANES)),
             enc_i(OP_LI, 6, 0, 32), enc_i(OP_LDTX, 0, 6, 0), enc_i(OP_COMM, 0, 0, 0),
             enc_i(OP_LI, 7, 0, 33), enc_i(OP_STRX, 0, 7, 0), enc_i(OP_COMM, 0, 0, 0),
             enc_i(OP_LI, 8, 0, 34), enc_i(OP_STRX, 0, 8, 0), enc_i(OP_BNZ, 0, 0, 23),
             enc_i(OP_LI, 9, 0, 16'h0bad), enc_i(OP_ST, 9, 0, 16'(35 * LANES)), enc_i(OP_HALT, 0, 0, 0)};
    wait (go);
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (prog[i]) cfg(CFG_IMEM, 0, i, BUS_W'(prog[i]));
    cfg(CFG_SEGTBL, 0, 0, BUS_W'({{NB{1'b1}}, 1'b0, HB_NONE}));
    cfg(CFG_SEGTBL, 0, 1, BUS_W'({{NB{1'b0}}, 1'b1, HB_NONE}));
    cfg(CFG_SEGLEN, 0, 0, BUS_W'(2));
    for (int p = 0; p < NPE; p++) begin
      cfg(CFG_COMMTBL, p, 0, BUS_W'(p % 2 ? C_RECV : C_SEND));
      cfg(CFG_COMMTBL, p, 1, BUS_W'(p == NPE - 1 ? C_SEND : C_RECV));
      for (int i = 0; i < 16; i++) img[i] = 16'($urandom % 4096);
      begin
        logic signed [39:0] acc;
        acc = 0;
        for (int i = 0; i < 8; i++) acc = acc + 40'($signed(img[i]) * $signed(img[8 + i]));
        y[p] = sat_acc(acc);
      end
      for (int l = 0; l < (16 + LANES - 1) / LANES; l++) begin
        for (int w = 0; w < LANES; w++) v[w*16 +: 16] = (l*LANES + w < 16) ? img[l*LANES + w] : '0;
        cfg(CFG_SRAM, p, l, v);
      end
      for (int l = 32; l < 36; l++) cfg(CFG_SRAM, p, l, '0);
    end
    @(negedge clk); start = 1; @(negedge clk); start = 0; running = 1;
    while (!halted) @(negedge clk);
    running = 0;
    for (int p = 0; p < NPE; p++) begin
      rd(p, 32, q); chk(q == BUS_W'(y[p]), $sformatf("tile %0d result", p));
      rd(p, 35, q); chk(q == '0, $sformatf("tile %0d branch", p));
      if (p % 2) begin rd(p, 33, q); chk(q == BUS_W'(y[p-1]), $sformatf("step 0 into tile %0d", p)); end
      if (p != NPE - 1) begin rd(p, 34, q); chk(q == BUS_W'(y[NPE-1]), $sformatf("broadcast to tile %0d", p)); end
    end
    // 24 instructions, 2 skipped, body of 4 repeated 7 more times, 1 stall, 1 fetch
    target = prog.size() - 2 + 7 * 4 + 1 + 1;
    chk(cyc == target, $sformatf("cycles %0d exp %0d", cyc, target));
    chk(par == 1, "one step with all segmenters on");
    chk(conflicts == 0, "no conflicts");
    $display("ROWS=%0d (%0dx2 tiles), BUS_W=%0d: %0d cycles, %0d messages in one step",
             ROWS, ROWS, BUS_W, cyc, ROWS);
    done = 1;
  end
endmodule
