// tb_synchroscalar: the whole array at its default size (3 columns of 4x2
// tiles, 128-bit buses, 32 kB per tile, clock ratios 1:2:3) running the
// kernel of ss_tb_pkg in all columns at once, each at its own rate.
// Column 0 puts its tile-0 result on the horizontal bus; columns 1 and 2,
// running slower, pick it up later at a fixed point of their own schedules.
// Checks every tile's result in every column, both segmented-bus steps, the
// broadcast-fed branch, the horizontal-bus transfer, each column's cycle count
// in its own clock, and counts each mechanism: conditional-branch stalls,
// zero-overhead loop-backs, load forwarding, parallel segmented transfers,
// broadcasts, horizontal-bus put and get, and common ticks of the rational
// clocks. A mechanism that never happens counts as a failure.
module tb_synchroscalar;
  import ss_pkg::*;
  import ss_tb_pkg::*;
  localparam int NC = 3;
  logic clk = 0, rst_n = 0;
  logic [NC-1:0] start = 0, halted, cfg_we = 0, cfg_rd = 0;
  cfg_sel_e cfg_sel [NC];
  logic [NC-1:0][2:0] cfg_pe = 0;
  logic [NC-1:0][15:0] cfg_addr = 0;
  logic [NC-1:0][127:0] cfg_wdata = 0, cfg_rdata;
  logic [NC-1:0] col_en, obs_comm, obs_br_stall, obs_loop_back, obs_fwd, obs_hb_get, bus_conflict;
  logic [NC-1:0][2:0] obs_seg_on;
  logic all_en, hb_conflict;
  logic [127:0] xl [NC][8], hl [NC][8];
  logic [15:0] y [NC][8];
  int checks = 0, failures = 0;
  int cyc [NC], stalls [NC], loops [NC], fwds [NC], parallel [NC], bcast [NC], gets [NC];
  int conflicts = 0, coincide = 0, puts = 0;
  bit running = 0;
  logic hb_prev = 0;

  synchroscalar dut (.clk, .rst_n, .start, .halted, .cfg_we, .cfg_rd, .cfg_sel, .cfg_pe, .cfg_addr,
                     .cfg_wdata, .cfg_rdata, .col_en, .all_en, .obs_comm, .obs_seg_on, .obs_br_stall,
                     .obs_loop_back, .obs_fwd, .obs_hb_get, .bus_conflict, .hb_conflict);
  always #5 clk = ~clk;
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) if (running) begin
    for (int c = 0; c < NC; c++) if (!halted[c]) begin
      if (col_en[c]) cyc[c]++;
      if (obs_br_stall[c]) stalls[c]++;
      if (obs_loop_back[c]) loops[c]++;
      if (obs_fwd[c]) fwds[c]++;
      if (obs_comm[c] && obs_seg_on[c] == 3'b010) parallel[c]++;
      if (obs_comm[c] && obs_seg_on[c] == 3'b000) bcast[c]++;
      if (obs_hb_get[c]) gets[c]++;
    end
    if (|bus_conflict || hb_conflict) conflicts++;
    if (all_en && !(&halted)) coincide++;
    if (dut.g_col[0].u_col.hb_drv_en && !hb_prev) puts++;
    hb_prev <= dut.g_col[0].u_col.hb_drv_en;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic cfg(int c, cfg_sel_e s, int pe, int addr, logic [127:0] v);
    @(negedge clk); cfg_we[c] = 1; cfg_sel[c] = s; cfg_pe[c] = 3'(pe); cfg_addr[c] = 16'(addr); cfg_wdata[c] = v;
    @(negedge clk); cfg_we[c] = 0;
  endtask
  task automatic rd(int c, int pe, int line, output logic [127:0] q);
    @(negedge clk); cfg_rd[c] = 1; cfg_sel[c] = CFG_SRAM; cfg_pe[c] = 3'(pe); cfg_addr[c] = 16'(line);
    @(negedge clk); cfg_rd[c] = 0; q = cfg_rdata[c];
  endtask

  initial begin
    logic [127:0] q;
    for (int c = 0; c < NC; c++) begin
      cfg_sel[c] = CFG_IMEM;
      cyc[c] = 0; stalls[c] = 0; loops[c] = 0; fwds[c] = 0; parallel[c] = 0; bcast[c] = 0; gets[c] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NC; c++) begin
      for (int i = 0; i < PROG_LEN; i++) cfg(c, CFG_IMEM, 0, i, 128'(kernel(i)));
      for (int s = 0; s < 3; s++) cfg(c, CFG_SEGTBL, 0, s, 128'(seg_entry(s, c == 0)));
      cfg(c, CFG_SEGLEN, 0, 0, 128'd3);
      for (int p = 0; p < 8; p++) begin
        for (int s = 0; s < 3; s++) cfg(c, CFG_COMMTBL, p, s, 128'(comm_entry(s, p, c == 0)));
        xl[c][p] = rnd_line(p == 5); hl[c][p] = rnd_line(1);
        y[c][p] = dot(xl[c][p], hl[c][p]);
        cfg(c, CFG_SRAM, p, 0, xl[c][p]); cfg(c, CFG_SRAM, p, 1, hl[c][p]);
        for (int l = 2; l < 7; l++) cfg(c, CFG_SRAM, p, l, '0);
      end
    end
    // start all columns on a common tick
    while (!all_en) @(negedge clk);
    @(negedge clk);
    while (!all_en) @(negedge clk);
    start = '1; running = 1;
    @(negedge clk); start = '0;
    while (!(&halted)) @(negedge clk);
    running = 0;
    for (int c = 0; c < NC; c++) begin
      for (int p = 0; p < 8; p++) begin
        rd(c, p, 2, q); chk(q == 128'(y[c][p]), $sformatf("col %0d tile %0d dot product", c, p));
        rd(c, p, 5, q); chk(q == '0, $sformatf("col %0d tile %0d branch fall-through skipped", c, p));
      end
      rd(c, 3, 3, q); chk(q == 128'(y[c][0]), $sformatf("col %0d step 0 upper group", c));
      rd(c, 7, 3, q); chk(q == 128'(y[c][4]), $sformatf("col %0d step 0 lower group", c));
      for (int p = 1; p < 7; p++) if (p == 1 || p == 2 || p == 6) begin
        rd(c, p, 4, q); chk(q == 128'(y[c][5]), $sformatf("col %0d broadcast to tile %0d", c, p));
      end
      rd(c, 1, 6, q);
      if (c == 0) chk(q == 128'(y[0][5]), "col 0 tile 1 keeps its broadcast line");
      else        chk(q == 128'(y[0][0]), $sformatf("col %0d got col 0 result over horizontal bus", c));
      chk(cyc[c] == KERNEL_CYCLES, $sformatf("col %0d cycles %0d exp %0d", c, cyc[c], KERNEL_CYCLES));
      chk(stalls[c] == 1 && loops[c] == 7 && fwds[c] >= 8, $sformatf("col %0d stall/loop/forward counts", c));
      chk(parallel[c] == 1 && bcast[c] == 1, $sformatf("col %0d parallel/broadcast steps", c));
      chk(gets[c] == (c == 0 ? 0 : 1), $sformatf("col %0d horizontal gets", c));
      $display("col %0d: cycles=%0d branch_stalls=%0d loop_backs=%0d load_forwards=%0d parallel_steps=%0d broadcasts=%0d hb_gets=%0d",
               c, cyc[c], stalls[c], loops[c], fwds[c], parallel[c], bcast[c], gets[c]);
    end
    chk(puts == 1, "one horizontal-bus put");
    chk(coincide > 0, "rational clocks met on common ticks");
    chk(conflicts == 0, "no bus conflicts");
    $display("hb_puts=%0d common_ticks=%0d conflicts=%0d", puts, coincide, conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
