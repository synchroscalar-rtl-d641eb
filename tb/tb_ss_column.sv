// tb_ss_column: one column running the kernel of ss_tb_pkg at every enabled
// cycle (column 0 role: horizontal-bus source). Checks every tile's dot
// product, the two parallel transfers of step 0, the broadcast of step 1, the
// taken branch, the line captured for the horizontal bus, the cycle count
// (one per decoded instruction, one stall for the branch, none for the 7
// loop-backs) and that no bus conflict occurs.
module tb_ss_column;
  import ss_pkg::*;
  import ss_tb_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, halted;
  logic cfg_we = 0, cfg_rd = 0; cfg_sel_e cfg_sel = CFG_IMEM; logic [2:0] cfg_pe = 0;
  logic [15:0] cfg_addr = 0; logic [127:0] cfg_wdata = 0, cfg_rdata;
  logic [127:0] hb_val = 0, hb_drv_data;
  logic hb_drv_en, obs_comm, obs_br_stall, obs_loop_back, obs_fwd, obs_hb_get, bus_conflict;
  logic [2:0] obs_seg_on;
  logic [127:0] xl [8], hl [8];
  logic [15:0] y [8];
  int checks = 0, failures = 0, cyc = 0, stalls = 0, loops = 0, fwds = 0, parallel = 0, bcast = 0, conflicts = 0;

  ss_column dut (.clk, .rst_n, .en(1'b1), .start, .halted, .cfg_we, .cfg_rd, .cfg_sel, .cfg_pe,
                 .cfg_addr, .cfg_wdata, .cfg_rdata, .hb_val, .hb_drv_en, .hb_drv_data,
                 .obs_comm, .obs_seg_on, .obs_br_stall, .obs_loop_back, .obs_fwd, .obs_hb_get,
                 .bus_conflict);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  bit running = 0;
  always @(posedge clk) if (running && !halted) begin
    cyc++;
    if (obs_br_stall) stalls++;
    if (obs_loop_back) loops++;
    if (obs_fwd) fwds++;
    if (obs_comm && obs_seg_on == 3'b010) parallel++;
    if (obs_comm && obs_seg_on == 3'b000) bcast++;
    if (bus_conflict) conflicts++;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic cfg(cfg_sel_e s, int pe, int addr, logic [127:0] v);
    @(negedge clk); cfg_we = 1; cfg_sel = s; cfg_pe = 3'(pe); cfg_addr = 16'(addr); cfg_wdata = v;
    @(negedge clk); cfg_we = 0;
  endtask
  task automatic rd(int pe, int line, output logic [127:0] q);
    @(negedge clk); cfg_rd = 1; cfg_sel = CFG_SRAM; cfg_pe = 3'(pe); cfg_addr = 16'(line);
    @(negedge clk); cfg_rd = 0; q = cfg_rdata;
  endtask

  initial begin
    logic [127:0] q;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < PROG_LEN; i++) cfg(CFG_IMEM, 0, i, 128'(kernel(i)));
    for (int s = 0; s < 3; s++) cfg(CFG_SEGTBL, 0, s, 128'(seg_entry(s, 1)));
    cfg(CFG_SEGLEN, 0, 0, 128'd3);
    for (int p = 0; p < 8; p++) begin
      for (int s = 0; s < 3; s++) cfg(CFG_COMMTBL, p, s, 128'(comm_entry(s, p, 1)));
      xl[p] = rnd_line(p == 5); hl[p] = rnd_line(1);
      y[p] = dot(xl[p], hl[p]);
      cfg(CFG_SRAM, p, 0, xl[p]); cfg(CFG_SRAM, p, 1, hl[p]);
      for (int l = 2; l < 7; l++) cfg(CFG_SRAM, p, l, '0);
    end
    @(negedge clk); start = 1; @(negedge clk); start = 0; running = 1;
    while (!halted) @(negedge clk);
    running = 0;
    for (int p = 0; p < 8; p++) begin
      rd(p, 2, q); chk(q == 128'(y[p]), $sformatf("tile %0d dot product", p));
      rd(p, 5, q); chk(q == '0, $sformatf("tile %0d branch skipped fall-through", p));
    end
    rd(3, 3, q); chk(q == 128'(y[0]), "step 0 upper group 0->3");
    rd(7, 3, q); chk(q == 128'(y[4]), "step 0 lower group 4->7");
    foreach (y[p]) if (p == 1 || p == 2 || p == 6) begin
      rd(p, 4, q); chk(q == 128'(y[5]), $sformatf("broadcast to tile %0d", p));
    end
    chk(hb_drv_en && hb_drv_data == 128'(y[0]), "horizontal bus carries tile 0 result");
    chk(cyc == KERNEL_CYCLES, $sformatf("cycles %0d exp %0d", cyc, KERNEL_CYCLES));
    chk(stalls == 1, "one branch stall");
    chk(loops == 7, "seven loop-backs");
    chk(fwds >= 8, "load forwarding each iteration");
    chk(parallel == 1 && bcast == 1, "one parallel and one broadcast step");
    chk(conflicts == 0, "no bus conflict");
    $display("cycles=%0d stalls=%0d loop_backs=%0d fwd=%0d parallel=%0d broadcast=%0d", cyc, stalls, loops, fwds, parallel, bcast);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
