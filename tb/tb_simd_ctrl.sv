// tb_simd_ctrl: runs a program with two zero-overhead loops (one of a single
// instruction), taken and untaken conditional branches on values received
// from the bus, a jump, a schedule restart and halts. A sequential reference
// interpreter here gives the stream of instructions that must reach the tiles
// and the cycle count (one cycle per decoded instruction, two per conditional
// branch, none for a loop-back). Run twice: enable always high, then a random
// column enable (cycles counted in enabled cycles).
module tb_simd_ctrl;
  import ss_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, start = 0;
  logic imem_we = 0; logic [7:0] imem_addr = 0; logic [31:0] imem_wdata = 0;
  logic rx_valid; logic [15:0] rx_data;
  logic [31:0] pe_instr; logic pe_valid, csync, halted, br_stall, loop_back;
  logic [31:0] prog [32];
  logic [15:0] rxv [$];
  logic [31:0] exp_stream [$], got_stream [$];
  int exp_cycles, exp_stalls, exp_loops, exp_csync;
  int cyc, stalls, loops, csyncs, rxi;
  int checks = 0, failures = 0;
  bit random_en;

  simd_ctrl dut (.clk, .rst_n, .en, .start, .imem_we, .imem_addr, .imem_wdata, .rx_valid, .rx_data,
                 .pe_instr, .pe_valid, .csync, .halted, .br_stall, .loop_back);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // bus: each COMM at the tiles delivers the next value of rxv
  assign rx_valid = en && pe_valid && !pe_instr[31] && pe_instr[30:26] == 5'(OP_COMM);
  assign rx_data  = (rxi < rxv.size()) ? rxv[rxi] : 16'd0;

  always @(posedge clk) if (rst_n && !halted) begin
    if (en) cyc++;
    if (en && pe_valid) got_stream.push_back(pe_instr);
    if (rx_valid) rxi <= rxi + 1;
    if (br_stall) stalls++;
    if (loop_back) loops++;
    if (csync) csyncs++;
  end

  task automatic reference();
    int pc, ls, le, lc, ri; logic [15:0] creg;
    pc = 0; lc = 0; ri = 0; creg = 0; exp_cycles = 1; exp_stalls = 0; exp_loops = 0; exp_csync = 0;
    exp_stream.delete();
    for (int guard = 0; guard < 1000; guard++) begin
      logic [31:0] w; int nxt; op_e op;
      w = prog[pc]; op = op_e'(w[30:26]); nxt = pc + 1;
      exp_cycles++;
      if (w[31] || !w[30]) begin
        exp_stream.push_back(w);
        if (!w[31] && op == OP_COMM) begin creg = rxv[ri]; ri++; end
      end else case (op)
        OP_JMP: nxt = w[15:0];
        OP_BZ, OP_BNZ: begin
          exp_cycles++; exp_stalls++;
          if ((op == OP_BZ) == (creg == 0)) nxt = w[15:0];
        end
        OP_LOOP: begin ls = pc + 1; le = w[15:0]; lc = w[25:16]; end
        OP_CSYNC: exp_csync++;
        OP_HALT: return;
        default: ;
      endcase
      if (pc == le && lc > 0 && nxt == pc + 1) begin
        if (lc > 1) begin nxt = ls; exp_loops++; end
        lc--;
      end
      pc = nxt;
    end
  endtask

  task automatic run(bit rnd);
    random_en = rnd;
    got_stream.delete(); cyc = 0; stalls = 0; loops = 0; csyncs = 0; rxi = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!halted) @(negedge clk);
    checks++;
    if (got_stream.size() != exp_stream.size()) begin failures++; $display("stream length %0d exp %0d", got_stream.size(), exp_stream.size()); end
    else foreach (exp_stream[i]) begin
      checks++;
      if (got_stream[i] !== exp_stream[i]) begin failures++; $display("issue %0d: %h exp %h", i, got_stream[i], exp_stream[i]); end
    end
    checks++; if (cyc != exp_cycles) begin failures++; $display("cycles %0d exp %0d", cyc, exp_cycles); end
    checks++; if (stalls != exp_stalls) begin failures++; $display("stalls %0d exp %0d", stalls, exp_stalls); end
    checks++; if (loops != exp_loops) begin failures++; $display("loop-backs %0d exp %0d", loops, exp_loops); end
    checks++; if (csyncs != exp_csync) begin failures++; $display("csync %0d exp %0d", csyncs, exp_csync); end
    $display("run random_en=%0d: cycles=%0d stalls=%0d loop_backs=%0d issued=%0d", rnd, cyc, stalls, loops, got_stream.size());
  endtask

  always @(negedge clk) if (random_en) en = ($urandom % 3) != 0; else en = 1;

  initial begin
    for (int i = 0; i < 32; i++) prog[i] = enc_i(OP_HALT, 0, 0, 0);
    prog[0]  = enc_i(OP_LI, 1, 0, 100);
    prog[1]  = enc_loop(3, 3);
    prog[2]  = enc_i(OP_LI, 1, 0, 200);
    prog[3]  = enc_bundle(ALU_ADD, 2, 1, 1, MAC_MAC, 1, 1);
    prog[4]  = enc_loop(4, 5);
    prog[5]  = enc_i(OP_LI, 2, 0, 300);
    prog[6]  = enc_i(OP_COMM, 0, 0, 0);
    prog[7]  = enc_i(OP_BZ, 0, 0, 10);
    prog[8]  = enc_i(OP_LI, 3, 0, 400);
    prog[9]  = enc_i(OP_HALT, 0, 0, 0);
    prog[10] = enc_i(OP_COMM, 0, 0, 1);
    prog[11] = enc_i(OP_BZ, 0, 0, 8);
    prog[12] = enc_i(OP_BNZ, 0, 0, 14);
    prog[13] = enc_i(OP_LI, 3, 0, 401);
    prog[14] = enc_i(OP_JMP, 0, 0, 16);
    prog[15] = enc_i(OP_LI, 3, 0, 402);
    prog[16] = enc_i(OP_CSYNC, 0, 0, 0);
    prog[17] = enc_i(OP_LI, 4, 0, 500);
    prog[18] = enc_i(OP_COMM, 0, 0, 2);
    prog[19] = enc_i(OP_BNZ, 0, 0, 8);
    prog[20] = enc_i(OP_HALT, 0, 0, 0);
    rxv = '{16'd0, 16'd5, 16'd0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); imem_we = 1; imem_addr = 8'(i); imem_wdata = prog[i];
    end
    @(negedge clk); imem_we = 0;
    reference();
    run(0);
    run(1);
    // second program: loop whose body ends with a taken branch out of the loop
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
