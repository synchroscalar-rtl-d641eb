// tb_pe: drives one tile with instruction words directly.
// Part 1, directed: a load whose result is used by the very next bundle
// (forwarding), a MAC, stores of single words, a transmit-buffer load
// followed at once by a bus send (bypass), a bus receive and its store to
// SRAM, and the accumulator read-out; results are read back through the host
// port and compared with values computed here.
// Part 2, random: LI / ADDI / ALU bundles against a register model, then all
// registers stored to SRAM and read back. Cycle timing: each instruction is
// presented for exactly one cycle.
module tb_pe;
  import ss_pkg::*;
  logic clk = 0, rst_n = 0, en = 1;
  logic [31:0] instr = 0; logic valid = 0;
  logic [4:0] step = 0; logic comm = 0;
  logic [127:0] bus_in = 0, drv_data, host_wdata = 0, host_rdata;
  logic drv_en, fwd_event, rx_event;
  logic tbl_we = 0; logic [4:0] tbl_addr = 0; comm_act_e tbl_wdata = C_IDLE;
  logic host_req = 0, host_we = 0; logic [10:0] host_addr = 0;
  int checks = 0, failures = 0, fwds = 0;
  logic [15:0] d [8];
  logic [127:0] line5, xin;
  logic [15:0] m [16];

  pe dut (.clk, .rst_n, .en, .instr, .valid, .step, .comm, .bus_in, .drv_en, .drv_data,
          .tbl_we, .tbl_addr, .tbl_wdata, .host_req, .host_we, .host_addr, .host_wdata, .host_rdata,
          .fwd_event, .rx_event);
  always #5 clk = ~clk;
  always @(posedge clk) if (fwd_event) fwds++;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic issue(logic [31:0] w);
    @(negedge clk); instr = w; valid = 1; comm = !w[31] && w[30:26] == 5'(OP_COMM);
  endtask
  task automatic idle();
    @(negedge clk); valid = 0; comm = 0; instr = 0;
  endtask
  task automatic host_read(int line, output logic [127:0] q);
    @(negedge clk); valid = 0; comm = 0; host_req = 1; host_we = 0; host_addr = 11'(line);
    @(negedge clk); host_req = 0; q = host_rdata;
  endtask
  task automatic host_write(int line, logic [127:0] v);
    @(negedge clk); host_req = 1; host_we = 1; host_addr = 11'(line); host_wdata = v;
    @(negedge clk); host_req = 0; host_we = 0;
  endtask

  initial begin
    logic [127:0] q; logic [15:0] exp3, expacc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 8; i++) d[i] = 16'($urandom);
    d[3] = 16'h1234;
    line5 = {d[7], d[6], d[5], d[4], d[3], d[2], d[1], d[0]};
    host_write(5, line5);
    host_write(6, '0);
    @(negedge clk); tbl_we = 1; tbl_addr = 0; tbl_wdata = C_SEND;
    @(negedge clk); tbl_addr = 1; tbl_wdata = C_RECV;
    @(negedge clk); tbl_we = 0;
    issue(enc_i(OP_LI, 1, 0, 40));
    issue(enc_i(OP_LD, 2, 1, 3));
    issue(enc_bundle(ALU_ADD, 3, 2, 2, MAC_MUL, 2, 2));        // r2 forwarded to both units
    issue(enc_i(OP_ST, 3, 1, 9));                              // line 6 lane 1
    issue(enc_i(OP_LI, 4, 0, 5));
    issue(enc_i(OP_LDTX, 0, 4, 0));
    issue(enc_i(OP_COMM, 0, 0, 0)); step = 0;                  // send, tx bypass
    #1 chk(drv_en && drv_data == line5, "send of freshly loaded line");
    xin = {$urandom, $urandom, $urandom, $urandom};
    issue(enc_i(OP_COMM, 0, 0, 0)); step = 1; bus_in = xin;    // receive
    #1 chk(!drv_en, "no drive on receive step");
    issue(enc_i(OP_STRX, 0, 4, 2));                            // line 7 = xin
    issue(enc_bundle(ALU_RDACC, 5, 0, 0, MAC_NOP, 0, 0));
    issue(enc_i(OP_ST, 5, 1, 10));                             // line 6 lane 2
    issue(enc_i(OP_ADDI, 6, 1, 16'hfffe));                     // 38
    issue(enc_i(OP_ST, 6, 1, 11));                             // line 6 lane 3
    idle();
    exp3   = 16'(2 * d[3]);
    expacc = sat_acc(40'($signed(d[3]) * $signed(d[3])));
    host_read(6, q);
    chk(q[16 +: 16] == exp3, "forwarded load + add");
    chk(q[32 +: 16] == expacc, "MAC on forwarded load, read-out");
    chk(q[48 +: 16] == 16'd38, "addi");
    chk(q[0 +: 16] == 16'd0 && q[127:64] == '0, "store touched one lane only");
    host_read(7, q);
    chk(q == xin, "received line stored");
    chk(fwds >= 1, "load forwarding happened");

    // Part 2: random register traffic
    for (int i = 0; i < 16; i++) begin m[i] = 16'(i * 3); issue(enc_i(OP_LI, 4'(i), 0, 16'(i * 3))); end
    for (int n = 0; n < 400; n++) begin
      int k, rd, ra, rb; alu_op_e op; logic [15:0] imm;
      k = $urandom % 3; rd = $urandom % 16; ra = $urandom % 16; rb = $urandom % 16; imm = 16'($urandom);
      if (k == 0) begin issue(enc_i(OP_LI, 4'(rd), 0, imm)); m[rd] = imm; end
      else if (k == 1) begin issue(enc_i(OP_ADDI, 4'(rd), 4'(ra), imm)); m[rd] = m[ra] + imm; end
      else begin
        op = alu_op_e'(1 + $urandom % 5);
        issue(enc_bundle(op, 4'(rd), 4'(ra), 4'(rb), MAC_NOP, 0, 0));
        case (op)
          ALU_ADD: m[rd] = m[ra] + m[rb];
          ALU_SUB: m[rd] = m[ra] - m[rb];
          ALU_AND: m[rd] = m[ra] & m[rb];
          ALU_OR:  m[rd] = m[ra] | m[rb];
          default: m[rd] = m[ra] ^ m[rb];
        endcase
      end
    end
    issue(enc_i(OP_LI, 0, 0, 0)); m[0] = 0;
    for (int i = 1; i < 16; i++) issue(enc_i(OP_ST, 4'(i), 0, 16'(800 + i)));
    idle();
    host_read(100, q);
    for (int i = 1; i < 8; i++) chk(q[i*16 +: 16] == m[i], $sformatf("r%0d", i));
    host_read(101, q);
    for (int i = 8; i < 16; i++) chk(q[(i-8)*16 +: 16] == m[i], $sformatf("r%0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
