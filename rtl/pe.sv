// pe: one processing element (tile) of a Synchroscalar column.
//
// The tile holds a DSP engine with two functional units (pe_alu and pe_mac),
// a register file, a local SRAM and a communication interface. It has no
// instruction fetch of its own: it executes the word `instr` broadcast by the
// column's SIMD controller whenever `valid` and the column enable `en` are high.
// A bundle word issues an ALU and a MAC operation in the same cycle; single
// words load immediates, add immediates, access the SRAM or move bus lines
// between the SRAM and the communication buffers (see ss_pkg for encodings).
//
// Timing: ALU and immediate results are written at the end of the issue
// cycle. SRAM reads (LD, LDTX) return one enabled cycle later; the load result
// is forwarded to operands of the very next instruction, and an LDTX result is
// forwarded to a bus send in that next cycle, so no instruction has to wait.
// A bus step happens in the cycle `comm` is high (driven by the segment
// controller when a COMM instruction is issued).
//
// Host port: `host_req` takes the SRAM port for one access (line-wide write
// with all lanes, or a read returned on `host_rdata` one cycle later); it is
// meant for use while the column is stopped and has priority over the core
// (an assertion reports a collision with a memory instruction).
// The split into units follows the tile description; the instruction set,
// latencies and forwarding are this design's own choices.
module pe
  import ss_pkg::*;
#(
  parameter int BUS_W      = 128,
  parameter int SRAM_BYTES = 32768,
  parameter int STEPS      = 32,
  localparam int SW        = $clog2(STEPS),
  localparam int LANES     = BUS_W / 16,
  localparam int LB        = $clog2(LANES),
  localparam int LAW       = $clog2(SRAM_BYTES * 8 / BUS_W)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [31:0]      instr,
  input  logic             valid,
  input  logic [SW-1:0]    step,
  input  logic             comm,
  input  logic [BUS_W-1:0] bus_in,
  output logic             drv_en,
  output logic [BUS_W-1:0] drv_data,
  // host access
  input  logic             tbl_we,
  input  logic [SW-1:0]    tbl_addr,
  input  comm_act_e        tbl_wdata,
  input  logic             host_req,
  input  logic             host_we,
  input  logic [LAW-1:0]   host_addr,
  input  logic [BUS_W-1:0] host_wdata,
  output logic [BUS_W-1:0] host_rdata,
  // activity, for observation
  output logic             fwd_event,
  output logic             rx_event
);

  // ---------------- decode ----------------
  logic        bundle;
  op_e         op;
  alu_op_e     aop;
  mac_op_e     mop;
  logic [3:0]  f_rd, f_ra, f_rb, f_ma, f_mb, s_rd, s_ra;
  logic [15:0] imm;

  assign bundle = valid && instr[31];
  assign op     = valid && !instr[31] ? op_e'(instr[30:26]) : OP_NOP;
  assign aop    = bundle ? alu_op_e'(instr[30:27]) : ALU_NOP;
  assign mop    = bundle ? mac_op_e'(instr[14:12]) : MAC_NOP;
  assign f_rd   = instr[26:23];
  assign f_ra   = instr[22:19];
  assign f_rb   = instr[18:15];
  assign f_ma   = instr[11:8];
  assign f_mb   = instr[7:4];
  assign s_rd   = instr[25:22];
  assign s_ra   = instr[21:18];
  assign imm    = instr[15:0];

  // ---------------- register file + load forwarding ----------------
  logic [3:0][3:0]         raddr;
  logic [3:0][DATA_W-1:0]  rf_q, opnd;
  logic                    we0;
  logic [3:0]              waddr0;
  logic [DATA_W-1:0]       wdata0;

  // pending SRAM read from the previous enabled cycle
  logic                    ld_pend, tx_pend;
  logic [3:0]              ld_rd;
  logic [LB-1:0]           ld_lane;
  logic [BUS_W-1:0]        sram_q;
  logic [DATA_W-1:0]       ld_data;

  assign ld_data = sram_q[ld_lane*16 +: 16];

  always_comb begin
    if (bundle) raddr = {f_mb, f_ma, f_rb, f_ra};
    else        raddr = {4'd0, 4'd0, s_rd, s_ra};
  end

  pe_regfile #(.NREGS(NREGS), .DATA_W(DATA_W), .NRD(4)) u_rf (
    .clk, .rst_n, .en,
    .raddr (raddr),
    .rdata (rf_q),
    .we0   (we0),
    .waddr0(waddr0),
    .wdata0(wdata0),
    .we1   (ld_pend),
    .waddr1(ld_rd),
    .wdata1(ld_data)
  );

  always_comb begin
    fwd_event = 1'b0;
    for (int i = 0; i < 4; i++) begin
      opnd[i] = rf_q[i];
      if (ld_pend && ld_rd == raddr[i]) begin
        opnd[i] = ld_data;
        if (i < 2 || bundle) fwd_event = en;
      end
    end
  end

  // ---------------- functional units ----------------
  logic signed [ACC_W-1:0] acc;
  logic [DATA_W-1:0]       alu_y, addr16;

  pe_alu u_alu (.op(aop), .a(opnd[0]), .b(opnd[1]), .acc(acc), .y(alu_y));
  pe_mac u_mac (.clk, .rst_n, .en(en && bundle), .op(mop), .a(opnd[2]), .b(opnd[3]), .acc(acc));

  assign addr16 = opnd[0] + imm;

  always_comb begin
    we0    = 1'b0;
    waddr0 = bundle ? f_rd : s_rd;
    wdata0 = alu_y;
    if (bundle) begin
      we0 = (aop != ALU_NOP);
    end else begin
      unique case (op)
        OP_LI:   begin we0 = 1'b1; wdata0 = imm; end
        OP_ADDI: begin we0 = 1'b1; wdata0 = addr16; end
        default: ;
      endcase
    end
  end

  // ---------------- SRAM ----------------
  logic              s_req, s_we;
  logic [LAW-1:0]    s_addr;
  logic [LANES-1:0]  s_mask;
  logic [BUS_W-1:0]  s_wdata, rx_buf;

  always_comb begin
    s_req   = 1'b0;
    s_we    = 1'b0;
    s_addr  = '0;
    s_mask  = '1;
    s_wdata = '0;
    if (host_req) begin
      s_req   = 1'b1;
      s_we    = host_we;
      s_addr  = host_addr;
      s_wdata = host_wdata;
    end else if (en) begin
      unique case (op)
        OP_LD: begin
          s_req  = 1'b1;
          s_addr = LAW'(addr16 >> LB);
        end
        OP_ST: begin
          s_req   = 1'b1;
          s_we    = 1'b1;
          s_addr  = LAW'(addr16 >> LB);
          s_mask  = LANES'(1) << addr16[LB-1:0];
          s_wdata = {LANES{opnd[1]}};
        end
        OP_LDTX: begin
          s_req  = 1'b1;
          s_addr = LAW'(addr16);
        end
        OP_STRX: begin
          s_req   = 1'b1;
          s_we    = 1'b1;
          s_addr  = LAW'(addr16);
          s_wdata = rx_buf;
        end
        default: ;
      endcase
    end
  end

  pe_sram #(.BYTES(SRAM_BYTES), .LINE_W(BUS_W)) u_sram (
    .clk, .req(s_req), .we(s_we), .addr(s_addr), .wmask(s_mask),
    .wdata(s_wdata), .rdata(sram_q)
  );
  assign host_rdata = sram_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_pend <= 1'b0;
      tx_pend <= 1'b0;
      ld_rd   <= '0;
      ld_lane <= '0;
    end else if (en) begin
      ld_pend <= (op == OP_LD) && !host_req;
      tx_pend <= (op == OP_LDTX) && !host_req;
      ld_rd   <= s_rd;
      ld_lane <= addr16[LB-1:0];
    end
  end

  // ---------------- communication interface ----------------
  pe_comm #(.BUS_W(BUS_W), .STEPS(STEPS)) u_comm (
    .clk, .rst_n, .en,
    .tbl_we, .tbl_addr, .tbl_wdata,
    .step, .comm(comm && en), .bus_in,
    .tx_wr   (tx_pend),
    .tx_wdata(sram_q),
    .drv_en, .drv_data, .rx_buf, .rx_event
  );

  // The host port wins the SRAM; a program must not use the SRAM while the
  // host is accessing it.
  a_host_excl: assert property (@(posedge clk) disable iff (!rst_n)
      host_req |-> !(en && (op == OP_LD || op == OP_ST || op == OP_LDTX || op == OP_STRX)))
    else $error("pe: host SRAM access in the same cycle as a memory instruction");

endmodule
