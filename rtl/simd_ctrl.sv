// simd_ctrl: SIMD controller of one column.
//
// Fetches the column's program from a local instruction memory, executes all
// control instructions itself and forwards only computation instructions to
// the tiles, which all execute the same word (`pe_instr`/`pe_valid`).
//
// Pipeline: fetch (combinational read of imem at the fetch address into the
// decode register) -> decode (control instructions act here) -> issue
// register read by the tiles. Keeping branches in the controller, ahead of
// the tiles, means nothing sent to the tiles is ever squashed.
//   JMP         redirects the fetch from decode: the jump's own decode slot is
//               a bubble to the tiles, no further penalty.
//   BZ / BNZ    test `creg`, the last value the controller received from bus
//               segment 0 (`rx_valid`). The branch waits one cycle in decode
//               (the single-cycle stall) so that a value received by the COMM
//               instruction just ahead of it is seen, then redirects or falls
//               through.
//   LOOP n,end  zero-overhead loop over [next address .. end], n iterations:
//               the fetch address is compared with `end`, so jumping back costs
//               no cycle. One loop level (an assertion reports a nested LOOP);
//               n = 0 behaves as n = 1.
//   CSYNC       pulses `csync` so the segment controller restarts its schedule.
//   HALT        stops fetching; `halted` goes high.
// All pipeline state advances only when the column enable `en` is high.
// `start` (any cycle) clears the pipeline and starts fetching at address 0.
// The program is loaded through imem_we/imem_addr/imem_wdata at any time.
// The stall-on-conditional-branch and PC-based loop behaviour follow the
// controller description; the instruction set and loop detail are this
// design's own choices.
module simd_ctrl
  import ss_pkg::*;
#(
  parameter int IMEM_DEPTH = 256,
  localparam int PW        = $clog2(IMEM_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              start,
  input  logic              imem_we,
  input  logic [PW-1:0]     imem_addr,
  input  logic [31:0]       imem_wdata,
  input  logic              rx_valid,
  input  logic [DATA_W-1:0] rx_data,
  output logic [31:0]       pe_instr,
  output logic              pe_valid,
  output logic              csync,
  output logic              halted,
  output logic              br_stall,
  output logic              loop_back
);

  logic [31:0]       imem [IMEM_DEPTH];
  logic              running;
  logic [PW-1:0]     pc;
  logic [31:0]       id_instr;
  logic              id_valid;
  logic              br_wait;
  logic [PW-1:0]     lp_start, lp_end;
  logic [9:0]        lp_cnt;
  logic [DATA_W-1:0] creg;

  always_ff @(posedge clk) begin
    if (imem_we) imem[imem_addr] <= imem_wdata;
  end

  // ---------------- decode ----------------
  op_e         id_op;
  logic        id_ctrl;
  logic [PW-1:0] id_tgt;
  logic        redirect, stall, do_halt, is_loop, take;

  assign id_op   = op_e'(id_instr[30:26]);
  assign id_ctrl = id_valid && is_control(id_instr[31:30]);
  assign id_tgt  = PW'(id_instr[15:0]);
  assign take    = (id_op == OP_BZ) ? (creg == '0) : (creg != '0);

  always_comb begin
    redirect = 1'b0;
    stall    = 1'b0;
    do_halt  = 1'b0;
    is_loop  = 1'b0;
    csync    = 1'b0;
    if (running && id_ctrl) begin
      unique case (id_op)
        OP_JMP:        redirect = 1'b1;
        OP_BZ, OP_BNZ: begin
          if (!br_wait) stall = 1'b1;
          else          redirect = take;
        end
        OP_LOOP:       is_loop = 1'b1;
        OP_CSYNC:      csync = en;
        OP_HALT:       do_halt = 1'b1;
        default: ;
      endcase
    end
  end

  assign br_stall = en && stall;

  // ---------------- fetch ----------------
  logic [PW-1:0] fa, e_start, e_end, next_pc;
  logic [9:0]    e_cnt, next_cnt;
  logic          fetch, at_end;

  always_comb begin
    e_start = is_loop ? pc : lp_start;
    e_end   = is_loop ? PW'(id_instr[15:0]) : lp_end;
    e_cnt   = is_loop ? id_instr[25:16] : lp_cnt;
    fetch   = running && !stall && !do_halt;
    fa      = redirect ? id_tgt : pc;
    at_end  = fetch && (fa == e_end) && (e_cnt != '0);
    next_pc  = (at_end && e_cnt > 10'd1) ? e_start : fa + PW'(1);
    next_cnt = at_end ? e_cnt - 10'd1 : e_cnt;
  end

  assign loop_back = en && at_end && (e_cnt > 10'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running  <= 1'b0;
      pc       <= '0;
      id_instr <= '0;
      id_valid <= 1'b0;
      br_wait  <= 1'b0;
      lp_start <= '0;
      lp_end   <= '0;
      lp_cnt   <= '0;
      creg     <= '0;
      pe_instr <= '0;
      pe_valid <= 1'b0;
    end else if (start) begin
      running  <= 1'b1;
      pc       <= '0;
      id_valid <= 1'b0;
      br_wait  <= 1'b0;
      lp_cnt   <= '0;
      pe_valid <= 1'b0;
    end else if (en) begin
      if (rx_valid) creg <= rx_data;
      // issue
      pe_valid <= running && id_valid && !id_ctrl;
      pe_instr <= id_instr;
      // decode
      br_wait  <= stall;
      if (do_halt) begin
        running  <= 1'b0;
        id_valid <= 1'b0;
      end
      if (is_loop) begin
        lp_start <= e_start;
        lp_end   <= e_end;
      end
      lp_cnt <= next_cnt;
      if (fetch) begin
        id_instr <= imem[fa];
        id_valid <= 1'b1;
        pc       <= next_pc;
      end
    end
  end

  assign halted = !running;

  // One loop level: a LOOP may only start when no loop is active.
  a_one_loop: assert property (@(posedge clk) disable iff (!rst_n)
      en && is_loop && !start |-> lp_cnt == '0)
    else $error("simd_ctrl: nested LOOP");

endmodule
