// fft_run: a 128-point complex FFT (radix-2, decimation in frequency, 16-bit
// fixed point) on one ss_column of ROWS x 2 tiles, reporting its own check
// counts (used by tb_fft128 for every column size). With NPE = 2*ROWS tiles,
// tile t holds the PPT = 128/NPE points PPT*t .. PPT*t+PPT-1 (real parts in
// words 0..PPT-1, imaginary parts in words PPT..2*PPT-1, LPT = PPT/4 lines).
// The first LV = log2(NPE) stages pair points of different tiles:
//   - all tiles exchange their data lines by NPE*LPT = 32 broadcast bus steps
//     (tile j/LPT sends its line j%LPT in step j), so every tile holds a copy
//     of the whole vector;
//   - each tile then computes its half of every butterfly from its own point
//     and its partner's copy: d = partner + own (lower tile) or partner - own
//     (upper tile), the sign applied with a per-tile mask m as (x ^ m) - m;
//     the result is d * w >>> 15 on the multiply-accumulate unit, with w the
//     twiddle factor in Q15 scaled by 1/2 (the lower tile uses w = 1/2).
// The remaining 7 - LV stages are local and run from a table of butterflies
// (index a, index b, twiddle): sum = (a + b) >>> 1 and (a - b) * w >>> 15.
// Every stage halves, so the output is DFT/128, in bit-reversed order.
// Checks every output word against an integer model of the same arithmetic,
// and against a floating-point DFT within a few LSBs, the number of broadcast
// steps and the exact cycle count.
module fft_run
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
  localparam int N = 128, PPT = N / NPE, LPT = PPT / 4, LV = $clog2(NPE);
  localparam int PT = 128, MT = 136, WT = 256, LT = 512, RXB = 256;  // RXB is a line number
  localparam int NLINES = 160;
  logic rst_n = 0, start = 0, halted;
  logic cfg_we = 0, cfg_rd = 0; cfg_sel_e cfg_sel = CFG_IMEM; logic [PW-1:0] cfg_pe = 0;
  logic [15:0] cfg_addr = 0; logic [127:0] cfg_wdata = 0, cfg_rdata;
  logic [127:0] hb_drv_data;
  logic hb_drv_en, obs_comm, obs_br_stall, obs_loop_back, obs_fwd, obs_hb_get, bus_conflict;
  logic [NB-1:0] obs_seg_on;
  logic [31:0] prog [$];
  logic [15:0] img [8*NLINES];
  logic signed [15:0] xr [N], xi [N], in_r [N], in_i [N];
  int cyc = 0, bcast = 0, conflicts = 0, expected_cycles = 0;
  bit running = 0;

  ss_column #(.ROWS(ROWS)) dut (
    .clk, .rst_n, .en(1'b1), .start, .halted, .cfg_we, .cfg_rd, .cfg_sel, .cfg_pe,
    .cfg_addr, .cfg_wdata, .cfg_rdata, .hb_val('0), .hb_drv_en, .hb_drv_data,
    .obs_comm, .obs_seg_on, .obs_br_stall, .obs_loop_back, .obs_fwd, .obs_hb_get, .bus_conflict);

  always @(posedge clk) if (running && !halted) begin
    cyc++;
    if (obs_comm && obs_seg_on == '0) bcast++;
    if (bus_conflict) conflicts++;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL FFT ROWS=%0d: %s", ROWS, what); end
  endtask
  task automatic cfg(cfg_sel_e s, int pe, int addr, logic [127:0] v);
    @(negedge clk); cfg_we = 1; cfg_sel = s; cfg_pe = PW'(pe); cfg_addr = 16'(addr); cfg_wdata = v;
    @(negedge clk); cfg_we = 0;
  endtask
  task automatic rd(int pe, int line, output logic [127:0] q);
    @(negedge clk); cfg_rd = 1; cfg_sel = CFG_SRAM; cfg_pe = PW'(pe); cfg_addr = 16'(line);
    @(negedge clk); cfg_rd = 0; q = cfg_rdata;
  endtask

  // twiddle W^k = exp(-2*pi*j*k/128), in Q15 scaled by 1/2
  function automatic logic [15:0] tw_r(int k);
    return 16'($rtoi($floor(16384.0 * $cos(2.0 * 3.141592653589793 * k / N) + 0.5)));
  endfunction
  function automatic logic [15:0] tw_i(int k);
    return 16'($rtoi($floor(-16384.0 * $sin(2.0 * 3.141592653589793 * k / N) + 0.5)));
  endfunction
  function automatic logic signed [15:0] q15(longint p);
    longint s = p >>> 15;
    if (s > 32767) return 16'sd32767;
    if (s < -32768) return -16'sd32768;
    return 16'(s);
  endfunction
  function automatic int bitrev7(int v);
    int r = 0;
    for (int b = 0; b < 7; b++) r |= ((v >> b) & 1) << (6 - b);
    return r;
  endfunction

  // ---------------------------------------------------------------- program
  int static_n = 0, extra = 0;
  function automatic void emit(logic [31:0] w); prog.push_back(w); endfunction
  // a loop of `count` over the next body instructions (emitted by the caller)
  task automatic loop_head(int count, int body);
    emit(enc_loop(10'(count), 16'(prog.size() + body)));
    extra += (count - 1) * body;
  endtask
  function automatic logic [31:0] b_alu(alu_op_e op, int rd, int ra, int rb);
    return enc_bundle(op, 4'(rd), 4'(ra), 4'(rb), MAC_NOP, 0, 0);
  endfunction
  function automatic logic [31:0] b_mac(mac_op_e op, int ma, int mb);
    return enc_bundle(ALU_NOP, 0, 0, 0, op, 4'(ma), 4'(mb));
  endfunction

  task automatic build();
    emit(enc_i(OP_LI, 0, 0, 0));
    emit(enc_i(OP_LI, 15, 0, 1));
    emit(enc_i(OP_LI, 14, 0, 16'(LPT - 1)));
    for (int s = 0; s < LV; s++) begin
      // exchange of all data lines
      emit(enc_i(OP_LI, 10, 0, 0));
      loop_head(32, 5);
      emit(b_alu(ALU_AND, 9, 10, 14));
      emit(enc_i(OP_LDTX, 0, 9, 0));
      emit(enc_i(OP_COMM, 0, 0, 0));
      emit(enc_i(OP_STRX, 0, 10, 16'(RXB)));
      emit(b_alu(ALU_ADD, 10, 10, 15));
      // half butterflies against the partner's copy
      emit(enc_i(OP_LD, 12, 0, 16'(PT + s)));
      emit(enc_i(OP_LD, 13, 0, 16'(MT + s)));
      emit(enc_i(OP_LI, 11, 0, 16'(WT + 2 * PPT * s)));
      emit(enc_i(OP_LI, 1, 0, 0));
      loop_head(PPT, 21);
      emit(enc_i(OP_LD, 2, 1, 0));
      emit(enc_i(OP_LD, 3, 1, 16'(PPT)));
      emit(enc_i(OP_LD, 4, 12, 0));
      emit(enc_i(OP_LD, 5, 12, 16'(PPT)));
      emit(enc_i(OP_LD, 6, 11, 0));
      emit(enc_i(OP_LD, 7, 11, 16'(PPT)));
      emit(b_alu(ALU_XOR, 2, 2, 13));
      emit(b_alu(ALU_XOR, 3, 3, 13));
      emit(b_alu(ALU_SUB, 2, 2, 13));
      emit(b_alu(ALU_SUB, 3, 3, 13));
      emit(b_alu(ALU_ADD, 2, 4, 2));
      emit(b_alu(ALU_ADD, 3, 5, 3));
      emit(b_mac(MAC_MUL, 2, 6));
      emit(b_mac(MAC_MSU, 3, 7));
      emit(enc_bundle(ALU_RDACC, 8, 0, 0, MAC_MUL, 2, 7));
      emit(enc_bundle(ALU_ADD, 1, 1, 15, MAC_MAC, 3, 6));  // j advances here,
      emit(b_alu(ALU_RDACC, 9, 0, 0));
      emit(enc_i(OP_ST, 8, 1, 16'hffff));                  // so the stores use j-1
      emit(enc_i(OP_ST, 9, 1, 16'(PPT - 1)));
      emit(b_alu(ALU_ADD, 12, 12, 15));
      emit(b_alu(ALU_ADD, 11, 11, 15));
    end
    // the local stages, PPT/2 butterflies each, from the table
    emit(enc_i(OP_LI, 10, 0, 16'(LT)));
    loop_head(PPT / 2 * (7 - LV), 24);
    emit(enc_i(OP_LD, 1, 10, 0));
    emit(enc_i(OP_LD, 2, 10, 1));
    emit(enc_i(OP_LD, 6, 10, 2));
    emit(enc_i(OP_LD, 7, 10, 3));
    emit(enc_i(OP_LD, 3, 1, 0));
    emit(enc_i(OP_LD, 4, 1, 16'(PPT)));
    emit(enc_i(OP_LD, 5, 2, 0));
    emit(enc_i(OP_LD, 8, 2, 16'(PPT)));
    emit(b_alu(ALU_ADD, 9, 3, 5));
    emit(b_alu(ALU_ADD, 11, 4, 8));
    emit(b_alu(ALU_SUB, 3, 3, 5));
    emit(b_alu(ALU_SUB, 4, 4, 8));
    emit(b_alu(ALU_SHRA, 9, 9, 15));
    emit(b_alu(ALU_SHRA, 11, 11, 15));
    emit(enc_i(OP_ST, 9, 1, 0));
    emit(enc_i(OP_ST, 11, 1, 16'(PPT)));
    emit(b_mac(MAC_MUL, 3, 6));
    emit(b_mac(MAC_MSU, 4, 7));
    emit(enc_bundle(ALU_RDACC, 9, 0, 0, MAC_MUL, 3, 7));
    emit(b_mac(MAC_MAC, 4, 6));
    emit(b_alu(ALU_RDACC, 11, 0, 0));
    emit(enc_i(OP_ST, 9, 2, 0));
    emit(enc_i(OP_ST, 11, 2, 16'(PPT)));
    emit(enc_i(OP_ADDI, 10, 10, 4));
    emit(enc_i(OP_HALT, 0, 0, 0));
    expected_cycles = 1 + prog.size() + extra;
  endtask

  // ---------------------------------------------------------------- model
  task automatic model();
    for (int h = 64; h >= 1; h /= 2)
      for (int i = 0; i < N; i++) if ((i & h) == 0) begin
        logic signed [15:0] sr, si, dr, di, wr, wi;
        int k;
        k = (i % h) * (64 / h);
        wr = tw_r(k); wi = tw_i(k);
        sr = xr[i] + xr[i+h]; si = xi[i] + xi[i+h];
        dr = xr[i] - xr[i+h]; di = xi[i] - xi[i+h];
        xr[i] = sr >>> 1; xi[i] = si >>> 1;
        xr[i+h] = q15(longint'(dr) * wr - longint'(di) * wi);
        xi[i+h] = q15(longint'(dr) * wi + longint'(di) * wr);
      end
  endtask

  initial begin
    logic [127:0] q, v;
    int e;
    checks = 0; failures = 0; done = 0; cycles = 0;
    for (int n = 0; n < N; n++) begin
      in_r[n] = 16'($signed(13'($urandom))); in_i[n] = 16'($signed(13'($urandom)));
      xr[n] = in_r[n]; xi[n] = in_i[n];
    end
    model();
    build();
    wait (go);
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (prog[i]) cfg(CFG_IMEM, 0, i, 128'(prog[i]));
    for (int k = 0; k < 32; k++) cfg(CFG_SEGTBL, 0, k, 128'({{NB{1'b0}}, 1'b0, HB_NONE}));
    cfg(CFG_SEGLEN, 0, 0, 128'd32);
    for (int t = 0; t < NPE; t++) begin
      // memory image of tile t
      for (int a = 0; a < 8 * NLINES; a++) img[a] = '0;
      for (int j = 0; j < PPT; j++) begin
        img[j] = in_r[PPT*t + j]; img[PPT + j] = in_i[PPT*t + j];
      end
      for (int s = 0; s < LV; s++) begin
        int h, q2;
        h = 64 >> s; q2 = t ^ ((NPE / 2) >> s);
        img[PT + s] = 16'(8 * (RXB + LPT * q2));
        img[MT + s] = (t < q2) ? 16'h0000 : 16'hffff;
        for (int j = 0; j < PPT; j++) begin
          int i, k;
          i = PPT * q2 + j;   // index of the lower point when this tile is the upper one
          k = (i % h) * (64 / h);
          img[WT + 2*PPT*s + j]       = (t < q2) ? 16'd16384 : tw_r(k);
          img[WT + 2*PPT*s + PPT + j] = (t < q2) ? 16'd0     : tw_i(k);
        end
      end
      e = 0;
      for (int h = PPT / 2; h >= 1; h /= 2)
        for (int i = 0; i < PPT; i++) if ((i & h) == 0) begin
          int k;
          k = (i % h) * (64 / h);
          img[LT + 4*e] = 16'(i); img[LT + 4*e + 1] = 16'(i + h);
          img[LT + 4*e + 2] = tw_r(k); img[LT + 4*e + 3] = tw_i(k);
          e++;
        end
      for (int k = 0; k < 32; k++) cfg(CFG_COMMTBL, t, k, 128'(k / LPT == t ? C_SEND : C_RECV));
      for (int l = 0; l < NLINES; l++) begin
        for (int w = 0; w < 8; w++) v[w*16 +: 16] = img[8*l + w];
        cfg(CFG_SRAM, t, l, v);
      end
    end
    @(negedge clk); start = 1; @(negedge clk); start = 0; running = 1;
    while (!halted) @(negedge clk);
    running = 0;
    for (int t = 0; t < NPE; t++)
      for (int l = 0; l < LPT; l++) begin
        rd(t, l, q);
        for (int w = 0; w < 8; w++) begin
          int a, m; bit im; logic signed [15:0] got;
          real ref_v, ang;
          a = 8 * l + w; im = a >= PPT; m = PPT * t + (a % PPT);
          got = q[w*16 +: 16];
          chk(got == (im ? xi[m] : xr[m]), $sformatf("tile %0d word %0d", t, a));
          // floating-point DFT of bin bitrev(m), scaled by 1/128
          ref_v = 0.0;
          for (int n = 0; n < N; n++) begin
            ang = -2.0 * 3.141592653589793 * n * bitrev7(m) / N;
            ref_v += im ? (in_r[n] * $sin(ang) + in_i[n] * $cos(ang))
                        : (in_r[n] * $cos(ang) - in_i[n] * $sin(ang));
          end
          ref_v = ref_v / N;
          chk((real'(got) - ref_v) < 8.0 && (ref_v - real'(got)) < 8.0,
              $sformatf("bin %0d %s: %0d vs %f", bitrev7(m), im ? "im" : "re", got, ref_v));
        end
      end
    chk(cyc == expected_cycles, $sformatf("cycles %0d exp %0d", cyc, expected_cycles));
    chk(bcast == LV * 32, "broadcast steps");
    chk(conflicts == 0, "no bus conflicts");
    cycles = cyc;
    $display("FFT 128 on %0dx2 tiles (%0d points per tile): %0d cycles, %0d instructions",
             ROWS, PPT, cyc, prog.size());
    done = 1;
  end
endmodule
