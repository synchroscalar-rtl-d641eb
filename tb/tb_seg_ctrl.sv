// tb_seg_ctrl: loads a random schedule of length 5, then applies random
// communication steps, enables and restarts, and checks step number, wrap,
// segmenter outputs, the SIMD receive strobe and the horizontal-bus bridge
// (PUT captures segment 0 and drives it, GET forwards the bus, REL stops).
module tb_seg_ctrl;
  import ss_pkg::*;
  localparam int LEN = 5;
  logic clk = 0, rst_n = 0, en = 1;
  logic tbl_we = 0, len_we = 0, comm = 0, csync = 0;
  logic [4:0] tbl_addr = 0, len_wdata = 0, step;
  logic [5:0] tbl_wdata = 0;
  logic [2:0] seg_on; logic simd_rx, hb_drv_en, ext_en;
  logic [127:0] seg0_val = 0, hb_val = 0, hb_drv_data, ext_data;
  logic [5:0] sched [32];
  int m_step; logic m_drv; logic [127:0] m_data;
  int checks = 0, failures = 0, puts = 0, gets = 0, wraps = 0;

  seg_ctrl dut (.clk, .rst_n, .en, .tbl_we, .tbl_addr, .tbl_wdata, .len_we, .len_wdata,
                .comm, .csync, .step, .seg_on, .simd_rx, .seg0_val, .hb_val,
                .hb_drv_en, .hb_drv_data, .ext_en, .ext_data);
  always #5 clk = ~clk;
  initial begin #500000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s (step %0d)", what, m_step); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < LEN; i++) begin
      @(negedge clk);
      sched[i] = 6'($urandom);
      if (i == 0) sched[i][1:0] = HB_PUT;
      if (i == 2) sched[i][1:0] = HB_GET;
      if (i == 4) sched[i][1:0] = HB_REL;
      tbl_we = 1; tbl_addr = 5'(i); tbl_wdata = sched[i];
    end
    @(negedge clk); tbl_we = 0; len_we = 1; len_wdata = 5'(LEN);
    @(negedge clk); len_we = 0;
    m_step = 0; m_drv = 0; m_data = '0;
    for (int n = 0; n < 3000; n++) begin
      logic [5:0] e;
      @(negedge clk);
      comm = ($urandom % 3) != 0; en = ($urandom % 4) != 0; csync = ($urandom % 23) == 0;
      seg0_val = {$urandom, $urandom, $urandom, $urandom}; hb_val = {$urandom, $urandom, $urandom, $urandom};
      #1;
      e = sched[m_step];
      chk(step == 5'(m_step), "step");
      chk(seg_on == ((comm && en) ? e[5:3] : 3'b111), "seg_on");
      chk(simd_rx == (comm && en && e[2]), "simd_rx");
      chk(ext_en == (comm && en && e[1:0] == HB_GET), "ext_en");
      if (ext_en) chk(ext_data == hb_val, "ext_data");
      chk(hb_drv_en == m_drv && (!m_drv || hb_drv_data == m_data), "hb drive");
      if (en) begin
        if (comm && e[1:0] == HB_PUT) begin m_drv = 1; m_data = seg0_val; puts++; end
        if (comm && e[1:0] == HB_REL) m_drv = 0;
        if (comm && e[1:0] == HB_GET) gets++;
        if (csync) m_step = 0;
        else if (comm) begin m_step = (m_step == LEN - 1) ? 0 : m_step + 1; if (m_step == 0) wraps++; end
      end
    end
    if (puts == 0 || gets == 0 || wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
