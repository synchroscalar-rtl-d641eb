// tb_pe_comm: programs a random send/receive/both/idle schedule, walks the steps
// with random bus values and checks drive enable, driven data (including the
// same-cycle transmit-buffer bypass) and the receive buffer.
module tb_pe_comm;
  import ss_pkg::*;
  logic clk = 0, rst_n = 0, en = 1;
  logic tbl_we = 0; logic [4:0] tbl_addr = 0; comm_act_e tbl_wdata = C_IDLE;
  logic [4:0] step = 0; logic comm = 0;
  logic [127:0] bus_in = 0, tx_wdata = 0, drv_data, rx_buf, m_tx, m_rx, exp_d;
  logic tx_wr = 0, drv_en, rx_event;
  comm_act_e sched [32];
  int checks = 0, failures = 0, bypasses = 0;

  pe_comm dut (.clk, .rst_n, .en, .tbl_we, .tbl_addr, .tbl_wdata, .step, .comm, .bus_in,
               .tx_wr, .tx_wdata, .drv_en, .drv_data, .rx_buf, .rx_event);
  always #5 clk = ~clk;
  initial begin #500000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    m_tx = 0; m_rx = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      sched[i] = comm_act_e'($urandom % 4);
      tbl_we = 1; tbl_addr = 5'(i); tbl_wdata = sched[i];
    end
    @(negedge clk); tbl_we = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      step = 5'($urandom); comm = ($urandom % 3) != 0; en = ($urandom % 4) != 0;
      bus_in = {$urandom, $urandom, $urandom, $urandom};
      tx_wr = ($urandom % 3) == 0; tx_wdata = {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks++;
      if (drv_en !== (comm && (sched[step] == C_SEND || sched[step] == C_BOTH))) begin failures++; $display("drv_en wrong"); end
      if (drv_en) begin
        exp_d = tx_wr ? tx_wdata : m_tx;
        if (tx_wr) bypasses++;
        checks++;
        if (drv_data !== exp_d) begin failures++; $display("drv_data wrong step %0d", step); end
      end
      if (en) begin
        if (tx_wr) m_tx = tx_wdata;
        if (comm && (sched[step] == C_RECV || sched[step] == C_BOTH)) m_rx = bus_in;
      end
      @(posedge clk); #1;
      checks++;
      if (rx_buf !== m_rx) begin failures++; $display("rx_buf wrong"); end
    end
    if (bypasses == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
