// tb_pe_regfile: random two-port writes and four-port reads against a
// reference array; checks write priority of port 0 and that nothing changes
// while the enable is low.
module tb_pe_regfile;
  logic clk = 0, rst_n = 0, en = 0;
  logic [3:0][3:0]  raddr;
  logic [3:0][15:0] rdata;
  logic we0, we1;
  logic [3:0] wa0, wa1;
  logic [15:0] wd0, wd1;
  logic [15:0] model [16];
  int checks = 0, failures = 0;

  pe_regfile dut (.clk, .rst_n, .en, .raddr, .rdata, .we0, .waddr0(wa0), .wdata0(wd0),
                  .we1, .waddr1(wa1), .wdata1(wd1));

  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int i = 0; i < 16; i++) model[i] = 0;
    we0 = 0; we1 = 0; wa0 = 0; wa1 = 0; wd0 = 0; wd1 = 0; raddr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // check reads
      for (int k = 0; k < 4; k++) raddr[k] = 4'($urandom);
      #1;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (rdata[k] !== model[raddr[k]]) begin
          failures++; $display("read mismatch port %0d r%0d: %h vs %h", k, raddr[k], rdata[k], model[raddr[k]]);
        end
      end
      en  = ($urandom % 4) != 0;
      we0 = $urandom; we1 = $urandom;
      wa0 = 4'($urandom); wa1 = ($urandom % 3 == 0) ? wa0 : 4'($urandom);
      wd0 = 16'($urandom); wd1 = 16'($urandom);
      if (en) begin
        if (we1) model[wa1] = wd1;
        if (we0) model[wa0] = wd0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
