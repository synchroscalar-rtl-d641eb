// tb_pe_sram: masked line writes and reads at random addresses against a
// reference memory; checks the one-cycle read latency and that rdata holds.
module tb_pe_sram;
  localparam int LINES = 2048;
  logic clk = 0, req = 0, we = 0;
  logic [10:0] addr = 0;
  logic [7:0] wmask = 0;
  logic [127:0] wdata = 0, rdata, exp_q;
  logic [127:0] model [int];
  int checks = 0, failures = 0;

  pe_sram dut (.clk, .req, .we, .addr, .wmask, .wdata, .rdata);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [127:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    // initialise a set of addresses fully
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      req = 1; we = 1; addr = 11'(i * 31 + (i == 63 ? 100 : 0)); if (i == 63) addr = 11'(LINES - 1);
      wmask = '1; wdata = rnd128(); model[addr] = wdata;
    end
    @(negedge clk); req = 0;
    for (int n = 0; n < 3000; n++) begin
      int keys[$];
      keys.delete();
      foreach (model[k]) keys.push_back(k);
      @(negedge clk);
      addr = 11'(keys[$urandom % keys.size()]);
      req = ($urandom % 4) != 0; we = $urandom;
      wmask = 8'($urandom); wdata = rnd128();
      if (req && !we) begin
        exp_q = model[addr];
        @(negedge clk); req = 0;
        checks++;
        if (rdata !== exp_q) begin failures++; $display("read %0d: %h exp %h", addr, rdata, exp_q); end
        @(negedge clk);
        checks++;
        if (rdata !== exp_q) begin failures++; $display("rdata did not hold"); end
      end else if (req && we) begin
        for (int l = 0; l < 8; l++) if (wmask[l]) model[addr][l*16 +: 16] = wdata[l*16 +: 16];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
