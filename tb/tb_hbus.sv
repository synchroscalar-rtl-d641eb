// tb_hbus: random driver sets on the horizontal bus; checks the carried
// value with zero or one driver and the conflict flag with two or more.
module tb_hbus;
  logic [2:0] drv_en; logic [2:0][127:0] drv_data; logic [127:0] val; logic conflict;
  int checks = 0, failures = 0;
  hbus dut (.drv_en, .drv_data, .val, .conflict);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int n = 0; n < 2000; n++) begin
      int cnt; logic [127:0] e;
      drv_en = 3'($urandom);
      for (int c = 0; c < 3; c++) drv_data[c] = {$urandom, $urandom, $urandom, $urandom};
      #1;
      cnt = $countones(drv_en); e = '0;
      for (int c = 0; c < 3; c++) if (drv_en[c]) e = drv_data[c];
      checks++;
      if (conflict !== (cnt > 1)) begin failures++; $display("conflict wrong"); end
      if (cnt <= 1) begin checks++; if (val !== e) begin failures++; $display("val wrong"); end end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
