// tb_rclk_gen: checks that column c ticks exactly every DIV[c] base cycles,
// that all start together after reset, and that the common tick comes every
// lcm(DIV) = 6 cycles (default ratios 1:2:3).
module tb_rclk_gen;
  logic clk = 0, rst_n = 0;
  logic [2:0] col_en; logic all_en;
  int checks = 0, failures = 0;
  int unsigned div [3] = '{1, 2, 3};
  rclk_gen dut (.clk, .rst_n, .col_en, .all_en);
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      for (int c = 0; c < 3; c++) begin
        checks++;
        if (col_en[c] !== ((t % div[c]) == 0)) begin failures++; $display("t=%0d col %0d", t, c); end
      end
      checks++;
      if (all_en !== ((t % 6) == 0)) begin failures++; $display("all_en t=%0d", t); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
