// tb_viterbi: the K=7 Viterbi add-compare-select of viterbi_run on columns of
// 1x2, 2x2, 4x2 and 8x2 tiles side by side (32, 16, 8 and 4 states per tile),
// the tile-count sweep of the decoder. Each run checks every decision, every
// tile's final metrics, the traced-back bits and its exact cycle count.
module tb_viterbi;
  logic clk = 0;
  logic go = 0;
  logic [3:0] done;
  int c [4], f [4], cy [4];
  int checks, failures;
  always #5 clk = ~clk;

  viterbi_run #(.ROWS(1)) r1 (.clk, .go, .done(done[0]), .checks(c[0]), .failures(f[0]), .cycles(cy[0]));
  viterbi_run #(.ROWS(2)) r2 (.clk, .go, .done(done[1]), .checks(c[1]), .failures(f[1]), .cycles(cy[1]));
  viterbi_run #(.ROWS(4)) r4 (.clk, .go, .done(done[2]), .checks(c[2]), .failures(f[2]), .cycles(cy[2]));
  viterbi_run #(.ROWS(8)) r8 (.clk, .go, .done(done[3]), .checks(c[3]), .failures(f[3]), .cycles(cy[3]));

  initial begin
    #20000000;
    checks = c[0] + c[1] + c[2] + c[3];
    failures = f[0] + f[1] + f[2] + f[3] + 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20 go = 1;
    wait (&done);
    checks = c[0] + c[1] + c[2] + c[3];
    failures = f[0] + f[1] + f[2] + f[3];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
