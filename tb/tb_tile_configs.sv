// tb_tile_configs: the column sizes of the tile-count sweep, 1x2, 2x2, 4x2
// and 8x2 tiles, each running the kernel of tile_cfg_run (segment-parallel
// exchange, broadcast, branch, cycle count) side by side.
module tb_tile_configs;
  logic clk = 0;
  logic go = 0;
  logic [3:0] done;
  int c [4], f [4];
  int checks, failures;
  always #5 clk = ~clk;

  tile_cfg_run #(.ROWS(1)) r1 (.clk, .go, .done(done[0]), .checks(c[0]), .failures(f[0]));
  tile_cfg_run #(.ROWS(2)) r2 (.clk, .go, .done(done[1]), .checks(c[1]), .failures(f[1]));
  tile_cfg_run #(.ROWS(4)) r4 (.clk, .go, .done(done[2]), .checks(c[2]), .failures(f[2]));
  tile_cfg_run #(.ROWS(8)) r8 (.clk, .go, .done(done[3]), .checks(c[3]), .failures(f[3]));

  initial begin
    #1000000;
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
