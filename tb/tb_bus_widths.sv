// tb_bus_widths: the bus-width sweep. Five 4x2 columns with global buses of
// 32, 64, 256, 1024 and 4096 bits (128 bits is the default, run by
// tb_tile_configs) each run the kernel of tile_cfg_run: a dot product per
// tile, a segment-parallel exchange, a broadcast feeding a branch, and the
// exact cycle count. The bus width sets the line width of every tile's SRAM
// and message size; the kernel's cycle count does not depend on it.
module tb_bus_widths;
  logic clk = 0;
  logic go = 0;
  logic [4:0] done;
  int c [5], f [5];
  int checks, failures;
  always #5 clk = ~clk;

  tile_cfg_run #(.ROWS(4), .BUS_W(32))   w32   (.clk, .go, .done(done[0]), .checks(c[0]), .failures(f[0]));
  tile_cfg_run #(.ROWS(4), .BUS_W(64))   w64   (.clk, .go, .done(done[1]), .checks(c[1]), .failures(f[1]));
  tile_cfg_run #(.ROWS(4), .BUS_W(256))  w256  (.clk, .go, .done(done[2]), .checks(c[2]), .failures(f[2]));
  tile_cfg_run #(.ROWS(4), .BUS_W(1024)) w1024 (.clk, .go, .done(done[3]), .checks(c[3]), .failures(f[3]));
  tile_cfg_run #(.ROWS(4), .BUS_W(4096)) w4096 (.clk, .go, .done(done[4]), .checks(c[4]), .failures(f[4]));

  initial begin
    #1000000;
    checks = c[0] + c[1] + c[2] + c[3] + c[4];
    failures = f[0] + f[1] + f[2] + f[3] + f[4] + 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20 go = 1;
    wait (&done);
    checks = c[0] + c[1] + c[2] + c[3] + c[4];
    failures = f[0] + f[1] + f[2] + f[3] + f[4];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
