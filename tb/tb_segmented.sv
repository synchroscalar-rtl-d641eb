// tb_segmented: segmented against unsegmented bus. The 128-tap FIR of fir_run
// runs on 2x2, 4x2 and 8x2 columns twice: once with its reduction tree using
// the segmenters (every level's messages share the bus in one step, log2(NPE)
// steps per output) and once on the joined bus only (one message per step,
// NPE-1 steps per output). Both must give the same checked outputs; the bench
// also checks that the segmented run is shorter by exactly the saved bus
// steps, NOUT * (NPE - 1 - log2(NPE)) cycles.
// That a segmented bus lets several messages use the wires at once, and that
// all segmenters off gives one broadcast bus, follow the architecture; the
// FIR kernel, its reduction tree and the cycle comparison are this design's
// own. Power is not modelled.
module tb_segmented;
  localparam int NOUT = 7;
  logic clk = 0;
  logic go = 0;
  logic [5:0] done;
  int c [6], f [6], cy [6];
  int checks, failures;
  always #5 clk = ~clk;

  fir_run #(.ROWS(2), .SEG(1'b1)) s2 (.clk, .go, .done(done[0]), .checks(c[0]), .failures(f[0]), .cycles(cy[0]));
  fir_run #(.ROWS(2), .SEG(1'b0)) u2 (.clk, .go, .done(done[1]), .checks(c[1]), .failures(f[1]), .cycles(cy[1]));
  fir_run #(.ROWS(4), .SEG(1'b1)) s4 (.clk, .go, .done(done[2]), .checks(c[2]), .failures(f[2]), .cycles(cy[2]));
  fir_run #(.ROWS(4), .SEG(1'b0)) u4 (.clk, .go, .done(done[3]), .checks(c[3]), .failures(f[3]), .cycles(cy[3]));
  fir_run #(.ROWS(8), .SEG(1'b1)) s8 (.clk, .go, .done(done[4]), .checks(c[4]), .failures(f[4]), .cycles(cy[4]));
  fir_run #(.ROWS(8), .SEG(1'b0)) u8 (.clk, .go, .done(done[5]), .checks(c[5]), .failures(f[5]), .cycles(cy[5]));

  function automatic int sum(int v [6]);
    int r = 0;
    foreach (v[i]) r += v[i];
    return r;
  endfunction

  initial begin
    #5000000;
    $display("TB_RESULT checks=%0d failures=%0d", sum(c), sum(f) + 1);
    $finish;
  end

  initial begin
    #20 go = 1;
    wait (&done);
    checks = sum(c);
    failures = sum(f);
    for (int r = 0; r < 3; r++) begin
      int npe, lv;
      npe = 4 << r; lv = 2 + r;
      checks++;
      if (cy[2*r+1] - cy[2*r] != NOUT * (npe - 1 - lv)) begin
        failures++;
        $display("FAIL %0d tiles: segmented %0d cycles, unsegmented %0d", npe, cy[2*r], cy[2*r+1]);
      end else
        $display("%0d tiles: segmented %0d cycles, unsegmented %0d (%0d against %0d bus steps per output)",
                 npe, cy[2*r], cy[2*r+1], lv, npe - 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
