// hbus: horizontal bus joining the column buses.
//
// A single shared bus running across all columns. Each column may drive it
// through its bridge (`drv_en[c]`, `drv_data[c]`); every column sees `val`,
// the OR of the enabled drivers (0 when idle). Because columns run on
// rationally related clocks derived from one base clock, a driving column
// holds its value from one of its own ticks to the next, and a receiving
// column samples it on one of its ticks chosen by the static schedule.
// `conflict` flags two drivers at once, which a correct schedule never does.
module hbus #(
  parameter int NCOLS = 3,
  parameter int BUS_W = 128
) (
  input  logic [NCOLS-1:0]            drv_en,
  input  logic [NCOLS-1:0][BUS_W-1:0] drv_data,
  output logic [BUS_W-1:0]            val,
  output logic                        conflict
);

  always_comb begin
    int unsigned n;
    n   = 0;
    val = '0;
    for (int c = 0; c < NCOLS; c++) begin
      if (drv_en[c]) begin
        val = val | drv_data[c];
        n   = n + 1;
      end
    end
    conflict = (n > 1);
  end

endmodule
