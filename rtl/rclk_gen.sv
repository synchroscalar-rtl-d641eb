// rclk_gen: rational clock generator for the columns.
//
// Every column runs at its own fixed frequency, and any two column
// frequencies are in an integer ratio, so the cycles at which two columns can
// exchange data fall at known, repeating points and need no synchronisers.
// This block derives all column clocks from one base clock: column c ticks
// (col_en[c] high for one base cycle) once every DIV[c] base cycles, giving
// f_c = f_base / DIV[c] and f_m / f_n = DIV[n] / DIV[m]. All dividers start
// together after reset, so every column ticks in base cycle 0, and `all_en`
// marks the base cycles in which all columns tick together (every
// lcm(DIV) cycles). The ratio scheme follows rational clocking; producing
// the column clocks as enables of a single clock, and the default ratios, are
// this design's choices (separate clock trees and supply voltages are not
// modelled).
module rclk_gen #(
  parameter int NCOLS = 3,
  parameter int unsigned DIV [NCOLS] = '{1, 2, 3}
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [NCOLS-1:0] col_en,
  output logic             all_en
);

  logic [NCOLS-1:0][7:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
    end else begin
      for (int c = 0; c < NCOLS; c++)
        cnt[c] <= (cnt[c] == 8'(DIV[c] - 1)) ? 8'd0 : cnt[c] + 8'd1;
    end
  end

  always_comb begin
    for (int c = 0; c < NCOLS; c++) col_en[c] = (cnt[c] == 8'd0);
    all_en = &col_en;
  end

endmodule
