// synchroscalar: top level of the tile array.
//
// NCOLS columns (see ss_column), each a SIMD group of ROWS x 2 tiles on a
// segmented bus, side by side. Each column runs on its own clock, derived
// from one base clock `clk` by rclk_gen so that every pair of column
// frequencies is in an integer ratio (column c ticks every DIV[c] base
// cycles). The column buses are joined by one horizontal bus (hbus); a column
// puts a line on it and other columns pick it up at ticks fixed by the static
// schedule.
// Per-column ports: `start`, `halted`, the host configuration port and the
// observation outputs of ss_column, as arrays indexed by column. `col_en`
// shows the column ticks and `hb_conflict` flags two columns driving the
// horizontal bus at once.
// Column count and clock ratios are this design's defaults (three columns,
// as in the usual drawing of the array); rows per column and bus width follow
// the preferred 4x2 tiles and 128-bit bus.
module synchroscalar
  import ss_pkg::*;
#(
  parameter int NCOLS      = 3,
  parameter int unsigned DIV [NCOLS] = '{1, 2, 3},
  parameter int ROWS       = 4,
  parameter int BUS_W      = 128,
  parameter int SRAM_BYTES = 32768,
  parameter int STEPS      = 32,
  parameter int IMEM_DEPTH = 256,
  localparam int NPE       = 2 * ROWS,
  localparam int NB        = (ROWS > 1) ? ROWS - 1 : 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [NCOLS-1:0]                  start,
  output logic [NCOLS-1:0]                  halted,
  input  logic [NCOLS-1:0]                  cfg_we,
  input  logic [NCOLS-1:0]                  cfg_rd,
  input  cfg_sel_e                          cfg_sel   [NCOLS],
  input  logic [NCOLS-1:0][$clog2(NPE)-1:0] cfg_pe,
  input  logic [NCOLS-1:0][15:0]            cfg_addr,
  input  logic [NCOLS-1:0][BUS_W-1:0]       cfg_wdata,
  output logic [NCOLS-1:0][BUS_W-1:0]       cfg_rdata,
  output logic [NCOLS-1:0]                  col_en,
  output logic                              all_en,
  output logic [NCOLS-1:0]                  obs_comm,
  output logic [NCOLS-1:0][NB-1:0]          obs_seg_on,
  output logic [NCOLS-1:0]                  obs_br_stall,
  output logic [NCOLS-1:0]                  obs_loop_back,
  output logic [NCOLS-1:0]                  obs_fwd,
  output logic [NCOLS-1:0]                  obs_hb_get,
  output logic [NCOLS-1:0]                  bus_conflict,
  output logic                              hb_conflict
);

  logic [NCOLS-1:0]            hb_drv_en;
  logic [NCOLS-1:0][BUS_W-1:0] hb_drv_data;
  logic [BUS_W-1:0]            hb_val;

  rclk_gen #(.NCOLS(NCOLS), .DIV(DIV)) u_clk (.clk, .rst_n, .col_en, .all_en);

  hbus #(.NCOLS(NCOLS), .BUS_W(BUS_W)) u_hbus (
    .drv_en(hb_drv_en), .drv_data(hb_drv_data), .val(hb_val), .conflict(hb_conflict)
  );

  for (genvar c = 0; c < NCOLS; c++) begin : g_col
    ss_column #(.ROWS(ROWS), .BUS_W(BUS_W), .SRAM_BYTES(SRAM_BYTES),
                .STEPS(STEPS), .IMEM_DEPTH(IMEM_DEPTH)) u_col (
      .clk, .rst_n,
      .en           (col_en[c]),
      .start        (start[c]),
      .halted       (halted[c]),
      .cfg_we       (cfg_we[c]),
      .cfg_rd       (cfg_rd[c]),
      .cfg_sel      (cfg_sel[c]),
      .cfg_pe       (cfg_pe[c]),
      .cfg_addr     (cfg_addr[c]),
      .cfg_wdata    (cfg_wdata[c]),
      .cfg_rdata    (cfg_rdata[c]),
      .hb_val,
      .hb_drv_en    (hb_drv_en[c]),
      .hb_drv_data  (hb_drv_data[c]),
      .obs_comm     (obs_comm[c]),
      .obs_seg_on   (obs_seg_on[c]),
      .obs_br_stall (obs_br_stall[c]),
      .obs_loop_back(obs_loop_back[c]),
      .obs_fwd      (obs_fwd[c]),
      .obs_hb_get   (obs_hb_get[c]),
      .bus_conflict (bus_conflict[c])
    );
  end

endmodule
