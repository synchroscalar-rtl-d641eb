// seg_ctrl: central segment controller of one column.
//
// A small reprogrammable state machine that walks the column's static
// communication schedule. It keeps the current step number, which every tile's
// communication interface also uses to look up its own action, and a table of
// STEPS entries giving for each step:
//   seg_on  - which segmenters isolate their neighbours (on) in that step,
//   simd_rx - whether the SIMD controller samples segment 0 (for branches),
//   hb      - the column's horizontal-bus action: PUT captures segment 0 into
//             the bridge register and starts driving the horizontal bus with
//             it, GET drives segment 0 with the horizontal bus value, REL stops
//             driving.
// Timing: in a cycle where `comm` is high (a COMM instruction is at the PEs)
// the entry for `step` is applied combinationally; at the end of that enabled
// cycle the step advances, wrapping after `len` steps (len = 0 means STEPS).
// `csync` restarts the schedule at step 0. Outside a step all segmenters are
// on, so the idle bus is fully split. Table and length are written by the host
// independently of `en`. The table form and the bridge are this design's own
// realisation of a per-column controller that is re-configured per algorithm.
module seg_ctrl
  import ss_pkg::*;
#(
  parameter int NSEG  = 4,
  parameter int BUS_W = 128,
  parameter int STEPS = 32,
  localparam int SW   = $clog2(STEPS),
  localparam int NB   = (NSEG > 1) ? NSEG - 1 : 1,
  localparam int EW   = NB + 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             tbl_we,
  input  logic [SW-1:0]    tbl_addr,
  input  logic [EW-1:0]    tbl_wdata,   // {seg_on, simd_rx, hb}
  input  logic             len_we,
  input  logic [SW-1:0]    len_wdata,
  input  logic             comm,
  input  logic             csync,
  output logic [SW-1:0]    step,
  output logic [NB-1:0]    seg_on,
  output logic             simd_rx,
  // horizontal-bus bridge
  input  logic [BUS_W-1:0] seg0_val,
  input  logic [BUS_W-1:0] hb_val,
  output logic             hb_drv_en,
  output logic [BUS_W-1:0] hb_drv_data,
  output logic             ext_en,
  output logic [BUS_W-1:0] ext_data
);

  typedef struct packed {
    logic [NB-1:0]   seg_on;
    logic            simd_rx;
    hb_act_e         hb;
  } entry_t;

  entry_t          tbl [STEPS];
  entry_t          cur;
  logic [SW-1:0]   len;
  logic            active;
  logic [BUS_W-1:0] hb_drv_data_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < STEPS; i++) tbl[i] <= '{seg_on: '1, simd_rx: 1'b0, hb: HB_NONE};
      len <= '0;
    end else begin
      if (tbl_we) tbl[tbl_addr] <= entry_t'(tbl_wdata);
      if (len_we) len <= len_wdata;
    end
  end

  assign cur     = tbl[step];
  assign active  = comm && en;
  assign seg_on  = active ? cur.seg_on : '1;
  assign simd_rx = active && cur.simd_rx;
  assign ext_en  = active && (cur.hb == HB_GET);
  assign ext_data = ext_en ? hb_val : '0;
  assign hb_drv_data = hb_drv_en ? hb_drv_data_q : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step          <= '0;
      hb_drv_en     <= 1'b0;
      hb_drv_data_q <= '0;
    end else if (en) begin
      if (csync) begin
        step <= '0;
      end else if (comm) begin
        step <= (step == len - SW'(1)) ? '0 : step + SW'(1);
      end
      if (comm && cur.hb == HB_PUT) begin
        hb_drv_en     <= 1'b1;
        hb_drv_data_q <= seg0_val;
      end else if (comm && cur.hb == HB_REL) begin
        hb_drv_en     <= 1'b0;
      end
    end
  end

endmodule
