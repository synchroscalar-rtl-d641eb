// ss_column: one Synchroscalar column.
//
// A column is a SIMD controller, its segment controller, a segmented vertical
// bus and ROWS x 2 tiles placed on both sides of the bus (the column is folded
// so the bus stays short). Every tile executes the same instruction stream;
// only the per-tile communication tables make tiles differ in what they put
// on or take off the bus. The whole column advances on the ticks of its own
// rational clock (`en`).
//
// Bus wiring: tile p = 2*row + side drives and reads segment `row`. Segment 0
// also carries the SIMD controller's receive tap (for conditional branches)
// and the horizontal-bus bridge (`hb_*`), which the segment controller owns.
// The SIMD controller's COMM instruction at the tiles is the `comm` step that
// the segment controller and all tile interfaces act on in the same cycle.
//
// Host port (synchronous, usable at any base clock edge; SRAM access only
// while the column is halted): `cfg_we` with `cfg_sel` writes the program,
// the segment schedule, its length, a tile's communication table, or a line of
// a tile's SRAM; `cfg_rd` reads a line of tile `cfg_pe`'s SRAM, returned on
// `cfg_rdata` one cycle later.
// Observation outputs report branch stalls, loop-backs, bus steps, segmenter
// settings, load forwarding and bus conflicts.
module ss_column
  import ss_pkg::*;
#(
  parameter int ROWS       = 4,
  parameter int BUS_W      = 128,
  parameter int SRAM_BYTES = 32768,
  parameter int STEPS      = 32,
  parameter int IMEM_DEPTH = 256,
  localparam int NPE       = 2 * ROWS,
  localparam int SW        = $clog2(STEPS),
  localparam int NB        = (ROWS > 1) ? ROWS - 1 : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic                   start,
  output logic                   halted,
  // host configuration
  input  logic                   cfg_we,
  input  logic                   cfg_rd,
  input  cfg_sel_e               cfg_sel,
  input  logic [$clog2(NPE)-1:0] cfg_pe,
  input  logic [15:0]            cfg_addr,
  input  logic [BUS_W-1:0]       cfg_wdata,
  output logic [BUS_W-1:0]       cfg_rdata,
  // horizontal bus
  input  logic [BUS_W-1:0]       hb_val,
  output logic                   hb_drv_en,
  output logic [BUS_W-1:0]       hb_drv_data,
  // observation
  output logic                   obs_comm,
  output logic [NB-1:0]          obs_seg_on,
  output logic                   obs_br_stall,
  output logic                   obs_loop_back,
  output logic                   obs_fwd,
  output logic                   obs_hb_get,
  output logic                   bus_conflict
);

  logic [31:0]       pe_instr;
  logic              pe_valid, csync, comm, simd_rx, ext_en;
  logic [SW-1:0]     step;
  logic [NB-1:0]     seg_on;
  logic [BUS_W-1:0]  ext_data;
  logic [ROWS-1:0][BUS_W-1:0]       seg_val;
  logic [ROWS-1:0][1:0]             pe_en;
  logic [ROWS-1:0][1:0][BUS_W-1:0]  pe_data;
  logic [NPE-1:0][BUS_W-1:0]        host_rdata;
  logic [NPE-1:0]                   fwd;
  logic [$clog2(NPE)-1:0]           rd_pe_q;

  simd_ctrl #(.IMEM_DEPTH(IMEM_DEPTH)) u_simd (
    .clk, .rst_n, .en, .start,
    .imem_we   (cfg_we && cfg_sel == CFG_IMEM),
    .imem_addr ($clog2(IMEM_DEPTH)'(cfg_addr)),
    .imem_wdata(cfg_wdata[31:0]),
    .rx_valid  (simd_rx),
    .rx_data   (seg_val[0][DATA_W-1:0]),
    .pe_instr, .pe_valid, .csync, .halted,
    .br_stall  (obs_br_stall),
    .loop_back (obs_loop_back)
  );

  assign comm = pe_valid && !pe_instr[31] && (op_e'(pe_instr[30:26]) == OP_COMM);

  seg_ctrl #(.NSEG(ROWS), .BUS_W(BUS_W), .STEPS(STEPS)) u_segc (
    .clk, .rst_n, .en,
    .tbl_we   (cfg_we && cfg_sel == CFG_SEGTBL),
    .tbl_addr (SW'(cfg_addr)),
    .tbl_wdata(cfg_wdata[NB+2:0]),
    .len_we   (cfg_we && cfg_sel == CFG_SEGLEN),
    .len_wdata(cfg_wdata[SW-1:0]),
    .comm, .csync, .step, .seg_on, .simd_rx,
    .seg0_val (seg_val[0]),
    .hb_val, .hb_drv_en, .hb_drv_data, .ext_en, .ext_data
  );

  seg_bus #(.NSEG(ROWS), .BUS_W(BUS_W)) u_bus (
    .seg_on, .pe_en, .pe_data, .ext_en, .ext_data,
    .seg_val, .seg_busy(), .conflict(bus_conflict)
  );

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    pe #(.BUS_W(BUS_W), .SRAM_BYTES(SRAM_BYTES), .STEPS(STEPS)) u_pe (
      .clk, .rst_n, .en,
      .instr     (pe_instr),
      .valid     (pe_valid),
      .step, .comm,
      .bus_in    (seg_val[p/2]),
      .drv_en    (pe_en[p/2][p%2]),
      .drv_data  (pe_data[p/2][p%2]),
      .tbl_we    (cfg_we && cfg_sel == CFG_COMMTBL && cfg_pe == p),
      .tbl_addr  (SW'(cfg_addr)),
      .tbl_wdata (comm_act_e'(cfg_wdata[1:0])),
      .host_req  (cfg_sel == CFG_SRAM && cfg_pe == p && (cfg_we || cfg_rd)),
      .host_we   (cfg_we),
      .host_addr ($clog2(SRAM_BYTES * 8 / BUS_W)'(cfg_addr)),
      .host_wdata(cfg_wdata),
      .host_rdata(host_rdata[p]),
      .fwd_event (fwd[p]),
      .rx_event  ()
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_pe_q <= '0;
    else if (cfg_rd) rd_pe_q <= cfg_pe;
  end

  assign cfg_rdata     = host_rdata[rd_pe_q];
  assign obs_comm      = comm && en;
  assign obs_seg_on    = seg_on;
  assign obs_fwd       = |fwd;
  assign obs_hb_get    = ext_en;

endmodule
