// pe_comm: communication interface of one processing element.
//
// All tiles of a column receive the same instructions, but each tile plays a
// different part in a bus transfer, so each has its own small programmable
// engine: a table of STEPS entries giving, for every step of the column's
// static communication schedule, whether this tile sends, receives or stays
// off the bus. The segment controller supplies the current `step`; `comm` is
// high in the cycle the column performs that step.
//   send:    drive `drv_data` (the transmit line buffer) onto the tile's bus
//            segment for that cycle (`drv_en` high, combinational).
//   receive: capture the segment value `bus_in` into the receive buffer on
//            the clock edge at the end of the cycle.
//   both:    send, and capture the bus like a receiver, so that the tile that
//            broadcasts a line ends up with the same receive buffer as its
//            listeners and all tiles can run the same store instruction.
// The transmit buffer is loaded by the tile (`tx_wr`, from an SRAM read); a
// load arriving in the same cycle as a send is forwarded straight to the bus.
// The table is written by the host (`tbl_we`) independently of `en` and
// resets to all-idle. Table depth and the buffer scheme are this design's own.
module pe_comm
  import ss_pkg::*;
#(
  parameter int BUS_W = 128,
  parameter int STEPS = 32,
  localparam int SW   = $clog2(STEPS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             tbl_we,
  input  logic [SW-1:0]    tbl_addr,
  input  comm_act_e        tbl_wdata,
  input  logic [SW-1:0]    step,
  input  logic             comm,
  input  logic [BUS_W-1:0] bus_in,
  input  logic             tx_wr,
  input  logic [BUS_W-1:0] tx_wdata,
  output logic             drv_en,
  output logic [BUS_W-1:0] drv_data,
  output logic [BUS_W-1:0] rx_buf,
  output logic             rx_event
);

  comm_act_e         tbl [STEPS];
  logic [BUS_W-1:0]  tx_buf;
  comm_act_e         act;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < STEPS; i++) tbl[i] <= C_IDLE;
    end else if (tbl_we) begin
      tbl[tbl_addr] <= tbl_wdata;
    end
  end

  assign act      = tbl[step];
  assign drv_en   = comm && (act == C_SEND || act == C_BOTH);
  assign drv_data = drv_en ? (tx_wr ? tx_wdata : tx_buf) : '0;
  assign rx_event = en && comm && (act == C_RECV || act == C_BOTH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_buf <= '0;
      rx_buf <= '0;
    end else if (en) begin
      if (tx_wr) tx_buf <= tx_wdata;
      if (comm && (act == C_RECV || act == C_BOTH)) rx_buf <= bus_in;
    end
  end

endmodule
