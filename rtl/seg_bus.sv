// seg_bus: segmented vertical bus of one column.
//
// The column bus is cut into NSEG segments, one per row of tiles, with a
// segmenter (a transmission-gate switch in silicon) on each of the NSEG-1
// boundaries. A segmenter that is on isolates the segments on its two sides;
// one that is off joins them. With every segmenter off the bus is a single
// broadcast wire; with some on, each group of joined segments carries its own
// message in the same cycle.
// Each segment has two tile drivers (the tiles on either side of the bus);
// segment 0, next to the SIMD controller, has one more driver for data coming
// from the horizontal bus. Every segment's value is the OR of the enabled
// drivers in its group (0 if none drives); `conflict` flags a group with two
// or more drivers, which a correct static schedule never produces.
// Purely combinational: a value crosses the whole column within one cycle.
module seg_bus #(
  parameter int NSEG  = 4,
  parameter int BUS_W = 128,
  // segmenter count; a one-segment bus keeps one unused control bit
  localparam int NB   = (NSEG > 1) ? NSEG - 1 : 1
) (
  input  logic [NB-1:0]                     seg_on,
  input  logic [NSEG-1:0][1:0]              pe_en,
  input  logic [NSEG-1:0][1:0][BUS_W-1:0]   pe_data,
  input  logic                              ext_en,
  input  logic [BUS_W-1:0]                  ext_data,
  output logic [NSEG-1:0][BUS_W-1:0]        seg_val,
  output logic [NSEG-1:0]                   seg_busy,
  output logic                              conflict
);

  // local value and driver count per segment
  logic [NSEG-1:0][BUS_W-1:0] loc_val;
  logic [NSEG-1:0][1:0]       loc_cnt;

  always_comb begin
    for (int s = 0; s < NSEG; s++) begin
      loc_val[s] = '0;
      loc_cnt[s] = '0;
      for (int k = 0; k < 2; k++) begin
        if (pe_en[s][k]) begin
          loc_val[s] = loc_val[s] | pe_data[s][k];
          loc_cnt[s] = loc_cnt[s] + 2'd1;
        end
      end
      if (s == 0 && ext_en) begin
        loc_val[s] = loc_val[s] | ext_data;
        loc_cnt[s] = loc_cnt[s] + 2'd1;
      end
    end
  end

  // group value seen from each segment
  always_comb begin
    conflict = 1'b0;
    for (int s = 0; s < NSEG; s++) begin
      int unsigned cnt;
      logic joined;
      seg_val[s] = loc_val[s];
      cnt        = 32'(loc_cnt[s]);
      // walk up
      joined = 1'b1;
      for (int j = s - 1; j >= 0; j--) begin
        joined = joined && !seg_on[j];
        if (joined) begin
          seg_val[s] = seg_val[s] | loc_val[j];
          cnt        = cnt + 32'(loc_cnt[j]);
        end
      end
      // walk down
      joined = 1'b1;
      for (int j = s + 1; j < NSEG; j++) begin
        joined = joined && !seg_on[j-1];
        if (joined) begin
          seg_val[s] = seg_val[s] | loc_val[j];
          cnt        = cnt + 32'(loc_cnt[j]);
        end
      end
      seg_busy[s] = (cnt != 0);
      if (cnt > 1) conflict = 1'b1;
    end
  end

endmodule
