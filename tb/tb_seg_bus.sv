// tb_seg_bus: random segmenter settings; one driver per joined group (or
// none), checks every segment's value; then forces two drivers into one
// group and checks the conflict flag. Counts cycles with two or more groups
// carrying messages at once and full-broadcast cycles.
module tb_seg_bus;
  localparam int NSEG = 4;
  logic [NSEG-2:0] seg_on;
  logic [NSEG-1:0][1:0] pe_en;
  logic [NSEG-1:0][1:0][127:0] pe_data;
  logic ext_en; logic [127:0] ext_data;
  logic [NSEG-1:0][127:0] seg_val;
  logic [NSEG-1:0] seg_busy;
  logic conflict;
  int checks = 0, failures = 0, parallel = 0, broadcast = 0;
  int grp [NSEG];
  logic [127:0] gval [NSEG];

  seg_bus dut (.seg_on, .pe_en, .pe_data, .ext_en, .ext_data, .seg_val, .seg_busy, .conflict);
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int ng, msgs;
      seg_on = 3'($urandom);
      if (n % 10 == 0) seg_on = '0;
      // group numbers
      ng = 0; grp[0] = 0;
      for (int s = 1; s < NSEG; s++) begin if (seg_on[s-1]) ng++; grp[s] = ng; end
      pe_en = '0; ext_en = 0; ext_data = '0; msgs = 0;
      for (int s = 0; s < NSEG; s++) for (int k = 0; k < 2; k++) pe_data[s][k] = {$urandom, $urandom, $urandom, $urandom};
      for (int g = 0; g <= ng; g++) begin
        int members[$]; int pick;
        members.delete();
        gval[g] = '0;
        if ($urandom % 4 == 0) continue;
        for (int s = 0; s < NSEG; s++) if (grp[s] == g) begin members.push_back(2*s); members.push_back(2*s+1); end
        if (g == 0) members.push_back(-1);
        pick = members[$urandom % members.size()];
        msgs++;
        if (pick < 0) begin ext_en = 1; ext_data = {$urandom, $urandom, $urandom, $urandom}; gval[g] = ext_data; end
        else begin pe_en[pick/2][pick%2] = 1; gval[g] = pe_data[pick/2][pick%2]; end
      end
      #1;
      if (msgs >= 2) parallel++;
      if (seg_on == 0 && msgs == 1) broadcast++;
      for (int s = 0; s < NSEG; s++) begin
        checks++;
        if (seg_val[s] !== gval[grp[s]]) begin failures++; $display("seg %0d wrong (seg_on=%b)", s, seg_on); end
      end
      checks++;
      if (conflict) begin failures++; $display("false conflict"); end
      // now add a second driver in group of segment 0
      pe_en[NSEG-1][0] = 1; pe_en[NSEG-1][1] = 1;
      #1;
      checks++;
      if (!conflict) begin failures++; $display("conflict missed"); end
    end
    if (parallel == 0 || broadcast == 0) failures++;
    $display("parallel=%0d broadcast=%0d", parallel, broadcast);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
