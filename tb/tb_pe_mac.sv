// tb_pe_mac: random MAC / MSU / MUL / CLR sequences with random enables,
// checked against a 64-bit integer model wrapped to 40 bits.
module tb_pe_mac;
  import ss_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  mac_op_e op;
  logic [15:0] a, b;
  logic signed [39:0] acc;
  longint model;
  int checks = 0, failures = 0;

  pe_mac dut (.clk, .rst_n, .en, .op, .a, .b, .acc);
  always #5 clk = ~clk;
  initial begin #500000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    model = 0; op = MAC_NOP; a = 0; b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      checks++;
      if (acc !== 40'(model)) begin failures++; if (failures < 10) $display("acc %h exp %h", acc, 40'(model)); end
      op = mac_op_e'($urandom % 5); a = 16'($urandom); b = 16'($urandom);
      en = ($urandom % 5) != 0;
      if (en) case (op)
        MAC_MAC: model = model + longint'($signed(a)) * longint'($signed(b));
        MAC_MSU: model = model - longint'($signed(a)) * longint'($signed(b));
        MAC_MUL: model = longint'($signed(a)) * longint'($signed(b));
        MAC_CLR: model = 0;
        default: ;
      endcase
      model = longint'($signed(40'(model)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
