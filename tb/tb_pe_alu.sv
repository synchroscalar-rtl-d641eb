// tb_pe_alu: random operands for every ALU operation, compared with a
// reference computed here with plain integer arithmetic.
module tb_pe_alu;
  import ss_pkg::*;
  alu_op_e op;
  logic [15:0] a, b, y;
  logic signed [39:0] acc;
  int checks = 0, failures = 0;

  pe_alu dut (.op, .a, .b, .acc, .y);

  function automatic logic [15:0] ref_y(alu_op_e o, logic [15:0] x, logic [15:0] z, longint ac);
    int sx, sz; longint q;
    sx = $signed(x); sz = $signed(z);
    case (o)
      ALU_ADD:   return 16'(sx + sz);
      ALU_SUB:   return 16'(sx - sz);
      ALU_AND:   return x & z;
      ALU_OR:    return x | z;
      ALU_XOR:   return x ^ z;
      ALU_SHL:   return 16'(int'(x) * (1 << z[3:0]));
      ALU_SHRA:  return 16'(sx / (1 << z[3:0]) - ((sx < 0 && (sx % (1 << z[3:0])) != 0) ? 1 : 0));
      ALU_MIN:   return 16'((sx < sz) ? sx : sz);
      ALU_MAX:   return 16'((sx > sz) ? sx : sz);
      ALU_MOV:   return x;
      ALU_RDACC: begin
        q = ac / 32768; if (ac < 0 && (ac % 32768) != 0) q = q - 1;
        if (q > 32767) q = 32767; if (q < -32768) q = -32768;
        return 16'(q);
      end
      ALU_ABS:   return 16'((sx < 0) ? ((sx == -32768) ? 32767 : -sx) : sx);
      default:   return 16'd0;
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 20000; n++) begin
      op  = alu_op_e'($urandom % 13);
      a   = 16'($urandom); b = 16'($urandom);
      if (n % 7 == 0) a = 16'h8000;
      acc = {$urandom, $urandom};
      if (n % 3 == 0) acc = 40'(longint'($signed(16'($urandom))) * 32768 + longint'($urandom % 32768));
      #1;
      checks++;
      if (y !== ref_y(op, a, b, longint'(acc))) begin
        failures++;
        if (failures < 10) $display("op %s a=%h b=%h acc=%h y=%h exp=%h", op.name(), a, b, acc, y, ref_y(op, a, b, longint'(acc)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
