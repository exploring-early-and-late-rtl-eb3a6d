// tb_alu: self-checking test of the ALU. Every operation and branch condition
// is applied to corner values and random operands and compared with results
// computed here from the operation's definition. Combinational: 1 step each.
module tb_alu;
  import dcpu_pkg::*;
  alu_op_e op;
  br_e br;
  logic [31:0] a, b, y;
  logic taken;
  int checks = 0, failures = 0;

  alu dut (.op, .br, .a, .b, .y, .taken);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_y(alu_op_e o, logic [31:0] x, logic [31:0] z);
    logic [31:0] r;
    case (o)
      ALU_ADD:  return x + z;
      ALU_SUB:  return x + ~z + 1;
      ALU_AND:  return x & z;
      ALU_OR:   return x | z;
      ALU_XOR:  return x ^ z;
      ALU_NOR:  return ~x & ~z;
      ALU_SLT:  return (x[31] != z[31]) ? {31'd0, x[31]} : {31'd0, x < z};
      ALU_SLTU: return {31'd0, x < z};
      ALU_SLL:  begin r = z; repeat (x[4:0]) r = {r[30:0], 1'b0}; return r; end
      ALU_SRL:  begin r = z; repeat (x[4:0]) r = {1'b0, r[31:1]}; return r; end
      ALU_SRA:  begin r = z; repeat (x[4:0]) r = {r[31], r[31:1]}; return r; end
      ALU_LUI:  return {z[15:0], 16'h0000};
      default:  return 0;
    endcase
  endfunction

  function automatic logic ref_t(br_e c, logic [31:0] x, logic [31:0] z);
    case (c)
      BR_EQ:  return x == z;
      BR_NE:  return x != z;
      BR_LEZ: return x[31] || x == 0;
      BR_GTZ: return !x[31] && x != 0;
      BR_LTZ: return x[31];
      BR_GEZ: return !x[31];
      BR_J, BR_JR: return 1;
      default: return 0;
    endcase
  endfunction

  logic [31:0] corners [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h0000_001F};

  task automatic apply(logic [31:0] x, logic [31:0] z);
    for (int o = 0; o <= int'(ALU_LUI); o++) begin
      for (int c = 0; c <= int'(BR_JR); c++) begin
        op = alu_op_e'(o); br = br_e'(c); a = x; b = z;
        #1;
        checks++;
        if (y !== ref_y(op, x, z) || taken !== ref_t(br, x, z)) begin
          failures++;
          if (failures < 10) $display("FAIL op=%s br=%s a=%h b=%h y=%h t=%b", op.name(), br.name(), x, z, y, taken);
        end
      end
    end
  endtask

  initial begin
    foreach (corners[i]) foreach (corners[j]) apply(corners[i], corners[j]);
    repeat (300) apply($urandom, $urandom);
    repeat (50) begin logic [31:0] v; v = $urandom; apply(v, v); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
