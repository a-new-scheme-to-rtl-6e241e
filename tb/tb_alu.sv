// tb_alu: self-checking test of the ALU. Random and corner operands for every
// operation are compared with results computed here from the operation's
// definition (16-bit wrap-around arithmetic, shifts by the low 4 bits of B,
// signed less-than), and the zero flag is checked against operand A.
module tb_alu;
  import dpp_pkg::*;
  alu_op_e     op;
  logic [15:0] a, b, y;
  logic        zero;
  int checks = 0, failures = 0;

  alu #(.W(16)) dut (.op, .a, .b, .y, .zero);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] model(alu_op_e o, logic [15:0] x, logic [15:0] z);
    int sx = int'($signed(x)), sz = int'($signed(z));
    int s  = int'(z[3:0]);
    case (o)
      ALU_ADD: return 16'(int'(x) + int'(z));
      ALU_SUB: return 16'(int'(x) - int'(z));
      ALU_AND: return x & z;
      ALU_OR:  return x | z;
      ALU_XOR: return x ^ z;
      ALU_SLL: return 16'(int'(x) * (1 << s));
      ALU_SRL: return 16'(int'(x) / (1 << s));
      ALU_SRA: return 16'(sx >>> s);
      ALU_SLT: return (sx < sz) ? 16'd1 : 16'd0;
      default: return '0;
    endcase
  endfunction

  initial begin
    logic [15:0] corner [6] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF, 16'h000F};
    for (int o = 0; o <= int'(ALU_SLT); o++) begin
      for (int i = 0; i < 6; i++) for (int j = 0; j < 6; j++) begin
        op = alu_op_e'(o); a = corner[i]; b = corner[j];
        #1;
        checks++;
        if (y !== model(op, a, b)) begin
          failures++;
          $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", o, a, b, y, model(op, a, b));
        end
      end
      for (int n = 0; n < 300; n++) begin
        op = alu_op_e'(o); a = 16'($urandom); b = 16'($urandom);
        #1;
        checks += 2;
        if (y !== model(op, a, b)) begin
          failures++;
          $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", o, a, b, y, model(op, a, b));
        end
        if (zero !== (a == 0)) failures++;
      end
    end
    a = 0; b = 16'h1234; op = ALU_ADD; #1;
    checks++; if (zero !== 1'b1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
