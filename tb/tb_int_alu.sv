// tb_int_alu: self-checking testbench of the integer ALU.
//
// Random operands (plus corner values) for every operation; expected values are
// computed in the testbench with 64-bit arithmetic and explicit bit loops for
// the shifts, independently of the RTL expressions.
module tb_int_alu;
  import cfp_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] a, b, y;
  alu_op_t     op;

  int_alu dut (.op(op), .a(a), .b(b), .y(y));

  function automatic logic [31:0] model(alu_op_t o, logic [31:0] x, logic [31:0] z);
    longint sx = longint'($signed(x)), sz = longint'($signed(z));
    logic [63:0] p;
    logic [31:0] r;
    int sh = int'(z[4:0]);
    case (o)
      ALU_ADD:  return 32'(64'(x) + 64'(z));
      ALU_SUB:  return 32'(64'(x) + 64'(~z) + 64'd1);
      ALU_MUL:  begin p = 64'(x) * 64'(z); return p[31:0]; end
      ALU_AND:  return x & z;
      ALU_OR:   return x | z;
      ALU_XOR:  return (x | z) & ~(x & z);
      ALU_NOR:  return ~x & ~z;
      ALU_SLL:  begin r = '0; for (int i = 0; i < 32; i++) if (i - sh >= 0) r[i] = x[i - sh]; return r; end
      ALU_SRL:  begin r = '0; for (int i = 0; i < 32; i++) if (i + sh < 32) r[i] = x[i + sh]; return r; end
      ALU_SRA:  begin for (int i = 0; i < 32; i++) r[i] = (i + sh < 32) ? x[i + sh] : x[31]; return r; end
      ALU_SLT:  return (sx < sz) ? 32'd1 : 32'd0;
      ALU_SLTU: return (64'(x) < 64'(z)) ? 32'd1 : 32'd0;
      default:  return 32'd0;
    endcase
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] corner [4] = '{32'h0, 32'hffffffff, 32'h80000000, 32'h7fffffff};
    for (int i = 0; i < 4000; i++) begin
      a  = (i % 5 == 0) ? corner[$urandom_range(3)] : $urandom;
      b  = (i % 7 == 0) ? corner[$urandom_range(3)] : $urandom;
      op = alu_op_t'($urandom_range(15));
      #1 checks++;
      if (y !== model(op, a, b)) begin
        failures++;
        if (failures < 20) $display("FAIL op=%0d a=%h b=%h y=%h want %h", op, a, b, y, model(op, a, b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
