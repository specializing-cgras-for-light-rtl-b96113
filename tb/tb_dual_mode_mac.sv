// tb_dual_mode_mac: checks the dual-mode MAC against a reference model.
// Random operands and opcodes in both modes; MAC must chain A*B+C only in
// MAC mode and give A*B alone in MUL/ALU mode.
module tb_dual_mode_mac;
  import npcgra_pkg::*;
  int checks = 0, failures = 0;
  logic mac_mode; op_e op; logic [15:0] a, b, c, result; logic wr_out;

  dual_mode_mac dut (.mac_mode, .op, .a, .b, .c, .result, .wr_out);

  function automatic logic [15:0] ref_model(logic m, op_e o, logic [15:0] x, logic [15:0] y, logic [15:0] z);
    int sx, sy;
    sx = int'($signed(x)); sy = int'($signed(y));
    case (o)
      OP_ADD:  return 16'(sx + sy);
      OP_SUB:  return 16'(sx - sy);
      OP_MUL:  return 16'(sx * sy);
      OP_MAC:  return m ? 16'(sx * sy + int'($signed(z))) : 16'(sx * sy);
      OP_AND:  return x & y;
      OP_OR:   return x | y;
      OP_XOR:  return x ^ y;
      OP_SLL:  return x << y[3:0];
      OP_SRA:  return 16'(sx >>> y[3:0]);
      OP_MAX:  return (sx > sy) ? x : y;
      OP_PASS: return x;
      default: return 16'h0;
    endcase
  endfunction

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      mac_mode = 1'($urandom);
      op = op_e'($urandom_range(0, 12));
      a = 16'($urandom); b = 16'($urandom); c = 16'($urandom);
      if (n % 3 == 0) begin a = 16'($urandom_range(0, 40)) - 16'd20; b = 16'($urandom_range(0, 9)); end
      #1;
      checks++;
      if (result !== ref_model(mac_mode, op, a, b, c) || wr_out !== (op != OP_NOP)) begin
        failures++;
        if (failures < 10) $display("FAIL mode=%0d op=%s a=%h b=%h c=%h got=%h exp=%h", mac_mode, op.name(), a, b, c, result, ref_model(mac_mode, op, a, b, c));
      end
    end
    // explicit mode switch on the same MAC
    op = OP_MAC; a = 16'd3; b = 16'd5; c = 16'd100;
    mac_mode = 1'b1; #1; checks++; if (result !== 16'd115) failures++;
    mac_mode = 1'b0; #1; checks++; if (result !== 16'd15) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
