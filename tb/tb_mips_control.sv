// tb_mips_control: self-checking testbench of the main control unit.
//
// Applies every 6-bit opcode and compares the nine control signals with an
// expected table written out in the testbench (R-type, lw, sw, beq rows of the
// control table, plus addi and j); every other opcode must give all zeros.
module tb_mips_control;
  import mips_pkg::*;
  logic [5:0] opcode;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  mips_control dut (.opcode(opcode), .ctrl(ctrl));

  // {RegDst, Jump, Branch, MemRead, MemtoReg, ALUOp[1:0], MemWrite, ALUSrc, RegWrite}
  function automatic logic [9:0] expected(logic [5:0] op);
    case (op)
      6'h00:   return 10'b1_0_0_0_0_10_0_0_1;
      6'h23:   return 10'b0_0_0_1_1_00_0_1_1;
      6'h2B:   return 10'b0_0_0_0_0_00_1_1_0;
      6'h04:   return 10'b0_0_1_0_0_01_0_0_0;
      6'h08:   return 10'b0_0_0_0_0_00_0_1_1;
      6'h02:   return 10'b0_1_0_0_0_00_0_0_0;
      default: return 10'b0;
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 64; i++) begin
      opcode = 6'(i); #1;
      checks++;
      if (ctrl !== expected(opcode)) begin
        failures++;
        $display("FAIL opcode %02h: got %b exp %b", opcode, ctrl, expected(opcode));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
