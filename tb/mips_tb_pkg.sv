// mips_tb_pkg: verification helpers for the MIPS processor testbenches.
//
// Contains a small assembler (functions that encode R, I and J instructions),
// a directed test program that exercises every instruction and mechanism of
// the processor, and an instruction-set reference model (class mips_iss) that
// executes one instruction per call on its own copy of the registers, data
// memory and PC. The model is written from the MIPS instruction definitions,
// not from the RTL, so the testbenches can compare the RTL against it cycle by
// cycle. Data width W and PC width PC_W are parameters of the model, matching
// the RTL parameters of the same names.
package mips_tb_pkg;

  typedef bit [31:0] word_q_t[$];

  localparam bit [5:0] OPC_R = 6'h00, OPC_J = 6'h02, OPC_BEQ = 6'h04,
                       OPC_ADDI = 6'h08, OPC_LW = 6'h23, OPC_SW = 6'h2B;
  localparam bit [5:0] FC_SLL = 6'h00, FC_SRL = 6'h02, FC_ADD = 6'h20,
                       FC_SUB = 6'h22, FC_AND = 6'h24, FC_OR = 6'h25, FC_SLT = 6'h2A;

  function automatic bit [31:0] asm_r(bit [5:0] fn, int rd, int rs, int rt, int sh = 0);
    return {OPC_R, 5'(rs), 5'(rt), 5'(rd), 5'(sh), fn};
  endfunction
  function automatic bit [31:0] asm_i(bit [5:0] op, int rt, int rs, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic bit [31:0] asm_j(int word_target);
    return {OPC_J, 26'(word_target)};
  endfunction

  // Directed program. Registers start at their own numbers after reset.
  // BYTES is the data width in bytes, so word addresses stay aligned.
  // Results are stored at 0x40 + k*BYTES; the loop stores at 0x20 + n*BYTES.
  function automatic word_q_t directed_program(int W);
    word_q_t p;
    int B = W / 8;
    p.push_back(asm_r(FC_ADD, 10, 1, 2));            //  0 r10 = 1 + 2
    p.push_back(asm_r(FC_SUB, 11, 5, 3));            //  1 r11 = 5 - 3
    p.push_back(asm_r(FC_AND, 12, 6, 7));            //  2 r12 = 6 & 7
    p.push_back(asm_r(FC_OR,  13, 8, 4));            //  3 r13 = 8 | 4
    p.push_back(asm_r(FC_SLT, 14, 3, 9));            //  4 r14 = 3 < 9
    p.push_back(asm_r(FC_SLT, 15, 9, 3));            //  5 r15 = 9 < 3
    p.push_back(asm_r(FC_SLL, 16, 0, 3, 2));         //  6 r16 = 3 << 2
    p.push_back(asm_r(FC_SRL, 17, 0, 16, 1));        //  7 r17 = r16 >> 1
    p.push_back(asm_i(OPC_ADDI, 18, 0, 100));        //  8 r18 = 100
    p.push_back(asm_i(OPC_ADDI, 19, 18, -7));        //  9 r19 = 93
    p.push_back(asm_i(OPC_ADDI, 20, 0, 1));          // 10 r20 = 1
    p.push_back(asm_r(FC_SLL, 20, 0, 20, W - 1));    // 11 r20 = most negative
    p.push_back(asm_r(FC_ADD, 21, 20, 20));          // 12 overflow
    p.push_back(asm_i(OPC_ADDI, 22, 0, 0));          // 13 r22 = 0 (loop count)
    p.push_back(asm_i(OPC_ADDI, 28, 0, 'h20));       // 14 r28 = pointer
    p.push_back(asm_i(OPC_ADDI, 22, 22, 1));         // 15 L: r22++
    p.push_back(asm_i(OPC_ADDI, 28, 28, B));         // 16 pointer += B
    p.push_back(asm_i(OPC_SW, 22, 28, 0));           // 17 mem[r28] = r22
    p.push_back(asm_i(OPC_BEQ, 22, 4, 1));           // 18 if r22 == 4 skip next
    p.push_back(asm_i(OPC_BEQ, 0, 0, -5));           // 19 back to L
    p.push_back(asm_j(22));                          // 20 jump over 21
    p.push_back(asm_i(OPC_ADDI, 26, 0, 55));         // 21 skipped
    p.push_back(asm_i(OPC_LW, 24, 0, 'h20 + 2*B));   // 22 r24 = 2
    p.push_back(asm_r(FC_ADD, 25, 24, 24));          // 23 r25 = 4
    p.push_back(asm_i(OPC_SW, 25, 24, 'h40 - 2));    // 24 store at base+reg
    p.push_back(32'hFC00_0000);                      // 25 unknown opcode: no-op
    for (int k = 10; k <= 26; k++)
      p.push_back(asm_i(OPC_SW, k, 0, 'h40 + (k - 10) * B));
    p.push_back(asm_j(p.size()));                    // end: jump to self
    return p;
  endfunction

  // Schedules a program for the pipelined processor, which has no hazard
  // logic: j becomes beq r0,r0 (same target), no-ops are inserted so that an
  // instruction reads a register no earlier than four slots after the
  // instruction that writes it, three no-ops follow every branch, and branch
  // offsets are recomputed for the new positions.
  function automatic word_q_t schedule_for_pipeline(word_q_t p);
    word_q_t c, o;
    int pos [];
    int last_wr [32];
    c = p;
    foreach (c[i]) if (c[i][31:26] == OPC_J) c[i] = asm_i(OPC_BEQ, 0, 0, int'(c[i][25:0]) - i - 1);
    pos = new[c.size() + 1];
    foreach (last_wr[r]) last_wr[r] = -100;
    foreach (c[i]) begin
      bit [5:0] op = c[i][31:26];
      int rs = c[i][25:21], rt = c[i][20:16], rd = c[i][15:11];
      int need = 0, wr = -1;
      bit rd_rs = (op == OPC_R || op == OPC_ADDI || op == OPC_LW || op == OPC_SW || op == OPC_BEQ);
      bit rd_rt = (op == OPC_R || op == OPC_SW || op == OPC_BEQ);
      if (rd_rs && rs != 0) need = last_wr[rs] + 4;
      if (rd_rt && rt != 0 && last_wr[rt] + 4 > need) need = last_wr[rt] + 4;
      while (o.size() < need) o.push_back(32'h0);
      pos[i] = o.size();
      o.push_back(c[i]);
      if (op == OPC_R) wr = rd; else if (op == OPC_ADDI || op == OPC_LW) wr = rt;
      if (wr > 0) last_wr[wr] = pos[i];
      if (op == OPC_BEQ) repeat (3) o.push_back(32'h0);
    end
    pos[c.size()] = o.size();
    foreach (c[i]) if (c[i][31:26] == OPC_BEQ) begin
      int t = i + 1 + int'(signed'(c[i][15:0]));
      o[pos[i]][15:0] = 16'(pos[t] - (pos[i] + 1));
    end
    return o;
  endfunction

  class mips_iss #(int W = 8, int PC_W = 8);
    bit [W-1:0]    regs [32];
    bit [W-1:0]    dmem [int];
    bit [PC_W-1:0] pc;
    // What the last step did.
    bit            st_valid;
    bit [PC_W-1:0] st_pc;
    bit [W-1:0]    st_addr, st_data;
    bit            is_arith, ovf, br_taken, br_not_taken, jumped, loaded;

    function new();
      reset();
    endfunction

    function void reset();
      for (int i = 0; i < 32; i++) regs[i] = W'(i);
      pc = '0;
    endfunction

    function bit [W-1:0] imm_of(bit [31:0] ins);
      if (W >= 16) return W'(signed'(ins[15:0]));
      return ins[W-1:0];
    endfunction

    function int word_index(bit [W-1:0] a);
      return (W > 8) ? int'(a) / (W / 8) : int'(a);
    endfunction

    function void step(bit [31:0] ins);
      bit [5:0] op = ins[31:26];
      bit [4:0] rs = ins[25:21], rt = ins[20:16], rd = ins[15:11], sh = ins[10:6];
      bit [W-1:0] a = regs[rs], b = regs[rt], imm = imm_of(ins), r;
      bit [PC_W-1:0] pc4 = pc + 4;
      longint sa = longint'(signed'(a)), sb = longint'(signed'(b)), si = longint'(signed'(imm));
      longint lo = -(64'sd1 <<< (W - 1)), hi = (64'sd1 <<< (W - 1)) - 1;
      st_valid = 0; is_arith = 0; ovf = 0; br_taken = 0; br_not_taken = 0; jumped = 0; loaded = 0;
      pc = pc4;
      case (op)
        OPC_R: begin
          case (ins[5:0])
            FC_ADD: begin r = a + b; is_arith = 1; ovf = (sa + sb < lo) || (sa + sb > hi); end
            FC_SUB: begin r = a - b; is_arith = 1; ovf = (sa - sb < lo) || (sa - sb > hi); end
            FC_AND: r = a & b;
            FC_OR:  r = a | b;
            FC_SLT: r = (sa < sb) ? 1 : 0;
            FC_SLL: r = b << sh;
            FC_SRL: r = b >> sh;
            default: r = a + b;
          endcase
          if (rd != 0) regs[rd] = r;
        end
        OPC_ADDI: begin
          r = a + imm; is_arith = 1; ovf = (sa + si < lo) || (sa + si > hi);
          if (rt != 0) regs[rt] = r;
        end
        OPC_LW: begin
          r = a + imm; loaded = 1;
          if (rt != 0) regs[rt] = dmem.exists(word_index(r)) ? dmem[word_index(r)] : '0;
        end
        OPC_SW: begin
          r = a + imm; st_valid = 1; st_addr = r; st_data = b; st_pc = pc4 - 4;
          dmem[word_index(r)] = b;
        end
        OPC_BEQ: begin
          if (a == b) begin
            longint off = si * 4;
            pc = pc4 + PC_W'(off);
            br_taken = 1;
          end else br_not_taken = 1;
        end
        OPC_J: begin
          bit [31:0] t = {32'(pc4) & 32'hF000_0000} | {4'b0, ins[25:0], 2'b00};
          pc = t[PC_W-1:0];
          jumped = 1;
        end
        default: ;
      endcase
    endfunction
  endclass

endpackage
