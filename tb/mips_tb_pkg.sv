// mips_tb_pkg: program builder and instruction-set reference model for the
// pipeline testbenches.
//
// `prog_builder` assembles MIPS words (encoding helpers below) into a program
// image: directed loops, and random programs mixing dependent ALU operations,
// loads and stores, forward branches, counted loops, jumps and subroutine calls.
// Every program ends in a `j` to itself, the halt.  `ref_model` executes a program
// one instruction at a time, with no notion of a pipeline, and records what each
// instruction writes and stores, in order.  It also works out the cycle count the
// predict-not-taken pipeline must take: n instructions need n + 4 cycles, plus 1
// per jump, 2 per taken branch or JR/JALR, and 1 per load followed by an
// instruction whose Rs or Rt field names the loaded register.  A builder made
// with `delay_slot` set writes delayed-branch code (every jump and branch is
// followed by a delay-slot instruction, and offsets skip it); the model then
// runs the delay slot before the target, links PC+8, and gives the delayed-
// branch cycle count: n + 4, plus 1 per taken branch or JR/JALR, plus 1 per
// load-use (none for a load in a taken branch's slot: the lost cycle covers it).
package mips_tb_pkg;
  import mips_pkg::*;

  function automatic logic [31:0] enc_r(logic [5:0] funct, int rd, int rs, int rt, int sa = 0);
    return {OP_RTYPE, 5'(rs), 5'(rt), 5'(rd), 5'(sa), funct};
  endfunction

  function automatic logic [31:0] enc_i(logic [5:0] op, int rt, int rs, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  function automatic logic [31:0] enc_j(logic [5:0] op, int word_addr);
    return {op, 26'(word_addr)};
  endfunction

  class prog_builder;
    logic [31:0] words[int];   // word address -> instruction
    int          pc;           // next word address of the main program
    int          sub_next;     // next free word of the subroutine area
    int          halt_word;
    bit          ds;           // delayed-branch code: one delay slot after each jump or branch

    function new(int sub_base = 600, bit delay_slot = 1'b0);
      pc = 0;
      sub_next = sub_base;
      ds = delay_slot;
    endfunction

    function void emit(logic [31:0] w);
      words[pc] = w;
      pc++;
    endfunction

    // a jump or branch; in delayed-branch code its delay slot follows: a random
    // ALU or memory instruction when `rand_slot` is set, else `slot`
    function void ctl(logic [31:0] w, bit rand_slot = 1'b1, logic [31:0] slot = NOP);
      emit(w);
      if (ds) emit(rand_slot ? rand_simple() : slot);
    endfunction

    function void halt();
      halt_word = pc;
      ctl(enc_j(OP_J, pc), 1'b0);
    endfunction

    function int rnd(int lo, int hi);
      return lo + int'($urandom_range(hi - lo));
    endfunction

    // random ALU instruction writing r1..r8 from r0..r8
    function logic [31:0] rand_alu();
      logic [5:0] fr[11] = '{F_ADD, F_ADDU, F_SUB, F_SUBU, F_AND, F_OR, F_XOR, F_NOR,
                             F_SLT, F_SLTU, F_SLL};
      logic [5:0] oi[7]  = '{OP_ADDI, OP_ADDIU, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI};
      int k = rnd(0, 9);
      if (k < 5)      return enc_r(fr[rnd(0, 10)], rnd(1, 8), rnd(0, 8), rnd(0, 8), rnd(0, 31));
      else if (k < 6) return enc_r(rnd(0, 1) ? F_SRL : F_SRA, rnd(1, 8), 0, rnd(0, 8), rnd(0, 31));
      else if (k < 7) return enc_i(OP_LUI, rnd(1, 8), 0, rnd(0, 65535));
      else            return enc_i(oi[rnd(0, 6)], rnd(1, 8), rnd(0, 8), rnd(0, 65535));
    endfunction

    function logic [31:0] rand_mem();
      if (rnd(0, 1) == 1) return enc_i(OP_LW, rnd(1, 8), 0, 4 * rnd(0, 15));
      else                return enc_i(OP_SW, rnd(0, 8), 0, 4 * rnd(0, 15));
    endfunction

    function logic [31:0] rand_simple();
      return (rnd(0, 2) == 0) ? rand_mem() : rand_alu();
    endfunction

    // the 16 data words all programs use start defined
    function void prologue();
      for (int i = 0; i < 16; i++) begin
        emit(enc_i(OP_ADDIU, 1, 0, rnd(0, 65535)));
        emit(enc_i(OP_SW, 1, 0, 4 * i));
      end
    endfunction

    function void rand_segment(bit in_loop);
      int k = rnd(0, 11);
      if (k < 5) begin
        repeat (rnd(1, 4)) emit(rand_simple());
      end else if (k < 7) begin : fwd_branch
        int skip = rnd(1, 3);
        ctl(enc_i(rnd(0, 1) ? OP_BEQ : OP_BNE, rnd(0, 8), rnd(0, 8), skip + int'(ds)));
        repeat (skip) emit(rand_simple());
      end else if (k < 8) begin : fwd_jump
        int skip = rnd(1, 2);
        ctl(enc_j(rnd(0, 3) == 0 ? OP_JAL : OP_J, pc + 1 + int'(ds) + skip));
        repeat (skip) emit(rand_simple());
      end else if (k < 9 && !in_loop) begin : loop
        int head;
        emit(enc_i(OP_ADDI, 16, 0, rnd(1, 5)));
        head = pc;
        repeat (rnd(1, 4)) rand_segment(1'b1);
        emit(enc_i(OP_ADDI, 16, 16, -1));
        ctl(enc_i(OP_BNE, 0, 16, head - (pc + 1)));
      end else begin : call
        int sub = sub_next;
        int save = pc;
        // subroutine body in the subroutine area
        pc = sub_next;
        repeat (rnd(1, 3)) emit(rand_simple());
        ctl(enc_r(F_JR, 0, 31, 0));
        sub_next = pc;
        pc = save;
        if (rnd(0, 1) == 1) begin
          ctl(enc_j(OP_JAL, sub));
        end else begin
          emit(enc_i(OP_ADDIU, 10, 0, 4 * sub));
          if (rnd(0, 1) == 1) emit(rand_alu());
          ctl(enc_r(F_JALR, 31, 10, 0));
        end
      end
    endfunction

    function void random_program(int segments);
      prologue();
      repeat (segments) rand_segment(1'b0);
      halt();
    endfunction

    // n independent instructions, then halt
    function void straight(int n);
      for (int i = 0; i < n; i++) emit(enc_i(OP_ADDIU, 1 + (i % 8), 0, i));
      halt();
    endfunction

    // outer loop of `outer` iterations around an inner loop of `inner`
    function void nested_loops(int outer, int inner);
      int o, in;
      emit(enc_i(OP_ADDI, 17, 0, outer));
      o = pc;
      emit(enc_i(OP_ADDI, 16, 0, inner));
      in = pc;
      emit(enc_i(OP_ADDI, 1, 1, 1));
      emit(enc_i(OP_ADDI, 16, 16, -1));
      ctl(enc_i(OP_BNE, 0, 16, in - (pc + 1)), 1'b0);
      emit(enc_i(OP_ADDI, 17, 17, -1));
      ctl(enc_i(OP_BNE, 0, 17, o - (pc + 1)), 1'b0);
      halt();
    endfunction
  endclass

  class ref_model;
    logic [31:0] r[32];
    logic [31:0] m[int];
    // expected completions, in order
    int          exp_pc[$];
    bit          exp_we[$];
    int          exp_rd[$];
    logic [31:0] exp_data[$];
    // expected stores, in order
    logic [31:0] st_addr[$];
    logic [31:0] st_data[$];
    int          pnt_cycles;   // predict not taken, no delay slots
    int          ds_cycles;    // delayed branch
    int          n_jump, n_taken, n_loaduse;

    function void run(prog_builder p, int max_steps = 100000);
      int pc = 0, npc = 1;
      int link = p.ds ? 2 : 1;   // return address, in words after the jump
      logic [31:0] prev = NOP;
      bit ex_tk1 = 0, ex_tk2 = 0;  // taken branch/JR one and two instructions back
      foreach (r[i]) r[i] = '0;
      n_jump = 0; n_taken = 0; n_loaduse = 0;
      for (int step = 0; step < max_steps; step++) begin
        logic [31:0] w = p.words.exists(pc) ? p.words[pc] : NOP;
        logic [5:0]  op = w[31:26], fn = w[5:0];
        int rs = w[25:21], rt = w[20:16], rd = w[15:11], sa = w[10:6];
        logic [31:0] a = r[rs], b = r[rt];
        logic [31:0] se = {{16{w[15]}}, w[15:0]}, ze = {16'd0, w[15:0]};
        int tgt = -1;              // jump or taken-branch target
        int taken0 = n_taken;
        bit we = 0; int dst = 0; logic [31:0] val = '0;
        // in delayed-branch code a load in the slot of a taken branch reaches
        // its user (the target) behind the killed fetch: no stall
        if (prev[31:26] == OP_LW && prev[20:16] != 0 && !(p.ds && ex_tk2) &&
            (rs == int'(prev[20:16]) || rt == int'(prev[20:16])))
          n_loaduse++;
        unique case (op)
          OP_RTYPE: begin
            we = 1; dst = rd;
            unique case (fn)
              F_ADD, F_ADDU: val = a + b;
              F_SUB, F_SUBU: val = a - b;
              F_AND: val = a & b;
              F_OR:  val = a | b;
              F_XOR: val = a ^ b;
              F_NOR: val = ~(a | b);
              F_SLT: val = ($signed(a) < $signed(b)) ? 1 : 0;
              F_SLTU: val = (a < b) ? 1 : 0;
              F_SLL: val = b << sa;
              F_SRL: val = b >> sa;
              F_SRA: val = $signed(b) >>> sa;
              F_JR:  begin we = 0; tgt = a[31:2]; n_taken++; end
              F_JALR: begin val = 32'(4 * (pc + link)); tgt = a[31:2]; n_taken++; end
              default: we = 0;
            endcase
          end
          OP_J:   begin tgt = w[25:0]; n_jump++; end
          OP_JAL: begin tgt = w[25:0]; n_jump++; we = 1; dst = 31; val = 32'(4 * (pc + link)); end
          OP_BEQ: if (a == b) begin tgt = pc + 1 + int'($signed(w[15:0])); n_taken++; end
          OP_BNE: if (a != b) begin tgt = pc + 1 + int'($signed(w[15:0])); n_taken++; end
          OP_ADDI, OP_ADDIU: begin we = 1; dst = rt; val = a + se; end
          OP_SLTI:  begin we = 1; dst = rt; val = ($signed(a) < $signed(se)) ? 1 : 0; end
          OP_SLTIU: begin we = 1; dst = rt; val = (a < se) ? 1 : 0; end
          OP_ANDI:  begin we = 1; dst = rt; val = a & ze; end
          OP_ORI:   begin we = 1; dst = rt; val = a | ze; end
          OP_XORI:  begin we = 1; dst = rt; val = a ^ ze; end
          OP_LUI:   begin we = 1; dst = rt; val = {w[15:0], 16'd0}; end
          OP_LW: begin
            logic [31:0] ad = a + se;
            we = 1; dst = rt;
            val = m.exists(int'(ad[31:2])) ? m[int'(ad[31:2])] : 32'hDEAD_BEEF;
          end
          OP_SW: begin
            logic [31:0] ad = a + se;
            m[int'(ad[31:2])] = b;
            st_addr.push_back(ad);
            st_data.push_back(b);
          end
          default: ;
        endcase
        if (dst == 0) we = 0;
        if (we) r[dst] = val;
        exp_pc.push_back(4 * pc);
        exp_we.push_back(we);
        exp_rd.push_back(dst);
        exp_data.push_back(val);
        if (pc == p.halt_word) break;
        prev = w;
        ex_tk2 = ex_tk1;
        ex_tk1 = (n_taken != taken0);
        if (p.ds) begin
          // the instruction after a jump or branch runs before the target
          pc  = npc;
          npc = (tgt >= 0) ? tgt : npc + 1;
        end else begin
          pc  = (tgt >= 0) ? tgt : pc + 1;
        end
      end
      // the halt's own jump costs nothing before it completes
      pnt_cycles = exp_pc.size() + 4 + (n_jump - 1) + 2 * n_taken + n_loaduse;
      // with a delay slot a jump costs nothing and a taken branch or JR one cycle
      ds_cycles = exp_pc.size() + 4 + n_taken + n_loaduse;
    endfunction
  endclass
endpackage
