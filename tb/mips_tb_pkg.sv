// mips_tb_pkg: testbench support for the MIPS2000 core.
//
// * Instruction encoders (a tiny assembler) for the MIPS R2000 formats.
// * mips_iss: an instruction-at-a-time reference model of the same
//   instruction set, written independently of the RTL. It runs a program
//   until it reaches the "go forever" instruction (a jump to itself) and
//   records every register write in order, the data memory, the number of
//   taken control transfers and the number of load-use stalls the pipeline
//   should insert, and the trace of fetch addresses.
package mips_tb_pkg;

  // ---------------- encoders ----------------
  function automatic logic [31:0] r_op(input int fn, input int rd, input int rs, input int rt, input int sh = 0);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sh), 6'(fn)};
  endfunction
  function automatic logic [31:0] i_op(input int op, input int rt, input int rs, input int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] j_op(input int op, input int byte_addr);
    return {6'(op), 26'(byte_addr >> 2)};
  endfunction
  // branch from byte address pc to byte address target
  function automatic logic [31:0] br_op(input int op, input int rs, input int rt, input int pc, input int target);
    return {6'(op), 5'(rs), 5'(rt), 16'((target - (pc + 4)) >>> 2)};
  endfunction

  // ---------------- reference model ----------------
  class mips_iss;
    logic [31:0] pmem [int];
    logic [31:0] dmem [4096];
    logic [31:0] regs [32];
    int          wlog_addr [$];
    logic [31:0] wlog_data [$];
    int          fetch_trace [$];
    int          n_instr, n_transfer, n_stall, n_loads, n_stores;
    int          gfo_pc;

    function new();
      foreach (regs[i]) regs[i] = '0;
      foreach (dmem[i]) dmem[i] = '0;
    endfunction

    function logic [31:0] fetch(int pc);
      return pmem.exists(pc >> 2) ? pmem[pc >> 2] : 32'h0;
    endfunction

    function void wr(int r, logic [31:0] v);
      if (r != 0) begin
        regs[r] = v;
        wlog_addr.push_back(r);
        wlog_data.push_back(v);
      end
    endfunction

    function logic [7:0] rdb(logic [31:0] a);
      logic [31:0] w = dmem[a[13:2]];
      return w[8*(3-a[1:0]) +: 8];
    endfunction
    function void wrb(logic [31:0] a, logic [7:0] v);
      dmem[a[13:2]][8*(3-a[1:0]) +: 8] = v;
    endfunction

    static function bit is_ld(logic [5:0] op);
      return op inside {6'h20, 6'h21, 6'h22, 6'h23, 6'h24, 6'h25, 6'h26};
    endfunction

    // run until the first jump-to-self; max_steps guards against runaway
    function void run(int max_steps = 100000);
      int pc = 0;
      logic [31:0] ir, prev_ir;
      bit prev_valid = 0;
      n_instr = 0; n_transfer = 0; n_stall = 0; n_loads = 0; n_stores = 0;
      repeat (max_steps) begin
        logic [5:0] op, fn; logic [4:0] rs, rt, rd, sh;
        logic [31:0] a, b, simm, zimm, ea, npc, w;
        int k;
        fetch_trace.push_back(pc);
        ir = fetch(pc);
        op = ir[31:26]; rs = ir[25:21]; rt = ir[20:16]; rd = ir[15:11]; sh = ir[10:6]; fn = ir[5:0];
        if (op == 6'h02 && (int'({4'(pc >> 28), ir[25:0], 2'b00}) == pc)) begin gfo_pc = pc; return; end
        // load-use stall: previous instruction a load whose rt is this one's rs or rt field
        if (prev_valid && is_ld(prev_ir[31:26]) && (prev_ir[20:16] == rs || prev_ir[20:16] == rt)) n_stall++;
        prev_ir = ir; prev_valid = 1;
        n_instr++;
        a = regs[rs]; b = regs[rt];
        simm = {{16{ir[15]}}, ir[15:0]}; zimm = {16'h0, ir[15:0]};
        npc = pc + 4;
        ea = a + simm; k = ea[1:0];
        unique case (op)
          6'h00: unique case (fn)
            6'h00: wr(rd, b << sh);
            6'h02: wr(rd, b >> sh);
            6'h03: wr(rd, $signed(b) >>> sh);
            6'h04: wr(rd, b << a[4:0]);
            6'h06: wr(rd, b >> a[4:0]);
            6'h07: wr(rd, $signed(b) >>> a[4:0]);
            6'h08: begin npc = a; end
            6'h09: begin wr(rd == 0 ? 31 : int'(rd), pc + 4); npc = a; end
            6'h20, 6'h21: wr(rd, a + b);
            6'h22, 6'h23: wr(rd, a - b);
            6'h24: wr(rd, a & b);
            6'h25: wr(rd, a | b);
            6'h26: wr(rd, a ^ b);
            6'h27: wr(rd, ~(a | b));
            6'h2A: wr(rd, {31'b0, $signed(a) < $signed(b)});
            6'h2B: wr(rd, {31'b0, a < b});
            default: ;
          endcase
          6'h01: begin
            bit t = rt[0] ? !a[31] : a[31];
            if (rt[4]) wr(31, pc + 4);
            if (t) npc = pc + 4 + (simm << 2);
          end
          6'h02: npc = {npc[31:28], ir[25:0], 2'b00};
          6'h03: begin wr(31, pc + 4); npc = {npc[31:28], ir[25:0], 2'b00}; end
          6'h04: if (a == b) npc = pc + 4 + (simm << 2);
          6'h05: if (a != b) npc = pc + 4 + (simm << 2);
          6'h06: if ($signed(a) <= 0) npc = pc + 4 + (simm << 2);
          6'h07: if ($signed(a) > 0) npc = pc + 4 + (simm << 2);
          6'h08, 6'h09: wr(rt, a + simm);
          6'h0A: wr(rt, {31'b0, $signed(a) < $signed(simm)});
          6'h0B: wr(rt, {31'b0, a < simm});
          6'h0C: wr(rt, a & zimm);
          6'h0D: wr(rt, a | zimm);
          6'h0E: wr(rt, a ^ zimm);
          6'h0F: wr(rt, {ir[15:0], 16'h0});
          6'h20: begin n_loads++; wr(rt, {{24{rdb(ea)[7]}}, rdb(ea)}); end
          6'h24: begin n_loads++; wr(rt, {24'h0, rdb(ea)}); end
          6'h21: begin n_loads++; w = {rdb({ea[31:1], 1'b0}), rdb({ea[31:1], 1'b1})}; wr(rt, {{16{w[15]}}, w[15:0]}); end
          6'h25: begin n_loads++; w = {rdb({ea[31:1], 1'b0}), rdb({ea[31:1], 1'b1})}; wr(rt, {16'h0, w[15:0]}); end
          6'h23: begin n_loads++; wr(rt, dmem[ea[13:2]]); end
          6'h22: begin // lwl: bytes k..3 of the word into rt from the top
            n_loads++; w = b;
            for (int j = k; j < 4; j++) w[8*(3-(j-k)) +: 8] = rdb({ea[31:2], 2'(j)});
            wr(rt, w);
          end
          6'h26: begin // lwr: bytes 0..k of the word into rt from the bottom
            n_loads++; w = b;
            for (int j = 0; j <= k; j++) w[8*(k-j) +: 8] = rdb({ea[31:2], 2'(j)});
            wr(rt, w);
          end
          6'h28: begin n_stores++; wrb(ea, b[7:0]); end
          6'h29: begin n_stores++; wrb({ea[31:1], 1'b0}, b[15:8]); wrb({ea[31:1], 1'b1}, b[7:0]); end
          6'h2B: begin n_stores++; dmem[ea[13:2]] = b; end
          6'h2A: begin n_stores++; for (int j = k; j < 4; j++) wrb({ea[31:2], 2'(j)}, b[8*(3-(j-k)) +: 8]); end
          6'h2E: begin n_stores++; for (int j = 0; j <= k; j++) wrb({ea[31:2], 2'(j)}, b[8*(k-j) +: 8]); end
          default: ;
        endcase
        if (npc != pc + 4) n_transfer++;
        if (op inside {6'h02, 6'h03} || (op == 6'h00 && fn inside {6'h08, 6'h09})) begin
          if (npc == pc + 4) n_transfer++;  // a jump to the next address still flushes
        end
        pc = npc;
      end
      gfo_pc = -1;
    endfunction
  endclass

  // ---------------- test programs ----------------
  // Opcode / function numbers of the MIPS R2000 instruction set.
  localparam int ADD=32, ADDU=33, SUB=34, SUBU=35, AND=36, OR=37, XOR=38, NOR=39, SLT=42, SLTU=43,
                 SLL=0, SRL=2, SRA=3, SLLV=4, SRLV=6, SRAV=7, JR=8, JALR=9;
  localparam int REGIMM=1, J=2, JAL=3, BEQ=4, BNE=5, BLEZ=6, BGTZ=7, ADDI=8, ADDIU=9, SLTI=10,
                 SLTIU=11, ANDI=12, ORI=13, XORI=14, LUI=15, LB=32, LH=33, LWL=34, LW=35, LBU=36,
                 LHU=37, LWR=38, SB=40, SH=41, SWL=42, SW=43, SWR=46;
  localparam int NPROG = 5;
  localparam string PROG_NAME [NPROG] = '{"lab8_test", "store_test", "hazard_test", "bubble_sort", "isa_cover"};

  // p: program words by word address; d: initial data words by word address.
  // "li" is written as ori from r0; "go forever" as a jump to itself.
  function automatic void build_prog(input int which, ref logic [31:0] p [int], ref logic [31:0] d [int]);
    int a;
    p.delete(); d.delete();
    case (which)
      0: begin // Lab 8 style test: NOPs after every dependence-causing instruction
        a = 'h00;
        p[a/4] = i_op(ORI, 2, 0, 'h9ABC); a += 4;
        p[a/4] = i_op(ORI, 3, 0, 'h1234); a += 4;
        p[a/4] = i_op(ORI, 4, 0, 16);     a += 4;
        p[a/4] = i_op(ORI, 5, 0, 'hD);    a += 4;
        p[a/4] = i_op(ORI, 6, 0, 'h5678); a += 4;
        p[a/4] = i_op(ORI, 7, 0, 'hB0);   a += 4;
        p[a/4] = r_op(ADD, 20, 3, 3);     a += 4;
        p[a/4] = r_op(SUB, 20, 2, 3);     a += 4;
        p[a/4] = r_op(AND, 20, 2, 3);     a += 4;
        p[a/4] = r_op(OR,  20, 2, 3);     a += 4;
        p[a/4] = r_op(XOR, 20, 2, 3);     a += 4;
        p[a/4] = r_op(SLL, 21, 0, 2, 16); a += 4;
        p[a/4] = i_op(ADDI, 20, 3, 'h20F6); a += 4;
        p[a/4] = i_op(ORI, 20, 3, 'h20F6);  a += 4;
        p[a/4] = r_op(SLT, 20, 6, 2);     a += 4;
        p[a/4] = j_op(JAL, 'hB0);         a += 4;   // 0x3C
        a += 12;                                    // 3 NOPs
        p[a/4] = r_op(AND, 20, 0, 0);     a += 4;   // 0x4C
        p[a/4] = br_op(BNE, 0, 0, a, 'hC8); a += 4; // not taken
        a += 12;
        p[a/4] = i_op(REGIMM, 1, 6, ('hC8 - (a + 4)) >>> 2); a += 4; // bgez R6,finish (taken)
        a = 'hB0;                                   // sub1
        p[a/4] = i_op(SW, 6, 0, 'hD0);    a += 4;
        p[a/4] = i_op(SB, 2, 0, 'hD4);    a += 4;
        p[a/4] = r_op(JR, 0, 31, 0);      a += 4;
        a = 'hC8;                                   // finish
        p[a/4] = i_op(ORI, 9, 0, 'hEEEE); a += 4;
        p[a/4] = i_op(LW, 10, 0, 'hD0);   a += 4;
        p[a/4] = i_op(LB, 11, 0, 'hD4);   a += 4;
        p[a/4] = j_op(J, a);
      end
      1: begin // store test: sb, swl, sw through a subroutine
        a = 0;
        p[a/4] = i_op(ORI, 20, 0, 'h1234);  a += 4;
        p[a/4] = r_op(SLL, 20, 0, 20, 16);  a += 4;
        p[a/4] = i_op(ORI, 20, 20, 'h5678); a += 4;
        p[a/4] = i_op(ORI, 21, 0, 'hF00D);  a += 4;
        p[a/4] = r_op(SLL, 21, 0, 21, 16);  a += 4;
        p[a/4] = i_op(ORI, 21, 21, 'hBEEF); a += 4;
        p[a/4] = j_op(JAL, 'h20);           a += 4;   // 0x18
        p[a/4] = j_op(J, 'h34);             a += 4;   // 0x1C
        p[a/4] = i_op(SB, 20, 0, 'h38);     a += 4;   // 0x20 sub1
        p[a/4] = i_op(ORI, 14, 0, 1);       a += 4;
        p[a/4] = i_op(SWL, 20, 14, 'h38);   a += 4;
        p[a/4] = i_op(SW, 21, 0, 'h3C);     a += 4;
        p[a/4] = r_op(JR, 0, 31, 0);        a += 4;   // 0x30
        p[a/4] = j_op(J, 'h34);                       // 0x34 done
      end
      2: begin // hazards: forwarding, load-use stalls, taken/untaken branches, jumps
        p['h00/4] = i_op(ORI, 2, 0, 'h40);
        p['h04/4] = i_op(ORI, 3, 0, 'h1111);
        p['h08/4] = i_op(ORI, 1, 0, 5);
        p['h0C/4] = r_op(SUB, 1, 3, 1);
        p['h10/4] = r_op(ADD, 6, 1, 3);        // R1 from EX/MEM
        p['h14/4] = i_op(ORI, 7, 1, 'h1234);   // R1 from MEM/WB
        p['h18/4] = i_op(SW, 6, 2, 0);         // store data R6 from MEM/WB
        p['h1C/4] = i_op(LW, 4, 2, 0);
        p['h20/4] = r_op(AND, 5, 4, 3);        // load-use: stall
        p['h24/4] = r_op(XOR, 8, 4, 5);
        p['h28/4] = r_op(SLL, 9, 0, 8, 4);
        p['h2C/4] = i_op(LW, 10, 2, 0);
        p['h30/4] = i_op(SW, 10, 2, 4);        // load then store of it: stall
        p['h34/4] = br_op(BEQ, 10, 6, 'h34, 'h44);  // taken
        p['h38/4] = i_op(ORI, 11, 0, 'hBAD);
        p['h3C/4] = i_op(ORI, 12, 0, 'hBAD);
        p['h40/4] = i_op(ORI, 13, 0, 'hBAD);
        p['h44/4] = br_op(BNE, 0, 0, 'h44, 'h38);   // not taken
        p['h48/4] = j_op(JAL, 'h80);
        p['h4C/4] = i_op(ORI, 15, 0, 'h77);
        p['h50/4] = j_op(J, 'h60);
        p['h54/4] = i_op(ORI, 16, 0, 'hBAD);
        p['h58/4] = i_op(ORI, 16, 0, 'hBAD);
        p['h60/4] = i_op(LW, 17, 2, 4);
        p['h64/4] = br_op(BGTZ, 17, 0, 'h64, 'h70); // stall then taken
        p['h68/4] = i_op(ORI, 19, 0, 'hBAD);
        p['h6C/4] = i_op(ORI, 19, 0, 'hBAD);
        p['h70/4] = i_op(ADDIU, 22, 0, -3);
        p['h74/4] = i_op(REGIMM, 0, 22, ('h7C - 'h78) >>> 2);  // bltz, taken
        p['h78/4] = i_op(ORI, 23, 0, 'hBAD);
        p['h7C/4] = j_op(J, 'h7C);
        p['h80/4] = r_op(ADDU, 24, 31, 0);     // R31 from the jal
        p['h84/4] = r_op(JR, 0, 31, 0);
        p['h88/4] = i_op(ORI, 25, 0, 'hBAD);
      end
      3: begin // bubble sort of 8 signed words at 0x100
        p['h00/4] = i_op(ORI, 1, 0, 'h100);
        p['h04/4] = i_op(ORI, 2, 0, 8);
        p['h08/4] = i_op(ADDIU, 2, 2, -1);          // outer
        p['h0C/4] = br_op(BLEZ, 2, 0, 'h0C, 'h40);
        p['h10/4] = r_op(OR, 3, 1, 0);
        p['h14/4] = r_op(OR, 4, 2, 0);
        p['h18/4] = i_op(LW, 5, 3, 0);              // inner
        p['h1C/4] = i_op(LW, 6, 3, 4);
        p['h20/4] = r_op(SLT, 7, 6, 5);
        p['h24/4] = br_op(BEQ, 7, 0, 'h24, 'h30);
        p['h28/4] = i_op(SW, 6, 3, 0);
        p['h2C/4] = i_op(SW, 5, 3, 4);
        p['h30/4] = i_op(ADDIU, 3, 3, 4);           // noswap
        p['h34/4] = i_op(ADDIU, 4, 4, -1);
        p['h38/4] = br_op(BGTZ, 4, 0, 'h38, 'h18);
        p['h3C/4] = j_op(J, 'h08);
        p['h40/4] = j_op(J, 'h40);
        d['h100/4] = 'h50;        d['h104/4] = 3;  d['h108/4] = 32'hFFFF_FFF0; d['h10C/4] = 7;
        d['h110/4] = 'h1000;      d['h114/4] = 2;  d['h118/4] = 2;             d['h11C/4] = 32'h8000_0001;
      end
      default: begin // every other instruction of the set
        p['h00/4] = i_op(LUI, 1, 0, 'h8000);
        p['h04/4] = i_op(ORI, 2, 0, 4);
        p['h08/4] = r_op(SRAV, 3, 2, 1);
        p['h0C/4] = r_op(SRLV, 4, 2, 1);
        p['h10/4] = r_op(SLLV, 5, 2, 2);
        p['h14/4] = r_op(SRA, 6, 0, 1, 31);
        p['h18/4] = r_op(SRL, 7, 0, 1, 31);
        p['h1C/4] = r_op(NOR, 8, 2, 0);
        p['h20/4] = r_op(SLTU, 9, 2, 1);
        p['h24/4] = r_op(SLT, 10, 2, 1);
        p['h28/4] = i_op(SLTI, 11, 1, 5);
        p['h2C/4] = i_op(SLTIU, 12, 2, -1);
        p['h30/4] = r_op(SUBU, 13, 0, 2);
        p['h34/4] = i_op(XORI, 14, 13, 'hFFFF);
        p['h38/4] = i_op(ANDI, 15, 13, 'h00F0);
        p['h3C/4] = i_op(ADDI, 16, 13, -100);
        p['h40/4] = i_op(ORI, 20, 0, 'h200);
        p['h44/4] = i_op(LUI, 21, 0, 'h1234);
        p['h48/4] = i_op(ORI, 21, 21, 'h5678);
        p['h4C/4] = i_op(SW, 21, 20, 0);
        p['h50/4] = i_op(SH, 2, 20, 6);
        p['h54/4] = i_op(SB, 21, 20, 9);
        p['h58/4] = i_op(SWR, 21, 20, 'hD);
        p['h5C/4] = i_op(SWL, 21, 20, 'h12);
        p['h60/4] = i_op(LB, 22, 20, 3);
        p['h64/4] = i_op(LBU, 23, 20, 'h14);
        p['h68/4] = i_op(LH, 24, 20, 'h16);
        p['h6C/4] = i_op(LHU, 25, 20, 'h16);
        p['h70/4] = i_op(LW, 26, 20, 4);
        p['h74/4] = i_op(ORI, 27, 0, 'hAAAA);
        p['h78/4] = i_op(LWL, 27, 20, 1);
        p['h7C/4] = i_op(LWR, 27, 20, 'h16);
        p['h80/4] = i_op(LB, 28, 20, 'h14);
        p['h84/4] = i_op(REGIMM, 16, 1, ('h90 - 'h88) >>> 2);   // bltzal taken
        p['h88/4] = i_op(ORI, 29, 0, 'hBAD);
        p['h90/4] = i_op(REGIMM, 17, 1, ('hA0 - 'h94) >>> 2);   // bgezal not taken
        p['h94/4] = br_op(BLEZ, 0, 0, 'h94, 'hA0);             // taken
        p['h98/4] = i_op(ORI, 29, 0, 'hBAD);
        p['hA0/4] = br_op(BGTZ, 0, 0, 'hA0, 'h98);             // not taken
        p['hA4/4] = i_op(ORI, 17, 0, 'hC0);
        p['hA8/4] = r_op(JALR, 18, 17, 0);
        p['hAC/4] = i_op(ORI, 19, 0, 'h55);
        p['hB0/4] = i_op(ORI, 17, 0, 'hD0);
        p['hB4/4] = r_op(JALR, 0, 17, 0);                      // rd = 0: link in r31
        p['hB8/4] = i_op(ORI, 29, 0, 'hBAD);
        p['hC0/4] = i_op(ADDIU, 30, 30, 1);
        p['hC4/4] = r_op(JR, 0, 18, 0);
        p['hD0/4] = j_op(J, 'hD0);
        d['h214/4] = 32'h80FE_C3A5;
      end
    endcase
  endfunction

endpackage
