// parc_progs_pkg: test programs for the PARCv2 processor.
//
// Each function returns a prog_t. Directed programs carry the values the
// test sink must see, worked out by hand; the random program leaves them
// to the reference instruction-set model. The programs make every pipeline
// mechanism happen: dependences at every distance from zero to several
// instructions (stalls in the baseline, bypasses from X, M and W and
// load-use stalls in the alternative), taken and not-taken branches of all
// six kinds, jumps, jal and jr, multiplies, loads and stores.
package parc_progs_pkg;
  import parc_tb_pkg::*;

  // The addu sequence of the baseline line trace: two inputs five nops
  // apart, addu right behind the second, five nops, mtc0 of the sum.
  function automatic prog_t addu_trace();
    prog_t p = new();
    p.in(1, 32'd1);
    p.nops(5);
    p.in(2, 32'd2);
    p.i(addu(3, 1, 2));
    p.nops(5);
    p.out(3, 32'd3);
    p.finish();
    return p;
  endfunction

  // A load whose result the next instruction uses, and an mtc0 right
  // behind that.
  function automatic prog_t load_use();
    prog_t p = new();
    p.in(2, 32'h2000);
    p.nops(5);
    p.i(lw(3, 0, 2));
    p.i(addiu(4, 3, 16'd1));
    p.out(4, 32'h0000_002b);
    p.word(32'h0000_002a);
    p.finish();
    return p;
  endfunction

  // One jump over one instruction, the jump target reading a register
  // written two instructions earlier.
  function automatic prog_t jump_timing();
    prog_t p = new();
    p.i(addiu(3, 0, 0));
    p.br(L_J, 0, 0, "l");
    p.i(addiu(3, 3, 16'd1));
    p.label("l");
    p.out(3, 32'd0);
    p.finish();
    return p;
  endfunction

  // One taken branch over two instructions.
  function automatic prog_t branch_timing();
    prog_t p = new();
    p.i(addiu(1, 0, 16'd1));
    p.nops(3);
    p.br(L_BNE, 1, 0, "l");
    p.i(addiu(1, 0, 16'd5));
    p.i(addiu(1, 0, 16'd6));
    p.label("l");
    p.out(1, 32'd1);
    p.finish();
    return p;
  endfunction

  // Back-to-back stores, then back-to-back loads of the same words, so
  // that data requests queue up behind each other.
  function automatic prog_t mem_burst();
    prog_t p = new();
    p.in(9, 32'h2000);
    for (int k = 1; k <= 8; k++) p.in(reg_t'(k), 32'h1111_1111 * k);
    for (int k = 1; k <= 8; k++) p.i(sw(reg_t'(k), 16'(4 * k), 9));
    for (int k = 1; k <= 8; k++) p.i(lw(reg_t'(9 + k), 16'(4 * (9 - k)), 9));
    for (int k = 1; k <= 8; k++) p.out(reg_t'(9 + k), 32'h1111_1111 * (9 - k));
    repeat (10) p.word(0);
    p.finish();
    return p;
  endfunction

  // addiu destination-dependence sequences: nops between producer and mtc0
  // run from five down to zero; inputs 1..6, immediate 1, results 2..7.
  function automatic prog_t addiu_dest_byp();
    prog_t p = new();
    for (int k = 0; k < 6; k++) begin
      p.in(1, k + 1);
      p.nops(8);
      p.i(addiu(3, 1, 16'd1));
      p.nops(5 - k);
      p.out(3, k + 2);
    end
    p.finish();
    return p;
  endfunction

  // Three jumps visiting labels out of order; r3 records the visited points.
  function automatic prog_t multijump();
    prog_t p = new();
    p.i(addiu(3, 0, 0));
    p.br(L_J, 0, 0, "a");
    p.i(addiu(3, 3, 16'b000001));
    p.label("b");
    p.i(addiu(3, 3, 16'b000010));
    p.br(L_J, 0, 0, "c");
    p.i(addiu(3, 3, 16'b000100));
    p.label("a");
    p.i(addiu(3, 3, 16'b001000));
    p.br(L_J, 0, 0, "b");
    p.i(addiu(3, 3, 16'b010000));
    p.label("c");
    p.i(addiu(3, 3, 16'b100000));
    p.out(3, 32'b101010);
    p.finish();
    return p;
  endfunction

  // Increment a four-element array into a second array, then read it back.
  function automatic prog_t array_loop();
    prog_t p = new();
    p.in(2, 32'h2000);
    p.in(4, 32'h2010);
    p.i(addiu(1, 0, 4));
    p.label("loop");
    p.i(lw(3, 0, 2));
    p.i(addiu(3, 3, 1));
    p.i(sw(3, 0, 4));
    p.i(addiu(2, 2, 4));
    p.i(addiu(4, 4, 4));
    p.i(addiu(1, 1, 16'hffff));
    p.br(L_BNE, 1, 0, "loop");
    for (int k = 0; k < 4; k++) begin
      p.i(addiu(1, 0, 16'(32'h2010 + 4 * k)));
      p.i(lw(2, 0, 1));
      p.out(2, k + 2);
    end
    for (int k = 1; k <= 4; k++) p.word(k);
    repeat (4) p.word(0);
    p.finish();
    return p;
  endfunction

  // Every instruction once with hand-computed results, with the consumer
  // right behind the producer so that hazards arise everywhere.
  function automatic prog_t all_insts();
    prog_t p = new();
    p.in(1, 32'h0000_0007);
    p.in(2, 32'hffff_fff0);          // -16
    p.i(addu(3, 1, 2));   p.out(3, 32'hffff_fff7);
    p.i(subu(3, 1, 2));   p.out(3, 32'h0000_0017);
    p.i(and_(3, 1, 2));   p.out(3, 32'h0000_0000);
    p.i(or_(3, 1, 2));    p.out(3, 32'hffff_fff7);
    p.i(xor_(3, 1, 2));   p.out(3, 32'hffff_fff7);
    p.i(nor_(3, 1, 2));   p.out(3, 32'h0000_0008);
    p.i(slt(3, 2, 1));    p.out(3, 32'd1);
    p.i(slt(3, 1, 2));    p.out(3, 32'd0);
    p.i(sltu(3, 2, 1));   p.out(3, 32'd0);
    p.i(sltu(3, 1, 2));   p.out(3, 32'd1);
    p.i(sllv(3, 2, 1));   p.out(3, 32'hffff_f800);
    p.i(srlv(3, 2, 1));   p.out(3, 32'h01ff_ffff);
    p.i(srav(3, 2, 1));   p.out(3, 32'hffff_ffff);
    p.i(mul(3, 1, 2));    p.out(3, 32'hffff_ff90);
    p.i(mul(4, 3, 3));    p.out(4, 32'h0000_3100);
    p.i(addiu(3, 1, 16'hfffe)); p.out(3, 32'd5);
    p.i(lui(3, 16'h1234));      p.out(3, 32'h1234_0000);
    p.i(ori(3, 3, 16'h8765));   p.out(3, 32'h1234_8765);
    p.i(andi(3, 2, 16'h00ff));  p.out(3, 32'h0000_00f0);
    p.i(xori(3, 2, 16'hffff));  p.out(3, 32'hffff_000f);
    p.i(slti(3, 2, 16'hfff1));  p.out(3, 32'd1);
    p.i(sltiu(3, 1, 16'hfff1)); p.out(3, 32'd1);
    p.i(sltiu(3, 2, 16'h0008)); p.out(3, 32'd0);
    p.i(sra(3, 2, 2));          p.out(3, 32'hffff_fffc);
    p.i(srl(3, 2, 28));         p.out(3, 32'h0000_000f);
    p.i(sll(3, 1, 31));         p.out(3, 32'h8000_0000);
    // memory: store then load back (load-use on the next instruction)
    p.i(lui(5, 16'h0000));
    p.i(ori(5, 5, 16'h2000));
    p.i(sw(2, 8, 5));
    p.i(lw(6, 8, 5));
    p.i(addiu(6, 6, 1));         p.out(6, 32'hffff_fff1);
    p.i(lw(7, 0, 5));            p.out(7, 32'hcafe_f00d);
    // branches: each taken branch skips a marker; r8 accumulates markers
    p.i(addiu(8, 0, 0));
    p.br(L_BEQ, 1, 1, "t1");     p.i(ori(8, 8, 16'h0001)); p.label("t1");
    p.br(L_BEQ, 1, 2, "t2");     p.i(ori(8, 8, 16'h0002)); p.label("t2");
    p.br(L_BNE, 1, 2, "t3");     p.i(ori(8, 8, 16'h0004)); p.label("t3");
    p.br(L_BNE, 1, 1, "t4");     p.i(ori(8, 8, 16'h0008)); p.label("t4");
    p.br(L_BGTZ, 1, 0, "t5");    p.i(ori(8, 8, 16'h0010)); p.label("t5");
    p.br(L_BGTZ, 2, 0, "t6");    p.i(ori(8, 8, 16'h0020)); p.label("t6");
    p.br(L_BLEZ, 2, 0, "t7");    p.i(ori(8, 8, 16'h0040)); p.label("t7");
    p.br(L_BLEZ, 0, 0, "t8");    p.i(ori(8, 8, 16'h0080)); p.label("t8");
    p.br(L_BLEZ, 1, 0, "t9");    p.i(ori(8, 8, 16'h0100)); p.label("t9");
    p.br(L_BLTZ, 2, 0, "t10");   p.i(ori(8, 8, 16'h0200)); p.label("t10");
    p.br(L_BLTZ, 0, 0, "t11");   p.i(ori(8, 8, 16'h0400)); p.label("t11");
    p.br(L_BGEZ, 0, 0, "t12");   p.i(ori(8, 8, 16'h0800)); p.label("t12");
    p.br(L_BGEZ, 2, 0, "t13");   p.i(ori(8, 8, 16'h1000)); p.label("t13");
    p.out(8, 32'h0000_152a);
    // jal / jr: call a routine that doubles r1 and returns
    p.br(L_JAL, 0, 0, "fn");
    p.out(1, 32'd14);
    p.br(L_J, 0, 0, "end");
    p.label("fn");
    p.i(addu(1, 1, 1));
    p.i(jr(31));
    p.i(ori(1, 1, 16'h0100));       // never executed
    p.label("end");
    p.out(31, 32'h0000_0000);       // patched below: link address
    p.word(32'hcafe_f00d);
    p.finish();
    // link address: the instruction after jal
    foreach (p.code[k])
      if (p.code[k][31:26] == 6'b000011) p.sink[p.sink.size() - 1] = CODE_BASE + 4 * (k + 1);
    return p;
  endfunction

  // Random straight-line code with forward branches and jumps over
  // registers r1..r8 (r9 is the data base address). Returns the program;
  // the expected sink values come from the reference model.
  function automatic prog_t random_prog(int n);
    prog_t p = new();
    int    lbl = 0;
    int    pend [$];
    for (int r = 1; r <= 8; r++) p.in(reg_t'(r), $urandom());
    p.i(addiu(31, 0, 0));
    p.i(lui(9, 16'h0000));
    p.i(ori(9, 9, 16'h2000));
    for (int k = 0; k < 32; k++) p.word($urandom());
    for (int k = 0; k < n; k++) begin
      reg_t d = reg_t'($urandom_range(8, 1));
      reg_t s = reg_t'($urandom_range(8, 1));
      reg_t t = reg_t'($urandom_range(8, 1));
      logic [15:0] imm = 16'($urandom());
      logic [4:0]  sa  = 5'($urandom());
      int c = $urandom_range(29);
      // close any forward labels that are due
      while (pend.size() > 0 && pend[0] <= k) begin
        p.label($sformatf("L%0d", lbl - pend.size()));
        void'(pend.pop_front());
      end
      case (c)
        0:  p.i(addu(d, s, t));
        1:  p.i(subu(d, s, t));
        2:  p.i(and_(d, s, t));
        3:  p.i(or_(d, s, t));
        4:  p.i(xor_(d, s, t));
        5:  p.i(nor_(d, s, t));
        6:  p.i(slt(d, s, t));
        7:  p.i(sltu(d, s, t));
        8:  p.i(sllv(d, t, s));
        9:  p.i(srlv(d, t, s));
        10: p.i(srav(d, t, s));
        11: p.i(sll(d, t, sa));
        12: p.i(srl(d, t, sa));
        13: p.i(sra(d, t, sa));
        14: p.i(mul(d, s, t));
        15: p.i(addiu(d, s, imm));
        16: p.i(slti(d, s, imm));
        17: p.i(sltiu(d, s, imm));
        18: p.i(andi(d, s, imm));
        19: p.i(ori(d, s, imm));
        20: p.i(xori(d, s, imm));
        21: p.i(lui(d, imm));
        22, 23: p.i(lw(d, 16'(4 * $urandom_range(31)), 9));
        24: p.i(sw(t, 16'(4 * $urandom_range(31)), 9));
        25: p.out_any(s);
        26, 27, 28: begin
          // forward branch over one to three instructions
          lbl_e kinds [6] = '{L_BEQ, L_BNE, L_BLEZ, L_BGTZ, L_BLTZ, L_BGEZ};
          if (pend.size() == 0) begin
            p.br(kinds[$urandom_range(5)], s, t, $sformatf("L%0d", lbl));
            lbl++;
            pend.push_back(k + 1 + $urandom_range(2));
          end else p.i(addu(d, s, t));
        end
        default: begin
          if (pend.size() == 0) begin
            p.br(($urandom_range(1) == 0) ? L_J : L_JAL, 0, 0, $sformatf("L%0d", lbl));
            lbl++;
            pend.push_back(k + 1 + $urandom_range(2));
          end else p.i(subu(d, s, t));
        end
      endcase
    end
    while (pend.size() > 0) begin
      p.label($sformatf("L%0d", lbl - pend.size()));
      void'(pend.pop_front());
    end
    for (int r = 1; r <= 8; r++) p.out_any(reg_t'(r));
    p.out_any(31);
    for (int k = 0; k < 32; k++) begin
      p.i(lw(1, 16'(4 * k), 9));
      p.out_any(1);
    end
    p.finish();
    return p;
  endfunction

endpackage
