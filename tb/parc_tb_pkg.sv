// parc_tb_pkg: test support for the PARCv2 processor.
//
// Three parts. Instruction encoders, one function per instruction, that
// build the 32-bit words of test programs (MIPS32 field layout). A program
// container, prog_t, holding the code (placed at 0x1000), the data section
// (placed at 0x2000), the values the test source sends and the values the
// test sink expects, with helpers for branch and jump labels. And a
// reference instruction-set model, iss_run, that executes a program one
// instruction at a time with no notion of a pipeline and returns the values
// mtc0 sends out; testbenches compare the processor's output with it.
package parc_tb_pkg;

  localparam int unsigned CODE_BASE = 32'h1000;
  localparam int unsigned DATA_BASE = 32'h2000;
  localparam int unsigned MEM_WORDS = 16384;   // 64 KiB

  //--------------------------------------------------------------------
  // Encoders
  //--------------------------------------------------------------------

  typedef logic [4:0]  reg_t;
  typedef logic [31:0] word_t;

  function automatic word_t rtype(logic [5:0] fn, reg_t rd, reg_t rs, reg_t rt, logic [4:0] sa);
    return {6'b000000, rs, rt, rd, sa, fn};
  endfunction
  function automatic word_t itype(logic [5:0] op, reg_t rt, reg_t rs, logic [15:0] imm);
    return {op, rs, rt, imm};
  endfunction

  function automatic word_t nop();                     return 32'd0; endfunction
  function automatic word_t addu(reg_t d, reg_t s, reg_t t); return rtype(6'b100001, d, s, t, 0); endfunction
  function automatic word_t subu(reg_t d, reg_t s, reg_t t); return rtype(6'b100011, d, s, t, 0); endfunction
  function automatic word_t and_(reg_t d, reg_t s, reg_t t); return rtype(6'b100100, d, s, t, 0); endfunction
  function automatic word_t or_ (reg_t d, reg_t s, reg_t t); return rtype(6'b100101, d, s, t, 0); endfunction
  function automatic word_t xor_(reg_t d, reg_t s, reg_t t); return rtype(6'b100110, d, s, t, 0); endfunction
  function automatic word_t nor_(reg_t d, reg_t s, reg_t t); return rtype(6'b100111, d, s, t, 0); endfunction
  function automatic word_t slt (reg_t d, reg_t s, reg_t t); return rtype(6'b101010, d, s, t, 0); endfunction
  function automatic word_t sltu(reg_t d, reg_t s, reg_t t); return rtype(6'b101011, d, s, t, 0); endfunction
  // shift-variable: d = t shifted by s
  function automatic word_t sllv(reg_t d, reg_t t, reg_t s); return rtype(6'b000100, d, s, t, 0); endfunction
  function automatic word_t srlv(reg_t d, reg_t t, reg_t s); return rtype(6'b000110, d, s, t, 0); endfunction
  function automatic word_t srav(reg_t d, reg_t t, reg_t s); return rtype(6'b000111, d, s, t, 0); endfunction
  function automatic word_t sll (reg_t d, reg_t t, logic [4:0] sa); return rtype(6'b000000, d, 0, t, sa); endfunction
  function automatic word_t srl (reg_t d, reg_t t, logic [4:0] sa); return rtype(6'b000010, d, 0, t, sa); endfunction
  function automatic word_t sra (reg_t d, reg_t t, logic [4:0] sa); return rtype(6'b000011, d, 0, t, sa); endfunction
  function automatic word_t mul (reg_t d, reg_t s, reg_t t); return {6'b011100, s, t, d, 5'd0, 6'b000010}; endfunction
  function automatic word_t addiu(reg_t t, reg_t s, logic [15:0] i); return itype(6'b001001, t, s, i); endfunction
  function automatic word_t slti (reg_t t, reg_t s, logic [15:0] i); return itype(6'b001010, t, s, i); endfunction
  function automatic word_t sltiu(reg_t t, reg_t s, logic [15:0] i); return itype(6'b001011, t, s, i); endfunction
  function automatic word_t andi (reg_t t, reg_t s, logic [15:0] i); return itype(6'b001100, t, s, i); endfunction
  function automatic word_t ori  (reg_t t, reg_t s, logic [15:0] i); return itype(6'b001101, t, s, i); endfunction
  function automatic word_t xori (reg_t t, reg_t s, logic [15:0] i); return itype(6'b001110, t, s, i); endfunction
  function automatic word_t lui  (reg_t t, logic [15:0] i);          return itype(6'b001111, t, 0, i); endfunction
  function automatic word_t lw   (reg_t t, logic [15:0] i, reg_t s); return itype(6'b100011, t, s, i); endfunction
  function automatic word_t sw   (reg_t t, logic [15:0] i, reg_t s); return itype(6'b101011, t, s, i); endfunction
  function automatic word_t mfc0 (reg_t t); return {6'b010000, 5'b00000, t, 5'd1, 11'd0}; endfunction
  function automatic word_t mtc0 (reg_t t); return {6'b010000, 5'b00100, t, 5'd2, 11'd0}; endfunction
  function automatic word_t jr   (reg_t s); return rtype(6'b001000, 0, s, 0, 0); endfunction

  //--------------------------------------------------------------------
  // Programs
  //--------------------------------------------------------------------

  typedef enum logic [3:0] { L_NONE, L_BEQ, L_BNE, L_BLEZ, L_BGTZ, L_BLTZ, L_BGEZ, L_J, L_JAL } lbl_e;

  class prog_t;
    word_t code[$];
    word_t data[$];
    word_t src[$];
    word_t sink[$];          // expected values written by the program, if known
    int    fix_at[$];        // forward references to patch
    string fix_lbl[$];
    int    labels[string];

    function void i(word_t w);            code.push_back(w); endfunction
    function void nops(int n);            repeat (n) code.push_back(32'd0); endfunction
    function void label(string l);        labels[l] = code.size(); endfunction
    function void in (reg_t r, word_t v); src.push_back(v); i(mfc0(r)); endfunction
    function void out(reg_t r, word_t v); sink.push_back(v); i(mtc0(r)); endfunction
    function void out_any(reg_t r);       i(mtc0(r)); endfunction
    function void word(word_t v);         data.push_back(v); endfunction

    // Control flow to a label, resolved by finish()
    function void br(lbl_e k, reg_t s, reg_t t, string l);
      word_t w;
      unique case (k)
        L_BEQ:  w = itype(6'b000100, t, s, 0);
        L_BNE:  w = itype(6'b000101, t, s, 0);
        L_BLEZ: w = itype(6'b000110, 0, s, 0);
        L_BGTZ: w = itype(6'b000111, 0, s, 0);
        L_BLTZ: w = itype(6'b000001, 0, s, 0);
        L_BGEZ: w = itype(6'b000001, 1, s, 0);
        L_J:    w = {6'b000010, 26'd0};
        default: w = {6'b000011, 26'd0};
      endcase
      fix_at.push_back(code.size());
      fix_lbl.push_back(l);
      code.push_back(w);
    endfunction

    function void finish();
      foreach (fix_at[k]) begin
        int    at  = fix_at[k];
        int    tgt = labels[fix_lbl[k]];
        word_t w   = code[at];
        if (w[31:26] == 6'b000010 || w[31:26] == 6'b000011)
          code[at] = {w[31:26], 4'b0000, 22'(((CODE_BASE + 4 * tgt) >> 2) & 32'h3f_ffff)};
        else
          code[at] = {w[31:16], 16'(tgt - at - 1)};
      end
    endfunction
  endclass

  //--------------------------------------------------------------------
  // Reference instruction-set model
  //--------------------------------------------------------------------

  // Runs p from CODE_BASE until control leaves the end of its code (or
  // max_steps instructions have run) and returns the values mtc0 sent, in
  // order. insts gives the number of instructions executed.
  function automatic void iss_run(prog_t p, int max_steps,
                                  ref word_t outs[$], ref int insts);
    word_t mem [int];
    word_t r [32];
    word_t pc, inst, a, b, res, nxt;
    int    si;
    logic  wen;
    reg_t  wr;
    outs.delete();
    foreach (r[k]) r[k] = 0;
    foreach (p.code[k]) mem[(CODE_BASE >> 2) + k] = p.code[k];
    foreach (p.data[k]) mem[(DATA_BASE >> 2) + k] = p.data[k];
    pc = CODE_BASE;
    si = 0;
    insts = 0;
    while (pc >= CODE_BASE && pc < CODE_BASE + 4 * p.code.size() && insts < max_steps) begin
      inst = mem.exists(pc >> 2) ? mem[pc >> 2] : 0;
      a    = r[inst[25:21]];
      b    = r[inst[20:16]];
      nxt  = pc + 4;
      wen  = 0;
      wr   = 0;
      res  = 0;
      case (inst[31:26])
        6'b000000: begin
          wen = 1; wr = inst[15:11];
          case (inst[5:0])
            6'b100001: res = a + b;
            6'b100011: res = a - b;
            6'b100100: res = a & b;
            6'b100101: res = a | b;
            6'b100110: res = a ^ b;
            6'b100111: res = ~(a | b);
            6'b101010: res = ($signed(a) < $signed(b)) ? 1 : 0;
            6'b101011: res = (a < b) ? 1 : 0;
            6'b000100: res = b << a[4:0];
            6'b000110: res = b >> a[4:0];
            6'b000111: res = $unsigned($signed(b) >>> a[4:0]);
            6'b000000: res = b << inst[10:6];
            6'b000010: res = b >> inst[10:6];
            6'b000011: res = $unsigned($signed(b) >>> inst[10:6]);
            6'b001000: begin wen = 0; nxt = a; end
            default:   wen = 0;
          endcase
        end
        6'b011100: begin wen = 1; wr = inst[15:11]; res = a * b; end
        6'b001001: begin wen = 1; wr = inst[20:16]; res = a + {{16{inst[15]}}, inst[15:0]}; end
        6'b001010: begin wen = 1; wr = inst[20:16]; res = ($signed(a) < $signed({{16{inst[15]}}, inst[15:0]})) ? 1 : 0; end
        6'b001011: begin wen = 1; wr = inst[20:16]; res = (a < {{16{inst[15]}}, inst[15:0]}) ? 1 : 0; end
        6'b001100: begin wen = 1; wr = inst[20:16]; res = a & {16'd0, inst[15:0]}; end
        6'b001101: begin wen = 1; wr = inst[20:16]; res = a | {16'd0, inst[15:0]}; end
        6'b001110: begin wen = 1; wr = inst[20:16]; res = a ^ {16'd0, inst[15:0]}; end
        6'b001111: begin wen = 1; wr = inst[20:16]; res = {inst[15:0], 16'd0}; end
        6'b100011: begin
          wen = 1; wr = inst[20:16];
          res = mem.exists((a + {{16{inst[15]}}, inst[15:0]}) >> 2) ?
                mem[(a + {{16{inst[15]}}, inst[15:0]}) >> 2] : 0;
        end
        6'b101011: mem[(a + {{16{inst[15]}}, inst[15:0]}) >> 2] = b;
        6'b000010: nxt = {nxt[31:28], inst[25:0], 2'b00};
        6'b000011: begin wen = 1; wr = 31; res = pc + 4; nxt = {nxt[31:28], inst[25:0], 2'b00}; end
        6'b000100: if (a == b) nxt = pc + 4 + {{14{inst[15]}}, inst[15:0], 2'b00};
        6'b000101: if (a != b) nxt = pc + 4 + {{14{inst[15]}}, inst[15:0], 2'b00};
        6'b000110: if ($signed(a) <= 0) nxt = pc + 4 + {{14{inst[15]}}, inst[15:0], 2'b00};
        6'b000111: if ($signed(a) > 0) nxt = pc + 4 + {{14{inst[15]}}, inst[15:0], 2'b00};
        6'b000001: if ((inst[16] == 0) == ($signed(a) < 0)) nxt = pc + 4 + {{14{inst[15]}}, inst[15:0], 2'b00};
        6'b010000: begin
          if (inst[25:21] == 5'b00000) begin
            wen = 1; wr = inst[20:16];
            res = (si < p.src.size()) ? p.src[si] : 0;
            si++;
          end else begin
            outs.push_back(b);
          end
        end
        default: ;
      endcase
      if (wen && wr != 0) r[wr] = res;
      pc = nxt;
      insts++;
    end
  endfunction

endpackage
