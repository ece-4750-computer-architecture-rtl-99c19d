// parc_ubmark_pkg: small benchmark kernels for the PARCv2 processors.
//
// Five kernels, each written here in PARCv2 assembly through the encoder
// functions of parc_tb_pkg, with inputs drawn from $urandom and the
// expected output array computed directly in SystemVerilog:
//
//   vvadd(n, 0)    element-wise vector add, one element per loop trip
//   vvadd(n, 1)    the same, unrolled four times with all loads first so
//                  that no add waits on the load just before it
//   cmplx_mult(n)  element-wise complex multiply (four mul per element)
//   bin_search     binary search of keys in a sorted key/value table
//   masked_filter  five-point weighted filter on the interior pixels of a
//                  small image, only where a mask word is non-zero
//
// Every kernel sends the value 0 to the test sink just before its first
// and just after its last instruction, so a testbench can time the kernel
// alone. The output array is left in data memory at the word address
// returned in `dst` (a byte address), with `exp` holding the values it must
// contain. The sizes are this design's own choices: about 100 elements, 20
// searches and a 16 x 16 image keep each kernel to a few thousand
// instructions.
package parc_ubmark_pkg;
  import parc_tb_pkg::*;

  // load a 32-bit constant
  function automatic void li(prog_t p, reg_t r, word_t v);
    p.i(lui(r, v[31:16]));
    p.i(ori(r, r, v[15:0]));
  endfunction

  function automatic word_t addr_of(int word_index);
    return DATA_BASE + 4 * word_index;
  endfunction

  //--------------------------------------------------------------------
  function automatic prog_t vvadd(int n, bit opt, ref word_t exp[$], ref word_t dst);
    prog_t p = new();
    word_t a[$], b[$];
    exp.delete();
    for (int k = 0; k < n; k++) begin
      a.push_back($urandom());
      b.push_back($urandom());
      exp.push_back(a[k] + b[k]);
    end
    foreach (a[k]) p.word(a[k]);
    foreach (b[k]) p.word(b[k]);
    repeat (n) p.word(0);
    dst = addr_of(2 * n);
    p.out(0, 0);
    li(p, 1, addr_of(0));
    li(p, 2, addr_of(n));
    li(p, 3, addr_of(2 * n));
    p.i(addiu(4, 0, 16'(n)));
    p.label("loop");
    if (!opt) begin
      p.i(lw(5, 0, 1));
      p.i(lw(6, 0, 2));
      p.i(addu(7, 5, 6));
      p.i(sw(7, 0, 3));
      p.i(addiu(1, 1, 4));
      p.i(addiu(2, 2, 4));
      p.i(addiu(3, 3, 4));
      p.i(addiu(4, 4, 16'hffff));
      p.br(L_BNE, 4, 0, "loop");
    end else begin
      p.i(addiu(4, 4, 16'hfffc));
      for (int u = 0; u < 4; u++) p.i(lw(reg_t'(5 + u), 16'(4 * u), 1));
      for (int u = 0; u < 4; u++) p.i(lw(reg_t'(9 + u), 16'(4 * u), 2));
      for (int u = 0; u < 4; u++) p.i(addu(reg_t'(5 + u), reg_t'(5 + u), reg_t'(9 + u)));
      p.i(addiu(1, 1, 16));
      p.i(addiu(2, 2, 16));
      for (int u = 0; u < 4; u++) p.i(sw(reg_t'(5 + u), 16'(4 * u), 3));
      p.i(addiu(3, 3, 16));
      p.br(L_BNE, 4, 0, "loop");
    end
    p.out(0, 0);
    p.finish();
    return p;
  endfunction

  //--------------------------------------------------------------------
  function automatic prog_t cmplx_mult(int n, ref word_t exp[$], ref word_t dst);
    prog_t p = new();
    word_t a[$], b[$];
    exp.delete();
    for (int k = 0; k < 2 * n; k++) begin
      a.push_back(word_t'($signed(16'($urandom()))));
      b.push_back(word_t'($signed(16'($urandom()))));
    end
    for (int k = 0; k < n; k++) begin
      exp.push_back(a[2*k] * b[2*k] - a[2*k+1] * b[2*k+1]);
      exp.push_back(a[2*k] * b[2*k+1] + a[2*k+1] * b[2*k]);
    end
    foreach (a[k]) p.word(a[k]);
    foreach (b[k]) p.word(b[k]);
    repeat (2 * n) p.word(0);
    dst = addr_of(4 * n);
    p.out(0, 0);
    li(p, 1, addr_of(0));
    li(p, 2, addr_of(2 * n));
    li(p, 3, addr_of(4 * n));
    p.i(addiu(4, 0, 16'(n)));
    p.label("loop");
    p.i(lw(5, 0, 1));            // a.re
    p.i(lw(6, 4, 1));            // a.im
    p.i(lw(7, 0, 2));            // b.re
    p.i(lw(8, 4, 2));            // b.im
    p.i(mul(9, 5, 7));
    p.i(mul(10, 6, 8));
    p.i(subu(9, 9, 10));
    p.i(mul(11, 5, 8));
    p.i(mul(12, 6, 7));
    p.i(addu(11, 11, 12));
    p.i(sw(9, 0, 3));
    p.i(sw(11, 4, 3));
    p.i(addiu(1, 1, 8));
    p.i(addiu(2, 2, 8));
    p.i(addiu(3, 3, 8));
    p.i(addiu(4, 4, 16'hffff));
    p.br(L_BNE, 4, 0, "loop");
    p.out(0, 0);
    p.finish();
    return p;
  endfunction

  //--------------------------------------------------------------------
  // Table of n (key, value) pairs with strictly increasing keys; m search
  // keys, alternately present and absent. Result: the value, or -1.
  function automatic prog_t bin_search(int n, int m, ref word_t exp[$], ref word_t dst);
    prog_t p = new();
    word_t keys[$], vals[$], q[$];
    word_t key = 0;
    exp.delete();
    for (int k = 0; k < n; k++) begin
      key += 2 + $urandom_range(5);      // gaps of at least 2 leave absent keys
      keys.push_back(key);
      vals.push_back($urandom_range(32'h7fff_ffff));
    end
    for (int k = 0; k < m; k++) begin
      int j = $urandom_range(n - 1);
      if (k % 2 == 0) begin
        q.push_back(keys[j]);
        exp.push_back(vals[j]);
      end else begin
        q.push_back(keys[j] + 1);
        exp.push_back(32'hffff_ffff);
      end
    end
    for (int k = 0; k < n; k++) begin
      p.word(keys[k]);
      p.word(vals[k]);
    end
    foreach (q[k]) p.word(q[k]);
    repeat (m) p.word(0);
    dst = addr_of(2 * n + m);
    p.out(0, 0);
    li(p, 20, addr_of(0));
    li(p, 10, addr_of(2 * n));
    li(p, 12, addr_of(2 * n + m));
    p.i(addiu(11, 0, 16'(m)));
    p.label("outer");
    p.i(lw(21, 0, 10));                  // key to find
    p.i(addiu(13, 0, 0));                // lo
    p.i(addiu(14, 0, 16'(n - 1)));       // hi
    p.i(addiu(15, 0, 16'hffff));         // result = -1
    p.label("step");
    p.i(slt(16, 14, 13));
    p.br(L_BNE, 16, 0, "done");          // hi < lo: not found
    p.i(addu(17, 13, 14));
    p.i(srl(17, 17, 1));                 // mid
    p.i(sll(18, 17, 3));
    p.i(addu(18, 18, 20));               // &table[mid]
    p.i(lw(19, 0, 18));
    p.br(L_BEQ, 19, 21, "found");
    p.i(slt(16, 19, 21));
    p.br(L_BNE, 16, 0, "higher");
    p.i(addiu(14, 17, 16'hffff));        // hi = mid - 1
    p.br(L_J, 0, 0, "step");
    p.label("higher");
    p.i(addiu(13, 17, 1));               // lo = mid + 1
    p.br(L_J, 0, 0, "step");
    p.label("found");
    p.i(lw(15, 4, 18));
    p.label("done");
    p.i(sw(15, 0, 12));
    p.i(addiu(10, 10, 4));
    p.i(addiu(12, 12, 4));
    p.i(addiu(11, 11, 16'hffff));
    p.br(L_BNE, 11, 0, "outer");
    p.out(0, 0);
    p.finish();
    return p;
  endfunction

  //--------------------------------------------------------------------
  // out[r][c] = (64 * in[r][c] + 48 * (N + S + E + W)) >> 8 for interior
  // pixels whose mask word is non-zero; every other output stays 0.
  function automatic prog_t masked_filter(int w, int h, ref word_t exp[$], ref word_t dst);
    prog_t p = new();
    word_t img[$], msk[$];
    exp.delete();
    for (int k = 0; k < w * h; k++) begin
      img.push_back($urandom_range(255));
      msk.push_back(word_t'($urandom_range(3) != 0));
    end
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        int k = r * w + c;
        if (r > 0 && r < h - 1 && c > 0 && c < w - 1 && msk[k] != 0)
          exp.push_back((64 * img[k] + 48 * (img[k-w] + img[k+w] + img[k-1] + img[k+1])) >> 8);
        else
          exp.push_back(0);
      end
    foreach (img[k]) p.word(img[k]);
    foreach (msk[k]) p.word(msk[k]);
    repeat (w * h) p.word(0);
    dst = addr_of(2 * w * h);
    p.out(0, 0);
    li(p, 20, addr_of(0));
    li(p, 21, addr_of(w * h));
    li(p, 22, addr_of(2 * w * h));
    p.i(addiu(25, 0, 64));
    p.i(addiu(26, 0, 48));
    p.i(addiu(27, 0, 16'(w)));
    p.i(addiu(1, 0, 1));                 // row
    p.label("row");
    p.i(addiu(2, 0, 1));                 // column
    p.label("col");
    p.i(mul(4, 1, 27));
    p.i(addu(4, 4, 2));
    p.i(sll(4, 4, 2));                   // byte offset of the pixel
    p.i(addu(5, 21, 4));
    p.i(lw(6, 0, 5));
    p.br(L_BEQ, 6, 0, "skip");
    p.i(addu(7, 20, 4));
    p.i(lw(8, 0, 7));
    p.i(lw(9, 16'hfffc, 7));
    p.i(lw(10, 4, 7));
    p.i(lw(11, 16'(-4 * w), 7));
    p.i(lw(12, 16'(4 * w), 7));
    p.i(addu(9, 9, 10));
    p.i(addu(9, 9, 11));
    p.i(addu(9, 9, 12));
    p.i(mul(8, 8, 25));
    p.i(mul(9, 9, 26));
    p.i(addu(8, 8, 9));
    p.i(srl(8, 8, 8));
    p.i(addu(13, 22, 4));
    p.i(sw(8, 0, 13));
    p.label("skip");
    p.i(addiu(2, 2, 1));
    p.i(addiu(14, 0, 16'(w - 1)));
    p.br(L_BNE, 2, 14, "col");
    p.i(addiu(1, 1, 1));
    p.i(addiu(14, 0, 16'(h - 1)));
    p.br(L_BNE, 1, 14, "row");
    p.out(0, 0);
    p.finish();
    return p;
  endfunction

endpackage
