// pb_bench_pkg: program builder for testbenches of the hardened
// PicoBlaze-3 compatible processor.
//
// The class pb_program is a small assembler (instructions from the pb_pkg
// encoding helpers, labels resolved when the program is closed) and holds
// the eight benchmark kernels used in fault campaigns: bubble sort (bub),
// division (div), Fibonacci (fib), greatest common divisor (gcd), matrix
// addition (madd), matrix multiplication (mmult), multiplication (mult) and
// exponentiation (pow), plus fib_h, gcd_h, div_h, madd_h and bub_h, five
// of them hardened in software: every value is kept in three registers
// (a value read from the scratchpad is copied twice) and the copies are
// voted before each output, store or address use and before each
// instruction that sets the flags of a branch.
// build(name) fills prog with the program (unused words jump to
// themselves) and expv with the {port_id, out_port} pairs the program must
// output, computed here in SystemVerilog independently of the processor.
// Every program ends in a loop at label "halt".
package pb_bench_pkg;
  import pb_pkg::*;

  class pb_program;
    // ---------------- assembler ----------------
    logic [17:0] prog [1024];
    int pc;
    int n_words;              // program length, set when the program is closed
    int labels [string];
    typedef struct { int at; string name; logic [17:0] w; } fix_t;
    fix_t fixes [$];

    function automatic void a_begin();
      foreach (prog[i]) prog[i] = i_flow(OP_JUMP, i);   // unused words trap
      pc = 0; labels.delete(); fixes.delete();
    endfunction
    function automatic void e(logic [17:0] w); prog[pc] = w; pc++; endfunction
    function automatic void lbl(string n); labels[n] = pc; endfunction
    function automatic void jmp(opcode_t op, logic [1:0] cc, string n);   // op JUMP/CALL, _C if conditional
      fixes.push_back('{pc, n, {op, cc, 10'h0}}); pc++;
    endfunction
    function automatic void a_end();
      foreach (fixes[i]) prog[fixes[i].at] = fixes[i].w | 18'(labels[fixes[i].name]);
      n_words = pc;
    endfunction
    // shorthands
    function automatic void ldk(int x, int k); e(i_k(OP_LOAD_K, x, k)); endfunction
    function automatic void ldr(int x, int y); e(i_r(OP_LOAD_R, x, y)); endfunction
    function automatic void outp(int x, int p); e(i_k(OP_OUTPUT_P, x, p)); endfunction
    function automatic void halt(); lbl("halt"); jmp(OP_JUMP, 0, "halt"); endfunction


    // ---------------- benchmarks ----------------
    logic [15:0] expv [$];    // expected {port, value} outputs

    function automatic logic [15:0] ov(int port, int v); return {8'(port), 8'(v)}; endfunction

    function automatic void build(string name);
      a_begin();
      expv.delete();
      case (name)
        "fib": begin
          int a = 0, b = 1;
          ldk(0, 0); ldk(1, 1); ldk(3, 13);
          lbl("l"); outp(1, 8'h01);
          ldr(2, 0); e(i_r(OP_ADD_R, 2, 1)); ldr(0, 1); ldr(1, 2);
          e(i_k(OP_SUB_K, 3, 1)); jmp(OP_JUMP_C, CC_NZ, "l");
          halt();
          for (int i = 0; i < 13; i++) begin int t; expv.push_back(ov(1, b)); t = (a + b) % 256; a = b; b = t; end
        end
        "fib_h": begin
          // every variable in three registers: a = s0/s4/s8, b = s1/s5/s9,
          // t = s2/s6/sA, n = s3/s7/sB; voted before OUTPUT and before the
          // instruction whose flags decide the branch
          int a = 0, b = 1;
          ldk(0, 0); ldr(4, 0); ldr(8, 0);
          ldk(1, 1); ldr(5, 1); ldr(9, 1);
          ldk(3, 13); ldr(7, 3); ldr(11, 3);
          lbl("l");
          vote(1, 5, 9, "v1");
          outp(1, 8'h01);
          for (int c = 0; c < 3; c++) begin
            ldr(2 + 4*c, 0 + 4*c); e(i_r(OP_ADD_R, 2 + 4*c, 1 + 4*c)); ldr(0 + 4*c, 1 + 4*c); ldr(1 + 4*c, 2 + 4*c);
          end
          vote(3, 7, 11, "v3");
          e(i_k(OP_SUB_K, 7, 1)); e(i_k(OP_SUB_K, 11, 1)); e(i_k(OP_SUB_K, 3, 1));
          jmp(OP_JUMP_C, CC_NZ, "l");
          halt();
          for (int i = 0; i < 13; i++) begin int t; expv.push_back(ov(1, b)); t = (a + b) % 256; a = b; b = t; end
        end
        "gcd_h": begin
          // a = s0/s4/s8, b = s1/s5/s9; both voted before the COMPARE whose
          // flags pick the branch, a voted again before it is output
          int pa [4] = '{84, 200, 121, 250}, pb [4] = '{36, 75, 11, 3};
          for (int i = 0; i < 4; i++) begin
            ldk(0, pa[i]); ldr(4, 0); ldr(8, 0);
            ldk(1, pb[i]); ldr(5, 1); ldr(9, 1);
            jmp(OP_CALL, 0, "gcd");
            vote(0, 4, 8, $sformatf("go%0d", i)); outp(0, 8'h02);
          end
          halt();
          lbl("gcd");
          vote(0, 4, 8, "ga"); vote(1, 5, 9, "gb");
          e(i_r(OP_COMPARE_R, 0, 1)); jmp(OP_JUMP_C, CC_Z, "gcd_r");
          jmp(OP_JUMP_C, CC_C, "gcd_b");
          for (int c = 0; c < 3; c++) e(i_r(OP_SUB_R, 4*c, 1 + 4*c));
          jmp(OP_JUMP, 0, "gcd");
          lbl("gcd_b");
          for (int c = 0; c < 3; c++) e(i_r(OP_SUB_R, 1 + 4*c, 4*c));
          jmp(OP_JUMP, 0, "gcd");
          lbl("gcd_r"); e(i_flow(OP_RETURN, 0));
          for (int i = 0; i < 4; i++) begin
            int x = pa[i], y = pb[i];
            while (x != y) if (x > y) x -= y; else y -= x;
            expv.push_back(ov(2, x));
          end
        end
        "div_h": begin
          // dividend s0/s4/s8, divisor s1/s5/s9, quotient s2/s6/sA; voted
          // before the COMPARE of every step and before each output
          int da [4] = '{200, 17, 255, 9}, db [4] = '{7, 17, 16, 10};
          for (int i = 0; i < 4; i++) begin
            ldk(0, da[i]); ldr(4, 0); ldr(8, 0);
            ldk(1, db[i]); ldr(5, 1); ldr(9, 1);
            ldk(2, 0); ldr(6, 2); ldr(10, 2);
            lbl($sformatf("d%0d", i));
            vote(0, 4, 8, $sformatf("dva%0d", i)); vote(1, 5, 9, $sformatf("dvb%0d", i));
            e(i_r(OP_COMPARE_R, 0, 1)); jmp(OP_JUMP_C, CC_C, $sformatf("e%0d", i));
            for (int c = 0; c < 3; c++) begin
              e(i_r(OP_SUB_R, 4*c, 1 + 4*c)); e(i_k(OP_ADD_K, 2 + 4*c, 1));
            end
            jmp(OP_JUMP, 0, $sformatf("d%0d", i));
            lbl($sformatf("e%0d", i));
            vote(2, 6, 10, $sformatf("dvq%0d", i)); outp(2, 8'h05);
            vote(0, 4, 8, $sformatf("dvr%0d", i)); outp(0, 8'h06);
          end
          halt();
          for (int i = 0; i < 4; i++) begin
            expv.push_back(ov(5, da[i] / db[i])); expv.push_back(ov(6, da[i] % db[i]));
          end
        end
        "madd_h": begin
          // index i = s2/s6/sA, a = s0/s4/s8, b = s1/s5/s9; a value read from
          // the scratchpad is copied into its two spare registers, i is voted
          // before it forms an address or decides the branch, the sum before
          // it is stored; s3 is the address, derived from the voted i
          int ma [9], mb [9];
          for (int i = 0; i < 9; i++) begin
            ma[i] = (i * 37 + 11) % 256; mb[i] = (i * 91 + 200) % 256;
            ldk(0, ma[i]); e(i_k(OP_STORE_K, 0, i)); ldk(0, mb[i]); e(i_k(OP_STORE_K, 0, 9 + i));
          end
          ldk(2, 0); ldr(6, 2); ldr(10, 2);
          lbl("l");
          vote(2, 6, 10, "mi");
          e(i_r(OP_FETCH_R, 0, 2)); ldr(4, 0); ldr(8, 0);
          ldr(3, 2); e(i_k(OP_ADD_K, 3, 9)); e(i_r(OP_FETCH_R, 1, 3)); ldr(5, 1); ldr(9, 1);
          for (int c = 0; c < 3; c++) e(i_r(OP_ADD_R, 4*c, 1 + 4*c));
          vote(0, 4, 8, "ms");
          ldr(3, 2); e(i_k(OP_ADD_K, 3, 18)); e(i_r(OP_STORE_R, 0, 3));
          for (int c = 0; c < 3; c++) e(i_k(OP_ADD_K, 2 + 4*c, 1));
          vote(2, 6, 10, "mc");
          e(i_k(OP_COMPARE_K, 2, 9)); jmp(OP_JUMP_C, CC_NZ, "l");
          for (int i = 0; i < 9; i++) begin e(i_k(OP_FETCH_K, 0, 18 + i)); outp(0, 8'h09); end
          halt();
          for (int i = 0; i < 9; i++) expv.push_back(ov(9, (ma[i] + mb[i]) % 256));
        end
        "bub_h": begin
          // n = s3/s7/sB, i = s4/s8/sC, i+1 = s5/s6/sF, m[i] = s0/s9/sD,
          // m[i+1] = s1/sA/sE; votes before every address use, compare and
          // store
          int d [8] = '{57, 3, 200, 18, 99, 3, 140, 1};
          for (int i = 0; i < 8; i++) begin ldk(0, d[i]); e(i_k(OP_STORE_K, 0, i)); end
          ldk(3, 7); ldr(7, 3); ldr(11, 3);
          lbl("outer"); ldk(4, 0); ldr(8, 4); ldr(12, 4);
          lbl("inner");
          vote(4, 8, 12, "bi");
          ldr(5, 4); e(i_k(OP_ADD_K, 5, 1)); ldr(6, 8); e(i_k(OP_ADD_K, 6, 1)); ldr(15, 12); e(i_k(OP_ADD_K, 15, 1));
          e(i_r(OP_FETCH_R, 0, 4)); ldr(9, 0); ldr(13, 0);
          e(i_r(OP_FETCH_R, 1, 5)); ldr(10, 1); ldr(14, 1);
          vote(0, 9, 13, "bx"); vote(1, 10, 14, "by");
          e(i_r(OP_COMPARE_R, 1, 0)); jmp(OP_JUMP_C, CC_NC, "noswap");
          vote(4, 8, 12, "bsi"); vote(5, 6, 15, "bsj");
          e(i_r(OP_STORE_R, 1, 4)); e(i_r(OP_STORE_R, 0, 5));
          lbl("noswap");
          for (int c = 0; c < 3; c++) e(i_k(OP_ADD_K, 4 + 4*c, 1));
          vote(4, 8, 12, "bj"); vote(3, 7, 11, "bn");
          e(i_r(OP_COMPARE_R, 4, 3)); jmp(OP_JUMP_C, CC_NZ, "inner");
          e(i_k(OP_SUB_K, 7, 1)); e(i_k(OP_SUB_K, 11, 1)); e(i_k(OP_SUB_K, 3, 1));
          jmp(OP_JUMP_C, CC_NZ, "outer");
          for (int i = 0; i < 8; i++) begin e(i_k(OP_FETCH_K, 0, i)); outp(0, 8'h08); end
          halt();
          d.sort();
          foreach (d[i]) expv.push_back(ov(8, d[i]));
        end
        "gcd": begin
          int pa [4] = '{84, 200, 121, 250}, pb [4] = '{36, 75, 11, 3};
          for (int i = 0; i < 4; i++) begin
            ldk(0, pa[i]); ldk(1, pb[i]); jmp(OP_CALL, 0, "gcd"); outp(0, 8'h02);
          end
          halt();
          lbl("gcd");
          e(i_r(OP_COMPARE_R, 0, 1)); jmp(OP_JUMP_C, CC_Z, "gcd_r");
          jmp(OP_JUMP_C, CC_C, "gcd_b");
          e(i_r(OP_SUB_R, 0, 1)); jmp(OP_JUMP, 0, "gcd");
          lbl("gcd_b"); e(i_r(OP_SUB_R, 1, 0)); jmp(OP_JUMP, 0, "gcd");
          lbl("gcd_r"); e(i_flow(OP_RETURN, 0));
          for (int i = 0; i < 4; i++) begin
            int x = pa[i], y = pb[i];
            while (x != y) if (x > y) x -= y; else y -= x;
            expv.push_back(ov(2, x));
          end
        end
        "mult": begin
          int ma [4] = '{13, 255, 100, 7}, mb [4] = '{11, 255, 3, 0};
          for (int i = 0; i < 4; i++) begin
            ldk(0, ma[i]); ldk(1, mb[i]); jmp(OP_CALL, 0, "mult"); outp(2, 8'h03); outp(3, 8'h04);
          end
          halt();
          sub_mult_real();
          for (int i = 0; i < 4; i++) begin
            int p = ma[i] * mb[i];
            expv.push_back(ov(3, p % 256)); expv.push_back(ov(4, p / 256));
          end
        end
        "div": begin
          int da [4] = '{200, 17, 255, 9}, db [4] = '{7, 17, 16, 10};
          for (int i = 0; i < 4; i++) begin
            ldk(0, da[i]); ldk(1, db[i]); ldk(2, 0);
            lbl($sformatf("d%0d", i));
            e(i_r(OP_COMPARE_R, 0, 1)); jmp(OP_JUMP_C, CC_C, $sformatf("e%0d", i));
            e(i_r(OP_SUB_R, 0, 1)); e(i_k(OP_ADD_K, 2, 1)); jmp(OP_JUMP, 0, $sformatf("d%0d", i));
            lbl($sformatf("e%0d", i)); outp(2, 8'h05); outp(0, 8'h06);
          end
          halt();
          for (int i = 0; i < 4; i++) begin
            expv.push_back(ov(5, da[i] / db[i])); expv.push_back(ov(6, da[i] % db[i]));
          end
        end
        "pow": begin
          int pb_ [3] = '{3, 2, 7}, pe [3] = '{5, 7, 3};
          for (int i = 0; i < 3; i++) begin
            // s8 = base, s9 = exponent, s7 = result
            ldk(8, pb_[i]); ldk(9, pe[i]); ldk(7, 1);
            lbl($sformatf("p%0d", i));
            ldr(0, 7); ldr(1, 8); jmp(OP_CALL, 0, "mult"); ldr(7, 2);
            e(i_k(OP_SUB_K, 9, 1)); jmp(OP_JUMP_C, CC_NZ, $sformatf("p%0d", i));
            outp(7, 8'h07);
          end
          halt();
          sub_mult_real();
          for (int i = 0; i < 3; i++) begin
            int r = 1;
            for (int k = 0; k < pe[i]; k++) r = (r * pb_[i]) % 256;
            expv.push_back(ov(7, r));
          end
        end
        "bub": begin
          int d [8] = '{57, 3, 200, 18, 99, 3, 140, 1};
          for (int i = 0; i < 8; i++) begin ldk(0, d[i]); e(i_k(OP_STORE_K, 0, i)); end
          // for n = 7 downto 1: for i = 0 .. n-1: if m[i] > m[i+1] swap
          ldk(3, 7);
          lbl("outer"); ldk(4, 0);
          lbl("inner");
          e(i_r(OP_FETCH_R, 0, 4)); ldr(5, 4); e(i_k(OP_ADD_K, 5, 1)); e(i_r(OP_FETCH_R, 1, 5));
          e(i_r(OP_COMPARE_R, 1, 0)); jmp(OP_JUMP_C, CC_NC, "noswap");
          e(i_r(OP_STORE_R, 1, 4)); e(i_r(OP_STORE_R, 0, 5));
          lbl("noswap");
          e(i_k(OP_ADD_K, 4, 1)); e(i_r(OP_COMPARE_R, 4, 3)); jmp(OP_JUMP_C, CC_NZ, "inner");
          e(i_k(OP_SUB_K, 3, 1)); jmp(OP_JUMP_C, CC_NZ, "outer");
          for (int i = 0; i < 8; i++) begin e(i_k(OP_FETCH_K, 0, i)); outp(0, 8'h08); end
          halt();
          d.sort();
          foreach (d[i]) expv.push_back(ov(8, d[i]));
        end
        "madd": begin
          int ma [9], mb [9];
          for (int i = 0; i < 9; i++) begin
            ma[i] = (i * 37 + 11) % 256; mb[i] = (i * 91 + 200) % 256;
            ldk(0, ma[i]); e(i_k(OP_STORE_K, 0, i)); ldk(0, mb[i]); e(i_k(OP_STORE_K, 0, 9 + i));
          end
          ldk(4, 0);
          lbl("l");
          e(i_r(OP_FETCH_R, 0, 4)); ldr(5, 4); e(i_k(OP_ADD_K, 5, 9)); e(i_r(OP_FETCH_R, 1, 5));
          e(i_r(OP_ADD_R, 0, 1)); e(i_k(OP_ADD_K, 5, 9)); e(i_r(OP_STORE_R, 0, 5));
          e(i_k(OP_ADD_K, 4, 1)); e(i_k(OP_COMPARE_K, 4, 9)); jmp(OP_JUMP_C, CC_NZ, "l");
          for (int i = 0; i < 9; i++) begin e(i_k(OP_FETCH_K, 0, 18 + i)); outp(0, 8'h09); end
          halt();
          for (int i = 0; i < 9; i++) expv.push_back(ov(9, (ma[i] + mb[i]) % 256));
        end
        "mmult": begin
          int ma [9], mb [9];
          for (int i = 0; i < 9; i++) begin
            ma[i] = (i * 5 + 2) % 16; mb[i] = (i * 3 + 1) % 16;
            ldk(0, ma[i]); e(i_k(OP_STORE_K, 0, i)); ldk(0, mb[i]); e(i_k(OP_STORE_K, 0, 9 + i));
          end
          // sA = row*3, sB = col, sC = k, sD = accumulator
          ldk(10, 0);
          lbl("row"); ldk(11, 0);
          lbl("col"); ldk(12, 0); ldk(13, 0);
          lbl("kk");
          ldr(6, 10); e(i_r(OP_ADD_R, 6, 12)); e(i_r(OP_FETCH_R, 0, 6));          // A[row][k]
          ldr(6, 12); e(i_r(OP_ADD_R, 6, 12)); e(i_r(OP_ADD_R, 6, 12));           // 3k
          e(i_r(OP_ADD_R, 6, 11)); e(i_k(OP_ADD_K, 6, 9)); e(i_r(OP_FETCH_R, 1, 6)); // B[k][col]
          jmp(OP_CALL, 0, "mult"); e(i_r(OP_ADD_R, 13, 2));
          e(i_k(OP_ADD_K, 12, 1)); e(i_k(OP_COMPARE_K, 12, 3)); jmp(OP_JUMP_C, CC_NZ, "kk");
          outp(13, 8'h0A);
          e(i_k(OP_ADD_K, 11, 1)); e(i_k(OP_COMPARE_K, 11, 3)); jmp(OP_JUMP_C, CC_NZ, "col");
          e(i_k(OP_ADD_K, 10, 3)); e(i_k(OP_COMPARE_K, 10, 9)); jmp(OP_JUMP_C, CC_NZ, "row");
          halt();
          sub_mult_real();
          for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) begin
            int acc = 0;
            for (int k = 0; k < 3; k++) acc += ma[3*r + k] * mb[3*k + c];
            expv.push_back(ov(10, acc % 256));
          end
        end
        default: $fatal(1, "unknown benchmark %s", name);
      endcase
      a_end();
    endfunction

    // majority vote of registers a, b, c in place
    function automatic void vote(int a, int b, int c, string tag);
      e(i_r(OP_COMPARE_R, a, b)); jmp(OP_JUMP_C, CC_NZ, {tag, "_1"});
      ldr(c, a); jmp(OP_JUMP, 0, {tag, "_d"});
      lbl({tag, "_1"}); e(i_r(OP_COMPARE_R, a, c)); jmp(OP_JUMP_C, CC_NZ, {tag, "_2"});
      ldr(b, a); jmp(OP_JUMP, 0, {tag, "_d"});
      lbl({tag, "_2"}); ldr(a, b);
      lbl({tag, "_d"});
    endfunction

    // 8 x 8 multiply: s0 * s1 -> s3:s2 (hi:lo); uses s4 (multiplicand low),
    // s6 (multiplicand high), s5 (bit count)
    function automatic void sub_mult_real();
      lbl("mult");
      ldk(2, 0); ldk(3, 0); ldr(4, 0); ldk(6, 0); ldk(5, 8);
      lbl("mult_l");
      e(i_shift(1, SH_SR0));
      jmp(OP_JUMP_C, CC_NC, "mult_s");
      e(i_r(OP_ADD_R, 2, 4)); e(i_r(OP_ADDCY_R, 3, 6));
      lbl("mult_s");
      e(i_shift(4, SH_SL0)); e(i_shift(6, SH_SLA));
      e(i_k(OP_SUB_K, 5, 1));
      jmp(OP_JUMP_C, CC_NZ, "mult_l");
      e(i_flow(OP_RETURN, 0));
    endfunction


    function automatic int halt_addr(); return labels["halt"]; endfunction
    function automatic int size(); return n_words; endfunction
  endclass
endpackage
