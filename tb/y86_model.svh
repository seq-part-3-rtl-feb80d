// y86_model.svh: shared testbench code for the Y86-64 processors, included
// inside a testbench module that first declares "localparam int unsigned MEMB"
// (the memory size in bytes).
//
// It holds a small assembler that writes machine code into the byte array img,
// an instruction-level Y86-64 interpreter working on its own copy of memory
// (rmem, registers r, flags mzf/msf/mof, mpc, mstat with 1=AOK 2=HLT 3=ADR
// 4=INS), counters of every mechanism the interpreter saw, and the test
// programs. The interpreter follows the same choices as the processor: a
// fetch needs all 10 bytes at the PC inside memory, a stopping instruction
// changes nothing, popq %rsp leaves the popped value in %rsp.

  // ---------------- mechanism counters ----------------
  int n_icode [16];
  int n_aluop [4];
  int n_jmp_taken, n_jmp_not, n_cmov_taken, n_cmov_not;
  int n_cond_seen [7];
  int n_selfmod, n_pop_rsp, n_stop_hlt, n_stop_ins, n_stop_adr_d, n_stop_adr_i;

  // ---------------- program image and model state ----------------
  logic [7:0] img  [MEMB];
  logic [7:0] rmem [MEMB];
  longint unsigned r [16];
  logic   mzf, msf, mof;
  longint unsigned mpc;
  int     mstat;
  int     asm_pc;
  bit     stored_byte [MEMB]; // bytes written by a store since the program was loaded


  // ---------------- tiny assembler ----------------
  function automatic void emit(input logic [7:0] b);
    img[asm_pc] = b;
    asm_pc++;
  endfunction
  function automatic void emit8(input longint unsigned v);
    for (int i = 0; i < 8; i++) emit(8'(v >> (8 * i)));
  endfunction
  function automatic void a_rr(input int ic, input int fn, input int ra, input int rb);
    emit(8'((ic << 4) | fn)); emit(8'((ra << 4) | rb));
  endfunction
  function automatic void a_halt();  emit(8'h00); endfunction
  function automatic void a_nop();   emit(8'h10); endfunction
  function automatic void a_rrmov(input int fn, input int ra, input int rb); a_rr(2, fn, ra, rb); endfunction
  function automatic void a_irmov(input longint unsigned v, input int rb); a_rr(3, 0, 15, rb); emit8(v); endfunction
  function automatic void a_rmmov(input int ra, input longint unsigned d, input int rb); a_rr(4, 0, ra, rb); emit8(d); endfunction
  function automatic void a_mrmov(input longint unsigned d, input int rb, input int ra); a_rr(5, 0, ra, rb); emit8(d); endfunction
  function automatic void a_op(input int fn, input int ra, input int rb); a_rr(6, fn, ra, rb); endfunction
  function automatic void a_jxx(input int fn, input longint unsigned t); emit(8'(8'h70 | fn)); emit8(t); endfunction
  function automatic void a_call(input longint unsigned t); emit(8'h80); emit8(t); endfunction
  function automatic void a_ret();   emit(8'h90); endfunction
  function automatic void a_push(input int ra); a_rr(10, 0, ra, 15); endfunction
  function automatic void a_pop(input int ra);  a_rr(11, 0, ra, 15); endfunction

  // ---------------- reference model ----------------
  function automatic longint unsigned rd8(input longint unsigned a);
    longint unsigned v = 0;
    for (int i = 7; i >= 0; i--) v = (v << 8) | longint'(rmem[a + i]);
    return v;
  endfunction
  function automatic bit cond_ok(input int fn);
    bit lt = msf ^ mof;
    case (fn)
      0: return 1;
      1: return lt | mzf;
      2: return lt;
      3: return mzf;
      4: return !mzf;
      5: return !lt;
      6: return !lt & !mzf;
      default: return 0;
    endcase
  endfunction

  // Execute one instruction in the model (only called while mstat is AOK).
  task automatic model_step();
    int ic, fn, ra, rb, len;
    longint unsigned c, va, vb, res, addr, m;
    bit has_reg, has_c, valid, dacc, dbad;
    if (mpc > longint'(MEMB - 10)) begin
      mstat = 3; n_stop_adr_i++; return;
    end
    ic = rmem[mpc][7:4]; fn = rmem[mpc][3:0];
    has_reg = ic inside {2, 3, 4, 5, 6, 10, 11};
    has_c   = ic inside {3, 4, 5, 7, 8};
    valid   = (ic inside {0, 1, 3, 4, 5, 8, 9, 10, 11} && fn == 0) ||
              (ic inside {2, 7} && fn <= 6) || (ic == 6 && fn <= 3);
    if (!valid) begin mstat = 4; n_stop_ins++; return; end
    ra = has_reg ? int'(rmem[mpc + 1][7:4]) : 15;
    rb = has_reg ? int'(rmem[mpc + 1][3:0]) : 15;
    c  = rd8(mpc + (has_reg ? 2 : 1));
    len = 1 + (has_reg ? 1 : 0) + (has_c ? 8 : 0);
    for (int i = 0; i < len; i++) if (stored_byte[mpc + i]) begin n_selfmod++; break; end
    va = (ra == 15) ? 0 : r[ra];
    // data address check
    dacc = 0; addr = 0;
    case (ic)
      4, 5: begin dacc = 1; addr = r[rb] + c; end
      8, 10: begin dacc = 1; addr = r[4] - 8; end
      9, 11: begin dacc = 1; addr = r[4]; end
      default: ;
    endcase
    dbad = dacc && (addr > longint'(MEMB - 8));
    if (ic == 0) begin mstat = 2; n_stop_hlt++; n_icode[0]++; return; end
    if (dbad) begin mstat = 3; n_stop_adr_d++; return; end
    n_icode[ic]++;
    case (ic)
      1: mpc += len;
      2: begin
        n_cond_seen[fn]++;
        if (cond_ok(fn)) begin r[rb] = va; if (fn != 0) n_cmov_taken++; end
        else n_cmov_not++;
        mpc += len;
      end
      3: begin r[rb] = c; mpc += len; end
      4: begin
        for (int i = 0; i < 8; i++) begin
          rmem[addr + i] = 8'(va >> (8 * i));
          stored_byte[addr + i] = 1;
        end
        mpc += len;
      end
      5: begin r[ra] = rd8(addr); mpc += len; end
      6: begin
        vb = r[rb];
        case (fn)
          0: begin res = vb + va; mof = (va[63] == vb[63]) && (res[63] != vb[63]); end
          1: begin res = vb - va; mof = (va[63] != vb[63]) && (res[63] != vb[63]); end
          2: begin res = vb & va; mof = 0; end
          default: begin res = vb ^ va; mof = 0; end
        endcase
        n_aluop[fn]++;
        mzf = (res == 0); msf = res[63];
        r[rb] = res; mpc += len;
      end
      7: begin
        n_cond_seen[fn]++;
        if (cond_ok(fn)) begin if (fn != 0) n_jmp_taken++; mpc = c; end
        else begin n_jmp_not++; mpc += len; end
      end
      8: begin
        for (int i = 0; i < 8; i++) rmem[addr + i] = 8'((mpc + len) >> (8 * i));
        r[4] = addr; mpc = c;
      end
      9: begin m = rd8(addr); r[4] = addr + 8; mpc = m; end
      10: begin
        for (int i = 0; i < 8; i++) rmem[addr + i] = 8'(va >> (8 * i));
        r[4] = addr;
      end
      11: begin
        m = rd8(addr); r[4] = addr + 8; r[ra] = m;
        if (ra == 4) n_pop_rsp++;
        mpc += len;
      end
      default: ;
    endcase
    if (ic == 10) mpc += len;
  endtask

  function automatic void clear_img();
    for (int i = 0; i < MEMB; i++) img[i] = 8'h00;
    asm_pc = 0;
  endfunction

  // ---------------- programs ----------------
  // Directed program: sum an array through a called function, exercise every
  // ALU op, every condition on jXX and cmovXX, push/pop, popq %rsp and a store
  // into the instruction stream.
  function automatic void prog_directed();
    int loop_top, fn_addr, patch_addr, cond_base;
    clear_img();
    a_irmov(64'h1800, 4);                 // %rsp = stack top
    a_irmov(64'h1000, 5);                 // %rbp = array base
    // array of 5 words at 0x1000 written with rmmovq
    a_irmov(64'd7, 0);    a_rmmov(0, 0, 5);
    a_irmov(64'd11, 0);   a_rmmov(0, 8, 5);
    a_irmov(64'hFFFF_FFFF_FFFF_FFFD, 0); a_rmmov(0, 16, 5);   // -3
    a_irmov(64'd100, 0);  a_rmmov(0, 24, 5);
    a_irmov(64'h7FFF_FFFF_FFFF_FFFF, 0); a_rmmov(0, 32, 5);
    a_rrmov(0, 5, 7);                     // %rdi = base
    a_irmov(64'd5, 6);                    // %rsi = count
    fn_addr = 2048;
    a_call(64'(fn_addr));                 // %rax = sum
    a_push(0);
    a_pop(3);                             // %rbx = %rax
    // ALU ops and flag-setting
    a_irmov(64'hF0F0, 1); a_irmov(64'h0FF0, 2);
    a_op(2, 1, 2);                        // and
    a_op(3, 1, 2);                        // xor
    a_op(1, 2, 1);                        // sub
    a_irmov(64'h8000_0000_0000_0000, 8); a_irmov(64'd1, 9);
    a_op(1, 9, 8);                        // min - 1 -> overflow
    // every condition, jumps and cmovs, after several flag states
    for (int k = 0; k < 3; k++) begin
      case (k)
        0: begin a_irmov(64'd3, 10); a_irmov(64'd3, 11); end      // equal
        1: begin a_irmov(64'd2, 10); a_irmov(64'd9, 11); end      // greater
        default: begin a_irmov(64'd9, 10); a_irmov(64'd2, 11); end // less
      endcase
      a_op(1, 10, 11);                    // flags from r11 - r10
      for (int fn = 0; fn <= 6; fn++) begin
        a_irmov(64'(fn + 16 * k), 12);
        a_rrmov(fn, 12, 13);              // cmovXX
        cond_base = asm_pc;
        a_jxx(fn, 64'(cond_base + 9 + 10));  // skip the irmovq if taken
        a_irmov(64'hDEAD, 14);
      end
    end
    // store over the next instruction: irmovq $1,%r14 becomes irmovq $0x55,%r14
    patch_addr = asm_pc + 10 + 10;        // after this irmovq and the rmmovq
    a_irmov(64'h55, 0);
    a_rmmov(0, 64'(patch_addr + 2), 15);  // base register 0xF reads as 0
    a_irmov(64'd1, 14);
    // popq %rsp
    a_irmov(64'h1700, 0);
    a_push(0);
    a_pop(4);
    a_nop();
    a_halt();
    // function: %rax = sum of %rsi words at %rdi
    asm_pc = fn_addr;
    a_irmov(64'd0, 0);
    a_irmov(64'd8, 8);
    a_irmov(64'd1, 9);
    loop_top = asm_pc;
    a_mrmov(0, 7, 10);
    a_op(0, 10, 0);                       // add
    a_op(0, 8, 7);
    a_op(1, 9, 6);
    a_jxx(4, 64'(loop_top));              // jne
    a_ret();
  endfunction

  function automatic void prog_invalid();
    clear_img();
    a_irmov(64'd5, 0);
    a_nop();
    emit(8'hC0);                          // no such instruction
    a_irmov(64'd6, 0);
  endfunction

  function automatic void prog_bad_data();
    clear_img();
    a_irmov(64'd42, 1);
    a_irmov(64'(MEMB - 4), 2);
    a_rmmov(1, 0, 2);                     // word runs past the end
    a_halt();
  endfunction

  function automatic void prog_bad_fetch();
    clear_img();
    a_irmov(64'd1, 1);
    a_jxx(0, 64'(MEMB - 3));              // fetch past the end
  endfunction

  function automatic void prog_random(input int n);
    int dsts [12] = '{0, 1, 2, 3, 6, 7, 8, 9, 10, 11, 12, 13};
    int k, t;
    clear_img();
    a_irmov(64'h1800, 4);
    a_irmov(64'h1000, 5);
    for (int i = 0; i < 12; i++) a_irmov({$urandom, $urandom}, dsts[i]);
    for (int i = 0; i < n; i++) begin
      k = $urandom_range(0, 8);
      t = dsts[$urandom_range(0, 11)];
      case (k)
        0: a_irmov({$urandom, $urandom}, t);
        1: a_rrmov($urandom_range(0, 6), dsts[$urandom_range(0, 11)], t);
        2: a_op($urandom_range(0, 3), dsts[$urandom_range(0, 11)], t);
        3: a_rmmov(dsts[$urandom_range(0, 11)], 64'(8 * $urandom_range(0, 31)), 5);
        4: a_mrmov(64'(8 * $urandom_range(0, 31)), 5, t);
        5: a_push(dsts[$urandom_range(0, 11)]);
        6: a_pop(t);
        7: begin
          a_jxx($urandom_range(0, 6), 64'(asm_pc + 9 + 10));
          a_irmov({$urandom, $urandom}, t);
        end
        default: a_op($urandom_range(0, 3), dsts[$urandom_range(0, 11)], t);
      endcase
    end
    a_halt();
  endfunction

