// tb_ccall_fast: checks the CCallFast pair rules one by one (tags, both
// sealed, matching otype, execute only on code, CCall on both) and that a
// good pair comes out unsealed with unchanged bounds and the entry point as
// a PCC-relative target. A random part then draws 3000 sealable pairs with
// random exponents, bases, lengths, object types and permissions, and
// compares each outcome with the rule list applied in order here and with the
// entry point worked out by the testbench's own bounds decoder.
module tb_ccall_fast;
  import cheri_pkg::*;
  import cheri_tb_pkg::*;

  cap_t cs, cb, new_pcc, new_ddc;
  logic ok, exc_cb;
  exc_t cause;
  logic [31:0] target;
  int checks = 0, failures = 0;

  ccall_fast dut (.*);

  cap_t code0, data0;

  task automatic expect_exc(string what, exc_t c, logic on_cb);
    #1;
    checks++;
    if (cause != c || ok != (c == EXC_NONE) || (c != EXC_NONE && exc_cb != on_cb)) begin
      failures++;
      $display("FAIL %s: cause %s expected %s exc_cb %0d", what, cause.name(), c.name(), exc_cb);
    end
  endtask

  // A tagged, unsealed capability whose encoding can be sealed: the base is
  // a multiple of 8 units and the length a multiple of 8 units.
  function automatic cap_t rand_cap();
    int e, lunits;
    longint base, addr;
    e      = $urandom_range(20);
    lunits = 8 * $urandom_range(1, 7);
    base   = (longint'($urandom_range(32'h7FFF_FFFF)) >> (e + 3)) << (e + 3);
    addr   = base + (longint'($urandom) % (longint'(lunits) << e));
    return mk_cap(e, base, lunits, perm_t'($urandom), addr);
  endfunction

  initial begin
    code0 = mk_cap(3, 'h4000, 32, pm(P_EXECUTE, P_LOAD, P_CCALL, P_GLOBAL), 'h4040);
    data0 = mk_cap(3, 'h8000, 16, pm(P_LOAD, P_STORE, P_CCALL, P_GLOBAL), 'h8000);
    cs = '{tag: 1'b1, w: seal_word(code0.w, 6'd12)};
    cb = '{tag: 1'b1, w: seal_word(data0.w, 6'd12)};
    expect_exc("good pair", EXC_NONE, 0);
    checks++;
    if (new_pcc != code0 || new_ddc != data0 || target != 32'h40) begin
      failures++; $display("FAIL good pair outputs pcc %h ddc %h target %h", new_pcc, new_ddc, target);
    end
    cs.tag = 0;                    expect_exc("code untagged", EXC_TAG, 0);
    cs.tag = 1; cb.tag = 0;        expect_exc("data untagged", EXC_TAG, 1);
    cb.tag = 1;
    cs = code0;                    expect_exc("code unsealed", EXC_UNSEALED, 0);
    cs = '{tag: 1'b1, w: seal_word(code0.w, 6'd12)};
    cb = data0;                    expect_exc("data unsealed", EXC_UNSEALED, 1);
    cb = '{tag: 1'b1, w: seal_word(data0.w, 6'd13)};
    expect_exc("otype mismatch", EXC_TYPE, 0);
    cb = '{tag: 1'b1, w: seal_word(data0.w, 6'd12)};
    cs.w.perms[P_EXECUTE] = 0;     expect_exc("code not executable", EXC_PERM_EXE, 0);
    cs.w.perms[P_EXECUTE] = 1;
    cb.w.perms[P_EXECUTE] = 1;     expect_exc("data executable", EXC_PERM_EXE, 1);
    cb.w.perms[P_EXECUTE] = 0;
    cs.w.perms[P_CCALL] = 0;       expect_exc("code lacks ccall", EXC_PERM_CCALL, 0);
    cs.w.perms[P_CCALL] = 1;
    cb.w.perms[P_CCALL] = 0;       expect_exc("data lacks ccall", EXC_PERM_CCALL, 1);
    cb.w.perms[P_CCALL] = 1;       expect_exc("good again", EXC_NONE, 0);

    for (int i = 0; i < 3000; i++) begin
      cap_t c0, d0;
      exc_t want;
      logic want_cb;
      longint rb, rtop;
      int rot;
      c0 = rand_cap();
      d0 = rand_cap();
      c0.w.perms[P_EXECUTE] = ($urandom_range(7) != 0);
      d0.w.perms[P_EXECUTE] = ($urandom_range(7) == 0);
      c0.w.perms[P_CCALL]   = ($urandom_range(7) != 0);
      d0.w.perms[P_CCALL]   = ($urandom_range(7) != 0);
      cs = '{tag: ($urandom_range(15) != 0), w: seal_word(c0.w, 6'($urandom))};
      cb = '{tag: ($urandom_range(15) != 0), w: seal_word(d0.w, cs.w.bounds[5:0])};
      if ($urandom_range(7) == 0) cb.w.bounds[5:0] = 6'($urandom);
      if ($urandom_range(15) == 0) cs.w = c0.w;
      if ($urandom_range(15) == 0) cb.w = d0.w;
      want = EXC_NONE; want_cb = 0;
      if (!cs.tag)                                 want = EXC_TAG;
      else if (!cb.tag)                            begin want = EXC_TAG; want_cb = 1; end
      else if (!cs.w.sealed)                       want = EXC_UNSEALED;
      else if (!cb.w.sealed)                       begin want = EXC_UNSEALED; want_cb = 1; end
      else if (cs.w.bounds[5:0] != cb.w.bounds[5:0]) want = EXC_TYPE;
      else if (!c0.w.perms[P_EXECUTE])             want = EXC_PERM_EXE;
      else if (d0.w.perms[P_EXECUTE])              begin want = EXC_PERM_EXE; want_cb = 1; end
      else if (!c0.w.perms[P_CCALL])               want = EXC_PERM_CCALL;
      else if (!d0.w.perms[P_CCALL])               begin want = EXC_PERM_CCALL; want_cb = 1; end
      expect_exc($sformatf("random pair %0d", i), want, want_cb);
      if (want == EXC_NONE) begin
        ref_decode(c0.w, rb, rtop, rot);
        checks++;
        if (new_pcc != c0 || new_ddc.w != d0.w || !new_ddc.tag
            || target != 32'(longint'(c0.w.addr) - rb)) begin
          failures++;
          $display("FAIL random pair %0d outputs pcc %h ddc %h target %h", i, new_pcc, new_ddc, target);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
