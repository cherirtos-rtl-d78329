// tb_cap_alu: directed and random checks of the capability-manipulation
// unit. Field reads are compared with ref_decode; derivations are checked
// for their result and for monotonicity (CSetBounds outside the parent,
// CAndPerm, sealed operands), sealing/unsealing round trips, otype and key
// rules, and loss of the tag when an offset leaves the representable region.
module tb_cap_alu;
  import cheri_pkg::*;
  import cheri_tb_pkg::*;

  cop_op_t     op;
  cap_t        cb, ct, cd;
  logic [31:0] rt;
  logic        cd_we, gpr_we, exc_ct, setb_exact;
  logic [63:0] gpr;
  exc_t        cause;
  int checks = 0, failures = 0;

  cap_alu dut (.*);

  task automatic run(cop_op_t o, cap_t b, cap_t t, logic [31:0] r);
    op = o; cb = b; ct = t; rt = r; #1;
  endtask

  task automatic expect_exc(string what, exc_t c, logic on_ct = 1'b0);
    checks++;
    if (cause != c || (c != EXC_NONE && (cd_we || exc_ct != on_ct))) begin
      failures++;
      $display("FAIL %s: cause %s expected %s (cd_we %0d exc_ct %0d)", what, cause.name(), c.name(), cd_we, exc_ct);
    end
  endtask

  task automatic expect_gpr(string what, logic [63:0] v);
    checks++;
    if (!gpr_we || gpr !== v || cause != EXC_NONE) begin
      failures++; $display("FAIL %s: gpr %h expected %h", what, gpr, v);
    end
  endtask

  task automatic expect_bounds(string what, cap_t c, longint b, longint t, logic tag);
    longint rb, rtp; int ot;
    ref_decode(c.w, rb, rtp, ot);
    checks++;
    if (!cd_we || rb != b || rtp != t || c.tag != tag) begin
      failures++;
      $display("FAIL %s: [%h,%h) tag %0d expected [%h,%h) tag %0d", what, rb, rtp, c.tag, b, t, tag);
    end
  endtask

  cap_t data, key, sealed, code;

  initial begin
    // parent: 0x10000..0x10800 (E=5, 64 units would not fit; use E=6, 32 units)
    data = mk_cap(6, 'h10000, 32, pm(P_LOAD, P_STORE, P_GLOBAL, P_LOAD_CAP, P_STORE_CAP), 'h10040);
    run(OP_CGETBASE, data, NULL_CAP, 0);   expect_gpr("getbase", 64'h10000);
    run(OP_CGETLEN, data, NULL_CAP, 0);    expect_gpr("getlen", 64'h800);
    run(OP_CGETOFFSET, data, NULL_CAP, 0); expect_gpr("getoffset", 64'h40);
    run(OP_CGETADDR, data, NULL_CAP, 0);   expect_gpr("getaddr", 64'h10040);
    run(OP_CGETPERM, data, NULL_CAP, 0);   expect_gpr("getperm", 64'(data.w.perms));
    run(OP_CGETTAG, data, NULL_CAP, 0);    expect_gpr("gettag", 64'd1);
    run(OP_CGETTYPE, data, NULL_CAP, 0);   expect_gpr("gettype unsealed", '1);
    // offsets
    run(OP_CINCOFFSET, data, NULL_CAP, 32'h100);
    expect_exc("incoffset", EXC_NONE);
    expect_bounds("incoffset bounds kept", cd, 'h10000, 'h10800, 1);
    checks++; if (cd.w.addr != 32'h10140) begin failures++; $display("FAIL incoffset addr"); end
    run(OP_CSETOFFSET, data, NULL_CAP, 32'h7FC);
    checks++; if (cd.w.addr != 32'h107FC || !cd.tag) begin failures++; $display("FAIL setoffset"); end
    run(OP_CINCOFFSET, data, NULL_CAP, 32'h10_0000);   // far outside the window
    expect_exc("unrepresentable", EXC_NONE);
    checks++; if (cd.tag || cd.w.addr != 32'h110040) begin failures++; $display("FAIL unrepresentable keeps tag"); end
    // set bounds
    run(OP_CSETBOUNDS, data, NULL_CAP, 32'h20);
    expect_exc("setbounds", EXC_NONE);
    expect_bounds("setbounds exact", cd, 'h10040, 'h10060, 1);
    checks++; if (!setb_exact) begin failures++; $display("FAIL exact flag"); end
    run(OP_CSETBOUNDS, data, NULL_CAP, 32'h800);
    expect_exc("setbounds beyond parent", EXC_LENGTH);
    data.w.addr = 32'h10003;
    run(OP_CSETBOUNDS, data, NULL_CAP, 32'd101);       // needs rounding
    expect_exc("setbounds rounded", EXC_NONE);
    checks++; if (setb_exact) begin failures++; $display("FAIL rounded flagged exact"); end
    data.w.addr = 32'h10040;
    run(OP_CSETBOUNDS, NULL_CAP, NULL_CAP, 32'h10); expect_exc("setbounds untagged", EXC_TAG);
    // permissions
    run(OP_CANDPERM, data, NULL_CAP, 32'(pm(P_LOAD)));
    checks++; if (!cd_we || cd.w.perms != pm(P_LOAD)) begin failures++; $display("FAIL andperm"); end
    // seal with key otype 9
    key = mk_cap(0, 0, 63, pm(P_SEAL, P_UNSEAL, P_GLOBAL), 9);
    run(OP_CSEAL, data, key, 0);
    expect_exc("seal", EXC_NONE);
    sealed = cd;
    run(OP_CGETTYPE, sealed, NULL_CAP, 0); expect_gpr("gettype sealed", 64'd9);
    run(OP_CGETSEALED, sealed, NULL_CAP, 0); expect_gpr("getsealed", 64'd1);
    run(OP_CGETBASE, sealed, NULL_CAP, 0); expect_gpr("sealed base kept", 64'h10000);
    run(OP_CINCOFFSET, sealed, NULL_CAP, 4); expect_exc("sealed immutable", EXC_SEAL);
    run(OP_CANDPERM, sealed, NULL_CAP, 0);   expect_exc("sealed andperm", EXC_SEAL);
    run(OP_CSEAL, sealed, key, 0);           expect_exc("seal twice", EXC_SEAL);
    key.w.perms = pm(P_UNSEAL);
    run(OP_CSEAL, data, key, 0);             expect_exc("key lacks seal", EXC_PERM_SEAL, 1);
    key.w.perms = pm(P_SEAL, P_UNSEAL); key.w.addr = 64;
    run(OP_CSEAL, data, key, 0);             expect_exc("otype out of key", EXC_LENGTH, 1);
    code = mk_cap(0, 'h3000, 5, '1, 'h3000);
    key.w.addr = 9;
    run(OP_CSEAL, code, key, 0);             expect_exc("not sealable", EXC_REPRESENT);
    // unseal
    run(OP_CUNSEAL, sealed, key, 0);
    expect_exc("unseal", EXC_NONE);
    checks++; if (cd.w.sealed || cd.w.addr != data.w.addr) begin
      failures++; $display("FAIL unseal result"); end
    expect_bounds("unseal bounds", cd, 'h10000, 'h10800, 1);
    checks++; if (cd.w.perms[P_GLOBAL]) begin failures++; $display("FAIL global not cleared by key"); end
    key.w.addr = 10;
    run(OP_CUNSEAL, sealed, key, 0);         expect_exc("wrong otype", EXC_TYPE, 1);
    key.w.addr = 9; key.w.perms = pm(P_SEAL);
    run(OP_CUNSEAL, sealed, key, 0);         expect_exc("key lacks unseal", EXC_PERM_UNSEAL, 1);
    run(OP_CUNSEAL, data, key, 0);           expect_exc("unseal unsealed", EXC_UNSEALED);
    // random: CSetBounds never grows rights
    repeat (2000) begin
      int e; longint b, pb, pt, nb2, nt2; int ot;
      e = $urandom_range(0, 20);
      b = (longint'($urandom) << e) & 64'h7FFF_FFFF & ~((longint'(1) << e) - 1);
      data = mk_cap(e, b, $urandom_range(1, 63), '1, b);
      ref_decode(data.w, pb, pt, ot);
      data.w.addr = 32'(pb + ($urandom % (pt - pb)));
      run(OP_CSETBOUNDS, data, NULL_CAP, $urandom % 32'(pt - pb + 1));
      checks++;
      if (cause == EXC_NONE) begin
        ref_decode(cd.w, nb2, nt2, ot);
        if (nb2 < pb || nt2 > pt || nb2 > longint'(data.w.addr) ||
            nt2 < longint'(data.w.addr) + longint'(rt)) begin
          failures++; $display("FAIL random setbounds [%h,%h) parent [%h,%h)", nb2, nt2, pb, pt);
        end
      end else if (cause != EXC_LENGTH) begin
        failures++; $display("FAIL random setbounds cause %s", cause.name());
      end else if (longint'(data.w.addr) + longint'(rt) <= pt) begin
        // refused only because rounding left the parent: check that claim
        longint b2, t2; int e2;
        e2 = 0;
        while (((longint'(data.w.addr) + longint'(rt) + (longint'(1) << e2) - 1) >> e2)
               - (longint'(data.w.addr) >> e2) > 63) e2++;
        b2 = (longint'(data.w.addr) >> e2) << e2;
        t2 = ((longint'(data.w.addr) + longint'(rt) + (longint'(1) << e2) - 1) >> e2) << e2;
        if (b2 >= pb && t2 <= pt) begin failures++; $display("FAIL refused a fitting setbounds"); end
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
