// tb_cap_check: drives random capabilities and accesses into the access
// checker and compares ok/cause with a reference built from ref_decode and
// the rule order tag, seal, permission, bounds. Directed cases cover each
// cause and the last byte inside and the first byte outside the bounds.
module tb_cap_check;
  import cheri_pkg::*;
  import cheri_tb_pkg::*;

  cap_t        cap;
  acc_t        acc;
  logic [31:0] addr;
  logic [3:0]  bytes;
  logic        ok;
  exc_t        cause;
  cap_dec_t    dec;
  int checks = 0, failures = 0;
  int seen[exc_t];

  cap_check dut (.cap, .acc, .addr, .bytes, .ok, .cause, .dec);

  function automatic exc_t ref_cause();
    longint b, t; int ot; logic p;
    ref_decode(cap.w, b, t, ot);
    p = (acc == ACC_FETCH) ? cap.w.perms[P_EXECUTE] :
        (acc == ACC_LOAD)  ? cap.w.perms[P_LOAD] : cap.w.perms[P_STORE];
    if (!cap.tag) return EXC_TAG;
    if (cap.w.sealed) return EXC_SEAL;
    if (!p) return (acc == ACC_FETCH) ? EXC_PERM_EXE :
                   (acc == ACC_LOAD) ? EXC_PERM_LOAD : EXC_PERM_STORE;
    if (longint'(addr) < b || longint'(addr) + longint'(bytes) > t) return EXC_LENGTH;
    return EXC_NONE;
  endfunction

  task automatic check_one(string what, exc_t expect_c = EXC_NONE, bit use_expect = 0);
    exc_t rc;
    #1;
    rc = use_expect ? expect_c : ref_cause();
    checks++;
    seen[cause] = seen.exists(cause) ? seen[cause] + 1 : 1;
    if (cause != rc || ok != (rc == EXC_NONE)) begin
      failures++;
      $display("FAIL %s addr=%h bytes=%0d acc=%0d: cause %s expected %s",
               what, addr, bytes, acc, cause.name(), rc.name());
    end
  endtask

  initial begin
    // data region 0x2000..0x2400, load+store
    cap = mk_cap(5, 'h2000, 32, pm(P_LOAD, P_STORE), 'h2000);
    acc = ACC_LOAD;  bytes = 4;
    addr = 32'h2000; check_one("first word", EXC_NONE, 1);
    addr = 32'h23FC; check_one("last word", EXC_NONE, 1);
    addr = 32'h23FD; check_one("straddles top", EXC_LENGTH, 1);
    addr = 32'h1FFF; bytes = 1; check_one("below base", EXC_LENGTH, 1);
    acc = ACC_FETCH; addr = 32'h2000; bytes = 4; check_one("no exec", EXC_PERM_EXE, 1);
    cap.w.perms = pm(P_LOAD); acc = ACC_STORE; check_one("no store", EXC_PERM_STORE, 1);
    cap.tag = 1'b0; check_one("untagged", EXC_TAG, 1);
    cap = mk_cap(5, 'h2000, 32, '1, 'h2000); cap.w = seal_word(cap.w, 6'd3);
    acc = ACC_LOAD; check_one("sealed", EXC_SEAL, 1);
    repeat (4000) begin
      int e; longint b;
      e = $urandom_range(0, 20);
      b = (longint'($urandom) << e) & 64'h7FFF_FFFF & ~((longint'(1) << e) - 1);
      cap = mk_cap(e, b, $urandom_range(0, 63), perm_t'($urandom), b);
      cap.tag = ($urandom_range(0, 15) != 0);
      if ($urandom_range(0, 15) == 0) cap.w = seal_word(cap.w, 6'($urandom));
      acc   = acc_t'($urandom_range(0, 2));
      bytes = 4'(1 << $urandom_range(0, 3));
      addr  = 32'(b + longint'($urandom_range(0, 70)) * (longint'(1) << e) / 64
                  - longint'($urandom_range(0, 8)));
      check_one("random");
    end
    checks++;
    if (!seen.exists(EXC_NONE) || !seen.exists(EXC_LENGTH) || !seen.exists(EXC_TAG)) begin
      failures++; $display("FAIL random run did not reach every outcome");
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
