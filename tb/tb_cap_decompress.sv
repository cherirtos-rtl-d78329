// tb_cap_decompress: checks the bounds decoder against an independent
// window-based reference on directed and random capabilities, sealed and
// unsealed, including addresses below and above the base inside the
// representable region and the root capability.
module tb_cap_decompress;
  import cheri_pkg::*;
  import cheri_tb_pkg::*;

  cap_word_t cap;
  cap_dec_t  dec;
  int checks = 0, failures = 0;

  cap_decompress dut (.cap(cap), .dec(dec));

  task automatic check_one(string what);
    longint rb, rt; int ro;
    #1;
    ref_decode(cap, rb, rt, ro);
    checks++;
    if (longint'(dec.base) != rb || longint'(dec.top) != rt ||
        longint'(dec.length) != rt - rb ||
        (cap.sealed && int'(dec.otype) != ro) ||
        dec.offset != 32'(longint'(cap.addr) - rb)) begin
      failures++;
      $display("FAIL %s bounds=%h addr=%h sealed=%0d: base %h/%h top %h/%h otype %0d/%0d",
               what, cap.bounds, cap.addr, cap.sealed, dec.base, rb, dec.top, rt, dec.otype, ro);
    end
  endtask

  initial begin
    // root: whole space
    cap = ROOT_CAP.w;
    check_one("root");
    checks++;
    if (dec.base != 0 || dec.top != 33'h1_0000_0000) begin
      failures++; $display("FAIL root explicit");
    end
    // region 0x1000..0x1400 with E = 6
    cap = mk_cap(6, 'h1000, 16, '1, 'h1010).w;   // base 0x1000, top 0x1400
    check_one("e6");
    checks++;
    if (dec.base != 33'h1000 || dec.top != 33'h1400 || dec.offset != 32'h10) begin
      failures++; $display("FAIL e6 explicit base %h top %h", dec.base, dec.top);
    end
    // address below base but still representable (B - 16 units)
    cap.addr = 32'h0FC0;
    check_one("below");
    checks++;
    if (dec.base != 33'h1000) begin failures++; $display("FAIL below explicit %h", dec.base); end
    // window wrap: base near top of a 2^(E+7) block, address in next block
    cap = mk_cap(4, 'h7F0, 8, '1, 'h800).w;       // B = 0x7F, addr past 0x800
    check_one("wrap");
    checks++;
    if (dec.base != 33'h7F0 || dec.top != 33'h870) begin
      failures++; $display("FAIL wrap explicit %h %h", dec.base, dec.top);
    end
    // sealed with otype 37
    cap = mk_cap(3, 'h2000, 16, '1, 'h2008).w;
    cap = seal_word(cap, 6'd37);
    check_one("sealed");
    checks++;
    if (dec.otype != 6'd37 || dec.base != 33'h2000 || dec.top != 33'h2080) begin
      failures++; $display("FAIL sealed explicit");
    end
    // random
    repeat (3000) begin
      int e; longint b, span, a;
      e    = $urandom_range(0, 27);
      b    = (longint'($urandom) << e) & 64'hFFFF_FFFF & ~((longint'(1) << e) - 1);
      span = $urandom_range(0, 63);
      // address anywhere in [base - 16u, base + 112u)
      a    = b + (longint'($urandom_range(0, 127)) - 16) * (longint'(1) << e)
               + ($urandom & ((1 << e) - 1));
      if (a < 0 || a > 64'hFFFF_FFFF) a = b;
      cap = mk_cap(e, b, int'(span), perm_t'($urandom), a).w;
      if ($urandom_range(0, 3) == 0) begin
        cap.bounds[8:6] = 3'd0; cap.bounds[2:0] = 3'd0;
        cap = seal_word(cap, 6'($urandom));
      end
      check_one("random");
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
