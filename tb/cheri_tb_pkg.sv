// cheri_tb_pkg: reference models shared by the testbenches.
//
// ref_decode computes a capability's bounds with a formula different from
// the RTL's: it finds the representable region, the 2**(E+7)-byte window
// that starts 16 units of 2**E below the base and contains the address,
// and counts the base up from the window's start. mk_cap builds a tagged,
// unsealed capability from an exponent, an aligned base, a length in units
// of 2**E, permissions and an address.
package cheri_tb_pkg;
  import cheri_pkg::*;

  function automatic void ref_decode(input cap_word_t w,
                                     output longint base, output longint top,
                                     output int otype);
    int e, b, l, r;
    longint m, u, a, lo;
    e = int'(w.bounds[17:13]);
    if (e > 27) e = 27;
    if (w.sealed) begin
      b = int'(w.bounds[12:9]) * 8;
      l = int'(w.bounds[8:6]) * 8;
      otype = int'(w.bounds[5:0]);
    end else begin
      b = int'(w.bounds[12:6]);
      l = int'(w.bounds[5:0]);
      otype = 63;
    end
    r  = (b - 16 + 128) % 128;
    u  = longint'(1) << e;
    m  = u * 128;
    a  = longint'(w.addr);
    // window start: congruent to r*u modulo m, at most a
    lo = a - ((a - r * u) % m + m) % m;
    base = lo + ((b - r + 128) % 128) * u;
    base = base & 64'hFFFF_FFFF;
    top  = base + l * u;
    if (top > 64'h1_0000_0000) top = 64'h1_0000_0000;
  endfunction

  function automatic cap_t mk_cap(int e, longint base, int lunits, perm_t perms,
                                  longint addr);
    cap_t c;
    c.tag      = 1'b1;
    c.w.perms  = perms;
    c.w.sealed = 1'b0;
    c.w.rsvd   = 1'b0;
    c.w.bounds = {5'(e), 7'(base >> e), 6'(lunits)};
    c.w.addr   = 32'(addr);
    return c;
  endfunction

  function automatic perm_t pm(int b0, int b1 = -1, int b2 = -1, int b3 = -1,
                               int b4 = -1, int b5 = -1);
    perm_t p = '0;
    if (b0 >= 0) p[b0] = 1'b1;
    if (b1 >= 0) p[b1] = 1'b1;
    if (b2 >= 0) p[b2] = 1'b1;
    if (b3 >= 0) p[b3] = 1'b1;
    if (b4 >= 0) p[b4] = 1'b1;
    if (b5 >= 0) p[b5] = 1'b1;
    return p;
  endfunction
endpackage
