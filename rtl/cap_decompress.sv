// cap_decompress: decodes the 18-bit compressed bounds of a CHERI-64
// capability into a full base and top, combinationally.
//
// The bounds are stored in a floating-point form relative to the address:
// an exponent E, a 7-bit base mantissa B and a 6-bit length mantissa L (the
// sealed layout keeps only B[6:3] and L[5:3] and holds the otype in the low
// six bits). The base is rebuilt from the address: its bits above E+6 are the
// address's, corrected by -1 or +1 when the address and the base lie on
// different sides of the representable-region edge R = B - 16; bits [E+6:E]
// are B; the low E bits are zero. The top is base + (L << E). E is clamped to
// 27, which lets one capability span the full 4 GiB space.
//
// That the capability register file and memory hold capabilities in
// compressed form, and that every check first decompresses them, follows the
// published design; the particular encoding (field widths, the correction
// rule, R = B - 16) is this design's own.
//
// Interface: cap (the 64-bit word), dec (base, top, length, offset, otype,
// exponent, sealable flag). Purely combinational.
module cap_decompress
  import cheri_pkg::*;
(
  input  cap_word_t cap,
  output cap_dec_t  dec
);

  logic [E_W-1:0]  e;
  logic [MW-1:0]   b, r, a_mid;
  logic [LW-1:0]   l;
  logic [33:0]     a34, a_hi, hi, base34, top34;
  logic            a_lo, b_lo;

  always_comb begin
    e = (cap.bounds[17:13] > E_W'(E_MAX)) ? E_W'(E_MAX) : cap.bounds[17:13];
    if (cap.sealed) begin
      b = {cap.bounds[12:9], 3'b000};
      l = {cap.bounds[8:6], 3'b000};
    end else begin
      b = cap.bounds[12:6];
      l = cap.bounds[5:0];
    end
    a34    = {2'b00, cap.addr};
    a_mid  = MW'(a34 >> e);
    a_hi   = a34 >> (32'(e) + MW);
    r      = b - MW'(16);
    a_lo   = a_mid < r;
    b_lo   = b < r;
    if (a_lo == b_lo)  hi = a_hi;
    else if (a_lo)     hi = a_hi - 34'd1;
    else               hi = a_hi + 34'd1;
    base34 = (hi << (32'(e) + MW)) | (34'(b) << e);
    top34  = {2'b00, base34[31:0]} + (34'(l) << e);

    dec.base     = {1'b0, base34[31:0]};
    dec.top      = (top34 > 34'h1_0000_0000) ? 33'h1_0000_0000 : top34[32:0];
    dec.length   = dec.top - dec.base;
    dec.offset   = cap.addr - base34[31:0];
    dec.otype    = cap.sealed ? cap.bounds[5:0] : '1;
    dec.e        = e;
    dec.low_zero = (b[2:0] == 3'b000) && (l[2:0] == 3'b000);
  end

endmodule
