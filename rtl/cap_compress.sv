// cap_compress: encodes a requested region [base, base + length) into the
// 18-bit unsealed bounds field {E, B, L} used by cap_decompress.
//
// It picks the smallest exponent E (0..27) for which the region, rounded
// outward to multiples of 2**E, spans at most 63 such units: B is the rounded
// base's bits [E+6:E] and L the span. All 28 candidates are evaluated in
// parallel and a priority pick takes the first that fits. The rounded base
// and top are returned so the caller can check them against the parent
// capability, and `exact` reports whether any rounding happened. The encoding
// is this design's own; the published design only states that bounds are
// compressed into 18 bits.
//
// Interface: base (32 bits), length (32 bits) in; bounds, rounded base/top
// (33 bits) and exact out. Purely combinational.
module cap_compress
  import cheri_pkg::*;
(
  input  logic [ADDR_W-1:0] base,
  input  logic [ADDR_W-1:0] length,
  output logic [BND_W-1:0]  bounds,
  output logic [ADDR_W:0]   rbase,
  output logic [ADDR_W:0]   rtop,
  output logic              exact
);

  logic [33:0] b34, t34, bq, tq, span;
  logic        found;
  logic [E_W-1:0] e_sel;
  logic [33:0] bq_sel, span_sel;

  always_comb begin
    b34      = {2'b00, base};
    t34      = b34 + {2'b00, length};
    found    = 1'b0;
    e_sel    = E_W'(E_MAX);
    bq_sel   = '0;
    span_sel = '0;
    for (int i = 0; i <= int'(E_MAX); i++) begin
      bq   = b34 >> i;
      tq   = (t34 + ((34'd1 << i) - 34'd1)) >> i;
      span = tq - bq;
      if (!found && span <= 34'd63) begin
        found    = 1'b1;
        e_sel    = E_W'(i);
        bq_sel   = bq;
        span_sel = span;
      end
    end
    bounds = {e_sel, bq_sel[MW-1:0], span_sel[LW-1:0]};
    rbase  = 33'(bq_sel << e_sel);
    rtop   = 33'((bq_sel + span_sel) << e_sel);
    exact  = (rbase == {1'b0, base}) && (rtop == t34[32:0]);
  end

endmodule
