// tb_cap_compress: checks the bounds encoder by its properties rather than by
// re-running its algorithm: the rounded region must contain the request,
// decoding the produced field at the requested base must give exactly the
// rounded region, the exponent must be the smallest that fits (one less
// needs more than 63 units), and `exact` must say whether rounding happened.
module tb_cap_compress;
  import cheri_pkg::*;
  import cheri_tb_pkg::*;

  logic [31:0] base, length;
  logic [17:0] bounds;
  logic [32:0] rbase, rtop;
  logic        exact;
  int checks = 0, failures = 0;

  cap_compress dut (.base(base), .length(length), .bounds(bounds),
                    .rbase(rbase), .rtop(rtop), .exact(exact));

  task automatic check_one(string what);
    cap_word_t w; longint db, dt, t; int ot, e; longint u, bq, tq;
    #1;
    t = longint'(base) + longint'(length);
    w = '0; w.bounds = bounds; w.addr = base;
    ref_decode(w, db, dt, ot);
    e = int'(bounds[17:13]);
    checks++;
    if (longint'(rbase) > longint'(base) || longint'(rtop) < t ||
        db != longint'(rbase) || dt != longint'(rtop) ||
        exact != (longint'(rbase) == longint'(base) && longint'(rtop) == t)) begin
      failures++;
      $display("FAIL %s base=%h len=%h: bounds=%h r=[%h,%h) dec=[%h,%h) exact=%0d",
               what, base, length, bounds, rbase, rtop, db, dt, exact);
    end
    if (e > 0) begin
      u  = longint'(1) << (e - 1);
      bq = longint'(base) / u;
      tq = (t + u - 1) / u;
      checks++;
      if (tq - bq <= 63) begin
        failures++;
        $display("FAIL %s exponent %0d not minimal", what, e);
      end
    end
  endtask

  initial begin
    base = 32'h1000; length = 32'h40;       check_one("small exact");
    checks++; if (!exact || bounds != {5'd1, 7'h00, 6'd32}) begin
      failures++; $display("FAIL small exact explicit %h", bounds); end
    base = 32'h1003; length = 32'd100;      check_one("rounded");
    checks++; if (exact) begin failures++; $display("FAIL rounded exact"); end
    base = 32'h0;    length = 32'hFFFF_FFFF; check_one("huge");
    base = 32'h5;    length = 32'h0;        check_one("empty");
    repeat (3000) begin
      base   = $urandom;
      length = $urandom >> $urandom_range(0, 31);
      if (longint'(base) + longint'(length) > 64'hFFFF_FFFF) length = ~base;
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
