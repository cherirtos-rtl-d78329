// cap_alu: the capability-manipulation unit of the coprocessor.
//
// It executes the register-to-register capability instructions in one
// combinational pass: reading a field into a GPR (base, length, offset,
// permissions, otype, tag, sealed, address), and deriving a new capability
// from cb (move, increment/set offset, set bounds, AND permissions, clear
// tag, seal with the key ct, unseal with the key ct). Every derivation can
// only keep or reduce rights: CSetBounds must stay inside the old bounds
// after rounding, CAndPerm can only clear bits, sealing needs a key with the
// Seal permission whose address is the otype, unsealing a key whose address
// equals the sealed otype. A violated rule raises an exception cause instead
// of writing cd. Moving the address of a capability so far that its bounds
// can no longer be encoded clears the tag rather than trapping.
//
// That derivation is monotonic, that sealing takes the otype from a key
// capability, and that sealed capabilities are immutable follow the published
// design; the instruction list, check order and causes follow the CHERI ISA
// as this design reads it.
//
// Interface: op, cb, ct, rt (GPR operand) in; cd_we/cd, gpr_we/gpr,
// cause/exc_ct (the failing operand is ct rather than cb), setb_exact out.
module cap_alu
  import cheri_pkg::*;
(
  input  cop_op_t           op,
  input  cap_t              cb,
  input  cap_t              ct,
  input  logic [ADDR_W-1:0] rt,
  output logic              cd_we,
  output cap_t              cd,
  output logic              gpr_we,
  output logic [63:0]       gpr,
  output exc_t              cause,
  output logic              exc_ct,
  output logic              setb_exact  // CSetBounds needed no rounding
);

  cap_dec_t db, dt, dn;
  cap_word_t moved;
  logic [BND_W-1:0] nb;
  logic [ADDR_W:0]  rbase, rtop;
  logic             exact;
  logic [ADDR_W:0]  req_top;
  logic             ct_in_bounds;

  cap_decompress u_db (.cap(cb.w), .dec(db));
  cap_decompress u_dt (.cap(ct.w), .dec(dt));
  // cb with a new address, re-decoded to see whether the bounds survive
  cap_decompress u_dn (.cap(moved), .dec(dn));
  cap_compress   u_cc (.base(cb.w.addr), .length(rt), .bounds(nb),
                       .rbase(rbase), .rtop(rtop), .exact(exact));

  assign setb_exact = exact;

  always_comb begin
    moved = cb.w;
    if (op == OP_CSETOFFSET) moved.addr = db.base[ADDR_W-1:0] + rt;
    else                     moved.addr = cb.w.addr + rt;
  end

  always_comb begin
    cd_we  = 1'b0;
    cd     = cb;
    gpr_we = 1'b0;
    gpr    = '0;
    cause  = EXC_NONE;
    exc_ct = 1'b0;
    req_top = {1'b0, cb.w.addr} + {1'b0, rt};
    ct_in_bounds = ({1'b0, ct.w.addr} >= dt.base) && ({1'b0, ct.w.addr} < dt.top);
    unique case (op)
      OP_CGETBASE:   begin gpr_we = 1'b1; gpr = 64'(db.base);   end
      OP_CGETLEN:    begin gpr_we = 1'b1; gpr = 64'(db.length); end
      OP_CGETOFFSET: begin gpr_we = 1'b1; gpr = 64'(db.offset); end
      OP_CGETPERM:   begin gpr_we = 1'b1; gpr = 64'(cb.w.perms); end
      OP_CGETTYPE:   begin gpr_we = 1'b1; gpr = cb.w.sealed ? 64'(db.otype) : '1; end
      OP_CGETTAG:    begin gpr_we = 1'b1; gpr = 64'(cb.tag); end
      OP_CGETSEALED: begin gpr_we = 1'b1; gpr = 64'(cb.w.sealed); end
      OP_CGETADDR:   begin gpr_we = 1'b1; gpr = 64'(cb.w.addr); end
      OP_CMOVE:      cd_we = 1'b1;
      OP_CCLEARTAG:  begin cd_we = 1'b1; cd.tag = 1'b0; end
      OP_CINCOFFSET, OP_CSETOFFSET: begin
        if (cb.tag && cb.w.sealed) cause = EXC_SEAL;
        else begin
          cd_we  = 1'b1;
          cd.w   = moved;
          // unrepresentable result: keep the address, lose the authority
          if (dn.base != db.base || dn.top != db.top) cd.tag = 1'b0;
        end
      end
      OP_CSETBOUNDS: begin
        if (!cb.tag)                              cause = EXC_TAG;
        else if (cb.w.sealed)                     cause = EXC_SEAL;
        else if ({1'b0, cb.w.addr} < db.base || req_top > db.top ||
                 rbase < db.base || rtop > db.top) cause = EXC_LENGTH;
        else begin
          cd_we       = 1'b1;
          cd.w.bounds = nb;
        end
      end
      OP_CANDPERM: begin
        if (!cb.tag)          cause = EXC_TAG;
        else if (cb.w.sealed) cause = EXC_SEAL;
        else begin
          cd_we      = 1'b1;
          cd.w.perms = cb.w.perms & rt[PERM_W-1:0];
        end
      end
      OP_CSEAL: begin
        if (!cb.tag)                       cause = EXC_TAG;
        else if (!ct.tag)                  begin cause = EXC_TAG;  exc_ct = 1'b1; end
        else if (cb.w.sealed)              cause = EXC_SEAL;
        else if (ct.w.sealed)              begin cause = EXC_SEAL; exc_ct = 1'b1; end
        else if (!ct.w.perms[P_SEAL])      begin cause = EXC_PERM_SEAL; exc_ct = 1'b1; end
        else if (!ct_in_bounds || ct.w.addr >= ADDR_W'(1 << OTYPE_W))
                                           begin cause = EXC_LENGTH; exc_ct = 1'b1; end
        else if (!db.low_zero)             cause = EXC_REPRESENT;
        else begin
          cd_we = 1'b1;
          cd.w  = seal_word(cb.w, ct.w.addr[OTYPE_W-1:0]);
        end
      end
      OP_CUNSEAL: begin
        if (!cb.tag)                       cause = EXC_TAG;
        else if (!ct.tag)                  begin cause = EXC_TAG;  exc_ct = 1'b1; end
        else if (!cb.w.sealed)             cause = EXC_UNSEALED;
        else if (ct.w.sealed)              begin cause = EXC_SEAL; exc_ct = 1'b1; end
        else if (ct.w.addr != ADDR_W'(db.otype)) begin cause = EXC_TYPE; exc_ct = 1'b1; end
        else if (!ct.w.perms[P_UNSEAL])    begin cause = EXC_PERM_UNSEAL; exc_ct = 1'b1; end
        else if (!ct_in_bounds)            begin cause = EXC_LENGTH; exc_ct = 1'b1; end
        else begin
          cd_we = 1'b1;
          cd.w  = unseal_word(cb.w);
          cd.w.perms[P_GLOBAL] = cb.w.perms[P_GLOBAL] & ct.w.perms[P_GLOBAL];
        end
      end
      default: ;
    endcase
  end

endmodule
