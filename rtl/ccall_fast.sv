// ccall_fast: the check-and-unseal logic of the CCallFast instruction.
//
// CCallFast is a direct, exception-free call into another protection domain.
// The caller names a pair of sealed capabilities: code (cs) and data (cb).
// The call succeeds only when both carry a tag, both are sealed, their
// object types are equal, both grant CCall, the code capability is
// executable and the data capability is not. On success both are unsealed
// and handed out for installation as the new PCC and DDC in the same clock
// edge, and fetch continues at the code capability's address, the callee's
// single entry point. Because sealed capabilities can be neither changed nor
// dereferenced, holding such a pair gives a task the right to call the
// domain and nothing else.
//
// The pair, the otype match, the atomic unseal into PCC and DDC and the
// address as the only entry point follow the published design; the
// permission rules (CCall on both, execute only on code) and the check order
// are this design's own, modelled on the CHERI ISA.
//
// Interface: cs, cb in; ok, cause, exc_cb (failing operand is cb),
// new_pcc, new_ddc and target (PCC-relative entry point) out. Combinational.
module ccall_fast
  import cheri_pkg::*;
(
  input  cap_t              cs,
  input  cap_t              cb,
  output logic              ok,
  output exc_t              cause,
  output logic              exc_cb,
  output cap_t              new_pcc,
  output cap_t              new_ddc,
  output logic [ADDR_W-1:0] target
);

  cap_dec_t ds, dcb;
  cap_decompress u_ds  (.cap(cs.w), .dec(ds));
  cap_decompress u_dcb (.cap(cb.w), .dec(dcb));

  always_comb begin
    cause  = EXC_NONE;
    exc_cb = 1'b0;
    if (!cs.tag)                          cause = EXC_TAG;
    else if (!cb.tag)                     begin cause = EXC_TAG; exc_cb = 1'b1; end
    else if (!cs.w.sealed)                cause = EXC_UNSEALED;
    else if (!cb.w.sealed)                begin cause = EXC_UNSEALED; exc_cb = 1'b1; end
    else if (ds.otype != dcb.otype)       cause = EXC_TYPE;
    else if (!cs.w.perms[P_EXECUTE])      cause = EXC_PERM_EXE;
    else if (cb.w.perms[P_EXECUTE])       begin cause = EXC_PERM_EXE; exc_cb = 1'b1; end
    else if (!cs.w.perms[P_CCALL])        cause = EXC_PERM_CCALL;
    else if (!cb.w.perms[P_CCALL])        begin cause = EXC_PERM_CCALL; exc_cb = 1'b1; end
    ok = (cause == EXC_NONE);

    new_pcc = '{tag: 1'b1, w: unseal_word(cs.w)};
    new_ddc = '{tag: 1'b1, w: unseal_word(cb.w)};
    target  = cs.w.addr - ds.base[ADDR_W-1:0];
  end

endmodule
