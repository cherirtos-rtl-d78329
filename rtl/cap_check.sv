// cap_check: one bounds-and-permission check of a memory access against one
// capability.
//
// The capability is decompressed, then the access [addr, addr + bytes) is
// checked in a fixed order: tag set, capability unsealed, the permission the
// access needs (execute for a fetch, load or store for data), then the
// bounds base <= addr and addr + bytes <= top. The first failing rule gives
// the cause. Because every CHERI access names its capability (PCC for a
// fetch, DDC or an explicit register for data), one such check per access
// replaces the associative search of an MPU; the coprocessor holds one
// instance for fetch and one for data. The check order and causes are this
// design's own, modelled on the CHERI ISA.
//
// Interface: cap (tagged capability), acc (fetch/load/store), addr (absolute
// byte address), bytes (access size, 1..8); ok, cause and the decoded bounds
// out. Purely combinational.
module cap_check
  import cheri_pkg::*;
(
  input  cap_t              cap,
  input  acc_t              acc,
  input  logic [ADDR_W-1:0] addr,
  input  logic [3:0]        bytes,
  output logic              ok,
  output exc_t              cause,
  output cap_dec_t          dec
);

  cap_decompress u_dec (.cap(cap.w), .dec(dec));

  logic [ADDR_W:0] end_addr;
  logic            need_perm;

  always_comb begin
    end_addr = {1'b0, addr} + 33'(bytes);
    unique case (acc)
      ACC_FETCH: need_perm = cap.w.perms[P_EXECUTE];
      ACC_LOAD:  need_perm = cap.w.perms[P_LOAD];
      default:   need_perm = cap.w.perms[P_STORE];
    endcase
    cause = EXC_NONE;
    if (!cap.tag)
      cause = EXC_TAG;
    else if (cap.w.sealed)
      cause = EXC_SEAL;
    else if (!need_perm)
      cause = (acc == ACC_FETCH) ? EXC_PERM_EXE :
              (acc == ACC_LOAD)  ? EXC_PERM_LOAD : EXC_PERM_STORE;
    else if ({1'b0, addr} < dec.base || end_addr > dec.top)
      cause = EXC_LENGTH;
    ok = (cause == EXC_NONE);
  end

endmodule
