// cheri_cop: the CHERI-64 capability coprocessor, top of the design.
//
// The coprocessor sits beside a 32-bit-address MIPS pipeline and makes
// capabilities the only protection mechanism: every instruction fetch is
// checked against PCC and every data access against DDC (legacy loads and
// stores, whose address is an offset from DDC's base) or against a
// capability register named by the instruction. It holds the capability
// register file (8 general registers, PCC, DDC, and the kernel registers
// KR1C, KCC, EPCC), executes the capability instructions, performs CCallFast
// (an atomic install of an unsealed code/data pair as PCC/DDC, the fast
// domain crossing), the trapping CCall of the slower exception-based path,
// capability jumps (CJR/CJALR, used by the kernel CCall helper to enter and
// leave a callee), exception entry and ERET, and moves capabilities to and
// from a tagged memory with CLC/CSC.
//
// Timing. The pipeline offers an instruction on `req` when `req_ready` is
// high. Register-only instructions complete in one cycle: their `resp`
// (result GPR value, exception cause or jump target) is valid in the cycle
// after acceptance and the register file is updated at the same edge. A
// memory instruction that passes its checks sends one `mem_req`, valid in
// the cycle after acceptance (memory never back-pressures). Stores are
// posted: their `resp` comes at the same time and the next instruction may
// follow at once, so stores can issue back to back, one per cycle, which
// keeps saving a capability context cheap. Loads are pipelined: up to
// MAX_LOADS loads may be in flight, and another load is accepted every cycle
// as long as it passes its checks and its base register is not the target of
// a CLC still in flight. Memory answers reads only, in order, with
// `mem_rvalid`; the load's `resp` follows one cycle later, so a lone load
// answers 2 + memory latency cycles after acceptance and a run of loads
// answers one per cycle after that. Every other instruction, and a load that
// would fault, waits with `req_ready` low until all loads have answered, so
// responses always come in program order. `req_ready` therefore depends on
// the instruction offered. A failing check never reaches memory.
// `exc_enter` (the CPU taking an exception at exc_pc) saves PCC into EPCC
// and installs KCC as PCC at the next edge; it is only honoured while no
// load is in flight.
// Fetch checking is combinational: fetch_pc -> fetch_addr, fetch_fault.
//
// Memory tags: CSC writes the register's tag with the capability; data
// stores write tag 0, so overwriting part of a capability in memory destroys
// it. CLC clears the loaded tag when the authorising capability lacks
// LoadCap.
//
// What follows the published design: 64-bit compressed capabilities in a
// flat 32-bit space, 8 capability registers, PCC/DDC confinement with DDC-
// relative legacy accesses, one bounds check per access, sealing with
// per-task otypes, CCallFast into PCC and DDC, the kernel-only KR1C and
// single-cycle register access. This design's own: the instruction
// interface, the opcode set and exception causes, the three kernel
// registers, the memory handshake, posted stores and pipelined loads (the
// published design only says capability registers are saved and restored
// cheaply), MIPS-style link address (PC + 8) and
// loads that zero-extend. For faults on the implicit capabilities (DDC,
// PCC, EPCC) `resp.creg` is 0.
module cheri_cop
  import cheri_pkg::*;
#(
  parameter int unsigned MAX_LOADS = 4   // loads in flight; a power of two
) (
  input  logic              clk,
  input  logic              rst_n,
  // instruction interface
  input  cop_req_t          req,
  output logic              req_ready,
  output cop_resp_t         resp,
  // instruction fetch check
  input  logic [ADDR_W-1:0] fetch_pc,
  output logic [ADDR_W-1:0] fetch_addr,
  output logic              fetch_fault,
  output exc_t              fetch_cause,
  // exception entry from the CPU
  input  logic              exc_enter,
  input  logic [ADDR_W-1:0] exc_pc,
  // tagged memory
  output mem_req_t          mem_req,
  input  logic              mem_rvalid,
  input  logic [63:0]       mem_rdata,
  input  logic              mem_rtag,
  // state visible to the system (the kernel trusted-stack register)
  output cap_t              pcc_o,
  output cap_t              ddc_o,
  output cap_t              kr1c_o,
  // CSetBounds result was rounded outward (valid with resp)
  output logic              bounds_rounded
);

  // Outstanding loads, oldest at q_head. Memory answers reads in order, so
  // the head entry says what each mem_rvalid completes.
  localparam int unsigned QW = (MAX_LOADS > 1) ? $clog2(MAX_LOADS) : 1;
  typedef struct packed {
    logic       clc;       // capability load into a register
    logic       load;      // data load into a GPR
    logic       loadcap;   // authority had LoadCap: keep the loaded tag
    logic [2:0] cd;
  } pend_t;
  pend_t         q [MAX_LOADS];
  pend_t         head_e;
  logic [QW-1:0] q_head, q_tail;
  logic [QW:0]   n_out;

  // ---------------------------------------------------------------- registers
  cap_t cb_cap, ct_cap, pcc, ddc, kr1c, kcc, epcc;
  logic rf_we, pcc_we, ddc_we, kr1c_we, kcc_we, epcc_we;
  logic [2:0] rf_wa;
  cap_t rf_wd, pcc_wd, ddc_wd, kreg_wd, epcc_wd;

  cap_regfile #(.N(NUM_CREGS)) u_rf (
    .clk, .rst_n,
    .ra(req.cb), .rdata_a(cb_cap), .rb(req.ct), .rdata_b(ct_cap),
    .we(rf_we), .wa(rf_wa), .wdata(rf_wd),
    .pcc, .ddc, .kr1c, .kcc, .epcc,
    .pcc_we, .pcc_wdata(pcc_wd), .ddc_we, .ddc_wdata(ddc_wd),
    .kr1c_we, .kcc_we, .epcc_we, .kreg_wdata(kreg_wd), .epcc_wdata(epcc_wd)
  );

  assign pcc_o  = pcc;
  assign ddc_o  = ddc;
  assign kr1c_o = kr1c;

  // ------------------------------------------------------- decoded operands
  cap_dec_t pcc_dec, ddc_dec, cb_dec, epcc_dec;
  cap_decompress u_pcc_dec  (.cap(pcc.w),    .dec(pcc_dec));
  cap_decompress u_ddc_dec  (.cap(ddc.w),    .dec(ddc_dec));
  cap_decompress u_cb_dec   (.cap(cb_cap.w), .dec(cb_dec));
  cap_decompress u_epcc_dec (.cap(epcc.w),   .dec(epcc_dec));

  // ------------------------------------------------------------ fetch check
  cap_dec_t unused_fetch_dec;
  assign fetch_addr = pcc_dec.base[ADDR_W-1:0] + fetch_pc;
  logic fetch_ok;
  cap_check u_fetch (
    .cap(pcc), .acc(ACC_FETCH), .addr(fetch_addr), .bytes(4'd4),
    .ok(fetch_ok), .cause(fetch_cause), .dec(unused_fetch_dec)
  );
  assign fetch_fault = !fetch_ok;

  // ------------------------------------------------------ capability ALU
  logic alu_cd_we, alu_gpr_we, alu_exc_ct, alu_exact;
  cap_t alu_cd;
  logic [63:0] alu_gpr;
  exc_t alu_cause;
  cap_alu u_alu (
    .op(req.op), .cb(cb_cap), .ct(ct_cap), .rt(req.rt),
    .cd_we(alu_cd_we), .cd(alu_cd), .gpr_we(alu_gpr_we), .gpr(alu_gpr),
    .cause(alu_cause), .exc_ct(alu_exc_ct), .setb_exact(alu_exact)
  );

  // ------------------------------------------------------------- CCallFast
  logic cc_ok, cc_exc_cb;
  exc_t cc_cause;
  cap_t cc_pcc, cc_ddc;
  logic [ADDR_W-1:0] cc_target;
  ccall_fast u_ccall (
    .cs(cb_cap), .cb(ct_cap), .ok(cc_ok), .cause(cc_cause), .exc_cb(cc_exc_cb),
    .new_pcc(cc_pcc), .new_ddc(cc_ddc), .target(cc_target)
  );

  // ------------------------------------------------------------ data check
  logic is_store, is_legacy, is_cap_mem;
  cap_t acc_cap;
  logic [ADDR_W-1:0] ea;
  logic [3:0] nbytes;
  logic dchk_ok;
  exc_t dchk_cause;
  cap_dec_t unused_data_dec;

  always_comb begin
    is_legacy  = (req.op == OP_LOAD)  || (req.op == OP_STORE);
    is_cap_mem = (req.op == OP_CLC)   || (req.op == OP_CSC);
    is_store   = (req.op == OP_STORE) || (req.op == OP_CSTORE) || (req.op == OP_CSC);
    acc_cap    = is_legacy ? ddc : cb_cap;
    ea         = (is_legacy ? ddc_dec.base[ADDR_W-1:0] : cb_cap.w.addr) + req.rt + req.imm;
    nbytes     = is_cap_mem ? 4'd8 : (4'd1 << req.size);
  end

  cap_check u_data (
    .cap(acc_cap), .acc(is_store ? ACC_STORE : ACC_LOAD), .addr(ea), .bytes(nbytes),
    .ok(dchk_ok), .cause(dchk_cause), .dec(unused_data_dec)
  );

  // ---------------------------------------------------------------- execute
  logic      accept;
  exc_t      cause;
  logic [2:0] creg;
  logic      go_mem, redirect, gpr_we;
  logic [ADDR_W-1:0] redirect_pc;
  logic [63:0] gpr;
  logic      sysregs_ok;
  cap_t      hwr_val;

  // A load may join loads already in flight when it passes its checks, the
  // queue has room and its base register is not waiting for a CLC. Any other
  // instruction waits until every load has answered, so responses stay in
  // program order.
  logic is_load, mem_ok, hazard, overlap_ok;
  always_comb begin
    is_load = (req.op == OP_LOAD) || (req.op == OP_CLOAD) || (req.op == OP_CLC);
    mem_ok  = dchk_ok && ((ea & 32'(nbytes - 4'd1)) == '0);
    hazard  = 1'b0;
    for (int i = 0; i < int'(MAX_LOADS); i++)
      if ((QW+1)'(i) < n_out && q[q_head + QW'(i)].clc && q[q_head + QW'(i)].cd == req.cb
          && !is_legacy) hazard = 1'b1;
  end
  assign head_e     = q[q_head];
  assign overlap_ok = is_load && mem_ok && !hazard && (n_out < (QW+1)'(MAX_LOADS));
  assign req_ready  = !exc_enter && ((n_out == '0) || overlap_ok);
  assign accept     = req.valid && req_ready;

  always_comb begin
    sysregs_ok = pcc.w.perms[P_SYSREGS];
    unique case (req.hwr)
      HWR_KR1C: hwr_val = kr1c;
      HWR_KCC:  hwr_val = kcc;
      HWR_EPCC: hwr_val = epcc;
      default:  hwr_val = ddc;
    endcase
  end

  always_comb begin
    rf_we = 1'b0; rf_wa = req.cd; rf_wd = alu_cd;
    pcc_we = 1'b0; pcc_wd = pcc;
    ddc_we = 1'b0; ddc_wd = cb_cap;
    kr1c_we = 1'b0; kcc_we = 1'b0; kreg_wd = cb_cap;
    epcc_we = 1'b0; epcc_wd = pcc;
    cause = EXC_NONE; creg = req.cb;
    go_mem = 1'b0; redirect = 1'b0; redirect_pc = '0;
    gpr_we = 1'b0; gpr = '0;

    // the oldest load completes; an instruction accepted in the same cycle
    // is a load, which writes no register now
    if (mem_rvalid && head_e.clc) begin
      rf_we = 1'b1; rf_wa = head_e.cd;
      rf_wd = '{tag: mem_rtag & head_e.loadcap, w: cap_word_t'(mem_rdata)};
    end
    if (exc_enter && n_out == '0) begin
      epcc_we = 1'b1;
      epcc_wd = pcc;
      epcc_wd.w.addr = pcc_dec.base[ADDR_W-1:0] + exc_pc;
      pcc_we  = 1'b1;
      pcc_wd  = kcc;
    end else if (accept) begin
      unique case (req.op)
        OP_CGETBASE, OP_CGETLEN, OP_CGETOFFSET, OP_CGETPERM, OP_CGETTYPE,
        OP_CGETTAG, OP_CGETSEALED, OP_CGETADDR, OP_CMOVE, OP_CINCOFFSET,
        OP_CSETOFFSET, OP_CSETBOUNDS, OP_CANDPERM, OP_CCLEARTAG, OP_CSEAL,
        OP_CUNSEAL: begin
          cause  = alu_cause;
          creg   = alu_exc_ct ? req.ct : req.cb;
          rf_we  = alu_cd_we && (alu_cause == EXC_NONE);
          gpr_we = alu_gpr_we;
          gpr    = alu_gpr;
        end
        OP_CGETPCC: begin
          rf_we = 1'b1;
          rf_wd = pcc;
          rf_wd.w.addr = pcc_dec.base[ADDR_W-1:0] + req.pc;
        end
        OP_CREADHWR: begin
          if (req.hwr != HWR_DDC && !sysregs_ok) begin cause = EXC_SYSREGS; creg = 3'd0; end
          else begin rf_we = 1'b1; rf_wd = hwr_val; end
        end
        OP_CWRITEHWR: begin
          if (req.hwr != HWR_DDC && !sysregs_ok) begin cause = EXC_SYSREGS; creg = 3'd0; end
          else unique case (req.hwr)
            HWR_KR1C: kr1c_we = 1'b1;
            HWR_KCC:  kcc_we  = 1'b1;
            HWR_EPCC: begin epcc_we = 1'b1; epcc_wd = cb_cap; end
            default:  ddc_we  = 1'b1;
          endcase
        end
        OP_CJR, OP_CJALR: begin
          if (!cb_cap.tag)                     cause = EXC_TAG;
          else if (cb_cap.w.sealed)            cause = EXC_SEAL;
          else if (!cb_cap.w.perms[P_EXECUTE]) cause = EXC_PERM_EXE;
          else begin
            pcc_we      = 1'b1;
            pcc_wd      = cb_cap;
            redirect    = 1'b1;
            redirect_pc = cb_cap.w.addr - cb_dec.base[ADDR_W-1:0];
            if (req.op == OP_CJALR) begin
              rf_we = 1'b1;
              rf_wd = pcc;
              rf_wd.w.addr = pcc_dec.base[ADDR_W-1:0] + req.pc + 32'd8;
            end
          end
        end
        OP_CCALLFAST: begin
          if (!cc_ok) begin
            cause = cc_cause;
            creg  = cc_exc_cb ? req.ct : req.cb;
          end else begin
            pcc_we = 1'b1; pcc_wd = cc_pcc;
            ddc_we = 1'b1; ddc_wd = cc_ddc;
            redirect    = 1'b1;
            redirect_pc = cc_target;
          end
        end
        OP_CCALL: begin
          // exception-based domain crossing: the kernel handler checks the
          // otypes and unseals in software
          cause = EXC_CALL;
          creg  = req.cb;
        end
        OP_ERET: begin
          if (!sysregs_ok) begin cause = EXC_SYSREGS; creg = 3'd0; end
          else begin
            pcc_we      = 1'b1;
            pcc_wd      = epcc;
            redirect    = 1'b1;
            redirect_pc = epcc.w.addr - epcc_dec.base[ADDR_W-1:0];
          end
        end
        OP_LOAD, OP_STORE, OP_CLOAD, OP_CSTORE, OP_CLC, OP_CSC: begin
          if (is_legacy) creg = 3'd0;
          if (!dchk_ok)                              cause = dchk_cause;
          else if ((ea & 32'(nbytes - 4'd1)) != '0)  cause = EXC_ALIGN;
          else if (req.op == OP_CSC && ct_cap.tag && !cb_cap.w.perms[P_STORE_CAP])
                                                     cause = EXC_PERM_SCAP;
          else if (req.op == OP_CSC && ct_cap.tag && !ct_cap.w.perms[P_GLOBAL] &&
                   !cb_cap.w.perms[P_STORE_LCAP])    cause = EXC_PERM_SLCAP;
          else go_mem = 1'b1;
        end
        default: ;
      endcase
    end
  end

  // ------------------------------------------------------- sequential part
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      resp      <= '0;
      bounds_rounded <= 1'b0;
      mem_req   <= '0;
      q_head    <= '0;
      q_tail    <= '0;
      n_out     <= '0;
      for (int i = 0; i < int'(MAX_LOADS); i++) q[i] <= '0;
    end else begin
      resp          <= '0;
      bounds_rounded <= 1'b0;
      mem_req.valid <= 1'b0;
      n_out <= n_out + (QW+1)'(accept && go_mem && !is_store) - (QW+1)'(mem_rvalid);
      if (accept) begin
        if (go_mem) begin
          if (is_store) begin
            resp.valid <= 1'b1;     // posted store
            resp.cause <= EXC_NONE;
          end else begin
            q[q_tail] <= '{clc: (req.op == OP_CLC),
                           load: (req.op == OP_LOAD) || (req.op == OP_CLOAD),
                           loadcap: cb_cap.w.perms[P_LOAD_CAP], cd: req.cd};
            q_tail    <= q_tail + 1'b1;
          end
          mem_req.valid <= 1'b1;
          mem_req.we    <= is_store;
          mem_req.addr  <= ea;
          mem_req.size  <= is_cap_mem ? 2'd3 : req.size;
          mem_req.wdata <= (req.op == OP_CSC) ? 64'(ct_cap.w) : req.wdata;
          mem_req.wtag  <= (req.op == OP_CSC) ? ct_cap.tag : 1'b0;
        end else begin
          resp.valid       <= 1'b1;
          resp.cause       <= cause;
          resp.creg        <= creg;
          resp.gpr         <= gpr;
          resp.gpr_we      <= gpr_we && (cause == EXC_NONE);
          resp.redirect    <= redirect;
          resp.redirect_pc <= redirect_pc;
          bounds_rounded   <= (req.op == OP_CSETBOUNDS) && (cause == EXC_NONE) && !alu_exact;
        end
      end
      if (mem_rvalid) begin
        q_head      <= q_head + 1'b1;
        resp.valid  <= 1'b1;
        resp.cause  <= EXC_NONE;
        resp.gpr_we <= head_e.load;
        resp.gpr    <= head_e.load ? mem_rdata : '0;
      end
    end
  end

  // ----------------------------------------------------------- assertions
  a_rvalid_has_load: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rvalid |-> n_out != '0);
  a_queue_bound: assert property (@(posedge clk) disable iff (!rst_n)
    n_out <= (QW+1)'(MAX_LOADS));
  a_only_loads_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    accept && n_out != '0 |-> is_load && go_mem);
  a_full_stalls: assert property (@(posedge clk) disable iff (!rst_n)
    n_out == (QW+1)'(MAX_LOADS) |-> !req_ready);

endmodule
