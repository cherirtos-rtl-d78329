// tb_cheri_cop: end-to-end test of the capability coprocessor with a tagged
// memory. Running as the kernel (PCC and DDC are the root capability after
// reset) it builds a callee domain: a code and a data capability cut from
// the root, and a sealing key whose address is otype 5. It seals the pair,
// sets up a trusted stack behind KR1C, pushes the caller's PCC and DDC there
// with CSC, and enters the callee with CCallFast. Inside the callee it
// checks DDC-relative loads and stores, bounds, execute-bounds on fetch and
// the kernel-only registers; it then takes an exception, ERETs, takes
// another, and returns to the caller by popping the trusted stack with CLC
// and jumping with CJR, as the kernel CCall helper does. Further sections
// cover tags destroyed by data stores, otype mismatch, sealed operands,
// the trapping (exception-based) CCall,
// CJALR/CJR, rounding in CSetBounds and unrepresentable offsets.
//
// Each mechanism is counted and must have happened at least once. The
// latency of register instructions and posted stores (one cycle) and of
// a lone load (2 + memory latency cycles) is checked too, as is a burst of
// eight capability stores in eight consecutive cycles. The eight registers
// are then reloaded by CLCs offered back to back: the loads must overlap,
// the loads behind the CLC into their own base register must wait for it,
// a register instruction behind them must wait for all of them, and the
// answers must come in order.
module tb_cheri_cop;
  import cheri_pkg::*;
  import cheri_tb_pkg::*;

  localparam int MEM_LAT = 2;

  logic clk = 0, rst_n = 0;
  cop_req_t  req;
  logic      req_ready;
  cop_resp_t resp;
  logic [31:0] fetch_pc, fetch_addr, exc_pc;
  logic      fetch_fault, exc_enter;
  exc_t      fetch_cause;
  mem_req_t  mem_req;
  logic      mem_rvalid, mem_rtag;
  logic [63:0] mem_rdata;
  cap_t      pcc_o, ddc_o, kr1c_o;
  logic      bounds_rounded;

  cheri_cop dut (.*);
  tagged_mem_model #(.LATENCY(MEM_LAT)) u_mem (
    .clk, .rst_n, .req(mem_req), .rvalid(mem_rvalid), .rdata(mem_rdata), .rtag(mem_rtag));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;
  int n_mem_req = 0, n_rounded = 0;
  logic [31:0] last_mem_addr;
  always @(posedge clk) begin
    cycles++;
    if (mem_req.valid) begin n_mem_req++; last_mem_addr = mem_req.addr; end
    if (bounds_rounded) n_rounded++;
  end

  // mechanism counters
  int m_backtoback = 0, m_load_burst = 0;
  int m_ccall = 0, m_ccall_fault = 0, m_bounds_fault = 0, m_fetch_fault = 0,
      m_sysreg_fault = 0, m_exc_entry = 0, m_eret = 0, m_tstack_push = 0,
      m_tstack_pop = 0, m_tag_cleared = 0, m_seal = 0, m_unseal = 0,
      m_stall = 0, m_unrep = 0, m_ccall_trap = 0, m_seal_fault = 0, m_cjalr = 0, m_align = 0;

  cop_resp_t r;
  int lat;

  // Streams CSC C0..C7 to 0xA000.. without gaps and checks that one store is
  // accepted per cycle and that all eight reach memory in eight cycles.
  task automatic burst_save();
    int first, reqs0, accepted;
    @(negedge clk);
    reqs0 = n_mem_req; accepted = 0; first = cycles;
    for (int i = 0; i < 8; i++) begin
      req = '0; req.valid = 1; req.op = OP_CSC; req.cb = 3'(C_ROOT); req.ct = 3'(i);
      req.rt = 32'hA000 + 32'(i * 8);
      @(negedge clk);
      if (resp.valid && resp.cause == EXC_NONE) accepted++;
    end
    req = '0;
    @(negedge clk);
    if (resp.valid) accepted++;
    expect_val("burst: one store per cycle", 64'(cycles - first), 9);
    expect_val("burst: all stores answered", 64'(accepted), 8);
    expect_val("burst: all stores reach memory", 64'(n_mem_req - reqs0), 8);
    if (accepted == 8) m_backtoback++;
    // read two back and compare with the registers
    exec(OP_CLC, 6, C_ROOT, 0, 32'hA000 + 8 * C_KEY);     expect_ok("reload key");
    exec(OP_CGETTYPE, 0, 6, 0, 0);  expect_val("reloaded key unsealed", r.gpr, 64'hFFFF_FFFF_FFFF_FFFF);
    exec(OP_CGETBASE, 0, 6, 0, 0);  expect_val("reloaded key base", r.gpr, 5);
  endtask

  // Reload the eight saved registers with CLCs offered back to back. Loads
  // overlap in memory; the CLC into the root register makes the loads behind
  // it, which use the root as their base, wait for it. A CGetBase offered
  // right after the last CLC waits until every load has answered.
  task automatic burst_restore();
    int first, answered, issued, stalls;
    bit ok;
    @(negedge clk);
    first = cycles; answered = 0; issued = 0; stalls = 0; ok = 1;
    while (issued < 9) begin
      req = '0; req.valid = 1;
      if (issued < 8) begin
        req.op = OP_CLC; req.cd = 3'(issued); req.cb = 3'(C_ROOT);
        req.rt = 32'hA000 + 32'(issued * 8);
      end else begin
        req.op = OP_CGETBASE; req.cb = 3'(C_KEY);
      end
      #1;  // req_ready depends on the instruction offered
      if (req_ready) issued++; else stalls++;
      @(negedge clk);
      if (resp.valid) begin
        answered++;
        if (resp.cause != EXC_NONE || (answered <= 8 && resp.gpr_we)) ok = 0;
        if (answered == 9 && resp.gpr != 64'd5) ok = 0;
      end
    end
    req = '0;
    while (answered < 9) begin
      @(negedge clk);
      if (resp.valid) begin
        answered++;
        if (resp.cause != EXC_NONE || (answered <= 8 && resp.gpr_we)) ok = 0;
        if (answered == 9 && resp.gpr != 64'd5) ok = 0;
      end
    end
    $display("restore burst: 8 CLC + 1 read in %0d cycles, %0d stall cycles",
             cycles - first, stalls);
    expect_val("burst restore: answers in order and correct", 64'(ok), 1);
    checks++;
    if (cycles - first >= 8 * (2 + MEM_LAT) + 1) begin
      failures++; $display("FAIL restore burst did not overlap loads");
    end
    expect_val("burst restore: hazard and drain stalls", 64'(stalls > 0), 1);
    m_stall += stalls;
    if (stalls > 0 && ok) m_load_burst++;
    exec(OP_CGETBASE, 0, C_ROOT, 0, 0);  expect_val("root restored", r.gpr, 0);
    exec(OP_CGETTYPE, 0, C_KEY, 0, 0);   expect_val("key restored", r.gpr, 64'hFFFF_FFFF_FFFF_FFFF);
  endtask

  task automatic census();
    string names[21];
    int counts[21];
    names  = '{"ccall", "ccall_fault", "bounds_fault", "fetch_fault",
      "sysreg_fault", "exc_entry", "eret", "tstack_push", "tstack_pop", "tag_cleared",
      "seal", "unseal", "seal_fault", "stall", "rounded", "unrepresentable", "cjalr", "align", "ccall_trap", "store_burst",
      "load_burst"};
    counts = '{m_ccall, m_ccall_fault, m_bounds_fault, m_fetch_fault,
      m_sysreg_fault, m_exc_entry, m_eret, m_tstack_push, m_tstack_pop, m_tag_cleared,
      m_seal, m_unseal, m_seal_fault, m_stall, n_rounded, m_unrep, m_cjalr, m_align, m_ccall_trap, m_backtoback,
      m_load_burst};
    for (int i = 0; i < 21; i++) begin
      $display("mechanism %-16s %0d", names[i], counts[i]);
      checks++;
      if (counts[i] == 0) begin failures++; $display("FAIL mechanism %s never happened", names[i]); end
    end
  endtask

  task automatic exec(cop_op_t op, int cd, int cb, int ct, logic [31:0] rt,
                      logic [31:0] imm = 0, logic [1:0] size = 2,
                      logic [63:0] wdata = 0, logic [31:0] pc = 0,
                      hwr_t hwr = HWR_DDC);
    @(negedge clk);
    req = '0;
    req.valid = 1; req.op = op; req.cd = 3'(cd); req.cb = 3'(cb); req.ct = 3'(ct);
    req.rt = rt; req.imm = imm; req.size = size; req.wdata = wdata; req.pc = pc;
    req.hwr = hwr;
    #1;
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req.valid = 0;
    lat = 1;
    while (!resp.valid) begin
      if (!req_ready) m_stall++;
      @(negedge clk);
      lat++;
    end
    r = resp;
  endtask

  task automatic expect_ok(string what);
    checks++;
    if (r.cause != EXC_NONE) begin
      failures++; $display("FAIL %s: unexpected %s", what, r.cause.name());
    end
  endtask

  task automatic expect_exc(string what, exc_t c);
    checks++;
    if (r.cause != c) begin
      failures++; $display("FAIL %s: cause %s expected %s", what, r.cause.name(), c.name());
    end
  endtask

  task automatic expect_val(string what, logic [79:0] got, logic [79:0] exp);
    checks++;
    if (got !== exp) begin
      failures++; $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  localparam int C_ROOT = 1, C_CODE = 2, C_DATA = 3, C_KEY = 4;
  localparam logic [31:0] CODE_BASE = 32'h1000, DATA_BASE = 32'h2000, TSTACK = 32'h9000;
  localparam logic [31:0] CALL_PC = 32'h200;

  int reqs_before;

  initial begin
    req = '0; fetch_pc = 32'h100; exc_enter = 0; exc_pc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---------------------------------------------------- kernel at reset
    @(negedge clk);
    expect_val("reset pcc is root", 65'(pcc_o), 65'(ROOT_CAP));
    expect_val("kernel fetch allowed", 64'(fetch_fault), 0);
    expect_val("fetch address", 64'(fetch_addr), 64'h100);

    exec(OP_CREADHWR, C_ROOT, 0, 0, 0);  expect_ok("read DDC");
    expect_val("register op latency", lat, 1);
    exec(OP_CMOVE, 0, C_ROOT, 0, 0);     expect_ok("backup root");

    // code capability for the callee: 0x1000..0x1400, execute + ccall
    exec(OP_CSETOFFSET, C_CODE, C_ROOT, 0, CODE_BASE);        expect_ok("code offset");
    exec(OP_CSETBOUNDS, C_CODE, C_CODE, 0, 32'h400);          expect_ok("code bounds");
    exec(OP_CANDPERM, C_CODE, C_CODE, 0, 32'(pm(P_EXECUTE, P_LOAD, P_CCALL, P_GLOBAL)));
    expect_ok("code perms");
    exec(OP_CGETBASE, 0, C_CODE, 0, 0); expect_val("code base", r.gpr, 64'h1000);
    exec(OP_CGETLEN, 0, C_CODE, 0, 0);  expect_val("code len", r.gpr, 64'h400);
    // data capability: 0x2000..0x2400
    exec(OP_CSETOFFSET, C_DATA, C_ROOT, 0, DATA_BASE);        expect_ok("data offset");
    exec(OP_CSETBOUNDS, C_DATA, C_DATA, 0, 32'h400);          expect_ok("data bounds");
    exec(OP_CANDPERM, C_DATA, C_DATA, 0,
         32'(pm(P_LOAD, P_STORE, P_LOAD_CAP, P_STORE_CAP, P_CCALL, P_GLOBAL)));
    expect_ok("data perms");
    // sealing key for otypes 5 and 6
    exec(OP_CSETOFFSET, C_KEY, C_ROOT, 0, 5);                 expect_ok("key offset");
    exec(OP_CSETBOUNDS, C_KEY, C_KEY, 0, 2);                  expect_ok("key bounds");
    exec(OP_CANDPERM, C_KEY, C_KEY, 0, 32'(pm(P_SEAL, P_UNSEAL, P_GLOBAL)));
    expect_ok("key perms");
    // seal the pair
    exec(OP_CSEAL, C_CODE, C_CODE, C_KEY, 0); expect_ok("seal code"); m_seal++;
    exec(OP_CSEAL, C_DATA, C_DATA, C_KEY, 0); expect_ok("seal data"); m_seal++;
    exec(OP_CGETTYPE, 0, C_CODE, 0, 0); expect_val("code otype", r.gpr, 64'd5);
    exec(OP_CINCOFFSET, 5, C_CODE, 0, 4); expect_exc("sealed is immutable", EXC_SEAL); m_seal_fault++;
    exec(OP_CLOAD, 5, C_DATA, 0, 0); expect_exc("sealed not dereferenceable", EXC_SEAL); m_seal_fault++;

    // sealed pair through memory and back (a task keeps its handle in memory)
    exec(OP_CSC, 0, C_ROOT, C_CODE, 32'h8000); expect_ok("csc code");
    expect_val("posted store latency", lat, 1);
    exec(OP_CSC, 0, C_ROOT, C_DATA, 32'h8008); expect_ok("csc data");
    exec(OP_CLC, 5, C_ROOT, 0, 32'h8000);      expect_ok("clc code");
    expect_val("load latency", lat, 2 + MEM_LAT);
    exec(OP_CGETTAG, 0, 5, 0, 0);  expect_val("clc keeps tag", r.gpr, 1);
    exec(OP_CGETTYPE, 0, 5, 0, 0); expect_val("clc keeps otype", r.gpr, 5);
    // a data store into the stored capability destroys it
    exec(OP_STORE, 0, 0, 0, 32'h8004, 0, 2, 64'h1234);       expect_ok("data store over cap");
    exec(OP_CLC, 6, C_ROOT, 0, 32'h8000);      expect_ok("clc forged");
    exec(OP_CGETTAG, 0, 6, 0, 0);  expect_val("tag cleared by data store", r.gpr, 0);
    if (r.gpr == 0) m_tag_cleared++;
    exec(OP_CLC, 6, C_ROOT, 0, 32'h8004);      expect_exc("unaligned clc", EXC_ALIGN); m_align++;
    // a full 64-bit data store writes tag 0 as well
    exec(OP_STORE, 0, 0, 0, 32'h8008, 0, 3, 64'h0);          expect_ok("64-bit data store");
    exec(OP_CLC, 6, C_ROOT, 0, 32'h8008);      expect_ok("clc overwritten");
    exec(OP_CGETTAG, 0, 6, 0, 0);  expect_val("64-bit store clears tag", r.gpr, 0);
    if (r.gpr == 0) m_tag_cleared++;

    // otype mismatch: data sealed with otype 6
    exec(OP_CINCOFFSET, 5, C_KEY, 0, 1);                      expect_ok("key 6");
    exec(OP_CSETOFFSET, 6, C_ROOT, 0, 32'h3000);
    exec(OP_CSETBOUNDS, 6, 6, 0, 32'h40);
    exec(OP_CANDPERM, 6, 6, 0, 32'(pm(P_LOAD, P_CCALL)));
    exec(OP_CSEAL, 6, 6, 5, 0);                               expect_ok("seal otype 6"); m_seal++;
    exec(OP_CCALLFAST, 0, C_CODE, 6, 0, 0, 0, 0, CALL_PC);
    expect_exc("ccall otype mismatch", EXC_TYPE); m_ccall_fault++;
    exec(OP_CCALLFAST, 0, C_CODE, C_KEY, 0, 0, 0, 0, CALL_PC);
    expect_exc("ccall unsealed data", EXC_UNSEALED); m_ccall_fault++;

    exec(OP_CCALL, 0, C_CODE, C_DATA, 0, 0, 0, 0, CALL_PC);
    expect_exc("CCall traps to the kernel", EXC_CALL); m_ccall_trap++;
    expect_val("CCall trap has no side effect", 64'(pcc_o.w.perms), 64'(ROOT_CAP.w.perms));

    // context save: eight capability stores issued in eight consecutive cycles
    burst_save();
    burst_restore();

    // trusted stack behind KR1C
    exec(OP_CSETOFFSET, 5, C_ROOT, 0, TSTACK);
    exec(OP_CSETBOUNDS, 5, 5, 0, 32'h40);                     expect_ok("tstack bounds");
    exec(OP_CWRITEHWR, 0, 5, 0, 0, 0, 0, 0, 0, HWR_KR1C);     expect_ok("write KR1C");
    expect_val("KR1C installed", 64'(kr1c_o.w.addr), 64'(TSTACK));
    // helper push: caller PCC (at the call site) and DDC
    exec(OP_CREADHWR, 5, 0, 0, 0, 0, 0, 0, 0, HWR_KR1C);     expect_ok("read KR1C");
    exec(OP_CGETPCC, 6, 0, 0, 0, 0, 0, 0, CALL_PC);           expect_ok("getpcc");
    exec(OP_CSC, 0, 5, 6, 0);                                 expect_ok("push pcc");
    exec(OP_CREADHWR, 7, 0, 0, 0);
    exec(OP_CSC, 0, 5, 7, 8);                                 expect_ok("push ddc"); m_tstack_push++;

    // ---------------------------------------------------- fast CCall
    exec(OP_CCALLFAST, 0, C_CODE, C_DATA, 0, 0, 0, 0, CALL_PC);
    expect_ok("ccallfast"); m_ccall++;
    expect_val("ccall lands on entry", 64'(r.redirect), 1);
    expect_val("entry offset", 64'(r.redirect_pc), 0);
    expect_val("pcc unsealed", 64'(pcc_o.w.sealed), 0);
    expect_val("ddc unsealed", 64'(ddc_o.w.sealed), 0);
    expect_val("pcc address", 64'(pcc_o.w.addr), 64'(CODE_BASE));
    expect_val("ddc address", 64'(ddc_o.w.addr), 64'(DATA_BASE));
    expect_val("ccall latency", lat, 1);
    // fetch is bounded by the callee's code
    fetch_pc = 32'h3FC; #1;
    expect_val("callee fetch ok", 64'(fetch_fault), 0);
    expect_val("callee fetch address", 64'(fetch_addr), 64'h13FC);
    fetch_pc = 32'h400; #1;
    expect_val("callee fetch past end", 64'(fetch_fault), 1);
    expect_val("fetch cause", 64'(fetch_cause), 64'(EXC_LENGTH));
    if (fetch_fault) m_fetch_fault++;
    fetch_pc = 32'h10;
    // DDC-relative data accesses
    exec(OP_STORE, 0, 0, 0, 32'h8, 0, 2, 64'hDEADBEEF);       expect_ok("callee store");
    @(negedge clk);  // the posted store reaches memory one cycle after its response
    expect_val("store address is DDC base + offset", 64'(last_mem_addr), 64'h2008);
    exec(OP_LOAD, 0, 0, 0, 32'h8, 0, 2);                      expect_ok("callee load");
    expect_val("load data", r.gpr, 64'hDEADBEEF);
    expect_val("load gpr write", 64'(r.gpr_we), 1);
    reqs_before = n_mem_req;
    exec(OP_LOAD, 0, 0, 0, 32'h3FE, 0, 2);
    expect_exc("load straddling the end", EXC_LENGTH); m_bounds_fault++;
    exec(OP_STORE, 0, 0, 0, 32'hFFFF_FFFC, 0, 2, 0);
    expect_exc("store below base", EXC_LENGTH); m_bounds_fault++;
    expect_val("faulting accesses never reach memory", n_mem_req, reqs_before);
    exec(OP_CREADHWR, 5, 0, 0, 0, 0, 0, 0, 0, HWR_KR1C);
    expect_exc("KR1C is kernel only", EXC_SYSREGS); m_sysreg_fault++;
    exec(OP_ERET, 0, 0, 0, 0);
    expect_exc("ERET is kernel only", EXC_SYSREGS); m_sysreg_fault++;

    // ---------------------------------------------------- exceptions
    @(negedge clk); exc_enter = 1; exc_pc = 32'h10;
    @(negedge clk); exc_enter = 0; m_exc_entry++;
    expect_val("exception installs KCC", 65'(pcc_o), 65'(ROOT_CAP));
    exec(OP_CREADHWR, 7, 0, 0, 0, 0, 0, 0, 0, HWR_EPCC);      expect_ok("read EPCC");
    exec(OP_CGETADDR, 0, 7, 0, 0);  expect_val("EPCC address", r.gpr, 64'h1010);
    exec(OP_ERET, 0, 0, 0, 0);      expect_ok("eret"); m_eret++;
    expect_val("eret target", 64'(r.redirect_pc), 64'h10);
    expect_val("eret restores callee PCC", 64'(pcc_o.w.addr), 64'h1010);
    // callee returns: into the kernel helper (exception path) ...
    @(negedge clk); exc_enter = 1; exc_pc = 32'h20;
    @(negedge clk); exc_enter = 0; m_exc_entry++;
    // ... which pops the trusted stack and jumps back
    exec(OP_CREADHWR, 5, 0, 0, 0, 0, 0, 0, 0, HWR_KR1C);     expect_ok("helper reads KR1C");
    exec(OP_CLC, 6, 5, 0, 0);                                 expect_ok("pop pcc");
    exec(OP_CLC, 7, 5, 0, 8);                                 expect_ok("pop ddc");
    exec(OP_CWRITEHWR, 0, 7, 0, 0);                           expect_ok("restore DDC");
    exec(OP_CJR, 0, 6, 0, 0);                                 expect_ok("return jump");
    m_tstack_pop++;
    expect_val("return lands at call site", 64'(r.redirect_pc), 64'(CALL_PC));
    expect_val("caller PCC restored", 64'(pcc_o.w.perms), 64'(ROOT_CAP.w.perms));
    expect_val("caller DDC restored", 65'(ddc_o), 65'(ROOT_CAP));

    // ---------------------------------------------------- cap jumps
    exec(OP_CUNSEAL, 5, C_CODE, C_KEY, 0);                    expect_ok("unseal code"); m_unseal++;
    exec(OP_CJALR, 7, 5, 0, 0, 0, 0, 0, 32'h300);             expect_ok("cjalr"); m_cjalr++;
    expect_val("cjalr target", 64'(r.redirect_pc), 0);
    exec(OP_CGETADDR, 0, 7, 0, 0);  expect_val("link address", r.gpr, 64'h308);
    exec(OP_CJR, 0, 7, 0, 0);       expect_ok("cjr back");
    expect_val("back in kernel", 64'(pcc_o.w.perms[P_SYSREGS]), 1);

    // ---------------------------------------------------- bounds encoding
    exec(OP_CSETOFFSET, 6, C_ROOT, 0, 32'h3);
    exec(OP_CSETBOUNDS, 6, 6, 0, 32'd1000);                   expect_ok("rounded setbounds");
    exec(OP_CGETLEN, 0, 6, 0, 0);
    checks++; if (r.gpr < 64'd1000) begin failures++; $display("FAIL rounded length short"); end
    exec(OP_CUNSEAL, 5, C_DATA, C_KEY, 0);                    m_unseal++;
    exec(OP_CINCOFFSET, 5, 5, 0, 32'h10_0000);                expect_ok("far offset");
    exec(OP_CGETTAG, 0, 5, 0, 0);   expect_val("unrepresentable loses tag", r.gpr, 0);
    if (r.gpr == 0) m_unrep++;

    // ---------------------------------------------------- mechanism census
    census();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
