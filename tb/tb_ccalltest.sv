// tb_ccalltest: domain-crossing workload. A caller streams 1 MiB through a
// callee (an encryption-style service) in 8 KiB pieces: 128 round trips.
// Each round trip derives an 8 KiB buffer capability, pushes the caller's
// PCC and DDC on the trusted stack behind KR1C, enters the callee with
// CCallFast, lets the callee write the first and last word of the buffer and
// its own data, shows that the callee cannot step past the buffer, returns
// through the kernel helper (exception entry, pop with CLC, restore DDC,
// CJR) and checks that the caller's PCC and DDC are back.
//
// The stream is sent twice: once with CCallFast, and once with the
// exception-based CCall, where the CCall instruction traps and the kernel
// checks the object types, unseals the pair with a key cut from the root and
// jumps in. Every round trip of a path must take the same number of cycles
// (the coprocessor's part of the crossing is deterministic), the trapping
// path must cost more, and afterwards the written words are read back
// through the root capability. Pipeline flushes of the CPU, which dominate
// the trapping path on real hardware, are not modelled.
module tb_ccalltest;
  import cheri_pkg::*;
  import cheri_tb_pkg::*;

  localparam int MEM_LAT = 2;
  localparam int N_CALLS = 128;
  localparam logic [31:0] BUF_BASE = 32'h0010_0000, BUF_SIZE = 32'h2000;
  localparam logic [31:0] CODE_BASE = 32'h0001_0000, DATA_BASE = 32'h0002_0000;
  localparam logic [31:0] TSTACK = 32'h9000, CALL_PC = 32'h400;

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
  always @(posedge clk) cycles++;

  cop_resp_t r;

  task automatic exec(cop_op_t op, int cd, int cb, int ct, logic [31:0] rt,
                      logic [31:0] imm = 0, logic [1:0] size = 2,
                      logic [63:0] wdata = 0, logic [31:0] pc = 0,
                      hwr_t hwr = HWR_DDC);
    @(negedge clk);
    req = '0;
    req.valid = 1; req.op = op; req.cd = 3'(cd); req.cb = 3'(cb); req.ct = 3'(ct);
    req.rt = rt; req.imm = imm; req.size = size; req.wdata = wdata; req.pc = pc;
    req.hwr = hwr;
    #1;  // req_ready depends on the instruction offered
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req.valid = 0;
    while (!resp.valid) @(negedge clk);
    r = resp;
  endtask

  task automatic expect_exc(string what, exc_t c);
    checks++;
    if (r.cause != c) begin
      failures++; $display("FAIL %s: cause %s expected %s", what, r.cause.name(), c.name());
    end
  endtask

  task automatic expect_val(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++; $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  // registers: c1 root, c2/c3 sealed callee pair, c4 key, c5 buffer, c6/c7 helper
  int t0, rt_cycles, crossings = 0, faults_seen = 0;
  int first_rt [2];
  logic [63:0] ot;

  initial begin
    req = '0; fetch_pc = 0; exc_enter = 0; exc_pc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    exec(OP_CREADHWR, 1, 0, 0, 0);
    exec(OP_CSETOFFSET, 2, 1, 0, CODE_BASE);
    exec(OP_CSETBOUNDS, 2, 2, 0, 32'h1000);
    exec(OP_CANDPERM, 2, 2, 0, 32'(pm(P_EXECUTE, P_LOAD, P_CCALL, P_GLOBAL)));
    exec(OP_CSETOFFSET, 3, 1, 0, DATA_BASE);
    exec(OP_CSETBOUNDS, 3, 3, 0, 32'h1000);
    exec(OP_CANDPERM, 3, 3, 0, 32'(pm(P_LOAD, P_STORE, P_CCALL, P_GLOBAL)));
    exec(OP_CSETOFFSET, 4, 1, 0, 7);
    exec(OP_CSETBOUNDS, 4, 4, 0, 1);
    exec(OP_CANDPERM, 4, 4, 0, 32'(pm(P_SEAL, P_UNSEAL)));
    exec(OP_CSEAL, 2, 2, 4, 0);            expect_exc("seal code", EXC_NONE);
    exec(OP_CSEAL, 3, 3, 4, 0);            expect_exc("seal data", EXC_NONE);
    exec(OP_CSETOFFSET, 6, 1, 0, TSTACK);
    exec(OP_CSETBOUNDS, 6, 6, 0, 32'h60);  // four entries of PCC, DDC, time stamp
    exec(OP_CWRITEHWR, 0, 6, 0, 0, 0, 0, 0, 0, HWR_KR1C);

    for (int path = 0; path < 2; path++)
    for (int i = 0; i < N_CALLS; i++) begin
      t0 = cycles;
      // caller: bounded buffer capability for this piece
      exec(OP_CSETOFFSET, 5, 1, 0, BUF_BASE + 32'(i) * BUF_SIZE);
      exec(OP_CSETBOUNDS, 5, 5, 0, BUF_SIZE);
      expect_exc("buffer bounds", EXC_NONE);
      checks++;
      if (bounds_rounded) begin failures++; $display("FAIL 8 KiB buffer not exact"); end
      exec(OP_CANDPERM, 5, 5, 0, 32'(pm(P_LOAD, P_STORE)));
      if (path == 0) begin
        // kernel helper: push caller PCC and DDC
        exec(OP_CREADHWR, 6, 0, 0, 0, 0, 0, 0, 0, HWR_KR1C);
        exec(OP_CGETPCC, 7, 0, 0, 0, 0, 0, 0, CALL_PC);
        exec(OP_CSC, 0, 6, 7, 0);
        exec(OP_CREADHWR, 7, 0, 0, 0);
        exec(OP_CSC, 0, 6, 7, 8);
        // enter the callee
        exec(OP_CCALLFAST, 0, 2, 3, 0, 0, 0, 0, CALL_PC);
        expect_exc("ccallfast", EXC_NONE);
        if (r.cause == EXC_NONE) crossings++;
      end else begin
        // exception-based path: CCall traps, the kernel checks the object
        // types, pushes the caller, unseals the pair with a key it derives
        // from the root and jumps into the callee
        exec(OP_CCALL, 0, 2, 3, 0, 0, 0, 0, CALL_PC);
        expect_exc("ccall traps", EXC_CALL);
        @(negedge clk); exc_enter = 1; exc_pc = CALL_PC;
        @(negedge clk); exc_enter = 0;
        exec(OP_CGETTYPE, 0, 2, 0, 0);
        ot = r.gpr;
        exec(OP_CGETTYPE, 0, 3, 0, 0);
        expect_val("object types match", r.gpr, ot);
        exec(OP_CREADHWR, 6, 0, 0, 0, 0, 0, 0, 0, HWR_KR1C);
        exec(OP_CREADHWR, 7, 0, 0, 0, 0, 0, 0, 0, HWR_EPCC);
        exec(OP_CSC, 0, 6, 7, 0);
        exec(OP_CREADHWR, 7, 0, 0, 0);
        exec(OP_CSC, 0, 6, 7, 8);
        exec(OP_CSETOFFSET, 6, 1, 0, ot[31:0]);
        exec(OP_CUNSEAL, 7, 3, 6, 0);
        expect_exc("kernel unseals data", EXC_NONE);
        exec(OP_CWRITEHWR, 0, 7, 0, 0);
        exec(OP_CUNSEAL, 7, 2, 6, 0);
        expect_exc("kernel unseals code", EXC_NONE);
        exec(OP_CJR, 0, 7, 0, 0);
        expect_exc("kernel enters callee", EXC_NONE);
        if (r.cause == EXC_NONE) crossings++;
      end
      expect_val("callee PCC", 64'(pcc_o.w.addr), 64'(CODE_BASE));
      expect_val("callee DDC", 64'(ddc_o.w.addr), 64'(DATA_BASE));
      // callee works on the buffer and its own data
      exec(OP_CSTORE, 0, 5, 0, 0, 0, 2, 64'(32'hA000_0000 + i));
      expect_exc("callee writes first word", EXC_NONE);
      exec(OP_CSTORE, 0, 5, 0, BUF_SIZE - 4, 0, 2, 64'(32'hB000_0000 + i));
      expect_exc("callee writes last word", EXC_NONE);
      exec(OP_CLOAD, 0, 5, 0, BUF_SIZE, 0, 2);
      expect_exc("callee cannot read past the buffer", EXC_LENGTH);
      if (r.cause == EXC_LENGTH) faults_seen++;
      exec(OP_STORE, 0, 0, 0, 32'h10, 0, 2, 64'(i));
      expect_exc("callee writes own data", EXC_NONE);
      exec(OP_CREADHWR, 6, 0, 0, 0, 0, 0, 0, 0, HWR_KR1C);
      expect_exc("callee cannot reach the trusted stack", EXC_SYSREGS);
      // return through the kernel helper
      @(negedge clk); exc_enter = 1; exc_pc = 32'h80;
      @(negedge clk); exc_enter = 0;
      exec(OP_CREADHWR, 6, 0, 0, 0, 0, 0, 0, 0, HWR_KR1C);
      exec(OP_CLC, 7, 6, 0, 8);
      exec(OP_CWRITEHWR, 0, 7, 0, 0);
      exec(OP_CLC, 7, 6, 0, 0);
      exec(OP_CJR, 0, 7, 0, 0);
      expect_exc("return", EXC_NONE);
      expect_val("returned to call site", 64'(r.redirect_pc), 64'(CALL_PC));
      expect_val("caller DDC back", 65'(ddc_o), 65'(ROOT_CAP));
      rt_cycles = cycles - t0;
      if (i == 0) first_rt[path] = rt_cycles;
      expect_val("deterministic round trip", 64'(rt_cycles), 64'(first_rt[path]));
    end
    $display("round trip: CCallFast %0d, exception-based CCall %0d coprocessor cycles, %0d crossings",
             first_rt[0], first_rt[1], crossings);
    expect_val("all crossings made", 64'(crossings), 2 * N_CALLS);
    expect_val("every overflow stopped", 64'(faults_seen), 2 * N_CALLS);
    checks++;
    if (first_rt[1] <= first_rt[0]) begin
      failures++; $display("FAIL exception path not slower than CCallFast");
    end
    // read back through the root capability
    for (int i = 0; i < N_CALLS; i += 37) begin
      exec(OP_CLOAD, 0, 1, 0, BUF_BASE + 32'(i) * BUF_SIZE, 0, 2);
      expect_val("first word", r.gpr, 64'(32'hA000_0000 + i));
      exec(OP_CLOAD, 0, 1, 0, BUF_BASE + 32'(i) * BUF_SIZE + BUF_SIZE - 4, 0, 2);
      expect_val("last word", r.gpr, 64'(32'hB000_0000 + i));
    end
    exec(OP_CLOAD, 0, 1, 0, DATA_BASE + 32'h10, 0, 2);
    expect_val("callee data", r.gpr, 64'(N_CALLS - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
