// tb_timer_guard: real-time guarantee workload on the whole design. Every
// domain crossing pushes an entry of three 8-byte words on the trusted stack
// behind KR1C: the caller's PCC, the caller's DDC and a deadline (time
// stamp). KR1C's address is the top of the stack, so pushes and pops move it
// by 24 bytes. The stack holds at most four entries.
//
// A chain of CCallFast calls is built to depths 1 to 4. At each depth a timer
// interrupt runs the kernel's check in one of two ways:
//   * random check: load the deadline of one randomly chosen entry;
//   * full traversal: load every deadline, with the loads issued back to back
//     so that they overlap in memory.
// When a deadline has passed, the kernel forces the expired callee to return.
// It cuts the stack back to that entry, restores the entry's DDC and jumps to
// its PCC. The kernel helper that pushes each entry is entered, in this
// test, as an exception at the call site, so the caller's PCC comes from
// EPCC.
//
// The test checks four things:
//   * the random check costs the same at every depth;
//   * the full traversal grows with depth, by one cycle per extra entry;
//   * the forced return lands at the right caller, with its DDC;
//   * KR1C is left pointing at that entry.
// Deadlines are compared by the testbench, which plays the kernel's scalar
// code.
module tb_timer_guard;
  import cheri_pkg::*;
  import cheri_tb_pkg::*;

  localparam int MEM_LAT = 2;
  localparam int DEPTH_MAX = 4, ENTRY = 24;
  localparam logic [31:0] CODE_BASE = 32'h0001_0000, DATA_BASE = 32'h0002_0000;
  localparam logic [31:0] TSTACK = 32'h9000;

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

  task automatic offer(cop_op_t op, int cd, int cb, int ct, logic [31:0] rt,
                       logic [31:0] imm, logic [1:0] size, logic [63:0] wdata,
                       logic [31:0] pc, hwr_t hwr);
    req = '0;
    req.valid = 1; req.op = op; req.cd = 3'(cd); req.cb = 3'(cb); req.ct = 3'(ct);
    req.rt = rt; req.imm = imm; req.size = size; req.wdata = wdata; req.pc = pc;
    req.hwr = hwr;
    #1;  // req_ready depends on the instruction offered
  endtask

  task automatic exec(cop_op_t op, int cd, int cb, int ct, logic [31:0] rt,
                      logic [31:0] imm = 0, logic [1:0] size = 2,
                      logic [63:0] wdata = 0, logic [31:0] pc = 0,
                      hwr_t hwr = HWR_DDC);
    @(negedge clk);
    offer(op, cd, cb, ct, rt, imm, size, wdata, pc, hwr);
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

  // Load n deadlines through c6 (KR1C's copy) at the given offsets, offering
  // the loads back to back; results in order into vals.
  task automatic load_deadlines(int n, logic [31:0] offs [DEPTH_MAX],
                                output logic [63:0] vals [DEPTH_MAX]);
    int issued = 0, answered = 0;
    @(negedge clk);
    while (answered < n) begin
      if (issued < n) offer(OP_CLOAD, 0, 6, 0, offs[issued], 0, 3, 0, 0, HWR_DDC);
      else begin req = '0; #1; end
      if (req.valid && req_ready) issued++;
      @(negedge clk);
      if (resp.valid) begin
        if (resp.cause != EXC_NONE) begin
          failures++; $display("FAIL deadline load: %s", resp.cause.name());
        end
        vals[answered] = resp.gpr;
        answered++;
      end
    end
    req = '0;
  endtask

  // call one level deeper through the kernel helper, entered here as an
  // exception at the call site: push the caller's PCC (from EPCC, address =
  // call site), its DDC and the deadline, then CCallFast into the callee
  task automatic ccall(logic [31:0] pc, logic [63:0] deadline);
    @(negedge clk); exc_enter = 1; exc_pc = pc;
    @(negedge clk); exc_enter = 0;
    exec(OP_CREADHWR, 6, 0, 0, 0, 0, 0, 0, 0, HWR_KR1C);
    exec(OP_CREADHWR, 7, 0, 0, 0, 0, 0, 0, 0, HWR_EPCC);
    exec(OP_CSC, 0, 6, 7, 0);
    exec(OP_CREADHWR, 7, 0, 0, 0);
    exec(OP_CSC, 0, 6, 7, 8);
    exec(OP_CSTORE, 0, 6, 0, 16, 0, 3, deadline);
    exec(OP_CINCOFFSET, 6, 6, 0, ENTRY);
    exec(OP_CWRITEHWR, 0, 6, 0, 0, 0, 0, 0, 0, HWR_KR1C);
    exec(OP_CCALLFAST, 0, 2, 3, 0, 0, 0, 0, pc);
    expect_exc("ccallfast", EXC_NONE);
  endtask

  int depth, t0, rnd_cost [DEPTH_MAX+1], full_cost [DEPTH_MAX+1], expired;
  logic [31:0] offs [DEPTH_MAX];
  logic [63:0] vals [DEPTH_MAX];
  logic [63:0] now;

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
    exec(OP_CSETOFFSET, 4, 1, 0, 11);
    exec(OP_CSETBOUNDS, 4, 4, 0, 1);
    exec(OP_CANDPERM, 4, 4, 0, 32'(pm(P_SEAL, P_UNSEAL)));
    exec(OP_CSEAL, 2, 2, 4, 0);
    exec(OP_CSEAL, 3, 3, 4, 0);
    exec(OP_CSETOFFSET, 6, 1, 0, TSTACK);
    exec(OP_CSETBOUNDS, 6, 6, 0, DEPTH_MAX * ENTRY);
    expect_exc("trusted stack bounds", EXC_NONE);
    exec(OP_CWRITEHWR, 0, 6, 0, 0, 0, 0, 0, 0, HWR_KR1C);

    for (depth = 1; depth <= DEPTH_MAX; depth++) begin
      // the caller at each level is told apart by its PC; the entry at
      // level 2 (when present) has already expired
      ccall(32'h100 * depth, (depth == 2) ? 64'd10 : 64'd1_000_000);

      // timer interrupt, random check of one entry
      @(negedge clk); exc_enter = 1; exc_pc = 32'h40;
      @(negedge clk); exc_enter = 0;
      t0 = cycles;
      exec(OP_CREADHWR, 6, 0, 0, 0, 0, 0, 0, 0, HWR_KR1C);
      exec(OP_CGETOFFSET, 0, 6, 0, 0);
      expect_val("stack top", r.gpr, 64'(depth * ENTRY));
      offs[0] = 32'(-ENTRY * (1 + int'($urandom_range(depth - 1))) + 16);
      load_deadlines(1, offs, vals);
      rnd_cost[depth] = cycles - t0;

      // full traversal of every entry
      t0 = cycles;
      exec(OP_CREADHWR, 6, 0, 0, 0, 0, 0, 0, 0, HWR_KR1C);
      for (int k = 0; k < depth; k++) offs[k] = 32'(-ENTRY * (k + 1) + 16);
      load_deadlines(depth, offs, vals);
      full_cost[depth] = cycles - t0;
      now = 64'(cycles);
      expired = 0;
      for (int k = 0; k < depth; k++)
        if (vals[k] < now) expired = depth - k;   // level of the expired entry
      expect_val("expired entry found", 64'(expired), (depth >= 2) ? 2 : 0);
      exec(OP_ERET, 0, 0, 0, 0);
      expect_exc("back to the callee", EXC_NONE);
    end
    $display("timer check cost by depth 1..4: random %0d %0d %0d %0d, full %0d %0d %0d %0d",
             rnd_cost[1], rnd_cost[2], rnd_cost[3], rnd_cost[4],
             full_cost[1], full_cost[2], full_cost[3], full_cost[4]);
    for (int d = 2; d <= DEPTH_MAX; d++) begin
      expect_val("random check cost does not depend on depth", 64'(rnd_cost[d]), 64'(rnd_cost[1]));
      expect_val("full traversal: one cycle per extra entry", 64'(full_cost[d]),
                 64'(full_cost[d-1] + 1));
    end

    // forced return of the expired callee (entry of level 2): cut the stack
    // back to it, restore its caller's DDC and jump to the caller's PC
    @(negedge clk); exc_enter = 1; exc_pc = 32'h40;
    @(negedge clk); exc_enter = 0;
    exec(OP_CREADHWR, 6, 0, 0, 0, 0, 0, 0, 0, HWR_KR1C);
    exec(OP_CINCOFFSET, 6, 6, 0, 32'(-ENTRY * (DEPTH_MAX - 1)));
    exec(OP_CWRITEHWR, 0, 6, 0, 0, 0, 0, 0, 0, HWR_KR1C);
    exec(OP_CLC, 7, 6, 0, 8);
    exec(OP_CWRITEHWR, 0, 7, 0, 0);
    exec(OP_CLC, 7, 6, 0, 0);
    exec(OP_CJR, 0, 7, 0, 0);
    expect_exc("forced return", EXC_NONE);
    expect_val("lands at the caller of the expired callee", 64'(r.redirect_pc), 64'h200);
    expect_val("its DDC restored", 64'(ddc_o.w.addr), 64'(DATA_BASE));
    expect_val("KR1C cut back", 64'(kr1c_o.w.addr), 64'(TSTACK + ENTRY));
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
