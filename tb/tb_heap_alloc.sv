// tb_heap_alloc: shared-heap workload on the whole design. A bucket allocator
// keeps per-size free lists inside the heap. The header in front of a free
// chunk holds a capability to the next free chunk. The header in front of an
// allocated chunk holds a capability whose address is the bucket ID, sealed
// with the allocator's own object type. malloc() hands out a capability
// bounded to the chunk. free() loads the header and unseals it with the
// allocator's key, and rejects the call if that fails.
//
// The testbench drives the coprocessor instruction by instruction, playing
// both the allocator and a user task that builds a linked list of 20 heap
// nodes (each node a bounded capability, the pattern a graph benchmark uses)
// and walks it. It then checks what the capabilities forbid:
//   * writing past a chunk or back into its header;
//   * freeing a chunk behind a header forged from plain data;
//   * freeing one behind a header sealed with another object type;
//   * freeing a chunk twice.
// It frees everything and allocates every chunk again to show that the free
// lists survived. The allocator's list heads are kept in testbench variables
// (the allocator's private data); the entry into the allocator by CCallFast
// is left out here, since other tests cover it.
module tb_heap_alloc;
  import cheri_pkg::*;
  import cheri_tb_pkg::*;

  localparam int MEM_LAT = 2;
  localparam logic [31:0] HEAP = 32'h0004_0000, HEAP_SIZE = 32'h1000;
  localparam int NB = 2;                          // buckets: 8 B and 16 B
  localparam int BSIZE [NB]  = '{8, 16};
  localparam int STRIDE [NB] = '{16, 24};         // 8-byte header + data
  localparam int NCHUNK [NB] = '{8, 24};
  localparam logic [31:0] BSTART [NB] = '{32'h0004_0000, 32'h0004_0100};
  localparam int ALLOC_OTYPE = 9, USER_OTYPE = 3, NODES = 20;

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
                      logic [63:0] wdata = 0);
    @(negedge clk);
    req = '0;
    req.valid = 1; req.op = op; req.cd = 3'(cd); req.cb = 3'(cb); req.ct = 3'(ct);
    req.rt = rt; req.imm = imm; req.size = size; req.wdata = wdata;
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

  // Registers: c0 null (never written), c1 root, c2 list head, c3 heap,
  // c4 allocator key, c5 scratch, c6 header, c7 user capability.
  logic [31:0] head [NB];
  int allocs = 0, frees = 0, rejected = 0;
  logic [31:0] user_perms;

  // malloc: user capability for a chunk of bucket b in c7; 0 if none is free
  task automatic malloc(int b, output bit ok);
    logic [31:0] h;
    ok = 0;
    h = head[b];
    if (h == 0) return;
    exec(OP_CLC, 5, 3, 0, h - HEAP);               // next free chunk
    exec(OP_CGETTAG, 0, 5, 0, 0);
    if (r.gpr[0]) begin exec(OP_CGETADDR, 0, 5, 0, 0); head[b] = r.gpr[31:0]; end
    else head[b] = 0;
    exec(OP_CSETOFFSET, 6, 1, 0, 0);               // header: address = bucket ID
    exec(OP_CSETBOUNDS, 6, 6, 0, 0);
    exec(OP_CSETOFFSET, 6, 6, 0, 32'(b));
    exec(OP_CSEAL, 6, 6, 4, 0);
    expect_exc("seal header", EXC_NONE);
    exec(OP_CSC, 0, 3, 6, h - HEAP);
    exec(OP_CSETOFFSET, 7, 3, 0, h + 8 - HEAP);    // the user's bounded chunk
    exec(OP_CSETBOUNDS, 7, 7, 0, 32'(BSIZE[b]));
    expect_exc("chunk bounds", EXC_NONE);
    exec(OP_CANDPERM, 7, 7, 0, user_perms);
    allocs++;
    ok = 1;
  endtask

  // free: release the chunk named by c7; ok = 0 when the header is not intact
  task automatic free_c7(output bit ok);
    logic [31:0] h;
    int b;
    ok = 0;
    exec(OP_CGETTAG, 0, 7, 0, 0);
    if (!r.gpr[0]) begin rejected++; return; end
    exec(OP_CGETBASE, 0, 7, 0, 0);
    h = r.gpr[31:0] - 8;
    exec(OP_CLC, 6, 3, 0, h - HEAP);
    exec(OP_CUNSEAL, 6, 6, 4, 0);
    if (r.cause != EXC_NONE) begin rejected++; return; end
    exec(OP_CGETADDR, 0, 6, 0, 0);
    b = int'(r.gpr);
    exec(OP_CGETLEN, 0, 7, 0, 0);
    if (b >= NB || r.gpr != 64'(BSIZE[b])) begin rejected++; return; end
    if (head[b] != 0) exec(OP_CSETOFFSET, 5, 3, 0, head[b] - HEAP);
    else exec(OP_CMOVE, 5, 0, 0, 0);
    exec(OP_CSC, 0, 3, 5, h - HEAP);               // header becomes a link
    head[b] = h;
    frees++;
    ok = 1;
  endtask

  bit ok;
  logic [31:0] h;
  int count;
  longint sum;

  initial begin
    req = '0; fetch_pc = 0; exc_enter = 0; exc_pc = 0;
    user_perms = 32'(pm(P_GLOBAL, P_LOAD, P_STORE, P_LOAD_CAP, P_STORE_CAP));
    repeat (3) @(posedge clk);
    rst_n = 1;

    exec(OP_CREADHWR, 1, 0, 0, 0);
    exec(OP_CSETOFFSET, 3, 1, 0, HEAP);
    exec(OP_CSETBOUNDS, 3, 3, 0, HEAP_SIZE);
    exec(OP_CANDPERM, 3, 3, 0, user_perms);
    exec(OP_CSETOFFSET, 4, 1, 0, ALLOC_OTYPE);
    exec(OP_CSETBOUNDS, 4, 4, 0, 1);
    exec(OP_CANDPERM, 4, 4, 0, 32'(pm(P_SEAL, P_UNSEAL)));

    // free lists: every header links to the next chunk of its bucket
    for (int b = 0; b < NB; b++) begin
      for (int k = 0; k < NCHUNK[b]; k++) begin
        h = BSTART[b] + 32'(k * STRIDE[b]);
        if (k + 1 < NCHUNK[b]) exec(OP_CSETOFFSET, 5, 3, 0, h + 32'(STRIDE[b]) - HEAP);
        else exec(OP_CMOVE, 5, 0, 0, 0);
        exec(OP_CSC, 0, 3, 5, h - HEAP);
      end
      head[b] = BSTART[b];
    end

    // user: a linked list of heap nodes {next capability, value}
    exec(OP_CMOVE, 2, 0, 0, 0);
    for (int i = 0; i < NODES; i++) begin
      malloc(1, ok);
      expect_val("malloc node", 64'(ok), 1);
      exec(OP_CSTORE, 0, 7, 0, 8, 0, 3, 64'(1000 + i));
      expect_exc("write node value", EXC_NONE);
      exec(OP_CSC, 0, 7, 2, 0);
      expect_exc("link node", EXC_NONE);
      exec(OP_CMOVE, 2, 7, 0, 0);
    end
    // the node ends at 16 bytes and its header sits just below it
    exec(OP_CSTORE, 0, 2, 0, 16, 0, 3, 64'hBAD);
    expect_exc("write past the node", EXC_LENGTH);
    exec(OP_CSTORE, 0, 2, 0, 32'hFFFF_FFF8, 0, 3, 64'hBAD);
    expect_exc("write into the header", EXC_LENGTH);
    exec(OP_CLC, 5, 2, 0, 32'hFFFF_FFF8);
    expect_exc("read the header", EXC_LENGTH);

    // walk the list
    count = 0; sum = 0;
    exec(OP_CMOVE, 7, 2, 0, 0);
    forever begin
      exec(OP_CGETTAG, 0, 7, 0, 0);
      if (!r.gpr[0]) break;
      exec(OP_CLOAD, 0, 7, 0, 8, 0, 3);
      sum += longint'(r.gpr);
      count++;
      exec(OP_CLC, 7, 7, 0, 0);
      expect_exc("follow link", EXC_NONE);
    end
    expect_val("nodes walked", 64'(count), NODES);
    expect_val("sum of values", 64'(sum), 64'(NODES * 1000 + NODES * (NODES - 1) / 2));

    // forged headers in front of a capability carved out of a live chunk
    malloc(1, ok);
    exec(OP_CLC, 6, 3, 0, BSTART[1] - HEAP);       // a real sealed header...
    exec(OP_CGETADDR, 0, 6, 0, 0);
    exec(OP_CSTORE, 0, 7, 0, 0, 0, 3, 64'(r.gpr)); // ...copied as plain data
    exec(OP_CSETOFFSET, 7, 7, 0, 8);
    exec(OP_CSETBOUNDS, 7, 7, 0, 8);
    free_c7(ok);
    expect_val("free behind a data header refused", 64'(ok), 0);
    expect_exc("data header has no tag", EXC_TAG);
    exec(OP_CSETOFFSET, 5, 1, 0, USER_OTYPE);      // the user's own sealing key
    exec(OP_CSETBOUNDS, 5, 5, 0, 1);
    exec(OP_CSETOFFSET, 6, 1, 0, 0);
    exec(OP_CSETBOUNDS, 6, 6, 0, 0);
    exec(OP_CSETOFFSET, 6, 6, 0, 1);
    exec(OP_CSEAL, 6, 6, 5, 0);
    expect_exc("user seals its own header", EXC_NONE);
    exec(OP_CGETBASE, 0, 7, 0, 0);
    exec(OP_CSC, 0, 3, 6, r.gpr[31:0] - 8 - HEAP);
    free_c7(ok);
    expect_val("free behind a foreign seal refused", 64'(ok), 0);
    expect_exc("foreign object type", EXC_TYPE);

    // free the list, then free its last node again
    exec(OP_CMOVE, 5, 0, 0, 0);
    while (1) begin
      exec(OP_CMOVE, 7, 2, 0, 0);
      exec(OP_CGETTAG, 0, 7, 0, 0);
      if (!r.gpr[0]) break;
      exec(OP_CLC, 2, 7, 0, 0);
      free_c7(ok);
      expect_val("free node", 64'(ok), 1);
      if (frees == NODES) break;
    end
    free_c7(ok);
    expect_val("double free refused", 64'(ok), 0);
    expect_exc("freed header is not sealed", EXC_UNSEALED);

    // every 16-byte chunk but the one the forgery test kept can be handed out again
    count = 0;
    do begin malloc(1, ok); if (ok) count++; end while (ok);
    expect_val("16-byte chunks reusable", 64'(count), NCHUNK[1] - 1);
    count = 0;
    do begin malloc(0, ok); if (ok) count++; end while (ok);
    expect_val("8-byte chunks", 64'(count), NCHUNK[0]);
    expect_val("rejected frees", 64'(rejected), 3);
    $display("heap: %0d allocations, %0d frees, %0d refused, %0d cycles",
             allocs, frees, rejected, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
