// cheri_pkg: types and constants shared by the CHERI-64 capability coprocessor.
//
// A capability is 64 bits in memory and in the register file, plus one tag bit
// held beside it. The upper word carries a 12-bit permission field, two spare
// bits and an 18-bit compressed bounds field; the lower word is the 32-bit
// address (the pointer). That split of 12 + 18 + 32 bits follows the published
// CHERI-64 layout. Everything below that level is this design's own choice:
//
//   word[63:52] permissions (bit numbers below)
//   word[51]    sealed flag          (one of the two spare bits)
//   word[50]    reserved, written 0
//   word[49:32] compressed bounds
//   word[31:0]  address
//
// Unsealed bounds field: {E[4:0], B[6:0], L[5:0]}. The base is the address with
// its low E bits cleared and bits [E+6:E] replaced by B, the upper bits being
// taken from the address with a +/-1 correction; the top is base + (L << E).
// Sealed bounds field: {E[4:0], B[6:3], L[5:3], otype[5:0]}; B[2:0] and L[2:0]
// are zero, so only capabilities whose encoding has those bits clear can be
// sealed. The object type (otype) is therefore 6 bits wide: 64 domains can hold
// a sealing key of their own.
package cheri_pkg;

  localparam int unsigned ADDR_W   = 32;  // flat address space
  localparam int unsigned CAP_W    = 64;  // capability size in memory
  localparam int unsigned PERM_W   = 12;
  localparam int unsigned BND_W    = 18;
  localparam int unsigned E_W      = 5;
  localparam int unsigned MW       = 7;   // width of the base mantissa B
  localparam int unsigned LW       = 6;   // width of the length mantissa L
  localparam int unsigned OTYPE_W  = 6;
  localparam int unsigned E_MAX    = 27;  // E + MW covers a 34-bit address span
  localparam int unsigned NUM_CREGS = 8;  // user capability registers C0..C7

  // Permission bit numbers inside word[63:52].
  localparam int unsigned P_GLOBAL     = 0;
  localparam int unsigned P_EXECUTE    = 1;
  localparam int unsigned P_LOAD       = 2;
  localparam int unsigned P_STORE      = 3;
  localparam int unsigned P_LOAD_CAP   = 4;
  localparam int unsigned P_STORE_CAP  = 5;
  localparam int unsigned P_STORE_LCAP = 6;
  localparam int unsigned P_SEAL       = 7;
  localparam int unsigned P_CCALL      = 8;
  localparam int unsigned P_UNSEAL     = 9;
  localparam int unsigned P_SYSREGS    = 10;
  localparam int unsigned P_USER0      = 11;

  typedef logic [PERM_W-1:0] perm_t;
  typedef logic [OTYPE_W-1:0] otype_t;

  // Memory / register representation.
  typedef struct packed {
    perm_t              perms;
    logic               sealed;
    logic               rsvd;
    logic [BND_W-1:0]   bounds;
    logic [ADDR_W-1:0]  addr;
  } cap_word_t;

  // A register-file entry: the word plus its tag.
  typedef struct packed {
    logic      tag;
    cap_word_t w;
  } cap_t;

  // Decoded view produced by cap_decompress.
  typedef struct packed {
    logic [ADDR_W:0]    base;    // 33 bits, normally below 2**32
    logic [ADDR_W:0]    top;     // 33 bits, may equal 2**32
    logic [ADDR_W:0]    length;  // top - base
    logic [ADDR_W-1:0]  offset;  // addr - base
    otype_t             otype;   // meaningful when sealed
    logic [E_W-1:0]     e;
    logic               low_zero; // B[2:0] and L[2:0] zero: sealable
  } cap_dec_t;

  localparam cap_t NULL_CAP = '0;

  // Capability covering the whole 4 GiB space with every permission.
  localparam cap_t ROOT_CAP = '{tag: 1'b1,
                                w: '{perms: '1, sealed: 1'b0, rsvd: 1'b0,
                                     bounds: {5'd27, 7'd0, 6'd32}, addr: '0}};

  // Exception causes (own numbering, modelled on CHERI's capability causes).
  typedef enum logic [4:0] {
    EXC_NONE        = 5'h00,
    EXC_LENGTH      = 5'h01,  // bounds violation
    EXC_TAG         = 5'h02,
    EXC_SEAL        = 5'h03,  // operand sealed when it must not be
    EXC_TYPE        = 5'h04,  // otype mismatch
    EXC_REPRESENT   = 5'h05,  // bounds cannot be encoded as required
    EXC_UNSEALED    = 5'h06,  // operand unsealed when it must be sealed
    EXC_GLOBAL      = 5'h08,  // store of a local capability
    EXC_CALL        = 5'h0a,  // CCall: trap to the kernel's software CCall
    EXC_PERM_EXE    = 5'h11,
    EXC_PERM_LOAD   = 5'h12,
    EXC_PERM_STORE  = 5'h13,
    EXC_PERM_LCAP   = 5'h14,
    EXC_PERM_SCAP   = 5'h15,
    EXC_PERM_SLCAP  = 5'h16,
    EXC_PERM_SEAL   = 5'h17,
    EXC_PERM_CCALL  = 5'h19,
    EXC_PERM_UNSEAL = 5'h1a,
    EXC_SYSREGS     = 5'h18,
    EXC_ALIGN       = 5'h1f
  } exc_t;

  // Access kinds seen by cap_check.
  typedef enum logic [1:0] {
    ACC_FETCH = 2'd0,
    ACC_LOAD  = 2'd1,
    ACC_STORE = 2'd2
  } acc_t;

  // Coprocessor operations.
  typedef enum logic [4:0] {
    OP_NOP,
    OP_CGETBASE, OP_CGETLEN, OP_CGETOFFSET, OP_CGETPERM, OP_CGETTYPE,
    OP_CGETTAG, OP_CGETSEALED, OP_CGETADDR,
    OP_CMOVE, OP_CINCOFFSET, OP_CSETOFFSET, OP_CSETBOUNDS, OP_CANDPERM,
    OP_CCLEARTAG, OP_CSEAL, OP_CUNSEAL,
    OP_CGETPCC, OP_CREADHWR, OP_CWRITEHWR,
    OP_CJR, OP_CJALR, OP_CCALLFAST, OP_CCALL, OP_ERET,
    OP_CLOAD, OP_CSTORE,       // data through an explicit capability
    OP_LOAD, OP_STORE,         // legacy data access through DDC
    OP_CLC, OP_CSC             // capability load / store
  } cop_op_t;

  // Special (hardware) registers reached by CReadHwr / CWriteHwr.
  typedef enum logic [2:0] {
    HWR_DDC  = 3'd0,
    HWR_KR1C = 3'd1,  // trusted-stack pointer, kernel only
    HWR_KCC  = 3'd2,  // kernel code capability, kernel only
    HWR_EPCC = 3'd3   // exception PCC, kernel only
  } hwr_t;

  typedef struct packed {
    logic              valid;
    cop_op_t           op;
    logic [2:0]        cd;     // destination capability register
    logic [2:0]        cb;     // first source capability register
    logic [2:0]        ct;     // second source capability register
    hwr_t              hwr;    // special register for CReadHwr/CWriteHwr
    logic [ADDR_W-1:0] rt;     // GPR operand (offset, length, mask, address)
    logic [ADDR_W-1:0] imm;    // immediate offset of loads and stores
    logic [1:0]        size;   // data access size: 1 << size bytes
    logic [63:0]       wdata;  // store data (GPR)
    logic [ADDR_W-1:0] pc;     // PCC-relative PC of this instruction
  } cop_req_t;

  typedef struct packed {
    logic              valid;
    exc_t              cause;   // EXC_NONE when the instruction completed
    logic [2:0]        creg;    // register named in the exception
    logic [63:0]       gpr;     // value written to a GPR (get-ops, loads)
    logic              gpr_we;
    logic              redirect;     // jump: fetch continues at redirect_pc
    logic [ADDR_W-1:0] redirect_pc;  // PCC-relative
  } cop_resp_t;

  typedef struct packed {
    logic              valid;
    logic              we;
    logic [ADDR_W-1:0] addr;   // byte address, absolute
    logic [1:0]        size;   // 1 << size bytes; 3 for capabilities
    logic [63:0]       wdata;
    logic              wtag;   // tag written with the data (0 for data stores)
  } mem_req_t;

  // Seal: keep the high mantissa bits, put the otype in the freed low bits.
  // Caller must have checked that B[2:0] and L[2:0] are zero.
  function automatic cap_word_t seal_word(cap_word_t w, otype_t ot);
    cap_word_t r = w;
    r.sealed = 1'b1;
    r.bounds = {w.bounds[17:13], w.bounds[12:9], w.bounds[5:3], ot};
    return r;
  endfunction

  // Unseal: restore the unsealed bounds layout with zero low mantissa bits.
  function automatic cap_word_t unseal_word(cap_word_t w);
    cap_word_t r = w;
    r.sealed = 1'b0;
    r.bounds = {w.bounds[17:13], w.bounds[12:9], 3'b000, w.bounds[8:6], 3'b000};
    return r;
  endfunction

endpackage
