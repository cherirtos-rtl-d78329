// cap_regfile: the capability register file of the coprocessor.
//
// It holds NUM_CREGS (8) general capability registers C0..C7, the program
// counter capability PCC, the default data capability DDC and three kernel
// registers: KR1C (points at the current task's trusted stack), KCC (code
// capability installed on an exception) and EPCC (PCC saved on an
// exception). Capabilities are stored compressed, 64 bits plus a tag.
//
// Two general read ports (ra, rb) and the special registers are read
// combinationally; writes take effect at the next rising clock edge, so every
// register is reachable in a single cycle. PCC and DDC have their own write
// enables so that CCallFast can replace both in the same cycle; a general
// write and special-register writes may happen together. At reset PCC, DDC
// and KCC hold the all-covering root capability and every other register the
// null capability.
//
// Eight capability registers and the 8 user + 3 kernel split follow the
// published design; which three kernel registers, the port count and the
// reset values are this design's own choices.
module cap_regfile
  import cheri_pkg::*;
#(
  parameter int unsigned N = NUM_CREGS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // general read ports
  input  logic [$clog2(N)-1:0] ra,
  output cap_t                 rdata_a,
  input  logic [$clog2(N)-1:0] rb,
  output cap_t                 rdata_b,
  // general write port
  input  logic                 we,
  input  logic [$clog2(N)-1:0] wa,
  input  cap_t                 wdata,
  // special registers
  output cap_t                 pcc,
  output cap_t                 ddc,
  output cap_t                 kr1c,
  output cap_t                 kcc,
  output cap_t                 epcc,
  input  logic                 pcc_we,
  input  cap_t                 pcc_wdata,
  input  logic                 ddc_we,
  input  cap_t                 ddc_wdata,
  input  logic                 kr1c_we,
  input  logic                 kcc_we,
  input  logic                 epcc_we,
  input  cap_t                 kreg_wdata,  // shared by KR1C, KCC
  input  cap_t                 epcc_wdata
);

  cap_t regs [N];
  cap_t pcc_q, ddc_q, kr1c_q, kcc_q, epcc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) regs[i] <= NULL_CAP;
      pcc_q  <= ROOT_CAP;
      ddc_q  <= ROOT_CAP;
      kcc_q  <= ROOT_CAP;
      kr1c_q <= NULL_CAP;
      epcc_q <= NULL_CAP;
    end else begin
      if (we)      regs[wa] <= wdata;
      if (pcc_we)  pcc_q    <= pcc_wdata;
      if (ddc_we)  ddc_q    <= ddc_wdata;
      if (kr1c_we) kr1c_q   <= kreg_wdata;
      if (kcc_we)  kcc_q    <= kreg_wdata;
      if (epcc_we) epcc_q   <= epcc_wdata;
    end
  end

  assign rdata_a = regs[ra];
  assign rdata_b = regs[rb];
  assign pcc  = pcc_q;
  assign ddc  = ddc_q;
  assign kr1c = kr1c_q;
  assign kcc  = kcc_q;
  assign epcc = epcc_q;

endmodule
