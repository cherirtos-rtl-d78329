// tagged_mem_model: behavioural model of a tagged memory for simulation only
// (not synthesizable). It stores 64-bit words with one tag bit each in
// associative arrays, performs a store in the cycle it is sampled without
// answering, answers a read LATENCY (at least 2) cycles after it is sampled
// with rvalid for one cycle, writes the request's tag with a
// full 64-bit store, and clears the tag of any word touched by a narrower
// (data) store. Loads return the addressed bytes right-aligned and
// zero-extended.
module tagged_mem_model
  import cheri_pkg::*;
#(
  parameter int unsigned LATENCY = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  mem_req_t    req,
  output logic        rvalid,
  output logic [63:0] rdata,
  output logic        rtag
);
  logic [63:0] mem  [longint];
  logic        tags [longint];
  logic [LATENCY-1:0] pipe;
  logic [63:0] data_q [LATENCY];
  logic        tag_q  [LATENCY];

  function automatic logic [63:0] word_at(longint idx);
    return mem.exists(idx) ? mem[idx] : 64'd0;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pipe <= '0;
      for (int i = 0; i < int'(LATENCY); i++) begin data_q[i] <= '0; tag_q[i] <= 1'b0; end
    end else begin
      pipe <= {pipe[LATENCY-2:0], req.valid && !req.we};
      for (int i = 1; i < int'(LATENCY); i++) begin
        data_q[i] <= data_q[i-1]; tag_q[i] <= tag_q[i-1];
      end
      data_q[0] <= '0; tag_q[0] <= 1'b0;
      if (req.valid) begin
        longint idx; int sh; logic [63:0] w, m;
        idx = longint'(req.addr >> 3);
        sh  = int'(req.addr[2:0]) * 8;
        m   = (req.size == 2'd3) ? '1 : ((64'd1 << (8 << req.size)) - 64'd1);
        w   = word_at(idx);
        if (req.we) begin
          mem[idx]  = (w & ~(m << sh)) | ((req.wdata & m) << sh);
          tags[idx] = (req.size == 2'd3) ? req.wtag : 1'b0;
        end else begin
          data_q[0] <= (w >> sh) & m;
          tag_q[0]  <= (req.size == 2'd3) && tags.exists(idx) && tags[idx];
        end
      end
    end
  end

  assign rvalid = pipe[LATENCY-1];
  assign rdata  = data_q[LATENCY-1];
  assign rtag   = tag_q[LATENCY-1];
endmodule
