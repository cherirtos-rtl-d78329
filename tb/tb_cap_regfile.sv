// tb_cap_regfile: checks reset values (root in PCC, DDC, KCC; null
// elsewhere), that a write is visible on both read ports from the next
// cycle on (single-cycle access), that PCC and DDC are replaced in the same
// edge, and random write/read traffic against a shadow copy.
module tb_cap_regfile;
  import cheri_pkg::*;
  import cheri_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [2:0] ra, rb, wa;
  cap_t rdata_a, rdata_b, wdata, pcc, ddc, kr1c, kcc, epcc;
  logic we, pcc_we, ddc_we, kr1c_we, kcc_we, epcc_we;
  cap_t pcc_wdata, ddc_wdata, kreg_wdata, epcc_wdata;
  cap_t shadow [8];
  int checks = 0, failures = 0, cycles = 0;

  cap_regfile dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic expect_cap(string what, cap_t got, cap_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic cap_t rnd_cap();
    cap_t c;
    c = cap_t'({$urandom, $urandom, 1'($urandom)});
    return c;
  endfunction

  initial begin
    {we, pcc_we, ddc_we, kr1c_we, kcc_we, epcc_we} = '0;
    ra = 0; rb = 0; wa = 0;
    wdata = '0; pcc_wdata = '0; ddc_wdata = '0; kreg_wdata = '0; epcc_wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_cap("reset pcc", pcc, ROOT_CAP);
    expect_cap("reset ddc", ddc, ROOT_CAP);
    expect_cap("reset kcc", kcc, ROOT_CAP);
    expect_cap("reset kr1c", kr1c, NULL_CAP);
    expect_cap("reset epcc", epcc, NULL_CAP);
    for (int i = 0; i < 8; i++) begin
      ra = 3'(i); #1; expect_cap("reset creg", rdata_a, NULL_CAP);
      shadow[i] = NULL_CAP;
    end
    // one write, visible after one edge on both ports
    @(negedge clk);
    wa = 3; wdata = mk_cap(2, 'h400, 10, '1, 'h404); we = 1;
    ra = 3; rb = 3;
    #1; expect_cap("not yet written", rdata_a, NULL_CAP);
    @(negedge clk); we = 0;
    expect_cap("port a after 1 cycle", rdata_a, wdata);
    expect_cap("port b after 1 cycle", rdata_b, wdata);
    shadow[3] = wdata;
    // PCC and DDC together, kernel registers
    pcc_wdata = rnd_cap(); ddc_wdata = rnd_cap(); pcc_we = 1; ddc_we = 1;
    kreg_wdata = rnd_cap(); kr1c_we = 1; epcc_wdata = rnd_cap(); epcc_we = 1;
    @(negedge clk); {pcc_we, ddc_we, kr1c_we, epcc_we} = '0;
    expect_cap("pcc pair", pcc, pcc_wdata);
    expect_cap("ddc pair", ddc, ddc_wdata);
    expect_cap("kr1c", kr1c, kreg_wdata);
    expect_cap("epcc", epcc, epcc_wdata);
    expect_cap("kcc untouched", kcc, ROOT_CAP);
    kreg_wdata = rnd_cap(); kcc_we = 1;
    @(negedge clk); kcc_we = 0;
    expect_cap("kcc", kcc, kreg_wdata);
    // random traffic
    repeat (500) begin
      we = 1'($urandom); wa = 3'($urandom); wdata = rnd_cap();
      ra = 3'($urandom); rb = 3'($urandom);
      #1;
      expect_cap("rand a", rdata_a, shadow[ra]);
      expect_cap("rand b", rdata_b, shadow[rb]);
      @(negedge clk);
      if (we) shadow[wa] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
