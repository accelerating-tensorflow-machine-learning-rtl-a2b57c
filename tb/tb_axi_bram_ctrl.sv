// tb_axi_bram_ctrl: self-checking test of the AXI4 BRAM controller.
//
// The controller drives port A of a 64-word dual-port RAM; the testbench
// reaches the same RAM through port B as an independent view. Checked:
// INCR burst writes and reads (1 to 16 beats), a FIXED burst (only the
// last beat survives at one address), a WRAP burst read that wraps at its
// 16-byte boundary, byte strobes, the response IDs and RLAST, and that a
// write and a read offered together are both served (arbitration).
module tb_axi_bram_ctrl;
  import fcc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axi_req_t  m_req;
  axi_resp_t m_rsp;
  bram_req_t pa, pb;
  logic [31:0] da, db;
  int checks = 0, failures = 0;
  logic [31:0] model [64];

  `include "axi_bfm_tasks.svh"

  axi_bram_ctrl dut (.clk, .rst_n, .s_axi(m_req), .s_axi_rsp(m_rsp), .bram(pa), .bram_rdata(da));
  bram_tdp #(.DEPTH(64)) u_ram (.clk, .port_a(pa), .dout_a(da), .port_b(pb), .dout_b(db));

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp_v);
    end
  endtask

  task automatic peek(input int idx, output logic [31:0] v);
    @(negedge clk);
    pb = '{en: 1'b1, we: 4'h0, addr: 32'(idx) << 2, wdata: 32'h0};
    @(negedge clk);
    pb = '0;
    v = db;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] wd[$], rdq[$], v;
    int base, n;
    m_req = '0; pb = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // fill the whole RAM with INCR bursts of varying length
    base = 0;
    while (base < 64) begin
      n = 1 + $urandom % 16;
      if (base + n > 64) n = 64 - base;
      wd = {};
      for (int k = 0; k < n; k++) begin wd.push_back($urandom); model[base + k] = wd[k]; end
      axi_write(MAP_IN + addr_t'(base * 4), wd);
      base += n;
    end
    // check through the other port
    for (int k = 0; k < 64; k++) begin peek(k, v); expect_eq(v, model[k], $sformatf("port B word %0d", k)); end
    // read back through AXI
    for (int b = 0; b < 64; b += 16) begin
      axi_read(addr_t'(b * 4), 16, rdq);
      for (int k = 0; k < 16; k++) expect_eq(rdq[k], model[b + k], $sformatf("INCR read %0d", b + k));
    end
    // FIXED burst: four beats to one word
    wd = {32'h1111_1111, 32'h2222_2222, 32'h3333_3333, 32'h4444_4444};
    axi_write(addr_t'(5 * 4), wd, BURST_FIXED);
    model[5] = 32'h4444_4444;
    peek(5, v); expect_eq(v, model[5], "FIXED burst keeps last beat");
    peek(6, v); expect_eq(v, model[6], "FIXED burst leaves neighbour");
    // WRAP burst: 4 beats from word 10 wraps at the 16-byte boundary (8..11)
    axi_read(addr_t'(10 * 4), 4, rdq, BURST_WRAP);
    expect_eq(rdq[0], model[10], "WRAP beat 0");
    expect_eq(rdq[1], model[11], "WRAP beat 1");
    expect_eq(rdq[2], model[8],  "WRAP beat 2");
    expect_eq(rdq[3], model[9],  "WRAP beat 3");
    // byte strobes
    axi_write(addr_t'(20 * 4), {32'hA1B2_C3D4}, BURST_INCR, 4'b0101);
    model[20] = {model[20][31:24], 8'hB2, model[20][15:8], 8'hD4};
    axi_read(addr_t'(20 * 4), 1, rdq);
    expect_eq(rdq[0], model[20], "byte strobes");
    // write and read offered in the same cycle
    fork
      axi_write(addr_t'(30 * 4), {32'hCAFE_F00D});
      axi_read(addr_t'(31 * 4), 1, rdq);
    join
    expect_eq(rdq[0], model[31], "read beside a write");
    peek(30, v); expect_eq(v, 32'hCAFE_F00D, "write beside a read");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
