// tb_axi_smartconnect: self-checking test of the AXI4 interconnect.
//
// Five AXI BRAM controllers, each with a 32-word RAM, sit behind the five
// manager-side ports at the default address map. The test writes a
// different burst into every window, checks through each RAM's second port
// that the data landed in the right RAM and nowhere else, reads all
// windows back over AXI, runs a write and a read to different windows at
// the same time, and checks that unmapped addresses get DECERR on both
// paths (including a multi-beat read).
module tb_axi_smartconnect;
  import fcc_pkg::*;

  localparam int N = N_SLOTS;
  localparam addr_t BASES [N] = '{MAP_CTRL, MAP_IN, MAP_W, MAP_B, MAP_OUT};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axi_req_t  m_req;
  axi_resp_t m_rsp;
  axi_req_t  [N-1:0] sub_req;
  axi_resp_t [N-1:0] sub_rsp;
  bram_req_t pa [N];
  bram_req_t pb [N];
  logic [31:0] da [N];
  logic [31:0] db [N];
  int checks = 0, failures = 0;
  int decerrs = 0;

  `include "axi_bfm_tasks.svh"

  axi_smartconnect dut (.clk, .rst_n, .s_axi(m_req), .s_axi_rsp(m_rsp), .m_axi(sub_req), .m_axi_rsp(sub_rsp));

  for (genvar g = 0; g < N; g++) begin : g_sub
    axi_bram_ctrl u_ctrl (.clk, .rst_n, .s_axi(sub_req[g]), .s_axi_rsp(sub_rsp[g]), .bram(pa[g]), .bram_rdata(da[g]));
    bram_tdp #(.DEPTH(32)) u_ram (.clk, .port_a(pa[g]), .dout_a(da[g]), .port_b(pb[g]), .dout_b(db[g]));
  end

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp_v);
    end
  endtask

  task automatic peek(input int s, input int idx, output logic [31:0] v);
    @(negedge clk);
    pb[s] = '{en: 1'b1, we: 4'h0, addr: 32'(idx) << 2, wdata: 32'h0};
    @(negedge clk);
    pb[s] = '0;
    v = db[s];
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
    m_req = '0;
    for (int s = 0; s < N; s++) pb[s] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // a distinct 8-word pattern into each window, at word 4
    for (int s = 0; s < N; s++) begin
      wd = {};
      for (int k = 0; k < 8; k++) wd.push_back({8'(s), 8'hA5, 16'(k)});
      axi_write(BASES[s] + 40'd16, wd);
    end
    for (int s = 0; s < N; s++)
      for (int k = 0; k < 8; k++) begin
        peek(s, 4 + k, v);
        expect_eq(v, {8'(s), 8'hA5, 16'(k)}, $sformatf("window %0d word %0d", s, 4 + k));
      end
    for (int s = 0; s < N; s++) begin
      axi_read(BASES[s] + 40'd16, 8, rdq);
      for (int k = 0; k < 8; k++) expect_eq(rdq[k], {8'(s), 8'hA5, 16'(k)}, $sformatf("readback %0d/%0d", s, k));
    end
    // write and read to different windows together
    fork
      axi_write(BASES[1], {32'h0BAD_F00D, 32'h1234_5678});
      axi_read(BASES[3] + 40'd16, 4, rdq);
    join
    for (int k = 0; k < 4; k++) expect_eq(rdq[k], {8'd3, 8'hA5, 16'(k)}, "parallel read");
    peek(1, 1, v); expect_eq(v, 32'h1234_5678, "parallel write");
    // unmapped addresses
    axi_write(40'h00_9000_0000, {32'h1, 32'h2, 32'h3}, BURST_INCR, 4'hF, RESP_DECERR);
    decerrs++;
    axi_read(40'h00_8005_0000, 3, rdq, BURST_INCR, RESP_DECERR);
    decerrs++;
    expect_eq(32'(rdq.size()), 3, "DECERR read beats");
    // a mapped access still works afterwards
    axi_read(BASES[4] + 40'd16, 1, rdq);
    expect_eq(rdq[0], {8'd4, 8'hA5, 16'd0}, "access after DECERR");
    $display("decode errors exercised: %0d", decerrs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
