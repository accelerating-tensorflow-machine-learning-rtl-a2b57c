// tb_fc_ctrl_s_axi: self-checking test of the FC IP control registers.
//
// An AXI-Lite manager written as tasks drives the register file while the
// testbench plays the core (ap_done, ap_ready, ap_idle). Checked: size
// registers with byte strobes, the start bit and its self-clearing,
// clear-on-read of done and ready, auto-restart, the interrupt path
// (GIE, IER, ISR set by an event and cleared by a toggle write), a write
// whose data arrives after its address, and that
// unmapped offsets read as zero.
module tb_fc_ctrl_s_axi;
  import fcc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t  req;
  axil_resp_t rsp;
  logic ap_start, ap_done, ap_idle, ap_ready, interrupt;
  logic [31:0] in_size, out_size;
  int checks = 0, failures = 0;

  fc_ctrl_s_axi dut (.clk, .rst_n, .s_axi(req), .s_axi_rsp(rsp),
    .ap_start, .ap_done, .ap_idle, .ap_ready, .in_size, .out_size, .interrupt);

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp_v);
    end
  endtask

  task automatic wr(input logic [5:0] addr, input logic [31:0] data, input logic [3:0] strb = 4'hF);
    @(negedge clk);
    req.aw_addr = addr; req.aw_valid = 1; req.w_data = data; req.w_strb = strb; req.w_valid = 1;
    do @(posedge clk); while (!(rsp.aw_ready && rsp.w_ready));
    @(negedge clk);
    req.aw_valid = 0; req.w_valid = 0; req.b_ready = 1;
    while (!rsp.b_valid) @(negedge clk);
    expect_eq(32'(rsp.b_resp), 0, "write response OKAY");
    @(posedge clk); @(negedge clk);
    req.b_ready = 0;
  endtask

  // address first, data a few cycles later, as an interconnect may send them
  task automatic wr_split(input logic [5:0] addr, input logic [31:0] data);
    @(negedge clk);
    req.aw_addr = addr; req.aw_valid = 1;
    do @(posedge clk); while (!rsp.aw_ready);
    @(negedge clk);
    req.aw_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (rsp.b_valid) begin failures++; $display("FAIL response before data"); end
    req.w_data = data; req.w_strb = 4'hF; req.w_valid = 1;
    do @(posedge clk); while (!rsp.w_ready);
    @(negedge clk);
    req.w_valid = 0; req.b_ready = 1;
    while (!rsp.b_valid) @(negedge clk);
    @(posedge clk); @(negedge clk);
    req.b_ready = 0;
  endtask

  task automatic rd(input logic [5:0] addr, output logic [31:0] data);
    @(negedge clk);
    req.ar_addr = addr; req.ar_valid = 1;
    do @(posedge clk); while (!rsp.ar_ready);
    @(negedge clk);
    req.ar_valid = 0;
    // hold r_ready low a few cycles to exercise back-pressure
    repeat (2) @(negedge clk);
    req.r_ready = 1;
    while (!rsp.r_valid) @(negedge clk);
    data = rsp.r_data;
    @(posedge clk); @(negedge clk);
    req.r_ready = 0;
  endtask

  task automatic core_finish();
    @(negedge clk);
    ap_done = 1; ap_ready = 1; ap_idle = 0;
    @(negedge clk);
    ap_done = 0; ap_ready = 0; ap_idle = 1;
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    req = '0;
    ap_done = 0; ap_ready = 0; ap_idle = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // sizes and strobes
    wr(REG_IN_SIZE, 32'd17);
    wr(REG_OUT_SIZE, 32'd29);
    expect_eq(in_size, 17, "in_size port");
    expect_eq(out_size, 29, "out_size port");
    wr(REG_IN_SIZE, 32'hAABB_CC05, 4'b0001);
    rd(REG_IN_SIZE, d);   expect_eq(d, 32'd5, "in_size with one strobe");
    rd(REG_OUT_SIZE, d);  expect_eq(d, 32'd29, "out_size readback");
    rd(6'h24, d);         expect_eq(d, 32'd0, "unmapped offset");
    wr_split(REG_OUT_SIZE, 32'd31);
    rd(REG_OUT_SIZE, d);  expect_eq(d, 32'd31, "write with data after address");
    wr(REG_OUT_SIZE, 32'd29);

    // idle status and start
    rd(REG_AP_CTRL, d);   expect_eq(d, 32'h4, "idle at reset");
    wr(REG_AP_CTRL, 32'h1);
    expect_eq({31'd0, ap_start}, 1, "ap_start after write");
    ap_idle = 0;
    rd(REG_AP_CTRL, d);   expect_eq(d, 32'h1, "start bit while running");
    core_finish();
    expect_eq({31'd0, ap_start}, 0, "ap_start cleared by ap_ready");
    rd(REG_AP_CTRL, d);   expect_eq(d, 32'hE, "done, idle, ready after run");
    rd(REG_AP_CTRL, d);   expect_eq(d, 32'h4, "done and ready cleared by read");

    // auto restart
    wr(REG_AP_CTRL, 32'h81);
    core_finish();
    expect_eq({31'd0, ap_start}, 1, "auto restart keeps ap_start");
    wr(REG_AP_CTRL, 32'h00);
    core_finish();
    expect_eq({31'd0, ap_start}, 0, "ap_start clears once auto restart is off");

    // interrupt
    rd(REG_AP_CTRL, d);
    wr(REG_GIE, 32'h1);
    wr(REG_IER, 32'h1);
    expect_eq({31'd0, interrupt}, 0, "no interrupt before an event");
    wr(REG_AP_CTRL, 32'h1);
    core_finish();
    @(negedge clk);
    expect_eq({31'd0, interrupt}, 1, "interrupt on done");
    rd(REG_ISR, d);       expect_eq(d, 32'h1, "ISR done bit, ready not enabled");
    wr(REG_ISR, 32'h1);
    expect_eq({31'd0, interrupt}, 0, "interrupt cleared by ISR toggle");
    rd(REG_ISR, d);       expect_eq(d, 32'h0, "ISR clear");
    rd(REG_IER, d);       expect_eq(d, 32'h1, "IER readback");
    rd(REG_GIE, d);       expect_eq(d, 32'h1, "GIE readback");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
