// tb_fully_connected: self-checking test of the FC layer IP on its own.
//
// Behavioural one-cycle-latency memories stand in for the four block RAMs
// on the IP's BRAM ports; an AXI-Lite manager written as tasks plays the
// driver software. For several layer shapes it fills the memories, writes
// the sizes, starts the IP, polls AP_CTRL for done, and compares the output
// memory with a float32 reference from fp_ref_pkg. It checks that the
// interrupt line follows GIE/IER/ISR, and that the number of cycles from
// the start write to the done bit is out*(3*in+4) plus the fixed register
// and polling overhead, measured on the IP's ports.
module tb_fully_connected;
  import fcc_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t  req;
  axil_resp_t rsp;
  bram_req_t  ip, wp, bp, op;
  logic [31:0] ird, wrd, brd;
  logic irq;
  int checks = 0, failures = 0;

  logic [31:0] mem_in  [FC_MAX_IN];
  logic [31:0] mem_w   [FC_MAX_IN*FC_MAX_OUT];
  logic [31:0] mem_b   [FC_MAX_OUT];
  logic [31:0] mem_out [FC_MAX_OUT];
  int out_writes = 0;

  fully_connected dut (
    .ap_clk(clk), .ap_rst_n(rst_n), .s_axi_control(req), .s_axi_control_rsp(rsp),
    .input_r_PORTA(ip), .input_r_PORTA_dout(ird), .weights_PORTA(wp), .weights_PORTA_dout(wrd),
    .bias_PORTA(bp), .bias_PORTA_dout(brd), .output_r_PORTA(op), .interrupt(irq));

  always_ff @(posedge clk) begin
    if (ip.en) ird <= mem_in[ip.addr[6:2]];
    if (wp.en) wrd <= mem_w[wp.addr[11:2]];
    if (bp.en) brd <= mem_b[bp.addr[6:2]];
    if (op.en && |op.we) begin
      mem_out[op.addr[6:2]] <= op.wdata;
      out_writes <= out_writes + 1;
    end
  end

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp_v);
    end
  endtask

  task automatic wr(input logic [5:0] addr, input logic [31:0] data);
    @(negedge clk);
    req.aw_addr = addr; req.aw_valid = 1; req.w_data = data; req.w_strb = 4'hF; req.w_valid = 1;
    do @(posedge clk); while (!(rsp.aw_ready && rsp.w_ready));
    @(negedge clk);
    req.aw_valid = 0; req.w_valid = 0; req.b_ready = 1;
    while (!rsp.b_valid) @(negedge clk);
    @(posedge clk); @(negedge clk);
    req.b_ready = 0;
  endtask

  task automatic rd(input logic [5:0] addr, output logic [31:0] data);
    @(negedge clk);
    req.ar_addr = addr; req.ar_valid = 1;
    do @(posedge clk); while (!rsp.ar_ready);
    @(negedge clk);
    req.ar_valid = 0; req.r_ready = 1;
    while (!rsp.r_valid) @(negedge clk);
    data = rsp.r_data;
    @(posedge clk); @(negedge clk);
    req.r_ready = 0;
  endtask

  task automatic layer(input int ni, input int no, input bit irq_mode);
    logic [31:0] v, acc;
    int t0, t1, writes0;
    for (int k = 0; k < FC_MAX_IN; k++) mem_in[k] = rand_float(3);
    for (int k = 0; k < FC_MAX_IN*FC_MAX_OUT; k++) mem_w[k] = rand_float(3);
    for (int k = 0; k < FC_MAX_OUT; k++) begin mem_b[k] = rand_float(3); mem_out[k] = 32'hDEAD_BEEF; end
    writes0 = out_writes;
    wr(REG_IN_SIZE, 32'(ni));
    wr(REG_OUT_SIZE, 32'(no));
    if (irq_mode) begin wr(REG_GIE, 1); wr(REG_IER, 1); end
    wr(REG_AP_CTRL, 1);
    t0 = $time / 10;
    if (irq_mode) begin
      while (!irq) @(negedge clk);
      t1 = $time / 10;
      rd(REG_ISR, v);  expect_eq(v, 1, "ISR done");
      wr(REG_ISR, 1);
      expect_eq({31'd0, irq}, 0, "interrupt cleared");
      wr(REG_GIE, 0);
      rd(REG_AP_CTRL, v);
    end else begin
      do rd(REG_AP_CTRL, v); while (!v[1]);
      t1 = $time / 10;
    end
    expect_eq(v & 32'h6, 32'h6, "done and idle");
    // the core needs out*(3*in+4) cycles; the rest is handshake and polling
    checks++;
    if (t1 - t0 < no * (3 * ni + 4) || t1 - t0 > no * (3 * ni + 4) + 8) begin
      failures++;
      $display("FAIL run time %0d cycles for %0d x %0d", t1 - t0, ni, no);
    end
    expect_eq(32'(out_writes - writes0), 32'(no), "one output write per neuron");
    for (int o = 0; o < FC_MAX_OUT; o++) begin
      if (o < no) begin
        acc = 32'd0;
        for (int i = 0; i < ni; i++) acc = ref_add(acc, ref_mul(mem_in[i], mem_w[o*ni + i]));
        expect_eq(mem_out[o], ref_relu(ref_add(acc, mem_b[o])), $sformatf("out %0d (%0d x %0d)", o, ni, no));
      end else begin
        expect_eq(mem_out[o], 32'hDEAD_BEEF, "untouched output word");
      end
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    layer(32, 32, 0);
    layer(3, 17, 0);
    layer(29, 2, 1);
    layer(1, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
