// tb_fcc_system: end-to-end test of the accelerator system at its default
// sizes.
//
// Plays the processor: after reset it loads weights, biases and inputs over
// AXI4 bursts into the three BRAMs, writes the layer sizes, sets ap_start,
// polls AP_CTRL until done and reads the outputs back over AXI, exactly as
// the driver software does. Every output is compared with a float32
// reference computed by fp_ref_pkg in the same order of operations.
//
// Layers run: a full 32 x 32 layer; a second 32 -> 20 layer fed with the
// first layer's outputs (cascaded layers, the intermediate vector copied
// by the processor, as the software does); a 7 -> 5 layer completed by
// interrupt rather than polling; an oversize request (40 x 40, clamped to
// 32 x 32); and a layer with zero outputs. Each mechanism is counted and a
// failure is recorded for any that never happened: ReLU clamping a
// negative sum, size clamping, polling, the interrupt, cascading, the
// empty layer and an interconnect decode error. The accelerator's busy time
// is checked against out*(3*in+4)+1 cycles for each layer.
module tb_fcc_system;
  import fcc_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;     // 100 MHz

  axi_req_t  m_req;
  axi_resp_t m_rsp;
  logic      irq;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_relu = 0, n_clamp = 0, n_poll = 0, n_irq = 0, n_cascade = 0, n_empty = 0, n_decerr = 0;

  `include "axi_bfm_tasks.svh"

  fcc_system dut (.pl_clk0(clk), .pl_resetn0(rst_n), .s_axi(m_req), .s_axi_rsp(m_rsp), .interrupt(irq));

  // accelerator busy time, seen from the outside of the IP
  int busy_cycles;
  always @(posedge clk) if (!dut.u_fc.u_core.ap_idle) busy_cycles++;

  logic [31:0] x [FC_MAX_IN];
  logic [31:0] w [FC_MAX_IN*FC_MAX_OUT];
  logic [31:0] b [FC_MAX_OUT];
  logic [31:0] y [FC_MAX_OUT];

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp_v);
    end
  endtask

  task automatic reg_wr(input logic [5:0] off, input logic [31:0] v);
    axi_write(MAP_CTRL + addr_t'(off), {v});
  endtask

  task automatic reg_rd(input logic [5:0] off, output logic [31:0] v);
    logic [31:0] q[$];
    axi_read(MAP_CTRL + addr_t'(off), 1, q);
    v = q[0];
  endtask

  // write n words from a base address, in bursts of up to 256 beats
  task automatic load(input addr_t base, input logic [31:0] v[$]);
    logic [31:0] chunk[$];
    int k = 0;
    while (k < v.size()) begin
      chunk = {};
      for (int j = 0; j < 256 && k + j < v.size(); j++) chunk.push_back(v[k + j]);
      axi_write(base + addr_t'(k * 4), chunk);
      k += chunk.size();
    end
  endtask

  // run one layer; x, w, b hold the data (w packed row-major by n_in)
  task automatic run_layer(input int req_in, input int req_out, input bit use_irq);
    int ni, no, t;
    logic [31:0] q[$], v, acc;
    ni = (req_in  > FC_MAX_IN)  ? FC_MAX_IN  : req_in;
    no = (req_out > FC_MAX_OUT) ? FC_MAX_OUT : req_out;
    if (ni != req_in || no != req_out) n_clamp++;
    q = {}; for (int k = 0; k < ni * no; k++) q.push_back(w[k]);
    if (q.size() > 0) load(MAP_W, q);
    q = {}; for (int k = 0; k < no; k++) q.push_back(b[k]);
    if (q.size() > 0) load(MAP_B, q);
    q = {}; for (int k = 0; k < ni; k++) q.push_back(x[k]);
    if (q.size() > 0) load(MAP_IN, q);
    // poison the output RAM so stale words would be noticed
    q = {}; for (int k = 0; k < FC_MAX_OUT; k++) q.push_back(32'hDEAD_BEEF);
    load(MAP_OUT, q);
    reg_wr(REG_IN_SIZE, 32'(req_in));
    reg_wr(REG_OUT_SIZE, 32'(req_out));
    if (use_irq) begin
      reg_wr(REG_GIE, 1);
      reg_wr(REG_IER, 1);
    end
    busy_cycles = 0;
    reg_wr(REG_AP_CTRL, 32'h1);
    if (use_irq) begin
      t = 0;
      while (!irq && t < 20000) begin @(posedge clk); t++; end
      if (irq) n_irq++;
      expect_eq({31'd0, irq}, 1, "interrupt raised");
      reg_rd(REG_ISR, v);
      expect_eq(v, 32'h1, "ISR done");
      reg_wr(REG_ISR, 32'h1);
      expect_eq({31'd0, irq}, 0, "interrupt cleared");
      reg_wr(REG_GIE, 0);
      reg_rd(REG_AP_CTRL, v);
      expect_eq(v & 32'h2, 32'h2, "done bit after interrupt");
    end else begin
      t = 0;
      do begin
        reg_rd(REG_AP_CTRL, v);
        t++;
      end while (!v[1] && t < 2000);
      n_poll += t;
      expect_eq(v & 32'h6, 32'h6, "done and idle after polling");
    end
    expect_eq(32'(busy_cycles), 32'(no * (3 * ni + 4) + 1), $sformatf("busy cycles %0d x %0d", ni, no));
    axi_read(MAP_OUT, FC_MAX_OUT, q);
    for (int o = 0; o < FC_MAX_OUT; o++) begin
      if (o < no) begin
        acc = 32'd0;
        for (int i = 0; i < ni; i++) acc = ref_add(acc, ref_mul(x[i], w[o*ni + i]));
        acc = ref_add(acc, b[o]);
        if (acc[31]) n_relu++;
        y[o] = ref_relu(acc);
      end else begin
        y[o] = 32'hDEAD_BEEF;
      end
      expect_eq(q[o], y[o], $sformatf("output %0d of %0d x %0d layer", o, ni, no));
    end
    if (no == 0) n_empty++;
  endtask

  task automatic randomise(input int ni, input int no);
    for (int k = 0; k < FC_MAX_IN; k++) x[k] = rand_float(3);
    for (int k = 0; k < FC_MAX_IN*FC_MAX_OUT; k++) w[k] = rand_float(3);
    for (int k = 0; k < FC_MAX_OUT; k++) b[k] = rand_float(3);
  endtask

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q[$];
    m_req = '0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (dut.peripheral_aresetn);
    repeat (2) @(posedge clk);

    // 1: full 32 x 32 layer, polled
    randomise(32, 32);
    run_layer(32, 32, 0);
    // 2: cascade: the outputs of layer 1 become the inputs of a 32 -> 20 layer
    axi_read(MAP_OUT, 32, q);
    for (int k = 0; k < 32; k++) x[k] = q[k];
    for (int k = 0; k < FC_MAX_IN*FC_MAX_OUT; k++) w[k] = rand_float(3);
    for (int k = 0; k < FC_MAX_OUT; k++) b[k] = rand_float(3);
    run_layer(32, 20, 0);
    n_cascade++;
    // 3: small layer finished by interrupt
    randomise(7, 5);
    run_layer(7, 5, 1);
    // 4: oversize request, clamped to 32 x 32
    randomise(40, 40);
    run_layer(40, 40, 0);
    // 5: empty layer
    randomise(8, 0);
    run_layer(8, 0, 0);
    // an access outside every window
    axi_read(40'h00_8007_0000, 1, q, BURST_INCR, RESP_DECERR);
    n_decerr++;

    $display("mechanisms: relu=%0d clamp=%0d polls=%0d irq=%0d cascade=%0d empty=%0d decerr=%0d",
             n_relu, n_clamp, n_poll, n_irq, n_cascade, n_empty, n_decerr);
    if (n_relu == 0)    begin failures++; $display("FAIL ReLU clamp never happened"); end
    if (n_clamp == 0)   begin failures++; $display("FAIL size clamp never happened"); end
    if (n_poll == 0)    begin failures++; $display("FAIL polling never happened"); end
    if (n_irq == 0)     begin failures++; $display("FAIL interrupt never happened"); end
    if (n_cascade == 0) begin failures++; $display("FAIL cascade never happened"); end
    if (n_empty == 0)   begin failures++; $display("FAIL empty layer never happened"); end
    if (n_decerr == 0)  begin failures++; $display("FAIL decode error never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
