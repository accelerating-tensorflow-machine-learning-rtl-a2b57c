// tb_fc_core: self-checking test of the sequential FC layer engine.
//
// Four behavioural memories with one cycle of read latency stand in for
// the block RAMs. Each run fills them with random float32 values (some
// rows made negative so that ReLU clamps), starts the core with random
// sizes (including 0, 1, the 32 x 32 maximum and oversize values that must
// be clamped), and compares every output word with a reference computed
// by fp_ref_pkg in the same order of operations. It also checks that the
// start-to-done latency equals out*(3*in+4) cycles and that words
// beyond out_size are left untouched.
module tb_fc_core;
  import fcc_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        ap_start, ap_done, ap_idle, ap_ready;
  logic [31:0] in_size, out_size;
  bram_req_t   ip, wp, bp, op;
  logic [31:0] ird, wrd, brd;

  logic [31:0] mem_in  [FC_MAX_IN];
  logic [31:0] mem_w   [FC_MAX_IN*FC_MAX_OUT];
  logic [31:0] mem_b   [FC_MAX_OUT];
  logic [31:0] mem_out [FC_MAX_OUT];

  int checks = 0, failures = 0;
  int clamps = 0;
  int bad_writes = 0;

  fc_core dut (
    .clk, .rst_n, .ap_start, .ap_done, .ap_idle, .ap_ready, .in_size, .out_size,
    .input_port(ip), .input_rdata(ird), .weights_port(wp), .weights_rdata(wrd),
    .bias_port(bp), .bias_rdata(brd), .output_port(op)
  );

  always_ff @(posedge clk) begin
    if (ip.en) ird <= mem_in[ip.addr[6:2]];
    if (wp.en) wrd <= mem_w[wp.addr[11:2]];
    if (bp.en) brd <= mem_b[bp.addr[6:2]];
    if (op.en && op.we == 4'hF) mem_out[op.addr[6:2]] <= op.wdata;
    if (op.en && op.we != 4'hF) bad_writes <= bad_writes + 1;
  end

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp_v);
    end
  endtask

  task automatic run(input int ni, input int no);
    int eff_i, eff_o, cycles;
    logic [31:0] acc, refv;
    eff_i = (ni > FC_MAX_IN) ? FC_MAX_IN : ni;
    eff_o = (no > FC_MAX_OUT) ? FC_MAX_OUT : no;
    for (int k = 0; k < FC_MAX_IN; k++) mem_in[k] = rand_float(4);
    for (int k = 0; k < FC_MAX_IN*FC_MAX_OUT; k++) mem_w[k] = rand_float(4);
    for (int k = 0; k < FC_MAX_OUT; k++) mem_b[k] = rand_float(4);
    for (int k = 0; k < FC_MAX_OUT; k++) mem_out[k] = 32'hDEAD_BEEF;
    @(negedge clk);
    in_size = 32'(ni); out_size = 32'(no); ap_start = 1;
    expect_eq({31'd0, ap_idle}, 1, "idle before start");
    @(posedge clk); #1;
    ap_start = 0;
    cycles = 0;
    while (!ap_done) begin
      @(posedge clk); #1;
      cycles++;
      if (cycles > 10000) break;
    end
    expect_eq(32'(cycles), 32'(eff_o * (3 * eff_i + 4)), "latency");
    expect_eq({31'd0, ap_ready}, 1, "ap_ready with ap_done");
    @(posedge clk); #1;
    expect_eq({31'd0, ap_idle}, 1, "idle after done");
    for (int o = 0; o < FC_MAX_OUT; o++) begin
      if (o < eff_o) begin
        acc = 32'd0;
        for (int i = 0; i < eff_i; i++) acc = ref_add(acc, ref_mul(mem_in[i], mem_w[o*eff_i + i]));
        acc  = ref_add(acc, mem_b[o]);
        if (acc[31]) clamps++;
        refv = ref_relu(acc);
      end else begin
        refv = 32'hDEAD_BEEF;
      end
      expect_eq(mem_out[o], refv, $sformatf("out[%0d] (%0d x %0d)", o, ni, no));
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ap_start = 0; in_size = 0; out_size = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(32, 32);
    run(1, 1);
    run(0, 4);
    run(5, 0);
    run(40, 33);
    for (int t = 0; t < 8; t++) run(1 + $urandom % 32, 1 + $urandom % 32);
    if (clamps == 0) begin
      failures++;
      $display("FAIL ReLU never clamped a negative sum");
    end
    expect_eq(32'(bad_writes), 0, "partial output writes");
    $display("ReLU clamps: %0d", clamps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
