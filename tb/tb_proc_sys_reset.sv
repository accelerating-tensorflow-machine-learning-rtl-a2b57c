// tb_proc_sys_reset: self-checking test of the reset generator.
//
// Applies each reset source in turn (external reset, auxiliary reset,
// debug reset, loss of clock lock), and after each one counts the cycles
// until every output is released, checking the release order and the
// cycle counts (HOLD, 2*HOLD and 3*HOLD after the synchroniser) and that
// the outputs stay asserted while the source is held.
module tb_proc_sys_reset;
  localparam int HOLD = 4;

  logic clk = 0;
  always #5 clk = ~clk;

  logic ext_n, aux_n, dbg, locked;
  logic mb_reset, bus_struct_reset, peripheral_reset, interconnect_aresetn, peripheral_aresetn;
  int checks = 0, failures = 0;

  proc_sys_reset #(.HOLD(HOLD)) dut (
    .slowest_sync_clk(clk), .ext_reset_in(ext_n), .aux_reset_in(aux_n),
    .mb_debug_sys_rst(dbg), .dcm_locked(locked),
    .mb_reset, .bus_struct_reset, .peripheral_reset, .interconnect_aresetn, .peripheral_aresetn);

  task automatic expect_eq(input int got, input int exp_v, input string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp_v);
    end
  endtask

  // hold a source for a while, release it, measure the release times
  task automatic pulse(input int which, input string name);
    int t_ic, t_per, t_mb, t;
    @(negedge clk);
    case (which)
      0: ext_n = 0;
      1: aux_n = 0;
      2: dbg = 1;
      default: locked = 0;
    endcase
    repeat (10) @(negedge clk);
    expect_eq(int'({bus_struct_reset, peripheral_reset, mb_reset, interconnect_aresetn, peripheral_aresetn}), 5'b11100, {name, " asserts all"});
    ext_n = 1; aux_n = 1; dbg = 0; locked = 1;
    t_ic = -1; t_per = -1; t_mb = -1;
    for (t = 1; t < 100; t++) begin
      @(negedge clk);
      if (t_ic  < 0 && interconnect_aresetn) t_ic = t;
      if (t_per < 0 && peripheral_aresetn)   t_per = t;
      if (t_mb  < 0 && !mb_reset)            t_mb = t;
      checks++;
      if (bus_struct_reset != !interconnect_aresetn || peripheral_reset != !peripheral_aresetn) begin
        failures++;
        $display("FAIL %s: paired outputs disagree", name);
      end
    end
    // two synchroniser cycles, then HOLD cycles of count, then the register
    expect_eq(t_ic,  2 + HOLD + 1,     {name, " interconnect release"});
    expect_eq(t_per, 2 + 2 * HOLD + 1, {name, " peripheral release"});
    expect_eq(t_mb,  2 + 3 * HOLD + 1, {name, " mb release"});
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ext_n = 0; aux_n = 1; dbg = 0; locked = 1;
    pulse(0, "external");
    pulse(1, "auxiliary");
    pulse(2, "debug");
    pulse(3, "lock loss");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
