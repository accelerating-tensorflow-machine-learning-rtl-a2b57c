// tb_bram_tdp: self-checking test of the true dual-port block RAM.
//
// Runs 4000 cycles of random traffic on both ports (reads, full and
// partial byte writes, never the same word written from both ports at
// once) against a shadow array kept in the testbench, and checks every
// read one cycle after its enable, including read-first behaviour and that
// the read register holds while the port is idle.
module tb_bram_tdp;
  import fcc_pkg::*;

  localparam int DEPTH = 64;
  logic clk = 0;
  always #5 clk = ~clk;

  bram_req_t pa, pb;
  logic [31:0] da, db;
  logic [31:0] shadow [DEPTH];
  logic [31:0] exp_a, exp_b;
  logic        chk_a, chk_b;
  int checks = 0, failures = 0;

  bram_tdp #(.DEPTH(DEPTH)) dut (.clk, .port_a(pa), .dout_a(da), .port_b(pb), .dout_b(db));

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] d, input logic [3:0] we);
    for (int k = 0; k < 4; k++) if (we[k]) old[8*k +: 8] = d[8*k +: 8];
    return old;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pa = '0; pb = '0; chk_a = 0; chk_b = 0;
    // initialise through port A
    for (int k = 0; k < DEPTH; k++) begin
      @(negedge clk);
      pa = '{en: 1'b1, we: 4'hF, addr: 32'(k) << 2, wdata: $urandom};
      shadow[k] = pa.wdata;
    end
    @(negedge clk); pa = '0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      // check the reads issued in the previous cycle
      if (chk_a) begin checks++; if (da !== exp_a) begin failures++; $display("FAIL A %h != %h", da, exp_a); end end
      if (chk_b) begin checks++; if (db !== exp_b) begin failures++; $display("FAIL B %h != %h", db, exp_b); end end
      pa.en = ($urandom % 4) != 0;
      pb.en = ($urandom % 4) != 0;
      pa.addr = 32'($urandom % DEPTH) << 2;
      pb.addr = 32'($urandom % DEPTH) << 2;
      pa.we = ($urandom % 2) ? 4'($urandom) : 4'h0;
      pb.we = ($urandom % 2) ? 4'($urandom) : 4'h0;
      if (pa.addr == pb.addr && pa.we != 0) pb.we = 4'h0;
      pa.wdata = $urandom; pb.wdata = $urandom;
      // expected data (read-first); idle port keeps its last value
      if (pa.en) exp_a = shadow[pa.addr[7:2]];
      if (pb.en) exp_b = shadow[pb.addr[7:2]];
      chk_a = chk_a | pa.en;
      chk_b = chk_b | pb.en;
      if (pa.en) shadow[pa.addr[7:2]] = merge(shadow[pa.addr[7:2]], pa.wdata, pa.we);
      if (pb.en) shadow[pb.addr[7:2]] = merge(shadow[pb.addr[7:2]], pb.wdata, pb.we);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
