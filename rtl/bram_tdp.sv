// bram_tdp: true dual-port block RAM, 32-bit words, byte write enables.
//
// One instance holds each of the accelerator's four data sets (inputs,
// weights, biases, outputs). Port A is used by the processor through an
// AXI BRAM controller, port B by the accelerator, so both can reach the
// same words. That dedicated-memory-per-data-set arrangement and the
// dual-port use follow the system description; the depths are this
// design's choice: 32 words for input, bias and output, 1024 words
// (32 x 32) for the weights.
//
// Each port takes a bram_req_t (enable, four byte write enables, byte
// address, write data); the word index is addr[AW+1:2], higher address
// bits are ignored. Reads are synchronous, one cycle after the enable, and
// read-first: a write returns the old word. The read register keeps its
// value while the port is not enabled. Writing the same word from both
// ports in one cycle is not allowed (checked by an assertion).
module bram_tdp
  import fcc_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic        clk,
  input  bram_req_t   port_a,
  output logic [31:0] dout_a,
  input  bram_req_t   port_b,
  output logic [31:0] dout_b
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [31:0] mem [DEPTH];
  logic [AW-1:0] idx_a, idx_b;

  assign idx_a = port_a.addr[AW+1:2];
  assign idx_b = port_b.addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (port_a.en) begin
      dout_a <= mem[idx_a];
      for (int k = 0; k < 4; k++)
        if (port_a.we[k]) mem[idx_a][8*k +: 8] <= port_a.wdata[8*k +: 8];
    end
    if (port_b.en) begin
      dout_b <= mem[idx_b];
      for (int k = 0; k < 4; k++)
        if (port_b.we[k]) mem[idx_b][8*k +: 8] <= port_b.wdata[8*k +: 8];
    end
  end

  a_no_write_collision: assert property (@(posedge clk)
    !(port_a.en && port_b.en && (|port_a.we) && (|port_b.we) && (idx_a == idx_b)));

endmodule
