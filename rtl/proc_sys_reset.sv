// proc_sys_reset: reset generator for the programmable-logic clock domain
// ("rst_ps8_0_100M").
//
// Turns the processor's asynchronous reset into synchronous, sequenced
// resets for the 100 MHz fabric clock. The port names follow the block
// symbol of the system diagram; the behaviour inside is this design's own
// choice, as the system description only names the block.
//
// Reset is requested while the external reset is asserted, while the
// auxiliary reset is asserted, while the debug reset is high, or while the
// clock is not locked (dcm_locked low). Each request is brought into the
// clock domain through a two-flop synchroniser. Once every request has
// gone away, a counter releases the outputs in order:
//   after HOLD cycles      bus_struct_reset and interconnect_aresetn
//   after 2*HOLD cycles    peripheral_reset and peripheral_aresetn
//   after 3*HOLD cycles    mb_reset
// A new request asserts all outputs again at once (after the
// synchroniser). Outputs come straight from flip-flops.
module proc_sys_reset #(
  parameter bit          EXT_RESET_HIGH = 1'b0,   // polarity of ext_reset_in
  parameter bit          AUX_RESET_HIGH = 1'b0,   // polarity of aux_reset_in
  parameter int unsigned HOLD           = 16
) (
  input  logic slowest_sync_clk,
  input  logic ext_reset_in,
  input  logic aux_reset_in,
  input  logic mb_debug_sys_rst,
  input  logic dcm_locked,
  output logic mb_reset,
  output logic bus_struct_reset,
  output logic peripheral_reset,
  output logic interconnect_aresetn,
  output logic peripheral_aresetn
);

  localparam int unsigned CW = $clog2(3 * HOLD + 1);

  logic       req_async;
  logic [1:0] sync_q;
  logic [CW-1:0] cnt;

  assign req_async = (ext_reset_in == EXT_RESET_HIGH) ||
                     (aux_reset_in == AUX_RESET_HIGH) ||
                     mb_debug_sys_rst || !dcm_locked;

  // two-flop synchroniser, asserted asynchronously
  always_ff @(posedge slowest_sync_clk or posedge req_async) begin
    if (req_async) sync_q <= 2'b11;
    else           sync_q <= {sync_q[0], 1'b0};
  end

  always_ff @(posedge slowest_sync_clk) begin
    if (sync_q[1]) begin
      cnt                  <= '0;
      bus_struct_reset     <= 1'b1;
      interconnect_aresetn <= 1'b0;
      peripheral_reset     <= 1'b1;
      peripheral_aresetn   <= 1'b0;
      mb_reset             <= 1'b1;
    end else begin
      if (cnt != CW'(3 * HOLD)) cnt <= cnt + 1'b1;
      if (cnt >= CW'(HOLD)) begin
        bus_struct_reset     <= 1'b0;
        interconnect_aresetn <= 1'b1;
      end
      if (cnt >= CW'(2 * HOLD)) begin
        peripheral_reset   <= 1'b0;
        peripheral_aresetn <= 1'b1;
      end
      if (cnt >= CW'(3 * HOLD)) mb_reset <= 1'b0;
    end
  end

endmodule
