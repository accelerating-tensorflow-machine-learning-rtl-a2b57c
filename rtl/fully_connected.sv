// fully_connected: the FC layer accelerator IP ("fully_connected_0").
//
// A float32 fully connected layer with ReLU for up to 32 inputs and 32
// outputs. Software writes the input, weight and bias vectors into three
// external block RAMs, writes the two sizes into the control registers,
// sets ap_start and polls ap_done; the results then sit in the fourth,
// output, block RAM. The port set (s_axi_control, ap_clk, ap_rst_n, the four
// BRAM ports input_r, weights, bias, output_r, and interrupt) follows the
// IP's block symbol; the IP keeps no data memory of its own, only the
// accumulator and loop registers.
//
// It is the control register file (fc_ctrl_s_axi) joined to the
// sequential engine (fc_core); see those two files for the register map
// and for the per-layer cycle count, out*(3*in+4) cycles from start to done.
// Reset is active low and asynchronous. All BRAM ports use byte addresses
// and expect read data one cycle after the enable.
module fully_connected
  import fcc_pkg::*;
#(
  parameter int unsigned MAX_IN  = FC_MAX_IN,
  parameter int unsigned MAX_OUT = FC_MAX_OUT
) (
  input  logic        ap_clk,
  input  logic        ap_rst_n,
  input  axil_req_t   s_axi_control,
  output axil_resp_t  s_axi_control_rsp,
  output bram_req_t   input_r_PORTA,
  input  logic [31:0] input_r_PORTA_dout,
  output bram_req_t   weights_PORTA,
  input  logic [31:0] weights_PORTA_dout,
  output bram_req_t   bias_PORTA,
  input  logic [31:0] bias_PORTA_dout,
  output bram_req_t   output_r_PORTA,
  output logic        interrupt
);

  logic        ap_start, ap_done, ap_idle, ap_ready;
  logic [31:0] in_size, out_size;

  fc_ctrl_s_axi u_ctrl (
    .clk       (ap_clk),
    .rst_n     (ap_rst_n),
    .s_axi     (s_axi_control),
    .s_axi_rsp (s_axi_control_rsp),
    .ap_start, .ap_done, .ap_idle, .ap_ready,
    .in_size, .out_size,
    .interrupt
  );

  fc_core #(.MAX_IN(MAX_IN), .MAX_OUT(MAX_OUT)) u_core (
    .clk           (ap_clk),
    .rst_n         (ap_rst_n),
    .ap_start, .ap_done, .ap_idle, .ap_ready,
    .in_size, .out_size,
    .input_port    (input_r_PORTA),
    .input_rdata   (input_r_PORTA_dout),
    .weights_port  (weights_PORTA),
    .weights_rdata (weights_PORTA_dout),
    .bias_port     (bias_PORTA),
    .bias_rdata    (bias_PORTA_dout),
    .output_port   (output_r_PORTA)
  );

endmodule
