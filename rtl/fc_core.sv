// fc_core: sequential float32 fully connected layer with ReLU.
//
// Computes, for o = 0 .. out_size-1,
//     output[o] = ReLU( (sum over i = 0 .. in_size-1 of input[i] * weight[o*in_size + i]) + bias[o] )
// reading the input, weight and bias vectors from three block RAM ports
// and writing each result to a fourth. That function, the float32 number
// format, the ReLU, the 32-input/32-output limits and the absence of any
// pipelining or parallelism follow the accelerator description; the state
// machine below is this design's own simplest way of doing it.
//
// Weights are stored row by row, one row of in_size words per output,
// packed back to back (the row-major layout of a dense layer's kernel).
// The sum starts from +0 and adds the products in input order; the bias is
// added last, then a negative result (including -0) becomes +0.
//
// One multiplier and one adder are shared by all steps:
//   OUT_START  clear the accumulator
//   IN_RD      read input[i] and weight[base+i]         } once per input
//   IN_MUL     product <= input * weight                }   (3 cycles)
//   IN_ACC     acc <= acc + product                     }
//   BIAS_RD    read bias[o]
//   BIAS_ACC   acc <= acc + bias
//   OUT_WR     write ReLU(acc) to output[o]
//   DONE       one-cycle ap_done / ap_ready
// If the start is taken at clock edge k, ap_done is high for the one cycle
// after edge k + LATENCY, with
//     LATENCY = out_size * (3 * in_size + 4)
// (3200 cycles, 32 us at 100 MHz, for 32 x 32), and the core is idle again
// one edge later. Sizes above the limits are clamped to the limits; a size
// of 0 gives an empty loop.
//
// Handshake (block-level start/done): ap_start is sampled in IDLE; ap_idle
// is high in IDLE; ap_done and ap_ready pulse together for one cycle at the
// end. in_size and out_size are read when the start is taken.
// BRAM ports carry byte addresses (word index * 4) and read data returns
// one cycle after the enable.
// The input, weight and bias ports only read, so their write enables and
// write data are constant zero; byte-address bits above bit 11 (weights)
// or bit 6 (the others) are always zero; only the output port writes, and
// it never reads.
module fc_core
  import fcc_pkg::*;
#(
  parameter int unsigned MAX_IN  = FC_MAX_IN,
  parameter int unsigned MAX_OUT = FC_MAX_OUT
) (
  input  logic        clk,
  input  logic        rst_n,
  // block-level control
  input  logic        ap_start,
  output logic        ap_done,
  output logic        ap_idle,
  output logic        ap_ready,
  input  logic [31:0] in_size,
  input  logic [31:0] out_size,
  // memories
  output bram_req_t   input_port,
  input  logic [31:0] input_rdata,
  output bram_req_t   weights_port,
  input  logic [31:0] weights_rdata,
  output bram_req_t   bias_port,
  input  logic [31:0] bias_rdata,
  output bram_req_t   output_port
);

  localparam int unsigned IW = $clog2(MAX_IN + 1);
  localparam int unsigned OW = $clog2(MAX_OUT + 1);
  localparam int unsigned WW = $clog2(MAX_IN * MAX_OUT + 1);

  typedef enum logic [3:0] {
    S_IDLE, S_OUT_START, S_IN_RD, S_IN_MUL, S_IN_ACC,
    S_BIAS_RD, S_BIAS_ACC, S_OUT_WR, S_DONE
  } state_e;

  state_e      state;
  logic [IW-1:0] n_in, i;
  logic [OW-1:0] n_out, o;
  logic [WW-1:0] wbase;
  logic [31:0] acc, prod;
  logic [31:0] mul_y, add_y, add_b;

  fp32_mul u_mul (.a(input_rdata), .b(weights_rdata), .y(mul_y));
  fp32_add u_add (.a(acc), .b(add_b), .y(add_y));

  assign add_b = (state == S_BIAS_ACC) ? bias_rdata : prod;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      n_in  <= '0;
      n_out <= '0;
      i     <= '0;
      o     <= '0;
      wbase <= '0;
      acc   <= '0;
      prod  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (ap_start) begin
          n_in  <= (in_size  > MAX_IN)  ? IW'(MAX_IN)  : IW'(in_size);
          n_out <= (out_size > MAX_OUT) ? OW'(MAX_OUT) : OW'(out_size);
          o     <= '0;
          wbase <= '0;
          state <= (out_size == 0) ? S_DONE : S_OUT_START;
        end
        S_OUT_START: begin
          acc   <= '0;
          i     <= '0;
          state <= (n_in == 0) ? S_BIAS_RD : S_IN_RD;
        end
        S_IN_RD:  state <= S_IN_MUL;
        S_IN_MUL: begin
          prod  <= mul_y;
          state <= S_IN_ACC;
        end
        S_IN_ACC: begin
          acc <= add_y;
          i   <= i + 1'b1;
          state <= (i == n_in - 1'b1) ? S_BIAS_RD : S_IN_RD;
        end
        S_BIAS_RD:  state <= S_BIAS_ACC;
        S_BIAS_ACC: begin
          acc   <= add_y;
          state <= S_OUT_WR;
        end
        S_OUT_WR: begin
          o     <= o + 1'b1;
          wbase <= wbase + WW'(n_in);
          state <= (o == n_out - 1'b1) ? S_DONE : S_OUT_START;
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ap_idle  = (state == S_IDLE);
  assign ap_done  = (state == S_DONE);
  assign ap_ready = (state == S_DONE);

  always_comb begin
    input_port   = '0;
    weights_port = '0;
    bias_port    = '0;
    output_port  = '0;
    if (state == S_IN_RD) begin
      input_port.en     = 1'b1;
      input_port.addr   = 32'(i) << 2;
      weights_port.en   = 1'b1;
      weights_port.addr = 32'(wbase + WW'(i)) << 2;
    end
    if (state == S_BIAS_RD) begin
      bias_port.en   = 1'b1;
      bias_port.addr = 32'(o) << 2;
    end
    if (state == S_OUT_WR) begin
      output_port.en    = 1'b1;
      output_port.we    = 4'hF;
      output_port.addr  = 32'(o) << 2;
      output_port.wdata = acc[31] ? 32'd0 : acc;   // ReLU
    end
  end

endmodule
