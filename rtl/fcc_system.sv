// fcc_system: programmable-logic side of the fully connected layer
// accelerator system.
//
// The processor (outside this module) reaches everything over one AXI4
// port: it writes a layer's inputs, weights and biases into three block
// RAMs, writes the two layer sizes and the start bit into the
// accelerator's control registers, polls for done and reads the results
// from a fourth block RAM. The accelerator reads and writes the RAMs
// through their second ports. This arrangement, with one RAM per data set,
// an AXI interconnect, four AXI BRAM controllers, the accelerator IP and a
// reset block, follows the system's block diagram; the address map,
// memory depths and port widths are this design's choices:
//
//   0x80_0000_0000 + 0x0_0000   control registers (see fc_ctrl_s_axi)
//   0x80_0000_0000 + 0x1_0000   input BRAM    32 words
//   0x80_0000_0000 + 0x2_0000   weights BRAM  1024 words, row o at o*in_size
//   0x80_0000_0000 + 0x3_0000   bias BRAM     32 words
//   0x80_0000_0000 + 0x4_0000   output BRAM   32 words
//   (i.e. 0x8000_0000, 0x8001_0000, ... in the 40-bit address space)
//
// The control window is reached through an AXI4 to AXI-Lite conversion
// that assumes single-beat accesses (an assertion checks this); the BRAM
// windows take bursts. Everything runs on one clock, pl_clk0 (100 MHz in
// the reference system); pl_resetn0 is the processor's active-low reset,
// sequenced by proc_sys_reset. The accelerator's interrupt is brought out.
//
// Ports: pl_clk0, pl_resetn0, s_axi / s_axi_rsp (AXI4 from the processor's
// master port), interrupt.
module fcc_system
  import fcc_pkg::*;
(
  input  logic      pl_clk0,
  input  logic      pl_resetn0,
  input  axi_req_t  s_axi,
  output axi_resp_t s_axi_rsp,
  output logic      interrupt
);

  // interconnect ports: control, then input, weights, bias, output
  localparam int unsigned P_CTRL = 0, P_IN = 1;

  logic interconnect_aresetn, peripheral_aresetn;

  proc_sys_reset u_rst (
    .slowest_sync_clk     (pl_clk0),
    .ext_reset_in         (pl_resetn0),
    .aux_reset_in         (1'b1),
    .mb_debug_sys_rst     (1'b0),
    .dcm_locked           (1'b1),
    .mb_reset             (),
    .bus_struct_reset     (),
    .peripheral_reset     (),
    .interconnect_aresetn,
    .peripheral_aresetn
  );

  axi_req_t  [N_SLOTS-1:0] m_req;
  axi_resp_t [N_SLOTS-1:0] m_rsp;

  axi_smartconnect u_smartconnect (
    .clk       (pl_clk0),
    .rst_n     (interconnect_aresetn),
    .s_axi     (s_axi),
    .s_axi_rsp (s_axi_rsp),
    .m_axi     (m_req),
    .m_axi_rsp (m_rsp)
  );

  // ---- AXI4 to AXI-Lite for the control window (single beats)
  axil_req_t  ctrl_req;
  axil_resp_t ctrl_rsp;
  id_t        ctrl_bid, ctrl_rid;

  always_comb begin
    ctrl_req.aw_addr  = m_req[P_CTRL].aw.addr[AXIL_ADDR_W-1:0];
    ctrl_req.aw_valid = m_req[P_CTRL].aw_valid;
    ctrl_req.w_data   = m_req[P_CTRL].w.data;
    ctrl_req.w_strb   = m_req[P_CTRL].w.strb;
    ctrl_req.w_valid  = m_req[P_CTRL].w_valid;
    ctrl_req.b_ready  = m_req[P_CTRL].b_ready;
    ctrl_req.ar_addr  = m_req[P_CTRL].ar.addr[AXIL_ADDR_W-1:0];
    ctrl_req.ar_valid = m_req[P_CTRL].ar_valid;
    ctrl_req.r_ready  = m_req[P_CTRL].r_ready;

    m_rsp[P_CTRL]          = '0;
    m_rsp[P_CTRL].aw_ready = ctrl_rsp.aw_ready;
    m_rsp[P_CTRL].w_ready  = ctrl_rsp.w_ready;
    m_rsp[P_CTRL].b_valid  = ctrl_rsp.b_valid;
    m_rsp[P_CTRL].b.resp   = ctrl_rsp.b_resp;
    m_rsp[P_CTRL].b.id     = ctrl_bid;
    m_rsp[P_CTRL].ar_ready = ctrl_rsp.ar_ready;
    m_rsp[P_CTRL].r_valid  = ctrl_rsp.r_valid;
    m_rsp[P_CTRL].r.data   = ctrl_rsp.r_data;
    m_rsp[P_CTRL].r.resp   = ctrl_rsp.r_resp;
    m_rsp[P_CTRL].r.id     = ctrl_rid;
    m_rsp[P_CTRL].r.last   = 1'b1;
  end

  // the register file answers one transaction at a time, so the ID of the
  // address phase is returned with the response
  always_ff @(posedge pl_clk0 or negedge peripheral_aresetn) begin
    if (!peripheral_aresetn) begin
      ctrl_bid <= '0;
      ctrl_rid <= '0;
    end else begin
      if (m_req[P_CTRL].aw_valid && ctrl_rsp.aw_ready) ctrl_bid <= m_req[P_CTRL].aw.id;
      if (m_req[P_CTRL].ar_valid && ctrl_rsp.ar_ready) ctrl_rid <= m_req[P_CTRL].ar.id;
    end
  end

  // ---- accelerator
  bram_req_t   fc_in_port, fc_w_port, fc_b_port, fc_out_port;
  logic [31:0] fc_in_rdata, fc_w_rdata, fc_b_rdata;
  logic [31:0] fc_out_rdata_unused;   // the accelerator only writes the output RAM

  fully_connected u_fc (
    .ap_clk             (pl_clk0),
    .ap_rst_n           (peripheral_aresetn),
    .s_axi_control      (ctrl_req),
    .s_axi_control_rsp  (ctrl_rsp),
    .input_r_PORTA      (fc_in_port),
    .input_r_PORTA_dout (fc_in_rdata),
    .weights_PORTA      (fc_w_port),
    .weights_PORTA_dout (fc_w_rdata),
    .bias_PORTA         (fc_b_port),
    .bias_PORTA_dout    (fc_b_rdata),
    .output_r_PORTA     (fc_out_port),
    .interrupt          (interrupt)
  );

  // ---- BRAM controllers and memories
  bram_req_t   ctl_port  [4];
  logic [31:0] ctl_rdata [4];
  bram_req_t   fc_port   [4];
  logic [31:0] fc_rdata  [4];

  assign fc_port[0] = fc_in_port;
  assign fc_port[1] = fc_w_port;
  assign fc_port[2] = fc_b_port;
  assign fc_port[3] = fc_out_port;
  assign fc_in_rdata         = fc_rdata[0];
  assign fc_w_rdata          = fc_rdata[1];
  assign fc_b_rdata          = fc_rdata[2];
  assign fc_out_rdata_unused = fc_rdata[3];

  localparam int unsigned DEPTHS [4] = '{DEPTH_INPUT, DEPTH_WEIGHTS, DEPTH_BIAS, DEPTH_OUTPUT};

  for (genvar g = 0; g < 4; g++) begin : g_mem
    axi_bram_ctrl u_axi_bram_ctrl (
      .clk        (pl_clk0),
      .rst_n      (peripheral_aresetn),
      .s_axi      (m_req[P_IN + g]),
      .s_axi_rsp  (m_rsp[P_IN + g]),
      .bram       (ctl_port[g]),
      .bram_rdata (ctl_rdata[g])
    );
    bram_tdp #(.DEPTH(DEPTHS[g])) u_blk_mem_gen (
      .clk    (pl_clk0),
      .port_a (ctl_port[g]),
      .dout_a (ctl_rdata[g]),
      .port_b (fc_port[g]),
      .dout_b (fc_rdata[g])
    );
  end

  a_ctrl_single_beat_w: assert property (@(posedge pl_clk0) disable iff (!interconnect_aresetn)
    m_req[P_CTRL].aw_valid |-> m_req[P_CTRL].aw.len == 8'd0);
  a_ctrl_single_beat_r: assert property (@(posedge pl_clk0) disable iff (!interconnect_aresetn)
    m_req[P_CTRL].ar_valid |-> m_req[P_CTRL].ar.len == 8'd0);

endmodule
