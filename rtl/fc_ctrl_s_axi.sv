// fc_ctrl_s_axi: AXI-Lite control and status registers of the FC layer IP.
//
// Software configures the accelerator, starts it and polls it through this
// register file (the accelerator description uses polling; the interrupt
// output exists on the IP and is provided here too). The register layout
// follows the usual block-level start/done convention of HLS-generated
// cores; the offsets and bit positions are this design's choice:
//
//   0x00 AP_CTRL  bit0 ap_start  (write 1 to start; clears when the core
//                                  takes it, unless auto_restart is set)
//                 bit1 ap_done   (set at the end of a run, cleared by a read)
//                 bit2 ap_idle   (read only)
//                 bit3 ap_ready  (set at the end of a run, cleared by a read)
//                 bit7 auto_restart
//   0x04 GIE      bit0 global interrupt enable
//   0x08 IER      bit0 done interrupt enable, bit1 ready interrupt enable
//   0x0C ISR      bit0 done, bit1 ready; set by the event when enabled in
//                 IER, a written 1 toggles the bit
//   0x10 IN_SIZE  number of inputs  (32 bits, clamped to 32 by the core)
//   0x18 OUT_SIZE number of outputs (32 bits, clamped to 32 by the core)
//   interrupt = GIE & (ISR[0] | ISR[1])
//
// AXI-Lite handling: the write address and the write data are each taken
// as they arrive, independently (a manager or interconnect may send either
// first); once both are held the register is written and OKAY is returned
// the next cycle, held until b_ready. A read is taken when no read response is pending;
// data is registered and held until r_ready. Unmapped offsets read as 0
// and ignore writes. Byte strobes apply to the size registers.
module fc_ctrl_s_axi
  import fcc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  axil_req_t   s_axi,
  output axil_resp_t  s_axi_rsp,
  // to and from the core
  output logic        ap_start,
  input  logic        ap_done,
  input  logic        ap_idle,
  input  logic        ap_ready,
  output logic [31:0] in_size,
  output logic [31:0] out_size,
  output logic        interrupt
);

  logic       start_q, done_q, ready_q, auto_restart_q, gie_q;
  logic [1:0] ier_q, isr_q;
  logic       bvalid_q, rvalid_q;
  data_t      rdata_q;
  logic       wr_fire, rd_fire, aw_take, w_take;
  logic       aw_have, w_have;
  logic [AXIL_ADDR_W-1:0] aw_q, waddr, raddr;
  data_t      wdata_q;
  strb_t      wstrb_q;

  assign aw_take = s_axi.aw_valid && !aw_have && !bvalid_q;
  assign w_take  = s_axi.w_valid  && !w_have  && !bvalid_q;
  assign wr_fire = aw_have && w_have;
  assign rd_fire = s_axi.ar_valid && !rvalid_q;
  assign waddr   = {aw_q[AXIL_ADDR_W-1:2], 2'b00};
  assign raddr   = {s_axi.ar_addr[AXIL_ADDR_W-1:2], 2'b00};

  always_comb begin
    s_axi_rsp          = '0;
    s_axi_rsp.aw_ready = aw_take;
    s_axi_rsp.w_ready  = w_take;
    s_axi_rsp.b_valid  = bvalid_q;
    s_axi_rsp.b_resp   = RESP_OKAY;
    s_axi_rsp.ar_ready = rd_fire;
    s_axi_rsp.r_valid  = rvalid_q;
    s_axi_rsp.r_data   = rdata_q;
    s_axi_rsp.r_resp   = RESP_OKAY;
  end

  function automatic logic [31:0] apply_strb(input logic [31:0] old, input logic [31:0] d,
                                             input logic [3:0] strb);
    logic [31:0] r;
    for (int k = 0; k < 4; k++) r[8*k +: 8] = strb[k] ? d[8*k +: 8] : old[8*k +: 8];
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_q        <= 1'b0;
      done_q         <= 1'b0;
      ready_q        <= 1'b0;
      auto_restart_q <= 1'b0;
      gie_q          <= 1'b0;
      ier_q          <= '0;
      isr_q          <= '0;
      in_size        <= '0;
      out_size       <= '0;
      bvalid_q       <= 1'b0;
      rvalid_q       <= 1'b0;
      aw_have        <= 1'b0;
      w_have         <= 1'b0;
      aw_q           <= '0;
      wdata_q        <= '0;
      wstrb_q        <= '0;
      rdata_q        <= '0;
    end else begin
      // ---- core events
      if (ap_ready && !auto_restart_q) start_q <= 1'b0;
      if (ap_done) done_q <= 1'b1;
      if (ap_ready) ready_q <= 1'b1;
      if (ap_done && ier_q[0]) isr_q[0] <= 1'b1;
      if (ap_ready && ier_q[1]) isr_q[1] <= 1'b1;

      // ---- read channel
      if (rd_fire) begin
        rvalid_q <= 1'b1;
        unique case (raddr)
          REG_AP_CTRL: begin
            rdata_q <= {24'd0, auto_restart_q, 3'd0, ready_q, ap_idle, done_q, start_q};
            done_q  <= ap_done;        // clear on read, unless set again now
            ready_q <= ap_ready;
          end
          REG_GIE:      rdata_q <= {31'd0, gie_q};
          REG_IER:      rdata_q <= {30'd0, ier_q};
          REG_ISR:      rdata_q <= {30'd0, isr_q};
          REG_IN_SIZE:  rdata_q <= in_size;
          REG_OUT_SIZE: rdata_q <= out_size;
          default:      rdata_q <= '0;
        endcase
      end else if (s_axi.r_ready) begin
        rvalid_q <= 1'b0;
      end

      // ---- write channel
      if (aw_take) begin
        aw_have <= 1'b1;
        aw_q    <= s_axi.aw_addr;
      end
      if (w_take) begin
        w_have  <= 1'b1;
        wdata_q <= s_axi.w_data;
        wstrb_q <= s_axi.w_strb;
      end
      if (wr_fire) begin
        aw_have  <= 1'b0;
        w_have   <= 1'b0;
        bvalid_q <= 1'b1;
        unique case (waddr)
          REG_AP_CTRL: if (wstrb_q[0]) begin
            if (wdata_q[0]) start_q <= 1'b1;
            auto_restart_q <= wdata_q[7];
          end
          REG_GIE: if (wstrb_q[0]) gie_q <= wdata_q[0];
          REG_IER: if (wstrb_q[0]) ier_q <= wdata_q[1:0];
          REG_ISR: if (wstrb_q[0]) isr_q <= isr_q ^ wdata_q[1:0];
          REG_IN_SIZE:  in_size  <= apply_strb(in_size,  wdata_q, wstrb_q);
          REG_OUT_SIZE: out_size <= apply_strb(out_size, wdata_q, wstrb_q);
          default: ;
        endcase
      end else if (s_axi.b_ready) begin
        bvalid_q <= 1'b0;
      end
    end
  end

  assign ap_start  = start_q;
  assign interrupt = gie_q && (|isr_q);

  // AXI-Lite: a response, once valid, is held until accepted
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_rsp.b_valid && !s_axi.b_ready |=> s_axi_rsp.b_valid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_rsp.r_valid && !s_axi.r_ready |=> s_axi_rsp.r_valid && $stable(s_axi_rsp.r_data));

endmodule
