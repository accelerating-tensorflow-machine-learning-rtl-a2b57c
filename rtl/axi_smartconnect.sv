// axi_smartconnect: AXI4 interconnect, one manager to N_M subordinates.
//
// Joins the processor's single AXI master port to the accelerator's
// control registers and to the four BRAM controllers. The system
// description names this interconnect and its five manager-side ports
// (M00..M04) but not its workings; this is the simplest decoder that does
// the job, with one transaction in flight per direction.
//
// Each subordinate owns the window BASE[i] .. BASE[i] | MASK. A write
// address is decoded and passed to its subordinate; the write path is then
// locked to that port until its response has been accepted, and W beats
// and the B response are routed through it. Reads work the same way, the
// read path being locked until the beat marked last has been accepted.
// Writes and reads are independent and may go to different ports at once.
// An address that hits no window is answered by the interconnect itself:
// write beats are swallowed and DECERR returned; a read returns len+1
// beats of zero with DECERR.
//
// All paths are combinational (zero added latency); valids are never made
// to depend on readies from the same side. Reset is active low,
// asynchronous.
module axi_smartconnect
  import fcc_pkg::*;
#(
  parameter int unsigned N_M = N_SLOTS,
  parameter addr_t [N_M-1:0] BASE = {MAP_OUT, MAP_B, MAP_W, MAP_IN, MAP_CTRL},
  parameter addr_t MASK = MAP_MASK
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axi_req_t  s_axi,
  output axi_resp_t s_axi_rsp,
  output axi_req_t  [N_M-1:0] m_axi,
  input  axi_resp_t [N_M-1:0] m_axi_rsp
);

  localparam int unsigned SW = (N_M > 1) ? $clog2(N_M) : 1;

  typedef enum logic [1:0] {P_IDLE, P_BUSY, P_ERR_DATA, P_ERR_RESP} path_e;

  path_e       wstate, rstate;
  logic [SW-1:0] wsel, rsel, aw_dec, ar_dec;
  logic        aw_hit, ar_hit;
  id_t         werr_id, rerr_id;
  logic [7:0]  rerr_len, rerr_beat;

  // address decode
  always_comb begin
    aw_hit = 1'b0;  aw_dec = '0;
    ar_hit = 1'b0;  ar_dec = '0;
    for (int k = 0; k < N_M; k++) begin
      if (!aw_hit && ((s_axi.aw.addr & ~MASK) == BASE[k])) begin
        aw_hit = 1'b1;  aw_dec = SW'(k);
      end
      if (!ar_hit && ((s_axi.ar.addr & ~MASK) == BASE[k])) begin
        ar_hit = 1'b1;  ar_dec = SW'(k);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wstate    <= P_IDLE;
      rstate    <= P_IDLE;
      wsel      <= '0;
      rsel      <= '0;
      werr_id   <= '0;
      rerr_id   <= '0;
      rerr_len  <= '0;
      rerr_beat <= '0;
    end else begin
      // write path
      unique case (wstate)
        P_IDLE: if (s_axi.aw_valid) begin
          if (aw_hit) begin
            if (m_axi_rsp[aw_dec].aw_ready) begin
              wsel   <= aw_dec;
              wstate <= P_BUSY;
            end
          end else begin
            werr_id <= s_axi.aw.id;
            wstate  <= P_ERR_DATA;
          end
        end
        P_BUSY: if (s_axi.b_ready && m_axi_rsp[wsel].b_valid) wstate <= P_IDLE;
        P_ERR_DATA: if (s_axi.w_valid && s_axi.w.last) wstate <= P_ERR_RESP;
        P_ERR_RESP: if (s_axi.b_ready) wstate <= P_IDLE;
        default: wstate <= P_IDLE;
      endcase
      // read path
      unique case (rstate)
        P_IDLE: if (s_axi.ar_valid) begin
          if (ar_hit) begin
            if (m_axi_rsp[ar_dec].ar_ready) begin
              rsel   <= ar_dec;
              rstate <= P_BUSY;
            end
          end else begin
            rerr_id   <= s_axi.ar.id;
            rerr_len  <= s_axi.ar.len;
            rerr_beat <= '0;
            rstate    <= P_ERR_RESP;
          end
        end
        P_BUSY: if (s_axi.r_ready && m_axi_rsp[rsel].r_valid && m_axi_rsp[rsel].r.last)
          rstate <= P_IDLE;
        P_ERR_RESP: if (s_axi.r_ready) begin
          rerr_beat <= rerr_beat + 1'b1;
          if (rerr_beat == rerr_len) rstate <= P_IDLE;
        end
        default: rstate <= P_IDLE;
      endcase
    end
  end

  always_comb begin
    s_axi_rsp = '0;
    for (int k = 0; k < N_M; k++) begin
      m_axi[k]    = '0;
      m_axi[k].aw = s_axi.aw;
      m_axi[k].w  = s_axi.w;
      m_axi[k].ar = s_axi.ar;
    end

    // ---- write path
    unique case (wstate)
      P_IDLE: begin
        if (s_axi.aw_valid && aw_hit) begin
          m_axi[aw_dec].aw_valid = 1'b1;
          s_axi_rsp.aw_ready     = m_axi_rsp[aw_dec].aw_ready;
        end else if (s_axi.aw_valid) begin
          s_axi_rsp.aw_ready = 1'b1;        // taken by the error responder
        end
      end
      P_BUSY: begin
        m_axi[wsel].w_valid = s_axi.w_valid;
        s_axi_rsp.w_ready   = m_axi_rsp[wsel].w_ready;
        m_axi[wsel].b_ready = s_axi.b_ready;
        s_axi_rsp.b_valid   = m_axi_rsp[wsel].b_valid;
        s_axi_rsp.b         = m_axi_rsp[wsel].b;
      end
      P_ERR_DATA: s_axi_rsp.w_ready = 1'b1;
      P_ERR_RESP: begin
        s_axi_rsp.b_valid = 1'b1;
        s_axi_rsp.b.id    = werr_id;
        s_axi_rsp.b.resp  = RESP_DECERR;
      end
      default: ;
    endcase

    // ---- read path
    unique case (rstate)
      P_IDLE: begin
        if (s_axi.ar_valid && ar_hit) begin
          m_axi[ar_dec].ar_valid = 1'b1;
          s_axi_rsp.ar_ready     = m_axi_rsp[ar_dec].ar_ready;
        end else if (s_axi.ar_valid) begin
          s_axi_rsp.ar_ready = 1'b1;
        end
      end
      P_BUSY: begin
        m_axi[rsel].r_ready = s_axi.r_ready;
        s_axi_rsp.r_valid   = m_axi_rsp[rsel].r_valid;
        s_axi_rsp.r         = m_axi_rsp[rsel].r;
      end
      P_ERR_RESP: begin
        s_axi_rsp.r_valid = 1'b1;
        s_axi_rsp.r.id    = rerr_id;
        s_axi_rsp.r.data  = '0;
        s_axi_rsp.r.resp  = RESP_DECERR;
        s_axi_rsp.r.last  = (rerr_beat == rerr_len);
      end
      default: ;
    endcase
  end

  // manager-side handshake rules: a valid address is held until accepted
  a_awvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi.aw_valid && !s_axi_rsp.aw_ready |=> s_axi.aw_valid && $stable(s_axi.aw));
  a_arvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi.ar_valid && !s_axi_rsp.ar_ready |=> s_axi.ar_valid && $stable(s_axi.ar));
  a_wvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi.w_valid && !s_axi_rsp.w_ready |=> s_axi.w_valid && $stable(s_axi.w));

endmodule
