// axi_bram_ctrl: AXI4 subordinate that maps its address window onto one
// block RAM port.
//
// The processor reaches each of the accelerator's four data memories
// through one of these; the system description names the controller and
// says transfers use AXI4 without DMA, but gives none of its insides, so
// this is the simplest controller that does the job.
//
// One transaction at a time. When idle it takes a write address if one is
// waiting and the last transaction was not a write, otherwise a read
// address, so neither direction can starve the other. A write then
// accepts one data beat per cycle and writes it straight into the RAM with
// the beat's strobes; after the last beat it returns one OKAY response.
// A read spends two cycles per beat: one to enable the RAM, one to present
// the word (held until r_ready). Burst types FIXED, INCR and WRAP are
// followed; beats narrower than 32 bits are handled by the strobes on
// writes and return the whole word on reads. The word index is the
// address modulo the RAM size (addr[AW+1:2]); higher bits are ignored, the
// interconnect having decoded them already.
//
// Ports: AXI4 request/response structs, one bram_req_t port and the RAM's
// read data. Reset is active low and asynchronous.
module axi_bram_ctrl
  import fcc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  axi_req_t    s_axi,
  output axi_resp_t   s_axi_rsp,
  output bram_req_t   bram,
  input  logic [31:0] bram_rdata
);

  typedef enum logic [2:0] {S_IDLE, S_WDATA, S_WRESP, S_RADDR, S_RDATA} state_e;

  state_e     state;
  logic       last_was_write;
  id_t        id_q;
  addr_t      addr_q;
  logic [7:0] len_q, beat_q;
  logic [2:0] size_q;
  burst_e     burst_q;
  addr_t      next_addr;

  // address of the following beat
  always_comb begin
    addr_t step, wrap_bytes;
    step       = addr_t'(1) << size_q;
    wrap_bytes = (addr_t'(len_q) + 1'b1) << size_q;
    unique case (burst_q)
      BURST_FIXED: next_addr = addr_q;
      BURST_WRAP:  next_addr = (addr_q & ~(wrap_bytes - 1'b1)) |
                               ((addr_q + step) & (wrap_bytes - 1'b1));
      default:     next_addr = addr_q + step;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      last_was_write <= 1'b0;
      id_q           <= '0;
      addr_q         <= '0;
      len_q          <= '0;
      beat_q         <= '0;
      size_q         <= '0;
      burst_q        <= BURST_INCR;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (s_axi.aw_valid && (!last_was_write || !s_axi.ar_valid)) begin
            id_q    <= s_axi.aw.id;
            addr_q  <= s_axi.aw.addr;
            len_q   <= s_axi.aw.len;
            size_q  <= s_axi.aw.size;
            burst_q <= s_axi.aw.burst;
            beat_q  <= '0;
            last_was_write <= 1'b1;
            state   <= S_WDATA;
          end else if (s_axi.ar_valid) begin
            id_q    <= s_axi.ar.id;
            addr_q  <= s_axi.ar.addr;
            len_q   <= s_axi.ar.len;
            size_q  <= s_axi.ar.size;
            burst_q <= s_axi.ar.burst;
            beat_q  <= '0;
            last_was_write <= 1'b0;
            state   <= S_RADDR;
          end
        end
        S_WDATA: if (s_axi.w_valid) begin
          addr_q <= next_addr;
          beat_q <= beat_q + 1'b1;
          if (beat_q == len_q) state <= S_WRESP;
        end
        S_WRESP: if (s_axi.b_ready) state <= S_IDLE;
        S_RADDR: state <= S_RDATA;
        S_RDATA: if (s_axi.r_ready) begin
          addr_q <= next_addr;
          beat_q <= beat_q + 1'b1;
          state  <= (beat_q == len_q) ? S_IDLE : S_RADDR;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    s_axi_rsp = '0;
    bram      = '0;
    unique case (state)
      S_IDLE: begin
        s_axi_rsp.aw_ready = s_axi.aw_valid && (!last_was_write || !s_axi.ar_valid);
        s_axi_rsp.ar_ready = s_axi.ar_valid && !s_axi_rsp.aw_ready;
      end
      S_WDATA: begin
        s_axi_rsp.w_ready = 1'b1;
        bram.en    = s_axi.w_valid;
        bram.we    = s_axi.w_valid ? s_axi.w.strb : 4'h0;
        bram.addr  = 32'(addr_q);
        bram.wdata = s_axi.w.data;
      end
      S_WRESP: begin
        s_axi_rsp.b_valid = 1'b1;
        s_axi_rsp.b.id    = id_q;
        s_axi_rsp.b.resp  = RESP_OKAY;
      end
      S_RADDR: begin
        bram.en   = 1'b1;
        bram.addr = 32'(addr_q);
      end
      S_RDATA: begin
        s_axi_rsp.r_valid = 1'b1;
        s_axi_rsp.r.id    = id_q;
        s_axi_rsp.r.data  = bram_rdata;
        s_axi_rsp.r.resp  = RESP_OKAY;
        s_axi_rsp.r.last  = (beat_q == len_q);
      end
      default: ;
    endcase
  end

  // the manager must mark the final write beat, and only that one
  a_wlast: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_WDATA) && s_axi.w_valid |-> (s_axi.w.last == (beat_q == len_q)));
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_rsp.r_valid && !s_axi.r_ready |=> s_axi_rsp.r_valid && $stable(s_axi_rsp.r.data));

endmodule
