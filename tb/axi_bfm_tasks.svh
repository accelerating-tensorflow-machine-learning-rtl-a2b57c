// AXI4 manager tasks shared by the testbenches. The including module must
// declare: clk, an fcc_pkg::axi_req_t "m_req", an fcc_pkg::axi_resp_t
// "m_rsp", and the counters "checks" and "failures". Each task runs one
// transaction to completion; r_ready and b_ready are dropped at random to
// exercise back-pressure.

task automatic axi_write(input fcc_pkg::addr_t addr, input logic [31:0] data[$],
                         input fcc_pkg::burst_e burst = fcc_pkg::BURST_INCR,
                         input logic [3:0] strb = 4'hF,
                         input fcc_pkg::resp_e exp_resp = fcc_pkg::RESP_OKAY);
  @(negedge clk);
  m_req.aw.id    = fcc_pkg::id_t'($urandom);
  m_req.aw.addr  = addr;
  m_req.aw.len   = 8'(data.size() - 1);
  m_req.aw.size  = 3'd2;
  m_req.aw.burst = burst;
  m_req.aw_valid = 1'b1;
  do @(posedge clk); while (!m_rsp.aw_ready);
  @(negedge clk);
  m_req.aw_valid = 1'b0;
  for (int k = 0; k < data.size(); k++) begin
    m_req.w.data  = data[k];
    m_req.w.strb  = strb;
    m_req.w.last  = (k == data.size() - 1);
    m_req.w_valid = 1'b1;
    do @(posedge clk); while (!m_rsp.w_ready);
    @(negedge clk);
    m_req.w_valid = 1'b0;
  end
  m_req.b_ready = 1'b0;
  while (1) begin
    m_req.b_ready = ($urandom % 2) == 0;
    @(posedge clk);
    if (m_rsp.b_valid && m_req.b_ready) break;
    @(negedge clk);
  end
  checks++;
  if (m_rsp.b.resp !== exp_resp || m_rsp.b.id !== m_req.aw.id) begin
    failures++;
    $display("FAIL write response %0d id %h at %h", m_rsp.b.resp, m_rsp.b.id, addr);
  end
  @(negedge clk);
  m_req.b_ready = 1'b0;
endtask

task automatic axi_read(input fcc_pkg::addr_t addr, input int beats, output logic [31:0] data[$],
                        input fcc_pkg::burst_e burst = fcc_pkg::BURST_INCR,
                        input fcc_pkg::resp_e exp_resp = fcc_pkg::RESP_OKAY);
  int k;
  data = {};
  @(negedge clk);
  m_req.ar.id    = fcc_pkg::id_t'($urandom);
  m_req.ar.addr  = addr;
  m_req.ar.len   = 8'(beats - 1);
  m_req.ar.size  = 3'd2;
  m_req.ar.burst = burst;
  m_req.ar_valid = 1'b1;
  do @(posedge clk); while (!m_rsp.ar_ready);
  @(negedge clk);
  m_req.ar_valid = 1'b0;
  k = 0;
  while (k < beats) begin
    m_req.r_ready = ($urandom % 3) != 0;
    @(posedge clk);
    if (m_rsp.r_valid && m_req.r_ready) begin
      data.push_back(m_rsp.r.data);
      checks++;
      if (m_rsp.r.last !== (k == beats - 1) || m_rsp.r.resp !== exp_resp || m_rsp.r.id !== m_req.ar.id) begin
        failures++;
        $display("FAIL read beat %0d: last %0d resp %0d id %h", k, m_rsp.r.last, m_rsp.r.resp, m_rsp.r.id);
      end
      k++;
    end
    @(negedge clk);
  end
  m_req.r_ready = 1'b0;
endtask
