// bus_arbiter: shares the single 128-bit image bus between its readers.
//
// Readers are the image preload (port 0), the FAST line-buffer loader
// (port 1) and the rapid screening of the binary mask (port 2). Each cycle
// the lowest-numbered requesting port is granted (fixed priority). The memory
// answers reads in request order, one 128-bit word per request, without
// back-pressure on responses; the arbiter records the granted port of every
// outstanding read in an in-order tag queue of OUTST entries and routes each
// response to the port at the head of the queue. When the queue is full no
// request is granted. The bus itself is named in the document; its protocol,
// the priority order and the queue are this design's choices.
module bus_arbiter #(
  parameter int N      = 3,
  parameter int OUTST  = 32,
  parameter int ADDR_W = 32,
  parameter int DATA_W = 128
) (
  input  logic              clk,
  input  logic              rst_n,
  // reader side
  input  logic              m_req_valid [N],
  output logic              m_req_ready [N],
  input  logic [ADDR_W-1:0] m_req_addr  [N],
  output logic              m_rsp_valid [N],
  output logic [DATA_W-1:0] m_rsp_data,
  // memory side
  output logic              s_req_valid,
  input  logic              s_req_ready,
  output logic [ADDR_W-1:0] s_req_addr,
  input  logic              s_rsp_valid,
  input  logic [DATA_W-1:0] s_rsp_data
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;
  localparam int QW = $clog2(OUTST);

  logic [IW-1:0] q_id [OUTST];
  logic [QW-1:0] q_wp, q_rp;
  logic [QW:0]   q_cnt;
  logic          q_full, grant_any, issue;
  logic [IW-1:0] grant;

  assign q_full = (q_cnt == (QW+1)'(OUTST));

  always_comb begin
    grant_any = 1'b0;
    grant     = '0;
    for (int i = N-1; i >= 0; i--)
      if (m_req_valid[i]) begin
        grant_any = 1'b1;
        grant     = IW'(i);
      end
  end

  assign s_req_valid = grant_any && !q_full;
  assign s_req_addr  = m_req_addr[grant];
  assign issue       = s_req_valid && s_req_ready;

  always_comb
    for (int i = 0; i < N; i++) begin
      m_req_ready[i] = issue && (grant == IW'(i));
      m_rsp_valid[i] = s_rsp_valid && (q_id[q_rp] == IW'(i));
    end
  assign m_rsp_data = s_rsp_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_wp <= '0; q_rp <= '0; q_cnt <= '0;
    end else begin
      if (issue)       q_wp <= q_wp + 1'b1;
      if (s_rsp_valid) q_rp <= q_rp + 1'b1;
      q_cnt <= q_cnt + (QW+1)'(issue) - (QW+1)'(s_rsp_valid);
    end
  end
  always_ff @(posedge clk) if (issue) q_id[q_wp] <= grant;

  // a response must belong to an outstanding read
  assert property (@(posedge clk) disable iff (!rst_n) s_rsp_valid |-> q_cnt != '0);
endmodule
