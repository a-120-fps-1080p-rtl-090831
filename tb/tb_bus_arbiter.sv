// tb_bus_arbiter: three readers issue random reads through the arbiter to
// a stalling memory model; every response must reach the reader that asked,
// in order, with the right data, and a grant must always go to the
// lowest-numbered requesting reader.
module tb_bus_arbiter;
  import feat_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 640, HH = 80;
  logic clk = 0, rst_n = 0;
  logic              m_req_valid [3];
  logic              m_req_ready [3];
  logic [ADDR_W-1:0] m_req_addr  [3];
  logic              m_rsp_valid [3];
  logic [BUS_W-1:0]  m_rsp_data;
  logic s_req_valid, s_req_ready, s_rsp_valid;
  logic [ADDR_W-1:0] s_req_addr;
  logic [BUS_W-1:0]  s_rsp_data;
  logic [ADDR_W-1:0] pend [3][$];
  int checks = 0, failures = 0, n_rsp [3], n_issued = 0;
  always #5 clk = ~clk;

  bus_arbiter #(.N(3), .OUTST(32)) dut (.clk, .rst_n, .m_req_valid, .m_req_ready, .m_req_addr,
    .m_rsp_valid, .m_rsp_data, .s_req_valid, .s_req_ready, .s_req_addr, .s_rsp_valid, .s_rsp_data);
  frame_mem_model #(.IMG_W(W), .IMG_H(HH), .LAT(6), .STALL_PCT(30)) mem (
    .clk, .rst_n, .req_valid(s_req_valid), .req_ready(s_req_ready), .req_addr(s_req_addr),
    .rsp_valid(s_rsp_valid), .rsp_data(s_rsp_data));

  function automatic logic [BUS_W-1:0] expect_data(logic [ADDR_W-1:0] a);
    logic [BUS_W-1:0] d;
    for (int b = 0; b < BUS_B; b++) begin
      int o;
      o = int'(a[23:0]) + b;
      d[8*b +: 8] = cur_pix(o % W, o / W, W, HH);
    end
    return d;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 3; i++) begin
      if (m_req_valid[i] && m_req_ready[i]) begin
        pend[i].push_back(m_req_addr[i]);
        checks++;
        for (int j = 0; j < i; j++) if (m_req_valid[j]) begin
          failures++; $display("FAIL port %0d granted over %0d", i, j);
        end
      end
      if (m_rsp_valid[i]) begin
        checks++;
        n_rsp[i]++;
        if (pend[i].size() == 0 || m_rsp_data !== expect_data(pend[i][0])) begin
          failures++; $display("FAIL response to port %0d", i);
        end
        if (pend[i].size()) void'(pend[i].pop_front());
      end
    end
  end

  for (genvar i = 0; i < 3; i++) begin : g_m
    initial begin
      m_req_valid[i] = 0; m_req_addr[i] = '0;
      @(posedge rst_n);
      for (int n = 0; n < 300; n++) begin
        @(negedge clk);
        m_req_valid[i] = 1;
        m_req_addr[i]  = 32'h0200_0000 + ADDR_W'($urandom_range(W * (HH - 1)));
        @(posedge clk);
        while (!m_req_ready[i]) @(posedge clk);
        @(negedge clk) m_req_valid[i] = ($urandom_range(2) == 0) ? 1'b0 : 1'b0;
        repeat ($urandom_range(i)) @(negedge clk);
      end
      m_req_valid[i] = 0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (6000) @(posedge clk);
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (n_rsp[i] != 300 || pend[i].size() != 0) begin
        failures++; $display("FAIL port %0d got %0d responses", i, n_rsp[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
