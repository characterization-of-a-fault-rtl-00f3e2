// tb_output_port: one output port (east) fed by 20 modelled input VCs.
// Each input VC sends data packets of 1 to 3 flits; the testbench plays the
// downstream router, which takes flits into 2-slot buffers and returns
// credits at random. Checked: packets arrive whole and in order on each
// output VC, never interleaved; a header from a network port has its used
// turn removed while one from the local port keeps its route; no VC ever
// overflows the downstream buffer; every flit sent arrives; a lone header
// reaches the channel one cycle after its request; and with the link marked
// faulty every request is granted at once and nothing is sent.
module tb_output_port;
  import noc_pkg::*;
  localparam int V = 4, NIN = 5, C = NIN * V, DEPTH = 2;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, faulty = 0;
  logic [C-1:0] hdr_req, body_valid, hdr_gnt, body_ack;
  logic [C-1:0][1:0] hdr_level;
  flit_t [C-1:0] data_in;
  logic pc_valid;
  logic [V-1:0] pc_vc, credit_in;
  flit_t pc_data;

  output_port #(.V(V), .NIN(NIN), .DEPTH(DEPTH), .MYPORT(3'(P_E))) dut (
    .clk, .rst, .me(NID_W'(5)), .link_faulty(faulty),
    .hdr_req, .hdr_level, .body_valid, .data_in, .hdr_gnt, .body_ack,
    .pc_valid, .pc_vc, .pc_data, .credit_in);

  always #5 clk = ~clk;

  task automatic fail(input string s);
    failures++;
    if (failures < 20) $display("FAIL %s", s);
  endtask

  // flits queued per client
  flit_t q [C][$];
  int sent = 0, recvd = 0, granted_faulty = 0;

  function automatic flit_t mk(input int c, input int seq, input int len, input int pkt);
    hflit_t h;
    h = '0;
    h.pay[31:0] = {8'(c), 8'(seq), 16'(pkt)};
    if (seq == 0) begin
      h.h.head   = 1'b1;
      h.h.pclass = C_DATA;
      h.h.dst    = NID_W'(9);
      h.h.route[0] = T_LEFT;
      h.h.route[1] = T_RIGHT;
      h.h.route[2] = T_STRAIGHT;
    end
    h.h.tail = (seq == len - 1);
    return flit_t'(h);
  endfunction

  // client drive
  logic [C-1:0] in_body;
  always_comb begin
    for (int c = 0; c < C; c++) begin
      data_in[c]    = (q[c].size() > 0) ? q[c][0] : '0;
      hdr_req[c]    = (q[c].size() > 0) && !in_body[c] && is_head(data_in[c]);
      body_valid[c] = (q[c].size() > 0) && in_body[c];
      hdr_level[c]  = 2'(c % 3);
    end
  end
  always @(posedge clk) begin
    if (rst) in_body <= '0;
    else for (int c = 0; c < C; c++) begin
      if (hdr_gnt[c] && hdr_req[c]) begin
        in_body[c] <= !is_tail(q[c][0]);
        if (faulty) granted_faulty++;
        void'(q[c].pop_front());
      end else if (body_ack[c] && body_valid[c]) begin
        if (is_tail(q[c][0])) in_body[c] <= 1'b0;
        void'(q[c].pop_front());
      end else if (body_ack[c] || (hdr_gnt[c] && !hdr_req[c])) begin
        fail($sformatf("grant without request to client %0d", c));
      end
    end
  end

  // downstream model
  int occ [V];
  int cur_client [V], next_seq [V];
  always @(posedge clk) begin
    if (rst) begin
      for (int v = 0; v < V; v++) begin occ[v] = 0; cur_client[v] = -1; end
      credit_in <= '0;
    end else begin
      logic [V-1:0] cr;
      cr = '0;
      for (int v = 0; v < V; v++)
        if (occ[v] > 0 && ($urandom % 2 == 0)) begin occ[v]--; cr[v] = 1'b1; end
      credit_in <= cr;
      if (pc_valid) begin
        int v, c, s;
        hflit_t h;
        v = -1;
        for (int i = 0; i < V; i++) if (pc_vc[i]) v = i;
        checks++;
        if (!$onehot(pc_vc)) fail("VC index not one-hot");
        if (faulty) fail("flit sent on a faulty link");
        occ[v]++;
        if (occ[v] > DEPTH) fail($sformatf("VC %0d overflows downstream buffer", v));
        h = hflit_t'(pc_data);
        c = int'(h.pay[31:24]);
        s = int'(h.pay[23:16]);
        recvd++;
        if (h.h.head) begin
          if (cur_client[v] != -1) fail($sformatf("VC %0d interleaved packets", v));
          checks++;
          if (c / V == P_L) begin
            if (h.h.route[0] != T_LEFT || h.h.route[1] != T_RIGHT) fail("local header route changed");
          end else if (h.h.route[0] != T_RIGHT || h.h.route[1] != T_STRAIGHT || h.h.route[MAXH-1] != T_NONE)
            fail($sformatf("network header route not shifted: %h", h.h.route));
          cur_client[v] = c; next_seq[v] = 1;
          if (s != 0) fail("header with nonzero sequence");
        end else begin
          if (c != cur_client[v] || s != next_seq[v]) fail($sformatf("VC %0d body out of order", v));
          next_seq[v]++;
        end
        if (h.h.tail) cur_client[v] = -1;
      end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pkt = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    // a lone single-flit header: request in one cycle, on the channel the next
    @(negedge clk);
    q[2].push_back(mk(2, 0, 1, pkt++)); sent++;
    @(negedge clk);
    checks++;
    if (!pc_valid) fail("lone header not on the channel one cycle after its request");
    // random traffic
    for (int i = 0; i < 300; i++) begin
      int c, len;
      c = $urandom % C;
      len = 1 + $urandom % 3;
      for (int s = 0; s < len; s++) q[c].push_back(mk(c, s, len, pkt));
      sent += len;
      pkt++;
      if (i % 10 == 0) @(negedge clk);
    end
    repeat (4000) @(negedge clk);
    checks++;
    if (recvd != sent) fail($sformatf("sent %0d flits, received %0d", sent, recvd));
    // faulty link: single-flit headers are granted and dropped
    faulty = 1;
    @(negedge clk);
    for (int c = 0; c < C; c++) q[c].push_back(mk(c, 0, 1, pkt++));
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (granted_faulty != C) fail($sformatf("faulty link granted %0d of %0d requests", granted_faulty, C));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
