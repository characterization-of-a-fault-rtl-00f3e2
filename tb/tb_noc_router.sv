// tb_noc_router: one router (node 5 = row 1, column 1 of the 4 x 4 torus)
// with the testbench driving all five input channels under credit flow
// control and sinking all five outputs, returning a credit per flit.
// Checked: injection along the route's first direction, turns decoded per
// arrival side, ejection at the destination, flooding of a path-exploration
// packet from the node to all working links with the output direction
// recorded, nothing sent on a faulty link, two packets sharing an output
// port on different VCs, a best-case latency of two cycles from input
// channel to output channel, and a 12-flit packet streaming at one phit per
// cycle.
module tb_noc_router;
  import noc_pkg::*;
  localparam int V = 4, DEPTH = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [TW-1:0] gt = TW'(100);
  logic [3:0] fail_in = '0, link_faulty;
  logic [NPORT-1:0] in_valid, out_valid;
  logic [NPORT-1:0][V-1:0] in_vc, in_credit, out_vc, out_credit;
  flit_t [NPORT-1:0] in_data, out_data;
  logic dl_exception;

  noc_router #(.V(V), .DEPTH(DEPTH)) dut (
    .clk, .rst, .me(NID_W'(5)), .global_timer(gt), .fault_clear(1'b0),
    .in_link_fail(fail_in), .out_link_fail(4'b0), .link_faulty,
    .in_valid, .in_vc, .in_data, .in_credit,
    .out_valid, .out_vc, .out_data, .out_credit,
    .dlb_room(1'b1), .dl_exception);

  always #5 clk = ~clk;

  task automatic expect_eq(input logic [63:0] got, input logic [63:0] exp, input string s);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", s, got, exp);
    end
  endtask

  // input drivers: queue of {vc, flit} per port, sent with credits
  typedef struct { int vc; flit_t f; } item_t;
  item_t iq [NPORT][$];
  int cred [NPORT][V];
  int cyc = 0;
  // output log
  flit_t  olog [NPORT][$];
  int     ovc  [NPORT][$];
  int     ocyc [NPORT][$];

  always_comb begin
    for (int p = 0; p < NPORT; p++) begin
      in_valid[p] = 1'b0; in_vc[p] = '0; in_data[p] = '0;
      if (iq[p].size() > 0 && cred[p][iq[p][0].vc] > 0) begin
        in_valid[p] = 1'b1;
        in_vc[p]    = V'(1) << iq[p][0].vc;
        in_data[p]  = iq[p][0].f;
      end
    end
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst) begin
      for (int p = 0; p < NPORT; p++) for (int v = 0; v < V; v++) cred[p][v] = DEPTH;
      out_credit <= '0;
    end else begin
      for (int p = 0; p < NPORT; p++) begin
        for (int v = 0; v < V; v++) if (in_credit[p][v]) cred[p][v]++;
        if (in_valid[p]) begin
          cred[p][iq[p][0].vc]--;
          void'(iq[p].pop_front());
        end
        if (out_valid[p]) begin
          olog[p].push_back(out_data[p]);
          ovc[p].push_back($clog2(out_vc[p]));
          ocyc[p].push_back(cyc);
        end
      end
for (int p = 0; p < NPORT; p++) out_credit[p] <= out_valid[p] ? out_vc[p] : V'(0);
    end
  end

  function automatic flit_t dhdr(input int dst, input logic [1:0] rdir, input logic [1:0] t0,
                                 input logic tail, input int tag);
    hflit_t h;
    h = '0;
    h.h.head = 1; h.h.tail = tail; h.h.pclass = C_DATA;
    h.h.dst = NID_W'(dst); h.h.src = NID_W'(0); h.h.ttl = TW'(16'h4000);
    h.h.route_dir = rdir; h.h.route[0] = t0; h.h.route[1] = T_LEFT;
    h.pay[15:0] = 16'(tag);
    return flit_t'(h);
  endfunction

  function automatic flit_t body(input logic tail, input int tag);
    flit_t f;
    f = '0;
    f[PHIT_W-2] = tail;
    f[15:0] = 16'(tag);
    return f;
  endfunction

  task automatic put(input int p, input int vc, input flit_t f);
    item_t it;
    it.vc = vc; it.f = f;
    iq[p].push_back(it);
  endtask

  task automatic clear_logs();
    for (int p = 0; p < NPORT; p++) begin olog[p].delete(); ovc[p].delete(); ocyc[p].delete(); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hflit_t h;
    int t0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk);

    // A: injection from the node, first hop east
    put(P_L, 2, dhdr(7, 2'(P_E), T_STRAIGHT, 1, 1));
    repeat (6) @(negedge clk);
    expect_eq(olog[P_E].size(), 1, "A: injected packet leaves east");
    h = hflit_t'(olog[P_E][0]);
    expect_eq(h.h.route[0], T_STRAIGHT, "A: route kept at injection");
    clear_logs();

    // B: latency and streaming, west input straight on to east
    t0 = cyc;
    put(P_W, 1, dhdr(6, 2'(P_E), T_STRAIGHT, 0, 100));
    for (int i = 1; i < 12; i++) put(P_W, 1, body(i == 11, 100 + i));
    repeat (25) @(negedge clk);
    expect_eq(olog[P_E].size(), 12, "B: all 12 flits leave east");
    expect_eq(ocyc[P_E][0] - t0, 2, "B: header two cycles from input channel to output channel");
    expect_eq(ocyc[P_E][11] - ocyc[P_E][0], 11, "B: one phit per cycle");
    h = hflit_t'(olog[P_E][0]);
    expect_eq(h.h.route[0], T_LEFT, "B: used turn removed");
    for (int i = 1; i < 12; i++) expect_eq(olog[P_E][i][15:0], 16'(100 + i), "B: body order");
    clear_logs();

    // C: from the north input (travelling south) a right turn goes west,
    //    a left turn east; both on the same output port (east) use two VCs
    put(P_N, 0, dhdr(6, 0, T_RIGHT, 1, 200));
    put(P_N, 1, dhdr(6, 0, T_LEFT, 0, 201));
    put(P_N, 1, body(0, 202));
    put(P_N, 1, body(1, 203));
    put(P_S, 3, dhdr(6, 0, T_RIGHT, 0, 300));    // travelling north, right = east
    put(P_S, 3, body(1, 301));
    repeat (15) @(negedge clk);
    expect_eq(olog[P_W].size(), 1, "C: right turn from north input goes west");
    expect_eq(olog[P_E].size(), 5, "C: two packets share the east port");
    begin
      int va, vb;
      va = -1; vb = -1;
      for (int i = 0; i < olog[P_E].size(); i++) begin
        if (olog[P_E][i][15:0] == 16'd201) va = ovc[P_E][i];
        if (olog[P_E][i][15:0] == 16'd300) vb = ovc[P_E][i];
      end
      checks++;
      if (va == vb || va < 0 || vb < 0) begin failures++; $display("FAIL C: packets on VCs %0d %0d", va, vb); end
    end
    clear_logs();

    // D: exploration from the node with the south link faulty
    fail_in = 4'b0100;
    @(negedge clk);
    fail_in = '0;
    h = '0;
    h.h.head = 1; h.h.tail = 1; h.h.pclass = C_PE_FWD; h.h.src = NID_W'(5);
    h.h.ttl = TW'(16'h4000); h.h.rec = '1; h.h.route = '1;
    put(P_L, 0, flit_t'(h));
    repeat (8) @(negedge clk);
    expect_eq(link_faulty, 4'b0100, "D: south marked faulty");
    expect_eq(olog[P_S].size(), 0, "D: nothing on the faulty link");
    for (int d = 0; d < 4; d++) if (d != P_S) begin
      expect_eq(olog[d].size(), 1, $sformatf("D: PE packet on port %0d", d));
      if (olog[d].size() == 1) begin
        h = hflit_t'(olog[d][0]);
        expect_eq(64'(h.h.rec_dir), 64'(d), "D: output direction recorded");
        expect_eq(h.h.rec_len, 0, "D: no turns yet");
        expect_eq(h.h.visited, 16'h0020, "D: source marked visited");
      end
    end
    clear_logs();

    // E: data for this node arriving from the east is ejected
    put(P_E, 2, dhdr(5, 0, T_STRAIGHT, 1, 400));
    repeat (6) @(negedge clk);
    expect_eq(olog[P_L].size(), 1, "E: ejected at destination");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
