// tb_node_if: the local-port logic of node 6 (row 1, column 2) with the
// testbench playing the router. Checked: a PE forward packet is injected on
// request; a PE forward packet from node 4 makes the node cache the reversed
// path for nodes 4 and 5 and answer once with a PE return packet routed back
// to 4; a second one from the same source is not answered; a PE return
// packet from node 14 caches the forward path for 10 and 14; a data packet
// to 14 leaves with that route; a data packet to an unknown node is dropped
// with no_route; data for this node reaches the node; a data packet for
// another node is kept in the deadlock buffer and re-injected with the
// highest class; credits come back for every flit; recovery clears the
// cached paths.
module tb_node_if;
  import noc_pkg::*;
  localparam int V = 4, DEPTH = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, rec = 0, pe_start = 0;
  logic [TW-1:0] gt = TW'(1000);
  logic rx_valid = 0;
  logic [V-1:0] rx_vc = '0, rx_credit, tx_vc, tx_credit;
  flit_t rx_data = '0, tx_data, nd_tx_data = '0, nd_rx_data;
  logic tx_valid, nd_tx_valid = 0, nd_tx_ready, nd_rx_valid, no_route, dlb_room, ret_sent;
  logic [N-1:0] path_valid;
  int rx_credits = 0, no_routes = 0;
  flit_t txlog [$];
  int    txvc  [$];
  flit_t ndlog [$];

  node_if #(.V(V), .DEPTH(DEPTH)) dut (
    .clk, .rst, .me(NID_W'(6)), .global_timer(gt), .recovery_in_progress(rec),
    .pe_start, .ttl_win(TW'(256)), .seg_base('0), .max_entries(5'd16),
    .rx_valid, .rx_vc, .rx_data, .rx_credit,
    .tx_valid, .tx_vc, .tx_data, .tx_credit,
    .nd_tx_valid, .nd_tx_data, .nd_tx_ready,
    .nd_rx_valid, .nd_rx_data, .nd_rx_ready(1'b1), .no_route,
    .dlb_room, .path_valid, .ret_sent);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    gt <= gt + 1'b1;
    tx_credit <= rst ? '0 : (tx_valid ? tx_vc : '0);    // router takes at once
    if (!rst) begin
      rx_credits <= rx_credits + $countones(rx_credit);
      if (no_route) no_routes <= no_routes + 1;
      if (tx_valid) begin txlog.push_back(tx_data); txvc.push_back($clog2(tx_vc)); end
      if (nd_rx_valid) ndlog.push_back(nd_rx_data);
    end
  end

  task automatic expect_eq(input logic [63:0] got, input logic [63:0] exp, input string s);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", s, got, exp);
    end
  endtask

  task automatic deliver(input int vc, input flit_t f);
    @(negedge clk);
    rx_valid = 1; rx_vc = V'(1) << vc; rx_data = f;
    @(negedge clk);
    rx_valid = 0; rx_vc = '0;
  endtask

  task automatic node_send(input flit_t f);
    @(negedge clk);
    nd_tx_valid = 1; nd_tx_data = f;
    do @(posedge clk); while (!nd_tx_ready);
    @(negedge clk);
    nd_tx_valid = 0;
  endtask

  function automatic hflit_t blank(input pclass_e c, input int src, input int dst, input logic tail);
    hflit_t h;
    h = '0;
    h.h.head = 1; h.h.tail = tail; h.h.pclass = c;
    h.h.src = NID_W'(src); h.h.dst = NID_W'(dst); h.h.ttl = TW'(16'h4000);
    h.h.route = '1; h.h.rec = '1;
    return h;
  endfunction

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hflit_t h;
    repeat (3) @(posedge clk);
    rst = 0;

    // 1. exploration start
    @(negedge clk); pe_start = 1; @(negedge clk); pe_start = 0;
    repeat (2) @(negedge clk);
    expect_eq(txlog.size(), 1, "1: PE forward injected");
    h = hflit_t'(txlog[0]);
    expect_eq(h.h.pclass, C_PE_FWD, "1: class");
    expect_eq(h.h.src, 6, "1: source");
    expect_eq(txvc[0], 0, "1: on VC0");
    txlog.delete(); txvc.delete();

    // 2. PE forward from 4 via 5: east, then straight
    h = blank(C_PE_FWD, 4, 0, 1);
    h.h.rec_dir = 2'(P_E); h.h.rec[0] = T_STRAIGHT; h.h.rec_len = 1;
    h.h.visited = 16'h0030;
    deliver(1, flit_t'(h));
    repeat (3) @(negedge clk);
    expect_eq(path_valid, 16'h0030, "2: paths to 4 and 5 cached");
    expect_eq(txlog.size(), 1, "2: one return packet");
    h = hflit_t'(txlog[0]);
    expect_eq(h.h.pclass, C_PE_RET, "2: return class");
    expect_eq(h.h.dst, 4, "2: return goes to the source");
    expect_eq(h.h.src, 6, "2: return from this node");
    expect_eq(h.h.route_dir, 2'(P_W), "2: return starts west");
    expect_eq(h.h.route[0], T_STRAIGHT, "2: then straight");
    expect_eq(h.h.rec_dir, 2'(P_E), "2: forward record carried back");
    expect_eq(txvc[0], 1, "2: on VC1");
    txlog.delete(); txvc.delete();
    // second packet from the same source: no answer
    h = blank(C_PE_FWD, 4, 0, 1);
    h.h.rec_dir = 2'(P_N); h.h.rec[0] = T_RIGHT; h.h.rec[1] = T_RIGHT; h.h.rec[2] = T_LEFT;
    h.h.rec_len = 3; h.h.visited = 16'h0033;
    deliver(2, flit_t'(h));
    repeat (3) @(negedge clk);
    expect_eq(txlog.size(), 0, "2: only the first packet from a source is answered");
    expect_eq(path_valid, 16'h0033, "2: new nodes 0 and 1 cached");

    // 3. PE return from 14: forward path 6 -south-> 10 -straight-> 14
    h = blank(C_PE_RET, 14, 6, 1);
    h.h.rec_dir = 2'(P_S); h.h.rec[0] = T_STRAIGHT; h.h.rec_len = 1;
    h.h.visited = 16'h0440;
    deliver(1, flit_t'(h));
    repeat (3) @(negedge clk);
    expect_eq(path_valid, 16'h4433, "3: paths to 10 and 14 cached");

    // 4. data to 14 uses the cached route
    h = blank(C_DATA, 0, 14, 0);
    h.pay[7:0] = 8'hA1;
    node_send(flit_t'(h));
    node_send({2'b01, 254'hA2});
    repeat (2) @(negedge clk);
    expect_eq(txlog.size(), 2, "4: data packet sent");
    h = hflit_t'(txlog[0]);
    expect_eq(h.h.route_dir, 2'(P_S), "4: route first direction");
    expect_eq(h.h.route[0], T_STRAIGHT, "4: route turn");
    expect_eq(h.h.src, 6, "4: source filled in");
    expect_eq(txvc[0], 2, "4: on VC2");
    expect_eq(txlog[1][7:0], 8'hA2, "4: body follows");
    txlog.delete(); txvc.delete();

    // 5. data to 3: no path
    node_send(flit_t'(blank(C_DATA, 0, 3, 0)));
    node_send({2'b01, 254'hB2});
    repeat (2) @(negedge clk);
    expect_eq(txlog.size(), 0, "5: packet without a path dropped");
    expect_eq(no_routes, 1, "5: no_route raised once");

    // 6. data for this node
    h = blank(C_DATA, 9, 6, 1);
    h.pay[7:0] = 8'hC1;
    deliver(3, flit_t'(h));
    repeat (2) @(negedge clk);
    expect_eq(ndlog.size(), 1, "6: delivered to the node");
    expect_eq(ndlog[0][7:0], 8'hC1, "6: payload");

    // 7. evicted packet for node 9: into the deadlock buffer and back out
    h = blank(C_DATA, 2, 9, 0);
    h.h.route_dir = 2'(P_S);
    h.h.evict = 1'b1;
    deliver(2, flit_t'(h));
    deliver(2, {2'b01, 254'hD2});
    repeat (4) @(negedge clk);
    expect_eq(txlog.size(), 2, "7: evicted packet re-injected");
    h = hflit_t'(txlog[0]);
    expect_eq(h.h.pclass, C_REINJ, "7: re-injected class");
    expect_eq(h.h.dst, 9, "7: destination kept");
    expect_eq(txvc[0], 3, "7: on VC3");
    expect_eq(h.h.evict, 0, "7: eviction mark cleared");
    expect_eq(dlb_room, 1, "7: buffer free again");
    expect_eq(rx_credits, 6, "credits for every flit received");

    // 8. recovery
    @(negedge clk); rec = 1; @(negedge clk); rec = 0;
    expect_eq(path_valid, 0, "8: recovery clears the cached paths");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
