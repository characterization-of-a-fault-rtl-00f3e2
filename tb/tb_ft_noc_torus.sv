// tb_ft_noc_torus: end-to-end run of the 4 x 4 torus.
//
// The torus runs at its default parameters. Two links are failed by self
// test (5-6 and 9-13). After recovery, every node in EXPLORERS starts path
// exploration at the same time with a short time-to-live, so the flood
// congests, and the run waits for the network to go quiet. Then every explorer must hold a cached path to
// every other node, and every PE return packet must have been answered once
// per (source, destination) pair. In the data phase each explorer sends
// packets of one to four flits, half of them to node 10, which stops taking
// packets for a while; every packet must arrive whole, in order, at its
// destination only. A short time-to-live
// makes congested packets deadlocked, so the deadlock marking, the move to a
// deadlock buffer and the re-injection happen; a packet to a node without a
// cached path must be dropped with no_route. Every mechanism is counted and
// one that never happened counts as a failure.
module tb_ft_noc_torus;
  import noc_pkg::*;
  localparam int unsigned EXPLORERS = 16'h0021;
  localparam int PKTS = 64;                      // data packets per explorer
  localparam int unsigned TTL = 24;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, rec = 0, fclr = 0;
  logic [N-1:0] pe_start = '0;
  logic [N-1:0][3:0] link_fail = '0;
  logic [N-1:0] rx_rdy = '1;          // node receive sides, held off in phase 2
  logic [N-1:0] nd_tx_valid = '0, nd_tx_ready, nd_rx_valid, no_route, dl_exception, ret_sent;
  flit_t [N-1:0] nd_tx_data, nd_rx_data;
  logic [N-1:0][N-1:0] path_valid;
  logic [N-1:0][3:0] link_faulty;
  logic [TW-1:0] global_timer;

  logic [TW-1:0] ttl_win = TW'(16);

  ft_noc_torus dut (
    .clk, .rst, .recovery_in_progress(rec), .fault_clear(fclr), .pe_start, .ttl_win, .link_fail,
    .seg_base('0), .max_entries(5'd16),
    .nd_tx_valid, .nd_tx_data, .nd_tx_ready, .nd_rx_valid, .nd_rx_data,
    .nd_rx_ready(rx_rdy), .no_route, .dl_exception, .path_valid, .ret_sent,
    .link_faulty, .global_timer);

  always #5 clk = ~clk;

  // ------------------------------------------------------ mechanism counters
  longint cyc = 0, last_busy = 0;
  int n_pe_deliv = 0, n_ret = 0, n_fault_drop = 0, n_dl_mark = 0, n_divert = 0,
      n_reinj = 0, n_noroute = 0, n_fcfs = 0, n_prio = 0;
  logic [NPORT-1:0] busy_n [N];
  int pe_d [N], dv_n [N], ri_n [N];
  int fd_a [N][NPORT], dm_a [N][NPORT], fc_a [N][NPORT], pr_a [N][NPORT];

  for (genvar n = 0; n < N; n++) begin : g_mon
    for (genvar p = 0; p < NPORT; p++) begin : g_p
      always @(posedge clk) begin
        busy_n[n][p] <= dut.g_node[n].u_router.out_valid[p];
        if (!rst) begin
          // requests granted and dropped on a faulty link
          if (p < 4 && dut.g_node[n].u_router.link_faulty[p % 4])
            fd_a[n][p] += $countones(dut.g_node[n].u_router.port_req[p]);
          // headers waiting with the deadlocked mark
          dm_a[n][p] += $countones(dut.g_node[n].u_router.g_in[p].u_in.dl &
                           dut.g_node[n].u_router.g_in[p].u_in.is_hdr);
          // several VCs ready for the same physical channel
          if ($countones(dut.g_node[n].u_router.g_out[p].u_out.eligible) > 1) fc_a[n][p]++;
          // a priority-2 header granted over waiting lower-priority ones
          if (dut.g_node[n].u_router.g_out[p].u_out.arb_valid &&
              dut.g_node[n].u_router.g_out[p].u_out.hdr_level[dut.g_node[n].u_router.g_out[p].u_out.arb_idx] == 2'd2 &&
              $countones(dut.g_node[n].u_router.g_out[p].u_out.hdr_req) > 1) pr_a[n][p]++;
        end
      end
    end
    always @(posedge clk) if (!rst) begin
      if (dut.g_node[n].u_nif.serve && dut.g_node[n].u_nif.take && dut.g_node[n].u_nif.is_pe &&
          dut.g_node[n].u_nif.fh.h.pclass == C_PE_FWD) pe_d[n]++;
      if (dut.g_node[n].u_nif.dlb_rd && is_head(dut.g_node[n].u_nif.dlb_head)) ri_n[n]++;
      if (dut.g_node[n].u_nif.dlb_wr && dut.g_node[n].u_nif.fh.h.head) dv_n[n]++;
    end
  end

  function automatic void sum_counts();
    n_pe_deliv = 0; n_fault_drop = 0; n_dl_mark = 0; n_divert = 0; n_reinj = 0; n_fcfs = 0; n_prio = 0;
    for (int n = 0; n < N; n++) begin
      n_pe_deliv += pe_d[n]; n_divert += dv_n[n]; n_reinj += ri_n[n];
      for (int p = 0; p < NPORT; p++) begin
        n_fault_drop += fd_a[n][p]; n_dl_mark += dm_a[n][p];
        n_fcfs += fc_a[n][p]; n_prio += pr_a[n][p];
      end
    end
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int n = 0; n < N; n++) if (busy_n[n] != 0 || nd_tx_valid[n]) last_busy <= cyc;
    if (!rst) begin
      n_ret     += $countones(ret_sent);
      n_noroute += $countones(no_route);
    end
  end

  task automatic report(input string what, input int n);
    $display("  %-48s %0d", what, n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL %s never happened", what); end
  endtask

  task automatic wait_quiet(input int gap, input int limit);
    longint t0;
    t0 = cyc;
    do @(posedge clk); while (cyc - last_busy < gap && cyc - t0 < limit);
    checks++;
    if (cyc - t0 >= limit) begin
      failures++;
      $display("FAIL network still busy after %0d cycles", limit);
    end
  endtask

  // -------------------------------------------------------------- data phase
  typedef struct { int src; int seq; int len; } pkt_t;
  pkt_t expect_q [N][$];             // per destination, packets in flight
  flit_t txq [N][$];
  int rx_pos [N], rx_len [N], rx_src [N], rx_seq [N], delivered = 0, sent_pkts = 0;

  always_comb
    for (int n = 0; n < N; n++) begin
      nd_tx_valid[n] = txq[n].size() > 0;
      nd_tx_data[n]  = nd_tx_valid[n] ? txq[n][0] : '0;
    end

  always @(posedge clk) if (!rst) begin
    for (int n = 0; n < N; n++) begin
      if (nd_tx_valid[n] && nd_tx_ready[n]) void'(txq[n].pop_front());
      if (nd_rx_valid[n] && rx_rdy[n]) begin
        hflit_t h;
        h = hflit_t'(nd_rx_data[n]);
        checks++;
        if (h.h.head) begin
          int found;
          found = -1;
          if (h.h.dst != NID_W'(n)) begin failures++; $display("FAIL node %0d got packet for %0d", n, h.h.dst); end
          foreach (expect_q[n][k])
            if (found < 0 && expect_q[n][k].src == int'(h.h.src) && expect_q[n][k].seq == int'(h.pay[15:0]))
              found = k;
          if (found < 0) begin
            failures++;
            $display("FAIL node %0d got unexpected packet %0d from %0d", n, h.pay[15:0], h.h.src);
          end else begin
            rx_len[n] = expect_q[n][found].len;
            expect_q[n].delete(found);
          end
          rx_src[n] = int'(h.h.src); rx_seq[n] = int'(h.pay[15:0]); rx_pos[n] = 1;
        end else begin
          if (nd_rx_data[n][31:0] != {8'(rx_src[n]), 8'(rx_pos[n]), 16'(rx_seq[n])}) begin
            failures++;
            $display("FAIL node %0d body flit %0d of packet %0d/%0d wrong", n, rx_pos[n], rx_src[n], rx_seq[n]);
          end
          rx_pos[n]++;
        end
        if (is_tail(nd_rx_data[n])) begin
          if (rx_pos[n] != rx_len[n]) begin failures++; $display("FAIL node %0d packet length", n); end
          delivered++;
        end
      end
    end
  end

  task automatic queue_packet(input int s, input int d, input int seq, input int len);
    hflit_t h;
    pkt_t p;
    h = '0;
    h.h.head = 1; h.h.tail = (len == 1); h.h.pclass = C_DATA; h.h.dst = NID_W'(d);
    h.pay[15:0] = 16'(seq);
    txq[s].push_back(flit_t'(h));
    for (int i = 1; i < len; i++) begin
      flit_t f;
      f = '0;
      f[PHIT_W-2] = (i == len - 1);
      f[31:0] = {8'(s), 8'(i), 16'(seq)};
      txq[s].push_back(f);
    end
    if (path_valid[s][d]) begin
      p.src = s; p.seq = seq; p.len = len;
      expect_q[d].push_back(p);
      sent_pkts++;
    end
  endtask

  initial begin
    #400000000;
    failures++;
    $display("FAIL watchdog expired at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nexp;
    for (int n = 0; n < N; n++) begin
      pe_d[n] = 0; dv_n[n] = 0; ri_n[n] = 0;
      for (int p = 0; p < NPORT; p++) begin fd_a[n][p] = 0; dm_a[n][p] = 0; fc_a[n][p] = 0; pr_a[n][p] = 0; end
    end
    link_fail[5][P_E]  = 1'b1;     // link 5 - 6
    link_fail[13][P_N] = 1'b1;     // link 13 - 9
    repeat (4) @(posedge clk);
    rst = 0;
    @(negedge clk); rec = 1; @(negedge clk); rec = 0;

    // ---- phase 1: path exploration
    nexp = 0;
    // all explorers start together with a short time-to-live, so the
    // flood congests and deadlocked PE packets go through the buffers
    @(negedge clk); pe_start = EXPLORERS; @(negedge clk); pe_start = '0;
    nexp = $countones(EXPLORERS);
    wait_quiet(400, 400000);
    checks++;
    if (link_faulty[5][P_E] !== 1'b1 || link_faulty[6][P_W] !== 1'b1 ||
        link_faulty[13][P_N] !== 1'b1 || link_faulty[9][P_S] !== 1'b1) begin
      failures++; $display("FAIL faulty links not marked at both ends");
    end
    for (int s = 0; s < N; s++) if (EXPLORERS[s]) begin
      checks++;
      if ((path_valid[s] | (N'(1) << s)) != '1) begin
        failures++; $display("FAIL node %0d paths %h", s, path_valid[s]);
      end
    end
    sum_counts();
    checks++;
    if (n_ret != nexp * (N - 1)) begin
      failures++; $display("FAIL %0d return packets for %0d explorers", n_ret, nexp);
    end
    $display("exploration done at cycle %0d: %0d PE deliveries, %0d returns", cyc, n_pe_deliv, n_ret);

    // ---- phase 2: data, with a short time-to-live
    ttl_win = TW'(TTL);
    // node 10 gets half of the packets and stops taking them for a while,
    // so that traffic backs up
    // past the time-to-live and the deadlock recovery has to act
    rx_rdy = ~16'h0400;
    fork begin repeat (1500) @(negedge clk); rx_rdy = '1; end join_none
    for (int s = 0; s < N; s++) if (EXPLORERS[s])
      for (int i = 0; i < PKTS; i++) begin
        int d;
        do d = ($urandom % 2 == 0) ? 10 : $urandom % N; while (d == s);
        queue_packet(s, d, s * 1000 + i, 1 + $urandom % 4);
      end
    wait_quiet(2000, 400000);
    checks++;
    if (delivered != sent_pkts) begin
      failures++; $display("FAIL %0d of %0d packets delivered", delivered, sent_pkts);
    end
    for (int n = 0; n < N; n++) begin
      checks++;
      if (expect_q[n].size() != 0) begin failures++; $display("FAIL node %0d missing packets", n); end
    end
    // a packet to a node with no cached path after recovery
    @(negedge clk); rec = 1; @(negedge clk); rec = 0;
    checks++;
    if (path_valid != '0) begin failures++; $display("FAIL recovery did not clear the caches"); end
    queue_packet(3, 12, 9999, 2);
    repeat (20) @(negedge clk);

    sum_counts();
    $display("data done at cycle %0d: %0d packets delivered", cyc, delivered);
    report("path-exploration deliveries", n_pe_deliv);
    report("path-exploration returns", n_ret);
    report("requests dropped on faulty links", n_fault_drop);
    report("deadlocked header-cycles", n_dl_mark);
    report("packets moved to deadlock buffers", n_divert);
    report("packets re-injected", n_reinj);
    report("cycles with several VCs ready for one channel", n_fcfs);
    report("priority-2 grants over waiting requests", n_prio);
    report("packets dropped for lack of a path", n_noroute);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
