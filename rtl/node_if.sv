// node_if: the router's side of the local port, between the router and the
// node processor and its memory.
//
// It runs both phases of the routing algorithm at this node:
//  * Path exploration. `pe_start` injects one path-exploration (PE) forward
//    packet, which the router floods over all simple paths. When a PE
//    forward packet from source s is delivered here, the path it recorded
//    is reversed and saved in the route cache if it reaches any node that
//    has no cached path yet; the first packet from each source also makes
//    this node send a PE return packet back along the reversed path. When a
//    PE return packet reaches its source, the forward path it carries is
//    saved the same way. One saved path serves every node on it: the
//    destination address table (DAT) entries of all those nodes point to
//    the same route-cache word, and a packet on that path leaves the
//    network where its destination matches.
//  * Data transfer. A packet from the node gets the cached route of its
//    destination written into its header, plus a time-to-live stamp; a
//    packet to a destination without a cached path is dropped and
//    `no_route` pulses. Data packets arriving for this node go to the node.
//  * Deadlock buffers. A data packet arriving for another node was moved
//    here by the router because it was deadlocked; it is kept in a
//    deadlock buffer (node memory) and re-injected with the highest
//    priority and a fresh time-to-live. `dlb_room` tells the router whether
//    another packet of up to DLB_RESERVE flits fits.
//
// VC use on the local injection channel (this design's choice): VC0 PE
// forward, VC1 PE return, VC2 data, VC3 re-injection; re-injection goes
// first, then PE return, PE forward and data. Flits from the router are
// buffered per VC and served one packet at a time. The router-side
// interfaces use the same one-hot VC index and V-bit credit bus as the
// network links. `recovery_in_progress` clears the DAT valid bits and the
// record of sources already answered. Requires V >= 4.
module node_if
  import noc_pkg::*;
#(
  parameter int unsigned V           = NUM_VC,
  parameter int unsigned DEPTH       = 4,
  parameter int unsigned ADDR_W      = NID_W + 1,
  parameter int unsigned DLB_DEPTH   = 64,
  parameter int unsigned DLB_RESERVE = 4,
  parameter int unsigned RETQ        = N
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [NID_W-1:0]        me,
  input  logic [TW-1:0]           global_timer,
  input  logic                    recovery_in_progress,
  input  logic                    pe_start,
  input  logic [TW-1:0]           ttl_win,      // time-to-live window
  input  logic [ADDR_W-1:0]       seg_base,
  input  logic [ADDR_W-1:0]       max_entries,
  // from the router's local output port
  input  logic                    rx_valid,
  input  logic [V-1:0]            rx_vc,
  input  flit_t                   rx_data,
  output logic [V-1:0]            rx_credit,
  // to the router's local input port
  output logic                    tx_valid,
  output logic [V-1:0]            tx_vc,
  output flit_t                   tx_data,
  input  logic [V-1:0]            tx_credit,
  // node processor
  input  logic                    nd_tx_valid,
  input  flit_t                   nd_tx_data,
  output logic                    nd_tx_ready,
  output logic                    nd_rx_valid,
  output flit_t                   nd_rx_data,
  input  logic                    nd_rx_ready,
  output logic                    no_route,
  // status
  output logic                    dlb_room,
  output logic [N-1:0]            path_valid,
  output logic                    ret_sent
);
  localparam int unsigned VW  = $clog2(V);
  localparam int unsigned DW  = $clog2(DEPTH + 1);
  localparam int unsigned BW  = $clog2(DLB_DEPTH + 1);
  localparam int unsigned RCW = 2 + 2 * MAXH + LEN_W;
  localparam int unsigned VC_FWD = 0, VC_RET = 1, VC_DATA = 2, VC_REINJ = 3;

  // ---------------------------------------------------------- receive side
  logic [V-1:0]  empty, pop;
  flit_t [V-1:0] head;
  logic          locked, to_dlb;
  logic [VW-1:0] cur, pick;
  logic          pick_ok;
  flit_t         f;
  hflit_t        fh;

  for (genvar v = 0; v < V; v++) begin : g_rx
    logic unused_full;
    vc_fifo #(.W(PHIT_W), .DEPTH(DEPTH)) u_rxbuf (
      .clk, .rst,
      .wr   (rx_valid && rx_vc[v]),
      .wdata(rx_data),
      .rd   (pop[v]),
      .rdata(head[v]),
      .empty(empty[v]),
      .full (unused_full)
    );
  end
  assign rx_credit = pop;

  // route cache and DAT
  hflit_t                   nd_hf;
  logic [NID_W-1:0]         nd_dst;
  assign nd_hf  = hflit_t'(nd_tx_data);
  assign nd_dst = nd_hf.h.dst;
  logic [N-1:0]             wen;
  logic [ADDR_W-1:0]        waddr;
  logic [N-1:0][ADDR_W-1:0] raddr;
  logic [RCW-1:0]           rc_wdata, rc_rdata;

  dat #(.N(N), .ADDR_W(ADDR_W)) u_dat (
    .clk, .rst, .recovery_in_progress,
    .seg_base, .max_entries,
    .wen, .waddr, .valid(path_valid), .raddr
  );

  // deadlock buffer
  logic          dlb_wr, dlb_rd, dlb_empty, dlb_full;
  flit_t         dlb_head;
  logic [BW-1:0] dlb_cnt;

  vc_fifo #(.W(PHIT_W), .DEPTH(DLB_DEPTH)) u_dlb (
    .clk, .rst,
    .wr   (dlb_wr),
    .wdata(f),
    .rd   (dlb_rd),
    .rdata(dlb_head),
    .empty(dlb_empty),
    .full (dlb_full)
  );
  assign dlb_room = (BW'(DLB_DEPTH) - dlb_cnt) >= BW'(DLB_RESERVE);

  // return packets waiting to be sent (at most one per source) and the
  // pending exploration start
  logic   ret_pend, ret_push, ret_full, ret_empty, fwd_pend;
  hflit_t ret_new;
  flit_t  ret_hdr;
  logic [N-1:0] answered;

  vc_fifo #(.W(PHIT_W), .DEPTH(RETQ)) u_retq (
    .clk, .rst,
    .wr   (ret_push),
    .wdata(flit_t'(ret_new)),
    .rd   (tx_valid && tx_vc[VC_RET]),
    .rdata(ret_hdr),
    .empty(ret_empty),
    .full (ret_full)
  );
  assign ret_pend = !ret_empty;

  // receive-side serving
  always_comb begin
    pick_ok = 1'b0;
    pick    = '0;
    for (int v = V - 1; v >= 0; v--)
      if (!empty[v]) begin
        pick_ok = 1'b1;
        pick    = VW'(v);
      end
  end

  logic          serve, is_pe, take;
  logic [1:0]    rd0;
  logic [MAXH-1:0][1:0] rrec;
  logic [N-1:0]  on_path;

  always_comb begin
    serve       = locked ? !empty[cur] : pick_ok;
    f           = head[locked ? cur : pick];
    fh          = hflit_t'(f);
    is_pe       = serve && fh.h.head && (fh.h.pclass == C_PE_FWD || fh.h.pclass == C_PE_RET);
    pop         = '0;
    take        = 1'b0;
    dlb_wr      = 1'b0;
    nd_rx_valid = 1'b0;
    nd_rx_data  = f;
    wen         = '0;
    rc_wdata    = '0;
    reverse_path(fh.h.rec_dir, fh.h.rec, fh.h.rec_len, rd0, rrec);
    on_path     = fh.h.visited;
    if (fh.h.pclass == C_PE_RET) on_path[fh.h.src] = 1'b1;
    on_path[me] = 1'b0;

    if (serve) begin
      if (is_pe) begin
        // a PE forward packet that needs an answer waits for room in the
        // return queue; an evicted one also needs deadlock-buffer space
        take = (fh.h.pclass == C_PE_RET || answered[fh.h.src] || !ret_full) &&
               !(fh.h.evict && dlb_full);
        dlb_wr = take && fh.h.pclass == C_PE_FWD && fh.h.evict;
        if (take) begin
          wen = on_path & ~path_valid;
          rc_wdata = (fh.h.pclass == C_PE_FWD) ? {rd0, rrec, fh.h.rec_len}
                                                 : {fh.h.rec_dir, fh.h.rec, fh.h.rec_len};
        end
      end else if ((fh.h.head && !fh.h.evict) || (!fh.h.head && !to_dlb)) begin
        nd_rx_valid = 1'b1;
        take        = nd_rx_ready;
      end else begin
        dlb_wr = !dlb_full;
        take   = !dlb_full;
      end
      pop[locked ? cur : pick] = take;
    end
  end

  route_cache #(.ADDR_W(ADDR_W), .DATA_W(RCW)) u_rc (
    .clk,
    .we   (|wen),
    .waddr(waddr),
    .wdata(rc_wdata),
    .raddr(raddr[nd_dst]),
    .rdata(rc_rdata)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      locked   <= 1'b0;
      cur      <= '0;
      to_dlb   <= 1'b0;
      answered <= '0;
    end else begin
      if (recovery_in_progress) answered <= '0;
      if (serve && take) begin
        if (fh.h.head) begin
          cur    <= pick;
          locked <= !fh.h.tail;
          to_dlb <= fh.h.evict;
        end else if (fh.h.tail) begin
          locked <= 1'b0;
        end
        if (ret_push) answered[fh.h.src] <= 1'b1;
      end
    end
  end

  // return packet header, built from the forward packet
  assign ret_push = serve && take && is_pe && fh.h.pclass == C_PE_FWD && !answered[fh.h.src];

  always_comb begin
    ret_new             = fh;
    ret_new.h.head      = 1'b1;
    ret_new.h.tail      = 1'b1;
    ret_new.h.pclass    = C_PE_RET;
    ret_new.h.src       = me;
    ret_new.h.dst       = fh.h.src;
    ret_new.h.ttl       = global_timer + ttl_win;
    ret_new.h.route_dir = rd0;
    ret_new.h.route     = rrec;
    ret_new.h.evict     = 1'b0;
  end

  // ---------------------------------------------------------- transmit side
  logic [V-1:0][DW-1:0] credits;
  logic [V-1:0]         has_cred;
  logic                 dropping, send_data;
  hflit_t               dh;

  hflit_t reinj_h, pe_h;

  // header of a re-injected packet and of a new PE forward packet
  always_comb begin
    reinj_h          = hflit_t'(dlb_head);
    reinj_h.h.ttl    = global_timer + ttl_win;
    if (reinj_h.h.pclass != C_PE_FWD) begin
      reinj_h.h.pclass = C_REINJ;
      reinj_h.h.evict  = 1'b0;
    end
    pe_h             = '0;
    pe_h.h.head      = 1'b1;
    pe_h.h.tail      = 1'b1;
    pe_h.h.pclass    = C_PE_FWD;
    pe_h.h.src       = me;
    pe_h.h.ttl       = global_timer + ttl_win;
    pe_h.h.route     = '1;
    pe_h.h.rec       = '1;
  end

  always_comb begin
    for (int v = 0; v < int'(V); v++) has_cred[v] = credits[v] != 0;
    tx_valid    = 1'b0;
    tx_vc       = '0;
    tx_data     = '0;
    dlb_rd      = 1'b0;
    nd_tx_ready = 1'b0;
    no_route    = 1'b0;
    send_data   = 1'b0;
    dh          = hflit_t'(nd_tx_data);
    if (!dlb_empty && has_cred[VC_REINJ]) begin
      dlb_rd   = 1'b1;
      tx_valid = 1'b1;
      tx_vc[VC_REINJ] = 1'b1;
      tx_data  = dlb_head;
      if (is_head(dlb_head)) tx_data = flit_t'(reinj_h);
    end else if (ret_pend && has_cred[VC_RET]) begin
      tx_valid = 1'b1;
      tx_vc[VC_RET] = 1'b1;
      tx_data  = ret_hdr;
    end else if (fwd_pend && has_cred[VC_FWD]) begin
      tx_valid   = 1'b1;
      tx_vc[VC_FWD] = 1'b1;
      tx_data    = flit_t'(pe_h);
    end else if (nd_tx_valid && (dropping || (dh.h.head && !path_valid[dh.h.dst]))) begin
      // no cached path: the packet is dropped
      nd_tx_ready = 1'b1;
      no_route    = dh.h.head;
    end else if (nd_tx_valid && has_cred[VC_DATA]) begin
      nd_tx_ready = 1'b1;
      send_data   = 1'b1;
      tx_valid    = 1'b1;
      tx_vc[VC_DATA] = 1'b1;
      tx_data     = nd_tx_data;
      if (dh.h.head) begin
        dh.h.pclass    = C_DATA;
        dh.h.src       = me;
        dh.h.ttl       = global_timer + ttl_win;
        {dh.h.route_dir, dh.h.route} = rc_rdata[RCW-1:LEN_W];
        tx_data        = flit_t'(dh);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      fwd_pend <= 1'b0;
      dropping <= 1'b0;
      dlb_cnt  <= '0;
      for (int v = 0; v < int'(V); v++) credits[v] <= DW'(DEPTH);
    end else begin
      if (pe_start) fwd_pend <= 1'b1;
      else if (tx_valid && tx_vc[VC_FWD]) fwd_pend <= 1'b0;
      if (nd_tx_valid && nd_tx_ready && !send_data)
        dropping <= !is_tail(nd_tx_data);
      else if (send_data)
        dropping <= 1'b0;
      dlb_cnt <= dlb_cnt + BW'(dlb_wr) - BW'(dlb_rd);
      for (int v = 0; v < int'(V); v++)
        credits[v] <= credits[v] - DW'(tx_vc[v]) + DW'(tx_credit[v]);
    end
  end

  assign ret_sent = tx_valid && tx_vc[VC_RET];
endmodule
