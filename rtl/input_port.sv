// input_port: one input port of the router with its V input VCs.
//
// Flits arrive on the physical channel with a one-hot V-bit VC index and are
// written into that VC's buffer; a flit arriving on a link marked faulty is
// dropped. Each time a VC frees a slot, its bit of the V-bit credit bus is
// pulsed for one cycle.
//
// A header at the front of a VC buffer is routed here:
//  * Path-exploration (PE) forward packet injected by the local node: sent
//    to all four network ports.
//  * PE forward packet from the network: delivered to the local node and
//    forwarded to every neighbour not yet on its path (the header carries
//    the set of visited nodes); never back out of the arrival port. Once
//    the path is PE_HOPS hops long the packet is only delivered: this
//    limit is this design's choice, the flood otherwise follows every
//    self-avoiding walk of the torus.
//  * Routed packet (PE return, data, re-injected data): ejected to the local
//    port at its destination; otherwise sent in the direction of the route's
//    first hop (at injection) or after its next turn (after a network hop).
// The header requests all its output ports at once and leaves the buffer when
// every one of them has granted; grants may come in different cycles. A
// packet that is not a single flit is unicast: after its header, its body
// flits follow (body_valid) into the output VC the header reserved.
//
// Deadlock handling: a forward header whose time-to-live has passed
// (deadlock_detect) is marked deadlocked, and stays marked while it waits,
// and requests at priority 1 instead of 0; PE return and re-injected packets always request at priority 2. A
// deadlocked data header that is still stuck DL_GRACE cycles later is sent to
// the local node's deadlock buffer instead, if it has room; if not, the
// port raises dl_exception while the header waits. The priorities and the
// use of node memory as deadlock buffer follow the document; the grace
// period before moving a packet to the buffer is this design's choice.
module input_port
  import noc_pkg::*;
#(
  parameter int unsigned V        = NUM_VC,
  parameter int unsigned DEPTH    = 4,
  parameter int unsigned DL_GRACE = 8,
  parameter logic [2:0]  MYPORT   = 3'(P_N)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [NID_W-1:0]       me,
  input  logic [TW-1:0]          global_timer,
  input  logic                   link_faulty,
  input  logic                   dlb_room,
  // physical channel
  input  logic                   pc_valid,
  input  logic [V-1:0]           pc_vc,
  input  flit_t                  pc_data,
  output logic [V-1:0]           credit_out,
  // towards the output ports
  output logic [V-1:0]           hdr_req,
  output logic [V-1:0][NPORT-1:0] req_mask,
  output logic [V-1:0][1:0]      level,
  output logic [V-1:0]           body_valid,
  output flit_t [V-1:0]          data,
  input  logic [V-1:0][NPORT-1:0] hdr_gnt,
  input  logic [V-1:0]           body_ack,
  output logic                   dl_exception
);
  localparam int unsigned SW = $clog2(DL_GRACE + 1);

  logic [V-1:0]            empty, full, pop, active, is_hdr, dl;
  logic [V-1:0][NPORT-1:0] done, mask;
  logic [V-1:0][SW-1:0]    stall;
  logic [V-1:0]            exc, dl_mark;
  flit_t [V-1:0]           head;

  // route computation for one header
  function automatic logic [NPORT-1:0] route_mask(input flit_t f,
                                                  input logic [NID_W-1:0] id);
    hflit_t           x;
    logic [NPORT-1:0] m;
    logic [1:0]       tdir;
    x    = hflit_t'(f);
    m    = '0;
    tdir = opposite(MYPORT[1:0]);
    if (x.h.pclass == C_PE_FWD) begin
      if (MYPORT == P_L) begin
        m[3:0] = x.h.evict ? x.h.pe_todo : 4'b1111;
      end else begin
        m[P_L] = 1'b1;
        // the flood stops once the path is PE_HOPS hops long
        for (int d = 0; d < 4; d++)
          if (int'(x.h.rec_len) + 1 < PE_HOPS && 2'(d) != MYPORT[1:0] &&
              !x.h.visited[neighbour(id, 2'(d))])
            m[d] = 1'b1;
      end
    end else if (x.h.dst == id) begin
      m[P_L] = 1'b1;
    end else if (MYPORT == P_L) begin
      m[3'(x.h.route_dir)] = 1'b1;
    end else begin
      m[3'(apply_turn(tdir, x.h.route[0]))] = 1'b1;
    end
    return m;
  endfunction

  for (genvar v = 0; v < V; v++) begin : g_vc
    hflit_t hf, ev;
    logic   fwd, ddl, divert;

    vc_fifo #(.W(PHIT_W), .DEPTH(DEPTH)) u_buf (
      .clk, .rst,
      .wr   (pc_valid && pc_vc[v] && !link_faulty),
      .wdata(pc_data),
      .rd   (pop[v]),
      .rdata(head[v]),
      .empty(empty[v]),
      .full (full[v])
    );

    assign hf        = hflit_t'(head[v]);
    assign is_hdr[v] = !empty[v] && !active[v] && hf.h.head;
    assign fwd       = (hf.h.pclass == C_PE_FWD && !(MYPORT == P_L && hf.h.evict)) ||
                       (hf.h.pclass == C_DATA);

    deadlock_detect #(.TW(TW)) u_dl (
      .header_flit (is_hdr[v] && fwd),
      .global_timer(global_timer),
      .flit_timer  (hf.h.ttl),
      .deadlocked  (ddl)
    );
    assign dl[v] = ddl || dl_mark[v];

    always_comb begin
      divert    = 1'b0;
      exc[v]    = 1'b0;
      mask[v]   = route_mask(head[v], me);
      data[v]   = head[v];
      if (MYPORT != P_L && fwd && !(hf.h.pclass == C_DATA && hf.h.dst == me) &&
          dl[v] && stall[v] == SW'(DL_GRACE)) begin
        if (dlb_room) divert = 1'b1;
        else          exc[v] = 1'b1;
      end
      // to the deadlock buffer; a PE packet takes the ports it still has to
      // explore and its arrival direction along
      ev           = hf;
      ev.h.evict   = 1'b1;
      ev.h.pe_todo = mask[v][3:0] & ~done[v][3:0];
      ev.h.pe_tdir = opposite(MYPORT[1:0]);
      if (divert) data[v] = flit_t'(ev);
      req_mask[v]   = divert ? NPORT'(1) << P_L : mask[v] & ~done[v];
      hdr_req[v]    = is_hdr[v];
      level[v]      = (hf.h.pclass == C_PE_RET || hf.h.pclass == C_REINJ ||
                       (hf.h.pclass == C_PE_FWD && hf.h.evict && MYPORT == P_L)) ? 2'd2 :
                      dl[v] ? 2'd1 : 2'd0;
      body_valid[v] = !empty[v] && active[v];
    end

    // the read enable depends on the grants, kept apart from the requests
    assign pop[v] = (is_hdr[v] && ((req_mask[v] & ~hdr_gnt[v]) == '0)) ||
                    (body_valid[v] && body_ack[v]);

    always_ff @(posedge clk) begin
      if (rst) begin
        active[v]  <= 1'b0;
        done[v]    <= '0;
        stall[v]   <= '0;
        dl_mark[v] <= 1'b0;
      end else begin
        if (is_hdr[v]) begin
          if (pop[v]) begin
            done[v]    <= '0;
            stall[v]   <= '0;
            dl_mark[v] <= 1'b0;
            active[v]  <= !hf.h.tail;
          end else begin
            done[v]    <= done[v] | (req_mask[v] & hdr_gnt[v]);
            dl_mark[v] <= dl[v];
            if (dl[v] && stall[v] != SW'(DL_GRACE)) stall[v] <= stall[v] + 1'b1;
          end
        end else if (body_valid[v] && body_ack[v] && is_tail(head[v])) begin
          active[v] <= 1'b0;
        end
      end
    end
  end

  assign credit_out   = pop;
  assign dl_exception = |exc;
endmodule
