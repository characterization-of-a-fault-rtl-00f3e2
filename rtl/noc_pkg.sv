// noc_pkg: constants, types and header-rewrite functions shared by the
// fault-tolerant torus router.
//
// The network is a k-ary 2-cube (torus) of K x K nodes. Each router has four
// network ports (N, E, S, W) and one local port to its node. A flit is one
// phit wide (PHIT_W bits) and carries its flit type in the two top bits. A
// header flit carries the packet class, source and destination node, a
// time-to-live stamp, a source route and, for path-exploration (PE) packets,
// the path history recorded so far plus the set of nodes already visited.
//
// Routes are written the way the paths are recorded: one absolute direction
// for the first hop, then one turn (straight, left, right) per later hop.
// The router consumes the first turn at every network hop and ejects a
// routed packet where its destination matches the node. The defaults follow
// the main configuration the router was characterised in: 4 VCs, 256-bit
// phits, 16 nodes (K = 4). Timer width, buffer depth and field encodings are
// this design's own choices.
package noc_pkg;

  // ---------------------------------------------------------------- config
  localparam int unsigned K       = 4;              // radix of the torus
  localparam int unsigned N       = K * K;          // number of nodes
  localparam int unsigned NID_W   = $clog2(N);      // node id width
  localparam int unsigned KC_W    = $clog2(K);      // coordinate width
  localparam int unsigned PHIT_W  = 256;            // phit (= flit) width
  localparam int unsigned NUM_VC  = 4;              // virtual channels per PC
  localparam int unsigned TW      = 16;             // timer width
  localparam int unsigned MAXH    = N - 1;          // longest simple path
  localparam int unsigned LEN_W   = $clog2(MAXH + 1);
  localparam int unsigned NPORT   = 5;              // N, E, S, W, local
  localparam int unsigned PE_HOPS = K + 1;          // PE flood hop limit

  // ----------------------------------------------------------- directions
  // Ports and travel directions share one encoding. Going north decrements
  // the row, going east increments the column.
  typedef enum logic [2:0] {
    P_N = 3'd0, P_E = 3'd1, P_S = 3'd2, P_W = 3'd3, P_L = 3'd4
  } port_e;

  typedef enum logic [1:0] {
    T_STRAIGHT = 2'd0, T_LEFT = 2'd1, T_RIGHT = 2'd2, T_NONE = 2'd3
  } turn_e;

  typedef enum logic [1:0] {
    C_PE_FWD = 2'd0,   // path exploration, forward
    C_PE_RET = 2'd1,   // path exploration, return to source
    C_DATA   = 2'd2,   // data packet on a cached path
    C_REINJ  = 2'd3    // data packet re-injected from a deadlock buffer
  } pclass_e;

  // ------------------------------------------------------------ the header
  typedef struct packed {
    logic                 head;       // first flit of a packet
    logic                 tail;       // last flit of a packet
    pclass_e              pclass;
    logic [NID_W-1:0]     src;
    logic [NID_W-1:0]     dst;
    logic [TW-1:0]        ttl;        // deadline in global-timer ticks
    logic [1:0]           route_dir;  // first hop of the route (absolute)
    logic [MAXH-1:0][1:0] route;      // turns, route[0] used next
    logic [LEN_W-1:0]     rec_len;    // number of turns recorded
    logic [1:0]           rec_dir;    // recorded first hop (absolute)
    logic [MAXH-1:0][1:0] rec;        // recorded turns, rec[0] first
    logic [N-1:0]         visited;    // nodes on the recorded path
    logic                 evict;      // moved to a deadlock buffer
    logic [1:0]           pe_tdir;    // PE: travel direction on arrival
    logic [3:0]           pe_todo;    // PE: network ports still to explore
  } hdr_t;

  localparam int unsigned HDR_W = $bits(hdr_t);
  localparam int unsigned PAY_W = PHIT_W - HDR_W;

  typedef struct packed {
    hdr_t              h;
    logic [PAY_W-1:0]  pay;
  } hflit_t;

  // Every flit, body flits included, keeps head and tail in its top bits.
  typedef logic [PHIT_W-1:0] flit_t;

  function automatic logic is_head(input flit_t f);
    return f[PHIT_W-1];
  endfunction

  function automatic logic is_tail(input flit_t f);
    return f[PHIT_W-2];
  endfunction

  // --------------------------------------------------------- turn helpers
  function automatic logic [1:0] turn_left(input logic [1:0] d);
    return d + 2'd3;
  endfunction

  function automatic logic [1:0] turn_right(input logic [1:0] d);
    return d + 2'd1;
  endfunction

  function automatic logic [1:0] opposite(input logic [1:0] d);
    return d + 2'd2;
  endfunction

  // Absolute direction after applying turn t to travel direction d.
  function automatic logic [1:0] apply_turn(input logic [1:0] d,
                                            input logic [1:0] t);
    unique case (t)
      T_LEFT:  return turn_left(d);
      T_RIGHT: return turn_right(d);
      default: return d;
    endcase
  endfunction

  // Turn that takes travel direction d to absolute direction o (no U-turn).
  function automatic logic [1:0] turn_of(input logic [1:0] d,
                                         input logic [1:0] o);
    if (o == d)                 return T_STRAIGHT;
    else if (o == turn_left(d)) return T_LEFT;
    else                        return T_RIGHT;
  endfunction

  // Neighbour of node id in direction d on the torus.
  function automatic logic [NID_W-1:0] neighbour(input logic [NID_W-1:0] id,
                                                 input logic [1:0] d);
    logic [KC_W-1:0] r, c;
    r = KC_W'(id / K);
    c = KC_W'(id % K);
    unique case (d)
      2'd0: r = (r == 0)            ? KC_W'(K - 1) : r - 1'b1;
      2'd1: c = (c == KC_W'(K - 1)) ? '0           : c + 1'b1;
      2'd2: r = (r == KC_W'(K - 1)) ? '0           : r + 1'b1;
      default: c = (c == 0)         ? KC_W'(K - 1) : c - 1'b1;
    endcase
    return NID_W'(r * K + c);
  endfunction

  // Reverse of a recorded path. The path starts with absolute direction d0
  // and takes turns rec[0..len-1]; the reverse starts against the final
  // travel direction and takes the turns backwards with left and right
  // swapped.
  function automatic void reverse_path(input  logic [1:0]           d0,
                                       input  logic [MAXH-1:0][1:0] rec,
                                       input  logic [LEN_W-1:0]     len,
                                       output logic [1:0]           rd0,
                                       output logic [MAXH-1:0][1:0] rrec);
    logic [1:0] d;
    d    = d0;
    rrec = '1;                             // all T_NONE
    for (int i = 0; i < MAXH; i++)
      if (i < int'(len)) d = apply_turn(d, rec[i]);
    rd0 = opposite(d);
    for (int i = 0; i < MAXH; i++) begin
      if (i < int'(len)) begin
        unique case (rec[int'(len) - 1 - i])
          T_LEFT:  rrec[i] = T_RIGHT;
          T_RIGHT: rrec[i] = T_LEFT;
          default: rrec[i] = T_STRAIGHT;
        endcase
      end
    end
  endfunction

  // ------------------------------------------------------- header rewrite
  // Applied when a header flit that arrived on port in_p is latched into an
  // output VC of port out_p of router `me`.
  //  * PE forward leaving the source: record the output direction.
  //  * PE forward leaving an intermediate node: record the turn taken.
  //  * PE forward re-injected from a deadlock buffer: record the turn from
  //    the travel direction saved when it was moved to the buffer.
  //  * PE forward delivered to the local node: the record is kept and the
  //    travel direction on arrival is saved in pe_tdir.
  //  * routed packets leaving on a network port after a network hop: the
  //    turn just used is removed from the route.
  //  * routed packets delivered to the local port after a network hop:
  //    the next turn is folded into route_dir so that the packet can be
  //    re-injected from a deadlock buffer with its remaining route.
  function automatic flit_t hdr_update(input flit_t f,
                                       input logic [2:0] in_p,
                                       input logic [2:0] out_p,
                                       input logic [NID_W-1:0] me);
    hflit_t     x;
    logic [1:0] tdir;
    x = hflit_t'(f);
    if (!x.h.head) return f;
    tdir = opposite(in_p[1:0]);              // travel direction on arrival
    if (x.h.pclass == C_PE_FWD) begin
      if (out_p == P_L) begin
        if (in_p != P_L) x.h.pe_tdir = tdir;
      end else if (in_p == P_L && !x.h.evict) begin
        x.h.rec_dir = out_p[1:0];
        x.h.rec_len = '0;
        x.h.visited = N'(1) << me;
      end else begin
        // a re-injected packet continues from its recorded arrival
        if (in_p == P_L) tdir = x.h.pe_tdir;
        x.h.rec[x.h.rec_len] = turn_of(tdir, out_p[1:0]);
        x.h.rec_len          = x.h.rec_len + 1'b1;
        x.h.visited[me]      = 1'b1;
        x.h.evict            = 1'b0;
      end
    end else if (in_p != P_L) begin
      if (out_p == P_L) x.h.route_dir = apply_turn(tdir, x.h.route[0]);
      x.h.route = {T_NONE, x.h.route[MAXH-1:1]};
    end
    return flit_t'(x);
  endfunction

endpackage
