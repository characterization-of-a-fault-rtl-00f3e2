// ft_noc_torus: a K x K torus (k-ary 2-cube) network of fault-tolerant
// routers, each with its local-port logic (node_if).
//
// Router r's output in direction d drives the input of its neighbour in that
// direction on the opposite side; credits flow back the same way. A free-
// running global timer gives all routers the same time base for the
// time-to-live check. Self-test results come in per node and direction; a
// failed link is reported to the routers at both of its ends, so both mark
// it. The node-processor side of every node (packet injection and delivery,
// exploration start, status) is brought out as ports.
//
// Operation: after reset or a fault, assert recovery_in_progress for a cycle
// and pulse pe_start at the nodes that should explore (all of them for a full
// route cache); paths are cached as return packets arrive. Afterwards the
// nodes send data packets by destination, and the routers source-route them
// over the cached paths.
module ft_noc_torus
  import noc_pkg::*;
#(
  parameter int unsigned V           = NUM_VC,
  parameter int unsigned DEPTH       = 4,
  parameter int unsigned DL_GRACE    = 8,
  parameter int unsigned ADDR_W      = NID_W + 1,
  parameter int unsigned DLB_DEPTH   = 64
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   recovery_in_progress,
  input  logic                   fault_clear,
  input  logic [N-1:0]           pe_start,
  input  logic [TW-1:0]          ttl_win,
  input  logic [N-1:0][3:0]      link_fail,
  input  logic [ADDR_W-1:0]      seg_base,
  input  logic [ADDR_W-1:0]      max_entries,
  // node processors
  input  logic [N-1:0]           nd_tx_valid,
  input  flit_t [N-1:0]          nd_tx_data,
  output logic [N-1:0]           nd_tx_ready,
  output logic [N-1:0]           nd_rx_valid,
  output flit_t [N-1:0]          nd_rx_data,
  input  logic [N-1:0]           nd_rx_ready,
  output logic [N-1:0]           no_route,
  output logic [N-1:0]           dl_exception,
  output logic [N-1:0][N-1:0]    path_valid,
  output logic [N-1:0]           ret_sent,
  output logic [N-1:0][3:0]      link_faulty,
  output logic [TW-1:0]          global_timer
);
  logic [N-1:0][NPORT-1:0]         in_valid, out_valid;
  logic [N-1:0][NPORT-1:0][V-1:0]  in_vc, out_vc, in_credit, out_credit;
  flit_t [N-1:0][NPORT-1:0]        in_data, out_data;
  logic [N-1:0]                    dlb_room;
  logic [N-1:0][3:0]               fail_seen;

  always_ff @(posedge clk) begin
    if (rst) global_timer <= '0;
    else     global_timer <= global_timer + 1'b1;
  end

  // network links
  always_comb begin
    for (int r = 0; r < int'(N); r++) begin
      for (int d = 0; d < 4; d++) begin
        int unsigned nb;
        nb = int'(neighbour(NID_W'(r), 2'(d)));
        in_valid[nb][3'(opposite(2'(d)))]   = out_valid[r][d];
        in_vc[nb][3'(opposite(2'(d)))]      = out_vc[r][d];
        in_data[nb][3'(opposite(2'(d)))]    = out_data[r][d];
        out_credit[r][d]                = in_credit[nb][3'(opposite(2'(d)))];
        fail_seen[r][d] = link_fail[r][d] || link_fail[nb][opposite(2'(d))];
      end
    end
  end

  for (genvar r = 0; r < N; r++) begin : g_node
    noc_router #(.V(V), .DEPTH(DEPTH), .DL_GRACE(DL_GRACE)) u_router (
      .clk, .rst,
      .me           (NID_W'(r)),
      .global_timer,
      .fault_clear  (fault_clear),
      .in_link_fail (fail_seen[r]),
      .out_link_fail(fail_seen[r]),
      .link_faulty  (link_faulty[r]),
      .in_valid     (in_valid[r]),
      .in_vc        (in_vc[r]),
      .in_data      (in_data[r]),
      .in_credit    (in_credit[r]),
      .out_valid    (out_valid[r]),
      .out_vc       (out_vc[r]),
      .out_data     (out_data[r]),
      .out_credit   (out_credit[r]),
      .dlb_room     (dlb_room[r]),
      .dl_exception (dl_exception[r])
    );

    node_if #(.V(V), .DEPTH(DEPTH), .ADDR_W(ADDR_W), .DLB_DEPTH(DLB_DEPTH)) u_nif (
      .clk, .rst,
      .me          (NID_W'(r)),
      .global_timer,
      .recovery_in_progress,
      .pe_start    (pe_start[r]),
      .ttl_win,
      .seg_base, .max_entries,
      .rx_valid    (out_valid[r][P_L]),
      .rx_vc       (out_vc[r][P_L]),
      .rx_data     (out_data[r][P_L]),
      .rx_credit   (out_credit[r][P_L]),
      .tx_valid    (in_valid[r][P_L]),
      .tx_vc       (in_vc[r][P_L]),
      .tx_data     (in_data[r][P_L]),
      .tx_credit   (in_credit[r][P_L]),
      .nd_tx_valid (nd_tx_valid[r]),
      .nd_tx_data  (nd_tx_data[r]),
      .nd_tx_ready (nd_tx_ready[r]),
      .nd_rx_valid (nd_rx_valid[r]),
      .nd_rx_data  (nd_rx_data[r]),
      .nd_rx_ready (nd_rx_ready[r]),
      .no_route    (no_route[r]),
      .dlb_room    (dlb_room[r]),
      .path_valid  (path_valid[r]),
      .ret_sent    (ret_sent[r])
    );
  end
endmodule
