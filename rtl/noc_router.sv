// noc_router: five-port router of the fault-tolerant k-ary 2-cube torus.
//
// Ports 0..3 are the network directions N, E, S, W; port 4 is the local
// port to the node. Every port carries phit-wide flits, a one-hot V-bit VC
// index and, in the opposite direction, a V-bit credit bus. Each input port
// routes the headers at the front of its VCs (source routing for data and
// return packets, flooding to unvisited neighbours for path exploration) and
// requests the output ports; each output port grants one output VC per
// cycle by dynamic priority and multiplexes its VCs onto the physical channel
// first come, first served. A U-turn is never requested, so each output VC
// effectively has the V VCs of the four other inputs as clients.
//
// Fault information is local: a direction whose incoming or outgoing link
// failed self test is marked faulty; its input drops arriving flits and its
// output grants and drops every request.
//
// Best-case latency through the router is two cycles: a flit on an input
// channel is written into the input buffer at the first clock edge, is
// routed, arbitrated and latched into an output VC at the second, and is on
// the outgoing channel in the cycle after that. Every port can move one phit
// per cycle, so a packet streams at the full phit width per clock.
module noc_router
  import noc_pkg::*;
#(
  parameter int unsigned V        = NUM_VC,
  parameter int unsigned DEPTH    = 4,
  parameter int unsigned DL_GRACE = 8
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic [NID_W-1:0]             me,
  input  logic [TW-1:0]                global_timer,
  // self-test results and recovery
  input  logic                         fault_clear,
  input  logic [3:0]                   in_link_fail,
  input  logic [3:0]                   out_link_fail,
  output logic [3:0]                   link_faulty,
  // incoming channels
  input  logic [NPORT-1:0]             in_valid,
  input  logic [NPORT-1:0][V-1:0]      in_vc,
  input  flit_t [NPORT-1:0]            in_data,
  output logic [NPORT-1:0][V-1:0]      in_credit,
  // outgoing channels
  output logic [NPORT-1:0]             out_valid,
  output logic [NPORT-1:0][V-1:0]      out_vc,
  output flit_t [NPORT-1:0]            out_data,
  input  logic [NPORT-1:0][V-1:0]      out_credit,
  // deadlock buffer at the node
  input  logic                         dlb_room,
  output logic                         dl_exception
);
  localparam int unsigned C = NPORT * V;

  logic [C-1:0]            hdr_req, body_valid, body_ack;
  logic [C-1:0][1:0]       level;
  flit_t [C-1:0]           cdata;
  logic [C-1:0][NPORT-1:0] req_mask, gnt;
  logic [NPORT-1:0][C-1:0] port_req, port_gnt, port_ack;
  logic [NPORT-1:0]        exc;

  link_fault_reg u_faults (
    .clk, .rst,
    .clear        (fault_clear),
    .in_link_fail (in_link_fail),
    .out_link_fail(out_link_fail),
    .faulty       (link_faulty)
  );

  for (genvar p = 0; p < NPORT; p++) begin : g_in
    input_port #(.V(V), .DEPTH(DEPTH), .DL_GRACE(DL_GRACE),
                 .MYPORT(3'(p))) u_in (
      .clk, .rst, .me, .global_timer,
      .link_faulty (p < 4 ? link_faulty[p % 4] : 1'b0),
      .dlb_room,
      .pc_valid    (in_valid[p]),
      .pc_vc       (in_vc[p]),
      .pc_data     (in_data[p]),
      .credit_out  (in_credit[p]),
      .hdr_req     (hdr_req[p*V +: V]),
      .req_mask    (req_mask[p*V +: V]),
      .level       (level[p*V +: V]),
      .body_valid  (body_valid[p*V +: V]),
      .data        (cdata[p*V +: V]),
      .hdr_gnt     (gnt[p*V +: V]),
      .body_ack    (body_ack[p*V +: V]),
      .dl_exception(exc[p])
    );
  end

  always_comb begin
    for (int o = 0; o < int'(NPORT); o++)
      for (int c = 0; c < int'(C); c++)
        port_req[o][c] = hdr_req[c] && req_mask[c][o];
  end

  always_comb begin
    for (int o = 0; o < int'(NPORT); o++)
      for (int c = 0; c < int'(C); c++)
        gnt[c][o] = port_gnt[o][c];
    body_ack = '0;
    for (int o = 0; o < int'(NPORT); o++) body_ack |= port_ack[o];
  end

  for (genvar o = 0; o < NPORT; o++) begin : g_out
    output_port #(.V(V), .NIN(NPORT), .DEPTH(DEPTH), .MYPORT(3'(o))) u_out (
      .clk, .rst, .me,
      .link_faulty(o < 4 ? link_faulty[o % 4] : 1'b0),
      .hdr_req    (port_req[o]),
      .hdr_level  (level),
      .body_valid (body_valid),
      .data_in    (cdata),
      .hdr_gnt    (port_gnt[o]),
      .body_ack   (port_ack[o]),
      .pc_valid   (out_valid[o]),
      .pc_vc      (out_vc[o]),
      .pc_data    (out_data[o]),
      .credit_in  (out_credit[o])
    );
  end

  assign dl_exception = |exc;
endmodule
