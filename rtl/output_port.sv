// output_port: one output port of the router with its V output VCs.
//
// Header flits: every input VC whose header wants this port raises a request
// with its priority level. The dynamic priority arbiter grants one request
// per cycle while an output VC is free (not reserved and empty); the lowest
// free VC is taken. In the same cycle the header, rewritten for this hop,
// is latched into that VC's one-flit register and, unless the header is also
// the tail, the VC stays reserved for the granted input VC until its tail
// passes. Body flits: the input VC owning a reserved output VC raises
// body_valid; the flit is taken when the VC register is empty or is being
// sent in the same cycle.
//
// Physical channel: the FCFS arbiter picks, among VCs holding a flit and
// having a credit, the one that has waited longest. Its flit goes out with
// a one-hot V-bit VC index. A credit counter per VC tracks the free slots
// of the matching downstream input VC; the downstream port returns one
// credit bit per VC (a V-bit credit bus) each time it frees a slot.
//
// Faulty link: if the port's link is marked faulty, every header request is
// granted at once and the flit is dropped, so path-exploration packets that
// try the link release their resources. Only path-exploration packets ever
// request a faulty link.
//
// Timing: request to latched flit is one clock edge; a latched flit can leave
// on the PC in the next cycle. The structure (arbiter, per-VC registers,
// FCFS PC arbiter, PC multiplexer, grant forced by a faulty link) follows
// the document's output-port diagram; register depth and credit scheme
// details are this design's.
module output_port
  import noc_pkg::*;
#(
  parameter int unsigned V      = NUM_VC,
  parameter int unsigned NIN    = NPORT,           // input ports
  parameter int unsigned DEPTH  = 4,               // downstream buffer depth
  parameter logic [2:0]  MYPORT = 3'(P_N)
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [NID_W-1:0]          me,
  input  logic                      link_faulty,
  // from all input VCs, client c = port * V + vc
  input  logic [NIN*V-1:0]          hdr_req,
  input  logic [NIN*V-1:0][1:0]     hdr_level,
  input  logic [NIN*V-1:0]          body_valid,
  input  flit_t [NIN*V-1:0]         data_in,
  output logic [NIN*V-1:0]          hdr_gnt,
  output logic [NIN*V-1:0]          body_ack,
  // physical channel
  output logic                      pc_valid,
  output logic [V-1:0]              pc_vc,
  output flit_t                     pc_data,
  input  logic [V-1:0]              credit_in
);
  localparam int unsigned C  = NIN * V;
  localparam int unsigned CW = $clog2(C);
  localparam int unsigned VW = $clog2(V);
  localparam int unsigned DW = $clog2(DEPTH + 1);

  logic [V-1:0]          reserved, dvalid;
  logic [V-1:0][CW-1:0]  owner;
  flit_t [V-1:0]         dreg;
  logic [V-1:0][DW-1:0]  credits;

  logic          any_free;
  logic [VW-1:0] free_idx;
  logic [C-1:0]  arb_gnt;
  logic [CW-1:0] arb_idx;
  logic          arb_valid;

  logic [V-1:0]  sel, load, eligible, space, take_body;
  logic [VW-1:0] sel_idx;
  logic          sel_valid;

  // lowest free output VC
  always_comb begin
    any_free = 1'b0;
    free_idx = '0;
    for (int i = V - 1; i >= 0; i--)
      if (!reserved[i] && !dvalid[i]) begin
        any_free = 1'b1;
        free_idx = VW'(i);
      end
  end

  dyn_prio_arbiter #(.C(C)) u_arb (
    .clk, .rst,
    .enable   (any_free && !link_faulty),
    .req      (hdr_req),
    .level    (hdr_level),
    .gnt      (arb_gnt),
    .gnt_idx  (arb_idx),
    .gnt_valid(arb_valid)
  );

  // a faulty link grants every request and the flits are dropped
  assign hdr_gnt = link_faulty ? hdr_req : arb_gnt;

  always_comb begin
    for (int i = 0; i < int'(V); i++) begin
      eligible[i]  = dvalid[i] && (credits[i] != 0);
      space[i]     = !dvalid[i] || sel[i];
      take_body[i] = reserved[i] && body_valid[owner[i]] && space[i];
    end
    body_ack = '0;
    for (int i = 0; i < int'(V); i++)
      if (take_body[i]) body_ack[owner[i]] = 1'b1;
    load = take_body;
    if (arb_valid) load[free_idx] = 1'b1;
  end

  fcfs_arbiter #(.V(V)) u_fcfs (
    .clk, .rst,
    .waiting  (dvalid),
    .load     (load),
    .eligible (eligible),
    .sel      (sel),
    .sel_idx  (sel_idx),
    .sel_valid(sel_valid)
  );

  assign pc_valid = sel_valid;
  assign pc_vc    = sel;
  assign pc_data  = dreg[sel_idx];

  always_ff @(posedge clk) begin
    if (rst) begin
      reserved <= '0;
      dvalid   <= '0;
      for (int i = 0; i < int'(V); i++) credits[i] <= DW'(DEPTH);
    end else begin
      for (int i = 0; i < int'(V); i++) begin
        credits[i] <= credits[i] - DW'(sel[i]) + DW'(credit_in[i]);
        if (sel[i]) dvalid[i] <= 1'b0;
        if (take_body[i]) begin
          dreg[i]   <= data_in[owner[i]];
          dvalid[i] <= 1'b1;
          if (is_tail(data_in[owner[i]])) reserved[i] <= 1'b0;
        end
      end
      if (arb_valid) begin
        dreg[free_idx]   <= hdr_update(data_in[arb_idx], 3'(arb_idx / V),
                                       MYPORT, me);
        dvalid[free_idx] <= 1'b1;
        owner[free_idx]  <= arb_idx;
        reserved[free_idx] <= !is_tail(data_in[arb_idx]);
      end
    end
  end

  // a credit never returns to a full counter
  a_credit_bound: assert property (@(posedge clk) disable iff (rst)
    !(credit_in[0] && credits[0] == DW'(DEPTH) && !sel[0]));
  // the PC only carries a VC that has a credit
  a_pc_credit: assert property (@(posedge clk) disable iff (rst)
    pc_valid |-> (credits[sel_idx] != 0));
endmodule
