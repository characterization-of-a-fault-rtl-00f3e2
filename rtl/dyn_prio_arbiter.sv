// dyn_prio_arbiter: the arbiter of an output port that grants one output VC
// per cycle to one of the input VCs requesting the port.
//
// Each request carries a dynamic priority level that its input VC computes
// every cycle: 2 for return flits and re-injected packets, 1 for forward
// packets that have been marked deadlocked, 0 for other forward packets.
// The arbiter grants the highest level present; among requests of that
// level it grants round robin, starting after the client granted last. The
// three levels and their order follow the document; the round robin inside
// a level is this design's choice. A grant is given only while `enable` is
// high (a free output VC exists). Combinational grant, registered pointer.
module dyn_prio_arbiter #(
  parameter int unsigned C = 20        // clients (input VCs)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 enable,
  input  logic [C-1:0]         req,
  input  logic [C-1:0][1:0]    level,
  output logic [C-1:0]         gnt,
  output logic [$clog2(C)-1:0] gnt_idx,
  output logic                 gnt_valid
);
  localparam int unsigned IW = $clog2(C);

  logic [IW-1:0] last;
  logic [1:0]    top;
  logic [C-1:0]  cand;

  always_comb begin
    top = 2'd0;
    for (int c = 0; c < int'(C); c++)
      if (req[c] && level[c] > top) top = level[c];
    for (int c = 0; c < int'(C); c++)
      cand[c] = req[c] && (level[c] == top);

    gnt       = '0;
    gnt_idx   = '0;
    gnt_valid = 1'b0;
    // Search C clients starting one after the last grant.
    for (int s = 1; s <= int'(C); s++) begin
      int unsigned c;
      c = (int'(last) + s) % C;
      if (!gnt_valid && cand[c] && enable) begin
        gnt_valid = 1'b1;
        gnt_idx   = IW'(c);
      end
    end
    if (gnt_valid) gnt[gnt_idx] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst)            last <= IW'(C - 1);
    else if (gnt_valid) last <= gnt_idx;
  end
endmodule
