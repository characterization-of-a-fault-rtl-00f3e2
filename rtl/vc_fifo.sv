// vc_fifo: the flit buffer of one virtual channel.
//
// A first-in first-out queue of DEPTH flits with a combinational view of the
// oldest entry. Writes beyond the capacity are not allowed: the upstream
// side only sends with a credit, which the assertion checks. A read and a
// write may happen in the same cycle. Buffer depth is this design's choice.
module vc_fifo #(
  parameter int unsigned W     = noc_pkg::PHIT_W,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wr,
  input  logic [W-1:0] wdata,
  input  logic         rd,
  output logic [W-1:0] rdata,
  output logic         empty,
  output logic         full
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rp, wp;
  logic [CW-1:0] cnt;

  assign empty = (cnt == 0);
  assign full  = (cnt == CW'(DEPTH));
  assign rdata = mem[rp];

  always_ff @(posedge clk) begin
    if (rst) begin
      rp  <= '0;
      wp  <= '0;
      cnt <= '0;
    end else begin
      if (wr) begin
        mem[wp] <= wdata;
        wp      <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      end
      if (rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      cnt <= cnt + CW'(wr) - CW'(rd);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) !(wr && full && !rd));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(rd && empty));
endmodule
