// route_cache: the route-cache segment of the node's memory.
//
// Each word holds one cached path as it leaves this node: the absolute
// direction of the first hop, the turns of the later hops and the number of
// turns. The document keeps this segment in the node's ordinary memory,
// shared with the node processor; here it is a small dedicated array with
// one synchronous write port (path storage after path exploration) and one
// combinational read port (route lookup for an outgoing packet). The
// default depth covers one path per destination with room to spare, as the
// characterised configuration assumes the cache big enough for all
// destinations.
module route_cache #(
  parameter int unsigned ADDR_W = noc_pkg::NID_W + 1,
  parameter int unsigned DATA_W = 2 + 2 * noc_pkg::MAXH + noc_pkg::LEN_W
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
