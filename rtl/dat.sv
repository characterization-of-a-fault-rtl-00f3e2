// dat: destination address table (DAT) of the route cache.
//
// The route cache lives in a segment of the node's memory. The DAT keeps, for
// every destination node (i,j), a valid bit and a pointer to the route-cache
// word that holds a path to it, so a lookup is one indexed read instead of
// an associative search. A new path is written to the next free word of the
// segment: a counter, modulo the maximum number of entries, is added to the
// segment base address to form the write address. One write can set the
// pointers of several destinations at once (every node on the new path that
// had no path yet); the counter advances once per write. The valid bits are
// cleared while recovery (path exploration after a fault) is in progress;
// the counter is cleared by reset. Lowering the segment size below the
// counter value wraps the counter, which the owner must treat as truncation.
//
// Timing: the pointers and valid bits are registers updated on the clock
// edge of the write; lookups are combinational.
module dat #(
  parameter int unsigned N      = noc_pkg::N,   // destinations
  parameter int unsigned ADDR_W = 8             // node memory address width
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    recovery_in_progress,
  input  logic [ADDR_W-1:0]       seg_base,      // segment address register
  input  logic [ADDR_W-1:0]       max_entries,   // segment size, >= 1
  input  logic [N-1:0]            wen,           // one bit per destination
  output logic [ADDR_W-1:0]       waddr,         // where the path goes
  output logic [N-1:0]            valid,
  output logic [N-1:0][ADDR_W-1:0] raddr
);
  logic              wen_any;
  logic [ADDR_W-1:0] count;

  assign wen_any = |wen;
  assign waddr   = seg_base + count;

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
    end else if (wen_any) begin
      count <= (count + 1'b1 >= max_entries) ? '0 : count + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    for (int d = 0; d < int'(N); d++) begin
      if (rst || recovery_in_progress) valid[d] <= 1'b0;
      else if (wen[d])                 valid[d] <= 1'b1;
      if (wen[d]) raddr[d] <= waddr;
    end
  end
endmodule
