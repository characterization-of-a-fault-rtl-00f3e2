// link_fault_reg: fault status of the router's four network links.
//
// Built-in self test reports, per direction, whether the incoming and the
// outgoing link failed. A direction is marked faulty when either of them
// failed, because a forward path is only usable if the return path along the
// same links works too; the mark then applies to both links of that
// direction. Marks are sticky until `clear` (start of a new test and recover
// phase) or reset. The status is kept locally and is not sent to other
// routers. One clock edge from a reported failure to the mark.
module link_fault_reg (
  input  logic       clk,
  input  logic       rst,
  input  logic       clear,
  input  logic [3:0] in_link_fail,
  input  logic [3:0] out_link_fail,
  output logic [3:0] faulty
);
  always_ff @(posedge clk) begin
    if (rst || clear) faulty <= '0;
    else              faulty <= faulty | in_link_fail | out_link_fail;
  end
endmodule
