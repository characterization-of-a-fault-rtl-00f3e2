// fcfs_arbiter: first-come-first-served arbiter for the output VCs of one
// port contending for its physical channel (PC).
//
// Output VCs are not given fixed time slots on the PC. Whenever an output VC
// receives a flit (`load`), it joins the queue behind every VC that already
// holds a flit. Each cycle the oldest VC that is eligible (holds a flit and
// has a credit for the downstream buffer) is selected, so idle PC bandwidth
// goes to whichever VCs have work. The order is kept in an age matrix:
// older[i][j] is set when VC i has been waiting longer than VC j. VCs
// loaded in the same cycle are ordered by index. The FCFS policy is the
// document's; the age matrix is this design's implementation of it.
// Selection is combinational; the matrix updates on the clock edge.
module fcfs_arbiter #(
  parameter int unsigned V = noc_pkg::NUM_VC
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [V-1:0]         waiting,   // VC holds a flit
  input  logic [V-1:0]         load,      // VC receives a new flit
  input  logic [V-1:0]         eligible,  // waiting and has a credit
  output logic [V-1:0]         sel,
  output logic [$clog2(V)-1:0] sel_idx,
  output logic                 sel_valid
);
  logic [V-1:0][V-1:0] older;

  always_comb begin
    sel       = '0;
    sel_idx   = '0;
    sel_valid = 1'b0;
    for (int i = 0; i < int'(V); i++) begin
      logic beaten;
      beaten = 1'b0;
      for (int j = 0; j < int'(V); j++)
        if (j != i && eligible[j] && older[j][i]) beaten = 1'b1;
      if (eligible[i] && !beaten && !sel_valid) begin
        sel_valid = 1'b1;
        sel_idx   = $clog2(V)'(i);
      end
    end
    if (sel_valid) sel[sel_idx] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      older <= '0;
    end else begin
      for (int i = 0; i < int'(V); i++) begin
        if (load[i]) begin
          for (int j = 0; j < int'(V); j++) begin
            if (j != i) begin
              // VCs still waiting (and not reloaded) are ahead of i.
              if (waiting[j] && !sel[j] && !load[j]) begin
                older[j][i] <= 1'b1;
                older[i][j] <= 1'b0;
              end else if (load[j]) begin
                older[j][i] <= (j < i);
                older[i][j] <= (i < j);
              end else begin
                older[j][i] <= 1'b0;
                older[i][j] <= 1'b1;
              end
            end
          end
        end
      end
    end
  end
endmodule
