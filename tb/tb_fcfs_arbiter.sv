// tb_fcfs_arbiter: output VCs receive flits at random times and get credits
// at random. The reference keeps the VCs in order of arrival (same-cycle
// arrivals by index) and expects the first eligible one to be selected.
module tb_fcfs_arbiter;
  localparam int V = 4;
  int checks = 0, failures = 0, passed_over = 0;
  logic clk = 0, rst = 1;
  logic [V-1:0] waiting, load, eligible, sel;
  logic [1:0] sel_idx;
  logic sel_valid;
  int q[$];

  fcfs_arbiter #(.V(V)) dut (.clk, .rst, .waiting, .load, .eligible, .sel, .sel_idx, .sel_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    waiting = '0; load = '0; eligible = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      eligible = waiting & V'($urandom);
      #1;
      exp = -1;
      foreach (q[k]) if (exp < 0 && eligible[q[k]]) exp = q[k];
      if (exp >= 0 && q[0] != exp) passed_over++;
      checks++;
      if (exp < 0 ? sel_valid : (!sel_valid || sel_idx != 2'(exp) || sel != V'(1) << exp)) begin
        failures++;
        $display("FAIL cycle %0d: sel %0d (%0b) expected %0d", i, sel_idx, sel_valid, exp);
      end
      // new flits arrive at VCs that are empty or being emptied
      load = '0;
      for (int v = 0; v < V; v++)
        if ((!waiting[v] || (exp == v)) && ($urandom % 3 == 0)) load[v] = 1'b1;
      @(posedge clk);
      if (exp >= 0) begin
        foreach (q[k]) if (q[k] == exp) begin q.delete(k); break; end
        waiting[exp] = 1'b0;
      end
      for (int v = 0; v < V; v++) if (load[v]) begin
        q.push_back(v);
        waiting[v] = 1'b1;
      end
      #1 load = '0;
    end
    checks++;
    if (passed_over == 0) begin failures++; $display("FAIL no VC without credit was ever passed over"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
