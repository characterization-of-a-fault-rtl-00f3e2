// tb_dyn_prio_arbiter: random requests with random priority levels. The
// reference grants the highest level present and, inside it, the first
// requester after the one granted last; no grant while enable is low.
module tb_dyn_prio_arbiter;
  localparam int C = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, enable;
  logic [C-1:0] req, gnt;
  logic [C-1:0][1:0] level;
  logic [2:0] gnt_idx;
  logic gnt_valid;
  int last, lvl_seen [3];

  dyn_prio_arbiter #(.C(C)) dut (.clk, .rst, .enable, .req, .level, .gnt, .gnt_idx, .gnt_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int top, exp;
    last = C - 1;
    enable = 0; req = '0; level = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      enable = ($urandom % 8) != 0;
      req    = C'($urandom);
      for (int c = 0; c < C; c++) level[c] = 2'($urandom % 3);
      #1;
      top = -1; exp = -1;
      for (int c = 0; c < C; c++) if (req[c] && int'(level[c]) > top) top = level[c];
      if (enable)
        for (int s = 1; s <= C; s++) begin
          int c;
          c = (last + s) % C;
          if (exp < 0 && req[c] && int'(level[c]) == top) exp = c;
        end
      checks++;
      if (exp < 0) begin
        if (gnt_valid || gnt != 0) begin
          failures++; $display("FAIL cycle %0d: unexpected grant", i);
        end
      end else if (!gnt_valid || gnt_idx != 3'(exp) || gnt != C'(1) << exp) begin
        failures++;
        $display("FAIL cycle %0d: grant %0d expected %0d", i, gnt_idx, exp);
      end else begin
        last = exp;
        lvl_seen[top]++;
      end
    end
    for (int l = 0; l < 3; l++) begin
      checks++;
      if (lvl_seen[l] == 0) begin failures++; $display("FAIL level %0d never granted", l); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
