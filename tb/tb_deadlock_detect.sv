// tb_deadlock_detect: checks the time-to-live comparison.
// For an 8-bit timer every start time and every time-to-live window below
// half the timer range is tried: the flit must not be flagged before the
// window has elapsed, must be flagged when it has, and never when it is not
// a header. A 16-bit instance gets random cases around rollover.
module tb_deadlock_detect;
  int checks = 0, failures = 0;

  logic       h8, d8;
  logic [7:0] g8, f8;
  logic       h16, d16;
  logic [15:0] g16, f16;

  deadlock_detect #(.TW(8)) dut8 (.header_flit(h8), .global_timer(g8),
                                  .flit_timer(f8), .deadlocked(d8));
  deadlock_detect dut16 (.header_flit(h16), .global_timer(g16),
                         .flit_timer(f16), .deadlocked(d16));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int start = 0; start < 256; start++) begin
      for (int w = 1; w < 128; w += 3) begin
        f8 = 8'(start + w);
        for (int e = 0; e <= w; e++) begin
          g8 = 8'(start + e);
          h8 = 1'b1;
          #1 check(d8, e == w, $sformatf("tw8 start=%0d w=%0d e=%0d", start, w, e));
          h8 = 1'b0;
          #1 check(d8, 1'b0, "tw8 not a header");
        end
      end
    end
    for (int i = 0; i < 20000; i++) begin
      int unsigned start, w, e;
      start = $urandom % 65536;
      w     = 1 + $urandom % 32767;
      e     = (i % 4 == 0) ? w : $urandom % w;
      // keep some cases right at the rollover of the global timer
      if (i % 8 == 1) start = 65536 - 1 - ($urandom % w);
      f16 = 16'(start + w);
      g16 = 16'(start + e);
      h16 = 1'b1;
      #1 check(d16, e == w, $sformatf("tw16 start=%0d w=%0d e=%0d", start, w, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
