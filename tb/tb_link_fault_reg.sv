// tb_link_fault_reg: a direction must be marked faulty after a failure of
// either its incoming or its outgoing link, stay marked, and be cleared by
// `clear`.
module tb_link_fault_reg;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, clear = 0;
  logic [3:0] in_f = '0, out_f = '0, faulty, model;

  link_fault_reg dut (.clk, .rst, .clear, .in_link_fail(in_f), .out_link_fail(out_f), .faulty);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      checks++;
      if (faulty !== model) begin failures++; $display("FAIL cycle %0d: %b vs %b", i, faulty, model); end
      in_f  = ($urandom % 4 == 0) ? 4'(1 << ($urandom % 4)) : '0;
      out_f = ($urandom % 4 == 0) ? 4'(1 << ($urandom % 4)) : '0;
      clear = ($urandom % 25 == 0);
      @(posedge clk);
      model = clear ? '0 : (model | in_f | out_f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
