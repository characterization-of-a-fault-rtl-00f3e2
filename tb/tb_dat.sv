// tb_dat: checks the destination address table against a reference model:
// write addresses are base + (number of writes modulo the segment size),
// every destination written gets that address and becomes valid, several
// destinations can share one write, and recovery clears the valid bits.
module tb_dat;
  localparam int N = 16, AW = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, rec = 0;
  logic [AW-1:0] base, maxe, waddr;
  logic [N-1:0]  wen, valid;
  logic [N-1:0][AW-1:0] raddr;

  int           m_count;
  logic [N-1:0] m_valid;
  int           m_addr [N];

  dat #(.N(N), .ADDR_W(AW)) dut (.clk, .rst, .recovery_in_progress(rec),
    .seg_base(base), .max_entries(maxe), .wen, .waddr, .valid, .raddr);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    base = 5'd3; maxe = 5'd11; wen = '0;
    m_count = 0; m_valid = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      check(waddr == AW'(base + m_count), $sformatf("waddr %0d vs %0d", waddr, base + m_count));
      check(valid == m_valid, $sformatf("valid %h vs %h", valid, m_valid));
      for (int d = 0; d < N; d++)
        if (m_valid[d]) check(raddr[d] == AW'(m_addr[d]), $sformatf("raddr[%0d]", d));
      rec = (i % 97 == 96);
      wen = ($urandom % 3 == 0) ? N'($urandom) & N'($urandom) : '0;
      if (rec) wen = '0;
      @(posedge clk);
      if (rec) m_valid = '0;
      if (wen != 0) begin
        for (int d = 0; d < N; d++)
          if (wen[d]) begin
            m_valid[d] = 1'b1;
            m_addr[d]  = base + m_count;
          end
        m_count = (m_count + 1) % maxe;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
