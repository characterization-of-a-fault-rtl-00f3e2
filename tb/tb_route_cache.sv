// tb_route_cache: writes random paths to random words of the route cache and
// reads every word back against a copy kept by the testbench.
module tb_route_cache;
  localparam int AW = 5, DW = 36;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr, raddr;
  logic [DW-1:0] wdata, rdata;
  logic [DW-1:0] model [2**AW];
  logic [2**AW-1:0] written = '0;

  route_cache #(.ADDR_W(AW), .DATA_W(DW)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      raddr = AW'($urandom);
      #1;
      if (written[raddr]) begin
        checks++;
        if (rdata !== model[raddr]) begin
          failures++;
          $display("FAIL word %0d: %h vs %h", raddr, rdata, model[raddr]);
        end
      end
      we    = ($urandom % 2) == 0;
      waddr = AW'($urandom);
      wdata = {$urandom, $urandom};
      @(posedge clk);
      if (we) begin
        model[waddr]   = wdata;
        written[waddr] = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
