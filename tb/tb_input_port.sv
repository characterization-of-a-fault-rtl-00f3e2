// tb_input_port: directed tests of the west input port of router 5 (row 1,
// column 1 of the 4 x 4 torus; packets arriving here travel east).
// Checked: source-route decode of the next turn, ejection at the
// destination, flooding of a path-exploration packet to the local port and
// every unvisited neighbour except back west, a multicast header leaving
// only when all its ports granted, body flits following their header,
// credit pulses, priority levels, deadlock marking by time-to-live, moving a
// deadlocked packet to the deadlock buffer or raising the exception when it
// is full, and dropping of flits on a faulty link.
module tb_input_port;
  import noc_pkg::*;
  localparam int V = 4, DEPTH = 4, GRACE = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, faulty = 0, dlb_room = 1;
  logic [TW-1:0] gt = '0;
  logic pc_valid = 0;
  logic [V-1:0] pc_vc = '0, credit_out, hdr_req, body_valid, body_ack = '0;
  flit_t pc_data = '0;
  logic [V-1:0][NPORT-1:0] req_mask, hdr_gnt = '0;
  logic [V-1:0][1:0] level;
  flit_t [V-1:0] data;
  logic dl_exception;
  int credits_seen = 0;

  input_port #(.V(V), .DEPTH(DEPTH), .DL_GRACE(GRACE), .MYPORT(3'(P_W))) dut (
    .clk, .rst, .me(NID_W'(5)), .global_timer(gt), .link_faulty(faulty), .dlb_room,
    .pc_valid, .pc_vc, .pc_data, .credit_out, .hdr_req, .req_mask, .level,
    .body_valid, .data, .hdr_gnt, .body_ack, .dl_exception);

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) begin
    gt <= gt + 1'b1;
    credits_seen <= credits_seen + $countones(credit_out);
  end

  task automatic expect_eq(input logic [63:0] got, input logic [63:0] exp, input string s);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", s, got, exp);
    end
  endtask

  function automatic flit_t hdr(input pclass_e c, input int dst, input logic [1:0] t0,
                                input logic tail, input logic [TW-1:0] ttl);
    hflit_t h;
    h = '0;
    h.h.head = 1; h.h.tail = tail; h.h.pclass = c;
    h.h.dst = NID_W'(dst); h.h.src = NID_W'(4); h.h.ttl = ttl;
    h.h.route[0] = t0; h.h.route[1] = T_RIGHT;
    return flit_t'(h);
  endfunction

  task automatic send(input int vc, input flit_t f);
    @(negedge clk);
    pc_valid = 1; pc_vc = V'(1) << vc; pc_data = f;
    @(negedge clk);
    pc_valid = 0; pc_vc = '0;
  endtask

  localparam logic [4:0] MN = 5'b00001, ME = 5'b00010, MS = 5'b00100, MW = 5'b01000, ML = 5'b10000;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hflit_t pe;
    repeat (3) @(posedge clk);
    rst = 0;

    // 1. data header, left turn while travelling east -> north; two body flits
    send(0, hdr(C_DATA, 9, T_LEFT, 0, TW'(16'h4000)));
    expect_eq(hdr_req[0], 1, "data header requests");
    expect_eq(req_mask[0], MN, "left turn from west input goes north");
    expect_eq(level[0], 0, "forward packet at priority 0");
    expect_eq(body_valid[0], 0, "no body before header grant");
    send(0, flit_t'({2'b00, 254'h11}));
    send(0, flit_t'({2'b01, 254'h22}));
    hdr_gnt[0] = MN;
    @(negedge clk);
    hdr_gnt[0] = '0;
    expect_eq(hdr_req[0], 0, "header gone after grant");
    expect_eq(body_valid[0], 1, "body follows header");
    expect_eq(data[0][7:0], 8'h11, "first body flit");
    body_ack[0] = 1;
    @(negedge clk);
    expect_eq(data[0][7:0], 8'h22, "second body flit");
    @(negedge clk);
    body_ack[0] = 0;
    expect_eq(body_valid[0], 0, "packet done");
    expect_eq(credits_seen, 3, "one credit per flit");

    // 2. data header at its destination -> local port
    send(1, hdr(C_DATA, 5, T_STRAIGHT, 1, TW'(16'h4000)));
    expect_eq(req_mask[1], ML, "destination reached -> local");
    hdr_gnt[1] = ML; @(negedge clk); hdr_gnt[1] = '0;

    // 3. PE forward: north neighbour (node 1) visited, west is the U-turn
    pe = hflit_t'(hdr(C_PE_FWD, 0, T_NONE, 1, TW'(16'h4000)));
    pe.h.visited = 16'b0000_0000_0001_0010;     // nodes 1 and 4
    send(2, flit_t'(pe));
    expect_eq(req_mask[2], ML | ME | MS, "PE floods local and unvisited neighbours");
    hdr_gnt[2] = ME; @(negedge clk); hdr_gnt[2] = '0;
    expect_eq(req_mask[2], ML | MS, "granted port no longer requested");
    expect_eq(hdr_req[2], 1, "multicast header waits for all grants");
    hdr_gnt[2] = ML | MS; @(negedge clk); hdr_gnt[2] = '0;
    expect_eq(hdr_req[2], 0, "multicast header leaves after last grant");

    // 4. PE return gets priority 2
    send(3, hdr(C_PE_RET, 12, T_RIGHT, 1, TW'(16'h4000)));
    expect_eq(req_mask[3], MS, "right turn while travelling east -> south");
    expect_eq(level[3], 2, "return packet at priority 2");
    hdr_gnt[3] = MS; @(negedge clk); hdr_gnt[3] = '0;

    // 5. deadlocked data header: priority 1, then moved to the deadlock buffer
    send(0, hdr(C_DATA, 9, T_STRAIGHT, 1, gt - TW'(2)));
    expect_eq(level[0], 1, "expired time-to-live -> priority 1");
    expect_eq(req_mask[0], ME, "still requests its route first");
    repeat (GRACE + 1) @(negedge clk);
    expect_eq(req_mask[0], ML, "stuck deadlocked packet goes to deadlock buffer");
    dlb_room = 0;
    #1 expect_eq(dl_exception, 1, "exception when the deadlock buffer is full");
    expect_eq(req_mask[0], ME, "keeps waiting on its route when buffer full");
    dlb_room = 1;
    hdr_gnt[0] = ML; @(negedge clk); hdr_gnt[0] = '0;
    expect_eq(hdr_req[0], 0, "deadlocked packet left");

    // 6. faulty link drops incoming flits
    faulty = 1;
    send(1, hdr(C_DATA, 9, T_LEFT, 1, TW'(16'h4000)));
    expect_eq(hdr_req[1], 0, "flit on faulty link dropped");
    faulty = 0;
    expect_eq(credits_seen, 7, "credits for every flit taken");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
