// tb_sync_fifo: self-checking testbench for the FIFO.
//
// Two FIFOs at the default 16 x 32 size share random write and read
// requests, with phases biased toward filling and toward draining. Instance
// 0 accepts a read and a write in the same cycle; instance 1 is built with
// ONE_XFER_PER_CYCLE and must never do so, granting the read first. Each is
// checked against its own queue model: every read returns the word of the
// corresponding write (data correspondence), a grant comes only with a
// request, a read is granted in the same cycle whenever the FIFO is not
// empty, a write whenever it is not full (and, for instance 1, no read is
// granted), and full, empty and count match the model's occupancy. A watchdog
// ends the run.
module tb_sync_fifo;
  localparam int D  = 16;
  localparam int W  = 32;
  localparam int CW = $clog2(D + 1);

  logic clk = 1'b0;
  logic rst;
  logic wr_req, rd_req;
  logic [W-1:0] data_in;
  logic          wr_gnt [2], rd_gnt [2], full [2], empty [2];
  logic [W-1:0]  data_out [2];
  logic [CW-1:0] count [2];
  int checks = 0, failures = 0;
  int fulls = 0, empties = 0, both = 0, blocked_wr = 0, blocked_rd = 0, wr_yield = 0;

  always #5 clk = ~clk;

  sync_fifo u_dut (
    .clk, .rst, .wr_req, .wr_gnt(wr_gnt[0]), .data_in, .rd_req, .rd_gnt(rd_gnt[0]),
    .data_out(data_out[0]), .full(full[0]), .empty(empty[0]), .count(count[0]));
  sync_fifo #(.ONE_XFER_PER_CYCLE(1'b1)) u_one (
    .clk, .rst, .wr_req, .wr_gnt(wr_gnt[1]), .data_in, .rd_req, .rd_gnt(rd_gnt[1]),
    .data_out(data_out[1]), .full(full[1]), .empty(empty[1]), .count(count[1]));

  logic [W-1:0] q0 [$];
  logic [W-1:0] q1 [$];

  task automatic check(input bit ok, input int k, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t fifo %0d: %s", $time, k, what);
    end
  endtask

  // Checks one instance before the clock edge, given its model occupancy and head.
  task automatic check_fifo(input int k, input int n, input logic [W-1:0] head);
    bit e_rd, e_wr;
    e_rd = rd_req && n > 0;
    e_wr = wr_req && n < D && !(k == 1 && e_rd);
    check(full[k]  == (n == D), k, "full flag");
    check(empty[k] == (n == 0), k, "empty flag");
    check(count[k] == CW'(n), k, "count");
    check(rd_gnt[k] == e_rd, k, "read grant");
    check(wr_gnt[k] == e_wr, k, "write grant");
    if (rd_gnt[k]) check(data_out[k] == head, k, "read data");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; wr_req = 0; rd_req = 0; data_in = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 8000; i++) begin
      int wb, rb;
      wb = ((i / 150) % 2 == 0) ? 75 : 30;
      rb = 105 - wb;
      wr_req  = ($urandom % 100) < wb;
      rd_req  = ($urandom % 100) < rb;
      data_in = $urandom;
      #1;
      check_fifo(0, q0.size(), (q0.size() > 0) ? q0[0] : '0);
      check_fifo(1, q1.size(), (q1.size() > 0) ? q1[0] : '0);
      if (full[0]) fulls++;
      if (empty[0]) empties++;
      if (wr_gnt[0] && rd_gnt[0]) both++;
      if (wr_req && !wr_gnt[0]) blocked_wr++;
      if (rd_req && !rd_gnt[0]) blocked_rd++;
      if (wr_req && !full[1] && rd_gnt[1]) wr_yield++;
      @(posedge clk);
      if (rd_gnt[0]) void'(q0.pop_front());
      if (wr_gnt[0]) q0.push_back(data_in);
      if (rd_gnt[1]) void'(q1.pop_front());
      if (wr_gnt[1]) q1.push_back(data_in);
      #1;
    end
    check(fulls > 0 && empties > 0 && both > 0 && blocked_wr > 0 && blocked_rd > 0 && wr_yield > 0,
          0, "coverage");
    $display("full=%0d empty=%0d simultaneous=%0d blocked_wr=%0d blocked_rd=%0d write_yields=%0d",
             fulls, empties, both, blocked_wr, blocked_rd, wr_yield);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
