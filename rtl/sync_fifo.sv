// sync_fifo: first-in first-out buffer with request/grant handshakes.
//
// Words leave in the order they entered. A circular buffer of DEPTH words is
// addressed by a write pointer and a read pointer; an occupancy counter
// gives the full and empty status outputs.
//
// Handshake: the environment raises wr_req (rd_req) and the FIFO answers in
// the same cycle with wr_gnt (rd_gnt). A write happens on a clock edge where
// wr_req and wr_gnt are both high, a read likewise. The FIFO grants only what
// is requested, grants a write whenever it is not full and a read whenever it
// is not empty, so both latencies are zero cycles. A read and a write may
// happen in the same cycle, unless ONE_XFER_PER_CYCLE is set: then the FIFO
// never grants both in one cycle, and a read is granted before a write
// (the write is refused in that cycle and granted once no read is). data_out always shows the oldest word (valid
// while empty is low), so the word read is the one on data_out in the cycle
// of the read grant. full and empty are registered-state outputs (derived
// from the counter). rst is synchronous and active high and empties the FIFO.
//
// The read/write event definition (both sides ready on a clock tick), the
// full/empty status meaning, the 16 x 32-bit default size and the option of a
// FIFO that does not accept a read and a write together follow the
// description. Reads winning over writes in that mode, one clock for both sides, grant-only-on-request, zero read
// and write latency and the show-ahead data_out are this design's choices.
module sync_fifo #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 32,
  parameter bit          ONE_XFER_PER_CYCLE = 1'b0,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_req,
  output logic             wr_gnt,
  input  logic [WIDTH-1:0] data_in,
  input  logic             rd_req,
  output logic             rd_gnt,
  output logic [WIDTH-1:0] data_out,
  output logic             full,
  output logic             empty,
  output logic [CW-1:0]    count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;

  assign full     = (count == CW'(DEPTH));
  assign empty    = (count == '0);
  assign rd_gnt   = rd_req && !empty;
  assign wr_gnt   = wr_req && !full && !(ONE_XFER_PER_CYCLE && rd_gnt);
  assign data_out = mem[rd_ptr];

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (wr_gnt) mem[wr_ptr] <= data_in;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (wr_gnt) wr_ptr <= incr(wr_ptr);
      if (rd_gnt) rd_ptr <= incr(rd_ptr);
      unique case ({wr_gnt, rd_gnt})
        2'b10:   count <= count + CW'(1);
        2'b01:   count <= count - CW'(1);
        default: count <= count;
      endcase
    end
  end

  // Grants only on request; occupancy never exceeds the size.
  a_wr_gnt_on_req: assert property (@(posedge clk) disable iff (rst) wr_gnt |-> wr_req);
  a_rd_gnt_on_req: assert property (@(posedge clk) disable iff (rst) rd_gnt |-> rd_req);
  a_count_range:   assert property (@(posedge clk) disable iff (rst) count <= CW'(DEPTH));
  if (ONE_XFER_PER_CYCLE) begin : g_one_xfer
    a_one_xfer: assert property (@(posedge clk) disable iff (rst) !(wr_gnt && rd_gnt));
  end

endmodule
