// cfg_regs: configuration register block behind a request/response
// register-access interface.
//
// Interface: the initiator raises req with addr (word address, byte address
// bits 15..2), we (1 write, 0 read), be (byte enables) and data, and holds
// them until the block answers with r_req. r_req is high for exactly one
// cycle, the cycle after the request is first seen, together with r_data
// (read data, 0 for writes) and error. A valid write takes effect on the
// clock edge that ends the first cycle of the request, so the register and
// the outputs it drives already hold the new value in the r_req cycle; a read
// returns the register value during the r_req cycle. If req is still high in
// the cycle after r_req it is a new request. r_req is never high without req.
//
// Registers (byte addresses):
//   CTRL   0x6000  read/write, drives ctrl_out; outsig = ctrl_out[4] & insig
//   WO     0x6004  write-only, drives wo_out; reads return 0
//   STATUS 0x6008  read-only, samples status_in every cycle
//   EVENT  0x600C  read/write; bit i is also set by a pulse on ev_set[i]
//                  (the external set wins over a write in the same cycle)
// All reset to 0 (synchronous, active-high rst). Only the bytes whose be bit
// is set are written. An access to any other address, or a write to STATUS,
// is invalid: it changes nothing, returns r_data 0 and raises error.
// Register outputs change one cycle after a write request is first seen.
//
// The handshake rules (no retraction, response at least one cycle after the
// request, no unsolicited response), error on invalid access, zero from
// write-only reads, output bits driven by register bits, register update by
// external inputs, an output following a written bit one cycle after the
// write request, and the 0x6000 address with the 32-bit bus and address
// bits 15..2 follow the description. The register map beyond 0x6000, the
// one-cycle response and the byte-enable encoding are this design's choices.
module cfg_regs #(
  parameter int unsigned DATA_W     = 32,
  parameter int unsigned ADDR_HI    = 15,
  parameter int unsigned ADDR_LO    = 2,
  parameter logic [15:0] CTRL_ADDR   = 16'h6000,
  parameter logic [15:0] WO_ADDR     = 16'h6004,
  parameter logic [15:0] STATUS_ADDR = 16'h6008,
  parameter logic [15:0] EVENT_ADDR  = 16'h600C,
  localparam int unsigned NBYTES    = DATA_W / 8
) (
  input  logic                  clk,
  input  logic                  rst,
  // register access interface
  input  logic                  req,
  input  logic                  we,
  input  logic [NBYTES-1:0]     be,
  input  logic [ADDR_HI:ADDR_LO] addr,
  input  logic [DATA_W-1:0]     data,
  output logic                  r_req,
  output logic [DATA_W-1:0]     r_data,
  output logic                  error,
  // design side
  input  logic [DATA_W-1:0]     status_in,
  input  logic [DATA_W-1:0]     ev_set,
  input  logic                  insig,
  output logic [DATA_W-1:0]     ctrl_out,
  output logic [DATA_W-1:0]     wo_out,
  output logic                  outsig
);

  typedef enum logic [2:0] {SEL_NONE, SEL_CTRL, SEL_WO, SEL_STATUS, SEL_EVENT} sel_e;

  logic              resp_q;
  logic [DATA_W-1:0] ctrl_q, wo_q, status_q, event_q;
  sel_e              sel;
  logic              valid_op;
  logic              do_write;
  logic [DATA_W-1:0] wmask;

  // Address decode on bits ADDR_HI..ADDR_LO of the byte addresses.
  always_comb begin
    sel = SEL_NONE;
    if      (addr == CTRL_ADDR[ADDR_HI:ADDR_LO])   sel = SEL_CTRL;
    else if (addr == WO_ADDR[ADDR_HI:ADDR_LO])     sel = SEL_WO;
    else if (addr == STATUS_ADDR[ADDR_HI:ADDR_LO]) sel = SEL_STATUS;
    else if (addr == EVENT_ADDR[ADDR_HI:ADDR_LO])  sel = SEL_EVENT;
  end

  assign valid_op = (sel != SEL_NONE) && !(we && sel == SEL_STATUS);
  assign r_req    = resp_q && req;
  assign error    = r_req && !valid_op;
  // A write commits in the first cycle of its request (req high, no response yet).
  assign do_write = req && !r_req && we && valid_op;

  always_comb begin
    for (int b = 0; b < NBYTES; b++) wmask[8*b +: 8] = {8{be[b]}};
  end

  always_comb begin
    r_data = '0;
    if (r_req && !we) begin
      unique case (sel)
        SEL_CTRL:   r_data = ctrl_q;
        SEL_STATUS: r_data = status_q;
        SEL_EVENT:  r_data = event_q;
        default:    r_data = '0;   // write-only or unmapped
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      resp_q   <= 1'b0;
      ctrl_q   <= '0;
      wo_q     <= '0;
      status_q <= '0;
      event_q  <= '0;
    end else begin
      // Respond one cycle after a new request.
      resp_q   <= req && !r_req;
      status_q <= status_in;
      if (do_write && sel == SEL_CTRL) ctrl_q <= (ctrl_q & ~wmask) | (data & wmask);
      if (do_write && sel == SEL_WO)   wo_q   <= (wo_q & ~wmask) | (data & wmask);
      if (do_write && sel == SEL_EVENT) event_q <= (event_q & ~wmask) | (data & wmask) | ev_set;
      else                              event_q <= event_q | ev_set;
    end
  end

  assign ctrl_out = ctrl_q;
  assign wo_out   = wo_q;
  assign outsig   = ctrl_q[4] && insig;

  // Interface rules on the responder side.
  a_no_unsolicited: assert property (@(posedge clk) disable iff (rst) !req |-> !r_req);
  a_resp_after_req: assert property (@(posedge clk) disable iff (rst)
    (req && (!$past(req) || $past(r_req))) |-> !r_req);

endmodule
