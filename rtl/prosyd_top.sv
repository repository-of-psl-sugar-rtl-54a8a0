// prosyd_top: the four designs of this collection side by side.
//
// The collection covers common hardware features that share a standard set
// of interface signals: a LIFO stack, a FIFO with request/grant handshakes, a
// configuration register block behind a req/r_req register-access interface,
// and a monitor of the AHB-Lite bus protocol. They do not connect to each
// other; each keeps its own ports here, prefixed stk_, fifo_, reg_ and ahb_.
// The stack, FIFO and register block share clk and the synchronous active-
// high rst; the AHB-Lite checker runs on hclk with the active-low hresetn as
// on an AHB bus. Timing of each part is described in its own module.
//
// The parameters pass through to the parts with the same defaults: a
// 64-entry 8-bit stack resolving simultaneous push and pop in the
// push-overrides way, a 16-entry 32-bit FIFO accepting a read and a write
// in the same cycle, the register block at 0x6000,
// and a checker for a 32-bit AHB-Lite bus with wait-state and BUSY bounds of
// 15.
module prosyd_top
  import stack_pkg::*;
  import ahb_lite_pkg::*;
#(
  parameter int unsigned STACK_DEPTH       = 64,
  parameter int unsigned STACK_WIDTH       = 8,
  parameter rw_policy_e  STACK_RW_POLICY   = PUSH_OVERRIDES,
  parameter int unsigned FIFO_DEPTH        = 16,
  parameter int unsigned FIFO_WIDTH        = 32,
  parameter bit          FIFO_ONE_XFER     = 1'b0,
  parameter int unsigned AHB_DATA_BUS_SIZE = 32,
  parameter int unsigned WAIT_STATES_BOUND = 15,
  parameter int unsigned BUSY_BOUND        = 15,
  localparam int unsigned SAW = (STACK_DEPTH > 1) ? $clog2(STACK_DEPTH) : 1,
  localparam int unsigned FCW = $clog2(FIFO_DEPTH + 1)
) (
  input  logic                          clk,
  input  logic                          rst,
  // stack
  input  logic                          stk_push,
  input  logic                          stk_pop,
  input  logic [STACK_WIDTH-1:0]        stk_d_in,
  output logic [STACK_WIDTH-1:0]        stk_d_out,
  output logic                          stk_empty,
  output logic                          stk_full,
  output logic [SAW-1:0]                stk_s_ptr,
  // FIFO
  input  logic                          fifo_wr_req,
  output logic                          fifo_wr_gnt,
  input  logic [FIFO_WIDTH-1:0]         fifo_data_in,
  input  logic                          fifo_rd_req,
  output logic                          fifo_rd_gnt,
  output logic [FIFO_WIDTH-1:0]         fifo_data_out,
  output logic                          fifo_full,
  output logic                          fifo_empty,
  output logic [FCW-1:0]                fifo_count,
  // configuration registers
  input  logic                          reg_req,
  input  logic                          reg_we,
  input  logic [3:0]                    reg_be,
  input  logic [15:2]                   reg_addr,
  input  logic [31:0]                   reg_data,
  output logic                          reg_r_req,
  output logic [31:0]                   reg_r_data,
  output logic                          reg_error,
  input  logic [31:0]                   reg_status_in,
  input  logic [31:0]                   reg_ev_set,
  input  logic                          reg_insig,
  output logic [31:0]                   reg_ctrl_out,
  output logic [31:0]                   reg_wo_out,
  output logic                          reg_outsig,
  // AHB-Lite bus under observation
  input  logic                          hclk,
  input  logic                          hresetn,
  input  logic [1:0]                    ahb_htrans,
  input  logic [31:0]                   ahb_haddr,
  input  logic                          ahb_hwrite,
  input  logic [2:0]                    ahb_hburst,
  input  logic [2:0]                    ahb_hsize,
  input  logic [3:0]                    ahb_hprot,
  input  logic [AHB_DATA_BUS_SIZE-1:0]  ahb_hwdata,
  input  logic                          ahb_hready,
  input  logic [1:0]                    ahb_hresp,
  output ahb_viol_t                     ahb_viol,
  output ahb_viol_t                     ahb_viol_sticky,
  output logic                          ahb_any_viol,
  output logic                          ahb_master_viol,
  output logic                          ahb_slave_viol
);

  stack #(
    .DEPTH(STACK_DEPTH), .WIDTH(STACK_WIDTH), .RW_POLICY(STACK_RW_POLICY)
  ) u_stack (
    .clk, .rst,
    .push(stk_push), .pop(stk_pop), .d_in(stk_d_in), .d_out(stk_d_out),
    .empty(stk_empty), .full(stk_full), .s_ptr(stk_s_ptr)
  );

  sync_fifo #(
    .DEPTH(FIFO_DEPTH), .WIDTH(FIFO_WIDTH), .ONE_XFER_PER_CYCLE(FIFO_ONE_XFER)
  ) u_fifo (
    .clk, .rst,
    .wr_req(fifo_wr_req), .wr_gnt(fifo_wr_gnt), .data_in(fifo_data_in),
    .rd_req(fifo_rd_req), .rd_gnt(fifo_rd_gnt), .data_out(fifo_data_out),
    .full(fifo_full), .empty(fifo_empty), .count(fifo_count)
  );

  cfg_regs u_regs (
    .clk, .rst,
    .req(reg_req), .we(reg_we), .be(reg_be), .addr(reg_addr), .data(reg_data),
    .r_req(reg_r_req), .r_data(reg_r_data), .error(reg_error),
    .status_in(reg_status_in), .ev_set(reg_ev_set), .insig(reg_insig),
    .ctrl_out(reg_ctrl_out), .wo_out(reg_wo_out), .outsig(reg_outsig)
  );

  ahb_lite_checker #(
    .DATA_BUS_SIZE(AHB_DATA_BUS_SIZE), .WAIT_STATES_BOUND(WAIT_STATES_BOUND),
    .BUSY_BOUND(BUSY_BOUND)
  ) u_ahb_checker (
    .hclk, .hresetn,
    .htrans(ahb_htrans), .haddr(ahb_haddr), .hwrite(ahb_hwrite), .hburst(ahb_hburst),
    .hsize(ahb_hsize), .hprot(ahb_hprot), .hwdata(ahb_hwdata), .hready(ahb_hready),
    .hresp(ahb_hresp), .viol(ahb_viol), .viol_sticky(ahb_viol_sticky), .any_viol(ahb_any_viol),
    .master_viol(ahb_master_viol), .slave_viol(ahb_slave_viol)
  );

endmodule
