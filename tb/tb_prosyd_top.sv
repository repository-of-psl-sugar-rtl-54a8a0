// tb_prosyd_top: end-to-end testbench of the whole collection at its default
// parameters (64 x 8 stack with push-overrides, 16 x 32 FIFO, register block
// at 0x6000, 32-bit AHB-Lite checker with bounds of 15).
//
// Each part is taken through one complete operation and every mechanism it
// has is made to happen and counted:
//   stack  - fill to full, push ignored when full, push+pop at full (pop
//            served) and below full (push served), drain in LIFO order, pop
//            ignored when empty
//   FIFO   - fill to full, write refused when full, simultaneous read and
//            write, drain in FIFO order, read refused when empty
//   regs   - write/read-back with byte enables, write-only read returning 0,
//            write to read-only register and unmapped access raising error,
//            external event setting a bit, outsig following CTRL[4] & insig
//   AHB    - a legal INCR4 burst with a wait state and a BUSY beat, a WRAP4
//            burst and a two-cycle ERROR response raise no flag; a misaligned
//            transfer and an overlong wait are flagged
// Expected values are computed here from plain models. A watchdog ends the run.
module tb_prosyd_top;
  import ahb_lite_pkg::*;

  logic clk = 1'b0, hclk = 1'b0;
  logic rst, hresetn;
  always #5 clk = ~clk;
  always #5 hclk = ~hclk;

  logic        stk_push, stk_pop, stk_empty, stk_full;
  logic [7:0]  stk_d_in, stk_d_out;
  logic [5:0]  stk_s_ptr;
  logic        fifo_wr_req, fifo_wr_gnt, fifo_rd_req, fifo_rd_gnt, fifo_full, fifo_empty;
  logic [31:0] fifo_data_in, fifo_data_out;
  logic [4:0]  fifo_count;
  logic        reg_req, reg_we, reg_r_req, reg_error, reg_insig, reg_outsig;
  logic [3:0]  reg_be;
  logic [15:2] reg_addr;
  logic [31:0] reg_data, reg_r_data, reg_status_in, reg_ev_set, reg_ctrl_out, reg_wo_out;
  logic [1:0]  ahb_htrans, ahb_hresp;
  logic [31:0] ahb_haddr, ahb_hwdata;
  logic        ahb_hwrite, ahb_hready, ahb_any_viol, ahb_master_viol, ahb_slave_viol;
  int          n_master_viol = 0, n_slave_viol = 0;
  logic [2:0]  ahb_hburst, ahb_hsize;
  logic [3:0]  ahb_hprot;
  logic [AHB_NUM_RULES-1:0] ahb_viol, ahb_viol_sticky;

  prosyd_top u_top (.*);

  int checks = 0, failures = 0;
  // Mechanism counters.
  int m_stk_full = 0, m_stk_full_push = 0, m_stk_override_pop = 0, m_stk_override_push = 0;
  int m_stk_empty_pop = 0, m_fifo_full = 0, m_fifo_wr_refused = 0, m_fifo_rw = 0;
  int m_fifo_rd_refused = 0, m_reg_rw = 0, m_reg_wo = 0, m_reg_err = 0, m_reg_ev = 0;
  int m_reg_outsig = 0, m_ahb_wait = 0, m_ahb_busy = 0, m_ahb_error = 0, m_ahb_flagged = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stack ----------------
  logic [7:0] smodel [$];
  task automatic stk(input logic pu, input logic po, input logic [7:0] d);
    logic [7:0] e;
    stk_push = pu; stk_pop = po; stk_d_in = d;
    e = '0;
    if (pu && po) begin
      if (smodel.size() == 64) begin e = smodel.pop_back(); m_stk_override_pop++; end
      else begin smodel.push_back(d); m_stk_override_push++; end
    end else if (pu) begin
      if (smodel.size() < 64) smodel.push_back(d); else m_stk_full_push++;
    end else if (po) begin
      if (smodel.size() > 0) e = smodel.pop_back(); else m_stk_empty_pop++;
    end
    @(posedge clk); #1;
    check(stk_d_out == e, "stack d_out");
    check(stk_empty == (smodel.size() == 0) && stk_full == (smodel.size() == 64), "stack flags");
    check(stk_s_ptr == ((smodel.size() == 0) ? 6'd0 : 6'(smodel.size() - 1)), "stack pointer");
    if (stk_full) m_stk_full++;
  endtask

  task automatic run_stack();
    for (int i = 0; i < 64; i++) stk(1, 0, 8'(i * 7 + 1));
    stk(1, 0, 8'hEE);             // ignored, full
    stk(1, 1, 8'hDD);             // full: pop served
    stk(1, 1, 8'hCC);             // not full: push served
    while (smodel.size() > 0) stk(0, 1, 0);
    stk(0, 1, 0);                 // ignored, empty
    stk(0, 0, 0);
  endtask

  // ---------------- FIFO ----------------
  logic [31:0] fmodel [$];
  task automatic ff(input logic w, input logic r, input logic [31:0] d);
    fifo_wr_req = w; fifo_rd_req = r; fifo_data_in = d;
    #1;
    check(fifo_wr_gnt == (w && fmodel.size() < 16), "fifo write grant");
    check(fifo_rd_gnt == (r && fmodel.size() > 0), "fifo read grant");
    check(fifo_full == (fmodel.size() == 16) && fifo_empty == (fmodel.size() == 0), "fifo flags");
    if (fifo_rd_gnt) check(fifo_data_out == fmodel[0], "fifo data");
    if (fifo_full) m_fifo_full++;
    if (w && !fifo_wr_gnt) m_fifo_wr_refused++;
    if (r && !fifo_rd_gnt) m_fifo_rd_refused++;
    if (fifo_wr_gnt && fifo_rd_gnt) m_fifo_rw++;
    @(posedge clk);
    if (fifo_rd_gnt) void'(fmodel.pop_front());
    if (fifo_wr_gnt) fmodel.push_back(d);
    #1;
  endtask

  task automatic run_fifo();
    for (int i = 0; i < 17; i++) ff(1, 0, 32'hF000_0000 + 32'(i));
    ff(1, 1, 32'hABCD_0001);
    for (int i = 0; i < 8; i++) ff(1, 1, 32'hABCD_0100 + 32'(i));
    while (fmodel.size() > 0) ff(0, 1, 0);
    ff(0, 1, 0);
    ff(0, 0, 0);
  endtask

  // ---------------- configuration registers ----------------
  // One access: request, wait for the response, return data and error.
  task automatic acc(input logic w, input logic [15:0] a, input logic [3:0] be,
                     input logic [31:0] d, output logic [31:0] rd, output logic err);
    int n;
    reg_req = 1; reg_we = w; reg_addr = a[15:2]; reg_be = be; reg_data = d;
    n = 0;
    do begin
      #1;
      if (reg_r_req) break;
      @(posedge clk); n++;
    end while (n < 10);
    check(n == 1, "register response one cycle after request");
    rd = reg_r_data; err = reg_error;
    if (w && a == 16'h6004 && be == 4'b1111)
      check(reg_wo_out == d, "write reaches its output by the response cycle");
    @(posedge clk); #1;
    reg_req = 0;
  endtask

  task automatic run_regs();
    logic [31:0] rd;
    logic err;
    acc(1, 16'h6000, 4'b1111, 32'h1122_3344, rd, err);
    check(!err, "CTRL write ok");
    acc(1, 16'h6000, 4'b0010, 32'hFFFF_55FF, rd, err);
    acc(0, 16'h6000, 4'b1111, 0, rd, err);
    check(!err && rd == 32'h1122_5544, "CTRL byte-enable write and read back");
    check(reg_ctrl_out == 32'h1122_5544, "CTRL drives ctrl_out");
    m_reg_rw++;
    acc(1, 16'h6004, 4'b1111, 32'hCAFE_F00D, rd, err);
    check(reg_wo_out == 32'hCAFE_F00D, "WO drives wo_out");
    acc(0, 16'h6004, 4'b1111, 0, rd, err);
    check(!err && rd == 0, "write-only reads 0");
    m_reg_wo++;
    acc(1, 16'h6008, 4'b1111, 32'h1, rd, err);
    check(err, "write to read-only raises error");
    acc(0, 16'h7000, 4'b1111, 0, rd, err);
    check(err && rd == 0, "unmapped read raises error");
    m_reg_err += 2;
    reg_status_in = 32'h0BAD_BEEF;
    @(posedge clk); #1;
    acc(0, 16'h6008, 4'b1111, 0, rd, err);
    check(!err && rd == 32'h0BAD_BEEF, "STATUS reads status_in");
    reg_ev_set = 32'h0000_0100;
    @(posedge clk); #1;
    reg_ev_set = 0;
    acc(0, 16'h600C, 4'b1111, 0, rd, err);
    check(rd == 32'h0000_0100, "external event sets EVENT bit");
    m_reg_ev++;
    // CTRL[4]: 0x44 has bit 4 clear; set it and toggle insig.
    acc(1, 16'h6000, 4'b0001, 32'h10, rd, err);
    reg_insig = 1; #1;
    check(reg_outsig == 1'b1, "outsig = CTRL[4] & insig");
    reg_insig = 0; #1;
    check(reg_outsig == 1'b0, "outsig low with insig low");
    m_reg_outsig++;
  endtask

  // ---------------- AHB-Lite ----------------
  task automatic bus(input logic [1:0] t, input logic [31:0] a, input logic [2:0] b,
                     input logic rdy, input logic [1:0] rsp);
    ahb_htrans = t; ahb_haddr = a; ahb_hwrite = 1; ahb_hburst = b; ahb_hsize = HSIZE_32;
    ahb_hprot = 4'h3; ahb_hwdata = 32'h5555_AAAA; ahb_hready = rdy; ahb_hresp = rsp;
    #1;
    if (ahb_master_viol) n_master_viol++;
    if (ahb_slave_viol) n_slave_viol++;
    if (!rdy) m_ahb_wait++;
    if (t == HTRANS_BUSY) m_ahb_busy++;
    if (rsp != HRESP_OKAY) m_ahb_error++;
    @(posedge hclk); #1;
  endtask

  task automatic run_ahb();
    hresetn = 0; bus(HTRANS_IDLE, 0, HBURST_SINGLE, 1, HRESP_OKAY);
    hresetn = 1; bus(HTRANS_IDLE, 0, HBURST_SINGLE, 1, HRESP_OKAY);
    bus(HTRANS_NONSEQ, 32'h2000, HBURST_INCR4, 1, HRESP_OKAY);
    bus(HTRANS_SEQ,    32'h2004, HBURST_INCR4, 0, HRESP_OKAY);   // wait state
    bus(HTRANS_SEQ,    32'h2004, HBURST_INCR4, 1, HRESP_OKAY);
    bus(HTRANS_BUSY,   32'h2008, HBURST_INCR4, 1, HRESP_OKAY);
    bus(HTRANS_SEQ,    32'h2008, HBURST_INCR4, 1, HRESP_OKAY);
    bus(HTRANS_SEQ,    32'h200C, HBURST_INCR4, 1, HRESP_OKAY);
    bus(HTRANS_NONSEQ, 32'h3038, HBURST_WRAP4, 1, HRESP_OKAY);
    bus(HTRANS_SEQ,    32'h303C, HBURST_WRAP4, 1, HRESP_OKAY);
    bus(HTRANS_SEQ,    32'h3030, HBURST_WRAP4, 1, HRESP_OKAY);
    bus(HTRANS_SEQ,    32'h3034, HBURST_WRAP4, 0, HRESP_ERROR);  // two-cycle error
    bus(HTRANS_IDLE,   32'h3034, HBURST_WRAP4, 1, HRESP_ERROR);
    bus(HTRANS_IDLE,   32'h0,    HBURST_SINGLE, 1, HRESP_OKAY);
    check(ahb_viol_sticky == '0, "legal AHB-Lite sequence raises no flag");
    bus(HTRANS_NONSEQ, 32'h4002, HBURST_SINGLE, 1, HRESP_OKAY);  // misaligned word
    bus(HTRANS_IDLE, 0, HBURST_SINGLE, 1, HRESP_OKAY);
    bus(HTRANS_NONSEQ, 32'h5000, HBURST_SINGLE, 1, HRESP_OKAY);
    repeat (16) bus(HTRANS_NONSEQ, 32'h5004, HBURST_SINGLE, 0, HRESP_OKAY);  // one wait too many
    bus(HTRANS_NONSEQ, 32'h5004, HBURST_SINGLE, 1, HRESP_OKAY);
    bus(HTRANS_IDLE, 0, HBURST_SINGLE, 1, HRESP_OKAY);
    check(ahb_viol_sticky[R_ALIGNMENT] && ahb_viol_sticky[R_WAIT_BOUND], "violations flagged");
    check(n_master_viol == 1 && n_slave_viol == 1, "master and slave violation outputs");
    if (ahb_viol_sticky[R_ALIGNMENT]) m_ahb_flagged++;
    if (ahb_viol_sticky[R_WAIT_BOUND]) m_ahb_flagged++;
    check(ahb_viol_sticky == ((AHB_NUM_RULES'(1) << R_ALIGNMENT) | (AHB_NUM_RULES'(1) << R_WAIT_BOUND)),
          "only the broken rules flagged");
  endtask

  initial begin
    rst = 1; hresetn = 0;
    stk_push = 0; stk_pop = 0; stk_d_in = 0;
    fifo_wr_req = 0; fifo_rd_req = 0; fifo_data_in = 0;
    reg_req = 0; reg_we = 0; reg_be = 0; reg_addr = 0; reg_data = 0;
    reg_status_in = 0; reg_ev_set = 0; reg_insig = 0;
    ahb_htrans = HTRANS_IDLE; ahb_haddr = 0; ahb_hwrite = 0; ahb_hburst = 0; ahb_hsize = 0;
    ahb_hprot = 0; ahb_hwdata = 0; ahb_hready = 1; ahb_hresp = HRESP_OKAY;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    fork
      run_stack();
      run_fifo();
      run_regs();
      run_ahb();
    join
    check(m_stk_full > 0,        "mechanism: stack full");
    check(m_stk_full_push > 0,   "mechanism: push refused when full");
    check(m_stk_override_pop > 0 && m_stk_override_push > 0, "mechanism: simultaneous push and pop");
    check(m_stk_empty_pop > 0,   "mechanism: pop refused when empty");
    check(m_fifo_full > 0 && m_fifo_wr_refused > 0, "mechanism: FIFO full");
    check(m_fifo_rw > 0,         "mechanism: FIFO simultaneous read and write");
    check(m_fifo_rd_refused > 0, "mechanism: FIFO empty");
    check(m_reg_rw > 0 && m_reg_wo > 0 && m_reg_err > 0 && m_reg_ev > 0 && m_reg_outsig > 0,
          "mechanism: register access kinds");
    check(m_ahb_wait > 0 && m_ahb_busy > 0 && m_ahb_error > 0 && m_ahb_flagged == 2,
          "mechanism: AHB-Lite wait, busy, error, violation");
    $display("stack: full=%0d full_push=%0d override_pop=%0d override_push=%0d empty_pop=%0d",
             m_stk_full, m_stk_full_push, m_stk_override_pop, m_stk_override_push, m_stk_empty_pop);
    $display("fifo: full=%0d wr_refused=%0d simultaneous=%0d rd_refused=%0d",
             m_fifo_full, m_fifo_wr_refused, m_fifo_rw, m_fifo_rd_refused);
    $display("regs: rw=%0d wo=%0d errors=%0d events=%0d outsig=%0d",
             m_reg_rw, m_reg_wo, m_reg_err, m_reg_ev, m_reg_outsig);
    $display("ahb: waits=%0d busy=%0d error_cycles=%0d flagged=%0d",
             m_ahb_wait, m_ahb_busy, m_ahb_error, m_ahb_flagged);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
