// tb_ahb_lite_checker: self-checking testbench for the AHB-Lite checker.
//
// Phase 1 drives long random but legal AHB-Lite traffic: IDLE gaps, SINGLE
// transfers, INCR bursts of 2 to 6 beats, INCR4/8/16 and WRAP4/8/16 bursts of
// byte, halfword and word transfers, BUSY runs inside bursts (up to the bound),
// slave wait states (up to the bound) and two-cycle ERROR responses after
// which the master cancels the rest of the burst with IDLE. Every cycle the
// checker must report no violation.
// Phase 2 resets the checker before each of a set of short directed
// sequences, each breaking one rule, and checks that the rule's sticky flag
// is set. A watchdog ends the run.
module tb_ahb_lite_checker;
  import ahb_lite_pkg::*;

  localparam int WB = 15;   // wait-state bound
  localparam int BB = 15;   // busy bound

  logic        hclk = 1'b0;
  logic        hresetn;
  logic [1:0]  htrans, hresp;
  logic [31:0] haddr, hwdata;
  logic        hwrite, hready;
  logic [2:0]  hburst, hsize;
  logic [3:0]  hprot;
  logic [AHB_NUM_RULES-1:0] viol, viol_sticky;
  logic        any_viol, master_viol, slave_viol;
  int checks = 0, failures = 0;

  always #5 hclk = ~hclk;

  ahb_lite_checker u_dut (.*);

  typedef struct packed {
    logic [1:0]  t;
    logic [31:0] a;
    logic        w;
    logic [2:0]  b;
    logic [2:0]  s;
    logic [3:0]  p;
  } item_t;

  item_t items [$];
  int n_bursts [8];
  int n_waits = 0, n_max_waits = 0, n_errors = 0, n_busy = 0, n_max_busy = 0, n_idle = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // Queue the address phases of one random legal transaction.
  task automatic gen_transaction();
    item_t it;
    int beats, bytes, off, busy_len;
    logic [31:0] a, start, wmask;
    logic [2:0] b;
    if (($urandom % 4) == 0) begin
      repeat (1 + $urandom % 3) begin
        it = '{t: HTRANS_IDLE, a: $urandom, w: 1'($urandom), b: 3'($urandom), s: 3'($urandom % 3), p: 4'($urandom)};
        items.push_back(it);
      end
      n_idle++;
      return;
    end
    b = 3'($urandom % 8);
    n_bursts[b]++;
    it.s = 3'($urandom % 3);
    it.w = 1'($urandom);
    it.p = 4'($urandom);
    it.b = b;
    bytes = 1 << it.s;
    beats = (b == HBURST_SINGLE) ? 1 : (b == HBURST_INCR) ? 2 + $urandom % 5 : burst_beats(b);
    if (is_wrap(b)) begin
      start = $urandom & ~32'(bytes - 1);
    end else begin
      off   = ($urandom % (1024 / bytes - beats + 1)) * bytes;
      start = ($urandom & 32'hFFFF_FC00) | 32'(off);
    end
    wmask = 32'(beats * bytes - 1);
    a = start;
    for (int i = 0; i < beats; i++) begin
      if (i > 0 && ($urandom % 8) == 0) begin
        busy_len = (($urandom % 10) == 0) ? BB : 1 + $urandom % 3;
        if (busy_len == BB) n_max_busy++;
        n_busy++;
        repeat (busy_len) begin
          it.t = HTRANS_BUSY; it.a = a;
          items.push_back(it);
        end
      end
      it.t = (i == 0) ? HTRANS_NONSEQ : HTRANS_SEQ;
      it.a = a;
      items.push_back(it);
      if (is_wrap(b)) a = (a & ~wmask) | ((a + 32'(bytes)) & wmask);
      else            a = a + 32'(bytes);
    end
  endtask

  initial begin
    repeat (400000) @(posedge hclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ----------------------------------------------------------------------
  // Directed sequences
  // ----------------------------------------------------------------------
  task automatic drv(input logic [1:0] t, input logic [31:0] a, input logic w, input logic [2:0] b,
                     input logic [2:0] s, input logic [3:0] p, input logic [31:0] wd,
                     input logic rdy, input logic [1:0] rsp);
    htrans = t; haddr = a; hwrite = w; hburst = b; hsize = s; hprot = p; hwdata = wd;
    hready = rdy; hresp = rsp;
    @(posedge hclk); #1;
  endtask

  // Shorthand: word-sized transfer, OKAY response.
  task automatic d(input logic [1:0] t, input logic [31:0] a, input logic [2:0] b, input logic rdy);
    drv(t, a, 1'b1, b, HSIZE_32, 4'h3, 32'h1234_5678, rdy, HRESP_OKAY);
  endtask

  // Whether master_viol / slave_viol rose since the last restart.
  bit seen_master, seen_slave;
  always @(posedge hclk) begin
    if (hresetn && master_viol) seen_master <= 1'b1;
    if (hresetn && slave_viol)  seen_slave  <= 1'b1;
  end

  task automatic restart();
    seen_master = 0; seen_slave = 0;
    hresetn = 0;
    d(HTRANS_IDLE, 0, HBURST_SINGLE, 1);
    hresetn = 1;
    d(HTRANS_IDLE, 0, HBURST_SINGLE, 1);
  endtask

  task automatic expect_rule(input ahb_rule_e r);
    // Let the last cycle be sampled, then look at the sticky flag.
    d(HTRANS_IDLE, 0, HBURST_SINGLE, 1);
    check(viol_sticky[r] == 1'b1, $sformatf("rule %s not flagged", r.name()));
    if (r inside {R_IDLE_RESPONSE, R_BUSY_RESPONSE, R_TWO_CYCLE_RESPONSE, R_WAIT_BOUND})
      check(seen_slave, "slave_viol raised for a slave rule");
    else                    check(seen_master, "master_viol raised for a master rule");
  endtask

  initial begin
    logic        dp_active, dp_write, err_pending, err2;
    logic [31:0] dp_wdata;
    int          waits;
    item_t       cur;
    bit          forced_idle;

    hresetn = 0;
    htrans = HTRANS_IDLE; haddr = 0; hwrite = 0; hburst = 0; hsize = 0; hprot = 0;
    hwdata = 0; hready = 1; hresp = HRESP_OKAY;
    dp_active = 0; dp_write = 0; err_pending = 0; err2 = 0; dp_wdata = 0; waits = 0;
    repeat (2) @(posedge hclk);
    #1 hresetn = 1;

    // ---------------- Phase 1: legal traffic ----------------
    for (int cyc = 0; cyc < 30000; cyc++) begin
      if (items.size() == 0) gen_transaction();
      // Slave side.
      if (err2) begin
        hready = 1; hresp = HRESP_ERROR;
      end else if (dp_active && waits > 0) begin
        hready = 0; hresp = HRESP_OKAY;
      end else if (dp_active && err_pending) begin
        hready = 0; hresp = HRESP_ERROR;
      end else begin
        hready = 1; hresp = HRESP_OKAY;
      end
      // Master side.
      forced_idle = err2;
      cur = items[0];
      if (forced_idle) cur.t = HTRANS_IDLE;
      htrans = cur.t; haddr = cur.a; hwrite = cur.w; hburst = cur.b; hsize = cur.s; hprot = cur.p;
      hwdata = dp_write ? dp_wdata : $urandom;
      #1;
      checks++;
      if (viol != '0) begin
        failures++;
        if (failures < 12)
          for (int r = 0; r < AHB_NUM_RULES; r++)
            if (viol[r]) $display("FAIL t=%0t legal traffic flagged as %s", $time, ahb_rule_e'(r));
      end
      @(posedge hclk); #1;
      // Bookkeeping for the edge just taken.
      if (err2) begin
        err2 = 0;
        items.delete();
      end else if (dp_active && waits > 0) begin
        waits--;
      end else if (dp_active && err_pending) begin
        err_pending = 0;
        err2 = 1;
        n_errors++;
      end
      if (hready) begin
        dp_active = is_active(htrans);
        dp_write  = dp_active && hwrite;
        dp_wdata  = $urandom;
        waits     = 0;
        err_pending = 0;
        if (dp_active) begin
          if (($urandom % 3) == 0) waits = 1 + $urandom % 3;
          if (($urandom % 200) == 0) waits = WB;
          if (waits == WB) n_max_waits++;
          if (waits > 0) n_waits++;
          err_pending = ($urandom % 40) == 0;
        end
        if (!forced_idle && items.size() > 0) void'(items.pop_front());
      end
    end
    check(n_errors > 0 && n_waits > 0 && n_max_waits > 0 && n_busy > 0 && n_max_busy > 0 &&
          n_idle > 0, "legal traffic coverage");
    for (int b = 0; b < 8; b++) check(n_bursts[b] > 0, "burst type coverage");
    $display("legal: errors=%0d wait_phases=%0d max_waits=%0d busy_runs=%0d max_busy=%0d",
             n_errors, n_waits, n_max_waits, n_busy, n_max_busy);

    // ---------------- Phase 2: one broken rule at a time ----------------
    restart(); d(HTRANS_NONSEQ, 32'h0, HBURST_SINGLE, 1); d(HTRANS_SEQ, 32'h4, HBURST_SINGLE, 1);
    expect_rule(R_TRANS_AFTER_SINGLE);

    restart(); d(HTRANS_IDLE, 32'h0, HBURST_SINGLE, 1); d(HTRANS_SEQ, 32'h4, HBURST_INCR, 1);
    expect_rule(R_TRANS_AFTER_IDLE);

    restart(); d(HTRANS_NONSEQ, 32'h0, HBURST_INCR4, 1); d(HTRANS_BUSY, 32'h4, HBURST_INCR4, 1);
    d(HTRANS_NONSEQ, 32'h100, HBURST_SINGLE, 1);
    expect_rule(R_TRANS_AFTER_BUSY);

    restart(); d(HTRANS_NONSEQ, 32'h0, HBURST_INCR4, 1); d(HTRANS_NONSEQ, 32'h40, HBURST_INCR4, 1);
    expect_rule(R_TRANS_AFTER_FIRST_BEAT);

    restart();
    drv(HTRANS_NONSEQ, 32'h0, 1, HBURST_SINGLE, HSIZE_32, 0, 32'h0, 1, HRESP_OKAY);
    drv(HTRANS_IDLE,   32'h0, 0, HBURST_SINGLE, HSIZE_32, 0, 32'hAAAA_0001, 0, HRESP_OKAY);
    drv(HTRANS_IDLE,   32'h0, 0, HBURST_SINGLE, HSIZE_32, 0, 32'hAAAA_0002, 1, HRESP_OKAY);
    expect_rule(R_HWDATA_STABLE);

    restart(); d(HTRANS_NONSEQ, 32'h0, HBURST_SINGLE, 1); d(HTRANS_NONSEQ, 32'h4, HBURST_SINGLE, 0);
    d(HTRANS_IDLE, 32'h4, HBURST_SINGLE, 1);
    expect_rule(R_HTRANS_STABLE);

    restart(); d(HTRANS_NONSEQ, 32'h0, HBURST_SINGLE, 1); d(HTRANS_NONSEQ, 32'h4, HBURST_SINGLE, 0);
    d(HTRANS_NONSEQ, 32'h8, HBURST_SINGLE, 1);
    expect_rule(R_HADDR_STABLE);

    restart(); d(HTRANS_NONSEQ, 32'h0, HBURST_SINGLE, 1);
    drv(HTRANS_NONSEQ, 32'h4, 1, HBURST_SINGLE, HSIZE_32, 0, 0, 0, HRESP_OKAY);
    drv(HTRANS_NONSEQ, 32'h4, 0, HBURST_SINGLE, HSIZE_32, 0, 0, 1, HRESP_OKAY);
    expect_rule(R_HWRITE_STABLE);

    restart(); d(HTRANS_NONSEQ, 32'h0, HBURST_SINGLE, 1); d(HTRANS_NONSEQ, 32'h4, HBURST_SINGLE, 0);
    d(HTRANS_NONSEQ, 32'h4, HBURST_INCR, 1);
    expect_rule(R_HBURST_STABLE);

    restart(); d(HTRANS_NONSEQ, 32'h0, HBURST_SINGLE, 1);
    drv(HTRANS_NONSEQ, 32'h4, 1, HBURST_SINGLE, HSIZE_32, 0, 0, 0, HRESP_OKAY);
    drv(HTRANS_NONSEQ, 32'h4, 1, HBURST_SINGLE, HSIZE_16, 0, 0, 1, HRESP_OKAY);
    expect_rule(R_HSIZE_STABLE);

    restart(); d(HTRANS_NONSEQ, 32'h0, HBURST_SINGLE, 1);
    drv(HTRANS_NONSEQ, 32'h4, 1, HBURST_SINGLE, HSIZE_32, 4'h1, 0, 0, HRESP_OKAY);
    drv(HTRANS_NONSEQ, 32'h4, 1, HBURST_SINGLE, HSIZE_32, 4'h2, 0, 1, HRESP_OKAY);
    expect_rule(R_HPROT_STABLE);

    restart(); d(HTRANS_NONSEQ, 32'h0, HBURST_INCR4, 1); d(HTRANS_SEQ, 32'h4, HBURST_INCR4, 1);
    d(HTRANS_SEQ, 32'h8, HBURST_INCR4, 1); d(HTRANS_IDLE, 32'h0, HBURST_SINGLE, 1);
    expect_rule(R_BEAT_COUNT);

    restart(); d(HTRANS_NONSEQ, 32'h0, HBURST_INCR4, 1); d(HTRANS_SEQ, 32'h4, HBURST_INCR4, 1);
    d(HTRANS_SEQ, 32'h8, HBURST_INCR4, 1); d(HTRANS_SEQ, 32'hC, HBURST_INCR4, 1);
    d(HTRANS_SEQ, 32'h10, HBURST_INCR4, 1);
    expect_rule(R_BEAT_COUNT);

    restart();
    drv(HTRANS_NONSEQ, 32'h0, 0, HBURST_INCR4, HSIZE_32, 0, 0, 1, HRESP_OKAY);
    drv(HTRANS_SEQ,    32'h4, 1, HBURST_INCR4, HSIZE_32, 0, 0, 1, HRESP_OKAY);
    expect_rule(R_BURST_HWRITE);

    restart();
    drv(HTRANS_NONSEQ, 32'h0, 0, HBURST_INCR4, HSIZE_32, 0, 0, 1, HRESP_OKAY);
    drv(HTRANS_SEQ,    32'h4, 0, HBURST_INCR4, HSIZE_16, 0, 0, 1, HRESP_OKAY);
    expect_rule(R_BURST_HSIZE);

    restart(); d(HTRANS_NONSEQ, 32'h0, HBURST_INCR4, 1); d(HTRANS_SEQ, 32'h4, HBURST_INCR8, 1);
    expect_rule(R_BURST_HBURST);

    restart();
    drv(HTRANS_NONSEQ, 32'h0, 0, HBURST_INCR4, HSIZE_32, 4'h0, 0, 1, HRESP_OKAY);
    drv(HTRANS_SEQ,    32'h4, 0, HBURST_INCR4, HSIZE_32, 4'h8, 0, 1, HRESP_OKAY);
    expect_rule(R_BURST_HPROT);

    restart(); d(HTRANS_NONSEQ, 32'h0, HBURST_INCR4, 1); d(HTRANS_BUSY, 32'h4, HBURST_INCR4, 1);
    d(HTRANS_BUSY, 32'h8, HBURST_INCR4, 1);
    expect_rule(R_HADDR_BUSY_STABLE);

    restart(); d(HTRANS_NONSEQ, 32'h0, HBURST_INCR, 1);
    repeat (BB + 1) d(HTRANS_BUSY, 32'h4, HBURST_INCR, 1);
    expect_rule(R_BUSY_BOUND);

    restart(); d(HTRANS_NONSEQ, 32'h3F8, HBURST_INCR, 1); d(HTRANS_SEQ, 32'h3FC, HBURST_INCR, 1);
    d(HTRANS_SEQ, 32'h400, HBURST_INCR, 1);
    expect_rule(R_BURST_1KB);

    restart(); d(HTRANS_NONSEQ, 32'h100, HBURST_INCR4, 1); d(HTRANS_SEQ, 32'h108, HBURST_INCR4, 1);
    expect_rule(R_INCR_ADDR);

    restart(); d(HTRANS_NONSEQ, 32'h10C, HBURST_WRAP4, 1); d(HTRANS_SEQ, 32'h110, HBURST_WRAP4, 1);
    expect_rule(R_WRAP_ADDR);

    restart(); d(HTRANS_NONSEQ, 32'h102, HBURST_SINGLE, 1);
    expect_rule(R_ALIGNMENT);

    restart();
    drv(HTRANS_NONSEQ, 32'h0, 0, HBURST_SINGLE, HSIZE_64, 0, 0, 1, HRESP_OKAY);
    expect_rule(R_HSIZE_BUS_WIDTH);

    restart(); d(HTRANS_IDLE, 32'h0, HBURST_SINGLE, 1); d(HTRANS_IDLE, 32'h0, HBURST_SINGLE, 0);
    expect_rule(R_IDLE_RESPONSE);

    restart(); d(HTRANS_NONSEQ, 32'h0, HBURST_INCR, 1); d(HTRANS_BUSY, 32'h4, HBURST_INCR, 1);
    d(HTRANS_SEQ, 32'h4, HBURST_INCR, 0);
    expect_rule(R_BUSY_RESPONSE);

    restart(); d(HTRANS_NONSEQ, 32'h0, HBURST_SINGLE, 1);
    drv(HTRANS_IDLE, 32'h0, 0, HBURST_SINGLE, HSIZE_32, 0, 0, 0, HRESP_ERROR);
    drv(HTRANS_IDLE, 32'h0, 0, HBURST_SINGLE, HSIZE_32, 0, 0, 0, HRESP_OKAY);
    expect_rule(R_TWO_CYCLE_RESPONSE);

    restart(); d(HTRANS_NONSEQ, 32'h0, HBURST_SINGLE, 1);
    repeat (WB + 1) d(HTRANS_IDLE, 32'h0, HBURST_SINGLE, 0);
    expect_rule(R_WAIT_BOUND);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
