// ahb_lite_checker: synthesizable AHB-Lite protocol monitor.
//
// It watches one AHB-Lite interface (single master, no arbitration, no
// SPLIT/RETRY handshake) and flags every cycle in which a rule of the
// protocol is broken. The rules are those of the rule-based AHB-Lite
// property set, grouped as:
//   master - legal HTRANS transitions; HTRANS, HADDR, HWRITE, HBURST, HSIZE,
//            HPROT and write data held while HREADY is low; exact beat count
//            of 4/8/16-beat bursts; HWRITE/HSIZE/HBURST/HPROT constant along a
//            burst; HADDR held during BUSY; bounded run of BUSY; bursts inside
//            one 1 KB block; incrementing and wrapping address sequences;
//            address alignment; transfer not wider than the data bus
//   slave  - zero-wait OKAY response to IDLE and BUSY; ERROR/RETRY/SPLIT
//            responses take two cycles (HREADY low, then high, same HRESP);
//            bounded run of wait states
// Rule indices are given by ahb_rule_e in ahb_lite_pkg.
//
// How it works: one register stage keeps the previous cycle's bus values
// (transition and stability rules compare against them). A burst tracker
// captures the control signals and the 1 KB block of the first beat, counts
// remaining beats of fixed-length bursts, and keeps the address the next
// SEQ (or a BUSY in front of it) must carry: the last accepted address plus
// the transfer size, wrapped inside the burst's address window for WRAPx.
// Run-length counters bound BUSY and wait-state runs. As in the property set,
// master rules are suspended while HRESP is not OKAY (in this cycle or the
// previous one), and a non-OKAY response ends the burst being tracked.
//
// Interface and timing: viol is combinational and reports the rules broken
// by the values present in the current cycle (meaningful while HRESETn is
// high); viol_sticky accumulates viol on each clock edge until reset; any_viol
// is the OR of viol; master_viol and slave_viol are the OR over the master's
// and over the slave's rules (to check a master, treat slave_viol as a broken
// environment assumption, and the other way round). HRESETn is the usual active-low AHB reset, synchronous
// here.
//
// Departures chosen where the rule set is loose: stability during wait
// states is required up to and including the cycle in which HREADY returns
// high; write-data stability applies to the data phase of a write transfer;
// the BUSY and wait-state runs are checked as upper bounds, the BUSY run
// counting BUSY transfers (a BUSY held through wait states counts once); the address rules
// check the address a SEQ/BUSY must carry (BUSY does not advance it);
// alignment and bus width are checked on NONSEQ/SEQ transfers only.
module ahb_lite_checker
  import ahb_lite_pkg::*;
#(
  parameter int unsigned DATA_BUS_SIZE     = 32,
  parameter int unsigned WAIT_STATES_BOUND = 15,
  parameter int unsigned BUSY_BOUND        = 15,
  parameter int unsigned ADDR_W            = 32
) (
  input  logic                         hclk,
  input  logic                         hresetn,
  input  logic [1:0]                   htrans,
  input  logic [ADDR_W-1:0]            haddr,
  input  logic                         hwrite,
  input  logic [2:0]                   hburst,
  input  logic [2:0]                   hsize,
  input  logic [3:0]                   hprot,
  input  logic [DATA_BUS_SIZE-1:0]     hwdata,
  input  logic                         hready,
  input  logic [1:0]                   hresp,
  output ahb_viol_t                    viol,
  output ahb_viol_t                    viol_sticky,
  output logic                         any_viol,
  output logic                         master_viol,
  output logic                         slave_viol
);

  localparam int unsigned CW = $clog2(((WAIT_STATES_BOUND > BUSY_BOUND) ? WAIT_STATES_BOUND : BUSY_BOUND) + 2);

  // Previous-cycle bus values.
  logic                     p_valid;
  logic [1:0]               p_htrans, p_hresp;
  logic [ADDR_W-1:0]        p_haddr;
  logic                     p_hwrite, p_hready;
  logic [2:0]               p_hburst, p_hsize;
  logic [3:0]               p_hprot;
  logic [DATA_BUS_SIZE-1:0] p_hwdata;

  // Data phase: a write transfer is in its data phase.
  logic dp_write;

  // Burst tracker.
  logic              in_burst;
  logic              b_write;
  logic [2:0]        b_burst, b_size;
  logic [3:0]        b_prot;
  logic [ADDR_W-1:0] b_blk;        // HADDR with bits 9..0 cleared
  logic [4:0]        beats_left;   // SEQ beats still due in a fixed burst
  logic [9:0]        exp_addr;     // address bits 9..0 the next SEQ/BUSY must show

  logic [CW-1:0]     busy_run, wait_run;

  logic              accepted;     // an address phase completes at this edge
  logic              abort_m;      // master rules suspended (non-OKAY response)
  logic              start_burst;  // first beat of a non-SINGLE burst accepted
  logic              seq_beat;     // SEQ beat accepted
  logic              ends_burst;
  logic [9:0]        nbytes;       // transfer size in bytes (bounded to 128)
  logic [9:0]        next_addr;    // address following an accepted beat
  logic              effective;    // burst to which the 1 KB / address rules apply

  assign accepted    = hready;
  assign abort_m     = (hresp != HRESP_OKAY) || (p_valid && p_hresp != HRESP_OKAY);
  assign start_burst = htrans == HTRANS_NONSEQ && hready && hburst != HBURST_SINGLE;
  assign seq_beat    = in_burst && htrans == HTRANS_SEQ && hready;
  assign ends_burst  = htrans == HTRANS_IDLE || htrans == HTRANS_NONSEQ;

  always_comb begin
    nbytes = 10'd1 << hsize;
    // Address after this beat: size increment, wrapped for WRAP bursts.
    begin
      logic [9:0] sum, wmask;
      sum   = haddr[9:0] + nbytes;
      wmask = 10'(burst_beats(hburst) * nbytes) - 10'd1;
      if (is_wrap(hburst)) next_addr = (haddr[9:0] & ~wmask) | (sum & wmask);
      else                 next_addr = sum;
    end
  end

  // The 1 KB and address rules exclude 16-beat bursts of 1024-bit transfers
  // (whose window is larger than 1 KB) as the property set does.
  assign effective = !((b_burst == HBURST_INCR16 || b_burst == HBURST_WRAP16) &&
                       b_size == HSIZE_1024);

  // ----------------------------------------------------------------------
  // Rule evaluation
  // ----------------------------------------------------------------------
  always_comb begin
    viol = '0;
    if (hresetn) begin
      // Structural rules, every NONSEQ/SEQ transfer.
      if (is_active(htrans)) begin
        if ((haddr[6:0] & (7'(nbytes) - 7'd1)) != '0) viol[R_ALIGNMENT] = 1'b1;
        if ((32'd8 << hsize) > DATA_BUS_SIZE)          viol[R_HSIZE_BUS_WIDTH] = 1'b1;
      end

      if (p_valid) begin
        // --- master: transfer type transitions ---
        if (!abort_m) begin
          if (p_htrans == HTRANS_NONSEQ && p_hburst == HBURST_SINGLE && p_hready &&
              !(htrans == HTRANS_IDLE || htrans == HTRANS_NONSEQ))
            viol[R_TRANS_AFTER_SINGLE] = 1'b1;
          if (p_htrans == HTRANS_IDLE && !(htrans == HTRANS_IDLE || htrans == HTRANS_NONSEQ))
            viol[R_TRANS_AFTER_IDLE] = 1'b1;
          if (p_htrans == HTRANS_BUSY && p_hready &&
              !(htrans == HTRANS_BUSY || htrans == HTRANS_SEQ))
            viol[R_TRANS_AFTER_BUSY] = 1'b1;
          if (p_htrans == HTRANS_NONSEQ && p_hburst != HBURST_SINGLE && p_hready &&
              !(htrans == HTRANS_BUSY || htrans == HTRANS_SEQ))
            viol[R_TRANS_AFTER_FIRST_BEAT] = 1'b1;

          // --- master: stability while the slave inserts wait states ---
          if (!p_hready) begin
            if (dp_write && hwdata != p_hwdata) viol[R_HWDATA_STABLE] = 1'b1;
            if (is_active(p_htrans)) begin
              if (htrans != p_htrans) viol[R_HTRANS_STABLE] = 1'b1;
              if (hwrite != p_hwrite) viol[R_HWRITE_STABLE] = 1'b1;
              if (hburst != p_hburst) viol[R_HBURST_STABLE] = 1'b1;
              if (hsize  != p_hsize)  viol[R_HSIZE_STABLE]  = 1'b1;
              if (hprot  != p_hprot)  viol[R_HPROT_STABLE]  = 1'b1;
            end
            if (p_htrans != HTRANS_IDLE && haddr != p_haddr) viol[R_HADDR_STABLE] = 1'b1;
          end

          // --- master: address held during BUSY ---
          if (p_htrans == HTRANS_BUSY && htrans != HTRANS_SEQ && haddr != p_haddr)
            viol[R_HADDR_BUSY_STABLE] = 1'b1;

          // --- master: burst well-formedness ---
          if (in_burst) begin
            if (htrans == HTRANS_SEQ || htrans == HTRANS_BUSY) begin
              if (hwrite != b_write) viol[R_BURST_HWRITE] = 1'b1;
              if (hsize  != b_size)  viol[R_BURST_HSIZE]  = 1'b1;
              if (hburst != b_burst) viol[R_BURST_HBURST] = 1'b1;
              if (hprot  != b_prot)  viol[R_BURST_HPROT]  = 1'b1;
              if (burst_beats(b_burst) != 0 && beats_left == '0 && htrans == HTRANS_SEQ)
                viol[R_BEAT_COUNT] = 1'b1;   // more beats than the burst has
              if (effective) begin
                if ({haddr[ADDR_W-1:10], 10'd0} != b_blk) viol[R_BURST_1KB] = 1'b1;
                if (haddr[9:0] != exp_addr) begin
                  if (is_wrap(b_burst)) viol[R_WRAP_ADDR] = 1'b1;
                  else                  viol[R_INCR_ADDR] = 1'b1;
                end
              end
            end else if (beats_left != '0) begin
              viol[R_BEAT_COUNT] = 1'b1;     // burst ended early
            end
          end
        end

        // --- slave rules ---
        if (p_hready && (p_htrans == HTRANS_IDLE) && !(hready && hresp == HRESP_OKAY))
          viol[R_IDLE_RESPONSE] = 1'b1;
        if (p_hready && (p_htrans == HTRANS_BUSY) && !(hready && hresp == HRESP_OKAY))
          viol[R_BUSY_RESPONSE] = 1'b1;
        if (!p_hready && p_hresp != HRESP_OKAY && !(hready && hresp == p_hresp))
          viol[R_TWO_CYCLE_RESPONSE] = 1'b1;
        if (hready && hresp != HRESP_OKAY && !(!p_hready && p_hresp == hresp))
          viol[R_TWO_CYCLE_RESPONSE] = 1'b1;
      end else begin
        // First cycle after reset: a non-OKAY second cycle has no first one.
        if (hready && hresp != HRESP_OKAY) viol[R_TWO_CYCLE_RESPONSE] = 1'b1;
      end

      if (htrans == HTRANS_BUSY && hready && busy_run >= CW'(BUSY_BOUND))
        viol[R_BUSY_BOUND] = 1'b1;
      if (!hready && wait_run >= CW'(WAIT_STATES_BOUND))       viol[R_WAIT_BOUND] = 1'b1;
    end
  end

  assign any_viol    = |viol;
  assign master_viol = |(viol & ~ahb_slave_rules());
  assign slave_viol  = |(viol & ahb_slave_rules());

  // ----------------------------------------------------------------------
  // State
  // ----------------------------------------------------------------------
  always_ff @(posedge hclk) begin
    if (!hresetn) begin
      p_valid     <= 1'b0;
      p_htrans    <= HTRANS_IDLE;
      p_hresp     <= HRESP_OKAY;
      p_haddr     <= '0;
      p_hwrite    <= 1'b0;
      p_hready    <= 1'b1;
      p_hburst    <= HBURST_SINGLE;
      p_hsize     <= HSIZE_8;
      p_hprot     <= '0;
      p_hwdata    <= '0;
      dp_write    <= 1'b0;
      in_burst    <= 1'b0;
      b_write     <= 1'b0;
      b_burst     <= HBURST_SINGLE;
      b_size      <= HSIZE_8;
      b_prot      <= '0;
      b_blk       <= '0;
      beats_left  <= '0;
      exp_addr    <= '0;
      busy_run    <= '0;
      wait_run    <= '0;
      viol_sticky <= '0;
    end else begin
      p_valid  <= 1'b1;
      p_htrans <= htrans;
      p_hresp  <= hresp;
      p_haddr  <= haddr;
      p_hwrite <= hwrite;
      p_hready <= hready;
      p_hburst <= hburst;
      p_hsize  <= hsize;
      p_hprot  <= hprot;
      p_hwdata <= hwdata;
      viol_sticky <= viol_sticky | viol;

      if (accepted) dp_write <= is_active(htrans) && hwrite;

      // Burst tracking.
      if (hresp != HRESP_OKAY) begin
        in_burst   <= 1'b0;
        beats_left <= '0;
      end else if (start_burst) begin
        in_burst   <= 1'b1;
        b_write    <= hwrite;
        b_burst    <= hburst;
        b_size     <= hsize;
        b_prot     <= hprot;
        b_blk      <= {haddr[ADDR_W-1:10], 10'd0};
        beats_left <= (burst_beats(hburst) != 0) ? 5'(burst_beats(hburst) - 1) : '0;
        exp_addr   <= next_addr;
      end else if (in_burst && ends_burst) begin
        in_burst   <= 1'b0;
        beats_left <= '0;
      end else if (seq_beat) begin
        if (beats_left != '0) beats_left <= beats_left - 5'd1;
        exp_addr <= next_addr;
      end

      // BUSY run: counts BUSY transfers (cycles with HREADY high); a BUSY
      // held through the slave's wait states does not add to it.
      if (htrans != HTRANS_BUSY)     busy_run <= '0;
      else if (hready && busy_run != '1) busy_run <= busy_run + CW'(1);
      wait_run <= (!hready)               ? ((wait_run == '1) ? wait_run : wait_run + CW'(1)) : '0;
    end
  end

endmodule
