// ahb_lite_pkg: AHB-Lite signal encodings and the rule numbering of the
// AHB-Lite protocol checker.
//
// The encodings of HTRANS, HBURST, HSIZE and HRESP are those of the AMBA AHB
// specification. Each rule of the checker has an index into its violation
// vector; the rules are grouped as master rules (transfer type transitions,
// stability during wait states, burst well-formedness, structure) and slave
// rules (responses to IDLE/BUSY, two-cycle responses, wait-state bound).
package ahb_lite_pkg;

  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  typedef enum logic [2:0] {
    HBURST_SINGLE = 3'b000,
    HBURST_INCR   = 3'b001,
    HBURST_WRAP4  = 3'b010,
    HBURST_INCR4  = 3'b011,
    HBURST_WRAP8  = 3'b100,
    HBURST_INCR8  = 3'b101,
    HBURST_WRAP16 = 3'b110,
    HBURST_INCR16 = 3'b111
  } hburst_e;

  // HSIZE: transfer size is 8 << HSIZE bits (000 = 8 bits ... 111 = 1024).
  typedef enum logic [2:0] {
    HSIZE_8    = 3'b000,
    HSIZE_16   = 3'b001,
    HSIZE_32   = 3'b010,
    HSIZE_64   = 3'b011,
    HSIZE_128  = 3'b100,
    HSIZE_256  = 3'b101,
    HSIZE_512  = 3'b110,
    HSIZE_1024 = 3'b111
  } hsize_e;

  typedef enum logic [1:0] {
    HRESP_OKAY  = 2'b00,
    HRESP_ERROR = 2'b01,
    HRESP_RETRY = 2'b10,
    HRESP_SPLIT = 2'b11
  } hresp_e;

  // Index of each rule in the checker's violation vector.
  typedef enum int unsigned {
    R_TRANS_AFTER_SINGLE = 0,   // NONSEQ of a SINGLE is followed by IDLE or NONSEQ
    R_TRANS_AFTER_IDLE,         // IDLE is followed by IDLE or NONSEQ
    R_TRANS_AFTER_BUSY,         // BUSY is followed by BUSY or SEQ
    R_TRANS_AFTER_FIRST_BEAT,   // first beat of a burst is followed by BUSY or SEQ
    R_HWDATA_STABLE,            // write data held during wait states
    R_HTRANS_STABLE,            // address-phase signals held during wait states
    R_HADDR_STABLE,
    R_HWRITE_STABLE,
    R_HBURST_STABLE,
    R_HSIZE_STABLE,
    R_HPROT_STABLE,
    R_BEAT_COUNT,               // fixed-length bursts have exactly 4/8/16 beats
    R_BURST_HWRITE,             // control signals constant along a burst
    R_BURST_HSIZE,
    R_BURST_HBURST,
    R_BURST_HPROT,
    R_HADDR_BUSY_STABLE,        // address held while BUSY
    R_BUSY_BOUND,               // consecutive BUSY cycles bounded
    R_BURST_1KB,                // bursts stay inside one 1 KB block
    R_INCR_ADDR,                // incrementing burst addresses
    R_WRAP_ADDR,                // wrapping burst addresses
    R_ALIGNMENT,                // address aligned to the transfer size
    R_HSIZE_BUS_WIDTH,          // transfer not wider than the data bus
    R_IDLE_RESPONSE,            // zero-wait OKAY to IDLE
    R_BUSY_RESPONSE,            // zero-wait OKAY to BUSY
    R_TWO_CYCLE_RESPONSE,       // non-OKAY responses take two cycles
    R_WAIT_BOUND,               // consecutive wait states bounded
    R_NUM_RULES
  } ahb_rule_e;

  localparam int unsigned AHB_NUM_RULES = R_NUM_RULES;

  // One violation bit per rule.
  typedef logic [AHB_NUM_RULES-1:0] ahb_viol_t;

  // The slave's rules; all others (~ahb_slave_rules()) are the master's. A
  // design with a master interface is expected to keep the master rules, a
  // design with a slave interface the slave rules; the other side's rules
  // describe its legal environment.
  function automatic ahb_viol_t ahb_slave_rules();
    ahb_viol_t m;
    m = '0;
    m[R_IDLE_RESPONSE]      = 1'b1;
    m[R_BUSY_RESPONSE]      = 1'b1;
    m[R_TWO_CYCLE_RESPONSE] = 1'b1;
    m[R_WAIT_BOUND]         = 1'b1;
    return m;
  endfunction

  function automatic logic is_active(input logic [1:0] t);
    return t == HTRANS_NONSEQ || t == HTRANS_SEQ;
  endfunction

  // Beats of a fixed-length burst (0 for SINGLE and INCR).
  function automatic int unsigned burst_beats(input logic [2:0] b);
    unique case (b)
      HBURST_WRAP4,  HBURST_INCR4:  return 4;
      HBURST_WRAP8,  HBURST_INCR8:  return 8;
      HBURST_WRAP16, HBURST_INCR16: return 16;
      default:                      return 0;
    endcase
  endfunction

  function automatic logic is_wrap(input logic [2:0] b);
    return b == HBURST_WRAP4 || b == HBURST_WRAP8 || b == HBURST_WRAP16;
  endfunction

endpackage
