// tb_cfg_regs: self-checking testbench for the configuration register block.
//
// A cycle-based loop issues random reads and writes (random byte enables,
// mostly mapped addresses, some unmapped ones, some writes to the read-only
// register), sometimes back to back with req held high, while status_in,
// ev_set and insig change randomly. A model of the four registers predicts
// every response. Checked each cycle: r_req only in the cycle after a new
// request (one-cycle response), r_data and error in that cycle, the
// register-driven outputs ctrl_out, wo_out and outsig, which must follow a
// write one cycle after the write request is first seen. A watchdog ends the
// run.
module tb_cfg_regs;
  logic clk = 1'b0;
  logic rst;
  logic req, we;
  logic [3:0] be;
  logic [15:2] addr;
  logic [31:0] data, r_data, status_in, ev_set, ctrl_out, wo_out;
  logic r_req, error, insig, outsig;
  int checks = 0, failures = 0;
  int n_err = 0, n_wo_rd = 0, n_b2b = 0, n_ev = 0, n_rd = 0, n_wr = 0;

  always #5 clk = ~clk;

  cfg_regs u_dut (.*);

  logic [31:0] m_ctrl, m_wo, m_status, m_event;
  logic [15:0] addrs [6] = '{16'h6000, 16'h6004, 16'h6008, 16'h600C, 16'h6010, 16'h1000};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  function automatic logic [31:0] mask(input logic [3:0] b);
    for (int i = 0; i < 4; i++) mask[8*i +: 8] = {8{b[i]}};
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int age;
    bit resp_now, first_now, valid;
    logic [31:0] e_rdata;
    logic [15:0] a;
    rst = 1; req = 0; we = 0; be = 0; addr = 0; data = 0;
    status_in = 0; ev_set = 0; insig = 0;
    m_ctrl = 0; m_wo = 0; m_status = 0; m_event = 0;
    age = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      // Choose this cycle's inputs.
      status_in = $urandom;
      ev_set    = (($urandom % 8) == 0) ? (32'h1 << ($urandom % 32)) : '0;
      insig     = 1'($urandom);
      if (ev_set != 0) n_ev++;
      if (!req || age == 2) begin
        // Idle, or the cycle after a response: maybe start a new request.
        if (($urandom % 3) != 0) begin
          if (req) n_b2b++;
          req  = 1;
          we   = 1'($urandom);
          be   = 4'($urandom);
          a    = addrs[$urandom % 6];
          if (($urandom % 10) == 0) a = 16'($urandom) & 16'hFFFC;
          addr = a[15:2];
          data = $urandom;
          age  = 0;
        end else begin
          req = 0;
          age = 0;
        end
      end
      #1;
      resp_now  = req && age == 1;
      first_now = req && age == 0;
      a = {addr, 2'b00};
      valid = (a == 16'h6000 || a == 16'h6004 || a == 16'h600C || (a == 16'h6008 && !we));
      check(r_req == resp_now, "r_req timing");
      if (resp_now) begin
        e_rdata = '0;
        if (!we && valid) begin
          case (a)
            16'h6000: e_rdata = m_ctrl;
            16'h6008: e_rdata = m_status;
            16'h600C: e_rdata = m_event;
            default:  e_rdata = '0;
          endcase
        end
        check(error == !valid, "error");
        check(r_data == e_rdata, "r_data");
        if (!valid) n_err++;
        if (!we && a == 16'h6004) n_wo_rd++;
        if (we) n_wr++; else n_rd++;
      end else begin
        check(!error, "error outside response");
      end
      check(ctrl_out == m_ctrl && wo_out == m_wo, "register outputs");
      check(outsig == (m_ctrl[4] && insig), "outsig");
      @(posedge clk);
      #1;
      // Model update for the edge just taken.
      if (first_now && we && valid) begin
        case (a)
          16'h6000: m_ctrl  = (m_ctrl & ~mask(be)) | (data & mask(be));
          16'h6004: m_wo    = (m_wo & ~mask(be)) | (data & mask(be));
          16'h600C: m_event = (m_event & ~mask(be)) | (data & mask(be));
          default: ;
        endcase
      end
      m_event  = m_event | ev_set;
      m_status = status_in;
      if (req) age++;
    end
    check(n_err > 0 && n_wo_rd > 0 && n_b2b > 0 && n_ev > 0 && n_rd > 0 && n_wr > 0, "coverage");
    $display("reads=%0d writes=%0d errors=%0d wo_reads=%0d back_to_back=%0d ext_events=%0d",
             n_rd, n_wr, n_err, n_wo_rd, n_b2b, n_ev);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
