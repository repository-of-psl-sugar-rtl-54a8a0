// tb_stack: self-checking testbench for the stack.
//
// Four instances run in parallel. Three small ones (DEPTH 8) share random
// push/pop/data stimulus, one per simultaneous push+pop policy, and are
// compared every cycle against a reference model held in plain arrays here.
// The fourth, at the default 64 x 8 size, replays the pop-then-push example
// (cells 12 03 4C FE 51, pop returns 51, push 2B lands at location 4) and is
// then filled to the top and drained to check full and empty at full size.
// Checked each cycle: d_out, empty, full and s_ptr. A watchdog ends the run.
module tb_stack;
  import stack_pkg::*;

  localparam int D  = 8;
  localparam int W  = 8;
  localparam int AW = $clog2(D);

  logic clk = 1'b0;
  logic rst;
  logic push, pop;
  logic [W-1:0] d_in;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [W-1:0]  dout [3];
  logic          emp  [3];
  logic          ful  [3];
  logic [AW-1:0] sp   [3];

  stack #(.DEPTH(D), .WIDTH(W), .RW_POLICY(PUSH_OVERRIDES)) u_po (
    .clk, .rst, .push, .pop, .d_in, .d_out(dout[0]), .empty(emp[0]), .full(ful[0]), .s_ptr(sp[0]));
  stack #(.DEPTH(D), .WIDTH(W), .RW_POLICY(FULL_BYPASS)) u_fb (
    .clk, .rst, .push, .pop, .d_in, .d_out(dout[1]), .empty(emp[1]), .full(ful[1]), .s_ptr(sp[1]));
  stack #(.DEPTH(D), .WIDTH(W), .RW_POLICY(SAFE_BYPASS)) u_sb (
    .clk, .rst, .push, .pop, .d_in, .d_out(dout[2]), .empty(emp[2]), .full(ful[2]), .s_ptr(sp[2]));

  // Full-size instance, default parameters.
  logic       f_rst, f_push, f_pop;
  logic [7:0] f_din, f_dout;
  logic       f_empty, f_full;
  logic [5:0] f_sp;
  stack u_fig (.clk, .rst(f_rst), .push(f_push), .pop(f_pop), .d_in(f_din),
               .d_out(f_dout), .empty(f_empty), .full(f_full), .s_ptr(f_sp));

  // Reference model: n[k] entries, m[k][0..n-1] with the top at n-1.
  logic [W-1:0] m [3][D];
  int           n [3];
  logic [W-1:0] exp_dout [3];
  int bypasses = 0, full_hits = 0, empty_pops = 0, full_pushes = 0;

  task automatic model_step(input int k, input rw_policy_e pol);
    bit do_push, do_pop, do_byp;
    do_push = 0; do_pop = 0; do_byp = 0;
    if (rst) begin
      n[k] = 0; exp_dout[k] = '0;
      return;
    end
    if (push && pop) begin
      case (pol)
        PUSH_OVERRIDES: if (n[k] < D) do_push = 1; else do_pop = 1;
        FULL_BYPASS:    do_byp = 1;
        default:        if (n[k] == 0) do_push = 1;
                        else if (n[k] == D) do_pop = 1;
                        else do_byp = 1;
      endcase
    end else if (push) begin
      do_push = (n[k] < D);
      if (n[k] == D) full_pushes++;
    end else if (pop) begin
      do_pop = (n[k] > 0);
      if (n[k] == 0) empty_pops++;
    end
    exp_dout[k] = '0;
    if (do_push) begin m[k][n[k]] = d_in; n[k]++; end
    if (do_pop)  begin n[k]--; exp_dout[k] = m[k][n[k]]; end
    if (do_byp)  begin exp_dout[k] = d_in; bypasses++; end
  endtask

  task automatic compare(input int k);
    logic [AW-1:0] esp;
    esp = (n[k] == 0) ? '0 : AW'(n[k] - 1);
    checks++;
    if (dout[k] !== exp_dout[k] || emp[k] !== (n[k] == 0) || ful[k] !== (n[k] == D) || sp[k] !== esp) begin
      failures++;
      if (failures < 10)
        $display("FAIL stack[%0d] t=%0t dout=%h/%h empty=%b/%b full=%b/%b sp=%0d/%0d", k, $time,
                 dout[k], exp_dout[k], emp[k], n[k] == 0, ful[k], n[k] == D, sp[k], esp);
    end
    if (n[k] == D) full_hits++;
  endtask

  // Drive one cycle on the small instances, then compare after the edge.
  task automatic cycle(input logic r, input logic pu, input logic po, input logic [W-1:0] d);
    rst = r; push = pu; pop = po; d_in = d;
    @(posedge clk);
    model_step(0, PUSH_OVERRIDES);
    model_step(1, FULL_BYPASS);
    model_step(2, SAFE_BYPASS);
    #1;
    for (int k = 0; k < 3; k++) compare(k);
  endtask

  task automatic fcycle(input logic r, input logic pu, input logic po, input logic [7:0] d);
    f_rst = r; f_push = pu; f_pop = po; f_din = d;
    @(posedge clk); #1;
  endtask

  task automatic fcheck(input logic [7:0] dout_e, input logic emp_e, input logic ful_e,
                        input int sp_e, input string what);
    checks++;
    if (f_dout !== dout_e || f_empty !== emp_e || f_full !== ful_e || f_sp !== 6'(sp_e)) begin
      failures++;
      $display("FAIL %s: dout=%h/%h empty=%b/%b full=%b/%b sp=%0d/%0d", what, f_dout, dout_e,
               f_empty, emp_e, f_full, ful_e, f_sp, sp_e);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Full-size instance: the memory example, then fill and drain.
  initial begin : full_size
    logic [7:0] cells [5];
    cells = '{8'h12, 8'h03, 8'h4C, 8'hFE, 8'h51};
    fcycle(1, 0, 0, 0);
    fcheck(0, 1, 0, 0, "reset");
    foreach (cells[i]) begin
      fcycle(0, 1, 0, cells[i]);
      fcheck(0, 0, 0, i, "example push");
    end
    fcycle(0, 0, 1, 0);
    fcheck(8'h51, 0, 0, 3, "example pop");
    fcycle(0, 1, 0, 8'h2B);
    fcheck(0, 0, 0, 4, "example push 2B");
    fcycle(0, 0, 0, 0);
    fcheck(0, 0, 0, 4, "example nop");
    // Fill to 64 entries.
    for (int i = 5; i < 64; i++) fcycle(0, 1, 0, 8'(i * 3));
    fcheck(0, 0, 1, 63, "full at 64 entries");
    fcycle(0, 1, 0, 8'hAA);
    fcheck(0, 0, 1, 63, "push while full ignored");
    // Drain and check every word.
    for (int i = 63; i >= 0; i--) begin
      logic [7:0] e;
      e = (i >= 5) ? 8'(i * 3) : (i == 4 ? 8'h2B : cells[i]);
      fcycle(0, 0, 1, 0);
      fcheck(e, i == 0, 0, (i == 0) ? 0 : i - 1, "drain");
    end
    fcycle(0, 0, 1, 0);
    fcheck(0, 1, 0, 0, "pop while empty ignored");
  end

  initial begin : small_stacks
    f_rst = 1; f_push = 0; f_pop = 0; f_din = 0;
    for (int k = 0; k < 3; k++) begin n[k] = 0; exp_dout[k] = '0; end
    cycle(1, 0, 0, 0);
    cycle(1, 0, 0, 0);
    // Directed: fill past full, simultaneous at full, drain past empty,
    // simultaneous at empty and in the middle.
    for (int i = 0; i < D + 2; i++) cycle(0, 1, 0, 8'(8'h10 + i));
    cycle(0, 1, 1, 8'hA5);
    for (int i = 0; i < D + 2; i++) cycle(0, 0, 1, 8'h00);
    cycle(0, 1, 1, 8'h5A);
    cycle(0, 1, 0, 8'h77);
    cycle(0, 1, 1, 8'h33);
    cycle(0, 0, 0, 8'h00);
    // Random traffic, biased toward pushes then toward pops.
    for (int i = 0; i < 6000; i++) begin
      int bias;
      bias = ((i / 200) % 2 == 0) ? 60 : 35;
      cycle(($urandom % 500) == 0, ($urandom % 100) < bias, ($urandom % 100) < (95 - bias),
            W'($urandom));
    end
    repeat (140) @(posedge clk);
    checks++;
    if (bypasses == 0 || full_hits == 0 || empty_pops == 0 || full_pushes == 0) begin
      failures++;
      $display("FAIL coverage bypass=%0d full=%0d empty_pop=%0d full_push=%0d",
               bypasses, full_hits, empty_pops, full_pushes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
