// stack: a LIFO buffer built from a memory array and a stack pointer.
//
// The stack grows upward from location 0. s_ptr addresses the top entry and a
// separate empty flag tells "one entry at location 0" apart from "no entry",
// since the pointer is 0 in both cases. A push writes d_in to s_ptr+1 (to 0 if
// the stack was empty) and moves the pointer there; a pop reads the entry at
// s_ptr onto d_out and moves the pointer down (to 0 with empty set when the
// popped entry was at 0). full is set when the pointer reaches DEPTH-1.
// A push while full and a pop while empty are ignored (no operation).
// A simultaneous push and pop is resolved by RW_POLICY (see stack_pkg).
//
// Interface and timing: all outputs are registers updated on the rising edge
// of clk. d_out carries the popped (or bypassed) word in the cycle after the
// request and is 0 after any other operation. rst is synchronous and active
// high: after it the stack is empty, the pointer is 0, full is low and d_out
// is 0. The memory itself is not reset.
//
// The pointer/flag conventions, d_out being 0 when nothing is popped, the
// three push+pop policies and the 64 x 8-bit size (the memory picture of the
// stack example) follow the description this design implements. The
// synchronous reset clearing d_out, the registered read port and the
// embedded assertions are this design's own choices.
module stack
  import stack_pkg::*;
#(
  parameter int unsigned DEPTH     = 64,
  parameter int unsigned WIDTH     = 8,
  parameter rw_policy_e  RW_POLICY = PUSH_OVERRIDES,
  localparam int unsigned AW       = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             push,
  input  logic             pop,
  input  logic [WIDTH-1:0] d_in,
  output logic [WIDTH-1:0] d_out,
  output logic             empty,
  output logic             full,
  output logic [AW-1:0]    s_ptr
);

  localparam logic [AW-1:0] A_MAX = AW'(DEPTH - 1);

  logic [WIDTH-1:0] memory [DEPTH];
  stack_op_e        op;
  logic [AW-1:0]    push_ptr;

  // Qualify the requests with the flags and apply the push+pop policy.
  always_comb begin
    op = OP_NOP;
    if (push && pop) begin
      unique case (RW_POLICY)
        PUSH_OVERRIDES: op = full ? OP_POP : OP_PUSH;
        FULL_BYPASS:    op = OP_BYPASS;
        SAFE_BYPASS:    op = empty ? OP_PUSH : (full ? OP_POP : OP_BYPASS);
        default:        op = OP_NOP;
      endcase
    end else if (push) begin
      op = full ? OP_NOP : OP_PUSH;
    end else if (pop) begin
      op = empty ? OP_NOP : OP_POP;
    end
  end

  // Address a push writes to: one above the top, or 0 on an empty stack.
  assign push_ptr = empty ? '0 : s_ptr + AW'(1);

  // Memory: one write port (push), read through the d_out register (pop).
  always_ff @(posedge clk) begin
    if (!rst && op == OP_PUSH) memory[push_ptr] <= d_in;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s_ptr <= '0;
      empty <= 1'b1;
      full  <= 1'b0;
      d_out <= '0;
    end else begin
      unique case (op)
        OP_PUSH: begin
          s_ptr <= push_ptr;
          empty <= 1'b0;
          full  <= (push_ptr == A_MAX);
          d_out <= '0;
        end
        OP_POP: begin
          d_out <= memory[s_ptr];
          full  <= 1'b0;
          if (s_ptr == '0) begin
            empty <= 1'b1;
          end else begin
            s_ptr <= s_ptr - AW'(1);
          end
        end
        OP_BYPASS: d_out <= d_in;
        default:   d_out <= '0;
      endcase
    end
  end

  // Invariants of the pointer and flags.
  a_not_empty_and_full: assert property (@(posedge clk) disable iff (rst)
    !(empty && full));
  a_ptr_zero_if_empty: assert property (@(posedge clk) disable iff (rst)
    empty |-> (s_ptr == '0));
  a_full_at_top: assert property (@(posedge clk) disable iff (rst)
    full |-> (s_ptr == A_MAX));

  // Effect of each operation, one cycle later.
  a_nop: assert property (@(posedge clk) disable iff (rst)
    (op == OP_NOP) |=> (d_out == '0 && $stable(s_ptr) && $stable(empty) && $stable(full)));
  a_push: assert property (@(posedge clk) disable iff (rst)
    (op == OP_PUSH) |=> (d_out == '0 && !empty && memory[s_ptr] == $past(d_in) &&
                         full == (s_ptr == A_MAX)));
  a_pop: assert property (@(posedge clk) disable iff (rst)
    (op == OP_POP) |=> (!full && d_out == $past(memory[s_ptr])));
  a_bypass: assert property (@(posedge clk) disable iff (rst)
    (op == OP_BYPASS) |=> (d_out == $past(d_in) && $stable(s_ptr) && $stable(empty) &&
                           $stable(full)));

endmodule
