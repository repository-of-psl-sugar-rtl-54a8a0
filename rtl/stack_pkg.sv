// stack_pkg: shared types for the stack.
//
// The stack can resolve a simultaneous push and pop request in one of three
// ways. All three are alternative stack architectures described for the same
// property set; the module selects one with its RW_POLICY parameter:
//   PUSH_OVERRIDES - the push is served unless the stack is full, in which
//                    case the pop is served.
//   FULL_BYPASS    - the memory is bypassed: the pushed word appears on d_out
//                    in the next cycle, pointer, memory and flags unchanged,
//                    whatever the full/empty flags say.
//   SAFE_BYPASS    - as FULL_BYPASS when the stack is neither full nor empty;
//                    a push is served when empty and a pop when full.
package stack_pkg;

  typedef enum logic [1:0] {
    PUSH_OVERRIDES = 2'd0,
    FULL_BYPASS    = 2'd1,
    SAFE_BYPASS    = 2'd2
  } rw_policy_e;

  // Operation actually performed in a cycle, after the request has been
  // qualified by the flags and by the simultaneous-request policy.
  typedef enum logic [1:0] {
    OP_NOP    = 2'd0,
    OP_PUSH   = 2'd1,
    OP_POP    = 2'd2,
    OP_BYPASS = 2'd3
  } stack_op_e;

endpackage
