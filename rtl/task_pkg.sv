// task_pkg: shared types and constants of the Multiscalar task sequencer.
//
// A task header describes up to four exits. Each exit carries a 5-bit exit
// specifier (the control-flow type of the instruction that leaves the task),
// a 32-bit target address (valid for BRANCH and CALL exits) and a 32-bit
// return address (valid for CALL and INDIRECT_CALL exits). The field sizes
// follow the document; the one-hot encoding of the five exit types in the
// 5-bit specifier, with all-zero meaning "no exit in this slot", is this
// design's own choice.
package task_pkg;

  localparam int unsigned ADDR_W    = 32;  // task start addresses
  localparam int unsigned NUM_EXITS = 4;   // exits per task header
  localparam int unsigned EXIT_W    = $clog2(NUM_EXITS);
  localparam int unsigned SPEC_W    = 5;   // exit specifier width

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [EXIT_W-1:0] exit_t;

  // One-hot exit specifier. EXIT_NONE marks an unused header slot.
  typedef enum logic [SPEC_W-1:0] {
    EXIT_NONE          = 5'b00000,
    EXIT_BRANCH        = 5'b00001,
    EXIT_CALL          = 5'b00010,
    EXIT_RETURN        = 5'b00100,
    EXIT_INDIRECT_BR   = 5'b01000,
    EXIT_INDIRECT_CALL = 5'b10000
  } exit_spec_e;

  typedef struct packed {
    exit_spec_e spec;
    addr_t      target;    // compile-time target (BRANCH, CALL), else 0
    addr_t      ret_addr;  // return point (CALL, INDIRECT_CALL), else 0
  } exit_info_t;

  typedef struct packed {
    exit_info_t [NUM_EXITS-1:0] exits;
  } task_header_t;

  function automatic logic is_call(exit_spec_e s);
    return (s == EXIT_CALL) || (s == EXIT_INDIRECT_CALL);
  endfunction

  function automatic logic is_indirect(exit_spec_e s);
    return (s == EXIT_INDIRECT_BR) || (s == EXIT_INDIRECT_CALL);
  endfunction

  // Number of populated exit slots of a header.
  function automatic int unsigned num_exits(task_header_t h);
    int unsigned n = 0;
    for (int i = 0; i < NUM_EXITS; i++)
      if (h.exits[i].spec != EXIT_NONE) n++;
    return n;
  endfunction

endpackage
