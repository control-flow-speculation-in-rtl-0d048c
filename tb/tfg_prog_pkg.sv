// tfg_prog_pkg: task flow graph programs used by the sequencer testbenches.
//
// A program is a set of task headers (keyed by start address) plus a
// behaviour: resolve() returns the exit a task really takes and the real next
// task address, keeping the program's state (loop counters and a call stack
// for return exits). It is called once per task, in commit order, so it acts
// as the reference for the correct task stream.
//
// Program 1 is the loop of the example task flow graph: a caller repeatedly
// calls a function made of three tasks (loop test, inner while loop, loop
// tail with an early return and a break). Program 2 adds direct and indirect
// calls, an indirect branch whose target depends on the path, a four-exit
// task, a task whose exits sit in slots 1 and 3 only, and a recursion deeper
// than the return address stack. Program 3 is short and periodic, with an
// indirect branch, so that a path of seven tasks identifies every decision:
// a working predictor makes no mistakes on it once trained.
package tfg_prog_pkg;
  import task_pkg::*;

  int unsigned prog;
  task_header_t hdrs [addr_t];
  addr_t        stack [$];
  int unsigned  st_i, st_j, st_calls, st_a, st_c, st_d, st_f, st_f1, st_depth;
  bit           st_via_b;
  int unsigned  max_depth;

  function automatic exit_info_t ex(exit_spec_e s, addr_t t = 0, addr_t r = 0);
    exit_info_t e;
    e.spec = s; e.target = t; e.ret_addr = r;
    return e;
  endfunction

  function automatic void put(addr_t a, exit_info_t e0, exit_info_t e1 = ex(EXIT_NONE),
                              exit_info_t e2 = ex(EXIT_NONE), exit_info_t e3 = ex(EXIT_NONE));
    task_header_t h;
    h.exits[0] = e0; h.exits[1] = e1; h.exits[2] = e2; h.exits[3] = e3;
    hdrs[a] = h;
  endfunction

  function automatic addr_t start_addr();
    return (prog == 1) ? 32'h044 : (prog == 3) ? 32'h604 : 32'h1008;
  endfunction

  function automatic void build(int unsigned p);
    prog = p;
    hdrs.delete(); stack.delete();
    st_i = 0; st_j = 0; st_calls = 0; st_a = 0; st_c = 0; st_d = 0; st_f = 0; st_f1 = 0;
    st_depth = 0; st_via_b = 0; max_depth = 0;
    if (p == 1) begin
      put(32'h044, ex(EXIT_CALL, 32'h104, 32'h51c));                       // caller
      put(32'h104, ex(EXIT_BRANCH, 32'h410), ex(EXIT_BRANCH, 32'h228));    // i == 10 ?
      put(32'h228, ex(EXIT_BRANCH, 32'h33c), ex(EXIT_BRANCH, 32'h228));    // while loop
      put(32'h33c, ex(EXIT_RETURN), ex(EXIT_BRANCH, 32'h410),              // done / break
                   ex(EXIT_BRANCH, 32'h104));                              // i++, jump
      put(32'h410, ex(EXIT_RETURN));                                       // after loop
      put(32'h51c, ex(EXIT_BRANCH, 32'h044));                              // back to caller
    end else if (p == 3) begin
      put(32'h604, ex(EXIT_BRANCH, 32'h6a8), ex(EXIT_BRANCH, 32'h6cc));
      put(32'h6a8, ex(EXIT_BRANCH, 32'h604));
      put(32'h6cc, ex(EXIT_BRANCH, 32'h604), ex(EXIT_INDIRECT_BR), ex(EXIT_BRANCH, 32'h738));
      put(32'h738, ex(EXIT_BRANCH, 32'h604));
      put(32'h6f0, ex(EXIT_BRANCH, 32'h604));
      put(32'h714, ex(EXIT_BRANCH, 32'h6a8));
    end else begin
      put(32'h1008, ex(EXIT_BRANCH, 32'h1114), ex(EXIT_BRANCH, 32'h1224));
      put(32'h1114, ex(EXIT_CALL, 32'h2004, 32'h1338));
      put(32'h1224, ex(EXIT_INDIRECT_CALL, 0, 32'h1338), ex(EXIT_BRANCH, 32'h1338));
      put(32'h1338, ex(EXIT_INDIRECT_BR), ex(EXIT_BRANCH, 32'h1664));
      put(32'h144c, ex(EXIT_BRANCH, 32'h1008));
      put(32'h1550, ex(EXIT_NONE), ex(EXIT_BRANCH, 32'h1008), ex(EXIT_NONE), ex(EXIT_BRANCH, 32'h144c));
      put(32'h1664, ex(EXIT_CALL, 32'h3008, 32'h1008));
      put(32'h2004, ex(EXIT_BRANCH, 32'h2118), ex(EXIT_RETURN), ex(EXIT_BRANCH, 32'h222c),
                    ex(EXIT_INDIRECT_BR));
      put(32'h2118, ex(EXIT_RETURN));
      put(32'h222c, ex(EXIT_RETURN));
      put(32'h2430, ex(EXIT_RETURN));
      put(32'h3008, ex(EXIT_CALL, 32'h3008, 32'h310c), ex(EXIT_BRANCH, 32'h3210));
      put(32'h310c, ex(EXIT_RETURN));
      put(32'h3210, ex(EXIT_RETURN));
    end
  endfunction

  // Header of any address; an address outside the program (reachable only on
  // a wrong path) gets a single branch exit back to the start.
  function automatic task_header_t header_of(addr_t a);
    if (hdrs.exists(a)) return hdrs[a];
    begin
      task_header_t h = '0;
      h.exits[0] = ex(EXIT_BRANCH, start_addr());
      return h;
    end
  endfunction

  function automatic addr_t do_ret();
    if (stack.size() == 0) return start_addr();
    if (st_depth > 0) st_depth--;
    return stack.pop_back();
  endfunction

  // Real outcome of task a; advances the program state.
  function automatic void resolve(addr_t a, output exit_t e, output addr_t t);
    task_header_t h = header_of(a);
    e = 0;
    if (prog == 1) begin
      case (a)
        32'h044: st_calls++;
        32'h104: if (st_i == 10) begin e = 0; st_i = 0; end else e = 1;
        32'h228: if (st_j == 2) begin e = 0; st_j = 0; end else begin e = 1; st_j++; end
        32'h33c: if (st_calls % 4 == 3 && st_i == 5) begin e = 0; st_i = 0; end
                 else if (st_calls % 5 == 4 && st_i == 7) begin e = 1; st_i = 0; end
                 else begin e = 2; st_i++; end
        default: e = 0;
      endcase
    end else if (prog == 3) begin
      case (a)
        32'h604: begin e = (st_a % 3 == 2) ? 1 : 0; st_a++; end
        32'h6cc: begin e = (st_c % 2 == 1) ? 1 : (st_c % 4 == 2) ? 2 : 0; st_c++; end
        default: e = 0;
      endcase
    end else begin
      case (a)
        32'h1008: begin e = (st_a % 3 == 2) ? 1 : 0; st_a++; st_via_b = (e == 0); end
        32'h1224: begin e = (st_c % 4 == 3) ? 1 : 0; st_c++; end
        32'h1338: begin e = (st_d % 8 == 7) ? 1 : 0; st_d++; end
        32'h1550: begin e = (st_f % 2 == 1) ? 3 : 1; st_f++; end
        32'h2004: begin e = exit_t'(st_f1 % 4); st_f1++; end
        32'h3008: e = (st_depth < 20) ? 0 : 1;
        default:  e = 0;
      endcase
    end
    case (h.exits[e].spec)
      EXIT_RETURN: t = do_ret();
      EXIT_CALL: begin
        stack.push_back(h.exits[e].ret_addr); st_depth++;
        if (st_depth > max_depth) max_depth = st_depth;
        t = h.exits[e].target;
      end
      EXIT_INDIRECT_CALL: begin
        stack.push_back(h.exits[e].ret_addr); st_depth++;
        t = (st_c % 2 == 0) ? 32'h2004 : 32'h2430;
      end
      EXIT_INDIRECT_BR:
        if (a == 32'h6cc)       t = (st_c % 4 == 2) ? 32'h6f0 : 32'h714;
        else if (a == 32'h1338) t = st_via_b ? 32'h144c : 32'h1550;
        else               t = (st_f1 % 8 < 4) ? 32'h2118 : 32'h222c;
      default: t = h.exits[e].target;
    endcase
  endfunction

endpackage
