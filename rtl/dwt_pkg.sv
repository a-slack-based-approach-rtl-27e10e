// dwt_pkg -- constants and control-word types of the DWT datapath.
//
// The datapath evaluates a 17-operation DWT dataflow graph (8 products, 9 sums)
// with 18 primary inputs. Every value lives in its own register:
//   input register  i (0..17) of the current bank holds primary input i of the
//                   iteration being computed; the "next" bank holds the inputs of
//                   the following iteration (used only by the overlapped schedule),
//   value register  k (1..17) holds the result of DFG operation k,
//   triple register k holds 3X for the multiplication k that consumes it.
// A source operand is named by src_t: {kind, idx}.
//
// One control word (dwt_ctrl_t) per control step drives the four functional units:
// two multipliers, one adder (which can also act as a tripler) and one tripler.
// Two schedules use it: the 19-step list schedule (dwt_controller) and the 15-step
// overlapped (modulo) schedule (dwt_modulo_controller).
package dwt_pkg;

  localparam int NUM_IN    = 18;  // primary inputs of the DFG
  localparam int NUM_OPS   = 17;  // DFG operations 1..17
  localparam int NUM_MULS  = 2;   // multiplier FUs
  localparam int CSTEPS    = 19;  // control steps of the list schedule
  localparam int II        = 15;  // steps per iteration of the modulo schedule
  localparam int PREP_ROW  = 9;   // first step of the next iteration's ops (modulo)
  localparam int MUL_LAT   = 3;   // multiplier latency in cycles
  localparam int RESULT_OP = 17;  // operation whose value is the output

  typedef logic [4:0] idx_t;

  typedef enum logic [1:0] {
    SRC_IN   = 2'd0,  // input register, current bank
    SRC_NEXT = 2'd1,  // input register, next-iteration bank
    SRC_VAL  = 2'd2   // value register
  } src_kind_e;

  typedef struct packed {
    src_kind_e kind;
    idx_t      idx;
  } src_t;

  // Multiplier FU: x is the multiplicand (its 3X comes from triple register x3),
  // y the Booth-recoded multiplier. load captures the product into value register dest.
  typedef struct packed {
    src_t x;
    src_t y;
    idx_t x3;
    logic load;
    idx_t dest;
  } mul_ctrl_t;

  typedef enum logic {
    ADD_SUM    = 1'b0,  // a + b       -> value register dest
    ADD_TRIPLE = 1'b1   // 2a + a = 3a -> triple register dest
  } add_mode_e;

  typedef struct packed {
    src_t      a;
    src_t      b;
    add_mode_e mode;
    logic      load;
    idx_t      dest;
  } add_ctrl_t;

  // Tripler FU: 3x of source x -> triple register dest.
  typedef struct packed {
    src_t x;
    logic load;
    idx_t dest;
  } trip_ctrl_t;

  typedef struct packed {
    mul_ctrl_t [NUM_MULS-1:0] mul;
    add_ctrl_t                add;
    trip_ctrl_t               trip;
  } dwt_ctrl_t;

  function automatic src_t in_src(idx_t i);
    return '{kind: SRC_IN, idx: i};
  endfunction

  function automatic src_t next_src(idx_t i);
    return '{kind: SRC_NEXT, idx: i};
  endfunction

  function automatic src_t val_src(idx_t k);
    return '{kind: SRC_VAL, idx: k};
  endfunction

  // Control-word builders used by the schedule tables.
  function automatic mul_ctrl_t mul_op(src_t x, src_t y, idx_t x3, idx_t dest, logic last);
    mul_ctrl_t m;
    m.x    = x;
    m.y    = y;
    m.x3   = x3;
    m.load = last;
    m.dest = dest;
    return m;
  endfunction

  function automatic add_ctrl_t add_op(src_t a, src_t b, idx_t dest);
    return '{a: a, b: b, mode: ADD_SUM, load: 1'b1, dest: dest};
  endfunction

  function automatic add_ctrl_t add_triple(src_t a, idx_t dest);
    return '{a: a, b: a, mode: ADD_TRIPLE, load: 1'b1, dest: dest};
  endfunction

  function automatic trip_ctrl_t trip_op(src_t x, idx_t dest);
    return '{x: x, load: 1'b1, dest: dest};
  endfunction

endpackage
