// sat_pkg: types and constants shared by the control unit (CU) and the
// implication units (IU) of the distributed SAT solver.
//
// Variables are addressed with VAR_W = 9 bits, so an instance may use at most
// 512 variables (0..511); this width is the one the design is specified with.
// Everything else here is this design's own encoding: the command word the CU
// broadcasts on its output bus, the response word an IU drives on the shared
// return bus, the literal format and the per-variable status codes
// (free / assigned by a decision / implied) that the local variable memories hold.
package sat_pkg;

  // Variable address width: 9 bits -> 512 variables.
  localparam int unsigned VAR_W  = 9;
  localparam int unsigned N_VARS = 1 << VAR_W;
  // IU address field of a command word: up to 16 IUs.
  localparam int unsigned IU_AW  = 4;

  // Status of one variable as kept in an IU's local variable memory.
  typedef enum logic [1:0] {
    V_FREE     = 2'd0,
    V_ASSIGNED = 2'd1,   // set by a CU decision (or a flipped decision)
    V_IMPLIED  = 2'd2    // derived by unit propagation
  } vstat_e;

  // A literal: variable index and polarity (neg = 1 means "not var").
  typedef struct packed {
    logic             neg;
    logic [VAR_W-1:0] vidx;
  } lit_t;

  // A literal of the instance as the CU stores it: last marks the last
  // literal of a clause.
  typedef struct packed {
    logic last;
    lit_t lit;
  } inst_lit_t;

  // Commands carried on the CU -> IU bus.
  typedef enum logic [2:0] {
    CMD_NOP      = 3'd0,
    CMD_LIT      = 3'd1,  // addressed: append one literal to the IU's clause memory
    CMD_CFG_DONE = 3'd2,  // addressed: sub-instance complete, raise cfgout
    CMD_CLEAR    = 3'd3,  // broadcast: all variables free, drop implication data
    CMD_VAR      = 3'd4,  // broadcast: write one variable's status and value
    CMD_READ     = 3'd5   // addressed: stream out the implication data
  } cmd_e;

  // CU -> IU command word (20 bits).
  typedef struct packed {
    cmd_e             cmd;
    logic [IU_AW-1:0] addr;   // target IU of addressed commands
    logic             last;   // CMD_LIT: last literal of the clause
    vstat_e           stat;   // CMD_VAR: new status
    logic             value;  // CMD_VAR: value; CMD_LIT: polarity (1 = negated)
    logic [VAR_W-1:0] vidx;    // CMD_LIT / CMD_VAR: variable
  } cu_word_t;

  // One implication: variable and the value it is forced to.
  typedef struct packed {
    logic             value;
    logic [VAR_W-1:0] vidx;
  } impl_t;

  // IU -> CU response word (12 bits). A read response is a run of
  // implication words (last = 0) closed by one end word (last = 1) whose
  // conflict bit tells whether the IU found a clause with every literal false.
  typedef struct packed {
    logic  last;
    logic  conflict;
    impl_t impl;
  } iu_word_t;

  localparam cu_word_t CU_NOP = '{cmd: CMD_NOP, addr: '0, last: 1'b0,
                                  stat: V_FREE, value: 1'b0, vidx: '0};

endpackage
