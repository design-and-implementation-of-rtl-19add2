// fpau_pkg: types and constants shared by the partially reconfigurable
// floating point arithmetic unit.
//
// The number format is IEEE-754 single precision: 1 sign bit, an 8-bit
// biased exponent and a 23-bit fraction with a hidden leading one. The host
// operation codes number the operations 1 add, 2 sub, 3 mul, 4 div, as in the
// module list of the reconfiguration floorplan. The reconfigurable region
// holds one of three modules: the adder-subtractor (used by both add and sub),
// the multiplier or the divider. Code 0 means "no operation" / "region empty".
package fpau_pkg;

  localparam int unsigned EXP_W  = 8;
  localparam int unsigned FRAC_W = 23;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp32_t;

  // Host operation codes.
  typedef enum logic [2:0] {
    OP_NONE = 3'd0,
    OP_ADD  = 3'd1,
    OP_SUB  = 3'd2,
    OP_MUL  = 3'd3,
    OP_DIV  = 3'd4
  } op_e;

  // Reconfigurable modules that can occupy the region.
  typedef enum logic [1:0] {
    RM_NONE   = 2'd0,
    RM_ADDSUB = 2'd1,
    RM_MUL    = 2'd2,
    RM_DIV    = 2'd3
  } rm_e;

  // Which module an operation needs.
  function automatic rm_e rm_for_op(op_e op);
    case (op)
      OP_ADD, OP_SUB: return RM_ADDSUB;
      OP_MUL:         return RM_MUL;
      OP_DIV:         return RM_DIV;
      default:        return RM_NONE;
    endcase
  endfunction

  // Host register map (word addresses).
  localparam logic [2:0] REG_OPA    = 3'd0;
  localparam logic [2:0] REG_OPB    = 3'd1;
  localparam logic [2:0] REG_CTRL   = 3'd2;
  localparam logic [2:0] REG_STATUS = 3'd3;
  localparam logic [2:0] REG_RESULT = 3'd4;
  localparam logic [2:0] REG_CFG    = 3'd5;
  localparam logic [2:0] REG_COUNT  = 3'd6;

endpackage
