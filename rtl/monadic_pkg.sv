// monadic_pkg: types and widths shared by the Monadic processor element.
//
// A token is <c.s_p, v>: a context (activation-frame base) c, the address s
// of the instruction it is bound for, the operand port p of that instruction
// and a data value v.  An instruction carries an opcode, the frame offset r of
// its rendezvous slot (matching address c+r), a matching function (monadic or
// dyadic), an immediate used as the second operand of monadic instructions,
// and up to two destinations, each with an S bit telling the form-token stage
// whether the destination is a monadic (S=0) or dyadic (S=1) instruction.
// The token and instruction layout beyond the fields <c.s_p, v>,
// <op, r, dest> and S1/S2 is this design's choice, as are all widths.
package monadic_pkg;

  localparam int unsigned DATA_W = 32;  // value width
  localparam int unsigned CTX_W  = 8;   // context c, also frame/presence address width
  localparam int unsigned IP_W   = 8;   // instruction pointer s
  localparam int unsigned IMM_W  = 16;  // immediate operand of monadic instructions

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [CTX_W-1:0]  ctx_t;
  typedef logic [IP_W-1:0]   ip_t;

  typedef enum logic [3:0] {
    OP_ID    = 4'd0,   // v' = v_l (identity / fork)
    OP_ADD   = 4'd1,
    OP_SUB   = 4'd2,
    OP_MUL   = 4'd3,
    OP_AND   = 4'd4,
    OP_OR    = 4'd5,
    OP_XOR   = 4'd6,
    OP_LT    = 4'd7,   // v' = (v_l < v_r), signed
    OP_GT    = 4'd8,   // v' = (v_l > v_r), signed
    OP_EQ    = 4'd9,
    OP_STEER = 4'd10,  // v' = v_l, sent to dest 1 if v_r != 0 else dest 2
    OP_OUT   = 4'd11   // v' = v_l, sent to the host output, no token
  } op_t;

  typedef enum logic {
    MF_MONADIC = 1'b0,
    MF_DYADIC  = 1'b1
  } mf_t;

  typedef struct packed {
    ip_t  ip;     // s
    logic port;   // p: 0 left operand, 1 right operand
  } dest_t;

  typedef struct packed {
    ctx_t  ctx;   // c
    ip_t   ip;    // s
    logic  port;  // p
    data_t value; // v
  } token_t;

  typedef struct packed {
    op_t              op;
    mf_t              mf;
    ctx_t             r;     // frame offset of the rendezvous slot
    logic [IMM_W-1:0] imm;   // second operand of a monadic instruction (sign-extended)
    dest_t            d1;
    dest_t            d2;
    logic             d1v;   // destination 1 present
    logic             d2v;   // destination 2 present
    logic             s1;    // S1: destination 1 is a dyadic instruction
    logic             s2;    // S2: destination 2 is a dyadic instruction
  } instr_t;

  // IF -> SC
  typedef struct packed {
    logic   valid;
    token_t tok;
    instr_t ins;
  } if_sc_t;

  // SC -> OM
  typedef struct packed {
    logic   valid;
    token_t tok;
    instr_t ins;
    ctx_t   ma;   // matching address c+r
    logic   sna;  // sync-non-achieved
  } sc_om_t;

  // OM / IF1 -> ALU and form-tag (FTA stage)
  typedef struct packed {
    op_t   op;
    data_t vl;
    data_t vr;
    ctx_t  ctx;
    dest_t d1;
    dest_t d2;
    logic  d1v;
    logic  d2v;
    logic  s1;
    logic  s2;
  } exec_t;

  // form-tag -> form-token
  typedef struct packed {
    logic  t1v;
    logic  t2v;
    ctx_t  ctx;
    dest_t d1;
    dest_t d2;
    logic  s1;
    logic  s2;
    logic  out;   // result goes to the host output
  } tags_t;

  function automatic data_t sext_imm(input logic [IMM_W-1:0] imm);
    return {{(DATA_W-IMM_W){imm[IMM_W-1]}}, imm};
  endfunction

  // Operand packet for an instruction whose operands are v_l and v_r.
  function automatic exec_t make_exec(input instr_t ins, input ctx_t ctx,
                                      input data_t vl, input data_t vr);
    exec_t e;
    e.op  = ins.op;
    e.vl  = vl;
    e.vr  = vr;
    e.ctx = ctx;
    e.d1  = ins.d1;
    e.d2  = ins.d2;
    e.d1v = ins.d1v;
    e.d2v = ins.d2v;
    e.s1  = ins.s1;
    e.s2  = ins.s2;
    return e;
  endfunction

endpackage
