// zpu_em_pkg: types, sizes and the transition table shared by the ZPU
// execution monitor and its testbenches.
//
// The monitor sees the target core as a sequence of samples, one per clock:
// the core's internal control state and a small set of control signals (the
// "signal set"). A transition record says which step (state A, signal set S)
// -> state B is legal and what the new signal set S' must look like in B.
//
// From the source design: 23 control states, a table of 112 records, the
// state names RESYNC, RESYNC2, RESYNC3, FETCH, DECODE, DECODE2, EXECUTE and
// INTERRUPT with the edges between them, an internal no-op state, and the
// control signals memory read/write enable, interrupt, operand-immediate and
// in-interrupt. Everything else here is this design's own reconstruction of
// a ZPU-like control graph: the remaining 14 state names, the decoded opcode
// classes, mem_busy and brk, the record format (precondition masks,
// post-condition values and hold masks) and the table contents (49 records
// filled, the rest of the 112 entries marked invalid).
package zpu_em_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned N_STATES = 23;   // control states of the target
  localparam int unsigned N_TRANS  = 112;  // transition table capacity
  localparam int unsigned STATE_W  = 5;

  // ---------------------------------------------------------- state codes
  typedef enum logic [STATE_W-1:0] {
    ST_RESYNC    = 5'd0,
    ST_RESYNC2   = 5'd1,
    ST_RESYNC3   = 5'd2,
    ST_FETCH     = 5'd3,
    ST_DECODE    = 5'd4,
    ST_DECODE2   = 5'd5,
    ST_EXECUTE   = 5'd6,
    ST_INTERRUPT = 5'd7,
    ST_NOP       = 5'd8,
    ST_IM        = 5'd9,
    ST_LOADSP2   = 5'd10,
    ST_LOADSP3   = 5'd11,
    ST_STORESP2  = 5'd12,
    ST_POPPED    = 5'd13,
    ST_ADDSP2    = 5'd14,
    ST_LOAD2     = 5'd15,
    ST_STORE2    = 5'd16,
    ST_STORE3    = 5'd17,
    ST_BINOP2    = 5'd18,
    ST_BINOPRES  = 5'd19,
    ST_UNOP2     = 5'd20,
    ST_EMULATE   = 5'd21,
    ST_EMULATE2  = 5'd22
  } zpu_state_e;

  // Decoded opcode classes held by the core from DECODE to the next DECODE.
  typedef enum logic [3:0] {
    OP_NOP     = 4'd0,
    OP_IM      = 4'd1,
    OP_LOADSP  = 4'd2,
    OP_STORESP = 4'd3,
    OP_ADDSP   = 4'd4,
    OP_LOAD    = 4'd5,
    OP_STORE   = 4'd6,
    OP_POPPC   = 4'd7,
    OP_BINOP   = 4'd8,
    OP_UNOP    = 4'd9,
    OP_EMULATE = 4'd10,
    OP_BREAK   = 4'd11
  } zpu_op_e;
  localparam int unsigned N_OPS = 12;

  // ----------------------------------------------------------- signal set
  typedef struct packed {
    logic    mem_busy;      // memory not ready (input to the core)
    logic    irq;           // interrupt request (input to the core)
    logic    mem_read;      // memory_read_enable
    logic    mem_write;     // memory_write_enable
    logic    idim;          // operand_immediate: last instruction was IM
    logic    in_interrupt;  // core is servicing an interrupt
    logic    brk;           // break instruction executed
    zpu_op_e op;            // decoded opcode class
  } ctrl_sig_t;

  localparam int unsigned SIG_W = $bits(ctrl_sig_t);  // 11

  // Bit masks of the fields of ctrl_sig_t.
  localparam logic [SIG_W-1:0] F_BUSY = 11'h400;
  localparam logic [SIG_W-1:0] F_IRQ  = 11'h200;
  localparam logic [SIG_W-1:0] F_RD   = 11'h100;
  localparam logic [SIG_W-1:0] F_WR   = 11'h080;
  localparam logic [SIG_W-1:0] F_IDIM = 11'h040;
  localparam logic [SIG_W-1:0] F_INT  = 11'h020;
  localparam logic [SIG_W-1:0] F_BRK  = 11'h010;
  localparam logic [SIG_W-1:0] F_OP   = 11'h00F;

  // One sample carried from the target layer to the monitor layer.
  typedef struct packed {
    zpu_state_e state;
    ctrl_sig_t  sig;
  } em_sample_t;

  // ------------------------------------------------------ transition record
  // A record matches when from_state == A, to_state == B and
  // (S & pre_mask) == pre_val. Its post-conditions hold when
  // (S' & post_mask) == post_val and no bit of hold_mask differs between S
  // and S'. Bits in none of the masks are free.
  typedef struct packed {
    logic             valid;
    zpu_state_e       from_state;
    zpu_state_e       to_state;
    logic [SIG_W-1:0] pre_mask;
    logic [SIG_W-1:0] pre_val;
    logic [SIG_W-1:0] post_mask;
    logic [SIG_W-1:0] post_val;
    logic [SIG_W-1:0] hold_mask;
  } trans_rec_t;

  typedef trans_rec_t [N_TRANS-1:0] trans_table_t;

  // Memory strobes each state drives (a Moore output of the control FSM).
  function automatic logic [SIG_W-1:0] state_strobes(zpu_state_e s);
    case (s)
      ST_RESYNC, ST_RESYNC2, ST_FETCH, ST_LOADSP2, ST_POPPED, ST_ADDSP2,
      ST_LOAD2, ST_STORE3, ST_BINOP2:           return F_RD;
      ST_INTERRUPT, ST_STORESP2, ST_STORE2,
      ST_EMULATE:                               return F_WR;
      default:                                  return '0;
    endcase
  endfunction

  // States that wait on mem_busy: they loop on themselves while it is set.
  function automatic logic waits_on_memory(zpu_state_e s);
    return state_strobes(s) != '0;
  endfunction

  // Build one record. Every record fixes the strobes of the destination
  // state and clears brk; qm/qv add post-conditions; idim, in_interrupt and
  // op must hold unless a post-condition sets them or 'free' releases them.
  function automatic trans_rec_t rec(zpu_state_e a, zpu_state_e b,
                                     logic [SIG_W-1:0] pm, logic [SIG_W-1:0] pv,
                                     logic [SIG_W-1:0] qm, logic [SIG_W-1:0] qv,
                                     logic [SIG_W-1:0] free);
    trans_rec_t r;
    r.valid      = 1'b1;
    r.from_state = a;
    r.to_state   = b;
    r.pre_mask   = pm;
    r.pre_val    = pv & pm;
    r.post_mask  = F_RD | F_WR | F_BRK | qm;
    r.post_val   = (state_strobes(b) | qv) & (F_RD | F_WR | F_BRK | qm);
    r.hold_mask  = (F_IDIM | F_INT | F_OP) & ~qm & ~free;
    return r;
  endfunction

  // Destination of EXECUTE for each opcode class.
  function automatic zpu_state_e exec_target(zpu_op_e op);
    case (op)
      OP_NOP:     return ST_NOP;
      OP_IM:      return ST_IM;
      OP_LOADSP:  return ST_LOADSP2;
      OP_STORESP: return ST_STORESP2;
      OP_ADDSP:   return ST_ADDSP2;
      OP_LOAD:    return ST_LOAD2;
      OP_STORE:   return ST_STORE2;
      OP_POPPC:   return ST_RESYNC;
      OP_BINOP:   return ST_BINOP2;
      OP_UNOP:    return ST_UNOP2;
      OP_EMULATE: return ST_EMULATE;
      default:    return ST_FETCH;   // OP_BREAK
    endcase
  endfunction

  // Successor of a state once its memory access (if any) is done, for all
  // states other than DECODE and EXECUTE.
  function automatic zpu_state_e next_state(zpu_state_e s);
    case (s)
      ST_RESYNC:    return ST_RESYNC2;
      ST_RESYNC2:   return ST_RESYNC3;
      ST_RESYNC3:   return ST_DECODE;
      ST_FETCH:     return ST_DECODE;
      ST_DECODE2:   return ST_EXECUTE;
      ST_INTERRUPT: return ST_DECODE;
      ST_LOADSP2:   return ST_LOADSP3;
      ST_STORESP2:  return ST_POPPED;
      ST_ADDSP2:    return ST_BINOPRES;
      ST_STORE2:    return ST_STORE3;
      ST_BINOP2:    return ST_BINOPRES;
      ST_EMULATE:   return ST_EMULATE2;
      ST_EMULATE2:  return ST_RESYNC;
      default:      return ST_FETCH;  // NOP, IM, LOADSP3, POPPED, LOAD2,
                                      // STORE3, BINOPRES, UNOP2
    endcase
  endfunction

  // The legal transitions of the target, entries numbered 1.. in order.
  function automatic trans_table_t zpu_table();
    trans_table_t t;
    int unsigned  n;
    zpu_state_e   s, d;
    zpu_op_e      op;
    t = '0;
    n = 0;
    for (int i = 0; i < int'(N_STATES); i++) begin
      s = zpu_state_e'(i);
      if (s == ST_DECODE) begin
        // Interrupt taken only when none is being serviced.
        t[n] = rec(ST_DECODE, ST_INTERRUPT, F_IRQ | F_INT, F_IRQ,
                   F_INT, F_INT, '0);                            n++;
        // A new opcode is decoded on the way to DECODE2.
        t[n] = rec(ST_DECODE, ST_DECODE2, F_IRQ, '0, '0, '0, F_OP); n++;
        t[n] = rec(ST_DECODE, ST_DECODE2, F_IRQ | F_INT, F_IRQ | F_INT,
                   '0, '0, F_OP);                                n++;
      end else if (s == ST_EXECUTE) begin
        for (int k = 0; k < int'(N_OPS); k++) begin
          op = zpu_op_e'(k);
          d  = exec_target(op);
          case (op)
            OP_IM:    t[n] = rec(s, d, F_OP, SIG_W'(op), F_IDIM, F_IDIM, '0);
            OP_BREAK: t[n] = rec(s, d, F_OP, SIG_W'(op), F_IDIM | F_BRK, F_BRK, '0);
            OP_POPPC: t[n] = rec(s, d, F_OP, SIG_W'(op), F_IDIM | F_INT, '0, '0);
            default:  t[n] = rec(s, d, F_OP, SIG_W'(op), F_IDIM, '0, '0);
          endcase
          n++;
        end
      end else if (waits_on_memory(s)) begin
        t[n] = rec(s, s, F_BUSY, F_BUSY, '0, '0, '0);             n++;
        t[n] = rec(s, next_state(s), F_BUSY, '0, '0, '0, '0);     n++;
      end else begin
        t[n] = rec(s, next_state(s), '0, '0, '0, '0, '0);         n++;
      end
    end
    return t;
  endfunction

  localparam trans_table_t ZPU_TABLE = zpu_table();

  // Number of valid entries of a table.
  function automatic int unsigned table_used(trans_table_t t);
    int unsigned n;
    n = 0;
    for (int i = 0; i < int'(N_TRANS); i++)
      if (t[i].valid) n++;
    return n;
  endfunction

  // Number of filled entries of ZPU_TABLE (49).
  localparam int unsigned ZPU_TABLE_USED = table_used(ZPU_TABLE);

endpackage
