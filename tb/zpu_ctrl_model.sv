// zpu_ctrl_model: behavioural model (testbench only) of the control path of
// a ZPU-like stack processor, standing in for the target core.
//
// It produces, once per clock, the core's control state and its monitored
// signal set, following the control graph the monitor's table describes:
// reset into RESYNC, RESYNC -> RESYNC2 -> RESYNC3 -> DECODE, FETCH -> DECODE,
// DECODE -> INTERRUPT -> DECODE when an interrupt is taken, DECODE ->
// DECODE2 -> EXECUTE, and from EXECUTE one path per decoded opcode class.
// States that access memory wait while mem_busy is set. mem_busy, the
// interrupt request and the decoded opcode are drawn at random with
// $urandom. The control graph is coded here as its own case statements, not
// taken from the table, so that the monitor is checked against a second
// description of the same behaviour.
//
// anomaly_i selects one of two deliberate deviations of the target:
//   1: each 6th visit to the no-op state raises in_interrupt;
//   2: the no-op state goes straight to RESYNC instead of FETCH.
// anomaly_o is high in the cycle of a sample that breaks the rules.
module zpu_ctrl_model
  import zpu_em_pkg::*;
#(
  parameter int unsigned BUSY_PCT = 30,
  parameter int unsigned IRQ_PCT  = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] anomaly_i,
  output logic       valid_o,
  output zpu_state_e state_o,
  output ctrl_sig_t  sig_o,
  output logic       anomaly_o
);

  int unsigned nop_count;

  function automatic logic [1:0] strobes(zpu_state_e s);  // {read, write}
    case (s)
      ST_RESYNC, ST_RESYNC2, ST_FETCH, ST_LOADSP2, ST_POPPED, ST_ADDSP2,
      ST_LOAD2, ST_STORE3, ST_BINOP2:                 return 2'b10;
      ST_INTERRUPT, ST_STORESP2, ST_STORE2, ST_EMULATE: return 2'b01;
      default:                                        return 2'b00;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    zpu_state_e  ns;
    ctrl_sig_t   nsig;
    logic        bad;
    if (!rst_n) begin
      valid_o   <= 1'b0;
      state_o   <= ST_RESYNC;
      sig_o     <= '0;
      anomaly_o <= 1'b0;
      nop_count <= 0;
    end else if (!valid_o) begin
      // First sample out of reset.
      valid_o        <= 1'b1;
      sig_o          <= '0;
      sig_o.mem_read <= 1'b1;
      sig_o.mem_busy <= ($urandom_range(99) < BUSY_PCT);
      state_o        <= ST_RESYNC;
    end else begin
      ns   = state_o;
      nsig = sig_o;
      bad  = 1'b0;
      nsig.brk = 1'b0;
      case (state_o)
        ST_RESYNC:    if (!sig_o.mem_busy) ns = ST_RESYNC2;
        ST_RESYNC2:   if (!sig_o.mem_busy) ns = ST_RESYNC3;
        ST_RESYNC3:   ns = ST_DECODE;
        ST_FETCH:     if (!sig_o.mem_busy) ns = ST_DECODE;
        ST_DECODE:
          if (sig_o.irq && !sig_o.in_interrupt) begin
            ns = ST_INTERRUPT;
            nsig.in_interrupt = 1'b1;
          end else begin
            ns = ST_DECODE2;
            nsig.op = zpu_op_e'($urandom_range(int'(N_OPS) - 1));
          end
        ST_INTERRUPT: if (!sig_o.mem_busy) ns = ST_DECODE;
        ST_DECODE2:   ns = ST_EXECUTE;
        ST_EXECUTE: begin
          nsig.idim = 1'b0;
          case (sig_o.op)
            OP_NOP:     ns = ST_NOP;
            OP_IM:      begin ns = ST_IM; nsig.idim = 1'b1; end
            OP_LOADSP:  ns = ST_LOADSP2;
            OP_STORESP: ns = ST_STORESP2;
            OP_ADDSP:   ns = ST_ADDSP2;
            OP_LOAD:    ns = ST_LOAD2;
            OP_STORE:   ns = ST_STORE2;
            OP_POPPC:   begin ns = ST_RESYNC; nsig.in_interrupt = 1'b0; end
            OP_BINOP:   ns = ST_BINOP2;
            OP_UNOP:    ns = ST_UNOP2;
            OP_EMULATE: ns = ST_EMULATE;
            default:    begin ns = ST_FETCH; nsig.brk = 1'b1; end
          endcase
          if (ns == ST_NOP && anomaly_i == 2'd1) begin
            if (nop_count == 5) begin
              nop_count <= 0;
              bad = !sig_o.in_interrupt;
              nsig.in_interrupt = 1'b1;
            end else begin
              nop_count <= nop_count + 1;
            end
          end
        end
        ST_NOP:
          if (anomaly_i == 2'd2) begin
            ns  = ST_RESYNC;
            bad = 1'b1;
          end else begin
            ns = ST_FETCH;
          end
        ST_LOADSP2:   if (!sig_o.mem_busy) ns = ST_LOADSP3;
        ST_STORESP2:  if (!sig_o.mem_busy) ns = ST_POPPED;
        ST_ADDSP2:    if (!sig_o.mem_busy) ns = ST_BINOPRES;
        ST_STORE2:    if (!sig_o.mem_busy) ns = ST_STORE3;
        ST_BINOP2:    if (!sig_o.mem_busy) ns = ST_BINOPRES;
        ST_EMULATE:   if (!sig_o.mem_busy) ns = ST_EMULATE2;
        ST_EMULATE2:  ns = ST_RESYNC;
        ST_POPPED, ST_LOAD2, ST_STORE3:
                      if (!sig_o.mem_busy) ns = ST_FETCH;
        default:      ns = ST_FETCH;  // IM, LOADSP3, BINOPRES, UNOP2
      endcase
      {nsig.mem_read, nsig.mem_write} = strobes(ns);
      nsig.mem_busy = ($urandom_range(99) < BUSY_PCT);
      nsig.irq      = ($urandom_range(99) < IRQ_PCT);
      state_o   <= ns;
      sig_o     <= nsig;
      anomaly_o <= bad;
    end
  end

endmodule
