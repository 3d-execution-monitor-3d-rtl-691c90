// tb_em_monitor: directed test of the execution monitor on the ZPU table.
//
// Samples are driven straight into the monitor, one per clock, and each
// report is checked one clock later. The expected entry numbers were worked
// out by hand from the order of the table (per source state in state-code
// order: RESYNC 1-2, RESYNC2 3-4, RESYNC3 5, FETCH 6-7, DECODE 8-10,
// DECODE2 11, EXECUTE 12-23 by opcode class, INTERRUPT 24-25, NOP 26, ...).
// Covered: idle after reset, the start-state rule, a legal walk through
// stalls, decode, execute, no-op, interrupt entry and break, the two
// deviations of the source design (in_interrupt raised in the no-op state;
// no-op straight to RESYNC), a wrong memory strobe, and a gap in
// sample_valid.
module tb_em_monitor;
  import zpu_em_pkg::*;

  localparam int unsigned IDX_W = $clog2(N_TRANS + 1);

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             s_valid = 1'b0;
  em_sample_t       smp;
  logic             checked, predicate, vt, vc;
  logic [IDX_W-1:0] idx;
  logic [SIG_W-1:0] viol;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  em_monitor dut (
    .clk(clk), .rst_n(rst_n), .sample_valid_i(s_valid), .sample_i(smp),
    .checked_o(checked), .predicate_o(predicate), .valid_transition_o(vt),
    .valid_changes_o(vc), .match_index_o(idx), .viol_o(viol)
  );

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: chk=%0d pred=%0d vt=%0d vc=%0d idx=%0d viol=%h",
               what, checked, predicate, vt, vc, idx, viol);
    end
  endtask

  function automatic ctrl_sig_t sg(zpu_op_e op, logic rd = 0, logic wr = 0,
                                   logic busy = 0, logic irq = 0,
                                   logic inint = 0, logic idim = 0, logic brk = 0);
    ctrl_sig_t s;
    s = '0;
    s.op = op; s.mem_read = rd; s.mem_write = wr; s.mem_busy = busy;
    s.irq = irq; s.in_interrupt = inint; s.idim = idim; s.brk = brk;
    return s;
  endfunction

  // Present one sample and check the report that follows one clock later.
  task automatic step(input zpu_state_e st, input ctrl_sig_t s,
                      input logic e_vt, input logic e_vc, input int e_idx,
                      input string what);
    smp.state = st; smp.sig = s; s_valid = 1'b1;
    @(negedge clk);
    check(checked && vt == e_vt && vc == e_vc && predicate == (e_vt && e_vc)
          && idx == IDX_W'(e_idx), what);
  endtask

  initial begin
    smp = '0;
    repeat (3) @(negedge clk);
    check(!checked && predicate && vt && vc && idx == 0, "idle in reset");
    rst_n = 1'b1;
    @(negedge clk);
    check(!checked && predicate && idx == 0, "idle before first sample");

    // legal walk
    step(ST_RESYNC,   sg(OP_NOP, 1, 0, 1),       1, 1, 0,  "first sample RESYNC");
    step(ST_RESYNC,   sg(OP_NOP, 1, 0, 0),       1, 1, 1,  "RESYNC stall");
    step(ST_RESYNC2,  sg(OP_NOP, 1, 0, 0),       1, 1, 2,  "RESYNC->RESYNC2");
    step(ST_RESYNC3,  sg(OP_NOP),                1, 1, 4,  "RESYNC2->RESYNC3");
    step(ST_DECODE,   sg(OP_NOP),                1, 1, 5,  "RESYNC3->DECODE");
    step(ST_DECODE2,  sg(OP_IM),                 1, 1, 9,  "DECODE->DECODE2");
    step(ST_EXECUTE,  sg(OP_IM),                 1, 1, 11, "DECODE2->EXECUTE");
    step(ST_IM,       sg(OP_IM, .idim(1)),       1, 1, 13, "EXECUTE->IM");
    step(ST_FETCH,    sg(OP_IM, 1, .idim(1)),    1, 1, 27, "IM->FETCH");
    step(ST_DECODE,   sg(OP_IM, .idim(1), .irq(1)), 1, 1, 7, "FETCH->DECODE");
    step(ST_INTERRUPT, sg(OP_IM, 0, 1, .idim(1), .inint(1)), 1, 1, 8, "DECODE->INTERRUPT");
    step(ST_DECODE,   sg(OP_IM, .idim(1), .inint(1), .irq(1)), 1, 1, 25, "INTERRUPT->DECODE");
    step(ST_DECODE2,  sg(OP_BREAK, .idim(1), .inint(1)), 1, 1, 10, "DECODE->DECODE2 in service");
    step(ST_EXECUTE,  sg(OP_BREAK, .idim(1), .inint(1)), 1, 1, 11, "DECODE2->EXECUTE");
    step(ST_FETCH,    sg(OP_BREAK, 1, .inint(1), .brk(1)), 1, 1, 23, "EXECUTE BREAK");
    step(ST_DECODE,   sg(OP_BREAK, .inint(1)),   1, 1, 7,  "FETCH->DECODE");
    step(ST_DECODE2,  sg(OP_POPPC, .inint(1)),   1, 1, 9,  "DECODE->DECODE2");
    step(ST_EXECUTE,  sg(OP_POPPC, .inint(1)),   1, 1, 11, "DECODE2->EXECUTE");
    step(ST_RESYNC,   sg(OP_POPPC, 1),           1, 1, 19, "EXECUTE POPPC");
    step(ST_RESYNC2,  sg(OP_POPPC, 1),           1, 1, 2,  "RESYNC->RESYNC2");
    step(ST_RESYNC3,  sg(OP_POPPC),              1, 1, 4,  "RESYNC2->RESYNC3");
    step(ST_DECODE,   sg(OP_POPPC),              1, 1, 5,  "RESYNC3->DECODE");
    step(ST_DECODE2,  sg(OP_NOP),                1, 1, 9,  "DECODE->DECODE2");
    step(ST_EXECUTE,  sg(OP_NOP),                1, 1, 11, "DECODE2->EXECUTE");
    // deviation 1: in_interrupt raised on the way into the no-op state
    step(ST_NOP,      sg(OP_NOP, .inint(1)),     1, 0, 12, "in_interrupt raised");
    check(viol == F_INT, "violating signal is in_interrupt");
    // deviation 2: no-op straight to RESYNC
    step(ST_RESYNC,   sg(OP_NOP, 1, .inint(1)),  0, 0, 0,  "NOP->RESYNC");
    check(viol == '0, "no signal reported without a record");
    // a write strobe where only a read is allowed
    step(ST_RESYNC2,  sg(OP_NOP, 1, 1, .inint(1)), 1, 0, 2, "write in RESYNC2");
    check(viol == F_WR, "violating signal is mem_write");
    step(ST_RESYNC3,  sg(OP_NOP, .inint(1)),     1, 1, 4,  "back to legal");

    // a gap in sample_valid, then a start in the wrong state
    s_valid = 1'b0;
    @(negedge clk);
    check(!checked && predicate && idx == 0, "no step while not valid");
    step(ST_FETCH,    sg(OP_NOP, 1),             0, 0, 0,  "start outside RESYNC");
    step(ST_DECODE,   sg(OP_NOP),                1, 1, 7,  "FETCH->DECODE after restart");

    // reset clears the report
    rst_n = 1'b0;
    @(negedge clk);
    check(!checked && predicate && idx == 0, "reset clears outputs");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
