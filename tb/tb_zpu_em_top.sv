// tb_zpu_em_top: end-to-end test of the monitor layer with the ZPU control
// model as target, at the design's default sizes (112-entry table).
//
// Three runs, each from reset: the unmodified target (no step may be
// flagged), the target with anomaly 1 (in_interrupt raised on every 6th
// no-op: the table check passes, the post-condition check fails) and with
// anomaly 2 (no-op straight to RESYNC: both checks fail, index 0). Every
// sample of the model is kept in a short history; the monitor's report of
// the step from sample t-1 to sample t must appear exactly two cycles after
// sample t (one cycle across the link, one in the monitor). For legal steps
// the reported table entry must name the right source and destination
// state. The test also counts how often each mechanism occurred (memory
// stalls, interrupts, each opcode class, every state, break, return to
// RESYNC, both detections) and fails any that never did.
module tb_zpu_em_top;
  import zpu_em_pkg::*;

  localparam int unsigned CYCLES = 20000;
  localparam int unsigned IDX_W  = $clog2(N_TRANS + 1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [1:0] anomaly = 2'd0;

  logic       m_valid, m_anom;
  zpu_state_e m_state;
  ctrl_sig_t  m_sig;

  logic             checked, predicate, valid_transition, valid_changes;
  logic [IDX_W-1:0] match_index;
  logic [SIG_W-1:0] viol;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  zpu_ctrl_model u_model (
    .clk(clk), .rst_n(rst_n), .anomaly_i(anomaly),
    .valid_o(m_valid), .state_o(m_state), .sig_o(m_sig), .anomaly_o(m_anom)
  );

  zpu_em_top dut (
    .clk(clk), .rst_n(rst_n),
    .core_valid(m_valid), .core_state(m_state), .core_sig(m_sig),
    .checked(checked), .predicate(predicate),
    .valid_transition(valid_transition), .valid_changes(valid_changes),
    .match_index_signal(match_index), .viol(viol)
  );

  typedef struct packed {
    logic       valid;
    logic       anom;
    zpu_state_e state;
    ctrl_sig_t  sig;
  } hist_t;

  hist_t h [4];

  // mechanism counters
  int n_stall, n_irq, n_break, n_resync_ret, n_first, n_det1, n_det2;
  int n_op [N_OPS];
  int n_state [N_STATES];

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // Compare the monitor's report with the step h[3] -> h[2].
  always @(negedge clk) begin
    h[3] = h[2]; h[2] = h[1]; h[1] = h[0];
    h[0] = '{valid: m_valid, anom: m_anom, state: m_state, sig: m_sig};
    if (rst_n) begin
      if (!h[2].valid) begin
        check(!checked && predicate && match_index == 0, "idle report");
      end else if (!h[3].valid) begin
        n_first++;
        check(checked && predicate && valid_transition && valid_changes
              && match_index == 0, "first sample accepted");
      end else begin
        logic [IDX_W-1:0] mi;
        mi = match_index;
        check(checked, "step checked");
        if (!h[2].anom) begin
          check(predicate && valid_transition && valid_changes && viol == 0,
                $sformatf("legal step %s -> %s flagged", h[3].state.name(),
                          h[2].state.name()));
          check(mi != 0 && ZPU_TABLE[mi-1].from_state == h[3].state
                && ZPU_TABLE[mi-1].to_state == h[2].state,
                $sformatf("entry %0d does not describe %s -> %s", mi,
                          h[3].state.name(), h[2].state.name()));
          if (h[3].state == h[2].state) n_stall++;
          if (h[2].state == ST_INTERRUPT && h[3].state == ST_DECODE) n_irq++;
          if (h[2].sig.brk) n_break++;
          if (h[2].state == ST_RESYNC && h[3].state != ST_RESYNC) n_resync_ret++;
          if (h[3].state == ST_EXECUTE) n_op[h[3].sig.op]++;
          n_state[h[2].state]++;
        end else if (anomaly == 2'd1) begin
          n_det1++;
          check(!predicate && valid_transition && !valid_changes && mi != 0
                && viol == F_INT, "anomaly 1 not reported as a bad change");
        end else begin
          n_det2++;
          check(!predicate && !valid_transition && !valid_changes && mi == 0,
                "anomaly 2 not reported as an illegal transition");
        end
      end
    end
  end

  task automatic run(input logic [1:0] mode);
    rst_n   = 1'b0;
    anomaly = mode;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    repeat (CYCLES) @(posedge clk);
  endtask

  initial begin
    for (int i = 0; i < 4; i++) h[i] = '0;
    run(2'd0);
    run(2'd1);
    run(2'd2);
    @(negedge clk);
    $display("mechanisms: stalls=%0d interrupts=%0d breaks=%0d returns_to_resync=%0d first_samples=%0d anomaly1=%0d anomaly2=%0d",
             n_stall, n_irq, n_break, n_resync_ret, n_first, n_det1, n_det2);
    check(n_stall > 0, "no memory stall seen");
    check(n_irq > 0, "no interrupt taken");
    check(n_break > 0, "no break executed");
    check(n_resync_ret > 0, "no return to RESYNC");
    check(n_first == 3, "start-of-run check missing");
    check(n_det1 > 0, "anomaly 1 never detected");
    check(n_det2 > 0, "anomaly 2 never detected");
    for (int k = 0; k < int'(N_OPS); k++)
      check(n_op[k] > 0, $sformatf("opcode class %0d never executed", k));
    for (int s = 0; s < int'(N_STATES); s++)
      check(n_state[s] > 0, $sformatf("state %0d never entered", s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * CYCLES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
