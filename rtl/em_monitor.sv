// em_monitor: execution monitor for the ZPU control path.
//
// Every clock the monitor receives one sample of the target core: its
// control state and its signal set. It keeps the previous sample (A, S) and
// checks the step to the current one (B, S') in two ways:
//   1. valid_transition: the transition table holds a record for A --S--> B
//      (em_transition_lookup);
//   2. valid_changes: S' meets the post-conditions of that record
//      (em_postcond_check). It fails whenever the first check fails.
// predicate is the conjunction of both and goes low to flag a violation.
// match_index is the number of the record found, 0 when none, and 0 after
// reset. These four outputs and their meaning follow the source design.
//
// This design's own choices: the outputs are registered, so a step whose
// second sample reaches the monitor in cycle k is reported in cycle k+1;
// viol reports which signals broke a post-condition; sample_valid marks the
// cycles in which the target is out of reset, and the first sample after it
// rises is not a step but must show the target in START_STATE (the core
// enters RESYNC from reset), else valid_transition goes low with index 0.
// While no step is checked, checked is low, the valid outputs and predicate
// are high and match_index is 0. Reset is synchronous, active low.
module em_monitor
  import zpu_em_pkg::*;
#(
  parameter int unsigned            DEPTH       = zpu_em_pkg::N_TRANS,
  parameter int unsigned            IDX_W       = $clog2(DEPTH + 1),
  parameter trans_rec_t [DEPTH-1:0] TABLE       = zpu_em_pkg::ZPU_TABLE,
  parameter zpu_state_e             START_STATE = ST_RESYNC
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sample_valid_i,
  input  em_sample_t       sample_i,
  output logic             checked_o,
  output logic             predicate_o,
  output logic             valid_transition_o,
  output logic             valid_changes_o,
  output logic [IDX_W-1:0] match_index_o,
  output logic [SIG_W-1:0] viol_o
);

  em_sample_t       prev;
  logic             prev_valid;
  logic             hit, ok;
  logic [IDX_W-1:0] index;
  trans_rec_t       sel_rec;
  logic [SIG_W-1:0] viol;

  em_transition_lookup #(
    .DEPTH(DEPTH), .IDX_W(IDX_W), .TABLE(TABLE)
  ) u_lookup (
    .prev_i     (prev),
    .cur_state_i(sample_i.state),
    .hit_o      (hit),
    .index_o    (index),
    .rec_o      (sel_rec)
  );

  em_postcond_check u_post (
    .hit_i     (hit),
    .rec_i     (sel_rec),
    .prev_sig_i(prev.sig),
    .cur_sig_i (sample_i.sig),
    .ok_o      (ok),
    .viol_o    (viol)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prev               <= '0;
      prev_valid         <= 1'b0;
      checked_o          <= 1'b0;
      predicate_o        <= 1'b1;
      valid_transition_o <= 1'b1;
      valid_changes_o    <= 1'b1;
      match_index_o      <= '0;
      viol_o             <= '0;
    end else begin
      prev       <= sample_i;
      prev_valid <= sample_valid_i;
      checked_o  <= sample_valid_i;
      if (sample_valid_i && prev_valid) begin
        // A step A --S--> B.
        predicate_o        <= hit && ok;
        valid_transition_o <= hit;
        valid_changes_o    <= ok;
        match_index_o      <= index;
        viol_o             <= viol;
      end else if (sample_valid_i) begin
        // First sample after the target leaves reset.
        predicate_o        <= sample_i.state == START_STATE;
        valid_transition_o <= sample_i.state == START_STATE;
        valid_changes_o    <= sample_i.state == START_STATE;
        match_index_o      <= '0;
        viol_o             <= '0;
      end else begin
        predicate_o        <= 1'b1;
        valid_transition_o <= 1'b1;
        valid_changes_o    <= 1'b1;
        match_index_o      <= '0;
        viol_o             <= '0;
      end
    end
  end

endmodule
