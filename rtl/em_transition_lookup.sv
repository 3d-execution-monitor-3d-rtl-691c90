// em_transition_lookup: first check of the execution monitor.
//
// Given the previous sample (state A and the signal set S at the end of the
// cycle spent in A) and the current state B, it searches the transition
// table for the record that allows A --S--> B. All records are compared in
// parallel, so the search takes no clock cycle; the result is purely
// combinational.
//
// The table is required to be deterministic: at most one record may match a
// given (A, S, B). The rule is checked twice: at elaboration, where two valid
// records with the same A and B must disagree on some bit that both their
// preconditions test, and in simulation by an assertion on the match vector.
// Should a faulty table break it anyway, the lowest-numbered record wins. Entries are numbered from 1, and
// index_o is 0 when no record matches (the source design's convention for
// its match_index signal). The table is a parameter (a ROM in the trusted
// monitor layer); its format is described in zpu_em_pkg.
//
// Interface: prev_i (A and S), cur_state_i (B) -> hit_o, index_o, rec_o
// (the selected record, all zero on a miss).
module em_transition_lookup
  import zpu_em_pkg::*;
#(
  parameter int unsigned              DEPTH = zpu_em_pkg::N_TRANS,
  parameter int unsigned              IDX_W = $clog2(DEPTH + 1),
  parameter trans_rec_t [DEPTH-1:0]   TABLE = zpu_em_pkg::ZPU_TABLE
) (
  input  em_sample_t         prev_i,
  input  zpu_state_e         cur_state_i,
  output logic               hit_o,
  output logic [IDX_W-1:0] index_o,
  output trans_rec_t         rec_o
);

  logic [DEPTH-1:0] match;

  // True when no (A, S, B) can match two valid records.
  function automatic logic deterministic(trans_rec_t [DEPTH-1:0] t);
    for (int i = 0; i < int'(DEPTH); i++)
      for (int j = i + 1; j < int'(DEPTH); j++)
        if (t[i].valid && t[j].valid
            && t[i].from_state == t[j].from_state
            && t[i].to_state == t[j].to_state
            && ((t[i].pre_val ^ t[j].pre_val) & t[i].pre_mask & t[j].pre_mask) == '0)
          return 1'b0;
    return 1'b1;
  endfunction

  if (!deterministic(TABLE)) begin : g_table_check
    $error("em_transition_lookup: TABLE holds two records for the same step");
  end

  // One comparator per record.
  always_comb begin
    for (int i = 0; i < int'(DEPTH); i++) begin
      match[i] = TABLE[i].valid
              && TABLE[i].from_state == prev_i.state
              && TABLE[i].to_state   == cur_state_i
              && ((prev_i.sig & TABLE[i].pre_mask) == TABLE[i].pre_val);
    end
  end

  // Priority select of the lowest matching entry.
  always_comb begin
    hit_o   = 1'b0;
    index_o = '0;
    rec_o   = '0;
    for (int i = int'(DEPTH) - 1; i >= 0; i--) begin
      if (match[i]) begin
        hit_o   = 1'b1;
        index_o = IDX_W'(i + 1);
        rec_o   = TABLE[i];
      end
    end
  end

  // The table must not offer a choice between several transitions.
  always_comb begin
    assert ($onehot0(match))
      else $error("transition table is not deterministic: %b", match);
  end

endmodule
