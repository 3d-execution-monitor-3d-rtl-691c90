// em_postcond_check: second check of the execution monitor.
//
// Using the record chosen by the first check, it tests every signal of the
// new signal set S' (the signals seen in state B) against that record's
// post-conditions. In this design a post-condition is of two kinds: a bit of
// post_mask requires the signal to take the value in post_val, and a bit of
// hold_mask requires the signal to keep the value it had in S. Signals in
// neither mask may change freely. When the first check found no record, this
// check fails too, as in the source design, where a failed first check
// always means a failed second one.
//
// Purely combinational. Interface: hit_i and rec_i from the lookup, prev_sig_i
// (S), cur_sig_i (S') -> ok_o, and viol_o with one bit set per signal that
// broke a post-condition.
module em_postcond_check
  import zpu_em_pkg::*;
(
  input  logic             hit_i,
  input  trans_rec_t       rec_i,
  input  ctrl_sig_t        prev_sig_i,
  input  ctrl_sig_t        cur_sig_i,
  output logic             ok_o,
  output logic [SIG_W-1:0] viol_o
);

  logic [SIG_W-1:0] bad_value, bad_change;

  always_comb begin
    bad_value  = (cur_sig_i ^ rec_i.post_val) & rec_i.post_mask;
    bad_change = (cur_sig_i ^ prev_sig_i) & rec_i.hold_mask;
    viol_o     = hit_i ? (bad_value | bad_change) : '0;
    ok_o       = hit_i && (viol_o == '0);
  end

endmodule
