// zpu_em_top: the monitor layer of a 3D-stacked ZPU with an execution
// monitor.
//
// The ZPU core lives on the target layer and is not part of this RTL. Its
// control state and control signals are the inputs of this module, as they
// would arrive at the monitor layer's side of the die-to-die vias. They are
// bundled with a valid bit (the core is out of reset), cross the layer
// boundary through tsv_link (one clock cycle, as in the source design) and
// are checked by em_monitor against the ZPU transition table of
// zpu_em_pkg. The monitor's results are the outputs.
//
// Timing: a step from the core's sample in cycle t-1 to its sample in cycle
// t is reported on the outputs in cycle t+2 (one cycle across the link, one
// in the monitor's output register). Reset: rst_n, synchronous, active low;
// core_valid must be low while the core is in reset and rise with the
// core's first sample.
module zpu_em_top
  import zpu_em_pkg::*;
#(
  parameter int unsigned DEPTH = zpu_em_pkg::N_TRANS,
  parameter int unsigned IDX_W = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // control signals of the target core
  input  logic             core_valid,
  input  zpu_state_e       core_state,
  input  ctrl_sig_t        core_sig,
  // monitor results
  output logic             checked,
  output logic             predicate,
  output logic             valid_transition,
  output logic             valid_changes,
  output logic [IDX_W-1:0] match_index_signal,
  output logic [SIG_W-1:0] viol
);

  localparam int unsigned LINK_W = 1 + $bits(em_sample_t);

  // The table in the package holds N_TRANS entries; a smaller DEPTH keeps
  // its first DEPTH entries.
  localparam trans_rec_t [DEPTH-1:0] TABLE = ZPU_TABLE[DEPTH-1:0];

  logic [LINK_W-1:0] link_in, link_out;
  logic              mon_valid;
  em_sample_t        mon_sample;

  assign link_in = {core_valid, core_state, core_sig};
  assign {mon_valid, mon_sample} = link_out;

  tsv_link #(.WIDTH(LINK_W)) u_link (
    .clk  (clk),
    .rst_n(rst_n),
    .tgt_i(link_in),
    .mon_o(link_out)
  );

  em_monitor #(
    .DEPTH(DEPTH), .IDX_W(IDX_W), .TABLE(TABLE), .START_STATE(ST_RESYNC)
  ) u_monitor (
    .clk               (clk),
    .rst_n             (rst_n),
    .sample_valid_i    (mon_valid),
    .sample_i          (mon_sample),
    .checked_o         (checked),
    .predicate_o       (predicate),
    .valid_transition_o(valid_transition),
    .valid_changes_o   (valid_changes),
    .match_index_o     (match_index_signal),
    .viol_o            (viol)
  );

endmodule
