// tsv_link: the path of the monitored signals from the target layer to the
// monitor layer of the 3D stack.
//
// In the stacked part these signals cross through die-to-die vias; the
// crossing is given one full clock cycle, which this module models as one
// register per post, captured on the monitor layer's clock. The source design
// gives the one-cycle delay and a count of roughly 50 posts for its monitor,
// so WIDTH defaults to 50; a user passes the width of the bundle it actually
// carries. Resetting the register to zero (rst_n, active low, synchronous) is
// this design's own choice, so that a "sample valid" bit carried in the
// bundle reads 0 until the target layer has driven a first sample.
//
// Interface: tgt_i from the target layer; mon_o = tgt_i one cycle later.
module tsv_link #(
  parameter int unsigned WIDTH = 50
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] tgt_i,
  output logic [WIDTH-1:0] mon_o
);

  always_ff @(posedge clk) begin
    if (!rst_n) mon_o <= '0;
    else        mon_o <= tgt_i;
  end

endmodule
