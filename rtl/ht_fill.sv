// ht_fill: draws the Hough-transform line of one cluster per layer into a hit map.
//
// Every cycle the tracker receives at most one cluster of each layer. For each of them this
// block evaluates the HT formula for all accumulator rows at once, as the design requires:
// for every one of the N_QPT qA/pt rows it computes phi0 = phi + r*qA/pt (one constant
// multiplier per row and layer) and marks the resulting phi0 column. Bins that fall outside
// the accumulator are dropped. The fixed-point scaling is given in ht_pkg; ht_pkg::phi0_bin
// is the same computation written as a function.
//
// Interface: lvalid/cl give the clusters of the current input word; hits[l][k][j] is 1 when
// the cluster of layer l crosses cell (qA/pt row k, phi0 column j). Purely combinational; the
// accumulator registers the result. The formula comes from the design; the bin scaling is
// this implementation's choice (see ht_pkg).
module ht_fill
  import ht_pkg::*;
(
  input  logic [N_LAYERS-1:0]                          lvalid,
  input  cluster_t [N_LAYERS-1:0]                      cl,
  output logic [N_LAYERS-1:0][N_QPT-1:0][N_PHI0-1:0]   hits
);

  localparam int OFF_MAX = N_PHI0 << PHI0_SHIFT;

  for (genvar l = 0; l < N_LAYERS; l++) begin : g_layer
    for (genvar k = 0; k < N_QPT; k++) begin : g_row
      localparam int SLOPE = (2 * k - (N_QPT - 1)) * QPT_HALFSTEP;
      logic signed [31:0] prod, off;
      assign prod = $signed({20'd0, cl[l].r}) * SLOPE;
      assign off  = $signed({16'd0, cl[l].phi}) + (prod >>> RQ_SHIFT) - PHI0_MIN;
      assign hits[l][k] = (lvalid[l] && off >= 0 && off < OFF_MAX)
                          ? (N_PHI0'(1) << off[PHI0_SHIFT +: PHI0_IDX_W]) : '0;
    end
  end

endmodule
