// ht_accumulator: double-banked Hough-transform accumulator, one bit plane per layer.
//
// For every layer the accumulator keeps one bit per cell (qA/pt row, phi0 column) telling
// whether a cluster of that layer has drawn its line through the cell. Keeping the layers
// apart, rather than a counter per cell, lets the road finder count distinct layers, which is
// what the road threshold is expressed in. There are two banks, so that one event can be
// filled while the previous one is being read out: the double storage of the design.
//
// Interface:
//   set_en/set_bank/set_hits  OR a hit map (from ht_fill) into a bank;
//   rd_bank/rd_row -> rd_data the N_LAYERS x N_PHI0 bits of one qA/pt row, combinational;
//   clr_en/clr_bank           clear a whole bank in one cycle.
// Timing: a set or clear takes effect at the next clock edge. Setting and clearing the same
// bank in one cycle leaves it cleared (the controller never does so).
// The per-layer bit planes and one-cycle clear are this implementation's own choices; the
// design gives the accumulator's size and its double storage.
module ht_accumulator
  import ht_pkg::*;
(
  input  logic                                        clk,
  input  logic                                        rst_n,
  input  logic                                        set_en,
  input  logic                                        set_bank,
  input  logic [N_LAYERS-1:0][N_QPT-1:0][N_PHI0-1:0]  set_hits,
  input  logic                                        rd_bank,
  input  logic [QPT_IDX_W-1:0]                        rd_row,
  output logic [N_LAYERS-1:0][N_PHI0-1:0]             rd_data,
  input  logic                                        clr_en,
  input  logic                                        clr_bank
);

  // One register row per bank, layer and qA/pt bin.
  logic [N_PHI0-1:0] acc [2][N_LAYERS][N_QPT];

  for (genvar b = 0; b < 2; b++) begin : g_bank
    for (genvar l = 0; l < N_LAYERS; l++) begin : g_layer
      for (genvar k = 0; k < N_QPT; k++) begin : g_row
        always_ff @(posedge clk) begin
          if (!rst_n || (clr_en && clr_bank == 1'(b)))
            acc[b][l][k] <= '0;
          else if (set_en && set_bank == 1'(b))
            acc[b][l][k] <= acc[b][l][k] | set_hits[l][k];
        end
      end
    end
  end

  always_comb begin
    for (int l = 0; l < N_LAYERS; l++)
      rd_data[l] = (int'(rd_row) < N_QPT) ? acc[rd_bank][l][rd_row] : '0;
  end

endmodule
