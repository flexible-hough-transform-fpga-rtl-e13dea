// cluster_store: double-banked store of the clusters of an event, one memory per layer.
//
// The second HT step needs every cluster of the event again, so the clusters are kept while
// their event is being processed. As with the accumulator there are two banks: one receives
// the clusters of the incoming event while the other is read by the cluster extractor.
// Each layer's memory is LANES wide, so the extractor reads LANES clusters of every layer
// per cycle. Clusters beyond DEPTH in a layer are dropped and flagged as overflow.
//
// Interface:
//   wr_en/wr_bank/wr_lvalid/wr_cl  append the valid cluster of each layer to its memory;
//   rd_bank/rd_addr -> rd_data     LANES clusters of every layer at word rd_addr,
//                                  combinational (cluster index rd_addr*LANES + lane);
//   rd_count, rd_overflow          number of clusters per layer and overflow flag of rd_bank;
//   clr_en/clr_bank                empty a bank (counts and overflow flag) in one cycle.
// Timing: writes and clears take effect at the next edge.
// DEPTH, LANES and the overflow rule are this implementation's own choices; the design gives
// the double storage of the clusters.
module cluster_store
  import ht_pkg::*;
#(
  parameter int DEPTH = CLU_DEPTH,
  parameter int LANES = LANES_PER_LAYER,
  parameter int CW    = $clog2(DEPTH + 1),
  parameter int AW    = $clog2(DEPTH / LANES)
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   wr_en,
  input  logic                                   wr_bank,
  input  logic [N_LAYERS-1:0]                    wr_lvalid,
  input  cluster_t [N_LAYERS-1:0]                wr_cl,
  input  logic                                   rd_bank,
  input  logic [AW-1:0]                          rd_addr,
  output cluster_t [N_LAYERS-1:0][LANES-1:0]     rd_data,
  output logic [N_LAYERS-1:0][CW-1:0]            rd_count,
  output logic                                   rd_overflow,
  input  logic                                   clr_en,
  input  logic                                   clr_bank
);

  localparam int WORDS = DEPTH / LANES;

  cluster_t [LANES-1:0] mem [2][N_LAYERS][WORDS];
  logic [1:0][N_LAYERS-1:0][CW-1:0] count;
  logic [1:0] overflow;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count    <= '0;
      overflow <= '0;
    end else begin
      for (int b = 0; b < 2; b++) begin
        if (clr_en && clr_bank == 1'(b)) begin
          count[b]    <= '0;
          overflow[b] <= 1'b0;
        end else if (wr_en && wr_bank == 1'(b)) begin
          for (int l = 0; l < N_LAYERS; l++) begin
            if (wr_lvalid[l]) begin
              if (int'(count[b][l]) < DEPTH) count[b][l] <= count[b][l] + 1'b1;
              else                           overflow[b] <= 1'b1;
            end
          end
        end
      end
    end
  end

  // Storage has no reset: only entries below the count are ever used.
  always_ff @(posedge clk) begin
    for (int l = 0; l < N_LAYERS; l++) begin
      int idx;
      idx = int'(count[wr_bank][l]);
      if (wr_en && wr_lvalid[l] && idx < DEPTH)
        mem[wr_bank][l][idx / LANES][idx % LANES] <= wr_cl[l];
    end
  end

  always_comb begin
    for (int l = 0; l < N_LAYERS; l++) begin
      rd_data[l]  = mem[rd_bank][l][rd_addr];
      rd_count[l] = count[rd_bank][l];
    end
    rd_overflow = overflow[rd_bank];
  end

endmodule
