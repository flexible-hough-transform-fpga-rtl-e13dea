// ht_cluster_extractor: collects the clusters that belong to a road.
//
// A road only says which accumulator cell reached the threshold; to build a track candidate
// the clusters that drew lines through that cell are needed. This block applies the HT
// formula a second time, now to the stored clusters, for the road's own cell: a cluster
// belongs to road (k, j) when its line crosses cell (k, j) (ht_pkg::cell_hit, with the same
// formula used to fill the accumulator). It reads LANES clusters of every layer per cycle
// from the cluster store and tests all N_LAYERS*LANES of them in parallel.
//
// Interface: road_valid/road_ready/road_qpt/road_phi0 take one road; rd_addr/rd_data/count is
// the cluster-store port of the bank being processed; out_valid/out_ready/out_word is the
// output stream. Each output word carries the matching clusters of one read (lane_valid set,
// other lanes 18'h3ffff). Reads with no match are skipped, except the last read of a road,
// which is always sent so that road_last is seen; the first word of a road has road_first.
// Timing: a road takes ceil(max count / LANES) cycles (at least one) plus output stalls;
// road_ready is high only while idle.
module ht_cluster_extractor
  import ht_pkg::*;
#(
  parameter int       DEPTH = CLU_DEPTH,
  parameter int       LANES = LANES_PER_LAYER,
  parameter int       CW    = $clog2(DEPTH + 1),
  parameter int       AW    = $clog2(DEPTH / LANES)
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic [EVID_W-1:0]                   event_id,
  input  logic                                road_valid,
  output logic                                road_ready,
  input  logic [QPT_IDX_W-1:0]                road_qpt,
  input  logic [PHI0_IDX_W-1:0]               road_phi0,
  output logic [AW-1:0]                       rd_addr,
  input  cluster_t [N_LAYERS-1:0][LANES-1:0]  rd_data,
  input  logic [N_LAYERS-1:0][CW-1:0]         count,
  output logic                                out_valid,
  input  logic                                out_ready,
  output out_word_t                           out_word,
  output logic                                busy
);

  logic                   active, first;
  logic [QPT_IDX_W-1:0]   k;
  logic [PHI0_IDX_W-1:0]  j;
  logic [AW-1:0]          addr;
  logic [N_LAYERS*LANES-1:0] match;
  logic                   last, any;
  int                     max_count;

  assign road_ready = !active;
  assign busy       = active;
  assign rd_addr    = addr;

  always_comb begin
    max_count = 0;
    for (int l = 0; l < N_LAYERS; l++)
      if (int'(count[l]) > max_count) max_count = int'(count[l]);
    last = ((int'(addr) + 1) * LANES >= max_count);
  end

  always_comb begin
    for (int l = 0; l < N_LAYERS; l++)
      for (int n = 0; n < LANES; n++)
        match[l*LANES + n] = (int'(addr) * LANES + n < int'(count[l])) &&
                             cell_hit(rd_data[l][n].phi, rd_data[l][n].r,
                                      int'(k), int'(j));
    any = (match != '0);
  end

  always_comb begin
    out_word            = '0;
    out_word.event_id   = event_id;
    out_word.road_first = first;
    out_word.road_last  = last;
    out_word.qpt        = k;
    out_word.phi0       = j;
    out_word.lane_valid = match;
    for (int l = 0; l < N_LAYERS; l++)
      for (int n = 0; n < LANES; n++)
        out_word.cl[l*LANES + n] = match[l*LANES + n] ? rd_data[l][n].clu : CLU_IDLE;
  end

  assign out_valid = active && (any || last);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active <= 1'b0;
      first  <= 1'b0;
      k      <= QPT_IDLE;
      j      <= PHI0_IDLE;
      addr   <= '0;
    end else if (!active) begin
      if (road_valid) begin
        active <= 1'b1;
        first  <= 1'b1;
        k      <= road_qpt;
        j      <= road_phi0;
        addr   <= '0;
      end
    end else if (!out_valid || out_ready) begin
      if (out_valid) first <= 1'b0;
      if (last) active <= 1'b0;
      else      addr   <= addr + 1'b1;
    end
  end

endmodule
