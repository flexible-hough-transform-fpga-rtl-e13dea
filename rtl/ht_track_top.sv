// ht_track_top: Hough-transform track finder for one detector region.
//
// Clusters of one event arrive as words holding at most one cluster per layer (8 layers).
// In the core, each word's clusters are written to the cluster store and their HT lines,
// computed for all accumulator bins at once, are ORed into the accumulator. When the event
// ends, the readout side scans the accumulator for roads (cells crossed by at least 7 layers)
// and, for each road, applies the HT formula again to every stored cluster to pick the
// road's clusters. Accumulator and cluster store are doubled, so the next event is filled
// while the previous one is read out.
//
// Three clock domains of the same period are used: input (clk_in), core (clk_core) and
// output (clk_out), joined by asynchronous FIFOs, so each side can be placed on its own.
//
// Input (clk_in): event_start_in opens an event; each cycle with event_valid inside an event
// sends one word (layer_valid, phi, r, clu); event_end_in closes the event and may come with
// or without data. The source must hold its inputs while in_ready is low.
// Output (clk_out): words move when out_valid and out_ready are high. A road word carries
// the road's qA/pt bin (qapt_out), phi0 bin (phi0_out) and up to 32 clusters (cl_valid,
// cl_data_out, empty lanes 18'h3ffff); road_first/road_last delimit one road. An
// end-of-event word (eoe) follows the roads of each event and flags a cluster overflow.
// Idle values are 8'hff, 6'h3f and 18'h3ffff, as in the design's simulation trace.
// cnt_roads_tot and cnt_clusters_tot count roads and clusters sent since reset.
// Status (clk_core): en_prev / en_succ show which bank is being filled, mem_rd that a bank
// is being read out.
// Event framing, FIFO depths and the output word layout are this implementation's choices.
module ht_track_top
  import ht_pkg::*;
#(
  parameter int FIFO_AW = 4
) (
  // input domain
  input  logic                                 clk_in,
  input  logic                                 rst_in_n,
  input  logic                                 event_start_in,
  input  logic                                 event_end_in,
  input  logic                                 event_valid,
  input  logic [N_LAYERS-1:0]                  layer_valid,
  input  logic [N_LAYERS-1:0][PHI_W-1:0]       phi,
  input  logic [N_LAYERS-1:0][R_W-1:0]         r,
  input  logic [N_LAYERS-1:0][CLU_W-1:0]       clu,
  output logic                                 in_ready,
  // core domain
  input  logic                                 clk_core,
  input  logic                                 rst_core_n,
  output logic                                 en_prev,
  output logic                                 en_succ,
  output logic                                 mem_rd,
  // output domain
  input  logic                                 clk_out,
  input  logic                                 rst_out_n,
  output logic                                 out_valid,
  input  logic                                 out_ready,
  output logic [EVID_W-1:0]                    event_id,
  output logic                                 eoe,
  output logic                                 overflow,
  output logic                                 road_flag,
  output logic                                 road_first,
  output logic                                 road_last,
  output logic [QPT_IDX_W-1:0]                 qapt_out,
  output logic [PHI0_IDX_W-1:0]                phi0_out,
  output logic [N_LANES-1:0]                   cl_valid,
  output logic [N_LANES-1:0][CLU_W-1:0]        cl_data_out,
  output logic [31:0]                          cnt_roads_tot,
  output logic [31:0]                          cnt_clusters_tot
);

  localparam int CW = $clog2(CLU_DEPTH + 1);
  localparam int AW = $clog2(CLU_DEPTH / LANES_PER_LAYER);

  // ---------------------------------------------------------------- input domain
  logic     in_event, push;
  in_word_t in_w;

  assign push = (in_event || event_start_in) && (event_valid || event_end_in);

  always_comb begin
    in_w.eof = event_end_in;
    for (int l = 0; l < N_LAYERS; l++) begin
      in_w.lvalid[l]  = event_valid && layer_valid[l];
      in_w.cl[l].phi  = phi[l];
      in_w.cl[l].r    = r[l];
      in_w.cl[l].clu  = clu[l];
    end
  end

  always_ff @(posedge clk_in) begin
    if (!rst_in_n) in_event <= 1'b0;
    else if (event_end_in && push && in_ready) in_event <= 1'b0;
    else if (event_start_in)                   in_event <= 1'b1;
  end

  // ---------------------------------------------------------------- core domain
  logic     c_valid, c_ready;
  in_word_t c_w;

  cdc_fifo #(.WIDTH($bits(in_word_t)), .AW(FIFO_AW)) u_in_fifo (
    .wclk(clk_in), .wrst_n(rst_in_n), .wvalid(push), .wready(in_ready), .wdata(in_w),
    .rclk(clk_core), .rrst_n(rst_core_n), .rvalid(c_valid), .rready(c_ready), .rdata(c_w)
  );

  logic wr_en, wr_bank, rd_bank, finder_start, finder_busy, extract_busy;
  logic eoe_valid, eoe_ready, clr_en, clr_bank, fill_bank;
  logic [EVID_W-1:0] core_event_id;

  ht_event_ctrl u_ctrl (
    .clk(clk_core), .rst_n(rst_core_n),
    .in_valid(c_valid), .in_ready(c_ready), .in_eof(c_w.eof),
    .wr_en, .wr_bank, .rd_bank,
    .finder_start, .finder_busy, .extract_busy,
    .eoe_valid, .eoe_ready, .clr_en, .clr_bank,
    .event_id(core_event_id), .fill_bank, .mem_rd
  );

  assign en_prev = !fill_bank;
  assign en_succ = fill_bank;

  logic [N_LAYERS-1:0][N_QPT-1:0][N_PHI0-1:0] hits;

  ht_fill u_fill (.lvalid(c_w.lvalid), .cl(c_w.cl), .hits);

  logic [QPT_IDX_W-1:0]            acc_row;
  logic [N_LAYERS-1:0][N_PHI0-1:0] acc_data;

  ht_accumulator u_acc (
    .clk(clk_core), .rst_n(rst_core_n),
    .set_en(wr_en), .set_bank(wr_bank), .set_hits(hits),
    .rd_bank, .rd_row(acc_row), .rd_data(acc_data),
    .clr_en, .clr_bank
  );

  logic [AW-1:0]                                 cs_addr;
  cluster_t [N_LAYERS-1:0][LANES_PER_LAYER-1:0]  cs_data;
  logic [N_LAYERS-1:0][CW-1:0]                   cs_count;
  logic                                          cs_overflow;

  cluster_store u_store (
    .clk(clk_core), .rst_n(rst_core_n),
    .wr_en, .wr_bank, .wr_lvalid(c_w.lvalid), .wr_cl(c_w.cl),
    .rd_bank, .rd_addr(cs_addr), .rd_data(cs_data), .rd_count(cs_count),
    .rd_overflow(cs_overflow),
    .clr_en, .clr_bank
  );

  logic                  road_valid, road_ready;
  logic [QPT_IDX_W-1:0]  road_qpt;
  logic [PHI0_IDX_W-1:0] road_phi0;

  ht_road_finder u_finder (
    .clk(clk_core), .rst_n(rst_core_n),
    .start(finder_start), .busy(finder_busy),
    .rd_row(acc_row), .rd_data(acc_data),
    .road_valid, .road_ready, .road_qpt, .road_phi0
  );

  logic      x_valid, o_ready, o_valid;
  out_word_t x_word, eoe_word, o_word;

  ht_cluster_extractor u_extract (
    .clk(clk_core), .rst_n(rst_core_n), .event_id(core_event_id),
    .road_valid, .road_ready, .road_qpt, .road_phi0,
    .rd_addr(cs_addr), .rd_data(cs_data), .count(cs_count),
    .out_valid(x_valid), .out_ready(o_ready), .out_word(x_word),
    .busy(extract_busy)
  );

  always_comb begin
    eoe_word            = '0;
    eoe_word.event_id   = core_event_id;
    eoe_word.eoe        = 1'b1;
    eoe_word.overflow   = cs_overflow;
    eoe_word.qpt        = QPT_IDLE;
    eoe_word.phi0       = PHI0_IDLE;
    for (int n = 0; n < N_LANES; n++) eoe_word.cl[n] = CLU_IDLE;
  end

  assign o_valid   = x_valid || eoe_valid;
  assign o_word    = x_valid ? x_word : eoe_word;
  assign eoe_ready = o_ready && !x_valid;

  // ---------------------------------------------------------------- output domain
  out_word_t q_word;

  cdc_fifo #(.WIDTH($bits(out_word_t)), .AW(FIFO_AW)) u_out_fifo (
    .wclk(clk_core), .wrst_n(rst_core_n), .wvalid(o_valid), .wready(o_ready), .wdata(o_word),
    .rclk(clk_out), .rrst_n(rst_out_n), .rvalid(out_valid), .rready(out_ready), .rdata(q_word)
  );

  assign event_id   = q_word.event_id;
  assign eoe        = out_valid && q_word.eoe;
  assign overflow   = out_valid && q_word.eoe && q_word.overflow;
  assign road_flag  = out_valid && !q_word.eoe;
  assign road_first = road_flag && q_word.road_first;
  assign road_last  = road_flag && q_word.road_last;

  always_comb begin
    qapt_out    = road_flag ? q_word.qpt  : QPT_IDLE;
    phi0_out    = road_flag ? q_word.phi0 : PHI0_IDLE;
    cl_valid    = road_flag ? q_word.lane_valid : '0;
    for (int n = 0; n < N_LANES; n++)
      cl_data_out[n] = cl_valid[n] ? q_word.cl[n] : CLU_IDLE;
  end

  always_ff @(posedge clk_out) begin
    if (!rst_out_n) begin
      cnt_roads_tot    <= '0;
      cnt_clusters_tot <= '0;
    end else if (out_valid && out_ready) begin
      if (road_first) cnt_roads_tot <= cnt_roads_tot + 1;
      cnt_clusters_tot <= cnt_clusters_tot + 32'($countones(cl_valid));
    end
  end

endmodule
