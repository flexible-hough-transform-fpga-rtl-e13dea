// tb_ht_track_top: end-to-end test of the HT tracker at its default size.
// Six events go through the three clock domains (same period, different phases). Each
// event holds straight-line tracks on chosen accumulator cells (all 8 layers, or 7 with one
// layer missing) plus random noise clusters; one event overflows layer 0, one is empty.
// A reference model in this file fills its own accumulator, lists the roads (>= 7 layers)
// in row/column order and the clusters of each road, and every output word is compared with
// it, as are the end-of-event words and the total counters.
// Mechanisms that must occur: input stall (in_ready low), output back-pressure, filling one
// bank while the other is read out, cluster overflow, an event without roads.
module tb_ht_track_top;
  import ht_pkg::*;
  import tb_ht_ref_pkg::*;

  localparam int N_EV = 6;

  logic clk_in = 0, clk_core = 0, clk_out = 0;
  logic rst_in_n = 0, rst_core_n = 0, rst_out_n = 0;
  logic event_start_in = 0, event_end_in = 0, event_valid = 0;
  logic [N_LAYERS-1:0] layer_valid = '0;
  logic [N_LAYERS-1:0][PHI_W-1:0] phi = '0;
  logic [N_LAYERS-1:0][R_W-1:0] r = '0;
  logic [N_LAYERS-1:0][CLU_W-1:0] clu = '0;
  logic in_ready, en_prev, en_succ, mem_rd, out_valid, out_ready = 0;
  logic [EVID_W-1:0] event_id;
  logic eoe, overflow, road_flag, road_first, road_last;
  logic [QPT_IDX_W-1:0] qapt_out;
  logic [PHI0_IDX_W-1:0] phi0_out;
  logic [N_LANES-1:0] cl_valid;
  logic [N_LANES-1:0][CLU_W-1:0] cl_data_out;
  logic [31:0] cnt_roads_tot, cnt_clusters_tot;

  always #5 clk_in = ~clk_in;
  initial begin #2; forever #5 clk_core = ~clk_core; end
  initial begin #3; forever #5 clk_out = ~clk_out; end

  ht_track_top dut (.*);

  int checks = 0, failures = 0;
  int n_stall = 0, n_backpressure = 0, n_overlap = 0, n_overflow = 0, n_empty = 0;

  // stimulus and reference
  int ev_phi [N_EV][N_LAYERS][$];
  int ev_r   [N_EV][N_LAYERS][$];
  int ev_clu [N_EV][N_LAYERS][$];
  int exp_k [N_EV][$], exp_j [N_EV][$];
  int exp_cl [N_EV][$][$];
  bit exp_ovf [N_EV];
  int total_roads = 0, total_clusters = 0;
  bit done_out = 0;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void make_event(input int e);
    int ntr, nnoise;
    ntr    = (e == 4) ? 0 : 1 + (e % 3);
    nnoise = (e == 4) ? 0 : 30 + 10 * e;
    for (int t = 0; t < ntr; t++) begin
      int k, j, miss;
      k = 20 + $urandom % 128; j = 6 + $urandom % 36;
      miss = (t == 1) ? $urandom % N_LAYERS : -1;
      for (int l = 0; l < N_LAYERS; l++) begin
        int rr;
        if (l == miss) continue;
        rr = 400 + 450 * l + $urandom % 40;
        ev_r[e][l].push_back(rr);
        ev_phi[e][l].push_back(track_phi(rr, k, j));
      end
    end
    for (int l = 0; l < N_LAYERS; l++) begin
      int n;
      n = nnoise + ((e == 2 && l == 0) ? 240 : 0);
      for (int i = 0; i < n; i++) begin
        ev_r[e][l].push_back(400 + 450 * l + $urandom % 40);
        ev_phi[e][l].push_back(int'($urandom % 65536));
      end
      for (int i = 0; i < ev_r[e][l].size(); i++)
        ev_clu[e][l].push_back(((e & 15) << 14) | (l << 11) | (i & 2047));
    end
  endfunction

  function automatic void reference(input int e);
    int cnt [N_LAYERS];
    exp_ovf[e] = 0;
    for (int l = 0; l < N_LAYERS; l++) begin
      cnt[l] = ev_r[e][l].size();
      if (cnt[l] > CLU_DEPTH) begin cnt[l] = CLU_DEPTH; exp_ovf[e] = 1; end
    end
    for (int k = 0; k < REF_NQ; k++)
      for (int j = 0; j < REF_NP; j++) begin
        int nl;
        nl = 0;
        for (int l = 0; l < N_LAYERS; l++) begin
          bit h;
          h = 0;
          for (int i = 0; i < ev_r[e][l].size(); i++)   // the accumulator sees every cluster
            if (ref_col(ev_phi[e][l][i], ev_r[e][l][i], k) == j) h = 1;
          nl += int'(h);
        end
        if (nl >= 7) begin
          int lst [$];
          for (int a = 0; a < CLU_DEPTH / 4; a++)
            for (int l = 0; l < N_LAYERS; l++)
              for (int n = 0; n < 4; n++)
                if (a * 4 + n < cnt[l] &&
                    ref_col(ev_phi[e][l][a * 4 + n], ev_r[e][l][a * 4 + n], k) == j)
                  lst.push_back(ev_clu[e][l][a * 4 + n]);
          exp_k[e].push_back(k); exp_j[e].push_back(j); exp_cl[e].push_back(lst);
          total_roads++; total_clusters += lst.size();
        end
      end
  endfunction

  // input driver
  task automatic send_word(input bit v, input bit start, input bit fin, input int e, input int i);
    @(negedge clk_in);
    event_valid = v; event_start_in = start; event_end_in = fin;
    for (int l = 0; l < N_LAYERS; l++) begin
      layer_valid[l] = v && (i < ev_r[e][l].size());
      r[l]   = layer_valid[l] ? R_W'(ev_r[e][l][i]) : '0;
      phi[l] = layer_valid[l] ? PHI_W'(ev_phi[e][l][i]) : '0;
      clu[l] = layer_valid[l] ? CLU_W'(ev_clu[e][l][i]) : '0;
    end
    #1;
    while (!in_ready && (v || fin)) begin
      n_stall++;
      @(negedge clk_in); #1;
    end
    @(posedge clk_in);
  endtask

  initial begin
    for (int e = 0; e < N_EV; e++) begin make_event(e); reference(e); end
    $display("reference: %0d roads, %0d clusters", total_roads, total_clusters);
    repeat (5) @(posedge clk_in);
    rst_in_n = 1; rst_core_n = 1; rst_out_n = 1;
    for (int e = 0; e < N_EV; e++) begin
      int nw;
      nw = 0;
      for (int l = 0; l < N_LAYERS; l++) if (ev_r[e][l].size() > nw) nw = ev_r[e][l].size();
      send_word(0, 1, 0, e, 0);
      for (int i = 0; i < nw; i++) send_word(1, 0, (e % 2 == 0) && i == nw - 1, e, i);
      if (e % 2 == 1 || nw == 0) send_word(0, 0, 1, e, 0);
      @(negedge clk_in);
      event_valid = 0; event_start_in = 0; event_end_in = 0; layer_valid = '0;
    end
  end

  // bank overlap: filling one bank while the other is read out
  always @(posedge clk_core) if (dut.u_ctrl.wr_en && mem_rd) n_overlap++;

  // output monitor
  initial begin
    int e, road, w;
    int got [$];
    e = 0; road = 0;
    @(posedge rst_out_n);
    while (e < N_EV) begin
      @(negedge clk_out);
      out_ready = (e == 1 || e == 3) ? 1'(($urandom % 4) == 0) : 1'b1;
      #1;
      if (out_valid && !out_ready) n_backpressure++;
      if (out_valid && out_ready) begin
        if (eoe) begin
          checks++;
          if (int'(event_id) != e || road != exp_k[e].size() || overflow != exp_ovf[e]) begin
            failures++;
            $display("event %0d: eoe id %0d after %0d roads (exp %0d) ovf %0d", e, event_id, road, exp_k[e].size(), overflow);
          end
          if (overflow) n_overflow++;
          if (road == 0) n_empty++;
          e++; road = 0;
        end else begin
          if (road_first) got.delete();
          for (int n = 0; n < N_LANES; n++) if (cl_valid[n]) got.push_back(int'(cl_data_out[n]));
          checks++;
          if (road >= exp_k[e].size() || int'(qapt_out) != exp_k[e][road] ||
              int'(phi0_out) != exp_j[e][road] || int'(event_id) != e) begin
            failures++;
            $display("event %0d road %0d: got (%0d,%0d)", e, road, qapt_out, phi0_out);
          end
          if (road_last) begin
            checks++;
            if (road < exp_k[e].size() && got != exp_cl[e][road]) begin
              failures++;
              $display("event %0d road %0d: %0d clusters, exp %0d", e, road, got.size(), exp_cl[e][road].size());
            end
            road++;
          end
        end
      end
    end
    repeat (3) @(posedge clk_out);
    checks += 2;
    if (cnt_roads_tot != 32'(total_roads)) begin failures++; $display("cnt_roads_tot %0d", cnt_roads_tot); end
    if (cnt_clusters_tot != 32'(total_clusters)) begin failures++; $display("cnt_clusters_tot %0d", cnt_clusters_tot); end
    $display("mechanisms: stall=%0d backpressure=%0d overlap=%0d overflow=%0d empty_event=%0d roads=%0d",
             n_stall, n_backpressure, n_overlap, n_overflow, n_empty, cnt_roads_tot);
    checks += 6;
    if (n_stall == 0)        begin failures++; $display("input stall never happened"); end
    if (n_backpressure == 0) begin failures++; $display("output back-pressure never happened"); end
    if (n_overlap == 0)      begin failures++; $display("bank overlap never happened"); end
    if (n_overflow == 0)     begin failures++; $display("overflow never happened"); end
    if (n_empty == 0)        begin failures++; $display("empty event never happened"); end
    if (cnt_roads_tot == 0)  begin failures++; $display("no road found"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
