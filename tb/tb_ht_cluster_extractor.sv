// tb_ht_cluster_extractor: serves a cluster-store model (DEPTH 32, 4 lanes) holding tracks
// plus noise, sends roads, and compares every output word with the reference: the clusters
// whose line crosses the road cell, lane by lane, road_first/road_last framing, and the
// time per road (ceil(max count / 4) cycles) when out_ready stays high.
module tb_ht_cluster_extractor;
  import ht_pkg::*;
  import tb_ht_ref_pkg::*;
  localparam int DEPTH = 32, LANES = 4, CW = $clog2(DEPTH + 1), AW = $clog2(DEPTH / LANES);

  logic clk = 0, rst_n = 0;
  logic [EVID_W-1:0] event_id = 8'd9;
  logic road_valid = 0, road_ready, out_valid, out_ready = 1, busy;
  logic [QPT_IDX_W-1:0] road_qpt = '0;
  logic [PHI0_IDX_W-1:0] road_phi0 = '0;
  logic [AW-1:0] rd_addr;
  cluster_t [N_LAYERS-1:0][LANES-1:0] rd_data;
  logic [N_LAYERS-1:0][CW-1:0] count;
  out_word_t out_word;
  cluster_t mem [N_LAYERS][DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always_comb
    for (int l = 0; l < N_LAYERS; l++)
      for (int n = 0; n < LANES; n++) rd_data[l][n] = mem[l][int'(rd_addr) * LANES + n];

  ht_cluster_extractor #(.DEPTH(DEPTH), .LANES(LANES)) dut (.*);

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int ev = 0; ev < 8; ev++) begin
      int k0, j0, maxc;
      k0 = 10 + $urandom % 140; j0 = 5 + $urandom % 38;
      maxc = 0;
      for (int l = 0; l < N_LAYERS; l++) begin
        int c;
        c = (ev == 7) ? DEPTH : 1 + $urandom % DEPTH;
        count[l] = CW'(c);
        if (c > maxc) maxc = c;
        for (int i = 0; i < DEPTH; i++) begin
          mem[l][i].r   = R_W'(100 + 450 * l + $urandom % 50);
          mem[l][i].clu = CLU_W'($urandom);
          mem[l][i].phi = ((i % 5) == 0) ? PHI_W'(track_phi(int'(mem[l][i].r), k0, j0))
                                         : PHI_W'($urandom);
        end
      end
      for (int rd = 0; rd < 3; rd++) begin
        int k, j, word_i, cycles, exp_words;
        bit seen_last;
        k = (rd == 2) ? $urandom % N_QPT : k0;
        j = (rd == 2) ? $urandom % N_PHI0 : j0 + rd;
        @(negedge clk);
        road_valid = 1; road_qpt = QPT_IDX_W'(k); road_phi0 = PHI0_IDX_W'(j);
        checks++;
        if (!road_ready) begin failures++; $display("not ready when idle"); end
        @(negedge clk);
        road_valid = 0;
        word_i = 0; cycles = 0; seen_last = 0;
        while (busy && cycles < 1000) begin
          out_ready = (ev % 2 == 0) ? 1'b1 : 1'(($urandom % 2) != 0);
          #1;
          if (out_valid && out_ready) begin
            int a;
            a = int'(rd_addr);
            checks++;
            if (out_word.road_first != (word_i == 0) || int'(out_word.qpt) != k ||
                int'(out_word.phi0) != j || out_word.event_id != event_id || out_word.eoe) begin
              failures++; $display("ev %0d road %0d word %0d: bad header", ev, rd, word_i);
            end
            for (int l = 0; l < N_LAYERS; l++)
              for (int n = 0; n < LANES; n++) begin
                int idx;
                bit e;
                idx = a * LANES + n;
                e = idx < int'(count[l]) && ref_hit(1'b0, int'(mem[l][idx].phi), int'(mem[l][idx].r), k, j);
                checks++;
                if (out_word.lane_valid[l * LANES + n] != e ||
                    out_word.cl[l * LANES + n] != (e ? mem[l][idx].clu : 18'h3ffff)) begin
                  failures++;
                  $display("ev %0d road %0d addr %0d layer %0d lane %0d wrong", ev, rd, a, l, n);
                end
              end
            if (out_word.road_last) seen_last = 1;
            word_i++;
          end
          @(negedge clk);
          cycles++;
        end
        checks++;
        if (!seen_last) begin failures++; $display("ev %0d road %0d: no road_last", ev, rd); end
        exp_words = (maxc + LANES - 1) / LANES;
        if (ev % 2 == 0) begin
          checks++;
          if (cycles != exp_words) begin failures++; $display("ev %0d road %0d: %0d cycles exp %0d", ev, rd, cycles, exp_words); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
