// tb_cluster_store: fills both banks with random clusters, reads them back lane by lane,
// checks per-layer counts, the overflow flag when a layer exceeds DEPTH, and the clear.
// Runs with a reduced DEPTH of 16 so that overflow is reached quickly.
module tb_cluster_store;
  import ht_pkg::*;
  localparam int DEPTH = 16, LANES = 4, CW = $clog2(DEPTH + 1), AW = $clog2(DEPTH / LANES);

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_bank = 0, rd_bank = 0, clr_en = 0, clr_bank = 0;
  logic [N_LAYERS-1:0] wr_lvalid = '0;
  cluster_t [N_LAYERS-1:0] wr_cl = '0;
  logic [AW-1:0] rd_addr = '0;
  cluster_t [N_LAYERS-1:0][LANES-1:0] rd_data;
  logic [N_LAYERS-1:0][CW-1:0] rd_count;
  logic rd_overflow;
  cluster_t model [2][N_LAYERS][$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cluster_store #(.DEPTH(DEPTH), .LANES(LANES)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_bank(input int b, input bit exp_ovf);
    @(negedge clk);
    rd_bank = 1'(b);
    for (int a = 0; a < DEPTH / LANES; a++) begin
      rd_addr = AW'(a);
      #1;
      for (int l = 0; l < N_LAYERS; l++) begin
        if (a == 0) begin
          checks++;
          if (int'(rd_count[l]) != model[b][l].size()) begin
            failures++; $display("bank %0d layer %0d count %0d exp %0d", b, l, rd_count[l], model[b][l].size());
          end
        end
        for (int n = 0; n < LANES; n++)
          if (a * LANES + n < model[b][l].size()) begin
            checks++;
            if (rd_data[l][n] != model[b][l][a * LANES + n]) begin
              failures++; $display("bank %0d layer %0d idx %0d wrong", b, l, a * LANES + n);
            end
          end
      end
    end
    checks++;
    if (rd_overflow != exp_ovf) begin failures++; $display("bank %0d overflow %0d", b, rd_overflow); end
  endtask

  initial begin
    bit ovf [2];
    ovf[0] = 0; ovf[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      for (int it = 0; it < 30; it++) begin
        @(negedge clk);
        wr_en     = 1;
        wr_bank   = 1'($urandom);
        wr_lvalid = N_LAYERS'($urandom);
        if (round == 2) wr_lvalid[3] = 1'b1;   // drive layer 3 past DEPTH
        for (int l = 0; l < N_LAYERS; l++)
          wr_cl[l] = cluster_t'({$urandom, $urandom});
        @(posedge clk);
        for (int l = 0; l < N_LAYERS; l++)
          if (wr_lvalid[l]) begin
            if (model[wr_bank][l].size() < DEPTH) model[wr_bank][l].push_back(wr_cl[l]);
            else ovf[wr_bank] = 1;
          end
      end
      @(negedge clk) wr_en = 0;
      check_bank(0, ovf[0]);
      check_bank(1, ovf[1]);
      // clear bank (round % 2) and check both again
      @(negedge clk); clr_en = 1; clr_bank = 1'(round % 2);
      @(negedge clk); clr_en = 0;
      for (int l = 0; l < N_LAYERS; l++) model[round % 2][l].delete();
      ovf[round % 2] = 0;
      check_bank(0, ovf[0]);
      check_bank(1, ovf[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
