// tb_ht_road_finder: drives the row port from a random accumulator model and checks the
// road list (every cell with >= 7 layers, in row then column order), the busy window, and
// the scan time: N_QPT + roads cycles when road_ready stays high.
module tb_ht_road_finder;
  import ht_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, busy, road_valid, road_ready = 1;
  logic [QPT_IDX_W-1:0] rd_row, road_qpt;
  logic [PHI0_IDX_W-1:0] road_phi0;
  logic [N_LAYERS-1:0][N_PHI0-1:0] rd_data;
  logic [N_LAYERS-1:0][N_PHI0-1:0] accm [N_QPT];
  int exp_k [$], exp_j [$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  assign rd_data = (int'(rd_row) < N_QPT) ? accm[rd_row] : '0;

  ht_road_finder dut (.*);

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int scan = 0; scan < 6; scan++) begin
      int nroads, nrows, cycles, got;
      exp_k.delete(); exp_j.delete();
      nroads = 0; nrows = 0;
      for (int k = 0; k < N_QPT; k++) begin
        bit rowhas;
        rowhas = 0;
        for (int j = 0; j < N_PHI0; j++) begin
          int n, p;
          p = (scan == 5) ? 0 : (($urandom % 40 == 0) ? 95 : 30);
          n = 0;
          for (int l = 0; l < N_LAYERS; l++) begin
            accm[k][l][j] = ($urandom % 100) < p;
            n += int'(accm[k][l][j]);
          end
          if (n >= THRESHOLD) begin exp_k.push_back(k); exp_j.push_back(j); nroads++; rowhas = 1; end
        end
        nrows += int'(rowhas);
      end
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      cycles = 1;
      got = 0;
      while (busy) begin
        road_ready = (scan % 2 == 0) ? 1'b1 : 1'(($urandom % 3) != 0);
        #1;
        if (road_valid && road_ready) begin
          checks++;
          if (got >= nroads || int'(road_qpt) != exp_k[got] || int'(road_phi0) != exp_j[got]) begin
            failures++;
            $display("scan %0d road %0d: got (%0d,%0d)", scan, got, road_qpt, road_phi0);
          end
          got++;
        end
        @(negedge clk);
        cycles++;
      end
      checks++;
      if (got != nroads) begin failures++; $display("scan %0d: %0d roads, exp %0d", scan, got, nroads); end
      if (scan % 2 == 0) begin
        checks++;
        if (cycles != N_QPT + nroads + 1) begin
          failures++; $display("scan %0d: %0d cycles, exp %0d", scan, cycles, N_QPT + nroads + 1);
        end
      end
      $display("scan %0d: %0d roads in %0d rows, %0d cycles", scan, nroads, nrows, cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
