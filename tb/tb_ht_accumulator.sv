// tb_ht_accumulator: random sets and clears on both banks, compared with a bit model.
// Checks that sets OR into the right bank only, that a clear empties only its bank and that
// the row read port returns the right layer bits.
module tb_ht_accumulator;
  import ht_pkg::*;

  logic clk = 0, rst_n = 0;
  logic set_en = 0, set_bank = 0, rd_bank = 0, clr_en = 0, clr_bank = 0;
  logic [N_LAYERS-1:0][N_QPT-1:0][N_PHI0-1:0] set_hits = '0;
  logic [QPT_IDX_W-1:0] rd_row = '0;
  logic [N_LAYERS-1:0][N_PHI0-1:0] rd_data;
  bit model [2][N_LAYERS][N_QPT][N_PHI0];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ht_accumulator dut (.*);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int b = 0; b < 2; b++)
      for (int k = 0; k < N_QPT; k += 7) begin
        @(negedge clk);
        rd_bank = 1'(b); rd_row = QPT_IDX_W'(k);
        #1;
        for (int l = 0; l < N_LAYERS; l++)
          for (int j = 0; j < N_PHI0; j++) begin
            checks++;
            if (rd_data[l][j] != model[b][l][k][j]) begin
              failures++;
              if (failures < 10) $display("b%0d l%0d k%0d j%0d got %0d", b, l, k, j, rd_data[l][j]);
            end
          end
      end
  endtask

  initial begin
    foreach (model[b, l, k, j]) model[b][l][k][j] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 60; it++) begin
      @(negedge clk);
      set_hits = '0;
      set_en   = ($urandom % 4) != 0;
      set_bank = 1'($urandom);
      clr_en   = ($urandom % 10) == 0;
      clr_bank = 1'($urandom);
      if (clr_en && set_en) clr_bank = ~set_bank;
      for (int n = 0; n < 40; n++) begin
        int l, k, j;
        l = $urandom % N_LAYERS; k = $urandom % N_QPT; j = $urandom % N_PHI0;
        set_hits[l][k][j] = 1'b1;
      end
      @(posedge clk);
      for (int b = 0; b < 2; b++) begin
        if (clr_en && clr_bank == 1'(b)) foreach (model[b][l, k, j]) model[b][l][k][j] = 0;
        else if (set_en && set_bank == 1'(b))
          foreach (model[b][l, k, j]) if (set_hits[l][k][j]) model[b][l][k][j] = 1;
      end
      @(negedge clk);
      set_en = 0; clr_en = 0;
      if (it % 10 == 9) check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
