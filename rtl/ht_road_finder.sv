// ht_road_finder: scans a filled accumulator bank and lists its roads.
//
// A road is an accumulator cell crossed by the lines of at least THRESH different layers
// (7 of 8 in the reference configuration). The finder reads one qA/pt row per cycle, counts
// the layers set in each of its N_PHI0 cells in parallel and, if any cell reaches the
// threshold, hands the roads of that row out one per accepted handshake, lowest phi0 column
// first. Rows are visited from 0 to N_QPT-1, so roads come out in (row, column) order.
//
// Interface: start (one cycle) begins a scan; rd_row/rd_data is the accumulator row port;
// road_valid/road_ready/road_qpt/road_phi0 is the road stream; busy is high from the cycle
// after start until the last road has been accepted.
// Timing: one cycle per row, plus one cycle per road, so a scan takes N_QPT + roads cycles
// (busy high for that long) when the consumer never stalls.
// The threshold rule and accumulator size follow the design; the row-by-row scan order is
// this implementation's choice.
module ht_road_finder
  import ht_pkg::*;
#(
  parameter int THRESH = THRESHOLD
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start,
  output logic                              busy,
  output logic [QPT_IDX_W-1:0]              rd_row,
  input  logic [N_LAYERS-1:0][N_PHI0-1:0]   rd_data,
  output logic                              road_valid,
  input  logic                              road_ready,
  output logic [QPT_IDX_W-1:0]              road_qpt,
  output logic [PHI0_IDX_W-1:0]             road_phi0
);

  typedef enum logic [1:0] {S_IDLE, S_SCAN, S_EMIT} state_e;
  state_e state;

  logic [QPT_IDX_W-1:0] row;
  logic [N_PHI0-1:0]    pending;    // roads of the current row still to hand out
  logic [N_PHI0-1:0]    row_mask;   // roads of the row on rd_data
  logic [N_PHI0-1:0]    cur_mask;
  logic [PHI0_IDX_W-1:0] first_col;
  logic                 last_row;

  assign rd_row   = row;
  assign last_row = (int'(row) == N_QPT - 1);

  always_comb begin
    for (int j = 0; j < N_PHI0; j++) begin
      int n;
      n = 0;
      for (int l = 0; l < N_LAYERS; l++) n += int'(rd_data[l][j]);
      row_mask[j] = (n >= THRESH);
    end
  end

  assign cur_mask = (state == S_EMIT) ? pending : row_mask;

  always_comb begin
    first_col = '0;
    for (int j = N_PHI0 - 1; j >= 0; j--)
      if (cur_mask[j]) first_col = PHI0_IDX_W'(j);
  end

  assign busy       = (state != S_IDLE);
  assign road_valid = (state == S_EMIT);
  assign road_qpt   = row;
  assign road_phi0  = first_col;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      row     <= '0;
      pending <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          row   <= '0;
          state <= S_SCAN;
        end
        S_SCAN: begin
          if (row_mask != '0) begin
            pending <= row_mask;
            state   <= S_EMIT;
          end else if (last_row) begin
            state <= S_IDLE;
          end else begin
            row <= row + 1'b1;
          end
        end
        S_EMIT: if (road_ready) begin
          pending[first_col] <= 1'b0;
          if ((pending & ~(N_PHI0'(1) << first_col)) == '0) begin
            if (last_row) state <= S_IDLE;
            else begin
              row   <= row + 1'b1;
              state <= S_SCAN;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
