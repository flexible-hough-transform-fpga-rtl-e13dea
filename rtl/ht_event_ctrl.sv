// ht_event_ctrl: runs the two macro-blocks of the tracker on alternate storage banks.
//
// The accumulator and the cluster store are doubled, so the tracker works as two
// macro-blocks: the fill side writes the incoming event into one bank while the readout side
// finds the roads and extracts the clusters of the previous event from the other bank.
// This controller keeps one "full" flag per bank:
//   fill side    takes input words while the fill bank is not full (otherwise it stalls the
//                input); the word that carries eof marks the bank full and moves the fill
//                side to the other bank;
//   readout side waits for its bank to be full, starts the road finder, waits until the
//                finder and the extractor are both idle, sends an end-of-event word, clears
//                the bank (accumulator and cluster store), marks it empty and moves on.
// Events are therefore processed strictly in arrival order; event_id counts them.
//
// Interface: in_valid/in_ready/in_eof is the input stream; wr_en/wr_bank drive the fill of
// both memories; rd_bank selects the bank read by finder and extractor; finder_start,
// finder_busy, extract_busy handshake with them; eoe_valid/eoe_ready send the end-of-event
// word; clr_en/clr_bank clear the readout bank; fill_bank and mem_rd are status.
// Timing: a bank is cleared in the cycle after its end-of-event word is accepted and can be
// filled again from the following cycle.
// The double storage and the concurrency of two events follow the design; the flag protocol
// is this implementation's choice.
module ht_event_ctrl
  import ht_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic               in_eof,
  output logic               wr_en,
  output logic               wr_bank,
  output logic               rd_bank,
  output logic               finder_start,
  input  logic               finder_busy,
  input  logic               extract_busy,
  output logic               eoe_valid,
  input  logic               eoe_ready,
  output logic               clr_en,
  output logic               clr_bank,
  output logic [EVID_W-1:0]  event_id,
  output logic               fill_bank,
  output logic               mem_rd
);

  typedef enum logic [1:0] {P_IDLE, P_RUN, P_EOE, P_CLR} pstate_e;
  pstate_e pstate;

  logic [1:0] full;
  logic       fbank, pbank;

  assign in_ready     = !full[fbank];
  assign wr_en        = in_valid && in_ready;
  assign wr_bank      = fbank;
  assign rd_bank      = pbank;
  assign finder_start = (pstate == P_IDLE) && full[pbank];
  assign eoe_valid    = (pstate == P_EOE);
  assign clr_en       = (pstate == P_CLR);
  assign clr_bank     = pbank;
  assign fill_bank    = fbank;
  assign mem_rd       = (pstate != P_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pstate   <= P_IDLE;
      full     <= '0;
      fbank    <= 1'b0;
      pbank    <= 1'b0;
      event_id <= '0;
    end else begin
      if (wr_en && in_eof) begin
        full[fbank] <= 1'b1;
        fbank       <= ~fbank;
      end
      unique case (pstate)
        P_IDLE: if (full[pbank]) pstate <= P_RUN;
        P_RUN:  if (!finder_busy && !extract_busy) pstate <= P_EOE;
        P_EOE:  if (eoe_ready) pstate <= P_CLR;
        P_CLR: begin
          full[pbank] <= 1'b0;
          pbank       <= ~pbank;
          event_id    <= event_id + 1'b1;
          pstate      <= P_IDLE;
        end
        default: pstate <= P_IDLE;
      endcase
    end
  end

  // The fill side never writes into the bank being read out.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
                                 (wr_en && mem_rd) |-> (wr_bank != rd_bank));

endmodule
