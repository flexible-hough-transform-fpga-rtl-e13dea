// cdc_fifo: first-word-fall-through FIFO joining two clock domains.
//
// The tracker places its blocks in separate clock domains of the same period, joined by
// FIFOs, so that each block can be placed and timed on its own. This is that FIFO. Write and
// read pointers are binary inside their own domain and cross to the other one as Gray code
// through two flip-flops, the usual asynchronous FIFO. The storage is a plain array that
// maps to distributed or block RAM.
//
// Interface: write side (wclk, wrst_n, wvalid, wready, wdata); read side (rclk, rrst_n,
// rvalid, rready, rdata). A word moves when valid and ready are both high on a clock edge.
// rdata shows the oldest word whenever rvalid is high. Each reset clears the pointers of
// its own domain and both must be applied together.
// Timing: a written word becomes visible on the read side three read-clock edges after the
// write edge (one pointer register, two synchroniser stages). Full and empty are
// conservative, so the FIFO never over- or underflows.
// The FIFO type and depth are this implementation's choice; the design only names the FIFO.
module cdc_fifo #(
  parameter int WIDTH = 32,
  parameter int AW    = 4      // log2 of the depth
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wvalid,
  output logic             wready,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rclk,
  input  logic             rrst_n,
  output logic             rvalid,
  input  logic             rready,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [1 << AW];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen in the write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen in the read domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // Write domain.
  logic [AW:0] wbin_next;
  assign wready    = (wgray != {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign wbin_next = wbin + (AW + 1)'(wvalid && wready);

  always_ff @(posedge wclk) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_next;
      wgray    <= bin2gray(wbin_next);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  always_ff @(posedge wclk) begin
    if (wvalid && wready) mem[wbin[AW-1:0]] <= wdata;
  end

  // Read domain.
  logic [AW:0] rbin_next;
  assign rvalid    = (rgray != wgray_r2);
  assign rbin_next = rbin + (AW + 1)'(rvalid && rready);
  assign rdata     = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_next;
      rgray    <= bin2gray(rbin_next);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

endmodule
