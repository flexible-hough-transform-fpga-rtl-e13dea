// ht_pkg: shared sizes, types and Hough-transform bin formulas of the HT tracker.
//
// The tracker maps every cluster, given by its polar coordinates (r, phi), onto a
// two-dimensional accumulator whose rows are bins of the track curvature qA/pt and whose
// columns are bins of the track azimuth at the beam line, phi0. A cluster lies on the
// straight line phi0 = phi + r*qA/pt in that plane: for each qA/pt row the tracker computes
// phi0 and marks the column it falls in.
//
// Accumulator size (168 x 48), 8 layers and the road threshold of 7 layers follow the
// reference configuration of the design. The 16-bit phi, 12-bit r and 18-bit cluster words
// and the 8-bit / 6-bit bin indices (idle values 8'hff, 6'h3f, 18'h3ffff) follow the port
// widths of the design's simulation trace. The fixed-point scaling below (phi LSB, r LSB,
// qA/pt step, phi0 window) is this implementation's own choice:
//   phi0 column j covers phi codes [PHI0_MIN + j*2^PHI0_SHIFT, PHI0_MIN + (j+1)*2^PHI0_SHIFT);
//   qA/pt row k has slope s_k = (2k - (N_QPT-1)) * QPT_HALFSTEP, in units of
//   2^-RQ_SHIFT phi codes per r code, so the rows are symmetric about qA/pt = 0.
package ht_pkg;

  // Reference configuration.
  localparam int N_LAYERS   = 8;    // layers used by the HT
  localparam int N_QPT      = 168;  // accumulator bins along qA/pt
  localparam int N_PHI0     = 48;   // accumulator bins along phi0
  localparam int THRESHOLD  = 7;    // layers needed to activate a road

  // Word widths.
  localparam int PHI_W      = 16;
  localparam int R_W        = 12;
  localparam int CLU_W      = 18;
  localparam int QPT_IDX_W  = 8;
  localparam int PHI0_IDX_W = 6;
  localparam int EVID_W     = 8;

  // Cluster extraction reads LANES_PER_LAYER clusters of every layer per cycle, so one
  // output word carries N_LANES = 32 clusters (the width of the trace's cluster output).
  localparam int LANES_PER_LAYER = 4;
  localparam int N_LANES         = N_LAYERS * LANES_PER_LAYER;
  localparam int CLU_DEPTH       = 256;  // clusters per layer and per bank

  // Fixed-point scaling (own choice, see header).
  localparam int PHI0_SHIFT   = 10;
  localparam int PHI0_MIN     = ((1 << PHI_W) - (N_PHI0 << PHI0_SHIFT)) / 2;
  localparam int RQ_SHIFT     = 6;
  localparam int QPT_HALFSTEP = 1;

  localparam logic [QPT_IDX_W-1:0]  QPT_IDLE  = '1;
  localparam logic [PHI0_IDX_W-1:0] PHI0_IDLE = '1;
  localparam logic [CLU_W-1:0]      CLU_IDLE  = '1;

  typedef struct packed {
    logic [PHI_W-1:0] phi;
    logic [R_W-1:0]   r;
    logic [CLU_W-1:0] clu;
  } cluster_t;

  // One input word: one cluster slot per layer.
  typedef struct packed {
    logic                    eof;     // last word of an event
    logic [N_LAYERS-1:0]     lvalid;  // which layer slots hold a cluster
    cluster_t [N_LAYERS-1:0] cl;
  } in_word_t;

  // One output word: part of a road's cluster list, or the end-of-event marker.
  typedef struct packed {
    logic [EVID_W-1:0]           event_id;
    logic                        eoe;        // end-of-event word, no road
    logic                        overflow;   // eoe word: a layer had more than CLU_DEPTH clusters
    logic                        road_first; // first word of a road
    logic                        road_last;  // last word of a road
    logic [QPT_IDX_W-1:0]        qpt;
    logic [PHI0_IDX_W-1:0]       phi0;
    logic [N_LANES-1:0]          lane_valid;
    logic [N_LANES-1:0][CLU_W-1:0] cl;
  } out_word_t;

  // qA/pt slope of row k.
  function automatic int qpt_slope(input int k);
    return (2 * k - (N_QPT - 1)) * QPT_HALFSTEP;
  endfunction

  // phi0 column of a cluster in qA/pt row k, or -1 outside the accumulator.
  function automatic int phi0_bin(input logic [PHI_W-1:0] phi, input logic [R_W-1:0] r,
                                  input int k);
    int prod, code, off;
    prod = int'(r) * qpt_slope(k);
    code = int'(phi) + (prod >>> RQ_SHIFT);
    off  = code - PHI0_MIN;
    if (off < 0) return -1;
    if ((off >>> PHI0_SHIFT) >= N_PHI0) return -1;
    return off >>> PHI0_SHIFT;
  endfunction

  // Does a cluster draw a line through accumulator cell (k, j)?
  function automatic logic cell_hit(input logic [PHI_W-1:0] phi, input logic [R_W-1:0] r,
                                    input int k, input int j);
    return phi0_bin(phi, r, k) == j;
  endfunction

endpackage
