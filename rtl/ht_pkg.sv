// ht_pkg: shared sizes, types and the Hough formula of the Hough-transform
// (HT) track-finding demonstrator.
//
// The HT maps every cluster (r, phi) of the eight inner-tracker layers onto a
// line in the (phi0, qA/pT) parameter space. For every phi0 bin i the design
// evaluates qA/pT = (phi0_i - phi) / r (the form used when every layer lies
// above the radius threshold) and marks the qA/pT bin that the line crosses
// at the centre of bin i. The division is done once per cluster as a fixed
// point reciprocal, inv_r = floor(2^INV_F / r); the qA/pT bin of phi0 bin i
// is then
//     bin = (((phi0c_i - phi) * inv_r) >>> QPT_SHIFT) + N_QPT/2
// where phi0c_i = PHI0_OFFSET + i*PHI0_BIN_W + PHI0_BIN_W/2 is the centre of
// the phi0 bin in phi units. The same function serves the accumulator fill
// and the back-search, so a cluster is assigned to a road exactly when it
// set the road's central bin.
//
// From the source design: 8 layers, a 1200 x 64 (phi0 x qA/pT) accumulator,
// 12-bit r, 16-bit phi, 500 cluster sets per event, 16 output lanes, the
// 8/7/6 layer thresholds of the five-bin road and the 18-bit output cluster
// word whose idle value is all ones. The fixed-point scaling (INV_F,
// QPT_SHIFT, PHI0_BIN_W, PHI0_OFFSET) and the encoding of the cluster
// address in the output word are this design's own choices.
package ht_pkg;

  localparam int unsigned N_LAYERS = 8;    // ITk layers, one cluster each per clock
  localparam int unsigned R_W      = 12;   // cluster radius width
  localparam int unsigned PHI_W    = 16;   // cluster azimuth width
  localparam int unsigned WORD_W   = 256;  // Wupper FIFO word
  localparam int unsigned SLOT_W   = 32;   // one cluster slot in a word
  localparam int unsigned INV_F    = 20;   // fractional bits of 1/r
  localparam int unsigned INV_W    = INV_F + 1;
  localparam int unsigned CL_OUT_W = 18;   // output cluster word (cl_data_out_std)
  localparam logic [CL_OUT_W-1:0] CL_NONE = '1;  // idle / no-cluster word

  typedef logic [R_W-1:0]   r_t;
  typedef logic [PHI_W-1:0] phi_t;
  typedef logic [INV_W-1:0] inv_r_t;

  // One cluster as received; r == 0 marks an empty slot.
  typedef struct packed {
    r_t   r;
    phi_t phi;
  } cluster_t;

  // One cluster as stored for the back-search: the reciprocal replaces r.
  typedef struct packed {
    inv_r_t inv_r;
    phi_t   phi;
  } hcluster_t;

  // Output word types towards SECOND_FIFO (bits 255:252 of a 256-bit word).
  localparam logic [3:0] TAG_ROAD    = 4'hA;  // road header
  localparam logic [3:0] TAG_CLUSTER = 4'hC;  // one cluster per lane
  localparam logic [3:0] TAG_EVENT   = 4'hE;  // end of event
  localparam int unsigned LANE_FIELD_W = 15;  // {layer[2:0], index[11:0]} per lane

  // Reciprocal of the radius; r == 0 never reaches it (empty slot).
  function automatic inv_r_t reciprocal(input r_t r);
    logic [INV_W-1:0] num;
    num = INV_W'(1) << INV_F;
    return (r == '0) ? '0 : inv_r_t'(num / INV_W'(r));
  endfunction

  // Signed qA/pT bin of a cluster at a phi0 bin centre; may be out of range.
  function automatic int qpt_bin(input phi_t phi, input inv_r_t inv_r,
                                 input int unsigned phi0c, input int unsigned qpt_shift,
                                 input int unsigned n_qpt);
    longint diff, prod;
    diff = longint'(phi0c) - longint'(phi);
    prod = diff * longint'(inv_r);
    return int'(prod >>> qpt_shift) + int'(n_qpt / 2);
  endfunction

endpackage
