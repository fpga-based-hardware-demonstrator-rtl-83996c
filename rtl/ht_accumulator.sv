// ht_accumulator: the Hough accumulator with its fill logic.
//
// The accumulator is a two-dimensional histogram of N_PHI0 x N_QPT bins
// (phi0 x qA/pT); every bin holds one bit per detector layer, set when at
// least one cluster of that layer crosses the bin ("layer bits"). Counting
// the set bits of a bin gives the number of distinct layers whose Hough lines
// meet there, so several clusters of one layer never count twice.
//
// Fill: on a clock edge with fill high, each layer l with hit[l] high
// contributes one cluster (phi[l], inv_r[l] = 2^INV_F / r). For every phi0
// bin i in parallel the qA/pT bin of the line at the bin centre is computed
// with ht_pkg::qpt_bin and, if it lies inside the histogram, the layer bit is
// set. This gives N_PHI0 x N_LAYERS bin updates per clock, one cluster per
// layer per clock, as in the source design. clear empties the whole
// histogram in one clock (it wins over fill); it is used at the start of an
// event. Results are visible on layer_bits one cycle after the fill edge.
// layer_bits[i][l] is the row of N_QPT layer-l bits of phi0 bin i, so one
// cluster's update of a phi0 bin is a one-hot OR into a single vector.
//
// From the source design: 1200 x 64 bins, 8 layers, qA/pT evaluated per
// phi0 bin (every layer above the radius threshold), one update per phi0 bin
// and layer per clock. The bin scaling parameters are this design's.
module ht_accumulator
  import ht_pkg::*;
#(
  parameter int unsigned N_PHI0      = 1200,
  parameter int unsigned N_QPT       = 64,
  parameter int unsigned PHI0_BIN_W  = 32,     // phi units per phi0 bin
  parameter int unsigned PHI0_OFFSET = 13568,  // phi of the lower edge of bin 0
  parameter int unsigned QPT_SHIFT   = 18      // qA/pT bin = 2^QPT_SHIFT / 2^INV_F phi/r units
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                fill,
  input  logic [N_LAYERS-1:0] hit,
  input  phi_t                phi   [N_LAYERS],
  input  inv_r_t              inv_r [N_LAYERS],
  output logic [N_QPT-1:0]    layer_bits [N_PHI0][N_LAYERS]
);
  // One register row per (phi0 bin, layer): the line of the layer's cluster
  // crosses phi0 bin i in a single qA/pT bin, set as a one-hot OR.
  for (genvar i = 0; i < N_PHI0; i++) begin : g_phi0
    for (genvar l = 0; l < N_LAYERS; l++) begin : g_layer
      int               b;
      logic [N_QPT-1:0] line_bits, row;

      always_comb begin
        b = qpt_bin(phi[l], inv_r[l], PHI0_OFFSET + i * PHI0_BIN_W + PHI0_BIN_W / 2,
                    QPT_SHIFT, N_QPT);
        line_bits = (hit[l] && b >= 0 && b < int'(N_QPT)) ? N_QPT'(1) << b : '0;
      end

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)     row <= '0;
        else if (clear) row <= '0;
        else if (fill)  row <= row | line_bits;
      end

      assign layer_bits[i][l] = row;
    end
  end
endmodule
