// ht_road_finder: five-bin road search over the Hough accumulator and
// extraction of the road candidates one at a time.
//
// A bin (i, j) is a road when, looking along phi0 at the same qA/pT bin j,
// the central bin has layer bits from at least TH_C layers, its left and
// right neighbours (i-1, i+1) from at least TH_1 layers and the next ones
// (i-2, i+2) from at least TH_2 layers. The counts are of distinct layers,
// because every bin stores one bit per layer. All N_PHI0 x N_QPT bins are
// checked concurrently; neighbours that fall outside the histogram count as
// zero layers, so the two outermost phi0 bins on each side never hold a road.
//
// Interface and timing: a one-cycle search pulse captures the road map of
// the current layer_bits into a register (one bit per bin). From the next
// cycle on, road_valid shows whether a road is left and road_phi0/road_qpt
// give the first one in (phi0, then qA/pT) order; a pop pulse removes it,
// and the next road appears in the following cycle. So one road leaves per
// clock.
//
// The thresholds 8/7/6 and the five-bin window along phi0 follow the source
// design; the boundary rule and the extraction order are this design's.
module ht_road_finder
  import ht_pkg::*;
#(
  parameter int unsigned N_PHI0 = 1200,
  parameter int unsigned N_QPT  = 64,
  parameter int unsigned TH_C   = 8,
  parameter int unsigned TH_1   = 7,
  parameter int unsigned TH_2   = 6
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [N_QPT-1:0]            layer_bits [N_PHI0][N_LAYERS],
  input  logic                        search,
  input  logic                        pop,
  output logic                        road_valid,
  output logic [$clog2(N_PHI0)-1:0]   road_phi0,
  output logic [$clog2(N_QPT)-1:0]    road_qpt
);
  localparam int unsigned PW = $clog2(N_PHI0);
  localparam int unsigned QW = $clog2(N_QPT);
  localparam int unsigned CW = $clog2(N_LAYERS + 1);

  logic [N_QPT-1:0] road_now [N_PHI0];   // combinational road map
  logic [N_QPT-1:0] road_map [N_PHI0];   // captured road map
  // Per phi0 bin, one bit per qA/pT bin: at least TH_C / TH_1 / TH_2 layers.
  logic [N_QPT-1:0] ge_c [N_PHI0], ge_1 [N_PHI0], ge_2 [N_PHI0];
  logic [N_PHI0-1:0] row_any;            // captured row holds a road

  // Bit-sliced "count >= th" for a row of bins, most significant bit first.
  function automatic logic [N_QPT-1:0] at_least(input logic [N_QPT-1:0] cnt [CW],
                                                input int unsigned th);
    logic [N_QPT-1:0] gt, eq;
    logic [CW-1:0]    t;
    gt = '0;
    eq = '1;
    t  = CW'(th);
    for (int k = int'(CW) - 1; k >= 0; k--) begin
      if (t[k]) begin
        eq = eq & cnt[k];
      end else begin
        gt = gt | (eq & cnt[k]);
        eq = eq & ~cnt[k];
      end
    end
    return gt | eq;
  endfunction

  // Layer counts of a whole row of qA/pT bins at once: the count of every
  // bin is kept bit-sliced (count bit k of all bins in one vector) and the
  // layer rows are added one after the other.
  for (genvar i = 0; i < N_PHI0; i++) begin : g_row
    logic [N_QPT-1:0] cnt [CW];
    logic [N_QPT-1:0] ge_c_r, ge_1_r, ge_2_r, now_r, map_r;

    always_comb begin
      logic [N_QPT-1:0] carry, sum;
      for (int k = 0; k < CW; k++) cnt[k] = '0;
      for (int l = 0; l < N_LAYERS; l++) begin
        carry = layer_bits[i][l];
        for (int k = 0; k < CW; k++) begin
          sum    = cnt[k] ^ carry;
          carry  = cnt[k] & carry;
          cnt[k] = sum;
        end
      end
    end

    assign ge_c_r  = at_least(cnt, TH_C);
    assign ge_1_r  = at_least(cnt, TH_1);
    assign ge_2_r  = at_least(cnt, TH_2);
    assign ge_c[i] = ge_c_r;
    assign ge_1[i] = ge_1_r;
    assign ge_2[i] = ge_2_r;

    if (i < 2 || i > int'(N_PHI0) - 3) begin : g_edge
      assign now_r = '0;
    end else begin : g_inner
      assign now_r = ge_c_r & ge_1[i-1] & ge_1[i+1] & ge_2[i-2] & ge_2[i+2];
    end
    assign road_now[i] = now_r;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)
        map_r <= '0;
      else if (search)
        map_r <= now_r;
      else if (pop && road_valid && road_phi0 == PW'(i))
        map_r <= map_r & ~(N_QPT'(1) << road_qpt);
    end
    assign road_map[i] = map_r;
    assign row_any[i]  = |map_r;
  end

  // First road of the captured map: lowest phi0 bin, then lowest qA/pT bin.
  logic [N_QPT-1:0] first_row;

  always_comb begin
    road_phi0  = '0;
    road_valid = |row_any;
    for (int i = int'(N_PHI0) - 1; i >= 0; i--)
      if (row_any[i]) road_phi0 = PW'(i);
    first_row = road_map[road_phi0];
    road_qpt  = '0;
    for (int j = int'(N_QPT) - 1; j >= 0; j--)
      if (first_row[j]) road_qpt = QW'(j);
  end

endmodule
