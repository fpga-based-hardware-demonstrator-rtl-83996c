// ht_back_search: finds, for a batch of up to N_LANES roads at once, the
// stored clusters that produced each road, and streams them out on one lane
// per road.
//
// A road is the accumulator bin (road_phi0, road_qpt). After start, the unit
// walks through the cluster store, layer 0 to N_LAYERS-1 and within a layer
// in arrival order, one cluster per clock. Each cluster is broadcast to all
// lanes; lane k runs the Hough formula again at the centre of its road's phi0
// bin and the cluster belongs to the road when the resulting qA/pT bin equals
// the road's. The walk is shared by all lanes, so a batch costs one pass over
// the event whatever the number of roads in it.
//
// Output: for a scanned cluster that matches at least one lane, one output
// beat with out_valid high; lane k carries {layer, index} of the cluster
// (an 18-bit word, layer in bits 17:15, index within the layer in bits 14:0)
// if it matched, or the all-ones idle word otherwise. The beat is taken on a
// clock edge where out_valid and out_ready are both high; with out_ready low
// the walk holds. done pulses for one cycle after the last beat of the
// batch. Lanes with lane_on low never match.
//
// From the source design: the back-search by re-running the Hough formula
// over the stored clusters, up to 16 parallel output lanes (one cluster per
// road) and the 18-bit output word idling at all ones. The lock-step walk,
// the address layout of the output word and the handshake are this design's.
module ht_back_search
  import ht_pkg::*;
#(
  parameter int unsigned N_PHI0      = 1200,
  parameter int unsigned N_QPT       = 64,
  parameter int unsigned PHI0_BIN_W  = 32,
  parameter int unsigned PHI0_OFFSET = 13568,
  parameter int unsigned QPT_SHIFT   = 18,
  parameter int unsigned N_LANES     = 16,
  parameter int unsigned MAX_CL      = 512
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [N_LANES-1:0]          lane_on,
  input  logic [$clog2(N_PHI0)-1:0]   road_phi0 [N_LANES],
  input  logic [$clog2(N_QPT)-1:0]    road_qpt  [N_LANES],
  // cluster store read port
  input  logic [$clog2(MAX_CL):0]     count [N_LAYERS],
  output logic [2:0]                  rd_layer,
  output logic [$clog2(MAX_CL)-1:0]   rd_index,
  input  hcluster_t                   rd_data,
  // output lanes
  output logic                        out_valid,
  input  logic                        out_ready,
  output logic [CL_OUT_W-1:0]         lane_word [N_LANES],
  output logic                        busy,
  output logic                        done
);
  localparam int unsigned IW = $clog2(MAX_CL);

  logic               scanning;
  logic [3:0]         layer;       // 0..N_LAYERS, N_LAYERS = walk finished
  logic [IW:0]        index;
  logic [N_LANES-1:0] match;
  logic               at_cluster;  // (layer, index) names a stored cluster
  logic               advance;

  assign at_cluster = scanning && (layer < 4'(N_LAYERS)) && (index < count[layer[2:0]]);
  assign rd_layer   = layer[2:0];
  assign rd_index   = index[IW-1:0];
  assign advance    = !out_valid || out_ready;
  assign busy       = scanning || out_valid;

  always_comb begin
    for (int k = 0; k < N_LANES; k++) begin
      int b;
      b = qpt_bin(rd_data.phi, rd_data.inv_r,
                  PHI0_OFFSET + int'(road_phi0[k]) * PHI0_BIN_W + PHI0_BIN_W / 2,
                  QPT_SHIFT, N_QPT);
      match[k] = at_cluster && lane_on[k] && (b == int'(road_qpt[k]));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scanning  <= 1'b0;
      layer     <= '0;
      index     <= '0;
      out_valid <= 1'b0;
      done      <= 1'b0;
      for (int k = 0; k < N_LANES; k++) lane_word[k] <= CL_NONE;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        scanning <= 1'b1;
        layer    <= '0;
        index    <= '0;
      end else if (advance) begin
        out_valid <= at_cluster && (match != '0);
        for (int k = 0; k < N_LANES; k++)
          lane_word[k] <= match[k] ? {layer[2:0], 15'(index)} : CL_NONE;
        if (scanning) begin
          if (layer >= 4'(N_LAYERS)) begin
            scanning <= 1'b0;
            done     <= 1'b1;
          end else if (index + 1'b1 >= count[layer[2:0]] || !at_cluster) begin
            layer <= layer + 1'b1;
            index <= '0;
          end else begin
            index <= index + 1'b1;
          end
        end
      end
    end
  end
endmodule
