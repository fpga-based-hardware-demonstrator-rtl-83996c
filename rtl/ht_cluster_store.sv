// ht_cluster_store: keeps every cluster of the current event, per layer, so
// that the back-search can find the clusters that made a road.
//
// One memory bank per layer, MAX_CL entries deep, each entry the cluster's
// phi and its radius reciprocal (the form the Hough formula uses). On a clock
// edge with wr_en high every layer with hit[l] high appends its cluster at
// position count[l] and count[l] increments; a cluster arriving when its bank
// is full is dropped and sets overflow until the next clear. clear (one
// cycle, wins over wr_en) empties all banks by resetting the counts.
//
// Read side: rd_layer/rd_index select an entry, rd_data shows it in the same
// cycle (combinational read). count[] gives the number of entries per layer.
//
// The source design stores the event (500 sets of eight clusters in its
// example) and searches it again after the road search; the bank size of 512
// (the next power of two) and the stored form are this design's choices.
module ht_cluster_store
  import ht_pkg::*;
#(
  parameter int unsigned MAX_CL = 512
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,
  input  logic                      wr_en,
  input  logic [N_LAYERS-1:0]       hit,
  input  hcluster_t                 wr_data [N_LAYERS],
  input  logic [2:0]                rd_layer,
  input  logic [$clog2(MAX_CL)-1:0] rd_index,
  output hcluster_t                 rd_data,
  output logic [$clog2(MAX_CL):0]   count [N_LAYERS],
  output logic                      overflow
);
  localparam int unsigned IW = $clog2(MAX_CL);

  hcluster_t bank [N_LAYERS][MAX_CL];

  always_ff @(posedge clk) begin
    for (int l = 0; l < N_LAYERS; l++)
      if (wr_en && !clear && hit[l] && count[l] < (IW+1)'(MAX_CL))
        bank[l][count[l][IW-1:0]] <= wr_data[l];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < N_LAYERS; l++) count[l] <= '0;
      overflow <= 1'b0;
    end else if (clear) begin
      for (int l = 0; l < N_LAYERS; l++) count[l] <= '0;
      overflow <= 1'b0;
    end else if (wr_en) begin
      for (int l = 0; l < N_LAYERS; l++) begin
        if (hit[l]) begin
          if (count[l] < (IW+1)'(MAX_CL)) count[l] <= count[l] + 1'b1;
          else overflow <= 1'b1;
        end
      end
    end
  end

  assign rd_data = bank[rd_layer][rd_index];
endmodule
