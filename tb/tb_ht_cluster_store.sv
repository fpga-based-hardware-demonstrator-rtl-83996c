// tb_ht_cluster_store: self-checking test of the per-layer cluster store.
//
// Writes random cluster words with random layer hits into a store of 8
// entries per layer, keeping a reference list per layer, until some layers
// overflow. Checks the counts, every stored entry through the read port, the
// overflow flag, and that clear empties the counts and the flag. Prints
// TB_RESULT.
module tb_ht_cluster_store;
  import ht_pkg::*;

  localparam int unsigned MAXC = 8;

  logic                clk = 1'b0, rst_n = 1'b0;
  logic                clear = 1'b0, wr_en = 1'b0;
  logic [N_LAYERS-1:0] hit = '0;
  hcluster_t           wr_data [N_LAYERS];
  logic [2:0]          rd_layer = '0;
  logic [$clog2(MAXC)-1:0] rd_index = '0;
  hcluster_t           rd_data;
  logic [$clog2(MAXC):0] count [N_LAYERS];
  logic                overflow;

  int checks = 0, failures = 0;
  hcluster_t ref_l [N_LAYERS][$];

  ht_cluster_store #(.MAX_CL(MAXC)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    bit exp_ovf;
    exp_ovf = 1'b0;
    for (int l = 0; l < N_LAYERS; l++) wr_data[l] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 10; n++) begin
      @(negedge clk);
      wr_en = 1'b1;
      for (int l = 0; l < N_LAYERS; l++) begin
        hit[l] = (l == 0) ? 1'b1 : ($urandom_range(0, 2) != 0);
        wr_data[l] = hcluster_t'({$urandom, $urandom});
        if (hit[l]) begin
          if (ref_l[l].size() < MAXC) ref_l[l].push_back(wr_data[l]);
          else exp_ovf = 1'b1;
        end
      end
    end
    @(negedge clk);
    wr_en = 1'b0;
    check(overflow == exp_ovf && exp_ovf, "overflow flag after 10 writes to layer 0");
    for (int l = 0; l < N_LAYERS; l++) begin
      check(count[l] == ref_l[l].size(), $sformatf("layer %0d count %0d expected %0d", l, count[l], ref_l[l].size()));
      for (int i = 0; i < ref_l[l].size(); i++) begin
        rd_layer = 3'(l);
        rd_index = ($clog2(MAXC))'(i);
        #1;
        check(rd_data == ref_l[l][i], $sformatf("layer %0d entry %0d", l, i));
      end
    end
    @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    for (int l = 0; l < N_LAYERS; l++) check(count[l] == 0, "count cleared");
    check(!overflow, "overflow cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
