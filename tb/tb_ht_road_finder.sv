// tb_ht_road_finder: self-checking test of the five-bin road search and of
// the road extraction order.
//
// On a reduced 24 x 8 histogram the testbench plants road patterns (8 layers
// in the centre, 7 on each side, 6 two bins away), near misses (one layer
// too few in one position, or the same layer counted twice, which cannot
// happen with layer bits) and random background, computes the expected road
// list itself, then pulses search and pops all roads, checking each one and
// its order (phi0, then qA/pT). A second search on an edited histogram
// checks that search recaptures the map. Prints TB_RESULT.
module tb_ht_road_finder;
  import ht_pkg::*;

  localparam int unsigned NP = 24;
  localparam int unsigned NQ = 8;

  logic                clk = 1'b0, rst_n = 1'b0;
  logic [N_LAYERS-1:0] lb [NP][NQ];           // testbench view: layers of one bin
  logic [NQ-1:0]       layer_bits [NP][N_LAYERS];
  logic                search = 1'b0, pop = 1'b0;
  logic                road_valid;
  logic [$clog2(NP)-1:0] road_phi0;
  logic [$clog2(NQ)-1:0] road_qpt;

  int checks = 0, failures = 0;
  int exp_i [$], exp_j [$];

  ht_road_finder #(.N_PHI0(NP), .N_QPT(NQ)) dut (.*);

  always #5 clk = ~clk;

  always_comb
    for (int i = 0; i < NP; i++)
      for (int l = 0; l < N_LAYERS; l++)
        for (int j = 0; j < NQ; j++) layer_bits[i][l][j] = lb[i][j][l];

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  function automatic logic [7:0] bits_with(input int n);
    logic [7:0] b;
    b = '0;
    while ($countones(b) < n) b[$urandom_range(0, 7)] = 1'b1;
    return b;
  endfunction

  function automatic int cnt(input int i, input int j);
    if (i < 0 || i >= NP) return 0;
    return $countones(lb[i][j]);
  endfunction

  task automatic expect_roads();
    exp_i.delete();
    exp_j.delete();
    for (int i = 0; i < NP; i++)
      for (int j = 0; j < NQ; j++)
        if (i >= 2 && i < NP - 2 && cnt(i, j) >= 8 && cnt(i-1, j) >= 7 && cnt(i+1, j) >= 7 &&
            cnt(i-2, j) >= 6 && cnt(i+2, j) >= 6) begin
          exp_i.push_back(i);
          exp_j.push_back(j);
        end
  endtask

  task automatic plant(input int i, input int j, input int c, input int s1, input int s2);
    lb[i][j]   = bits_with(c);
    lb[i-1][j] = bits_with(s1);
    lb[i+1][j] = bits_with(s1);
    lb[i-2][j] = bits_with(s2);
    lb[i+2][j] = bits_with(s2);
  endtask

  task automatic run_and_check(input string tag);
    int got;
    @(negedge clk);
    search = 1'b1;
    @(negedge clk);
    search = 1'b0;
    got = 0;
    while (road_valid && got < 100) begin
      check(got < exp_i.size() && road_phi0 == exp_i[got] && road_qpt == exp_j[got],
            $sformatf("%s road %0d: got (%0d,%0d)", tag, got, road_phi0, road_qpt));
      pop = 1'b1;
      @(negedge clk);
      pop = 1'b0;
      got++;
    end
    check(got == exp_i.size(), $sformatf("%s: %0d roads found, %0d expected", tag, got, exp_i.size()));
  endtask

  initial begin
    lb = '{default: '0};
    // background: up to 5 layers anywhere
    for (int i = 0; i < NP; i++)
      for (int j = 0; j < NQ; j++) lb[i][j] = bits_with($urandom_range(0, 5));
    plant(4, 1, 8, 7, 6);     // road
    plant(4, 5, 8, 8, 8);     // road, stronger than needed
    plant(10, 2, 8, 7, 6);    // road
    lb[11][2] = 8'hFF;  // neighbour of the road above, itself not a road (i+2 has few)
    plant(16, 3, 7, 7, 6);    // near miss: centre 7
    plant(16, 6, 8, 7, 5);    // near miss: outer 5
    plant(20, 0, 8, 6, 6);    // near miss: inner 6
    plant(8, 3, 8, 7, 6);     // near misses: one neighbour one layer short
    lb[7][3] = bits_with(6);
    plant(8, 7, 8, 7, 6);
    lb[9][7] = bits_with(6);
    plant(14, 0, 8, 7, 6);
    lb[12][0] = bits_with(5);
    plant(14, 4, 8, 7, 6);
    lb[16][4] = bits_with(5);
    plant(21, 7, 8, 8, 8);    // would be a road but i+2 = 23 is inside; check edge handling
    lb[1][4] = 8'hFF; // edge bins never roads
    lb[0][4] = 8'hFF;
    lb[2][4] = 8'hFF;
    lb[3][4] = 8'hFF;
    expect_roads();
    check(exp_i.size() >= 4, "enough roads planted");
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check(!road_valid, "no road after reset");
    run_and_check("first");
    // second event
    lb = '{default: '0};
    plant(7, 7, 8, 7, 6);
    plant(12, 0, 8, 7, 6);
    expect_roads();
    run_and_check("second");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
