// tb_ht_back_search: self-checking test of the back-search lanes.
//
// A testbench array stands in for the cluster store (3 to 6 random clusters
// per layer, a combinational read port). Four lanes receive roads; two of
// them are chosen so that several stored clusters fall in them, one at
// random, one lane is switched off. The expected beats are worked out in the
// testbench from its own evaluation of the Hough formula, in walk order
// (layer, then index), and compared with the output beats taken under a
// randomly toggling out_ready. Checks the done pulse and that a second batch
// runs after it. Prints TB_RESULT.
module tb_ht_back_search;
  import ht_pkg::*;

  localparam int unsigned NP  = 40;
  localparam int unsigned NQ  = 16;
  localparam int unsigned BW  = 32;
  localparam int unsigned OFS = 1000;
  localparam int unsigned SH  = 18;
  localparam int unsigned NL  = 4;
  localparam int unsigned MC  = 8;

  logic                  clk = 1'b0, rst_n = 1'b0;
  logic                  start = 1'b0;
  logic [NL-1:0]         lane_on = '0;
  logic [$clog2(NP)-1:0] road_phi0 [NL];
  logic [$clog2(NQ)-1:0] road_qpt  [NL];
  logic [$clog2(MC):0]   count [N_LAYERS];
  logic [2:0]            rd_layer;
  logic [$clog2(MC)-1:0] rd_index;
  hcluster_t             rd_data;
  logic                  out_valid, out_ready = 1'b0, busy, done;
  logic [CL_OUT_W-1:0]   lane_word [NL];

  hcluster_t mem [N_LAYERS][MC];
  int checks = 0, failures = 0, stalls = 0;
  logic [CL_OUT_W-1:0] exp_beats [$][NL];

  ht_back_search #(.N_PHI0(NP), .N_QPT(NQ), .PHI0_BIN_W(BW), .PHI0_OFFSET(OFS),
                   .QPT_SHIFT(SH), .N_LANES(NL), .MAX_CL(MC)) dut (.*);

  assign rd_data = mem[rd_layer][rd_index];

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  function automatic longint floor_div(input longint a, input longint b);
    longint q;
    q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q = q - 1;
    return q;
  endfunction

  function automatic int ref_bin(input hcluster_t c, input int i);
    longint ctr;
    ctr = longint'(OFS + i * BW + BW / 2);
    return int'(floor_div((ctr - longint'(c.phi)) * longint'(c.inv_r), longint'(1) << SH)) + NQ / 2;
  endfunction

  task automatic build_expectation();
    exp_beats.delete();
    for (int l = 0; l < N_LAYERS; l++)
      for (int n = 0; n < count[l]; n++) begin
        logic [CL_OUT_W-1:0] beat [NL];
        bit any;
        any = 1'b0;
        for (int k = 0; k < NL; k++) begin
          if (lane_on[k] && ref_bin(mem[l][n], road_phi0[k]) == road_qpt[k]) begin
            beat[k] = {3'(l), 15'(n)};
            any = 1'b1;
          end else beat[k] = CL_NONE;
        end
        if (any) exp_beats.push_back(beat);
      end
  endtask

  task automatic run_batch(input string tag);
    int got, guard;
    build_expectation();
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    got = 0;
    guard = 0;
    while (!done && guard < 500) begin
      out_ready = ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (out_valid && !out_ready) stalls++;
      if (out_valid && out_ready) begin
        bit ok;
        ok = (got < exp_beats.size());
        if (ok) for (int k = 0; k < NL; k++) ok &= (lane_word[k] == exp_beats[got][k]);
        check(ok, $sformatf("%s beat %0d lane0 %h", tag, got, lane_word[0]));
        got++;
      end
      @(negedge clk);
      guard++;
    end
    check(done, $sformatf("%s: done pulse", tag));
    check(got == exp_beats.size(), $sformatf("%s: %0d beats, %0d expected", tag, got, exp_beats.size()));
  endtask

  initial begin
    for (int l = 0; l < N_LAYERS; l++) begin
      count[l] = ($clog2(MC)+1)'($urandom_range(3, 6));
      for (int n = 0; n < MC; n++) begin
        mem[l][n].inv_r = inv_r_t'((1 << 20) / $urandom_range(150, 4000));
        mem[l][n].phi   = phi_t'($urandom_range(OFS + 8 * BW, OFS + 32 * BW));
      end
    end
    // lanes 0 and 1 take the bin of a stored cluster; others random
    road_phi0[0] = 20;
    road_qpt[0]  = ($clog2(NQ))'(ref_bin(mem[0][0], 20));
    road_phi0[1] = 15;
    road_qpt[1]  = ($clog2(NQ))'(ref_bin(mem[3][1], 15));
    road_phi0[2] = 25;
    road_qpt[2]  = 7;
    road_phi0[3] = 20;
    road_qpt[3]  = road_qpt[0];
    lane_on = 4'b0111;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run_batch("batch 1");
    check(exp_beats.size() >= 2, "batch 1 has beats");
    // second batch, lane 3 on, other roads
    road_phi0[0] = 12;
    road_qpt[0]  = ($clog2(NQ))'(ref_bin(mem[5][2], 12));
    lane_on = 4'b1001;
    run_batch("batch 2");
    check(stalls > 0, "out_ready stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
