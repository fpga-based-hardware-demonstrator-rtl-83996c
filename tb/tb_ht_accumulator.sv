// tb_ht_accumulator: self-checking test of the accumulator fill.
//
// A reduced 40 x 16 histogram is filled over several clocks with random
// clusters (random layer hits, radii in the outer-layer range, phi inside
// the phi0 window). A reference histogram is built in the testbench with its
// own evaluation of qA/pT = (phi0 - phi) / r at each bin centre (floor
// division of the fixed-point product), and every layer bit is compared
// after each clock. Then clear is checked to empty the histogram and to win
// over a simultaneous fill. Prints TB_RESULT.
module tb_ht_accumulator;
  import ht_pkg::*;

  localparam int unsigned NP  = 40;
  localparam int unsigned NQ  = 16;
  localparam int unsigned BW  = 32;
  localparam int unsigned OFS = 1000;
  localparam int unsigned SH  = 18;

  logic                clk = 1'b0, rst_n = 1'b0;
  logic                clear = 1'b0, fill = 1'b0;
  logic [N_LAYERS-1:0] hit = '0;
  phi_t                phi   [N_LAYERS];
  inv_r_t              inv_r [N_LAYERS];
  logic [NQ-1:0]       layer_bits [NP][N_LAYERS];
  logic [N_LAYERS-1:0] model [NP][NQ];

  int checks = 0, failures = 0, bits_set = 0;

  ht_accumulator #(.N_PHI0(NP), .N_QPT(NQ), .PHI0_BIN_W(BW), .PHI0_OFFSET(OFS), .QPT_SHIFT(SH))
    dut (.*);

  always #5 clk = ~clk;

  function automatic longint floor_div(input longint a, input longint b);
    longint q;
    q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q = q - 1;
    return q;
  endfunction

  task automatic compare(input string when);
    int bad;
    bad = 0;
    for (int i = 0; i < NP; i++)
      for (int j = 0; j < NQ; j++)
        for (int l = 0; l < N_LAYERS; l++)
          if (layer_bits[i][l][j] !== model[i][j][l]) bad++;
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL: %s: %0d bins differ", when, bad);
    end
  endtask

  initial begin
    model = '{default: '0};
    for (int l = 0; l < N_LAYERS; l++) begin
      phi[l] = '0;
      inv_r[l] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    compare("after reset");
    for (int n = 0; n < 12; n++) begin
      fill = 1'b1;
      for (int l = 0; l < N_LAYERS; l++) begin
        int unsigned r;
        hit[l]   = ($urandom_range(0, 3) != 0);
        r        = $urandom_range(150, 4000);
        inv_r[l] = inv_r_t'((1 << 20) / r);
        phi[l]   = phi_t'($urandom_range(OFS, OFS + NP * BW));
        if (hit[l])
          for (int i = 0; i < NP; i++) begin
            longint c, b;
            c = longint'(OFS + i * BW + BW / 2);
            b = floor_div((c - longint'(phi[l])) * longint'(inv_r[l]), longint'(1) << SH) + NQ / 2;
            if (b >= 0 && b < NQ) model[i][b][l] = 1'b1;
          end
      end
      @(negedge clk);
      compare($sformatf("fill %0d", n));
    end
    fill = 1'b0;
    for (int i = 0; i < NP; i++)
      for (int j = 0; j < NQ; j++) bits_set += $countones(model[i][j]);
    checks++;
    if (bits_set < 50) begin
      failures++;
      $display("FAIL: only %0d layer bits set, test too weak", bits_set);
    end
    // clear wins over fill
    clear = 1'b1;
    fill  = 1'b1;
    hit   = '1;
    @(negedge clk);
    clear = 1'b0;
    fill  = 1'b0;
    model = '{default: '0};
    compare("after clear");
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
