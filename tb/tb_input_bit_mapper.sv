// tb_input_bit_mapper: self-checking test of the 256-bit word to cluster
// mapping.
//
// Builds words slot by slot from an independent table of slot positions
// (layer 1 at bits 255:224, layer 0 at 223:192, ... layer 6 at 31:0), with
// random r and phi and some empty slots, and checks the registered outputs
// one clock later. Also checks the start and end words and that nothing is
// flagged while in_valid is low. Prints TB_RESULT.
module tb_input_bit_mapper;
  import ht_pkg::*;

  logic                clk = 1'b0, rst_n = 1'b0;
  logic                in_valid = 1'b0;
  logic [WORD_W-1:0]   in_word = '0;
  logic                event_start, event_end, event_valid;
  logic [N_LAYERS-1:0] hit;
  cluster_t            cl [N_LAYERS];

  int checks = 0, failures = 0;
  // layer held by each 32-bit slot, slot 7 (bits 255:224) first
  int unsigned layer_of_slot [8] = '{6, 7, 4, 5, 2, 3, 0, 1};

  input_bit_mapper dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // start word
    @(negedge clk);
    in_valid = 1'b1;
    in_word  = '0;
    in_word[255] = 1'b1;
    @(negedge clk);
    check(event_start && !event_end && !event_valid && hit == '0, "start word");
    // data words
    for (int n = 0; n < 50; n++) begin
      logic [11:0] r [N_LAYERS];
      logic [15:0] p [N_LAYERS];
      in_word = '0;
      for (int s = 0; s < 8; s++) begin
        int unsigned l;
        l = layer_of_slot[s];
        r[l] = ($urandom_range(0, 4) == 0) ? 12'd0 : 12'($urandom_range(1, 4095));
        p[l] = 16'($urandom);
        in_word[32*s +: 32] = {r[l], 4'($urandom), p[l]};
      end
      in_word[240] = 1'b1;
      @(negedge clk);
      check(event_valid && !event_start && !event_end, "valid word flags");
      for (int l = 0; l < N_LAYERS; l++) begin
        check(cl[l].r == r[l] && cl[l].phi == p[l] && hit[l] == (r[l] != 0),
              $sformatf("word %0d layer %0d: r %h phi %h hit %b, expected %h %h", n, l,
                        cl[l].r, cl[l].phi, hit[l], r[l], p[l]));
      end
    end
    // end word
    in_word = '0;
    in_word[223] = 1'b1;
    @(negedge clk);
    check(event_end && !event_start && !event_valid, "end word");
    // in_valid low
    in_valid = 1'b0;
    in_word  = '1;
    @(negedge clk);
    check(!event_end && !event_start && !event_valid && hit == '0, "idle when in_valid low");
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
