// tb_fifo_flow_ctrl: exhaustive self-checking test of the FIFO chain enables.
//
// All 4096 combinations of the twelve input flags are applied. For each one
// the testbench checks the safety rules of the chain (no read of an empty
// FIFO, no read of FIRST_FIFO or HT output while SECOND_FIFO is nearly full,
// no read of FromHostFIFO while FIRST_FIFO is nearly full, no read of
// SECOND_FIFO while ToHostFIFO is nearly full, HT input taken only when the
// HT is ready or bypassed) and that data moves whenever those rules allow it.
// Also checks that the bypass and HT paths were both exercised with data.
// Prints TB_RESULT.
module tb_fifo_flow_ctrl;
  logic bypass, fromhost_empty, fromhost_dvalid, prog_full, empty, dvalid;
  logic ht_in_ready, ht_outdata_valid, prog_full2, empty2, dvalid2, tohost_prog_full;
  logic fromhost_rd_en, wr_en, rd_en, ht_out_ready, wr_en2, rd_en2, tohost_wr_en;
  int checks = 0, failures = 0, n_bypass = 0, n_ht = 0;

  fifo_flow_ctrl dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    for (int v = 0; v < 4096; v++) begin
      {bypass, fromhost_empty, fromhost_dvalid, prog_full, empty, dvalid,
       ht_in_ready, ht_outdata_valid, prog_full2, empty2, dvalid2, tohost_prog_full} = 12'(v);
      #1;
      check(fromhost_rd_en == (!fromhost_empty && !prog_full), $sformatf("fromhost_rd_en %h", v));
      check(wr_en == fromhost_dvalid, $sformatf("wr_en %h", v));
      check(rd_en == (!empty && !prog_full2 && (bypass || ht_in_ready)), $sformatf("rd_en %h", v));
      check(ht_out_ready == !prog_full2, $sformatf("ht_out_ready %h", v));
      check(wr_en2 == (bypass ? dvalid : (ht_outdata_valid && !prog_full2)), $sformatf("wr_en2 %h", v));
      check(rd_en2 == (!empty2 && !tohost_prog_full), $sformatf("rd_en2 %h", v));
      check(tohost_wr_en == dvalid2, $sformatf("tohost_wr_en %h", v));
      if (bypass && wr_en2) n_bypass++;
      if (!bypass && wr_en2) n_ht++;
    end
    check(n_bypass > 0 && n_ht > 0, "both paths exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
