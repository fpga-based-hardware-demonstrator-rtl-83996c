// fifo_flow_ctrl: read and write enables of the four FIFOs of the
// demonstrator chain FromHostFIFO -> FIRST_FIFO -> HT -> SECOND_FIFO ->
// ToHostFIFO, so that no word is lost or copied.
//
// The Wupper FromHostFIFO must be emptied as soon as it holds data, so its
// read enable follows its empty flag; FIRST_FIFO absorbs the words while the
// HT is busy. The rules, all active-high and purely combinational:
//   FromHost_rd_en = !FromHost_empty && !prog_full   (FIRST_FIFO has room)
//   wr_en          = FromHost_dvalid                 (word read last cycle)
//   rd_en          = !empty && !prog_full2 && (HT mode: ht_in_ready)
//   wr_en2         = HT mode: HT_outdata_valid && !prog_full2 (the HT output
//                    handshake); bypass: FIRST_FIFO dvalid
//   ht_out_ready   = !prog_full2
//   rd_en2         = !empty2 && !ToHost_prog_full
//   ToHost_wr_en   = SECOND_FIFO dvalid
// prog_full of FIRST_FIFO and SECOND_FIFO must leave room for the words
// already on their way (one read latency plus the HT output register).
//
// bypass selects the loopback used to commission the FIFO chain without the
// HT: words read from FIRST_FIFO go straight into SECOND_FIFO.
//
// The signal names and the empty/full/prog_full dependencies follow the
// source design's FIFO structure; the bypass switch stands for the switch it
// used to tell HT problems from FIFO problems.
module fifo_flow_ctrl (
  input  logic bypass,
  // Wupper FromHostFIFO
  input  logic fromhost_empty,
  input  logic fromhost_dvalid,
  output logic fromhost_rd_en,
  // FIRST_FIFO
  input  logic prog_full,
  input  logic empty,
  input  logic dvalid,
  output logic wr_en,
  output logic rd_en,
  // HT
  input  logic ht_in_ready,
  input  logic ht_outdata_valid,
  output logic ht_out_ready,
  // SECOND_FIFO
  input  logic prog_full2,
  input  logic empty2,
  input  logic dvalid2,
  output logic wr_en2,
  output logic rd_en2,
  // Wupper ToHostFIFO
  input  logic tohost_prog_full,
  output logic tohost_wr_en
);
  always_comb begin
    fromhost_rd_en = !fromhost_empty && !prog_full;
    wr_en          = fromhost_dvalid;
    rd_en          = !empty && !prog_full2 && (bypass || ht_in_ready);
    ht_out_ready   = !prog_full2;
    wr_en2         = bypass ? dvalid : (ht_outdata_valid && !prog_full2);
    rd_en2         = !empty2 && !tohost_prog_full;
    tohost_wr_en   = dvalid2;
  end
endmodule
