// ht_demonstrator_top: FPGA demonstrator that passes test-vector words from
// a host through the Hough-transform track finder and back to the host.
//
// Data path (all words 256 bits):
//   FromHostFIFO (PCIe DMA core, outside) -> FIRST_FIFO -> ht_core
//     -> SECOND_FIFO -> ToHostFIFO (PCIe DMA core, outside)
// The PCIe DMA core empties its FromHostFIFO as soon as a word is there and
// cannot wait for the track finder, which stops taking input while it
// searches roads; FIRST_FIFO absorbs the words meanwhile. SECOND_FIFO buffers
// the track finder's output until the ToHostFIFO has room. fifo_flow_ctrl
// derives every read and write enable from the empty, prog_full and valid
// flags so that no word is lost or copied.
//
// Clocks: clk_wupper (250 MHz in the source design) runs the PCIe-side FIFO
// ports; clk_ht runs the track finder, the read port of FIRST_FIFO and the
// write port of SECOND_FIFO (the source design ran it at 50 MHz and at 250
// MHz). rst_n is an asynchronous active-low reset for both.
//
// Ports towards the PCIe DMA core: fromhost_rd_en reads a word, which comes
// back on fromhost_dout with fromhost_dvalid one clk_wupper cycle later;
// tohost_wr_en writes tohost_din. bypass = 1 turns the chain into a plain
// loopback (FIRST_FIFO straight into SECOND_FIFO), as used to commission the
// FIFOs. ht_valid, ht_outdata_valid, road_on and cl_data_out are brought out
// for observation, as probed on the hardware.
//
// The chain, the FIFO names and the flags follow the source design; the FIFO
// depths and thresholds are this design's choice.
module ht_demonstrator_top
  import ht_pkg::*;
#(
  parameter int unsigned N_PHI0      = 1200,
  parameter int unsigned N_QPT       = 64,
  parameter int unsigned PHI0_BIN_W  = 32,
  parameter int unsigned PHI0_OFFSET = 13568,
  parameter int unsigned QPT_SHIFT   = 18,
  parameter int unsigned N_LANES     = 16,
  parameter int unsigned MAX_CL      = 512,
  parameter int unsigned FIFO_DEPTH  = 512,
  parameter int unsigned FIFO_PROG   = 480
) (
  input  logic                clk_wupper,
  input  logic                clk_ht,
  input  logic                rst_n,
  input  logic                bypass,
  // PCIe DMA core, host to FPGA
  input  logic                fromhost_empty,
  output logic                fromhost_rd_en,
  input  logic                fromhost_dvalid,
  input  logic [WORD_W-1:0]   fromhost_dout,
  // PCIe DMA core, FPGA to host
  input  logic                tohost_prog_full,
  output logic                tohost_wr_en,
  output logic [WORD_W-1:0]   tohost_din,
  // observation
  output logic                ht_valid,
  output logic                ht_outdata_valid,
  output logic [N_LANES-1:0]  road_on,
  output logic [CL_OUT_W-1:0] cl_data_out [N_LANES],
  output logic                first_empty,
  output logic                second_empty
);
  logic              wr_en, rd_en, prog_full, full, dvalid;
  logic              wr_en2, rd_en2, prog_full2, full2, dvalid2;
  logic [WORD_W-1:0] dout, din2, ht_dout;
  logic              ht_in_ready, ht_out_ready, ht_busy;

  dual_clock_fifo #(.WIDTH(WORD_W), .DEPTH(FIFO_DEPTH), .PROG_FULL(FIFO_PROG)) u_first_fifo (
    .rst_n,
    .wr_clk(clk_wupper), .wr_en, .din(fromhost_dout), .full, .prog_full,
    .rd_clk(clk_ht), .rd_en, .dout, .valid(dvalid), .empty(first_empty)
  );

  ht_core #(
    .N_PHI0(N_PHI0), .N_QPT(N_QPT), .PHI0_BIN_W(PHI0_BIN_W), .PHI0_OFFSET(PHI0_OFFSET),
    .QPT_SHIFT(QPT_SHIFT), .N_LANES(N_LANES), .MAX_CL(MAX_CL)
  ) u_ht (
    .clk(clk_ht), .rst_n,
    .in_valid(dvalid && !bypass), .in_word(dout), .in_ready(ht_in_ready), .ht_valid,
    .out_valid(ht_outdata_valid), .out_word(ht_dout), .out_ready(ht_out_ready),
    .road_on, .cl_data_out, .busy(ht_busy)
  );

  assign din2 = bypass ? dout : ht_dout;

  dual_clock_fifo #(.WIDTH(WORD_W), .DEPTH(FIFO_DEPTH), .PROG_FULL(FIFO_PROG)) u_second_fifo (
    .rst_n,
    .wr_clk(clk_ht), .wr_en(wr_en2), .din(din2), .full(full2), .prog_full(prog_full2),
    .rd_clk(clk_wupper), .rd_en(rd_en2), .dout(tohost_din), .valid(dvalid2), .empty(second_empty)
  );

  fifo_flow_ctrl u_ctrl (
    .bypass,
    .fromhost_empty, .fromhost_dvalid, .fromhost_rd_en,
    .prog_full, .empty(first_empty), .dvalid, .wr_en, .rd_en,
    .ht_in_ready, .ht_outdata_valid, .ht_out_ready,
    .prog_full2, .empty2(second_empty), .dvalid2, .wr_en2, .rd_en2,
    .tohost_prog_full, .tohost_wr_en
  );
endmodule
