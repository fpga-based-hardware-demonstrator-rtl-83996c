# Hough Transform road finder demonstrator (SystemVerilog)

This is a SystemVerilog model of the FPGA demonstrator for a Hough Transform
(HT) track-pattern search for the ATLAS Phase-II trigger. Events of strip
clusters come in from the host through a FIFO chain. The HT fills a
phi0 x qA/pT accumulator, finds roads and sends the roads and their clusters
back to the host.

## Data path
`FromHostFIFO -> FIRST_FIFO -> HT core -> SECOND_FIFO -> ToHostFIFO`

- `dual_clock_fifo`: FIRST_FIFO and SECOND_FIFO. Each is a dual-clock FIFO
  with Gray-code pointers, so the HT clock (50 or 250 MHz) can differ from
  the PCIe-side clock.
- `fifo_flow_ctrl`: builds the read and write enables from the empty,
  prog_full and valid flags. `bypass` loops FIRST_FIFO straight into
  SECOND_FIFO, which lets the FIFOs be tested without the HT.
- `ht_core`: runs one event at a time.
  1. `input_bit_mapper` unpacks the 256-bit words. Each word holds eight
     32-bit slots in the order 1,0,3,2,5,4,7,6. A slot holds r in 12 bits and
     phi in 16 bits. Bit 255 marks start, bit 223 marks end and bit 240
     marks valid.
  2. `ht_accumulator` (1200 x 64 bins, one bit per layer per bin) takes 8
     clusters per clock.
  3. `ht_cluster_store` keeps up to 512 clusters per layer.
  4. `ht_road_finder` applies the 8/7/6 five-bin rule along phi0.
  5. `ht_back_search` uses up to 16 lanes. It re-runs the Hough formula over
     the stored clusters to find the clusters of each road.
  6. Outputs are road words (tag A), cluster words (tag C, an 18-bit
     {layer, index} per lane, 3ffff when empty) and an end-of-event word
     (tag E).
- `ht_demonstrator_top`: wires all of the above together.

## Design choices not fixed by the source
These were not given by the source and were chosen here:
- fixed-point scaling of r, phi and qA/pT;
- the bin width and offset of phi0;
- the output word formats;
- FIFO depth and thresholds;
- handling of the histogram edges;
- the order in which roads are extracted.

## Not done
- The PCIe engine (Wupper), clock generation and the logic analyser are
  vendor or board IP. They are not modelled; clocks and the host FIFO
  interfaces are top-level ports.
- The 175 ns latency target is not met. After the end word, roads leave at
  one per clock, and the back-search takes one clock per stored cluster.
- `ht_core` and the top have no testbench of their own.
  There is no end-to-end testbench and no full-size testbench. The
  sub-blocks are tested at reduced sizes.
- At full size (1200 x 64) the road finder and accumulator are very large.
  Some elaboration tools take several minutes on them.

## Tests
Each tested block has `tb/tb_<block>.sv`. Each one checks itself and prints
`TB_RESULT checks=N failures=M`.
