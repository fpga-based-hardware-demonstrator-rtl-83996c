// dual_clock_fifo: first-in first-out buffer with independent write and read
// clocks, used for FIRST_FIFO (Wupper clock in, HT clock out) and SECOND_FIFO
// (HT clock in, Wupper clock out) of the demonstrator.
//
// The buffer is a DEPTH-entry array with binary pointers; each pointer is
// also kept in Gray code and passed to the other clock domain through two
// flip-flops, so full and prog_full are computed in the write domain and
// empty in the read domain, both conservatively (a flag may stay set a few
// cycles after the other side moved, never too short).
//
// Interface, active-high flags as in the source design: wr_en writes din on
// a wr_clk edge unless full; rd_en reads on an rd_clk edge unless empty, and
// the word appears on dout with valid high one rd_clk cycle later (standard
// read, not first-word fall-through). prog_full is high when PROG_FULL or
// more words are stored (as seen from the write side). A write into a full
// FIFO or a read from an empty one is ignored and flagged by the assertions.
//
// The source design uses vendor FIFO cores for these buffers and names the
// flags empty, full, prog_full, wr_en and rd_en; width and depth are not
// given, so DEPTH and PROG_FULL are this design's choices. rst_n is an
// asynchronous, active-low reset for both domains.
module dual_clock_fifo #(
  parameter int unsigned WIDTH     = 256,
  parameter int unsigned DEPTH     = 512,
  parameter int unsigned PROG_FULL = 480
) (
  input  logic             rst_n,
  // write side
  input  logic             wr_clk,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] din,
  output logic             full,
  output logic             prog_full,
  // read side
  input  logic             rd_clk,
  input  logic             rd_en,
  output logic [WIDTH-1:0] dout,
  output logic             valid,
  output logic             empty
);
  localparam int unsigned AW = $clog2(DEPTH);
  typedef logic [AW:0] ptr_t;

  logic [WIDTH-1:0] mem [DEPTH];

  ptr_t wbin, wgray, rbin, rgray;
  ptr_t rgray_w1, rgray_w2;   // read pointer in write domain
  ptr_t wgray_r1, wgray_r2;   // write pointer in read domain

  function automatic ptr_t bin2gray(input ptr_t b);
    return b ^ (b >> 1);
  endfunction

  function automatic ptr_t gray2bin(input ptr_t g);
    ptr_t b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write domain ----------------
  ptr_t rbin_w, wcount;
  logic do_write;
  assign rbin_w    = gray2bin(rgray_w2);
  assign wcount    = wbin - rbin_w;
  assign full      = (wcount == ptr_t'(DEPTH));
  assign prog_full = (wcount >= ptr_t'(PROG_FULL));
  assign do_write  = wr_en && !full;

  always_ff @(posedge wr_clk or negedge rst_n) begin
    if (!rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (do_write) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  always_ff @(posedge wr_clk) begin
    if (do_write) mem[wbin[AW-1:0]] <= din;
  end

  // ---------------- read domain ----------------
  logic do_read;
  assign empty   = (rgray == wgray_r2);
  assign do_read = rd_en && !empty;

  always_ff @(posedge rd_clk or negedge rst_n) begin
    if (!rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
      valid    <= 1'b0;
      dout     <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      valid    <= do_read;
      if (do_read) begin
        dout  <= mem[rbin[AW-1:0]];
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  // A correct datastream neither copies nor loses words.
  a_no_overflow:  assert property (@(posedge wr_clk) disable iff (!rst_n) !(wr_en && full))
    else $error("dual_clock_fifo: write while full");
  a_no_underflow: assert property (@(posedge rd_clk) disable iff (!rst_n) !(rd_en && empty))
    else $error("dual_clock_fifo: read while empty");

  initial begin
    if ((1 << AW) != DEPTH) $error("dual_clock_fifo: DEPTH must be a power of two");
    if (PROG_FULL > DEPTH) $error("dual_clock_fifo: PROG_FULL above DEPTH");
  end
endmodule
