// tb_dual_clock_fifo: self-checking test of dual_clock_fifo with unrelated
// write and read clocks (4 ns and 7 ns periods).
//
// A writer pushes a counting sequence with random pauses, never while full;
// a reader pops with random pauses, never while empty, and compares every
// word with a reference queue. A second phase stops the reader until
// prog_full and full rise, checks the stored count against the flags, then
// drains the FIFO and checks that empty comes back. Prints TB_RESULT.
module tb_dual_clock_fifo;
  localparam int unsigned WIDTH = 32;
  localparam int unsigned DEPTH = 16;
  localparam int unsigned PROG  = 12;

  logic             rst_n = 1'b0;
  logic             wr_clk = 1'b0, rd_clk = 1'b0;
  logic             wr_req = 1'b0, wr_en, rd_en = 1'b0;
  logic [WIDTH-1:0] din = '0, dout;
  logic             full, prog_full, valid, empty;

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] ref_q [$];
  int n_written = 0, n_read = 0;
  bit  reader_on = 1'b1, writer_on = 1'b1;

  dual_clock_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH), .PROG_FULL(PROG)) dut (.*);

  assign wr_en = wr_req && !full;

  always #2 wr_clk = ~wr_clk;
  always #3.5 rd_clk = ~rd_clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // writer
  always @(posedge wr_clk) begin
    if (rst_n) begin
      if (wr_en && !full) begin
        ref_q.push_back(din);
        n_written++;
      end
      wr_req <= writer_on && ($urandom_range(0, 3) != 0) && n_written < 400;
      if (wr_en && !full) din <= din + 1;
    end
  end

  // reader
  always @(posedge rd_clk) begin
    if (rst_n) begin
      if (valid) begin
        logic [WIDTH-1:0] exp;
        exp = ref_q.pop_front();
        check(dout == exp, $sformatf("read %0h expected %0h", dout, exp));
        n_read++;
      end
      rd_en <= 1'b0;
      if (reader_on && !empty && !(rd_en) && ($urandom_range(0, 2) != 0)) rd_en <= 1'b1;
    end
  end

  initial begin
    int guard;
    #20 rst_n = 1'b1;
    // phase 1: concurrent traffic
    guard = 0;
    while (n_read < 400 && guard < 20000) begin
      @(posedge rd_clk);
      guard++;
    end
    check(n_read == 400, $sformatf("phase 1 read %0d of 400 words", n_read));
    // phase 2: fill to full
    reader_on = 1'b0;
    n_written = 0;
    repeat (100) @(posedge wr_clk);
    check(full, "full after stopping the reader");
    check(prog_full, "prog_full after stopping the reader");
    check(ref_q.size() == DEPTH, $sformatf("stored %0d words, expected %0d", ref_q.size(), DEPTH));
    writer_on = 1'b0;
    reader_on = 1'b1;
    repeat (200) @(posedge rd_clk);
    check(empty, "empty after draining");
    check(ref_q.size() == 0, "reference queue drained");
    repeat (10) @(posedge wr_clk);
    check(!prog_full && !full, "prog_full and full fall after draining");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
