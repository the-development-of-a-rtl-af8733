// tb_fpga_logic: self-checking test of the FPGA control logic.
//
// Nibble side (nibble clock 40 ns): random nibbles are driven on the falling
// edge; every eighth sampled nibble completes a word, and the testbench
// expects exactly one fifo_wen_o strobe, on the next nibble-clock cycle, with
// the eight nibbles first-to-last in bits 31..0. Holding fifo_full_i high
// must set overflow_o, which must stay set.
// Local-bus side (15 ns): random lb_rd_i, fifo_empty_i and
// fifo_half_full_i; fifo_ren_o must be lb_rd_i and not empty in the same
// cycle with no ready being given, lb_ready_o must repeat fifo_ren_o one
// cycle later, and lint_o must repeat the half-full flag one cycle later.
// The random lb_rd_i keeps the handshake rule: a request that has not yet
// seen lb_ready_o is held.
module tb_fpga_logic;
  import drc_pkg::*;

  logic    nclk = 1'b0, lclk = 1'b0, rst_n = 1'b0;
  nibble_t nib = '0;
  logic    fifo_wen, fifo_full = 1'b0, overflow;
  word_t   fifo_wdata;
  logic    hf = 1'b0, empty = 1'b1, ren, lb_rd = 1'b0, lb_ready, lint;
  int      checks = 0, failures = 0;

  fpga_logic dut (
    .nclk_i(nclk), .nrst_n_i(rst_n), .nib_i(nib),
    .fifo_wen_o(fifo_wen), .fifo_wdata_o(fifo_wdata), .fifo_full_i(fifo_full), .overflow_o(overflow),
    .lclk_i(lclk), .lrst_n_i(rst_n), .fifo_half_full_i(hf), .fifo_empty_i(empty),
    .fifo_ren_o(ren), .lb_rd_i(lb_rd), .lb_ready_o(lb_ready), .lint_o(lint));

  always #20  nclk = ~nclk;
  always #7.5 lclk = ~lclk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---- nibble side ----
  nibble_t nibs [$];
  int      words_seen = 0;
  bit      full_was_hit = 0;

  always @(posedge nclk) if (rst_n) begin
    // outputs seen here were set on the previous edge
    if (fifo_wen) begin
      word_t exp_w;
      for (int i = 0; i < 8; i++) exp_w[31-4*i -: 4] = nibs[8*words_seen + i];
      check(nibs.size() == 8*(words_seen + 1), "write strobe one cycle after the eighth nibble");
      check(fifo_wdata == exp_w, "merged word");
      words_seen++;
      if (fifo_full) full_was_hit = 1;
    end else begin
      check(nibs.size() != 8*(words_seen + 1) || nibs.size() == 0, "missing write strobe");
    end
    check(overflow == full_was_hit || (full_was_hit && !overflow && fifo_wen), "overflow flag");
    nibs.push_back(nib);
  end
  always @(negedge nclk) nib <= 4'($urandom);

  // ---- local-bus side ----
  logic prev_ren = 0, prev_hf = 0;
  always @(posedge lclk) if (rst_n) begin
    check(ren == (lb_rd && !empty && !lb_ready), "fifo read strobe");
    check(lb_ready == prev_ren, "ready one cycle after read");
    check(lint == prev_hf, "interrupt follows half full");
    prev_ren = ren;
    prev_hf  = hf;
  end
  int n_ready = 0;
  bit hold = 0;
  always @(posedge lclk) begin
    if (lb_ready) n_ready++;
    hold = lb_rd && !lb_ready;   // request not yet served at this edge
  end
  always @(negedge lclk) begin
    if (!hold) lb_rd <= 1'($urandom);
    empty <= ($urandom_range(3) == 0);
    if ($urandom_range(15) == 0) hf <= ~hf;
  end

  initial begin
    repeat (3) @(posedge nclk);
    @(negedge nclk) rst_n = 1'b1;
    repeat (400) @(posedge nclk);
    check(words_seen >= 49 && overflow == 1'b0, "words written, no overflow yet");
    // FIFO full for a while: words written then are lost
    @(negedge nclk) fifo_full = 1'b1;
    repeat (20) @(posedge nclk);
    @(negedge nclk) fifo_full = 1'b0;
    repeat (40) @(posedge nclk);
    check(overflow == 1'b1, "overflow stays set");
    check(n_ready > 50, "reads were served");
    $display("words %0d", words_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
