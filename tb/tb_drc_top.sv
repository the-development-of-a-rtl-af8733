// tb_drc_top: end-to-end test of the Direct Receiving Card at its default
// size (16K-word FIFO), with a behavioural model of the PCI chipset's
// local-bus DMA.
//
// Stream: a 25 Mbit/s serial stream (40 ns bit clock) cut into 74256-bit
// telemetry frames, each starting with a 64-bit marker followed by random
// bits. The frame length is not a multiple of 32, so frames start at every
// other half-word: the card must pass the bits through untouched, with no
// alignment. A monitor records every bit the card samples and packs them
// into the 32-bit words the host should receive.
// Host model (33 MHz local bus, 30 ns): waits for the local interrupt, lets
// an interrupt latency pass, then DMA-reads DEPTH/2 words with the card's
// request/ready handshake and compares each word with the recorded stream.
//
// Phases, each one a mechanism of the card that must happen:
//   A  normal operation: interrupts at half full, DMA bursts of DEPTH/2
//      words; the fill level at each interrupt is checked (DEPTH/2, plus at
//      most two words in flight);
//   B  a burst started on a nearly empty FIFO: reads wait for the FIFO to
//      fill (empty wait states) and still deliver the stream in order;
//   C  the host stops reading: the FIFO fills, overflow_o is set, and the
//      DEPTH words held are still the right ones.
module tb_drc_top;
  import drc_pkg::*;

  localparam int unsigned DEPTH     = FIFO_DEPTH_DEFAULT;
  localparam int unsigned FRAME_LEN = 74256;              // bits per telemetry frame
  localparam logic [63:0] MARKER    = 64'hF0E1_D2C3_B4A5_9687;
  localparam int unsigned IRQ_LATENCY = 100;              // local-bus cycles
  localparam int unsigned N_IRQ_A   = 4;

  logic  sclk = 1'b0, sdata = 1'b0, rst_n = 1'b1, lclk = 1'b0;
  logic  lb_rd = 1'b0, lb_ready, lint, overflow;
  word_t lb_data;
  int    checks = 0, failures = 0;

  drc_top dut (
    .sclk_i(sclk), .sdata_i(sdata), .rst_n_i(rst_n), .lclk_i(lclk),
    .lb_rd_i(lb_rd), .lb_ready_o(lb_ready), .lb_data_o(lb_data),
    .lint_o(lint), .overflow_o(overflow));

  always #20 sclk = ~sclk;
  always #15 lclk = ~lclk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- stream source and monitor ----------------
  int unsigned frame_pos = 0, frames = 0, frames_unaligned = 0;
  always @(negedge sclk) begin
    if (frame_pos < 64) sdata <= MARKER[63 - frame_pos];
    else                sdata <= 1'($urandom);
    if (frame_pos == 0) begin
      frames++;
      if (bits_sampled % 32 != 0) frames_unaligned++;
    end
    frame_pos = (frame_pos == FRAME_LEN - 1) ? 0 : frame_pos + 1;
  end

  word_t       expected [$];   // words the host should receive, in order
  word_t       shifter;
  int unsigned bits_sampled = 0;
  always @(posedge sclk) if (rst_n) begin
    shifter = {shifter[30:0], sdata};
    bits_sampled++;
    if (bits_sampled % 32 == 0) expected.push_back(shifter);
  end

  // ---------------- host DMA model ----------------
  int unsigned words_read = 0, words_compared = 0;
  int unsigned irqs = 0, bursts = 0, empty_waits = 0, lint_rises = 0;
  bit          compare_on = 1;

  // one DMA burst of n words with the request/ready handshake
  task automatic dma_burst(int unsigned n);
    int unsigned got = 0, idle = 0;
    @(negedge lclk) lb_rd = 1'b1;
    while (got < n) begin
      @(posedge lclk);
      if (lb_ready) begin
        if (compare_on) begin
          if (lb_data != expected[words_read] && failures < 5) $display("word %0d got %h exp %h (next %h)", words_read, lb_data, expected[words_read], expected[words_read+1]);
          check(lb_data == expected[words_read], "word delivered to host");
          words_compared++;
        end
        words_read++;
        got++;
        if (got == n) @(negedge lclk) lb_rd = 1'b0;
      end else begin
        idle++;
      end
    end
    // a word needs one request cycle and one ready cycle; the rest waited on an empty FIFO
    if (idle > n) empty_waits += idle - n;
    bursts++;
  endtask

  // fill level when the interrupt rises: DEPTH/2 plus what is in flight
  logic        lint_q = 1'b0;
  int unsigned level;
  always @(posedge lclk) begin
    if (lint && !lint_q) begin
      level = expected.size() - words_read;
      lint_rises++;
      if (level < DEPTH/2 || level > DEPTH/2 + 2) $display("level %0d at interrupt", level);
      check(level >= DEPTH/2 && level <= DEPTH/2 + 2, "fill level at interrupt");
    end
    lint_q <= lint;
  end

  // ---------------- sequence ----------------
  initial begin
    #1 rst_n = 1'b0;   // an edge, so that the asynchronous resets take effect
    repeat (4) @(posedge lclk);
    @(negedge sclk) rst_n = 1'b1;

    // A: interrupt-driven transfers
    repeat (N_IRQ_A) begin
      do @(posedge lclk); while (!lint);
      irqs++;
      repeat (IRQ_LATENCY) @(posedge lclk);
      dma_burst(DEPTH / 2);
    end
    check(!overflow, "no overflow while the host keeps up");
    check(empty_waits == 0, "bursts after an interrupt move one word per two clocks");

    // B: burst on a nearly empty FIFO
    check(!lint, "FIFO below half full after the bursts");
    begin
      int unsigned waits_before = empty_waits;
      dma_burst(DEPTH / 2);
      check(empty_waits > waits_before, "reads waited on an empty FIFO");
    end
    check(!overflow, "no overflow after phase B");

    // C: host stops reading until the FIFO overflows
    fork
      begin
        do @(posedge sclk); while (!overflow);
      end
      begin
        #(64'd40 * 32 * (DEPTH + 64));
        check(0, "overflow_o never set");
      end
    join_any
    disable fork;
    check(overflow, "overflow flag");
    // the FIFO holds exactly the DEPTH words that followed the last read
    dma_burst(DEPTH);
    check(overflow, "overflow flag is sticky");

    check(frames_unaligned > 0, "frames started off a word boundary");
    $display("frames %0d (unaligned %0d), interrupts %0d, interrupt rises %0d, bursts %0d, empty waits %0d, words compared %0d, overflow %0d",
             frames, frames_unaligned, irqs, lint_rises, bursts, empty_waits, words_compared, overflow);
    check(irqs == N_IRQ_A && lint_rises >= N_IRQ_A, "interrupts happened");
    check(words_compared == (N_IRQ_A + 1) * DEPTH / 2 + DEPTH, "all words compared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd200_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
