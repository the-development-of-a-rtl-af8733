// tb_drc_fifo: self-checking test of the dual-clock FIFO at a small depth.
//
// Write clock 10 ns, read clock 7 ns. A queue in the testbench models the
// FIFO contents: a word is pushed when the testbench writes while full_o is
// low, and popped when it reads while empty_o is low; every word read must
// match. The flags are checked two ways: at every edge they may only err on
// the safe side (empty_o low only with data stored, full_o low only with
// room, half_full_o high only with at least DEPTH/2 words), and after both
// sides have been idle for a few clocks they must be exact.
module tb_drc_fifo;
  import drc_pkg::*;

  localparam int unsigned DEPTH = 16;

  logic  wclk = 1'b0, rclk = 1'b0, rst_n = 1'b0;
  logic  wen = 1'b0, ren = 1'b0;
  word_t wdata = '0, rdata;
  logic  full, empty, half_full;
  int    checks = 0, failures = 0;
  int    wr_prob = 50, rd_prob = 50;

  drc_fifo #(.DEPTH(DEPTH)) dut (
    .wclk_i(wclk), .wrst_n_i(rst_n), .wen_i(wen), .wdata_i(wdata), .full_o(full),
    .rclk_i(rclk), .rrst_n_i(rst_n), .ren_i(ren), .rdata_o(rdata), .empty_o(empty),
    .half_full_o(half_full));

  always #5   wclk = ~wclk;
  always #3.5 rclk = ~rclk;

  word_t model [$];
  int    pending_check = 0;
  word_t pending_word;
  int    n_written = 0, n_read = 0, n_full_seen = 0, n_hf_seen = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t (model %0d words)", what, $time, model.size()); end
  endtask

  // write side
  always @(posedge wclk) if (rst_n) begin
    check(full || model.size() < DEPTH, "full_o low with FIFO full");
    if (full) n_full_seen++;
    if (wen && !full) begin model.push_back(wdata); n_written++; end
  end
  always @(negedge wclk) begin
    wen   <= rst_n && ($urandom_range(99) < wr_prob);
    wdata <= $urandom;
  end

  // read side
  always @(posedge rclk) if (rst_n) begin
    if (pending_check) begin
      check(rdata == pending_word, "read data");
      pending_check = 0;
    end
    check(empty || model.size() > 0, "empty_o low with FIFO empty");
    check(!half_full || model.size() >= DEPTH/2, "half_full_o high below half");
    if (half_full) n_hf_seen++;
    if (ren && !empty) begin
      pending_word  = model.pop_front();
      pending_check = 1;
      n_read++;
    end
  end
  always @(negedge rclk) ren <= rst_n && ($urandom_range(99) < rd_prob);

  task automatic settle_and_check_flags();
    wr_prob = 0; rd_prob = 0;
    repeat (8) @(posedge wclk);
    check(empty == (model.size() == 0), "settled empty_o");
    check(full == (model.size() == DEPTH), "settled full_o");
    check(half_full == (model.size() >= DEPTH/2), "settled half_full_o");
  endtask

  initial begin
    repeat (4) @(posedge wclk);
    rst_n = 1'b1;
    settle_and_check_flags();
    // fill until full
    wr_prob = 100; rd_prob = 0;
    repeat (DEPTH + 8) @(posedge wclk);
    settle_and_check_flags();
    check(model.size() == DEPTH, "FIFO holds DEPTH words");
    // drain to half
    for (int n = 0; n <= int'(DEPTH); n++) begin
      settle_and_check_flags();
      if (model.size() == 0) break;
      rd_prob = 100;
      @(posedge rclk); @(negedge rclk); rd_prob = 0;
    end
    // random traffic at several mixes
    for (int round = 0; round < 30; round++) begin
      wr_prob = $urandom_range(100); rd_prob = $urandom_range(100);
      repeat (200) @(posedge wclk);
      settle_and_check_flags();
    end
    check(n_full_seen > 0 && n_hf_seen > 0, "full and half-full both reached");
    check(n_read > 500, "enough words moved");
    $display("written %0d read %0d", n_written, n_read);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
