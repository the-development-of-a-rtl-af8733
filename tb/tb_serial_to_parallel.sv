// tb_serial_to_parallel: self-checking test of the receiver's
// serial-to-parallel stage.
//
// Drives random bits on the falling edge of the bit clock, records every bit
// the stage samples, and at every rising edge of the nibble clock checks
// that the nibble on nib_o is the next group of four recorded bits, first
// bit in bit 3. It also checks the timing: the k-th rising edge of nclk_o
// (k from 0) must come exactly on bit-clock edge 4k+6 after reset, and
// nclk_o must stay low until the first nibble exists.
module tb_serial_to_parallel;
  import drc_pkg::*;

  logic    sclk = 1'b0, rst_n = 1'b0, sdata = 1'b0;
  nibble_t nib;
  logic    nclk;
  int      checks = 0, failures = 0;

  serial_to_parallel dut (.sclk_i(sclk), .rst_n_i(rst_n), .sdata_i(sdata), .nib_o(nib), .nclk_o(nclk));

  always #5 sclk = ~sclk;

  logic bits [$];
  int   edges = 0;     // bit-clock edges since reset
  int   nrise = 0;     // nibble clock rising edges seen

  always @(posedge sclk) if (rst_n) begin
    bits.push_back(sdata);
    edges++;
  end

  always @(negedge sclk) sdata <= 1'($urandom);

  always @(posedge nclk) begin
    nibble_t exp_nib;
    for (int i = 0; i < 4; i++) exp_nib[3-i] = bits[4*nrise + i];
    checks++;
    if (nib !== exp_nib) begin
      failures++;
      $display("FAIL nibble %0d: got %h expected %h", nrise, nib, exp_nib);
    end
    checks++;
    if (edges != 4*nrise + 6) begin
      failures++;
      $display("FAIL nibble %0d: nclk rose on bit edge %0d, expected %0d", nrise, edges, 4*nrise + 6);
    end
    nrise++;
  end

  initial begin
    repeat (3) @(negedge sclk);
    rst_n = 1'b1;
    // nclk stays low through the first nibble
    repeat (5) begin
      @(negedge sclk);
      checks++;
      if (nclk !== 1'b0) begin failures++; $display("FAIL nclk high before first nibble"); end
    end
    repeat (4000) @(negedge sclk);
    // reset in the middle of the stream restarts the nibble grid
    rst_n = 1'b0;
    @(negedge sclk);
    checks++;
    if (nclk !== 1'b0 || nib !== '0) begin failures++; $display("FAIL reset did not clear outputs"); end
    checks++;
    if (nrise < 990) begin failures++; $display("FAIL only %0d nibbles", nrise); end
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
