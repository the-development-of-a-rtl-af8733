// fpga_logic: the control logic of the Direct Receiving Card's FPGA.
//
// The FPGA sits between the receiver, the FIFO and the PCI chipset and does
// four things, in the card's own order:
//   1. takes the 4-bit nibbles from the receiver and merges eight of them
//      into a 32-bit word (first nibble into bits 31:28);
//   2. writes each word into the FIFO (the card's "control signal 1" is
//      fifo_wen_o here, with fifo_full_i coming back);
//   3. raises the local interrupt towards the PCI chipset while the FIFO's
//      half-full flag is set;
//   4. turns the PCI chipset's local-bus read request ("control signal 2",
//      lb_rd_i here) into FIFO read strobes and tells the chipset when the
//      word is on the FIFO's output.
// The FIFO's data output goes straight to the PCI chipset, not through
// this block.
//
// What is this design's own choice, the card being described only at the
// level of those four steps:
//   * The nibble side runs on the receiver's nibble clock (nclk_i), the bus
//     side on the chipset's local-bus clock (lclk_i); nothing crosses
//     between them here, the FIFO does the clock crossing.
//   * fifo_wen_o is a one-cycle registered strobe with fifo_wdata_o, one
//     nibble clock after the eighth nibble. A word that meets a full FIFO
//     is lost and sets the sticky overflow_o flag (cleared only by reset).
//   * lint_o is a level interrupt: the half-full flag registered once in
//     lclk_i. It drops when reads take the FIFO below half full.
//   * Local-bus reads use a request/ready handshake, one word per
//     transfer: the chipset raises lb_rd_i and holds it until it sees
//     lb_ready_o; the word on lb_data (the FIFO output) is taken at the
//     rising edge where both are high. The FIFO is read in the first cycle
//     in which lb_rd_i is high, the FIFO is not empty and no ready is being
//     given; lb_ready_o follows one cycle later. A burst therefore moves one
//     word every two local-bus clocks, and while the FIFO is empty the
//     chipset simply waits.
module fpga_logic
  import drc_pkg::*;
(
  // receiver side, nibble clock domain
  input  logic    nclk_i,
  input  logic    nrst_n_i,
  input  nibble_t nib_i,
  // FIFO write side ("control signal 1")
  output logic    fifo_wen_o,
  output word_t   fifo_wdata_o,
  input  logic    fifo_full_i,
  output logic    overflow_o,
  // PCI chipset side, local-bus clock domain
  input  logic    lclk_i,
  input  logic    lrst_n_i,
  input  logic    fifo_half_full_i,
  input  logic    fifo_empty_i,
  output logic    fifo_ren_o,
  input  logic    lb_rd_i,     // "control signal 2": read request from the chipset's DMA
  output logic    lb_ready_o,  // the word requested is on the FIFO output
  output logic    lint_o       // local interrupt to the chipset
);

  // ---------------- steps 1 and 2: nibble merge and FIFO write ----------------
  localparam int unsigned CNT_W = $clog2(NIBS_PER_WORD);

  logic [CNT_W-1:0]          nib_cnt;   // nibbles already held in acc
  logic [WORD_W-NIB_W-1:0]   acc;       // first seven nibbles of the word

  always_ff @(posedge nclk_i or negedge nrst_n_i) begin
    if (!nrst_n_i) begin
      nib_cnt      <= '0;
      acc          <= '0;
      fifo_wen_o   <= 1'b0;
      fifo_wdata_o <= '0;
      overflow_o   <= 1'b0;
    end else begin
      nib_cnt    <= nib_cnt + 1'b1;
      acc        <= {acc[WORD_W-2*NIB_W-1:0], nib_i};
      fifo_wen_o <= (nib_cnt == CNT_W'(NIBS_PER_WORD - 1));
      if (nib_cnt == CNT_W'(NIBS_PER_WORD - 1)) fifo_wdata_o <= {acc, nib_i};
      if (fifo_wen_o && fifo_full_i) overflow_o <= 1'b1;
    end
  end

  // ---------------- steps 3 and 4: interrupt and FIFO read ----------------
  assign fifo_ren_o = lb_rd_i && !fifo_empty_i && !lb_ready_o;

  always_ff @(posedge lclk_i or negedge lrst_n_i) begin
    if (!lrst_n_i) begin
      lb_ready_o <= 1'b0;
      lint_o     <= 1'b0;
    end else begin
      lb_ready_o <= fifo_ren_o;
      lint_o     <= fifo_half_full_i;
    end
  end

  // Handshake rule for the chipset: a request is held until it is served.
  a_request_held: assert property (@(posedge lclk_i) disable iff (!lrst_n_i)
    lb_rd_i && !lb_ready_o |=> lb_rd_i)
    else $error("lb_rd_i dropped before lb_ready_o");

endmodule
