// drc_fifo: the card's 32-bit FIFO with a half-full flag.
//
// The FIFO decouples the receive side, clocked by the nibble clock derived
// from the demodulator's bit clock, from the PCI chipset's local-bus clock.
// The FPGA writes one 32-bit word per write strobe; the PCI chipset's DMA
// reads it out. The half-full flag is what triggers the host's local
// interrupt, so the host moves data in blocks of DEPTH/2 words.
//
// The card uses a commercial high-density FIFO part; its depth is not given
// and this model defaults to 16K words. The implementation is this design's
// own: a dual-clock RAM with Gray-coded read and write pointers, each passed
// to the other clock domain through a two-flop synchronizer.
//
// Interface and timing:
//   write side (wclk_i): wen_i with wdata_i writes one word on a rising edge
//     unless full_o is set, in which case the word is ignored. full_o is
//     pessimistic: it clears two write clocks after a read made room.
//   read side (rclk_i): ren_i reads one word unless empty_o is set; the word
//     appears on rdata_o after that rising edge and is held until the next
//     read (first-word-through timing of a registered-output FIFO part).
//     empty_o and half_full_o are computed in the read domain from the
//     synchronised write pointer, so they lag writes by two read clocks and
//     never claim more words than are really stored: after half_full_o is
//     seen, DEPTH/2 words can be read without the FIFO running empty.
//   DEPTH must be a power of two, at least 4.
module drc_fifo
  import drc_pkg::*;
#(
  parameter int unsigned DEPTH = FIFO_DEPTH_DEFAULT
) (
  // write side
  input  logic  wclk_i,
  input  logic  wrst_n_i,
  input  logic  wen_i,
  input  word_t wdata_i,
  output logic  full_o,
  // read side
  input  logic  rclk_i,
  input  logic  rrst_n_i,
  input  logic  ren_i,
  output word_t rdata_o,
  output logic  empty_o,
  output logic  half_full_o
);

  localparam int unsigned AW = $clog2(DEPTH);
  typedef logic [AW:0] ptr_t;   // one extra bit tells full from empty

  word_t mem [DEPTH];

  ptr_t wbin, wgray;          // write pointer, binary and Gray
  ptr_t rbin, rgray;          // read pointer, binary and Gray
  ptr_t rgray_w1, rgray_w2;   // read pointer synchronised to the write clock
  ptr_t wgray_r1, wgray_r2;   // write pointer synchronised to the read clock
  ptr_t wcount, rcount;       // fill level as each side sees it

  function automatic ptr_t bin2gray(ptr_t b);
    return b ^ (b >> 1);
  endfunction

  function automatic ptr_t gray2bin(ptr_t g);
    ptr_t b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write domain ----------------
  always_ff @(posedge wclk_i or negedge wrst_n_i) begin
    if (!wrst_n_i) begin
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  assign wcount = wbin - gray2bin(rgray_w2);
  assign full_o = (wcount == ptr_t'(DEPTH));

  always_ff @(posedge wclk_i or negedge wrst_n_i) begin
    if (!wrst_n_i) begin
      wbin  <= '0;
      wgray <= '0;
    end else if (wen_i && !full_o) begin
      wbin  <= wbin + 1'b1;
      wgray <= bin2gray(wbin + 1'b1);
    end
  end

  always_ff @(posedge wclk_i) begin
    if (wen_i && !full_o) mem[wbin[AW-1:0]] <= wdata_i;
  end

  // ---------------- read domain ----------------
  always_ff @(posedge rclk_i or negedge rrst_n_i) begin
    if (!rrst_n_i) begin
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

  assign rcount      = gray2bin(wgray_r2) - rbin;
  assign empty_o     = (rcount == '0);
  assign half_full_o = (rcount >= ptr_t'(DEPTH / 2));

  always_ff @(posedge rclk_i or negedge rrst_n_i) begin
    if (!rrst_n_i) begin
      rbin      <= '0;
      rgray <= '0;
    end else if (ren_i && !empty_o) begin
      rbin      <= rbin + 1'b1;
      rgray <= bin2gray(rbin + 1'b1);
    end
  end

  always_ff @(posedge rclk_i) begin
    if (ren_i && !empty_o) rdata_o <= mem[rbin[AW-1:0]];
  end

endmodule
