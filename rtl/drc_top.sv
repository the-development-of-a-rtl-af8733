// drc_top: the Direct Receiving Card (DRC), from demodulator cable to PCI
// chipset local bus.
//
// The card does no processing of the satellite data: it only turns the
// demodulator's serial bit stream into 32-bit words and hands them, in
// blocks, to the host PC, where software frame-synchronises, descrambles
// and displays them. The data path is
//   serial_to_parallel  (receiver: 1 bit -> 4-bit nibble, clock / 4)
//   fpga_logic          (8 nibbles -> 32-bit word, FIFO write strobe)
//   drc_fifo            (32-bit FIFO, half-full flag)
//   PCI chipset         (not part of this RTL: its local-bus DMA reads the
//                        FIFO through fpga_logic after the local interrupt)
// The line receiver and ECL-to-TTL level shifting in front of the
// serial-to-parallel stage are analog and not modelled.
//
// Interface:
//   sclk_i, sdata_i  demodulator bit clock and data (data sampled on the
//                    rising edge)
//   rst_n_i          asynchronous card reset, active low, for both clock
//                    domains; release it while lclk_i runs
//   lclk_i           PCI chipset local-bus clock
//   lb_rd_i          chipset read request; one word per cycle is read while
//                    it is high and the FIFO is not empty
//   lb_ready_o       one cycle after each read: lb_data_o holds the word
//   lb_data_o        FIFO output, straight to the chipset
//   lint_o           local interrupt: FIFO at least half full
//   overflow_o       sticky: a word was lost because the FIFO was full
// The first bit after reset lands in bit 31 of the first word; words keep
// the order of the stream, with no frame alignment.
// The split into receiver, FPGA logic, FIFO and PCI chipset, the 4-bit and
// 32-bit widths and the half-full interrupt follow the original card; the
// FIFO depth, the local-bus handshake, the overflow flag and the single
// reset are this design's own choices.
module drc_top
  import drc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = FIFO_DEPTH_DEFAULT
) (
  input  logic  sclk_i,
  input  logic  sdata_i,
  input  logic  rst_n_i,
  input  logic  lclk_i,
  input  logic  lb_rd_i,
  output logic  lb_ready_o,
  output word_t lb_data_o,
  output logic  lint_o,
  output logic  overflow_o
);

  nibble_t nib;
  logic    nclk;
  logic    fifo_wen, fifo_full, fifo_ren, fifo_empty, fifo_half_full;
  word_t   fifo_wdata;

  serial_to_parallel u_receiver (
    .sclk_i  (sclk_i),
    .rst_n_i (rst_n_i),
    .sdata_i (sdata_i),
    .nib_o   (nib),
    .nclk_o  (nclk)
  );

  fpga_logic u_fpga (
    .nclk_i           (nclk),
    .nrst_n_i         (rst_n_i),
    .nib_i            (nib),
    .fifo_wen_o       (fifo_wen),
    .fifo_wdata_o     (fifo_wdata),
    .fifo_full_i      (fifo_full),
    .overflow_o       (overflow_o),
    .lclk_i           (lclk_i),
    .lrst_n_i         (rst_n_i),
    .fifo_half_full_i (fifo_half_full),
    .fifo_empty_i     (fifo_empty),
    .fifo_ren_o       (fifo_ren),
    .lb_rd_i          (lb_rd_i),
    .lb_ready_o       (lb_ready_o),
    .lint_o           (lint_o)
  );

  drc_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .wclk_i      (nclk),
    .wrst_n_i    (rst_n_i),
    .wen_i       (fifo_wen),
    .wdata_i     (fifo_wdata),
    .full_o      (fifo_full),
    .rclk_i      (lclk_i),
    .rrst_n_i    (rst_n_i),
    .ren_i       (fifo_ren),
    .rdata_o     (lb_data_o),
    .empty_o     (fifo_empty),
    .half_full_o (fifo_half_full)
  );

endmodule
