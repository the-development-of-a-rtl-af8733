// serial_to_parallel: the receiver component's serial-to-parallel stage.
//
// The demodulator delivers one data bit per rising edge of its synchronous
// bit clock. This stage shifts the bits in and, after every fourth bit,
// presents them as a 4-bit nibble together with a nibble clock running at a
// quarter of the bit rate, so that the FPGA behind it works at a quarter of
// the line frequency. The 4-bit output with its clock is the receiver's
// interface on the card; the rest is this design's choice:
//   * The first bit received goes to nib_o[3] (MSB first).
//   * nib_o changes on the bit-clock edge that completes a nibble; nclk_o is
//     a register that falls on that same edge and rises two bit periods
//     later, so the nibble is stable for two bit periods around each rising
//     edge of nclk_o. nclk_o stays low after reset until the first nibble is
//     complete, so every rising edge of nclk_o carries a real nibble.
//   * No word or frame alignment is done here: the stream is cut into
//     nibbles from the first bit after reset.
// The line receiver and the ECL-to-TTL level shifting of the real card are
// analog and not part of this model.
module serial_to_parallel
  import drc_pkg::*;
(
  input  logic    sclk_i,    // synchronous bit clock from the demodulator
  input  logic    rst_n_i,   // asynchronous reset, active low
  input  logic    sdata_i,   // serial data, sampled on the rising edge of sclk_i
  output nibble_t nib_o,     // last complete nibble, first bit in bit 3
  output logic    nclk_o     // nibble clock, rising edge in the middle of nib_o
);

  logic [1:0]       bit_cnt;   // bits of the current nibble received so far
  logic [NIB_W-2:0] shreg;     // first three bits of the current nibble
  logic             started;   // a complete nibble has been presented

  always_ff @(posedge sclk_i or negedge rst_n_i) begin
    if (!rst_n_i) begin
      bit_cnt <= '0;
      shreg   <= '0;
      nib_o   <= '0;
      started <= 1'b0;
      nclk_o  <= 1'b0;
    end else begin
      bit_cnt <= bit_cnt + 2'd1;
      shreg   <= {shreg[NIB_W-3:0], sdata_i};
      if (bit_cnt == 2'd3) begin
        nib_o   <= {shreg, sdata_i};
        started <= 1'b1;
        nclk_o  <= 1'b0;
      end else if (bit_cnt == 2'd1 && started) begin
        nclk_o  <= 1'b1;
      end
    end
  end

endmodule
