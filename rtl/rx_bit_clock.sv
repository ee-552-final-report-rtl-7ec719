// rx_bit_clock: receive bit clock of the base station.
//
// The base station runs at 25.175 MHz; dividing by 1611 gives 15.627 kHz, within 2 Hz of
// the car's 15.625 kHz bit rate. Left free-running, that small difference lets the sample
// point creep through the bit (about 8 ns per bit, per the report), so the receive clock
// is re-aligned to the incoming data on every packet: while `resync` is high (the
// preamble detector is hunting for a preamble) every edge of the received signal restarts
// the divider half a bit period before the sample point. Once a packet has been found the
// divider runs freely to the end of it.
//   bit_en : one-clock pulse at the middle of each received bit
//   rx_bit : the received bit sampled at that point
// The divide ratio follows the report; edge re-alignment and mid-bit sampling are this
// design's way of doing the synchronisation the report describes. rx is synchronised with
// two flops first.
module rx_bit_clock #(
  parameter int unsigned DIV = 1611
) (
  input  logic clk,     // 25.175 MHz base station clock
  input  logic rst_n,   // active-low synchronous reset
  input  logic rx,      // data from the RF receiver (asynchronous)
  input  logic resync,  // allow re-alignment on data edges
  output logic bit_en,  // sample strobe, once per bit
  output logic rx_bit   // sampled bit, valid with and after bit_en
);
  localparam int unsigned CW = $clog2(DIV);
  logic [2:0]    sync;
  logic [CW-1:0] cnt;
  logic          edge_seen;

  always_ff @(posedge clk) sync <= {sync[1:0], rx};
  assign edge_seen = sync[2] ^ sync[1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt    <= '0;
      rx_bit <= 1'b0;
    end else begin
      if (resync && edge_seen)      cnt <= CW'(DIV / 2);
      else if (cnt == CW'(DIV - 1)) cnt <= '0;
      else                          cnt <= cnt + 1'b1;
      if (cnt == CW'(DIV - 1)) rx_bit <= sync[1];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) bit_en <= 1'b0;
    else        bit_en <= (cnt == CW'(DIV - 1)) && !(resync && edge_seen);
  end
endmodule
