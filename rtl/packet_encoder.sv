// packet_encoder: serialiser for the 58-bit RF telemetry packet.
//
// A Moore state machine walks through the ten fields of the packet (see driversed_pkg):
// preamble, then padding, security byte, and the three sensor bytes, each followed by two
// padding bits of '1'. A bit counter keeps it in a field until all its bits are out; a
// 5-to-1 multiplexer picks what is loaded into the 8-bit shift register at the start of a
// field (preamble half, security code, or the data path byte). The shift register moves
// one bit per bit_en, MSB first, and tx is taken from its top bit, or '1' during padding.
// Packets follow each other without a gap, so the "1010" preamble appears every 3.712 ms.
// On entering the padding before a sensor byte the encoder pulses that sensor's request
// ("chip select") to the data path controller, which has the byte ready two bit periods
// later when it is loaded.
//   pkt_start : one-cycle pulse when the first preamble bit goes out
// Field sizes, padding value and the 64 us bit follow the report; the position of the
// fifth padding pair (after the preamble) and MSB-first order are this design's reading.
// tx is held low during reset and for the clock after it (own choice): a base station that
// is already listening then catches the first packet too, which keeps its 16-packet
// distance window in step with the car's 16-read encoder window. The first preamble bit
// after reset is therefore one clock shorter than the others.
module packet_encoder
  import driversed_pkg::*;
(
  input  logic       clk,        // 1 MHz car clock
  input  logic       rst_n,      // active-low synchronous reset
  input  logic       bit_en,     // one pulse per 64 us bit
  input  logic [7:0] data,       // byte from the data path controller
  output logic       req_accel,  // accelerometer chip select (one clock)
  output logic       req_enc,    // optical encoder chip select (one clock)
  output logic       req_prox,   // proximity/compass chip select (one clock)
  output logic       tx,         // serial bit stream to the RF transmitter
  output logic       pkt_start   // first bit of a packet is being sent
);
  typedef enum logic [3:0] {
    F_PRE, F_PAD0, F_SEC, F_PAD1, F_ACC, F_PAD2, F_ENC, F_PAD3, F_PRX, F_PAD4
  } field_e;

  field_e     field, field_nx;
  logic [3:0] bitcnt;
  logic [7:0] shreg;
  logic       running;    // out of reset (registered copy of rst_n)
  logic [7:0] load;

  function automatic logic [3:0] field_len(field_e f);
    unique case (f)
      F_PRE:                           return 4'(PREAMBLE_BITS - 1);
      F_PAD0, F_PAD1, F_PAD2, F_PAD3,
      F_PAD4:                          return 4'(PAD_BITS - 1);
      default:                         return 4'd7;
    endcase
  endfunction

  assign field_nx = (field == F_PAD4) ? F_PRE : field_e'(field + 1'b1);

  // 5-to-1 source multiplexer for the shift register.
  always_comb begin
    unique case (field_nx)
      F_PRE:                 load = PREAMBLE[15:8];
      F_SEC:                 load = SECURITY_CODE;
      F_ACC, F_ENC, F_PRX:   load = data;
      default:               load = shreg;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      field     <= F_PRE;
      bitcnt    <= '0;
      shreg     <= PREAMBLE[15:8];
      req_accel <= 1'b0;
      req_enc   <= 1'b0;
      req_prox  <= 1'b0;
      pkt_start <= 1'b0;
    end else begin
      req_accel <= 1'b0;
      req_enc   <= 1'b0;
      req_prox  <= 1'b0;
      pkt_start <= 1'b0;
      if (bit_en) begin
        if (bitcnt == field_len(field)) begin
          field  <= field_nx;
          bitcnt <= '0;
          shreg  <= load;
          req_accel <= (field_nx == F_PAD1);
          req_enc   <= (field_nx == F_PAD2);
          req_prox  <= (field_nx == F_PAD3);
          pkt_start <= (field_nx == F_PRE);
        end else begin
          bitcnt <= bitcnt + 1'b1;
          // The preamble is two copies of its first byte.
          if (field == F_PRE && bitcnt == 4'd7) shreg <= PREAMBLE[7:0];
          else                                  shreg <= {shreg[6:0], 1'b0};
        end
      end
    end
  end

  // The line is held low while in reset, so that a receiver which is already running
  // sees an edge at the start of the very first preamble bit.
  always_ff @(posedge clk) running <= rst_n;

  always_comb begin
    unique case (field)
      F_PAD0, F_PAD1, F_PAD2, F_PAD3, F_PAD4: tx = PAD_VALUE;
      default:                                tx = shreg[7];
    endcase
    if (!running) tx = 1'b0;
  end
endmodule
