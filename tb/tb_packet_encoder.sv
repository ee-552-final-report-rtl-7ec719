// tb_packet_encoder: serialises packets with a byte source that answers each request with
// a fresh random byte, and compares the received bit stream with the 58-bit packet
// preamble | 11 | 10001000 | 11 | accel | 11 | encoder | 11 | prox | 11, MSB first.
// Also checks the packet period (58 bits) and the order of the requests.
//
// The packet layout follows the original report; the place of the first padding pair
// and the request timing are this design's reading.
module tb_packet_encoder;
  logic clk = 0, rst_n = 0, bit_en = 0;
  logic [7:0] data = 0;
  logic req_accel, req_enc, req_prox, tx, pkt_start;
  int checks = 0, failures = 0;
  logic [7:0] sent [3];
  logic [57:0] rxbits;
  int nbits = 0, npkt = 0, last_start = -1, bitno = 0;
  int order = 0;

  packet_encoder dut (.clk, .rst_n, .bit_en, .data, .req_accel, .req_enc, .req_prox, .tx,
                      .pkt_start);

  always #5 clk = ~clk;

  // bit enable every 4 clocks
  int div = 0;
  always @(posedge clk) begin
    div <= (div + 1) % 4;
    bit_en <= (div == 3);
  end

  // byte source: a new random byte per request, visible the next clock
  always @(posedge clk) begin
    if (rst_n && (req_accel || req_enc || req_prox)) begin
      logic [7:0] b;
      int idx;
      b = 8'($urandom);
      idx = req_accel ? 0 : req_enc ? 1 : 2;
      checks++;
      if (idx != order) begin failures++; $display("request %0d out of order", idx); end
      order = (order + 1) % 3;
      data <= b;
      sent[idx] = b;
    end
  end

  // receiver: sample tx at each bit enable
  always @(posedge clk) begin
    if (rst_n && bit_en) begin
      rxbits = {rxbits[56:0], tx};
      nbits++;
      bitno++;
      if (nbits % 58 == 0) begin
        logic [57:0] exp;
        exp = {16'hAAAA, 2'b11, 8'h88, 2'b11, sent[0], 2'b11, sent[1], 2'b11, sent[2], 2'b11};
        checks++;
        if (rxbits != exp) begin
          failures++;
          $display("packet %0d: got %b\n expected %b", npkt, rxbits, exp);
        end
        npkt++;
      end
    end
    if (rst_n && pkt_start) begin
      if (last_start >= 0) begin
        checks++;
        if (bitno - last_start != 58) begin failures++; $display("packet period %0d", bitno - last_start); end
      end
      last_start = bitno;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (npkt == 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
