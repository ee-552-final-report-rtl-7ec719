// encoder_counter: optical-encoder pulse counter for the RC car.
//
// The encoder gives 128 pulses per wheel revolution. An 8-bit counter counts rising edges
// of the (synchronised) encoder output. A 4-bit counter counts how often the data path
// has read the value; after the 16th read the pulse counter is cleared, so the value sent
// in every 16th packet is the number of pulses in a 16-packet window (~59.5 ms), which is
// what the base station uses for distance and velocity.
//   count   : live pulse count, read by the data path controller
//   rd      : one-cycle strobe, the data path has taken the count
// Own choices: two-flop input synchroniser; the count saturates at 254 so that it never
// equals the all-ones error byte; a pulse arriving in the clearing cycle is kept.
module encoder_counter (
  input  logic       clk,    // 1 MHz car clock
  input  logic       rst_n,  // active-low synchronous reset
  input  logic       enc,    // encoder pulse output (asynchronous)
  input  logic       rd,     // data path read strobe
  output logic [7:0] count   // pulses counted since the last clear
);
  logic [2:0] sync;
  logic [3:0] reads;
  logic       rise;

  always_ff @(posedge clk) sync <= {sync[1:0], enc};
  assign rise = sync[1] & ~sync[2];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count <= '0;
      reads <= '0;
    end else begin
      if (rd) reads <= reads + 1'b1;
      if (rd && reads == 4'd15) count <= {7'd0, rise};
      else if (rise && count != 8'd254) count <= count + 1'b1;
    end
  end
endmodule
