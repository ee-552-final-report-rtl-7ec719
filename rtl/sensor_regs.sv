// sensor_regs: input registers for the proximity and compass sensors.
//
// The four proximity sensors (low = object closer than ~5 cm) and the four Hall-effect
// compass outputs (low = that cardinal direction) are level signals that need no control
// logic; as in the report they are only registered so that the data path controller can
// sample them without spikes. Two register stages are used here (own choice) so that the
// asynchronous inputs are also synchronised.
//   proxcmp : {front, left, right, back, north, east, south, west}, the byte order the
//             base station expects (proximity in the upper nibble, north as bit 3)
module sensor_regs (
  input  logic       clk,      // 1 MHz car clock
  input  logic       rst_n,    // active-low synchronous reset
  input  logic [3:0] prox_n,   // {front, left, right, back}, 0 = object near
  input  logic [3:0] compass_n,// {N, E, S, W}, 0 = pointing that way
  output logic [7:0] proxcmp   // registered {prox_n, compass_n}
);
  logic [7:0] stage1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      stage1  <= '1;
      proxcmp <= '1;
    end else begin
      stage1  <= {prox_n, compass_n};
      proxcmp <= stage1;
    end
  end
endmodule
