// tb_rc_car_top: runs the RC-car FPGA with modelled sensors and decodes its RF output.
// Sensor models: both accelerometer outputs carry the same PWM signal, whose period is
// three packets long and whose falling edge is swept across the moment the packet
// encoder asks for the acceleration byte, so that a read during a register write (the
// error case) happens; the encoder pulses every ENC_PERIOD clocks; proximity and compass
// inputs change every few packets. Every packet is checked for preamble, padding and
// security code; the acceleration byte must be the expected count with the right axis
// bit or the error byte, the encoder byte must grow by the pulses of one packet and drop
// back after every 16th packet, and the proximity/compass byte must equal the inputs.
//
// Packet layout, rates and the error byte follow the original report; the PWM period and
// encoder rate of the models are chosen here.
module tb_rc_car_top;
  localparam int PKT = 58 * 64;         // clocks per packet
  localparam int ENC_PERIOD = 300;      // clocks per encoder pulse
  localparam int K = 78;                // accelerometer count
  logic clk = 0, rst_n = 0;
  logic accel_x = 0, accel_y = 0, enc = 0;
  logic [3:0] prox_n = 4'hF, compass_n = 4'hE;
  logic rf_tx, pkt_start, dp_error;
  logic [7:0] led;
  int checks = 0, failures = 0;
  int npkt = 0, nerr_pkt = 0, nclear = 0, naccel_x = 0, naccel_y = 0;
  longint cyc = 0, t_req = -1;

  rc_car_top dut (.clk, .rst_n, .accel_x, .accel_y, .enc, .prox_n, .compass_n, .rf_tx,
                  .pkt_start, .dp_error, .led);

  always #500 clk = ~clk;   // 1 MHz
  always @(posedge clk) cyc <= cyc + 1;

  // encoder
  initial forever begin
    repeat (ENC_PERIOD / 2) @(posedge clk); enc = ~enc;
  end

  // learn when the acceleration byte is requested
  always @(posedge clk) if (rst_n && dut.req_accel && t_req < 0) t_req = cyc;

  // accelerometer: period 3 packets, falling edge L clocks before a request, L swept 0..7
  initial begin
    int width, L;
    width = (K * 32 + 16) * 2;
    wait (t_req >= 0);
    L = 0;
    forever begin
      longint fall;
      fall = t_req + 3 * PKT * ((cyc - t_req) / (3 * PKT) + 1) - L;
      while (cyc < fall - width) @(posedge clk);
      {accel_x, accel_y} = 2'b11;
      while (cyc < fall) @(posedge clk);
      {accel_x, accel_y} = 2'b00;
      L = (L + 1) % 8;
      repeat (100) @(posedge clk);
    end
  end

  // receiver: pkt_start marks bit 0; sample each bit in its middle
  initial begin
    int prev_enc;
    prev_enc = -1;
    @(posedge rst_n);
    forever begin
      logic [57:0] bits;
      logic [7:0] a, e, p, sec;
      logic [3:0] pn, cn;
      @(posedge clk iff pkt_start);
      pn = prox_n; cn = compass_n;
      repeat (32) @(posedge clk);
      for (int i = 0; i < 58; i++) begin
        bits[57 - i] = rf_tx;
        if (i != 57) repeat (64) @(posedge clk);
      end
      sec = bits[39:32]; a = bits[29:22]; e = bits[19:12]; p = bits[9:2];
      checks++;
      if (bits[57:42] != 16'hAAAA || bits[41:40] != 2'b11 || sec != 8'h88 ||
          bits[31:30] != 2'b11 || bits[21:20] != 2'b11 || bits[11:10] != 2'b11 ||
          bits[1:0] != 2'b11) begin
        failures++; $display("packet %0d framing wrong: %b", npkt, bits);
      end
      checks++;
      if (p != {pn, cn}) begin failures++; $display("packet %0d prox %h expected %h", npkt, p, {pn, cn}); end
      if (npkt > 2) begin
        checks++;
        if (a == 8'hFF) nerr_pkt++;
        else if (a[6:0] != 7'(K) && a[6:0] != 7'd0) begin
          failures++; $display("packet %0d accel byte %h", npkt, a);
        end
        if (a != 8'hFF && a[6:0] == 7'(K)) begin
          if (a[7]) naccel_y++; else naccel_x++;
        end
      end
      if (prev_enc >= 0) begin
        int d;
        d = int'(e) - prev_enc;
        checks++;
        if (int'(e) < prev_enc) begin
          nclear++;
          if (e > 14) begin failures++; $display("packet %0d encoder after clear %0d", npkt, e); end
        end else if (d < 11 || d > 14) begin
          failures++; $display("packet %0d encoder step %0d", npkt, d);
        end
      end
      prev_enc = e;
      npkt++;
      if (npkt % 5 == 0) begin
        prox_n = 4'($urandom);
        compass_n = 4'($urandom);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (npkt == 70);
    checks++;
    if (nerr_pkt == 0) begin failures++; $display("error byte never sent"); end
    checks++;
    if (nclear < 3) begin failures++; $display("encoder cleared %0d times", nclear); end
    checks++;
    if (naccel_x == 0 || naccel_y == 0) begin failures++; $display("axes x %0d y %0d", naccel_x, naccel_y); end
    $display("packets %0d, error bytes %0d, encoder clears %0d, x %0d y %0d", npkt, nerr_pkt,
             nclear, naccel_x, naccel_y);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
