// tb_driversed_top: end-to-end run of the whole system at its default parameters: the RC
// car (1 MHz) with modelled sensors, an RF link that is a plain wire except that it
// corrupts the security byte of every ninth packet (as a foreign transmitter would), the
// base station (25.175 MHz) with its display and the keypad FPGA with a modelled keypad.
// Every packet the car sends is decoded here from rf_tx and checked against the sensor
// inputs; every packet the base station accepts must carry the same three bytes; the
// computed acceleration, velocity, heading and proximity values are checked against the
// received bytes, key presses against the key pressed. Each mechanism of the design must
// occur at least once: packets accepted, packets rejected by the security check, the car's
// error byte (an accelerometer read during a register write, provoked by sweeping the PWM
// edge across the read), the encoder counter clear every 16 reads, distance, velocity,
// acceleration and heading updates, a proximity warning, a key press, a VGA frame and an
// LED change.
//
// Clock rates, packet format and calculations follow the original report; the sensor
// patterns, the corruption rate and the run length are chosen here.
module tb_driversed_top;
  import driversed_pkg::*;
  localparam int PKT = 58 * 64;        // car clocks per packet
  localparam int ENC_PERIOD = 300;     // car clocks per encoder pulse
  // clocks
  logic car_clk = 0, base_clk = 0;
  always #500 car_clk = ~car_clk;          // 1 MHz
  always #19.861 base_clk = ~base_clk;     // 25.175 MHz
  logic car_rst_n = 0, base_rst_n = 0;
  // car inputs
  logic accel_x = 0, accel_y = 0, enc = 0;
  logic [3:0] prox_n = 4'hF, compass_n = 4'b0111;
  // link and keypad
  logic rf_tx, rf_rx, corrupt = 0;
  logic [3:0] kp_row_n, kp_col_n;
  int pressed = -1;
  // outputs
  logic car_pkt_start, car_dp_error;
  logic [7:0] led;
  logic [3:0] key; logic key_valid; logic [6:0] key_seg;
  logic [2:0] vga_rgb; logic vga_hsync_n, vga_vsync_n, vga_frame;
  logic pkt_start, sec_corrupted;
  logic [7:0] accel_reg, dis_reg, dirprox_reg;
  logic accel_we, dis_we, dirprox_we;
  logic acc_neg, acc_updated, vel_updated, dist_updated, dir_updated;
  logic [3:0] acc_ones, acc_tenths, vel_ones, vel_tenths, prox_warn;
  logic [9:0] vel_cms;
  logic [15:0] dist_pulses;
  bcd3_t dist_cm;
  heading_e heading;

  driversed_top dut (.*);

  assign rf_rx = rf_tx ^ corrupt;

  always_comb begin
    kp_row_n = 4'hF;
    if (pressed >= 0 && !kp_col_n[pressed / 4]) kp_row_n[pressed % 4] = 1'b0;
  end

  int checks = 0, failures = 0;
  // mechanism counters
  int n_sent = 0, n_accepted = 0, n_rejected = 0, n_dp_error = 0, n_enc_clear = 0;
  int n_dist = 0, n_vel = 0, n_acc = 0, n_hdg_change = 0, n_prox = 0, n_key = 0;
  int n_frame = 0, n_led = 0;

  // ---------------- RC car sensor models ----------------
  longint ccyc = 0, t_req = -1;
  always @(posedge car_clk) ccyc <= ccyc + 1;
  initial forever begin repeat (ENC_PERIOD / 2) @(posedge car_clk); enc = ~enc; end
  always @(posedge car_clk) if (car_rst_n && dut.u_car.req_accel && t_req < 0) t_req = ccyc;

  int K = 90;   // accelerometer count (pulse width / 32 in 500 kHz ticks)
  initial begin
    int L;
    wait (t_req >= 0);
    L = 0;
    forever begin
      longint fall;
      int width;
      width = (K * 32 + 16) * 2;
      fall = t_req + 2 * PKT * ((ccyc - t_req) / (2 * PKT) + 1) - L;
      while (ccyc < fall - width) @(posedge car_clk);
      {accel_x, accel_y} = 2'b11;
      while (ccyc < fall) @(posedge car_clk);
      {accel_x, accel_y} = 2'b00;
      L = (L + 1) % 8;
      repeat (100) @(posedge car_clk);
    end
  end

  // ---------------- car-side decoder and link corruption ----------------
  typedef struct { logic [7:0] a, e, p; } pkt_t;
  pkt_t sent_q [$], recv_q [$];
  initial begin
    int prev_e;
    prev_e = -1;
    @(posedge car_rst_n);
    forever begin
      logic [57:0] bits;
      logic [3:0] pn, cn;
      bit bad;
      @(posedge car_clk iff car_pkt_start);
      pn = prox_n; cn = compass_n;
      bad = (n_sent % 9 == 4);
      repeat (32) @(posedge car_clk);
      for (int i = 0; i < 58; i++) begin
        bits[57 - i] = rf_tx;
        if (bad && i == 20) corrupt = 1;
        if (bad && i == 21) corrupt = 0;
        if (i != 57) repeat (64) @(posedge car_clk);
      end
      checks++;
      if (bits[57:42] != 16'hAAAA || bits[39:32] != 8'h88 || bits[9:2] != {pn, cn}) begin
        failures++; $display("car packet %0d wrong: %b", n_sent, bits);
      end
      if (bits[29:22] == 8'hFF) n_dp_error++;
      if (prev_e >= 0 && int'(bits[19:12]) < prev_e) n_enc_clear++;
      prev_e = bits[19:12];
      if (!bad) sent_q.push_back('{bits[29:22], bits[19:12], bits[9:2]});
      n_sent++;
      if (n_sent % 7 == 0) begin
        prox_n = ($urandom_range(0, 1) != 0) ? 4'hF : 4'($urandom);
        compass_n = ~(4'b1000 >> (n_sent / 7 % 4));
        if (n_sent % 14 == 0) compass_n = compass_n & {compass_n[0], compass_n[3:1]};
      end
      if (n_sent == 30) K = 60;
    end
  end

  // ---------------- base-station observers ----------------
  logic sec_d = 0, hs_d = 1;
  heading_e hdg_d = HDG_N;
  logic [7:0] led_d = 0;
  int xs = 0;
  logic [6:0] xlast;
  always @(posedge base_clk) if (base_rst_n) begin
    sec_d <= sec_corrupted;
    if (sec_corrupted && !sec_d) n_rejected++;
    if (dirprox_we) begin
      recv_q.push_back('{accel_reg, dis_reg, dirprox_reg});
      n_accepted++;
    end
    if (accel_we && !accel_reg[7] && accel_reg[6:0] != 7'h7F) begin xs++; xlast = accel_reg[6:0]; end
    if (acc_updated) begin
      int a, mag;
      a = 5 * (int'(xlast) - 74);
      mag = a < 0 ? -a : a;
      if (mag > 99) mag = 99;
      n_acc++;
      checks++;
      if (acc_neg != (a < 0) || acc_ones != 4'(mag / 10) || acc_tenths != 4'(mag % 10)) begin
        failures++; $display("acceleration %s%0d.%0d from T1 %0d", acc_neg ? "-" : "", acc_ones,
                             acc_tenths, xlast);
      end
    end
    if (vel_updated) begin
      int dm;
      dm = 2 * int'(dis_reg) / 10;
      n_vel++;
      checks++;
      if (vel_cms != 10'(2 * dis_reg) || vel_ones != 4'(dm / 10) || vel_tenths != 4'(dm % 10)) begin
        failures++; $display("velocity %0d from %0d", vel_cms, dis_reg);
      end
    end
    if (dist_updated) n_dist++;
    hdg_d <= heading;
    if (heading != hdg_d) n_hdg_change++;
    if (prox_warn != 0 && dir_updated) n_prox++;
    if (vga_frame) n_frame++;
    led_d <= led;
    if (led != led_d) n_led++;
  end

  // heading and warnings after each accepted packet
  always @(posedge base_clk) if (base_rst_n && dir_updated) begin
    logic [3:0] c;
    int exp_h;
    @(negedge base_clk);
    c = ~dirprox_reg[3:0];
    exp_h = (c == 4'b1000) ? 0 : (c == 4'b1100) ? 1 : (c == 4'b0100) ? 2 : (c == 4'b0110) ? 3 :
            (c == 4'b0010) ? 4 : (c == 4'b0011) ? 5 : (c == 4'b0001) ? 6 : (c == 4'b1001) ? 7 : -1;
    checks++;
    if ((exp_h >= 0 && int'(heading) != exp_h) || prox_warn != ~dirprox_reg[7:4]) begin
      failures++; $display("heading %0d warn %b from %h", heading, prox_warn, dirprox_reg);
    end
  end

  // match accepted packets with sent ones (the base may miss packets at the start)
  always @(posedge base_clk) begin
    while (recv_q.size() > 0 && sent_q.size() > 0) begin
      pkt_t r;
      r = recv_q.pop_front();
      while (sent_q.size() > 1 && sent_q[0] != r) void'(sent_q.pop_front());
      checks++;
      if (sent_q[0] != r) begin
        failures++; $display("accepted packet %h %h %h was not sent", r.a, r.e, r.p);
      end
      void'(sent_q.pop_front());
    end
  end

  // keypad
  initial begin
    @(posedge base_rst_n);
    repeat (3) begin
      int k, n0;
      #20ms;
      k = $urandom_range(0, 15);
      n0 = n_key;
      pressed = k;
      #30ms;
      pressed = -1;
      #1ms;
      checks++;
      if (key != 4'(k)) begin failures++; $display("key %0d read as %0d", k, key); end
    end
  end
  always @(posedge base_clk) if (base_rst_n && key_valid) n_key++;

  // run
  initial begin
    repeat (3) @(posedge car_clk);
    car_rst_n = 1;
    #1ms;
    @(posedge base_clk) base_rst_n = 1;
    #280ms;
    begin
      string names [13] = '{"packets sent", "packets accepted", "security rejections",
                            "car error bytes", "encoder clears", "distance updates",
                            "velocity updates", "acceleration updates", "heading changes",
                            "proximity warnings", "key presses", "VGA frames", "LED changes"};
      int counts [13];
      counts = '{n_sent, n_accepted, n_rejected, n_dp_error, n_enc_clear, n_dist, n_vel, n_acc,
                 n_hdg_change, n_prox, n_key, n_frame, n_led};
      for (int i = 0; i < 13; i++) begin
        $display("%-22s %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin failures++; $display("  never happened"); end
      end
      checks++;
      if (n_key != 3) begin failures++; $display("%0d key_valid pulses for 3 presses", n_key); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
