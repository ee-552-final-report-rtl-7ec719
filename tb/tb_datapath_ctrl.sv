// tb_datapath_ctrl: each request must present the matching byte one clock later and hold
// it; an accelerometer request while the register is being written gives 0xFF and the
// error flag; an encoder request pulses enc_rd.
//
// The four inputs and the error byte follow the original report; the one-clock
// registered response is this design's choice.
module tb_datapath_ctrl;
  logic clk = 0, rst_n = 0;
  logic req_accel = 0, req_enc = 0, req_prox = 0;
  logic [7:0] accel_byte = 0, enc_count = 0, proxcmp = 0;
  logic accel_writing = 0;
  logic [7:0] data;
  logic enc_rd, error;
  int checks = 0, failures = 0, nrd = 0;

  datapath_ctrl dut (.clk, .rst_n, .req_accel, .req_enc, .req_prox, .accel_byte,
                     .accel_writing, .enc_count, .proxcmp, .data, .enc_rd, .error);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && enc_rd) nrd++;

  task automatic request(int which, bit busy, logic [7:0] expected, bit exp_err);
    @(negedge clk);
    accel_writing = busy;
    case (which)
      0: req_accel = 1;
      1: req_enc = 1;
      default: req_prox = 1;
    endcase
    @(negedge clk);
    {req_accel, req_enc, req_prox} = '0;
    accel_writing = 0;
    // change the sources: the presented byte must not follow them
    accel_byte = ~accel_byte; enc_count = ~enc_count; proxcmp = ~proxcmp;
    repeat (3) @(negedge clk);
    checks++;
    if (data != expected || error != exp_err) begin
      failures++;
      $display("req %0d busy %0b: data %h err %0b, expected %h err %0b", which, busy, data, error,
               expected, exp_err);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 30; i++) begin
      logic [7:0] a, e, p;
      a = 8'($urandom); e = 8'($urandom); p = 8'($urandom);
      accel_byte = a; enc_count = e; proxcmp = p;
      request(0, 0, a, 0);
      accel_byte = a; enc_count = e; proxcmp = p;
      request(1, 0, e, 0);
      accel_byte = a; enc_count = e; proxcmp = p;
      request(2, 0, p, 0);
      accel_byte = a;
      request(0, 1, 8'hFF, 1);
    end
    checks++;
    if (nrd != 30) begin failures++; $display("enc_rd pulses %0d", nrd); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
