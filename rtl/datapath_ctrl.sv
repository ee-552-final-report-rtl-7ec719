// datapath_ctrl: data path controller of the RC car.
//
// A 4-to-1 byte multiplexer chooses what the packet encoder sends next: the accelerometer
// register, the encoder count, the proximity/compass byte, or an all-ones error byte. The
// packet encoder raises one of three request flags (its "chip selects"); the controller
// then enters the matching state and registers the chosen byte, which stays stable until
// the next request. If the accelerometer register is being written at the moment it is
// asked for, the controller enters its error state and sends eight ones instead, as the
// report describes. A read of the encoder count is reported back with enc_rd so that the
// encoder interface can count its reads.
//   Timing: data is valid one clock after a request and held until the next one.
module datapath_ctrl
  import driversed_pkg::*;
(
  input  logic       clk,         // 1 MHz car clock
  input  logic       rst_n,       // active-low synchronous reset
  input  logic       req_accel,   // packet encoder wants the acceleration byte
  input  logic       req_enc,     // ... the encoder byte
  input  logic       req_prox,    // ... the proximity/compass byte
  input  logic [7:0] accel_byte,  // accelerometer register
  input  logic       accel_writing,// accelerometer register is being written
  input  logic [7:0] enc_count,   // encoder pulse count
  input  logic [7:0] proxcmp,     // proximity/compass register
  output logic [7:0] data,        // byte for the packet encoder
  output logic       enc_rd,      // encoder count taken this cycle
  output logic       error        // high while the error byte is presented
);
  dp_sel_e    sel, sel_next;
  logic [7:0] mux;

  always_comb begin
    sel_next = sel;
    if (req_accel)     sel_next = accel_writing ? SEL_ERROR : SEL_ACCEL;
    else if (req_enc)  sel_next = SEL_ENCODER;
    else if (req_prox) sel_next = SEL_PROXCMP;
  end

  always_comb begin
    unique case (sel_next)
      SEL_ACCEL:   mux = accel_byte;
      SEL_ENCODER: mux = enc_count;
      SEL_PROXCMP: mux = proxcmp;
      SEL_ERROR:   mux = ERROR_BYTE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sel    <= SEL_ERROR;
      data   <= ERROR_BYTE;
      enc_rd <= 1'b0;
    end else begin
      sel    <= sel_next;
      enc_rd <= req_enc;
      if (req_accel || req_enc || req_prox) data <= mux;
    end
  end

  assign error = (sel == SEL_ERROR);

  // Only one request at a time.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0({req_accel, req_enc, req_prox}));
endmodule
