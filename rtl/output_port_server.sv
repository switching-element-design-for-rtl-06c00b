// output_port_server: one output port of the switching element.
//
// The arbiter picks one of the two FIFOs feeding this output (rotating
// priority) and holds its read enable for the whole packet; the output
// port controller runs the REQ/ACK handshake with the successor element;
// the read address counter gives the byte-within-slot read address; the
// output latch drives the link.
//
// The output latch loads the addressed byte on every falling edge, except
// while HOLD is true and ACK has not yet been seen, so the first header byte
// stays on the link until the successor accepts it and the second header
// byte follows on the falling edge right after ACK rises. Link data and REQ
// change on the falling edge; ACK is sampled on the falling edge.
// The blocks and their signals follow the design; the exact load condition
// of the output latch is this implementation's reading of the handshake
// timing.
//
// In test mode (cnt_test true, no traffic) the read address counter is
// released from clear and counts on every rising edge, so that it can be
// compared with the element's other byte counters (see counter_self_test).
module output_port_server
  import se_pkg::*;
#(
  parameter int unsigned PKT_BYTES_P = se_pkg::PKT_BYTES
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               cnt_test,   // counter test mode
  // from / to the buffer memory
  input  logic               pr0,
  input  logic               pr1,
  output logic               re0,
  output logic               re1,
  output logic [BYTE_AW-1:0] raddr,
  input  se_word_t           rdata,
  // link to the successor element
  output se_word_t           dout,
  output logic               req,
  input  logic               ack,
  // errors
  output logic               arb_err,
  output logic               opc_err
);

  logic start, done, cnt, hold, last, cnt_last;

  // the controller does not see the counter test run through LAST
  assign last = cnt_last && !cnt_test;

  arbiter u_arb (
    .clk, .rst, .pr0, .pr1, .done, .re0, .re1, .start, .err(arb_err)
  );

  output_port_controller u_opc (
    .clk, .rst, .start, .last, .ack, .done, .cnt, .hold, .req, .err(opc_err)
  );

  read_address_counter #(.PKT_BYTES_P(PKT_BYTES_P)) u_rac (
    .clk, .clr(done && !cnt_test), .cnt(cnt || cnt_test), .addr(raddr), .last(cnt_last)
  );

  always_ff @(negedge clk) begin
    if (!hold || ack) dout <= rdata;
  end

  // The first header byte is only ever held while REQ is offered.
  a_hold_req: assert property (@(negedge clk) disable iff (rst) hold |-> req);

endmodule
