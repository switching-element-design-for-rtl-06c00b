// input_port_server: one input port of the switching element.
//
// Connects the input port controller, the write address counter and the
// datapath (header rotation and parity). It accepts a packet from the
// predecessor element with the REQ/ACK handshake and writes it, byte by
// byte, into the FIFO picked by bit 0 of the routing tag. The write address
// counter is cleared whenever neither write enable is active, so it gives
// the byte-within-slot address of each byte that is written; the slot part
// of the address comes from the FIFO itself.
//
// Timing: link data and REQ are sampled on the rising clock edge, ACK
// changes on the rising edge. WE0/WE1, the address and the write data
// change on the rising edge and are written into memory on the following
// falling edge. The first header byte is written two rising edges after
// ACK was raised.
//
// In test mode (cnt_test true, no traffic) the write address counter is
// released from clear and counts on every rising edge, so that it can be
// compared with the element's other byte counters (see counter_self_test).
module input_port_server
  import se_pkg::*;
#(
  parameter bit          PORT        = 1'b0,
  parameter int unsigned PKT_BYTES_P = se_pkg::PKT_BYTES
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               cnt_test,   // counter test mode
  // link from the predecessor element
  input  se_word_t           din,
  input  logic               req,
  output logic               ack,
  // to the buffer memory
  input  logic               bf0,
  input  logic               bf1,
  output logic               we0,
  output logic               we1,
  output logic [BYTE_AW-1:0] waddr,
  output se_word_t           wdata,
  // error reporting
  output logic               perr,
  output logic               err
);

  logic shift, pok, tag, last;

  ips_datapath #(.PORT(PORT)) u_dp (
    .clk, .din, .shift, .pok, .tag, .wdata
  );

  input_port_controller u_ipc (
    .clk, .rst, .req, .tag, .pok, .bf0, .bf1, .last,
    .ack, .shift, .we0, .we1, .perr, .err
  );

  write_address_counter #(.PKT_BYTES_P(PKT_BYTES_P)) u_wac (
    .clk, .clr(!(we0 || we1) && !cnt_test), .addr(waddr), .last
  );

endmodule
