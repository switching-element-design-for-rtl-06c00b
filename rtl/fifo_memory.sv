// fifo_memory: one four-slot packet FIFO of the buffer memory.
//
// A FIFO controller and a 256 x 9 dual-port memory. The memory address is
// the slot pointer (rear pointer for writing, front pointer for reading) in
// the upper two bits and the byte-within-slot address supplied by the input
// or output port server in the lower six. WE and RE mark a whole packet
// transfer; the pointers move when they fall. The controller's BE output
// is left open on purpose: the output side uses PR, which is its inverse.
//
// In memory test mode (t_en true) the memory's buses are taken from the
// test port instead: t_addr addresses both ports, t_we and t_wdata write,
// and the FIFO controller sees neither WE nor RE, so it stays as it is.
//
// Timing: write address and data change on the rising edge and are stored
// on the falling edge; the read data are combinational from the read
// address and are latched by the output port on the falling edge.
module fifo_memory
  import se_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               vct,
  // write side
  input  logic               we,
  input  logic [BYTE_AW-1:0] waddr,
  input  se_word_t           wdata,
  output logic               bf,
  // read side
  input  logic               re,
  input  logic [BYTE_AW-1:0] raddr,
  output se_word_t           rdata,
  output logic               pr,
  // errors
  output logic               rerr,
  output logic               ferr,
  // memory test access
  input  logic               t_en,
  input  logic               t_we,
  input  logic [MEM_AW-1:0]  t_addr,
  input  se_word_t           t_wdata
);

  logic [SLOT_AW-1:0] rptr, fptr;

  logic fc_we, fc_re;
  assign fc_we = we && !t_en;
  assign fc_re = re && !t_en;

  fifo_controller u_fc (
    .clk, .rst, .vct, .we(fc_we), .re(fc_re), .rptr, .fptr, .bf, .be(), .pr, .rerr, .ferr
  );

  dual_port_memory u_dpm (
    .clk,
    .we   (t_en ? t_we    : we),
    .waddr(t_en ? t_addr  : {rptr, waddr}),
    .wdata(t_en ? t_wdata : wdata),
    .raddr(t_en ? t_addr  : {fptr, raddr}),
    .rdata(rdata)
  );

endmodule
