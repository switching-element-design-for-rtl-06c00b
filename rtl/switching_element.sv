// switching_element: a 2x2 buffered switching element for a self-routing
// delta network (the building block of an ATM switch fabric).
//
// Packets of PKT_BYTES nine-bit words (byte plus odd parity) arrive on two
// input links and leave on two output links, each link a byte lane with a
// REQ/ACK handshake. Bit 0 of the 16-bit routing tag (the first header
// byte) picks the output: 0 upper, 1 lower. Buffers sit between the input
// and output multiplexers: four FIFOs of four packet slots, one per
// (input, output) pair, so a packet blocked for one output does not hold
// up a packet from the same input headed for the other output.
//
//   input_port_server x2   handshake, parity check, tag rotation, writes
//                           the packet into the FIFO of its output
//   buffer_memory           four FIFOs (controller + 256x9 memory each)
//   output_port_server x2   rotating arbitration between its two FIFOs,
//                           handshake with the successor
//   error_register          sticky error bits and parity error counts
//   counter_self_test       in test mode, runs the four byte counters
//                           together and flags any disagreement
//   memory_test_port        (inside buffer_memory) in memory test mode,
//                           hands the four memories' buses to the mem_* pins
//
// The routing tag is rotated right by one bit on the way through and the
// input port number enters at bit 15, so the next stage again uses bit 0
// and at the destination the tag holds the source path. Packets with a
// header parity error are accepted and discarded; data parity errors are
// corrected and counted.
//
// Clocking: one clock. The input side and the arbiters change on its
// rising edge, the FIFO controllers, memory writes and the output side on
// its falling edge. Link data and REQ leave on the falling edge and are
// sampled on the rising edge of the receiving element; ACK leaves on the
// rising edge. With VCT (virtual cut-through) true a packet starts leaving
// while it is still arriving: the first header byte leaves three clock
// cycles after it was put on the input link, if the output is free. With
// VCT false a packet must be stored entirely first.
//
// Error bits (err_hold): [1:0] input port protocol/length errors, [5:2]
// FIFO overflow (write to a full FIFO), [9:6] FIFO underflow (read from an
// empty FIFO), [11:10] arbiter faults, [13:12] output controller faults.
module switching_element
  import se_pkg::*;
#(
  parameter int unsigned PKT_BYTES_P = se_pkg::PKT_BYTES,  // bytes per packet
  parameter int unsigned PERR_W      = 8                   // parity counter width
) (
  input  logic                         clk,
  input  logic                         rst,        // synchronous, active high
  input  logic                         vct,        // virtual cut-through enable
  input  logic                         err_clr,    // clear the error log
  input  logic                         cnt_test,   // counter test mode (no traffic)
  // input links, from the predecessor elements
  input  se_word_t [1:0]               in_data,
  input  logic [1:0]                   in_req,
  output logic [1:0]                   in_ack,
  // output links, to the successor elements
  output se_word_t [1:0]               out_data,
  output logic [1:0]                   out_req,
  input  logic [1:0]                   out_ack,
  // fault reporting
  output logic                         error,
  output logic                         cnt_err,    // counter self-test mismatch
  output logic [13:0]                  err_hold,
  output logic [1:0][PERR_W-1:0]       perr_count,
  // buffer memory test access (test mode, no traffic)
  input  logic                         mem_test,   // pins own the memory buses
  input  logic [1:0]                   mem_sel,    // FIFO number 0..3
  input  logic                         mem_we,     // write the selected memory
  input  logic [MEM_AW-1:0]            mem_addr,
  input  se_word_t                     mem_wdata,
  output se_word_t                     mem_rdata
);

  logic [1:0][1:0]         we, bf, re, pr;
  logic [1:0][BYTE_AW-1:0] waddr, raddr;
  se_word_t [1:0]          wdata, rdata;
  logic [1:0]              ips_perr, ips_err, arb_err, opc_err;
  logic [3:0]              rerr, ferr;

  for (genvar i = 0; i < 2; i++) begin : g_ips
    input_port_server #(.PORT(1'(i)), .PKT_BYTES_P(PKT_BYTES_P)) u_ips (
      .clk, .rst, .cnt_test,
      .din  (in_data[i]),
      .req  (in_req[i]),
      .ack  (in_ack[i]),
      .bf0  (bf[i][0]),
      .bf1  (bf[i][1]),
      .we0  (we[i][0]),
      .we1  (we[i][1]),
      .waddr(waddr[i]),
      .wdata(wdata[i]),
      .perr (ips_perr[i]),
      .err  (ips_err[i])
    );
  end

  buffer_memory u_bm (
    .clk, .rst, .vct,
    .we, .waddr, .wdata, .bf,
    .re, .raddr, .rdata, .pr,
    .rerr, .ferr,
    .mt_en(mem_test), .mt_sel(mem_sel), .mt_we(mem_we),
    .mt_addr(mem_addr), .mt_wdata(mem_wdata), .mt_rdata(mem_rdata)
  );

  for (genvar o = 0; o < 2; o++) begin : g_ops
    output_port_server #(.PKT_BYTES_P(PKT_BYTES_P)) u_ops (
      .clk, .rst, .cnt_test,
      .pr0    (pr[o][0]),
      .pr1    (pr[o][1]),
      .re0    (re[o][0]),
      .re1    (re[o][1]),
      .raddr  (raddr[o]),
      .rdata  (rdata[o]),
      .dout   (out_data[o]),
      .req    (out_req[o]),
      .ack    (out_ack[o]),
      .arb_err(arb_err[o]),
      .opc_err(opc_err[o])
    );
  end

  counter_self_test #(.N(4), .W(BYTE_AW)) u_cst (
    .clk, .rst,
    .test (cnt_test),
    .count({raddr[1], raddr[0], waddr[1], waddr[0]}),
    .err  (cnt_err)
  );

  error_register #(.NERR(14), .NPORT(2), .CNT_W(PERR_W)) u_err (
    .clk, .rst,
    .clr       (err_clr),
    .err_in    ({opc_err, arb_err, ferr, rerr, ips_err}),
    .perr_in   (ips_perr),
    .err_hold,
    .error,
    .perr_count
  );

endmodule
