// buffer_memory: the four packet FIFOs between the input and output
// multiplexers of the 2x2 switching element.
//
// FIFO k = 2*o + i holds packets that arrived on input port i and leave on
// output port o (o is the routing bit). So input port 0 writes FIFOs 0 and
// 2, input port 1 writes FIFOs 1 and 3; output port 0 reads FIFOs 0 and 1,
// output port 1 reads FIFOs 2 and 3 (FM1..FM4 in the design's numbering).
// Each input port server has one write enable per routing bit, and each
// output port server one read enable per input port; the read data of an
// output are taken from the FIFO whose read enable is set (FIFO 2*o when
// neither is). VCT is common to all four FIFOs. In memory test mode the
// memory_test_port gives the pins direct access to all four memories.
module buffer_memory
  import se_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               vct,
  // write side, indexed [input port][routing bit]
  input  logic [1:0][1:0]    we,
  input  logic [1:0][BYTE_AW-1:0] waddr,   // [input port]
  input  se_word_t [1:0]     wdata,        // [input port]
  output logic [1:0][1:0]    bf,
  // read side, indexed [output port][input port]
  input  logic [1:0][1:0]    re,
  input  logic [1:0][BYTE_AW-1:0] raddr,   // [output port]
  output se_word_t [1:0]     rdata,        // [output port]
  output logic [1:0][1:0]    pr,
  // errors, indexed by FIFO number
  output logic [3:0]         rerr,
  output logic [3:0]         ferr,
  // memory test access (see memory_test_port)
  input  logic               mt_en,
  input  logic [1:0]         mt_sel,
  input  logic               mt_we,
  input  logic [MEM_AW-1:0]  mt_addr,
  input  se_word_t           mt_wdata,
  output se_word_t           mt_rdata
);

  se_word_t [3:0] fm_rdata;
  logic     [3:0] fm_twe;

  memory_test_port u_mtp (
    .test(mt_en), .sel(mt_sel), .we(mt_we), .fm_rdata, .fm_we(fm_twe), .rdata(mt_rdata)
  );

  for (genvar o = 0; o < 2; o++) begin : g_out
    for (genvar i = 0; i < 2; i++) begin : g_in
      fifo_memory u_fm (
        .clk, .rst, .vct,
        .we   (we[i][o]),
        .waddr(waddr[i]),
        .wdata(wdata[i]),
        .bf   (bf[i][o]),
        .re   (re[o][i]),
        .raddr(raddr[o]),
        .rdata(fm_rdata[2*o+i]),
        .pr   (pr[o][i]),
        .rerr (rerr[2*o+i]),
        .ferr (ferr[2*o+i]),
        .t_en (mt_en),
        .t_we (fm_twe[2*o+i]),
        .t_addr(mt_addr),
        .t_wdata(mt_wdata)
      );
    end
    assign rdata[o] = re[o][1] ? fm_rdata[2*o+1] : fm_rdata[2*o];
  end

endmodule
