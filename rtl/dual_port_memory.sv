// dual_port_memory: buffer storage of one FIFO, 256 words of 9 bits.
//
// Separate write and read ports with their own addresses, so a byte can be
// written and another read in the same cycle. The write port stores wdata
// at waddr on the falling clock edge while we is true; the read port is
// asynchronous: rdata follows raddr within the cycle, and the output port
// latches it on the falling edge. The two ports never address the same word
// at once, so no read-during-write behaviour is defined. The size follows
// the design; the port timing is this implementation's reading of the
// write and read timing of the buffer.
module dual_port_memory
  import se_pkg::*;
#(
  parameter int unsigned AW = se_pkg::MEM_AW,   // 8 address bits: 256 words
  parameter int unsigned W  = $bits(se_word_t)  // 9 bits per word
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [2**AW];

  always_ff @(negedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
