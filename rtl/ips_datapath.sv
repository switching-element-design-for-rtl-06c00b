// ips_datapath: input port server datapath of the switching element.
//
// Two nine-bit registers in series, both loaded on every rising clock edge
// (the edge on which an element latches its inputs). A parity generator
// computes odd parity for the arriving byte; POK is true when it equals the
// arriving parity bit.
//
// While SHIFT is true (the two header bytes) the pair of registers rotates
// the 16-bit routing tag right by one bit: stage 1 loads the arriving byte
// shifted right with this port's number in bit 7, and stage 2 loads stage 1
// with bit 7 replaced by bit 0 of the byte now arriving. After the two header
// bytes have passed, stage 2 holds the first rotated header byte and stage 1
// the second, whose bit 7 is the arriving port. The parity of each shifted
// byte is adjusted from the incoming parity (flipped when the bit shifted
// out differs from the bit shifted in), so a header parity error survives
// the rotation. While SHIFT is false the bytes pass straight through and
// stage 1 stores the regenerated parity, which corrects a bad data parity.
//
// Timing: din is sampled on the rising edge; wdata (stage 2) is the byte
// written to the buffer memory two rising edges after it arrived. POK and
// TAG are combinational from din. The structure follows the design; the
// parity-adjust formula is this implementation's own.
module ips_datapath
  import se_pkg::*;
#(
  parameter bit PORT = 1'b0     // number of this input port (0 upper, 1 lower)
) (
  input  logic     clk,
  input  se_word_t din,         // byte from the predecessor element
  input  logic     shift,       // rotate header (from the port controller)
  output logic     pok,         // parity of din is correct
  output logic     tag,         // routing bit: bit 0 of din
  output se_word_t wdata        // stage 2: byte to buffer memory
);

  se_word_t s1, s2;
  se_word_t s1_d, s2_d;

  assign pok = (odd_par(din.data) == din.par);
  assign tag = din.data[0];

  always_comb begin
    if (shift) begin
      s1_d.data = {PORT, din.data[DATA_W-1:1]};
      s1_d.par  = din.par ^ din.data[0] ^ PORT;
      s2_d.data = {din.data[0], s1.data[DATA_W-2:0]};
      s2_d.par  = s1.par ^ s1.data[DATA_W-1] ^ din.data[0];
    end else begin
      s1_d = make_word(din.data);
      s2_d = s1;
    end
  end

  always_ff @(posedge clk) begin
    s1 <= s1_d;
    s2 <= s2_d;
  end

  assign wdata = s2;

endmodule
