// fifo_controller: slot pointers and status flags of one FIFO.
//
// Everything here changes on the falling clock edge. Two Mealy machines
// manage the pointers:
//   RPTR machine (writes): on the first cycle of WE, if the FIFO is full
//     the write is an overflow (RERR pulse, pointers untouched until WE
//     ends); otherwise, if VCT is set, BE is cleared at once so the output
//     side may start reading the packet while it is still arriving, and BF
//     is set if the next rear pointer equals the front pointer (NREF). When
//     WE falls the rear pointer advances and BE is cleared.
//   FPTR machine (reads): on the first cycle of RE, reading an empty FIFO
//     is an underflow (FERR pulse). When RE falls, BE is set if the next
//     front pointer equals the rear pointer (NFER), the front pointer
//     advances and BF is cleared.
// BF and BE are set/reset flip-flops; when a set and a reset meet in the
// same cycle the reset (BE false, BF false) wins. RESET clears both
// pointers, sets BE and clears BF. PR (packet ready) is the inverse of BE.
//
// The pointer algorithms, the flags, the compare signals and the error
// names follow the design. The OVFL and UNFL waiting states, which keep a
// faulty transfer from moving a pointer, are this implementation's choice.
module fifo_controller
  import se_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               vct,    // virtual cut-through enable
  input  logic               we,     // write in progress (from an IPS)
  input  logic               re,     // read in progress (from an OPS)
  output logic [SLOT_AW-1:0] rptr,   // slot being / next to be written
  output logic [SLOT_AW-1:0] fptr,   // slot being / next to be read
  output logic               bf,     // buffer full
  output logic               be,     // buffer empty
  output logic               pr,     // packet ready for the output side
  output logic               rerr,   // write to a full buffer (pulse)
  output logic               ferr    // read from an empty buffer (pulse)
);

  typedef enum logic [1:0] {W_INIT, W_IDLE, W_WRITE, W_OVFL} wstate_t;
  typedef enum logic [1:0] {R_INIT, R_IDLE, R_READ, R_UNFL} rstate_t;

  wstate_t wstate, wstate_d;
  rstate_t rstate, rstate_d;

  logic nref, nfer;           // compare module
  logic rinc, finc;           // pointer increments
  logic be_set, be_rst, bf_set, bf_rst;
  logic rerr_d, ferr_d;

  assign nref = (SLOT_AW'(rptr + 1'b1) == fptr);
  assign nfer = (SLOT_AW'(fptr + 1'b1) == rptr);

  // RPTR machine
  always_comb begin
    wstate_d = wstate;
    rinc = 1'b0; be_rst = 1'b0; bf_set = 1'b0; rerr_d = 1'b0;
    unique case (wstate)
      W_INIT:  if (!we) wstate_d = W_IDLE;
      W_IDLE:
        if (we) begin
          if (bf) begin
            rerr_d   = 1'b1;
            wstate_d = W_OVFL;
          end else begin
            if (vct)  be_rst = 1'b1;
            if (nref) bf_set = 1'b1;
            wstate_d = W_WRITE;
          end
        end
      W_WRITE:
        if (!we) begin
          rinc     = 1'b1;
          be_rst   = 1'b1;
          wstate_d = W_IDLE;
        end
      W_OVFL:  if (!we) wstate_d = W_IDLE;
      default: wstate_d = W_INIT;
    endcase
  end

  // FPTR machine
  always_comb begin
    rstate_d = rstate;
    finc = 1'b0; be_set = 1'b0; bf_rst = 1'b0; ferr_d = 1'b0;
    unique case (rstate)
      R_INIT:  if (!re) rstate_d = R_IDLE;
      R_IDLE:
        if (re) begin
          if (be) begin
            ferr_d   = 1'b1;
            rstate_d = R_UNFL;
          end else begin
            rstate_d = R_READ;
          end
        end
      R_READ:
        if (!re) begin
          if (nfer) be_set = 1'b1;
          finc     = 1'b1;
          bf_rst   = 1'b1;
          rstate_d = R_IDLE;
        end
      R_UNFL:  if (!re) rstate_d = R_IDLE;
      default: rstate_d = R_INIT;
    endcase
  end

  always_ff @(negedge clk) begin
    if (rst) begin
      wstate <= W_INIT;
      rstate <= R_INIT;
      rptr   <= '0;
      fptr   <= '0;
      be     <= 1'b1;
      bf     <= 1'b0;
      rerr   <= 1'b0;
      ferr   <= 1'b0;
    end else begin
      wstate <= wstate_d;
      rstate <= rstate_d;
      if (rinc) rptr <= rptr + 1'b1;
      if (finc) fptr <= fptr + 1'b1;
      if (be_rst)      be <= 1'b0;
      else if (be_set) be <= 1'b1;
      if (bf_rst)      bf <= 1'b0;
      else if (bf_set) bf <= 1'b1;
      rerr <= rerr_d;
      ferr <= ferr_d;
    end
  end

  assign pr = !be;

  // Full and empty are never both true.
  a_not_full_and_empty: assert property (@(negedge clk) disable iff (rst) !(bf && be));

endmodule
