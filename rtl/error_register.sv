// error_register: fault log of the switching element.
//
// Every error pulse or level raised by the element's state machines is
// caught in a sticky bit of the error-holding register; ERROR, the single
// error output, is true while any bit is set. Only RESET or CLR (a test
// mode command) clears the register. Parity errors of each input port are
// counted in a saturating counter, so a port with many errors points to a
// faulty link from its predecessor. Sampling is on the rising edge; every
// source holds its error for at least a full clock cycle.
//
// The holding register, the single error output and the parity counters
// follow the design; the counter width and saturation are this
// implementation's choices.
module error_register #(
  parameter int unsigned NERR  = 14,  // number of error sources
  parameter int unsigned NPORT = 2,   // input ports with parity counters
  parameter int unsigned CNT_W = 8    // parity error counter width
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        clr,
  input  logic [NERR-1:0]             err_in,
  input  logic [NPORT-1:0]            perr_in,
  output logic [NERR-1:0]             err_hold,
  output logic                        error,
  output logic [NPORT-1:0][CNT_W-1:0] perr_count
);

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      err_hold   <= '0;
      perr_count <= '0;
    end else begin
      err_hold <= err_hold | err_in;
      for (int p = 0; p < NPORT; p++)
        if (perr_in[p] && perr_count[p] != '1)
          perr_count[p] <= perr_count[p] + 1'b1;
    end
  end

  assign error = |err_hold;

endmodule
