// arbiter: rotating-priority selection between the two FIFOs of an output.
//
// A Moore machine clocked on the rising edge. The idle state records which
// FIFO has priority: in IDLEx, if PRx is true the next state is GOPx
// whatever PRy is, otherwise GOPy if PRy is true. GOPx raises START and the
// read enable REx; the output port controller must answer by dropping DONE,
// and the arbiter then waits in Px (START and REx still true) until DONE is
// true again, when it goes to IDLEy so that the other FIFO has priority.
// DONE being false in INIT or an idle state, or still true in a GOP state,
// is a fault: the ERROR state shows ERR and waits for DONE before
// returning to IDLE0. RESET gives INIT; the next state is IDLE0.
//
// States, transitions and outputs follow the design. Because the output
// port controller runs on the falling edge, its answer to START arrives
// half a cycle later, before the arbiter's next rising edge.
module arbiter (
  input  logic clk,
  input  logic rst,
  input  logic pr0,    // FIFO 0 has a packet ready
  input  logic pr1,    // FIFO 1 has a packet ready
  input  logic done,   // output port controller idle / transfer finished
  output logic re0,    // read FIFO 0
  output logic re1,    // read FIFO 1
  output logic start,  // start a transfer
  output logic err     // fault detected
);

  typedef enum logic [2:0] {INIT, IDLE0, IDLE1, GOP0, GOP1, P0, P1, ERROR} arb_state_t;

  arb_state_t state, state_d;

  always_comb begin
    state_d = state;
    unique case (state)
      INIT:  state_d = done ? IDLE0 : ERROR;
      IDLE0: if (!done) state_d = ERROR;
             else if (pr0) state_d = GOP0;
             else if (pr1) state_d = GOP1;
      IDLE1: if (!done) state_d = ERROR;
             else if (pr1) state_d = GOP1;
             else if (pr0) state_d = GOP0;
      GOP0:  state_d = done ? ERROR : P0;
      GOP1:  state_d = done ? ERROR : P1;
      P0:    if (done) state_d = IDLE1;
      P1:    if (done) state_d = IDLE0;
      ERROR: if (done) state_d = IDLE0;
      default: state_d = INIT;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= INIT;
    else     state <= state_d;
  end

  assign re0   = (state == GOP0) || (state == P0);
  assign re1   = (state == GOP1) || (state == P1);
  assign start = re0 || re1;
  assign err   = (state == ERROR);

endmodule
