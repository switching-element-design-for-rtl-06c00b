// output_port_controller: sends one packet to the successor element.
//
// A Moore machine clocked on the falling edge, the edge on which an element
// drives its output link.
//   INIT   entered on RESET; DONE is true (it also clears the read address
//          counter). Next IDLE if START, LAST and ACK are all false, else
//          ERROR.
//   IDLE   waits for START; LAST or ACK here is a fault (ERROR).
//   BYTE0  entered as the output latch takes the first header byte. DONE
//          falls (the arbiter sees that START was taken), CNT, HOLD and REQ
//          are true: the first header byte stays on the link until ACK.
//   WAIT   no ACK yet: the counter is stopped and the byte held.
//   XFR    ACK seen: the counter advances and the latch takes a new byte on
//          every cycle. When LAST shows the last byte has been latched the
//          next state is LAST.
//   LAST   REQ false marks the last byte; DONE true tells the arbiter the
//          transfer is over. START, LAST and ACK must then all fall (IDLE),
//          or the machine goes to ERROR.
//   ERROR  shows ERR and DONE, and waits for START, LAST and ACK to fall.
// START falling or LAST rising in BYTE0 or WAIT, and START or ACK falling
// in XFR before LAST, are faults.
//
// States, inputs, outputs and transitions follow the design. The value of
// DONE in ERROR (true, so the arbiter can leave its waiting state) is this
// implementation's choice.
module output_port_controller (
  input  logic clk,
  input  logic rst,
  input  logic start,   // from the arbiter
  input  logic last,    // read counter addresses the last byte
  input  logic ack,     // ACK from the successor
  output logic done,    // ready / transfer finished; clears the read counter
  output logic cnt,     // let the read counter advance
  output logic hold,    // hold the first header byte in the output latch
  output logic req,     // REQ to the successor
  output logic err      // fault detected
);

  typedef enum logic [2:0] {INIT, IDLE, BYTE0, WAIT, XFR, LAST, ERROR} opc_state_t;

  opc_state_t state, state_d;

  always_comb begin
    state_d = state;
    unique case (state)
      INIT:  state_d = (start || last || ack) ? ERROR : IDLE;
      IDLE:  if (last || ack) state_d = ERROR;
             else if (start)  state_d = BYTE0;
      BYTE0: if (!start || last) state_d = ERROR;
             else if (ack)       state_d = XFR;
             else                state_d = WAIT;
      WAIT:  if (!start || last) state_d = ERROR;
             else if (ack)       state_d = XFR;
      XFR:   if (last)                state_d = LAST;
             else if (!start || !ack) state_d = ERROR;
      LAST:  state_d = (start || last || ack) ? ERROR : IDLE;
      ERROR: if (!start && !last && !ack) state_d = IDLE;
      default: state_d = INIT;
    endcase
  end

  always_ff @(negedge clk) begin
    if (rst) state <= INIT;
    else     state <= state_d;
  end

  assign done = (state == INIT) || (state == IDLE) || (state == LAST) || (state == ERROR);
  assign cnt  = (state == BYTE0) || (state == XFR);
  assign hold = (state == BYTE0) || (state == WAIT);
  assign req  = (state == BYTE0) || (state == WAIT) || (state == XFR);
  assign err  = (state == ERROR);

endmodule
