// input_port_controller: control FSM of one input port server.
//
// A Mealy machine clocked on the rising edge. Its outputs ACK, WE0, WE1,
// PERR and ERR are registered together with the state (each is the output
// of the transition just taken), so they are stable for the falling-edge
// machines that use them. SHIFT is decoded from the state without a
// register, because the datapath multiplexers need it before the same edge.
//
//   INIT   entered on RESET, clears the outputs; then IDLE.
//   IDLE   waits for REQ. A first header byte with bad parity is accepted
//          (ACK) but not stored: PERR, go to DROP. Otherwise the TAG bit x
//          (bit 0 of the byte) picks FIFO x; if its BFx is false ACK is set
//          and the next state is BYTEx, else ACK stays false and the
//          predecessor keeps offering the byte.
//   BYTEx  second header byte arriving: bad parity gives PERR and DROP,
//          good parity gives WEx and KEEPx.
//   KEEPx  data bytes are stored; a data byte with bad parity gives a PERR
//          pulse (the datapath has corrected it). LAST while REQ is still
//          true means the slot overflowed: ERR, stop storing, go to ERROR.
//          REQ false means the last byte is on the bus: ACK false, LASTx.
//   LASTx  the last byte is written; LAST must be true now, otherwise the
//          packet was short and ERR is set. Back to IDLE. WEx stays true
//          for this one more cycle so the last byte reaches memory.
//   DROP   keeps ACK true until REQ falls, then IDLE.
//   ERROR  holds ERR for a cycle and waits for REQ to fall, then IDLE.
//
// The states, inputs and outputs follow the design. Choices of this
// implementation: REQ falling in BYTEx (a packet of under three bytes) is
// treated as an error that returns straight to IDLE; PERR and ERR are
// one-cycle pulses, made sticky by the error register.
module input_port_controller (
  input  logic clk,
  input  logic rst,      // RESET: synchronous, active high
  input  logic req,      // REQ from the predecessor
  input  logic tag,      // routing bit of the first header byte
  input  logic pok,      // parity of the arriving byte is correct
  input  logic bf0,      // FIFO for tag 0 is full
  input  logic bf1,      // FIFO for tag 1 is full
  input  logic last,     // write counter is at the last-but-one byte
  output logic ack,      // ACK to the predecessor
  output logic shift,    // datapath rotates the header
  output logic we0,      // write enable, FIFO for tag 0
  output logic we1,      // write enable, FIFO for tag 1
  output logic perr,     // parity error seen (pulse)
  output logic err       // protocol or length error (pulse)
);

  typedef enum logic [3:0] {
    INIT, IDLE, BYTE0, BYTE1, KEEP0, KEEP1, LAST0, LAST1, DROP, ERROR
  } ipc_state_t;

  ipc_state_t state;

  assign shift = (state == IDLE) || (state == BYTE0) || (state == BYTE1);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= INIT;
      ack <= 1'b0; we0 <= 1'b0; we1 <= 1'b0; perr <= 1'b0; err <= 1'b0;
    end else begin
      perr <= 1'b0;
      err  <= 1'b0;
      unique case (state)
        INIT: begin
          state <= IDLE;
          ack <= 1'b0; we0 <= 1'b0; we1 <= 1'b0;
        end
        IDLE: begin
          we0 <= 1'b0;
          we1 <= 1'b0;
          ack <= 1'b0;
          if (req) begin
            if (!pok) begin
              ack   <= 1'b1;
              perr  <= 1'b1;
              state <= DROP;
            end else if (!tag && !bf0) begin
              ack   <= 1'b1;
              state <= BYTE0;
            end else if (tag && !bf1) begin
              ack   <= 1'b1;
              state <= BYTE1;
            end
          end
        end
        BYTE0, BYTE1: begin
          if (!req) begin
            ack   <= 1'b0;
            err   <= 1'b1;
            state <= IDLE;
          end else if (!pok) begin
            perr  <= 1'b1;
            state <= DROP;
          end else if (state == BYTE0) begin
            we0   <= 1'b1;
            state <= KEEP0;
          end else begin
            we1   <= 1'b1;
            state <= KEEP1;
          end
        end
        KEEP0, KEEP1: begin
          perr <= !pok;
          if (req) begin
            if (last) begin
              we0   <= 1'b0;
              we1   <= 1'b0;
              err   <= 1'b1;
              state <= ERROR;
            end
          end else begin
            ack   <= 1'b0;
            state <= (state == KEEP0) ? LAST0 : LAST1;
          end
        end
        LAST0, LAST1: begin
          if (!last) err <= 1'b1;
          state <= IDLE;
        end
        DROP: begin
          if (!req) begin
            ack   <= 1'b0;
            state <= IDLE;
          end
        end
        ERROR: begin
          if (!req) begin
            ack   <= 1'b0;
            state <= IDLE;
          end
        end
        default: state <= INIT;
      endcase
    end
  end

  // A write enable only ever addresses one FIFO.
  a_one_we: assert property (@(posedge clk) disable iff (rst) !(we0 && we1));
  // ACK is only raised in answer to REQ.
  a_ack_on_req: assert property (@(posedge clk) disable iff (rst)
                                 $rose(ack) |-> $past(req));

endmodule
