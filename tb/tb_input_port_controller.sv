// tb_input_port_controller: drives the controller's inputs one rising edge
// at a time and checks its registered outputs after each edge (and SHIFT
// before it) against the behaviour worked out by hand for: a normal
// packet with a data parity error, a full FIFO holding off ACK, a header
// parity error on either header byte (packet dropped), a slot overflow
// (LAST while REQ), a slot underflow (no LAST at the end) and a packet
// that ends after its first header byte.
module tb_input_port_controller;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, req, tag, pok, bf0, bf1, last;
  logic ack, shift, we0, we1, perr, err;

  input_port_controller dut (.clk, .rst, .req, .tag, .pok, .bf0, .bf1, .last,
                             .ack, .shift, .we0, .we1, .perr, .err);

  int checks = 0, failures = 0;
  int line = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply inputs, check SHIFT before the edge and {ACK,WE0,WE1,PERR,ERR}
  // after it.
  task automatic step(input logic r, input logic t, input logic p, input logic f0,
                      input logic f1, input logic l, input logic sh_exp,
                      input logic [4:0] exp);
    @(negedge clk);
    req = r; tag = t; pok = p; bf0 = f0; bf1 = f1; last = l;
    #1;
    line++;
    checks++;
    if (shift !== sh_exp) begin
      failures++;
      $display("FAIL step %0d: SHIFT=%b expected %b", line, shift, sh_exp);
    end
    @(posedge clk); #1;
    checks++;
    if ({ack, we0, we1, perr, err} !== exp) begin
      failures++;
      $display("FAIL step %0d: ack,we0,we1,perr,err=%b expected %b", line, {ack, we0, we1, perr, err}, exp);
    end
  endtask

  initial begin
    rst = 1'b1; {req, tag, pok, bf0, bf1, last} = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    @(posedge clk);          // INIT -> IDLE
    //    req tag pok bf0 bf1 last shift  ack we0 we1 perr err
    // A: normal packet to FIFO 1, with one bad data byte
    step(0, 0, 1, 0, 0, 0, 1, 5'b00000);
    step(1, 1, 1, 0, 0, 0, 1, 5'b10000);   // IDLE -> BYTE1, ACK
    step(1, 0, 1, 0, 0, 0, 1, 5'b10100);   // BYTE1 -> KEEP1, WE1
    step(1, 0, 1, 0, 0, 0, 0, 5'b10100);
    step(1, 0, 0, 0, 0, 0, 0, 5'b10110);   // bad data parity: PERR pulse
    step(1, 0, 1, 0, 0, 0, 0, 5'b10100);
    step(0, 0, 1, 0, 0, 0, 0, 5'b00100);   // REQ false: ACK false, LAST1
    step(0, 0, 1, 0, 0, 1, 0, 5'b00100);   // LAST true: IDLE, WE1 one more cycle
    step(0, 0, 1, 0, 0, 0, 1, 5'b00000);
    // B: FIFO 0 full holds off ACK, then packet accepted; bad H2 drops it
    step(1, 0, 1, 1, 0, 0, 1, 5'b00000);
    step(1, 0, 1, 1, 0, 0, 1, 5'b00000);
    step(1, 0, 1, 0, 1, 0, 1, 5'b10000);   // BF0 false: ACK, BYTE0
    step(1, 1, 0, 0, 0, 0, 1, 5'b10010);   // bad second header byte: DROP
    step(1, 0, 1, 0, 0, 0, 0, 5'b10000);
    step(0, 0, 1, 0, 0, 0, 0, 5'b00000);   // DROP -> IDLE
    // C: bad first header byte: accepted, dropped
    step(1, 1, 0, 0, 0, 0, 1, 5'b10010);
    step(1, 0, 1, 0, 0, 0, 0, 5'b10000);
    step(0, 0, 1, 0, 0, 0, 0, 5'b00000);
    // D: slot overflow
    step(1, 0, 1, 0, 0, 0, 1, 5'b10000);
    step(1, 0, 1, 0, 0, 0, 1, 5'b11000);
    step(1, 0, 1, 0, 0, 0, 0, 5'b11000);
    step(1, 0, 1, 0, 0, 1, 0, 5'b10001);   // LAST while REQ: ERROR, stop storing
    step(1, 0, 1, 0, 0, 0, 0, 5'b10000);
    step(0, 0, 1, 0, 0, 0, 0, 5'b00000);   // ERROR -> IDLE
    // E: slot underflow
    step(1, 1, 1, 0, 0, 0, 1, 5'b10000);
    step(1, 0, 1, 0, 0, 0, 1, 5'b10100);
    step(0, 0, 1, 0, 0, 0, 0, 5'b00100);
    step(0, 0, 1, 0, 0, 0, 0, 5'b00101);   // no LAST: ERR
    step(0, 0, 1, 0, 0, 0, 1, 5'b00000);
    // F: packet ends in BYTE0
    step(1, 0, 1, 0, 0, 0, 1, 5'b10000);
    step(0, 0, 1, 0, 0, 0, 1, 5'b00001);
    step(0, 0, 1, 0, 0, 0, 1, 5'b00000);
    // G: reset in the middle of a packet
    step(1, 0, 1, 0, 0, 0, 1, 5'b10000);
    step(1, 0, 1, 0, 0, 0, 1, 5'b11000);
    @(negedge clk) rst = 1'b1;
    @(posedge clk); #1;
    checks++;
    if ({ack, we0, we1, perr, err} !== 5'b00000) begin
      failures++;
      $display("FAIL: outputs not cleared by RESET");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
