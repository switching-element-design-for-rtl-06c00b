// tb_output_port_controller: drives START, LAST and ACK as the arbiter,
// read counter and successor do (changing on the rising edge) and checks
// the Moore outputs {DONE, CNT, HOLD, REQ, ERR} after each falling edge:
// a transfer acknowledged at once, one that waits for ACK, and the fault
// transitions (ACK while idle, START dropped in BYTE0, ACK dropped in XFR,
// signals that do not fall after LAST).
module tb_output_port_controller;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, start, last, ack, done, cnt, hold, req, err;
  output_port_controller dut (.clk, .rst, .start, .last, .ack, .done, .cnt, .hold, .req, .err);

  int checks = 0, failures = 0, line = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic s, input logic l, input logic a, input logic [4:0] exp);
    @(posedge clk);
    start = s; last = l; ack = a;
    @(negedge clk); #1;
    line++;
    checks++;
    if ({done, cnt, hold, req, err} !== exp) begin
      failures++;
      $display("FAIL step %0d: done,cnt,hold,req,err=%b expected %b", line, {done, cnt, hold, req, err}, exp);
    end
  endtask

  //                          done cnt hold req err
  localparam logic [4:0] IDLE_O  = 5'b10000;
  localparam logic [4:0] BYTE0_O = 5'b01110;
  localparam logic [4:0] WAIT_O  = 5'b00110;
  localparam logic [4:0] XFR_O   = 5'b01010;
  localparam logic [4:0] LAST_O  = 5'b10000;
  localparam logic [4:0] ERR_O   = 5'b10001;

  initial begin
    rst = 1'b1; start = 1'b0; last = 1'b0; ack = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    step(0, 0, 0, IDLE_O);          // INIT -> IDLE
    // immediate ACK
    step(1, 0, 0, BYTE0_O);
    step(1, 0, 1, XFR_O);
    step(1, 0, 1, XFR_O);
    step(1, 1, 1, LAST_O);          // last byte latched: REQ false, DONE
    step(0, 0, 0, IDLE_O);
    // ACK after two cycles
    step(1, 0, 0, BYTE0_O);
    step(1, 0, 0, WAIT_O);
    step(1, 0, 0, WAIT_O);
    step(1, 0, 1, XFR_O);
    step(1, 1, 1, LAST_O);
    step(0, 0, 0, IDLE_O);
    // faults
    step(0, 0, 1, ERR_O);           // ACK while idle
    step(0, 0, 0, IDLE_O);
    step(1, 0, 0, BYTE0_O);
    step(0, 0, 0, ERR_O);           // START dropped in BYTE0
    step(0, 0, 0, IDLE_O);
    step(1, 0, 0, BYTE0_O);
    step(1, 0, 1, XFR_O);
    step(1, 0, 0, ERR_O);           // ACK dropped before LAST
    step(0, 0, 0, IDLE_O);
    step(1, 0, 0, BYTE0_O);
    step(1, 0, 1, XFR_O);
    step(1, 1, 1, LAST_O);
    step(0, 0, 1, ERR_O);           // ACK still true after LAST
    step(0, 0, 0, IDLE_O);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
