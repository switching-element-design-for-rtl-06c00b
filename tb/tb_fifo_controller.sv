// tb_fifo_controller: drives WE and RE as the port servers do (changing on
// the rising edge, one packet per pulse) and checks pointers and flags
// after the falling edges: store-and-forward (PR only after the write),
// virtual cut-through (PR as soon as the write starts), full after four
// packets, overflow and underflow errors that leave the pointers alone,
// and a read and a write ending together.
module tb_fifo_controller;
  import se_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, vct, we, re, bf, be, pr, rerr, ferr;
  logic [1:0] rptr, fptr;

  fifo_controller dut (.clk, .rst, .vct, .we, .re, .rptr, .fptr, .bf, .be, .pr, .rerr, .ferr);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nrerr = 0, nferr = 0;
  always @(negedge clk) begin
    #1;
    if (rerr) nrerr++;
    if (ferr) nferr++;
  end

  // state after the next falling edge
  task automatic expect_state(input logic [1:0] r, input logic [1:0] f, input logic full,
                              input logic empty, input string what);
    @(negedge clk); #2;
    check(rptr == r && fptr == f && bf == full && be == empty && pr == !empty,
          $sformatf("%s: rptr=%0d fptr=%0d bf=%b be=%b pr=%b", what, rptr, fptr, bf, be, pr));
  endtask

  task automatic pulse(ref logic sig, input int len);
    @(posedge clk) sig = 1'b1;
    repeat (len) @(posedge clk);
    sig = 1'b0;
  endtask

  initial begin
    rst = 1'b1; vct = 1'b0; we = 1'b0; re = 1'b0;
    repeat (2) @(posedge clk);
    @(posedge clk) rst = 1'b0;
    expect_state(0, 0, 0, 1, "after reset");

    // store and forward: no packet ready during the write
    @(posedge clk) we = 1'b1;
    expect_state(0, 0, 0, 1, "SAF write in progress");
    repeat (3) @(posedge clk);
    we = 1'b0;
    expect_state(1, 0, 0, 0, "SAF write done");

    // read it: empty again
    pulse(re, 4);
    expect_state(1, 1, 0, 1, "read done");

    // cut-through: ready as soon as the write starts
    vct = 1'b1;
    @(posedge clk) we = 1'b1;
    expect_state(1, 1, 0, 0, "VCT write in progress");
    repeat (3) @(posedge clk);
    we = 1'b0;
    expect_state(2, 1, 0, 0, "VCT write done");

    // three more packets: the fourth write sets BF when it starts
    pulse(we, 3); expect_state(3, 1, 0, 0, "2 stored");
    pulse(we, 3); expect_state(0, 1, 0, 0, "3 stored");
    @(posedge clk) we = 1'b1;
    expect_state(0, 1, 1, 0, "full as 4th write starts");
    repeat (2) @(posedge clk);
    we = 1'b0;
    expect_state(1, 1, 1, 0, "4 stored");

    // write to a full FIFO
    pulse(we, 3);
    expect_state(1, 1, 1, 0, "overflow leaves pointers");
    check(nrerr == 1 && nferr == 0, "one overflow error");

    // read all four
    pulse(re, 3); expect_state(1, 2, 0, 0, "read 1");
    pulse(re, 3); expect_state(1, 3, 0, 0, "read 2");
    pulse(re, 3); expect_state(1, 0, 0, 0, "read 3");
    pulse(re, 3); expect_state(1, 1, 0, 1, "read 4, empty");

    // read from an empty FIFO
    pulse(re, 2);
    expect_state(1, 1, 0, 1, "underflow leaves pointers");
    check(nferr == 1, "one underflow error");

    // a read of packet A ends in the cycle packet B's write ends
    pulse(we, 3); expect_state(2, 1, 0, 0, "A stored");
    fork
      pulse(we, 6);
      begin @(posedge clk); pulse(re, 5); end
    join
    expect_state(3, 2, 0, 0, "A read and B stored together");
    pulse(re, 3); expect_state(3, 3, 0, 1, "B read");

    // reset returns to the initial state
    @(posedge clk) rst = 1'b1;
    @(posedge clk) rst = 1'b0;
    expect_state(0, 0, 0, 1, "reset again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
