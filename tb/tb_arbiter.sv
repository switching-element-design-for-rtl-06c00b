// tb_arbiter: a model of the output port controller answers START by
// dropping DONE on the next falling edge and raises it again after a
// random transfer time. Checks: with both FIFOs always ready the grants
// alternate; with one FIFO ready it is served every time; START and the
// read enable stay true for the whole transfer; DONE false while idle, or
// DONE not answering START, leads to ERROR, and DONE true leaves it.
module tb_arbiter;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, pr0, pr1, done, re0, re1, start, err;
  arbiter dut (.clk, .rst, .pr0, .pr1, .done, .re0, .re1, .start, .err);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit responder_on = 1'b1;
  int grants[$];
  int busy = 0;
  // output port controller model (falling edge)
  always @(negedge clk) begin
    if (responder_on) begin
      if (done && start) begin
        done <= 1'b0;
        busy = 3 + $urandom_range(10);
        grants.push_back(re1 ? 1 : 0);
        if (re0 == re1) begin
          checks++; failures++;
          $display("FAIL: START without exactly one read enable");
        end
      end else if (!done) begin
        if (!start || (re0 == re1)) begin
          checks++; failures++;
          $display("FAIL: START/RE dropped during transfer");
        end
        if (busy > 0) busy--;
        else done <= 1'b1;
      end
    end
  end

  initial begin
    rst = 1'b1; pr0 = 1'b0; pr1 = 1'b0; done = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (3) @(posedge clk);
    check(!start && !err, "idle after reset");

    pr0 = 1'b1; pr1 = 1'b1;
    wait (grants.size() == 10);
    pr0 = 1'b0; pr1 = 1'b0;
    @(posedge clk iff done); repeat (2) @(posedge clk);
    for (int j = 0; j < 10; j++)
      check(grants[j] == (j % 2), $sformatf("grant %0d to FIFO %0d", j, grants[j]));

    grants.delete();
    pr1 = 1'b1;
    wait (grants.size() == 4);
    pr1 = 1'b0;
    @(posedge clk iff done); repeat (2) @(posedge clk);
    for (int j = 0; j < 4; j++) check(grants[j] == 1, "only FIFO 1 ready: served");

    // DONE false while idle
    responder_on = 1'b0;
    @(negedge clk) done = 1'b0;
    repeat (2) @(posedge clk); #1;
    check(err, "DONE false while idle gives ERROR");
    @(negedge clk) done = 1'b1;
    repeat (2) @(posedge clk); #1;
    check(!err, "DONE true leaves ERROR");

    // DONE not answering START
    @(negedge clk) pr0 = 1'b1;
    repeat (2) @(posedge clk); #1;     // IDLE0 -> GOP0 -> ERROR
    check(err && !start, "no answer to START gives ERROR");
    pr0 = 1'b0;
    repeat (2) @(posedge clk); #1;
    check(!err, "back to idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
