// tb_counter_self_test: four model counters count together in test mode;
// no error may be raised. Then one of them is made to skip a count at a
// random point, and the error must rise on the next edge and stay until
// test mode ends.
module tb_counter_self_test;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, test, err;
  logic [3:0][5:0] count;

  counter_self_test dut (.clk, .rst, .test, .count, .err);

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

  initial begin
    rst = 1'b1; test = 1'b0; count = '0;
    @(negedge clk) rst = 1'b0;
    for (int run = 0; run < 8; run++) begin
      int bad_at, who;
      bad_at = (run == 0) ? 1000 : $urandom_range(63);
      who = $urandom_range(3);
      @(negedge clk) begin test = 1'b1; count = '0; end
      for (int k = 0; k < 64; k++) begin
        @(posedge clk); #1;
        if (k <= bad_at) check(!err, $sformatf("run %0d: no error at %0d", run, k));
        else             check(err, $sformatf("run %0d: error after %0d", run, bad_at));
        @(negedge clk);
        for (int i = 0; i < 4; i++) count[i] = 6'(k + 1);
        if (k + 1 > bad_at) count[who] = 6'(k + 2);
      end
      @(negedge clk) test = 1'b0;
      @(posedge clk); #1;
      check(!err, "error cleared when test mode ends");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
