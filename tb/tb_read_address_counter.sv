// tb_read_address_counter: the read counter clears, holds while CNT is
// false, counts while CNT is true and flags LAST exactly at count 56.
module tb_read_address_counter;
  import se_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic clr, cnt, last;
  logic [BYTE_AW-1:0] addr;

  read_address_counter dut (.clk, .clr, .cnt, .addr, .last);

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

  int model;
  initial begin
    @(negedge clk) begin clr = 1'b1; cnt = 1'b1; end
    @(negedge clk);
    check(addr == 0, "cleared");
    model = 0;
    clr = 1'b0;
    for (int k = 0; k < 400; k++) begin
      cnt = ($urandom_range(2) != 0);
      clr = ($urandom_range(80) == 0);
      @(negedge clk);
      if (clr) model = 0;
      else if (cnt) model = (model + 1) % 64;
      check(addr == BYTE_AW'(model), $sformatf("step %0d: %0d expected %0d", k, addr, model));
      check(last == (model == PKT_BYTES - 1), $sformatf("LAST at %0d", model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
