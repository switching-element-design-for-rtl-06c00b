// tb_write_address_counter: the write counter clears, counts one per rising
// edge and flags LAST exactly at count 55 (57-byte packets).
module tb_write_address_counter;
  import se_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic clr, last;
  logic [BYTE_AW-1:0] addr;

  write_address_counter dut (.clk, .clr, .addr, .last);

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
    for (int run = 0; run < 3; run++) begin
      automatic int len = (run == 0) ? 64 : 10 + $urandom_range(40);
      @(negedge clk) clr = 1'b1;
      @(negedge clk);
      check(addr == 0 && !last, "cleared");
      clr = 1'b0;
      for (int k = 1; k <= len; k++) begin
        @(negedge clk);
        check(addr == BYTE_AW'(k), $sformatf("count %0d got %0d", k, addr));
        check(last == (BYTE_AW'(k) == BYTE_AW'(PKT_BYTES - 2)), $sformatf("LAST at %0d", k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
