// tb_error_register: error pulses are held until CLR or RESET, ERROR is
// their OR, and parity errors are counted per port and saturate.
module tb_error_register;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, clr, error;
  logic [13:0] err_in, err_hold;
  logic [1:0] perr_in;
  logic [1:0][7:0] perr_count;

  error_register dut (.clk, .rst, .clr, .err_in, .perr_in, .err_hold, .error, .perr_count);

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

  logic [13:0] model;
  int c0, c1;
  initial begin
    rst = 1'b1; clr = 1'b0; err_in = '0; perr_in = '0;
    @(negedge clk) rst = 1'b0;
    @(negedge clk);
    check(!error && err_hold == '0 && perr_count == '0, "clear after reset");
    model = '0; c0 = 0; c1 = 0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      err_in  = ($urandom_range(9) == 0) ? 14'(1 << $urandom_range(13)) : '0;
      perr_in = 2'($urandom);
      if (n == 150) clr = 1'b1; else clr = 1'b0;
      @(negedge clk);
      if (clr) begin model = '0; c0 = 0; c1 = 0; end
      else begin
        model |= err_in;
        if (perr_in[0] && c0 < 255) c0++;
        if (perr_in[1] && c1 < 255) c1++;
      end
      err_in = '0; perr_in = '0; clr = 1'b0;
      check(err_hold == model && error == (model != 0), $sformatf("hold %h expected %h", err_hold, model));
      check(perr_count[0] == 8'(c0) && perr_count[1] == 8'(c1), "parity counts");
    end
    perr_in = 2'b01;
    repeat (300) @(negedge clk);
    check(perr_count[0] == 8'hff, "count saturates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
