// tb_dual_port_memory: random writes (stored on the falling edge) and
// reads (combinational) at different addresses in the same cycle,
// compared with an array kept by the testbench. Every word is written
// once before the random phase so no read sees an unwritten word.
module tb_dual_port_memory;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       we;
  logic [7:0] waddr, raddr;
  logic [8:0] wdata, rdata;
  logic [8:0] model[256];

  dual_port_memory dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

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

  initial begin
    for (int a = 0; a < 256; a++) begin
      @(posedge clk);
      we = 1'b1; waddr = 8'(a); wdata = 9'($urandom); raddr = 8'(a + 1);
      model[a] = wdata;
    end
    for (int n = 0; n < 3000; n++) begin
      @(posedge clk);
      we    = 1'($urandom_range(1));
      waddr = 8'($urandom);
      wdata = 9'($urandom);
      do raddr = 8'($urandom); while (raddr == waddr);
      #1;
      check(rdata == model[raddr], $sformatf("read %0d: %h expected %h", raddr, rdata, model[raddr]));
      @(negedge clk);
      if (we) model[waddr] = wdata;
      #1;
      check(rdata == model[raddr], $sformatf("read %0d after write", raddr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
