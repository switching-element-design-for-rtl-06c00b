// tb_fifo_memory: writes packets into the FIFO the way an input port does
// (WE for the whole packet, byte address counting from zero on rising
// edges) and reads them back the way an output port does, checking that
// each packet comes back whole and in order, that BF is set with four
// packets stored, and that with VCT a packet can be read one cycle behind
// its own write. Last, memory test mode: every one of the 256 words is
// written and read back through the test bus with two complementary
// patterns, while WE and RE pulses from the ports must leave the FIFO
// controller untouched.
module tb_fifo_memory;
  import se_pkg::*;

  localparam int LEN = 20;   // packet length used here (any up to 64 works)

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, vct, we, re, bf, pr, rerr, ferr;
  logic t_en, t_we;
  logic [MEM_AW-1:0] t_addr;
  se_word_t t_wdata;
  logic [BYTE_AW-1:0] waddr, raddr;
  se_word_t wdata, rdata;

  fifo_memory dut (.clk, .rst, .vct, .we, .waddr, .wdata, .bf, .re, .raddr, .rdata, .pr, .rerr, .ferr,
                   .t_en, .t_we, .t_addr, .t_wdata);

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

  function automatic se_word_t pword(int id, int k);
    return make_word(8'(id * 40 + k));
  endfunction

  task automatic write_pkt(input int id);
    for (int k = 0; k < LEN; k++) begin
      @(posedge clk);
      we = 1'b1; waddr = BYTE_AW'(k); wdata = pword(id, k);
    end
    @(posedge clk) we = 1'b0;
    @(posedge clk);
  endtask

  task automatic read_pkt(input int id);
    bit ok = 1'b1;
    for (int k = 0; k < LEN; k++) begin
      @(posedge clk);
      re = 1'b1; raddr = BYTE_AW'(k);
      @(negedge clk);
      if (rdata != pword(id, k)) ok = 1'b0;
    end
    @(posedge clk) re = 1'b0;
    @(posedge clk);
    check(ok, $sformatf("packet %0d read back", id));
  endtask

  initial begin
    t_en = 1'b0; t_we = 1'b0; t_addr = '0; t_wdata = '0;
    rst = 1'b1; vct = 1'b0; we = 1'b0; re = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    repeat (2) @(posedge clk);
    @(posedge clk) rst = 1'b0;
    repeat (2) @(posedge clk);
    check(!pr && !bf, "empty after reset");
    for (int id = 0; id < 4; id++) write_pkt(id);
    check(bf && pr, "full with four packets");
    read_pkt(0);
    check(!bf, "not full after one read");
    write_pkt(4);
    for (int id = 1; id < 5; id++) read_pkt(id);
    check(!pr, "empty again");

    // cut-through: the reader follows the writer one cycle behind
    vct = 1'b1;
    fork
      write_pkt(5);
      begin
        @(negedge clk iff pr);
        read_pkt(5);
      end
    join
    check(!pr && !rerr && !ferr, "cut-through packet consumed, no errors");

    // memory test mode
    write_pkt(6);
    @(posedge clk) t_en = 1'b1;
    for (int pass = 0; pass < 2; pass++) begin
      int bad = 0;
      for (int a = 0; a < 256; a++) begin
        @(posedge clk);
        t_we = 1'b1; t_addr = MEM_AW'(a);
        t_wdata = make_word(pass == 0 ? 8'(a * 7 + 3) : ~8'(a * 7 + 3));
        // port enables must be ignored in test mode
        we = (a % 50 == 7); re = (a % 50 == 30);
      end
      @(posedge clk) begin t_we = 1'b0; we = 1'b0; re = 1'b0; end
      for (int a = 0; a < 256; a++) begin
        @(posedge clk) t_addr = MEM_AW'(a);
        @(negedge clk);
        if (rdata != make_word(pass == 0 ? 8'(a * 7 + 3) : ~8'(a * 7 + 3))) bad++;
      end
      check(bad == 0, $sformatf("test pass %0d: %0d of 256 words wrong", pass, bad));
    end
    @(posedge clk) t_en = 1'b0;
    repeat (2) @(posedge clk);
    check(pr && !bf && !rerr && !ferr, "FIFO state unchanged by test mode");
    // the one stored packet is still counted: one read empties the FIFO
    for (int k = 0; k < LEN; k++) begin
      @(posedge clk);
      re = 1'b1; raddr = BYTE_AW'(k);
    end
    @(posedge clk) re = 1'b0;
    repeat (2) @(posedge clk);
    check(!pr && !ferr, "slot read after test mode empties the FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
