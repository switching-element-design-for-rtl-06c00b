// tb_buffer_memory: for each input port i and routing bit o a packet is
// written with WE[i][o]; exactly packet-ready PR[o][i] must come up, and
// reading it with RE[o][i] on output o must return the packet. Then all
// four FIFOs are loaded at once and read back through both outputs.
// Last, memory test mode: each of the four memories is filled through the
// test pins with its own pattern, selected by its FIFO number, and each is
// read back through the test read port; the FIFOs must stay empty.
module tb_buffer_memory;
  import se_pkg::*;

  localparam int LEN = 12;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, vct;
  logic [1:0][1:0] we, bf, re, pr;
  logic [1:0][BYTE_AW-1:0] waddr, raddr;
  se_word_t [1:0] wdata, rdata;
  logic [3:0] rerr, ferr;
  logic mt_en, mt_we;
  logic [1:0] mt_sel;
  logic [MEM_AW-1:0] mt_addr;
  se_word_t mt_wdata, mt_rdata;

  buffer_memory dut (.clk, .rst, .vct, .we, .waddr, .wdata, .bf, .re, .raddr, .rdata, .pr, .rerr, .ferr,
                     .mt_en, .mt_sel, .mt_we, .mt_addr, .mt_wdata, .mt_rdata);

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

  function automatic se_word_t pword(int i, int o, int k);
    return make_word(8'(i * 100 + o * 50 + k));
  endfunction

  task automatic write_pkt(input int i, input int o);
    for (int k = 0; k < LEN; k++) begin
      @(posedge clk);
      we[i][o] = 1'b1; waddr[i] = BYTE_AW'(k); wdata[i] = pword(i, o, k);
    end
    @(posedge clk) we[i][o] = 1'b0;
    @(posedge clk);
  endtask

  task automatic read_pkt(input int o, input int i);
    bit ok = 1'b1;
    for (int k = 0; k < LEN; k++) begin
      @(posedge clk);
      re[o][i] = 1'b1; raddr[o] = BYTE_AW'(k);
      @(negedge clk);
      if (rdata[o] != pword(i, o, k)) ok = 1'b0;
    end
    @(posedge clk) re[o][i] = 1'b0;
    @(posedge clk);
    check(ok, $sformatf("in%0d -> out%0d read back", i, o));
  endtask

  initial begin
    mt_en = 1'b0; mt_we = 1'b0; mt_sel = '0; mt_addr = '0; mt_wdata = '0;
    rst = 1'b1; vct = 1'b0; we = '0; re = '0; waddr = '0; raddr = '0; wdata = '0;
    repeat (2) @(posedge clk);
    @(posedge clk) rst = 1'b0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 2; i++)
      for (int o = 0; o < 2; o++) begin
        write_pkt(i, o);
        check(pr == (4'b1 << (2 * o + i)), $sformatf("in%0d->out%0d: pr=%b", i, o, pr));
        read_pkt(o, i);
        check(pr == '0, "empty after read");
      end
    fork
      begin write_pkt(0, 0); write_pkt(0, 1); end
      begin write_pkt(1, 1); write_pkt(1, 0); end
    join
    check(pr == 4'b1111 && bf == '0, "all four FIFOs hold a packet");
    fork
      begin read_pkt(0, 1); read_pkt(0, 0); end
      begin read_pkt(1, 0); read_pkt(1, 1); end
    join
    check(pr == '0 && rerr == '0 && ferr == '0, "all empty, no errors");

    // memory test mode
    @(posedge clk) mt_en = 1'b1;
    for (int f = 0; f < 4; f++)
      for (int a = 0; a < 256; a++) begin
        @(posedge clk);
        mt_sel = 2'(f); mt_we = 1'b1; mt_addr = MEM_AW'(a);
        mt_wdata = make_word(8'(a ^ (f * 85)));
      end
    @(posedge clk) mt_we = 1'b0;
    for (int f = 0; f < 4; f++) begin
      int bad = 0;
      for (int a = 0; a < 256; a++) begin
        @(posedge clk) begin mt_sel = 2'(f); mt_addr = MEM_AW'(a); end
        @(negedge clk);
        if (mt_rdata != make_word(8'(a ^ (f * 85)))) bad++;
      end
      check(bad == 0, $sformatf("memory %0d through the test port: %0d words wrong", f, bad));
    end
    @(posedge clk) mt_en = 1'b0;
    repeat (2) @(posedge clk);
    check(pr == '0 && bf == '0 && rerr == '0 && ferr == '0, "FIFOs untouched by test mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
