// tb_memory_test_port: exhaustive check of the memory test port's write
// decode and read selection. For every combination of TEST, SEL and WE,
// and random read data in the four memories, exactly the selected memory
// must be written (and only in test mode), and RDATA must show the
// selected memory's word. The block is combinational; each combination is
// applied and checked after a short settling delay, then the clock-free
// test ends.
module tb_memory_test_port;
  import se_pkg::*;

  logic           test, we;
  logic [1:0]     sel;
  se_word_t [3:0] fm_rdata;
  logic [3:0]     fm_we;
  se_word_t       rdata;

  memory_test_port dut (.test, .sel, .we, .fm_rdata, .fm_we, .rdata);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 50; rep++)
      for (int t = 0; t < 2; t++)
        for (int s = 0; s < 4; s++)
          for (int w = 0; w < 2; w++) begin
            test = 1'(t); sel = 2'(s); we = 1'(w);
            for (int f = 0; f < 4; f++) fm_rdata[f] = make_word(8'($urandom));
            #1;
            check(fm_we == ((t == 1 && w == 1) ? (4'b1 << s) : 4'b0000),
                  $sformatf("test=%0d sel=%0d we=%0d: fm_we=%b", t, s, w, fm_we));
            check(rdata == fm_rdata[s], $sformatf("sel=%0d read data", s));
            #1;
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
