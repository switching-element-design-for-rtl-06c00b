// tb_ips_datapath: checks the input datapath of both port numbers.
//
// Random packets (two header bytes with SHIFT true, then data bytes with
// SHIFT false) are fed one byte per rising edge, some bytes with a wrong
// parity bit. The expected stage-2 output is computed here from the bytes
// sent: the first header byte comes out as {H2[0], H1[7:1]}, the second as
// {PORT, H2[7:1]}, both carrying the incoming parity error if there was one;
// data bytes come out unchanged with corrected parity, two edges later.
// As in the element, one byte time with SHIFT false separates packets.
module tb_ips_datapath;
  import se_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  se_word_t din;
  logic shift;
  logic [1:0] pok, tag;
  se_word_t [1:0] w;

  ips_datapath #(.PORT(1'b0)) dut0 (.clk, .din, .shift, .pok(pok[0]), .tag(tag[0]), .wdata(w[0]));
  ips_datapath #(.PORT(1'b1)) dut1 (.clk, .din, .shift, .pok(pok[1]), .tag(tag[1]), .wdata(w[1]));

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

  se_word_t in_q[$];
  logic     sh_q[$];
  se_word_t exp_q[2][$];
  bit       chk_q[$];     // false for the filler byte, which is never stored

  initial begin
    for (int p = 0; p < 40; p++) begin
      automatic int n = 3 + $urandom_range(6);  // a header and at least one data byte
      automatic logic [7:0] b[];
      automatic logic       bad[];
      b = new[n]; bad = new[n];
      for (int k = 0; k < n; k++) begin
        b[k]   = 8'($urandom);
        bad[k] = ($urandom_range(3) == 0);
      end
      for (int port = 0; port < 2; port++) begin
        automatic se_word_t e;
        e.data = {b[1][0], b[0][7:1]};
        e.par  = odd_par(e.data) ^ bad[0];
        exp_q[port].push_back(e);
        e.data = {1'(port), b[1][7:1]};
        e.par  = odd_par(e.data) ^ bad[1];
        exp_q[port].push_back(e);
        for (int k = 2; k < n; k++) exp_q[port].push_back(make_word(b[k]));
      end
      for (int k = 0; k < n; k++) chk_q.push_back(1'b1);
      for (int k = 0; k < n; k++) begin
        automatic se_word_t x = make_word(b[k]);
        if (bad[k]) x.par = ~x.par;
        in_q.push_back(x);
        sh_q.push_back(k < 2);
      end
      // one cycle with SHIFT false between packets, as in the element
      // (the controller's LAST state), so the last byte leaves straight
      begin
        automatic logic [7:0] f = 8'($urandom);
        in_q.push_back(make_word(f));
        sh_q.push_back(1'b0);
        for (int port = 0; port < 2; port++) exp_q[port].push_back(make_word(f));
        chk_q.push_back(1'b0);
      end
    end
    // two trailing bytes flush the pipeline
    in_q.push_back(make_word(8'h00)); sh_q.push_back(1'b0);
    in_q.push_back(make_word(8'h00)); sh_q.push_back(1'b0);

    for (int m = 0; m < in_q.size(); m++) begin
      @(negedge clk);
      if (m >= 2 && m - 2 < chk_q.size())
        for (int port = 0; port < 2; port++) begin
          automatic se_word_t e = exp_q[port].pop_front();
          if (chk_q[m - 2]) check(w[port] == e, $sformatf("port %0d byte %0d: got %h expected %h", port, m - 2, w[port], e));
        end
      din   = in_q[m];
      shift = sh_q[m];
      #1;
      check(pok[0] == (odd_par(din.data) == din.par) && pok[1] == pok[0], "POK");
      check(tag[0] == din.data[0] && tag[1] == din.data[0], "TAG");
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
