// tb_output_port_server: two FIFO models hold a number of 57-byte packets
// each (byte k of packet n of FIFO f is a known function of f, n and k)
// and raise PR while they hold one; a packet leaves a FIFO when its read
// enable falls. A receiver model on the link acknowledges after a random
// delay. Checks: every packet arrives whole, in order per FIFO; with both
// FIFOs loaded the FIFOs are served alternately; the first header byte
// stays on the link until ACK (WAIT happens); REQ falls with the last byte.
module tb_output_port_server;
  import se_pkg::*;

  localparam int PKT = se_pkg::PKT_BYTES;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, pr0, pr1, re0, re1, req, ack, arb_err, opc_err;
  logic [BYTE_AW-1:0] raddr;
  se_word_t rdata, dout;

  output_port_server dut (.clk, .rst, .cnt_test(1'b0), .pr0, .pr1, .re0, .re1, .raddr, .rdata,
                          .dout, .req, .ack, .arb_err, .opc_err);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] pbyte(int f, int n, int k);
    return 8'(f * 131 + n * 17 + k);
  endfunction

  // FIFO models
  int pending[2], head[2];
  logic re0_q = 1'b0, re1_q = 1'b0;
  assign pr0 = pending[0] > 0;
  assign pr1 = pending[1] > 0;
  always_comb rdata = make_word(pbyte(re1 ? 1 : 0, head[re1 ? 1 : 0], int'(raddr)));
  always @(negedge clk) begin
    if (re0_q && !re0) begin pending[0]--; head[0]++; end
    if (re1_q && !re1) begin pending[1]--; head[1]++; end
    re0_q <= re0;
    re1_q <= re1;
  end

  // receiver
  int stall_pct = 50;
  bit busy = 1'b0;
  logic [7:0] rx[$];
  int rx_n[2];
  int order[$];
  int n_wait = 0;
  always @(negedge clk) if (dut.hold && !ack && dut.u_opc.cnt == 1'b0) n_wait++;

  always @(posedge clk) begin
    if (rst) begin
      ack <= 1'b0;
    end else if (!busy) begin
      if (req && $urandom_range(99) >= stall_pct) begin
        ack <= 1'b1;
        busy = 1'b1;
        rx.delete();
        rx.push_back(dout.data);
      end
    end else begin
      rx.push_back(dout.data);
      check(odd_par(dout.data) == dout.par, "parity on link");
      if (!req) begin
        automatic int f = (rx[0] == pbyte(1, rx_n[1], 0)) ? 1 : 0;
        automatic bit ok = (rx.size() == PKT);
        ack <= 1'b0;
        busy = 1'b0;
        for (int k = 0; k < rx.size() && ok; k++) ok = (rx[k] == pbyte(f, rx_n[f], k));
        check(ok, $sformatf("packet %0d of FIFO %0d (%0d bytes)", rx_n[f], f, rx.size()));
        rx_n[f]++;
        order.push_back(f);
      end
    end
  end

  initial begin
    rst = 1'b1; pending = '{0, 0}; head = '{0, 0}; rx_n = '{0, 0};
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (3) @(posedge clk);
    pending = '{4, 4};
    wait (order.size() == 8);
    for (int j = 0; j < 8; j++) check(order[j] == (j % 2), $sformatf("service %0d from FIFO %0d", j, order[j]));
    repeat (3) @(posedge clk);
    pending[1] = 3;
    wait (order.size() == 11);
    for (int j = 8; j < 11; j++) check(order[j] == 1, "only FIFO 1 loaded");
    repeat (5) @(posedge clk);
    check(n_wait > 0, "first header byte held while waiting for ACK");
    check(!arb_err && !opc_err, "no faults");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
