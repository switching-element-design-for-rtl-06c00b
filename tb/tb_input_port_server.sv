// tb_input_port_server: a transmitter model sends 57-byte packets to one
// input port server (port 1) over the REQ/ACK link, and a memory model
// stores what the server writes, falling edge by falling edge, for each
// write enable. Checks: the packet goes to the FIFO chosen by bit 0 of the
// header; the stored header is the tag rotated right with the port number
// in bit 15; data bytes are stored in order with correct parity (a bad one
// is corrected and counted); a full FIFO holds off ACK; a header parity
// error drops the packet; the first write comes two rising edges after
// ACK rose.
module tb_input_port_server;
  import se_pkg::*;

  localparam int PKT = se_pkg::PKT_BYTES;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, req, ack, bf0, bf1, we0, we1, perr, err;
  se_word_t din, wdata;
  logic [BYTE_AW-1:0] waddr;

  input_port_server #(.PORT(1'b1)) dut (
    .clk, .rst, .cnt_test(1'b0), .din, .req, .ack, .bf0, .bf1, .we0, .we1, .waddr, .wdata, .perr, .err
  );

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

  // memory model: one slot per FIFO, and a count of written bytes
  se_word_t mem[2][64];
  int       nwr[2];
  int       cyc = 0, t_ack = 0, t_we = 0;
  int       nperr = 0, nerr = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (ack && t_ack == 0) t_ack = cyc;
  always @(negedge clk) begin
    if (we0) begin mem[0][waddr] = wdata; nwr[0]++; end
    if (we1) begin mem[1][waddr] = wdata; nwr[1]++; end
    if ((we0 || we1) && t_we == 0) t_we = cyc;
  end
  always @(posedge clk) begin
    if (!rst && perr) nperr++;
    if (!rst && err) nerr++;
  end

  function automatic logic [7:0] pbyte(int seq, int k);
    return 8'((seq * 29) + (k * 7) + (k >> 3));
  endfunction

  task automatic send(input int seq, input bit dst, input int bad_k = -1);
    se_word_t w;
    @(negedge clk);
    w = make_word({pbyte(seq, 0)[7:1], dst});
    if (bad_k == 0) w.par = ~w.par;
    din = w; req = 1'b1;
    do @(negedge clk); while (!ack);
    for (int k = 1; k < PKT; k++) begin
      w = make_word(pbyte(seq, k));
      if (bad_k == k) w.par = ~w.par;
      din = w;
      if (k == PKT - 1) req = 1'b0;
      if (k < PKT - 1) @(negedge clk);
    end
    do @(negedge clk); while (ack);
    repeat (2) @(negedge clk);
  endtask

  task automatic check_slot(input int seq, input bit dst);
    logic [15:0] tag, rot;
    tag = {pbyte(seq, 1), pbyte(seq, 0)[7:1], dst};
    rot = {1'b1, tag[15:1]};
    check(mem[dst][0] == make_word(rot[7:0]), $sformatf("seq %0d header byte 1: %h", seq, mem[dst][0]));
    check(mem[dst][1] == make_word(rot[15:8]), $sformatf("seq %0d header byte 2: %h", seq, mem[dst][1]));
    for (int k = 2; k < PKT; k++)
      check(mem[dst][k] == make_word(pbyte(seq, k)), $sformatf("seq %0d byte %0d", seq, k));
  endtask

  initial begin
    rst = 1'b1; req = 1'b0; din = '0; bf0 = 1'b0; bf1 = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (2) @(posedge clk);

    nwr = '{0, 0};
    send(1, 1'b1);
    check(nwr[1] == PKT && nwr[0] == 0, $sformatf("writes %0d/%0d", nwr[0], nwr[1]));
    check(t_we - t_ack == 1, $sformatf("first write %0d edges after ACK", t_we - t_ack + 1));
    check_slot(1, 1'b1);

    nwr = '{0, 0};
    send(2, 1'b0, 30);
    check(nwr[0] == PKT && nwr[1] == 0, "packet 2 to FIFO 0");
    check_slot(2, 1'b0);
    check(nperr == 1, "data parity error counted");

    // full FIFO 1: ACK must wait
    bf1 = 1'b1;
    fork
      send(3, 1'b1);
      begin
        repeat (20) @(posedge clk);
        check(req && !ack, "ACK held off while FIFO full");
        bf1 = 1'b0;
      end
    join
    check_slot(3, 1'b1);

    // header parity error: nothing stored
    nwr = '{0, 0};
    send(4, 1'b0, 0);
    check(nwr[0] == 0 && nwr[1] == 0, "bad header not stored");
    check(nperr == 2, "header parity error counted");
    check(nerr == 0, "no protocol errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
