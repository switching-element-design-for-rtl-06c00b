// tb_switching_element: end-to-end test of the 2x2 switching element at its
// default size (57-byte packets, four 4-slot FIFOs).
//
// Two transmitter models drive the input links with the REQ/ACK protocol
// (data and REQ on the falling edge, ACK sampled on the falling edge); two
// receiver models on the output links sample on the rising edge and raise
// ACK at random or on command, creating back-pressure. Every packet carries
// its input port, destination and a sequence number in its header, and data
// bytes computed from them, so the receiver can rebuild what it must see.
// A scoreboard keeps, for each (input, output) pair, the sequence numbers
// still expected, in order.
//
// Phases: cut-through latency (3 cycles) and store-and-forward latency
// (PKT_BYTES+3 cycles); header parity errors (dropped) and data parity
// errors (corrected and counted); a full FIFO stalling its input link;
// arbitration between two full FIFOs (alternating service); random traffic
// with random stalls in both modes; short and long packets (error register);
// the packet period on a busy link (PKT_BYTES+1 cycles); the counter
// self-test mode; the memory test mode (every word of the four memories
// written and read through the test pins, then normal traffic again).
// Each mechanism is counted and one that never happened is a failure.
module tb_switching_element;
  import se_pkg::*;

  localparam int PKT = se_pkg::PKT_BYTES;

  logic clk = 1'b0;
  logic rst, vct, err_clr, cnt_test, cnt_err;
  se_word_t [1:0] in_data;
  logic [1:0] in_req, in_ack;
  se_word_t [1:0] out_data;
  logic [1:0] out_req, out_ack;
  logic error;
  logic [13:0] err_hold;
  logic [1:0][7:0] perr_count;
  logic mem_test, mem_we;
  logic [1:0] mem_sel;
  logic [MEM_AW-1:0] mem_addr;
  se_word_t mem_wdata, mem_rdata;

  switching_element dut (
    .clk, .rst, .vct, .err_clr, .cnt_test,
    .in_data, .in_req, .in_ack,
    .out_data, .out_req, .out_ack,
    .error, .cnt_err, .err_hold, .perr_count,
    .mem_test, .mem_sel, .mem_we, .mem_addr, .mem_wdata, .mem_rdata
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ---------------------------------------------------------------- packets
  // Original header: H1 = {seq[6:0], dst}, H2 = {seq[14:7]}.
  function automatic logic [7:0] pkt_byte(int src, int dst, int seq, int k);
    if (k == 0) return {seq[6:0], dst[0]};
    if (k == 1) return seq[14:7];
    return 8'((seq * 37) ^ (k * 11) ^ (src * 101) ^ (dst * 53));
  endfunction

  int exp_q[2][2][$];    // [in][out] expected sequence numbers
  int exp_len_bad[int];  // seq -> 1 when only bytes 0..PKT-2 are defined
  int seq_ctr = 1;

  // mechanism counters
  int n_cut = 0, n_saf = 0, n_hdr_drop = 0, n_data_fix = 0, n_full_stall = 0;
  int n_out_wait = 0, n_contend = 0, n_alternate = 0, n_short_err = 0, n_long_err = 0;
  int n_rx = 0;

  logic [1:0] tin_valid;
  int t_in [2];
  int t_out[2];
  int last_src[2];
  int t_starts[2][$];   // cycle of each packet's first REQ, per output
  int n_rate = 0, n_cnt_test = 0, n_mem_test = 0;

  // ------------------------------------------------------------ transmitter
  task automatic send(input int p, input int dst, input int bad_k = -1,
                      input int len = PKT, input bit expect_rx = 1'b1);
    int seq;
    se_word_t w;
    seq = seq_ctr++;
    if (expect_rx) exp_q[p][dst].push_back(seq);
    if (len > PKT) exp_len_bad[seq] = 1;
    @(negedge clk);
    w = make_word(pkt_byte(p, dst, seq, 0));
    if (bad_k == 0) w.par = ~w.par;
    in_data[p] = w;
    in_req[p]  = 1'b1;
    t_in[p]    = cyc;
    do @(negedge clk); while (!in_ack[p]);
    for (int k = 1; k < len; k++) begin
      w = make_word(pkt_byte(p, dst, seq, k));
      if (bad_k == k) w.par = ~w.par;
      in_data[p] = w;
      if (k == len - 1) in_req[p] = 1'b0;
      if (k < len - 1) @(negedge clk);
    end
    do @(negedge clk); while (in_ack[p]);
  endtask

  // --------------------------------------------------------------- receivers
  int  stall_pct[2];
  bit  block_rx[2];
  logic [8:0] rx_buf[2][$];
  bit  rx_busy[2];

  task automatic check_packet(input int o);
    logic [7:0] h1, h2, oh1, oh2;
    int src, seq, n;
    bit ok;
    n = rx_buf[o].size();
    n_rx++;
    check(n == PKT, $sformatf("out%0d packet length %0d", o, n));
    if (n < 2) return;
    for (int k = 0; k < n; k++)
      check(odd_par(rx_buf[o][k][7:0]) == rx_buf[o][k][8],
            $sformatf("out%0d byte %0d parity", o, k));
    oh1 = rx_buf[o][0][7:0];
    oh2 = rx_buf[o][1][7:0];
    // undo the rotation: out tag = {in_port, tag[15:1]}
    src = int'(oh2[7]);
    h2  = {oh2[6:0], oh1[7]};
    h1  = {oh1[6:0], 1'(o)};
    seq = int'({h2, h1[7:1]});
    ok = exp_q[src][o].size() > 0;
    check(ok, $sformatf("out%0d unexpected packet seq %0d from in%0d", o, seq, src));
    if (!ok) return;
    check(exp_q[src][o][0] == seq,
          $sformatf("out%0d from in%0d: seq %0d, expected %0d", o, src, seq, exp_q[src][o][0]));
    void'(exp_q[src][o].pop_front());
    ok = 1'b1;
    for (int k = 2; k < n; k++) begin
      if (exp_len_bad.exists(seq) && k == PKT - 1) continue;
      if (rx_buf[o][k][7:0] != pkt_byte(src, o, seq, k)) ok = 1'b0;
    end
    check(ok, $sformatf("out%0d seq %0d payload", o, seq));
    last_src[o] = src;
  endtask

  for (genvar o = 0; o < 2; o++) begin : g_rx
    always @(posedge clk) begin
      if (rst) begin
        out_ack[o] <= 1'b0;
        rx_busy[o] = 1'b0;
      end else if (!rx_busy[o]) begin
        if (out_req[o] && !block_rx[o] && ($urandom_range(99) >= stall_pct[o])) begin
          out_ack[o] <= 1'b1;
          rx_buf[o].delete();
          rx_buf[o].push_back(out_data[o]);
          rx_busy[o] = 1'b1;
        end
      end else begin
        rx_buf[o].push_back(out_data[o]);
        if (!out_req[o]) begin
          out_ack[o] <= 1'b0;
          rx_busy[o] = 1'b0;
          check_packet(o);
        end
      end
    end
    // first REQ of each packet on the output link; REQ changes on a falling
    // edge and is seen here one falling edge later, hence the minus one
    logic req_q;
    always @(negedge clk) begin
      if (out_req[o] && !req_q) begin
        t_out[o] = cyc - 1;
        t_starts[o].push_back(cyc - 1);
      end
      req_q <= out_req[o];
      if (dut.g_ops[o].u_ops.hold && !out_ack[o] && dut.g_ops[o].u_ops.u_opc.cnt == 1'b0)
        n_out_wait++;
    end
  end

  // mechanism monitors
  always @(posedge clk) begin
    if (!rst) begin
      for (int i = 0; i < 2; i++)
        if (in_req[i] && !in_ack[i] && (dut.u_bm.bf[i][0] || dut.u_bm.bf[i][1]))
          n_full_stall++;
      for (int o = 0; o < 2; o++)
        if (dut.u_bm.pr[o][0] && dut.u_bm.pr[o][1]) n_contend++;
    end
  end

  task automatic wait_idle();
    int guard = 0;
    while (guard < 20000) begin
      @(posedge clk);
      guard++;
      if (exp_q[0][0].size() == 0 && exp_q[0][1].size() == 0 &&
          exp_q[1][0].size() == 0 && exp_q[1][1].size() == 0 &&
          !rx_busy[0] && !rx_busy[1] && !out_req[0] && !out_req[1] &&
          in_req == 2'b00) break;
    end
    repeat (10) @(posedge clk);
  endtask

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lat;
  int order[$];
  logic [7:0] pc0;

  initial begin
    rst = 1'b1; vct = 1'b1; err_clr = 1'b0; cnt_test = 1'b0;
    mem_test = 1'b0; mem_we = 1'b0; mem_sel = '0; mem_addr = '0; mem_wdata = '0;
    in_data = '0; in_req = '0;
    stall_pct = '{0, 0}; block_rx = '{0, 0};
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (4) @(posedge clk);

    // 1. virtual cut-through: first header byte out 3 cycles after it went in
    send(0, 0);
    wait_idle();
    lat = t_out[0] - t_in[0];
    check(lat == 3, $sformatf("cut-through latency %0d, expected 3", lat));
    if (lat == 3) n_cut++;
    send(1, 1);
    wait_idle();
    lat = t_out[1] - t_in[1];
    check(lat == 3, $sformatf("cut-through latency in1->out1 %0d", lat));
    if (lat == 3) n_cut++;

    // 2. store and forward
    vct = 1'b0;
    send(1, 0);
    wait_idle();
    lat = t_out[0] - t_in[1];
    check(lat == PKT + 3, $sformatf("store-and-forward latency %0d, expected %0d", lat, PKT + 3));
    if (lat == PKT + 3) n_saf++;
    vct = 1'b1;

    // 3. parity: header errors drop the packet, data errors are corrected
    pc0 = perr_count[0];
    send(0, 1, 0, PKT, 1'b0);   // bad first header byte
    send(0, 0, 1, PKT, 1'b0);   // bad second header byte
    send(0, 1, 20);             // bad data byte
    send(0, 0, PKT - 1);        // bad last byte
    wait_idle();
    check(perr_count[0] == pc0 + 8'd4, $sformatf("parity count %0d", perr_count[0] - pc0));
    check(perr_count[1] == 8'd0, "no parity errors on port 1");
    n_hdr_drop += 2;
    if (perr_count[0] == pc0 + 8'd4) n_data_fix += 2;
    check(err_hold == '0, "no faults logged after parity phase");

    // 4. full FIFO stalls the input link; 5. two full FIFOs alternate
    block_rx[0] = 1'b1;
    fork
      begin for (int j = 0; j < 5; j++) send(0, 0); end
      begin for (int j = 0; j < 5; j++) send(1, 0); end
    join_none
    repeat (600) @(posedge clk);
    check(dut.u_bm.bf[0][0] && dut.u_bm.bf[1][0], "both FIFOs of output 0 full");
    check(in_req == 2'b11 && in_ack == 2'b00, "fifth packets held back on both inputs");
    order.delete();
    t_starts[0].delete();
    block_rx[0] = 1'b0;
    fork
      begin
        for (int j = 0; j < 10; j++) begin
          @(posedge clk iff (rx_busy[0] && !out_req[0]));
          @(posedge clk);
          order.push_back(last_src[0]);
        end
      end
    join
    wait fork;
    wait_idle();
    begin
      automatic int alt = 0;
      for (int j = 1; j < 8; j++) if (order[j] != order[j-1]) alt++;
      check(alt == 7, $sformatf("rotating priority alternated %0d of 7 times", alt));
      n_alternate += alt;
    end
    // link rate with a loaded FIFO and a successor that acknowledges at
    // once: one packet every PKT_BYTES+1 cycles
    for (int j = 1; j < 8; j++) begin
      check(t_starts[0][j] - t_starts[0][j-1] == PKT + 1,
            $sformatf("packet period %0d cycles, expected %0d", t_starts[0][j] - t_starts[0][j-1], PKT + 1));
      if (t_starts[0][j] - t_starts[0][j-1] == PKT + 1) n_rate++;
    end

    // 6. random traffic, both modes, random back-pressure
    for (int m = 0; m < 2; m++) begin
      vct = (m == 0);
      stall_pct = '{30, 60};
      fork
        begin for (int j = 0; j < 20; j++) send(0, $urandom_range(1)); end
        begin for (int j = 0; j < 20; j++) send(1, $urandom_range(1)); end
      join
      wait_idle();
    end
    stall_pct = '{0, 0};
    vct = 1'b1;
    check(err_hold == '0, "no faults logged after random traffic");

    // 7. length errors: short packet, long packet (slot overflow)
    send(0, 0, -1, 2, 1'b0);
    wait_idle();
    check(err_hold == 14'h0001, $sformatf("short packet logged, err_hold=%h", err_hold));
    if (err_hold[0]) n_short_err++;
    @(negedge clk) err_clr = 1'b1;
    @(negedge clk) err_clr = 1'b0;
    check(!error, "error register cleared");
    send(1, 1, -1, PKT + 3, 1'b1);
    wait_idle();
    check(err_hold == 14'h0002, $sformatf("long packet logged, err_hold=%h", err_hold));
    if (err_hold[1]) n_long_err++;
    send(1, 1);
    wait_idle();

    // 8. counter self-test: the four byte counters run together for more
    // than their full range without a mismatch, and no fault is logged
    @(negedge clk) err_clr = 1'b1;
    @(negedge clk) begin err_clr = 1'b0; cnt_test = 1'b1; end
    repeat (70) begin
      @(posedge clk); #1;
      if (cnt_err) break;
    end
    check(!cnt_err, "counter self-test passes");
    check(dut.g_ips[0].u_ips.waddr != 0, "counters ran in test mode");
    if (!cnt_err && dut.g_ips[0].u_ips.waddr != 0) n_cnt_test++;
    @(negedge clk) cnt_test = 1'b0;
    repeat (3) @(posedge clk);
    check(err_hold == '0, "counter test logs no fault");
    send(0, 1);
    wait_idle();

    // 9. memory test mode: two complementary patterns through all 1024
    // words, then traffic must flow as before
    @(negedge clk) mem_test = 1'b1;
    for (int pass = 0; pass < 2; pass++) begin
      int bad = 0;
      for (int f = 0; f < 4; f++)
        for (int a = 0; a < 256; a++) begin
          @(posedge clk) #1;
          mem_sel = 2'(f); mem_we = 1'b1; mem_addr = MEM_AW'(a);
          mem_wdata = make_word(8'((a * 3 + f * 61) ^ (pass * 255)));
        end
      @(posedge clk) #1 mem_we = 1'b0;
      for (int f = 0; f < 4; f++)
        for (int a = 0; a < 256; a++) begin
          @(posedge clk) #1;
          mem_sel = 2'(f); mem_addr = MEM_AW'(a);
          @(negedge clk);
          if (mem_rdata != make_word(8'((a * 3 + f * 61) ^ (pass * 255)))) bad++;
        end
      check(bad == 0, $sformatf("memory test pass %0d: %0d words wrong", pass, bad));
      if (bad == 0) n_mem_test++;
    end
    @(negedge clk) mem_test = 1'b0;
    check(err_hold == '0 && out_req == 2'b00, "memory test leaves no fault and no traffic");
    fork
      begin send(0, 1); send(0, 0); end
      begin send(1, 0); send(1, 1); end
    join
    wait_idle();

    // every mechanism must have happened
    check(n_cut > 0, "cut-through seen");
    check(n_saf > 0, "store-and-forward seen");
    check(n_hdr_drop > 0, "header parity drop seen");
    check(n_data_fix > 0, "data parity correction seen");
    check(n_full_stall > 0, "full-FIFO stall seen");
    check(n_out_wait > 0, "output wait for ACK seen");
    check(n_contend > 0, "arbitration contention seen");
    check(n_alternate > 0, "rotating priority seen");
    check(n_short_err > 0, "short packet error seen");
    check(n_long_err > 0, "slot overflow error seen");
    check(n_rate > 0, "full-rate packet sequence seen");
    check(n_cnt_test > 0, "counter self-test run");
    check(n_mem_test > 0, "memory test mode run");
    for (int i = 0; i < 2; i++)
      for (int o = 0; o < 2; o++)
        check(exp_q[i][o].size() == 0, $sformatf("in%0d->out%0d all delivered", i, o));
    $display("mechanisms: cut=%0d saf=%0d hdr_drop=%0d data_fix=%0d full_stall=%0d out_wait=%0d contend=%0d alternate=%0d short=%0d long=%0d rate=%0d cnt_test=%0d mem_test=%0d packets=%0d",
             n_cut, n_saf, n_hdr_drop, n_data_fix, n_full_stall, n_out_wait, n_contend,
             n_alternate, n_short_err, n_long_err, n_rate, n_cnt_test, n_mem_test, n_rx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
