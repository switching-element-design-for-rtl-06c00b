// tb_delta_network_8x8: an 8x8 delta network built from twelve switching
// elements (three stages of four) at their default size, driven with random
// traffic at offered loads of 0.8 and 1.0, with virtual cut-through on and
// off. These are the loads and the network size of the performance study
// the element was designed from; the test checks that the real RTL carries
// such traffic correctly and reports the throughput and delay it reaches.
//
// Wiring: an omega network. Before every stage the eight lines pass through
// a perfect shuffle (line j goes to position {j[1:0], j[2]}); the element at
// position pair 2e, 2e+1 is element e, and its output o drives line 2e+o.
// With the destination d sent least significant tag bit first as d[2], d[1],
// d[0], each element routes on tag bit 0, and the packet ends on line d.
//
// Traffic: one source per input (the trunk controller model) draws, once per
// stage cycle, a new packet with probability equal to the offered load and a
// uniformly random destination; it queues the packets without limit and
// sends them back to back with the element's REQ/ACK protocol. The stage
// cycle is PKT_BYTES+1 clock cycles, the shortest packet period on a link.
// The header carries, above the three routing bits, the source and a
// sequence number; the payload bytes are a function of both. Sinks accept at
// once.
//
// Checks: every packet arrives, at the output named by its destination, in
// order for its (source, destination) pair, with the expected payload and
// with the three bits each stage inserted at the top of the header (the
// input port used at every stage, which the omega wiring fixes from the
// source). No element logs an error. At load 0.8 the carried load stays
// within 0.1 of the offered load, and cut-through lowers the mean delay;
// at load 1.0 the network still carries more than half of the offered load
// (its gain from cut-through is small there and is only reported).
// Throughput, in packets per stage cycle per output, and mean delay from a
// packet's arrival at its source queue to its first byte at the network
// output are printed for each run.
module tb_delta_network_8x8;
  import se_pkg::*;

  localparam int PKT = se_pkg::PKT_BYTES;
  localparam int SC  = PKT + 1;     // stage cycle in clock cycles
  localparam int NST = 3;           // stages
  localparam int NSE = 4;           // elements per stage
  localparam int WARM = 20;         // stage cycles before measuring
  localparam int MEAS = 200;        // stage cycles measured

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, vct;

  // lines between the levels: level 0 = sources, level 3 = sinks
  se_word_t   ln_d[NST+1][8];
  logic       ln_r[NST+1][8];
  logic       ln_a[NST+1][8];

  function automatic int unshuffle(int pos);   // inverse perfect shuffle
    return ((pos & 1) << 2) | (pos >> 1);
  endfunction

  logic [NST*NSE-1:0] se_error;

  for (genvar s = 0; s < NST; s++) begin : g_st
    for (genvar e = 0; e < NSE; e++) begin : g_se
      se_word_t [1:0] i_d, o_d;
      logic [1:0] i_r, i_a, o_r, o_a;
      logic       error, cnt_err;
      logic [13:0] err_hold;
      logic [1:0][7:0] perr_count;
      se_word_t    mem_rdata;
      for (genvar p = 0; p < 2; p++) begin : g_port
        assign i_d[p] = ln_d[s][unshuffle(2*e+p)];
        assign i_r[p] = ln_r[s][unshuffle(2*e+p)];
        assign ln_a[s][unshuffle(2*e+p)] = i_a[p];
        assign ln_d[s+1][2*e+p] = o_d[p];
        assign ln_r[s+1][2*e+p] = o_r[p];
        assign o_a[p] = ln_a[s+1][2*e+p];
      end
      switching_element u_se (
        .clk, .rst, .vct, .err_clr(1'b0), .cnt_test(1'b0),
        .in_data(i_d), .in_req(i_r), .in_ack(i_a),
        .out_data(o_d), .out_req(o_r), .out_ack(o_a),
        .error, .cnt_err, .err_hold, .perr_count,
        .mem_test(1'b0), .mem_sel(2'b00), .mem_we(1'b0), .mem_addr('0),
        .mem_wdata('0), .mem_rdata(mem_rdata)
      );
      assign se_error[s*NSE+e] = error | cnt_err;
    end
  end

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

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ packets
  // tag[2:0] = {d[0], d[1], d[2]}, tag[5:3] = source, tag[15:6] = sequence
  function automatic logic [15:0] make_tag(int src, int dst, int seq);
    logic [2:0] d = 3'(dst);
    return {10'(seq), 3'(src), d[0], d[1], d[2]};
  endfunction

  function automatic logic [7:0] pay(int src, int seq, int k);
    return 8'((seq * 13) ^ (src * 71) ^ (k * 5) ^ (k >> 2));
  endfunction

  typedef struct { int seq; int dst; int t_gen; } job_t;
  job_t src_q[8][$];
  int   exp_q[8][8][$];       // [src][dst] sequence numbers in flight
  int   t_gen_of[int];        // src*1024+seq -> arrival cycle
  int   seq_ctr[8];

  // run statistics
  bit   gen_on = 1'b0, measuring = 1'b0;
  real  load = 0.0;
  int   n_gen = 0, n_in_meas = 0, n_out_meas = 0;
  longint delay_sum = 0;
  int   delay_n = 0;

  // ------------------------------------------------------------ sources
  for (genvar i = 0; i < 8; i++) begin : g_src
    se_word_t d = '0;
    logic     r = 1'b0;
    assign ln_d[0][i] = d;
    assign ln_r[0][i] = r;

    // packet arrivals, one Bernoulli trial per stage cycle
    initial begin
      forever begin
        repeat (SC) @(posedge clk);
        if (gen_on && ($urandom_range(999) < int'(load * 1000.0))) begin
          job_t j;
          j.seq = seq_ctr[i];
          seq_ctr[i] = (seq_ctr[i] + 1) % 1024;
          j.dst = int'($urandom_range(7));
          j.t_gen = cyc;
          src_q[i].push_back(j);
          n_gen++;
        end
      end
    end

    // transmitter
    initial begin
      job_t j;
      logic [15:0] tag;
      forever begin
        @(negedge clk);
        if (rst || src_q[i].size() == 0) continue;
        j = src_q[i].pop_front();
        exp_q[i][j.dst].push_back(j.seq);
        t_gen_of[i*1024 + j.seq] = j.t_gen;
        tag = make_tag(i, j.dst, j.seq);
        d = make_word(tag[7:0]);
        r = 1'b1;
        do @(negedge clk); while (!ln_a[0][i]);
        if (measuring) n_in_meas++;
        for (int k = 1; k < PKT; k++) begin
          d = make_word(k == 1 ? tag[15:8] : pay(i, j.seq, k));
          if (k == PKT - 1) r = 1'b0;
          if (k < PKT - 1) @(negedge clk);
        end
        do @(negedge clk); while (ln_a[0][i]);
      end
    end
  end

  // ------------------------------------------------------------ sinks
  int n_rx = 0;
  for (genvar k = 0; k < 8; k++) begin : g_snk
    logic a = 1'b0;
    bit   busy = 1'b0;
    int   t_first;
    logic [8:0] buf_q[$];
    assign ln_a[NST][k] = a;

    task automatic finish_packet();
      logic [15:0] h;
      int src, seq, n;
      bit ok;
      n = buf_q.size();
      n_rx++;
      check(n == PKT, $sformatf("out%0d packet length %0d", k, n));
      if (n < 2) return;
      h = {buf_q[1][7:0], buf_q[0][7:0]};
      src = int'(h[2:0]);
      seq = int'(h[12:3]);
      // input port used at stages 0, 1, 2 is src[2], src[1], src[0]
      check(h[15:13] == {src[0], src[1], src[2]} ? 1'b1 : 1'b0,
            $sformatf("out%0d path bits %b for source %0d", k, h[15:13], src));
      ok = exp_q[src][k].size() > 0;
      check(ok, $sformatf("out%0d unexpected packet from %0d seq %0d", k, src, seq));
      if (!ok) return;
      check(exp_q[src][k][0] == seq,
            $sformatf("out%0d from %0d: seq %0d, expected %0d", k, src, seq, exp_q[src][k][0]));
      void'(exp_q[src][k].pop_front());
      ok = 1'b1;
      for (int b = 0; b < n; b++) if (odd_par(buf_q[b][7:0]) != buf_q[b][8]) ok = 1'b0;
      for (int b = 2; b < n; b++) if (buf_q[b][7:0] != pay(src, seq, b)) ok = 1'b0;
      check(ok, $sformatf("out%0d packet %0d/%0d payload or parity", k, src, seq));
      if (t_gen_of.exists(src*1024 + seq)) begin
        if (measuring) begin
          delay_sum += longint'(t_first) - longint'(t_gen_of[src*1024 + seq]);
          delay_n++;
          n_out_meas++;
        end
        t_gen_of.delete(src*1024 + seq);
      end
    endtask

    always @(posedge clk) begin
      if (rst) begin
        a <= 1'b0;
        busy = 1'b0;
      end else if (!busy) begin
        if (ln_r[NST][k]) begin
          a <= 1'b1;
          busy = 1'b1;
          t_first = cyc;
          buf_q.delete();
          buf_q.push_back(ln_d[NST][k]);
        end
      end else begin
        buf_q.push_back(ln_d[NST][k]);
        if (!ln_r[NST][k]) begin
          a <= 1'b0;
          busy = 1'b0;
          finish_packet();
        end
      end
    end
  end

  // ------------------------------------------------------------ runs
  function automatic bit all_empty();
    for (int i = 0; i < 8; i++) begin
      if (src_q[i].size() != 0) return 1'b0;
      for (int o = 0; o < 8; o++) if (exp_q[i][o].size() != 0) return 1'b0;
    end
    return 1'b1;
  endfunction

  real thr[2][2], dly[2][2];

  task automatic run(input int li, input bit cut);
    int guard;
    load = (li == 0) ? 0.8 : 1.0;
    vct = cut;
    n_in_meas = 0; n_out_meas = 0; delay_sum = 0; delay_n = 0;
    gen_on = 1'b1;
    repeat (WARM * SC) @(posedge clk);
    measuring = 1'b1;
    repeat (MEAS * SC) @(posedge clk);
    measuring = 1'b0;
    gen_on = 1'b0;
    guard = 0;
    while (!all_empty() && guard < 200000) begin
      @(posedge clk);
      guard++;
    end
    repeat (2 * SC) @(posedge clk);
    check(all_empty(), $sformatf("load %0.1f vct %0d: all packets delivered", load, cut));
    check(se_error == '0, $sformatf("load %0.1f vct %0d: no element logged an error", load, cut));
    thr[li][cut] = real'(n_out_meas) / real'(MEAS * 8);
    dly[li][cut] = (delay_n > 0) ? real'(delay_sum) / real'(delay_n) : 0.0;
    $display("workload load=%0.1f vct=%0d: offered %0.3f carried %0.3f packets/stage cycle/output, mean delay %0.1f cycles (%0.2f stage cycles), %0d packets",
             load, cut, real'(n_in_meas) / real'(MEAS * 8), thr[li][cut], dly[li][cut],
             dly[li][cut] / real'(SC), delay_n);
  endtask

  initial begin
    rst = 1'b1; vct = 1'b1;
    for (int i = 0; i < 8; i++) seq_ctr[i] = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (4) @(posedge clk);

    for (int li = 0; li < 2; li++)
      for (int c = 1; c >= 0; c--)
        run(li, 1'(c));

    for (int c = 0; c < 2; c++) begin
      check(thr[0][c] > 0.7 && thr[0][c] < 0.9,
            $sformatf("load 0.8 vct %0d carried %0.3f", c, thr[0][c]));
      check(thr[1][c] > 0.5, $sformatf("load 1.0 vct %0d carried %0.3f", c, thr[1][c]));
    end
    check(dly[0][1] < dly[0][0],
          $sformatf("cut-through lowers delay at load 0.8: %0.1f vs %0.1f", dly[0][1], dly[0][0]));
    check(n_rx > 1000, $sformatf("%0d packets delivered", n_rx));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
