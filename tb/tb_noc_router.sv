// tb_noc_router: end-to-end test of the router at its default parameters.
//
// Part 1 replays the traffic of the four reference cases (router at
// (0,1), (2,1) and (0,2), packets entering on the East port, some with the
// request bit clear) plus an East-bound and a Local packet, and checks for
// each word the exact output port, the exact content and the exact cycle:
// three clocks after the word is on data_in. Words without the request bit
// must produce nothing.
//
// Part 2 sends random packets into all four inputs at once while the
// neighbours' busy signals switch at random (with long busy bursts). Each
// sender obeys busy_out. Every packet carries its input port and a sequence
// number in the payload; a scoreboard checks that each one comes out once,
// on the port that X-Y routing gives, in order per input/output pair, never
// while that output was busy, and that nothing is lost.
//
// Each mechanism of the design is counted and must happen at least once:
// every output port, ignored idle words, contention between inputs for one
// output, stalls on busy_in, busy_out back-pressure and a full FIFO.
module tb_noc_router;
  import noc_pkg::*;

  localparam int LATENCY = 3;

  logic    clk = 0, rst_n = 1;
  coord_t  cx = '0, cy = '0;
  packet_t din  [NUM_IN];
  packet_t dout [NUM_OUT];
  logic    bin  [NUM_IN];
  logic    bout [NUM_IN];

  noc_router dut (
    .clk, .rst_n, .cx, .cy,
    .data_in_e (din[0]), .data_in_w (din[1]), .data_in_n (din[2]), .data_in_s (din[3]),
    .data_out_e(dout[0]), .data_out_w(dout[1]), .data_out_n(dout[2]), .data_out_s(dout[3]),
    .data_out_l(dout[4]),
    .busy_in_e (bin[0]), .busy_in_w (bin[1]), .busy_in_n (bin[2]), .busy_in_s (bin[3]),
    .busy_out_e(bout[0]), .busy_out_w(bout[1]), .busy_out_n(bout[2]), .busy_out_s(bout[3])
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  int used_port [NUM_OUT];
  int idle_words = 0, contention = 0, busy_stalls = 0, backpressure = 0, fifo_full = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d %s", cycle, what);
    end
  endtask

  function automatic int ref_port(coord_t ox, coord_t oy, packet_t p);
    int dx = int'(pkt_x(p)) - int'(ox);
    int dy = int'(pkt_y(p)) - int'(oy);
    if (dx > 0) return 3;  // South
    if (dx < 0) return 2;  // North
    if (dy > 0) return 0;  // East
    if (dy < 0) return 1;  // West
    return 4;              // Local
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism monitors (sampled just before each edge).
  always @(negedge clk) if (rst_n) begin
    for (int o = 0; o < NUM_OUT; o++) begin
      int n;
      n = 0;
      for (int i = 0; i < NUM_IN; i++)
        if (dut.head_valid[i] && int'(dut.u_ctrl.dir[i]) == o) n++;
      if (n > 1) contention++;
      if (o < NUM_IN && n > 0 && bin[o]) busy_stalls++;
    end
    for (int i = 0; i < NUM_IN; i++) begin
      if (bout[i]) backpressure++;
      if (dut.full[i]) fifo_full++;
    end
  end

  // ---------------------------------------------------------------- part 1
  task automatic directed(coord_t ox, coord_t oy, packet_t words[]);
    packet_t got;
    cx = ox; cy = oy;
    foreach (words[k]) begin
      din[0] = words[k];
      @(posedge clk); #1;
    end
    din[0] = '0;
    repeat (LATENCY) @(posedge clk);
    #1;
  endtask

  // Expected output of part 1, checked cycle by cycle.
  packet_t exp_at [int][NUM_OUT];
  bit      part1 = 1;

  always @(posedge clk) if (part1 && rst_n) begin
    #2;
    for (int o = 0; o < NUM_OUT; o++) begin
      packet_t want;
      want = exp_at.exists(cycle) ? exp_at[cycle][o] : '0;
      check(dout[o] == want, $sformatf("part1 port %0d got %b want %b", o, dout[o], want));
    end
  end

  task automatic expect_word(int at, int port, packet_t p);
    if (!exp_at.exists(at))
      for (int o = 0; o < NUM_OUT; o++) exp_at[at][o] = '0;
    exp_at[at][port] = p;
    used_port[port]++;
  endtask

  task automatic plan(coord_t ox, coord_t oy, packet_t words[]);
    // word k is on data_in during cycle start+k
    int start;
    start = cycle;
    foreach (words[k]) begin
      if (pkt_req(words[k])) expect_word(start + k + LATENCY, ref_port(ox, oy, words[k]), words[k]);
      else idle_words++;
    end
  endtask

  // ---------------------------------------------------------------- part 2
  typedef struct { int src; int seq; } tag_t;
  packet_t sb [NUM_OUT][NUM_IN][$];
  int      sent_cnt = 0, recv_cnt = 0;
  bit      part2 = 0;
  bit      bin_q [NUM_IN];

  function automatic packet_t make_pkt(int src, int seq);
    packet_t p;
    p = packet_t'($urandom);
    p[REQ_BIT] = 1'b1;
    p[9:2] = 8'({src[1:0], seq[5:0]});
    return p;
  endfunction

  always @(posedge clk) if (part2) begin
    #2;
    for (int o = 0; o < NUM_OUT; o++) if (pkt_req(dout[o])) begin
      int src;
      src = int'(dout[o][9:8]);
      recv_cnt++;
      used_port[o]++;
      if (o < NUM_IN) check(!bin_q[o], $sformatf("port %0d loaded while busy", o));
      if (sb[o][src].size() == 0) begin
        check(0, $sformatf("unexpected %b on port %0d", dout[o], o));
      end else begin
        packet_t want;
        want = sb[o][src].pop_front();
        check(dout[o] == want, $sformatf("port %0d got %b want %b", o, dout[o], want));
      end
    end
  end

  // busy_in seen by the router in the cycle before each edge
  always @(negedge clk) for (int o = 0; o < NUM_IN; o++) bin_q[o] <= bin[o];

  initial begin
    bit      may_send [NUM_IN];
    int      seq [NUM_IN];
    int      burst;
    for (int i = 0; i < NUM_IN; i++) begin din[i] = '0; bin[i] = 0; seq[i] = 0; end
    for (int o = 0; o < NUM_OUT; o++) used_port[o] = 0;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;

    // Reference case 1: router (0,1), West and South deliveries, idle words
    begin
      packet_t w[] = '{13'b1010000000001, 13'b0100000000010, 13'b1110000000011,
                       13'b1000000000100, 13'b0010000000101, 13'b1100000000110,
                       13'b0110000000111};
      plan(2'b00, 2'b01, w); directed(2'b00, 2'b01, w);
    end
    // Reference case 2: router (0,1), South delivery
    begin
      packet_t w[] = '{13'b1010000001001, 13'b1010000001001};
      plan(2'b00, 2'b01, w); directed(2'b00, 2'b01, w);
    end
    // Reference case 3: router (2,1), North deliveries
    begin
      packet_t w[] = '{13'b1010000001010, 13'b1010000001011, 13'b1010000001100};
      plan(2'b10, 2'b01, w); directed(2'b10, 2'b01, w);
    end
    // Reference case 4: router (0,2), South deliveries
    begin
      packet_t w[] = '{13'b1010000010011, 13'b1010000010100, 13'b0000000000000,
                       13'b1010000010110};
      plan(2'b00, 2'b10, w); directed(2'b00, 2'b10, w);
    end
    // East and Local: router (1,1)
    begin
      packet_t w[] = '{13'b1010000000011, 13'b1010000000001, 13'b1010110000010};
      plan(2'b01, 2'b01, w); directed(2'b01, 2'b01, w);
    end
    @(posedge clk); #3;
    part1 = 0;

    // Random traffic with back-pressure, router at (1,2)
    cx = 2'b01; cy = 2'b10;
    part2 = 1;
    burst = 0;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      for (int i = 0; i < NUM_IN; i++) may_send[i] = !bout[i];
      @(posedge clk); #1;
      // neighbours: mostly ready, sometimes busy in long bursts
      if (burst > 0) burst--;
      else if ($urandom % 200 == 0) burst = 20 + $urandom % 30;
      for (int o = 0; o < NUM_IN; o++)
        bin[o] = (n < 5500) && ((burst > 0 && o != 0) || ($urandom % 6 == 0));
      for (int i = 0; i < NUM_IN; i++) begin
        din[i] = '0;
        if (n < 5500 && may_send[i] && ($urandom % 4) != 0) begin
          packet_t p;
          p = make_pkt(i, seq[i]);
          seq[i] = (seq[i] + 1) % 64;
          sb[ref_port(cx, cy, p)][i].push_back(p);
          din[i] = p;
          sent_cnt++;
        end else if (($urandom % 8) == 0) begin
          din[i] = packet_t'($urandom) & 13'h0FFF;  // idle word, request bit 0
          idle_words++;
        end
      end
    end
    repeat (10) @(posedge clk);
    part2 = 0;

    for (int o = 0; o < NUM_OUT; o++)
      for (int i = 0; i < NUM_IN; i++)
        check(sb[o][i].size() == 0, $sformatf("%0d packets from %0d lost for port %0d",
                                               sb[o][i].size(), i, o));
    check(sent_cnt == recv_cnt, $sformatf("sent %0d received %0d", sent_cnt, recv_cnt));

    $display("sent=%0d received=%0d", sent_cnt, recv_cnt);
    $display("ports E=%0d W=%0d N=%0d S=%0d L=%0d", used_port[0], used_port[1],
             used_port[2], used_port[3], used_port[4]);
    $display("idle_words=%0d contention=%0d busy_stalls=%0d backpressure=%0d fifo_full=%0d",
             idle_words, contention, busy_stalls, backpressure, fifo_full);
    for (int o = 0; o < NUM_OUT; o++) check(used_port[o] > 0, $sformatf("port %0d never used", o));
    check(idle_words > 0,   "no idle word");
    check(contention > 0,   "no contention");
    check(busy_stalls > 0,  "no busy_in stall");
    check(backpressure > 0, "no busy_out back-pressure");
    check(fifo_full > 0,    "FIFO never full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
