// tb_controller: checks routing, round-robin arbitration and the output
// registers of the controller.
// Random FIFO heads (valid or not), random busy signals and random router
// coordinates are applied each cycle. A model keeps its own round-robin
// pointer per output, picks the expected winner, and predicts which FIFOs
// are popped (checked before the edge) and what every output register holds
// after the edge (the winner's packet, or all zeros). Contention (two or
// more inputs wanting one output) and busy stalls must both occur.
module tb_controller;
  import noc_pkg::*;

  logic    clk = 0, rst_n = 1;
  coord_t  cur_x = '0, cur_y = '0;
  flit_t   head       [NUM_IN];
  logic    head_valid [NUM_IN];
  logic    busy_in    [NUM_IN];
  logic    pop        [NUM_IN];
  packet_t data_out   [NUM_OUT];
  logic [NUM_OUT-1:0] demux_ctrl;

  int checks = 0, failures = 0, contention = 0, stalls = 0, sent = 0;
  int rr [NUM_OUT];

  controller dut (.clk, .rst_n, .cur_x, .cur_y, .head, .head_valid, .busy_in,
                  .pop, .data_out, .demux_ctrl);

  always #5 clk = ~clk;

  function automatic int ref_port(coord_t cx, coord_t cy, coord_t dx, coord_t dy);
    if (dx != cx) return (dx > cx) ? 3 : 2;   // South : North
    if (dy != cy) return (dy > cy) ? 0 : 1;   // East : West
    return 4;                                 // Local
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    packet_t exp_out [NUM_OUT];
    bit      exp_pop [NUM_IN];
    for (int i = 0; i < NUM_IN; i++) begin
      head[i] = '0; head_valid[i] = 0; busy_in[i] = 0;
    end
    for (int o = 0; o < NUM_OUT; o++) rr[o] = 0;
    #1 rst_n = 0;
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (n % 200 == 0) begin
        cur_x = coord_t'($urandom);
        cur_y = coord_t'($urandom);
      end
      for (int i = 0; i < NUM_IN; i++) begin
        head_valid[i] = ($urandom % 4) != 0;
        head[i].pkt   = packet_t'($urandom) | 13'h1000;   // request bit set
        head[i].x     = pkt_x(head[i].pkt);
        head[i].y     = pkt_y(head[i].pkt);
        busy_in[i]    = ($urandom % 5) == 0;
      end
      // model
      for (int i = 0; i < NUM_IN; i++) exp_pop[i] = 0;
      for (int o = 0; o < NUM_OUT; o++) begin
        int win, nreq, i;
        win = -1;
        nreq = 0;
        for (int k = 0; k < NUM_IN; k++) begin
          i = (rr[o] + k) % NUM_IN;
          if (head_valid[i] && ref_port(cur_x, cur_y, head[i].x, head[i].y) == o) begin
            nreq++;
            if (win < 0) win = i;
          end
        end
        if (nreq > 1) contention++;
        exp_out[o] = '0;
        if (win >= 0 && (o == 4 || !busy_in[o])) begin
          exp_out[o] = head[win].pkt;
          exp_pop[win] = 1;
          rr[o] = (win + 1) % NUM_IN;
          sent++;
        end else if (win >= 0) begin
          stalls++;
        end
      end
      #1;
      for (int i = 0; i < NUM_IN; i++) begin
        checks++;
        if (pop[i] != exp_pop[i]) begin
          failures++;
          $display("FAIL n=%0d pop[%0d]=%b want %b", n, i, pop[i], exp_pop[i]);
        end
      end
      @(posedge clk); #1;
      for (int o = 0; o < NUM_OUT; o++) begin
        checks++;
        if (data_out[o] != exp_out[o]) begin
          failures++;
          $display("FAIL n=%0d data_out[%0d]=%b want %b", n, o, data_out[o], exp_out[o]);
        end
      end
    end
    checks++; if (contention == 0) begin failures++; $display("FAIL no contention"); end
    checks++; if (stalls == 0)     begin failures++; $display("FAIL no busy stall"); end
    $display("sent=%0d contention=%0d stalls=%0d", sent, contention, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
