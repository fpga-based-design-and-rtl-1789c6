// controller: routing, arbitration and output registers of the router.
//
// For each buffered input packet (the head of each input FIFO) an xy_routing
// unit picks the output port. Then, for every output port:
//   - port_sel, a round-robin choice among the inputs whose head packet wants
//     this output, drives the output's multiplexer;
//   - demux_ctrl steers the request to that output only when it has a
//     winner and the next router is not busy; it acts as the reset switch of
//     the output D flip-flops: a selected output register loads the chosen
//     packet, every other output register is cleared to all zeros (request
//     bit 0, i.e. no packet);
//   - the winning input's FIFO is popped in the same cycle.
// Each input head wants exactly one output, so at most one output pops a
// given FIFO per cycle. The Local output has no busy signal: it always
// accepts.
//
// Timing: a head packet present in cycle t whose output is free leaves on
// data_out at cycle t+1 and stays there for exactly one cycle. busy_in[o]
// high in cycle t holds output o's packet in its FIFO for that cycle.
//
// The multiplexer, demultiplexer-as-reset and output flip-flops follow the
// original design. The arbitration rule (round robin, pointer moving past
// the last winner) and the busy inputs are this design's choices; the
// original names neither.
module controller
  import noc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  coord_t  cur_x,
  input  coord_t  cur_y,
  input  flit_t   head       [NUM_IN],  // head packet of each input FIFO
  input  logic    head_valid [NUM_IN],  // that FIFO is not empty
  input  logic    busy_in    [NUM_IN],  // next router on link output o is busy
  output logic    pop        [NUM_IN],  // head of input i leaves this cycle
  output packet_t data_out   [NUM_OUT], // registered output ports
  output logic [NUM_OUT-1:0] demux_ctrl // output o loads a packet this cycle
);

  localparam int unsigned SW = $clog2(NUM_IN);

  port_e             dir      [NUM_IN];
  logic [SW-1:0]     port_sel [NUM_OUT];
  logic [NUM_OUT-1:0] has_req;
  logic [SW-1:0]     rr_ptr   [NUM_OUT];

  for (genvar i = 0; i < NUM_IN; i++) begin : g_route
    xy_routing u_xy (
      .cur_x  (cur_x),
      .cur_y  (cur_y),
      .dest_x (head[i].x),
      .dest_y (head[i].y),
      .port   (dir[i])
    );
  end

  // Arbitration: first requesting input at or after the round-robin pointer.
  always_comb begin
    for (int o = 0; o < NUM_OUT; o++) begin
      has_req[o]  = 1'b0;
      port_sel[o] = rr_ptr[o];
      for (int k = NUM_IN - 1; k >= 0; k--) begin
        logic [SW-1:0] idx;
        idx = rr_ptr[o] + SW'(k);  // wraps modulo NUM_IN (a power of two)
        if (head_valid[idx] && dir[idx] == port_e'(o)) begin
          has_req[o]  = 1'b1;
          port_sel[o] = idx;
        end
      end
      if (o < NUM_IN) demux_ctrl[o] = has_req[o] && !busy_in[o];
      else            demux_ctrl[o] = has_req[o];
    end
  end

  always_comb begin
    for (int i = 0; i < NUM_IN; i++) begin
      pop[i] = 1'b0;
      for (int o = 0; o < NUM_OUT; o++)
        if (demux_ctrl[o] && port_sel[o] == SW'(i)) pop[i] = 1'b1;
    end
  end

  // Output multiplexers and D flip-flops, cleared through demux_ctrl.
  for (genvar o = 0; o < NUM_OUT; o++) begin : g_out
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        data_out[o] <= '0;
        rr_ptr[o]   <= '0;
      end else if (demux_ctrl[o]) begin
        data_out[o] <= head[port_sel[o]].pkt;
        rr_ptr[o]   <= port_sel[o] + SW'(1);
      end else begin
        data_out[o] <= '0;
      end
    end
  end

  // An input is never popped by two outputs at once.
  for (genvar o = 0; o < NUM_OUT; o++) begin : g_chk
    sent_is_packet: assert property (@(posedge clk) disable iff (!rst_n)
      demux_ctrl[o] |-> pkt_req(head[port_sel[o]].pkt));
  end

endmodule
