// noc_router: four-port Network-on-Chip router with X-Y routing.
//
// Packets arrive on the East, West, North and South input ports and leave on
// the output port chosen by X-Y routing against the router's own
// coordinates (cx, cy). Each input port has a concatenation stage, which
// registers the word and extracts the request bit and the destination
// fields, and a modified FIFO, which stores every packet whose request bit
// is set. The controller routes the FIFO heads, arbitrates among inputs that
// want the same output, and drives the registered outputs. A packet for this
// router itself leaves on data_out_l.
//
// Flow control: busy_out_p tells the neighbour feeding input p not to start
// a new packet in the next cycle. It counts the packets already buffered,
// the one in the concatenation register and the one on the input wires, so
// that every packet sent while busy_out_p was low is guaranteed a FIFO slot:
//   busy_out_p = count_p + req_in_concat_p + data_in_p[12] >= FIFO_DEPTH.
// busy_in_p is the same signal from the neighbour on output p; connecting
// busy_out of one router to busy_in of the next forms a lossless mesh link.
//
// Timing: with no contention a packet on data_in in cycle t appears on its
// data_out in cycle t+3 (concatenation register, FIFO write, output
// register) for exactly one cycle; each stage takes one clock. Idle outputs
// are all zeros. With FIFO_DEPTH of 4 or more, one packet per cycle per
// input can be sustained; smaller depths throttle the input through busy_out.
//
// Follows the original design: 13-bit packet format, four link ports,
// concatenation, modified FIFO with status indicator, controller with
// MUX/DEMUX/D flip-flops, X-Y routing, active-low reset. This design's own
// choices: the Local ejection port, the busy handshake and its formula,
// the FIFO depth of 4 and round-robin arbitration.
module noc_router
  import noc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic    clk,
  input  logic    rst_n,        // asynchronous, active low
  input  coord_t  cx,           // own X coordinate
  input  coord_t  cy,           // own Y coordinate

  input  packet_t data_in_e,
  input  packet_t data_in_w,
  input  packet_t data_in_n,
  input  packet_t data_in_s,

  output packet_t data_out_e,
  output packet_t data_out_w,
  output packet_t data_out_n,
  output packet_t data_out_s,
  output packet_t data_out_l,   // local ejection

  input  logic    busy_in_e,    // neighbour on that output cannot take more
  input  logic    busy_in_w,
  input  logic    busy_in_n,
  input  logic    busy_in_s,

  output logic    busy_out_e,   // do not send on this input next cycle
  output logic    busy_out_w,
  output logic    busy_out_n,
  output logic    busy_out_s
);

  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  packet_t       data_in  [NUM_IN];
  packet_t       data_out [NUM_OUT];
  logic          busy_in  [NUM_IN];
  logic          busy_out [NUM_IN];

  logic          req_q    [NUM_IN];
  flit_t         flit_q   [NUM_IN];
  flit_t         head     [NUM_IN];
  logic          head_valid [NUM_IN];
  logic          pop      [NUM_IN];
  logic [NUM_OUT-1:0] demux_ctrl;  // per-output load strobes, for observation
  logic          empty    [NUM_IN];
  logic          full     [NUM_IN];
  logic [CW-1:0] count    [NUM_IN];

  // Array index = port number of noc_pkg::port_e (E=0, W=1, N=2, S=3, L=4).
  assign data_in[0] = data_in_e;
  assign data_in[1] = data_in_w;
  assign data_in[2] = data_in_n;
  assign data_in[3] = data_in_s;

  assign busy_in[0] = busy_in_e;
  assign busy_in[1] = busy_in_w;
  assign busy_in[2] = busy_in_n;
  assign busy_in[3] = busy_in_s;

  for (genvar p = 0; p < NUM_IN; p++) begin : g_in
    concatenation u_concat (
      .clk     (clk),
      .rst_n   (rst_n),
      .data_in (data_in[p]),
      .req     (req_q[p]),
      .flit    (flit_q[p])
    );

    mod_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(FLIT_W)) u_fifo (
      .clk   (clk),
      .rst_n (rst_n),
      .push  (req_q[p]),
      .wdata (flit_q[p]),
      .pop   (pop[p]),
      .rdata (head[p]),
      .empty (empty[p]),
      .full  (full[p]),
      .count (count[p])
    );

    assign head_valid[p] = !empty[p];
    assign busy_out[p] =
      ({1'b0, count[p]} + (CW+1)'(req_q[p]) + (CW+1)'(pkt_req(data_in[p])))
        >= (CW+1)'(FIFO_DEPTH);

    // A sender that obeys busy_out never finds the FIFO full.
    no_drop: assert property (@(posedge clk) disable iff (!rst_n)
      req_q[p] && full[p] |-> pop[p]);
  end

  controller u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .cur_x      (cx),
    .cur_y      (cy),
    .head       (head),
    .head_valid (head_valid),
    .busy_in    (busy_in),
    .pop        (pop),
    .data_out   (data_out),
    .demux_ctrl (demux_ctrl)
  );

  assign data_out_e = data_out[0];
  assign data_out_w = data_out[1];
  assign data_out_n = data_out[2];
  assign data_out_s = data_out[3];
  assign data_out_l = data_out[4];

  assign busy_out_e = busy_out[0];
  assign busy_out_w = busy_out[1];
  assign busy_out_n = busy_out[2];
  assign busy_out_s = busy_out[3];

endmodule
