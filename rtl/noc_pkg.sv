// noc_pkg: packet format, port numbering and shared types of the NoC router.
//
// A packet is 13 bits wide. Bit 12 is the request bit: a packet with this
// bit at 1 is a real packet, a word with it at 0 is an idle bus. The
// destination X address sits in bits 11:10 and the destination Y address in
// bits 1:0, two bits each, so the router addresses a mesh of up to 4 x 4
// nodes; the 8 bits 9:2 are the payload. These positions follow the field
// extraction rules of the design; the payload position is what is left over.
//
// Ports are numbered East, West, North, South for the four link ports, plus
// a Local ejection port. The four link ports exist in the original design;
// the Local port is this design's addition, used for packets whose
// destination equals the router's own coordinates.
package noc_pkg;

  localparam int unsigned PKT_W  = 13;  // packet width, request bit included
  localparam int unsigned ADDR_W = 2;   // width of each of X and Y
  localparam int unsigned REQ_BIT = 12; // request (packet valid) bit
  localparam int unsigned X_LSB  = 10;  // destination X in [11:10]
  localparam int unsigned Y_LSB  = 0;   // destination Y in [1:0]

  localparam int unsigned NUM_IN  = 4;  // link input ports E, W, N, S
  localparam int unsigned NUM_OUT = 5;  // link output ports plus Local

  typedef logic [PKT_W-1:0]  packet_t;
  typedef logic [ADDR_W-1:0] coord_t;

  // Output port selected by the routing algorithm. The numeric values index
  // the port arrays of the controller and the router.
  typedef enum logic [2:0] {
    PORT_E = 3'd0,
    PORT_W = 3'd1,
    PORT_N = 3'd2,
    PORT_S = 3'd3,
    PORT_L = 3'd4
  } port_e;

  // What the concatenation stage hands on: the extracted destination fields
  // beside the whole packet, which travels unchanged.
  typedef struct packed {
    coord_t  x;
    coord_t  y;
    packet_t pkt;
  } flit_t;

  localparam int unsigned FLIT_W = $bits(flit_t);

  function automatic logic pkt_req(packet_t p);
    return p[REQ_BIT];
  endfunction

  function automatic coord_t pkt_x(packet_t p);
    return p[X_LSB +: ADDR_W];
  endfunction

  function automatic coord_t pkt_y(packet_t p);
    return p[Y_LSB +: ADDR_W];
  endfunction

endpackage
