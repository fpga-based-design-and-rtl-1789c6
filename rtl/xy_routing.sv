// xy_routing: dimension-ordered output port selection.
//
// The destination X address is resolved first, then Y. The port each case
// goes to follows the direction conventions of the original router's
// simulations, where the X axis runs North-South and the Y axis West-East:
//   dest_x > cur_x            -> South
//   dest_x < cur_x            -> North
//   dest_x == cur_x, dest_y < cur_y -> West
//   dest_x == cur_x, dest_y > cur_y -> East
//   both equal                -> Local (packet has arrived)
// The Local outcome is this design's choice; the four link outcomes follow
// the original design.
//
// Purely combinational: port is valid in the same cycle as the inputs.
module xy_routing
  import noc_pkg::*;
(
  input  coord_t cur_x,   // this router's X coordinate
  input  coord_t cur_y,   // this router's Y coordinate
  input  coord_t dest_x,  // destination X of the packet
  input  coord_t dest_y,  // destination Y of the packet
  output port_e  port     // selected output port
);

  always_comb begin
    if (dest_x > cur_x)      port = PORT_S;
    else if (dest_x < cur_x) port = PORT_N;
    else if (dest_y < cur_y) port = PORT_W;
    else if (dest_y > cur_y) port = PORT_E;
    else                     port = PORT_L;
  end

endmodule
