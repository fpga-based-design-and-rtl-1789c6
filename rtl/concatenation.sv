// concatenation: input field extraction stage of one router port.
//
// On every rising clock edge the incoming 13-bit word is registered and its
// three fields are split out into their own registers: the request bit
// (bit 12), which tells the rest of the port that a packet is present, the
// destination X address (bits 11:10) and the destination Y address
// (bits 1:0). The whole packet is registered alongside so that it stays
// aligned with its fields. These are the three extraction sub-blocks of the
// original design (X, request and Y), each a register with an asynchronous
// active-low reset that clears it.
//
// Interface: data_in is sampled every cycle, there is no handshake here;
// req and flit are valid one cycle after data_in (latency 1).
//
// Registering the full packet next to the fields is this design's choice.
module concatenation
  import noc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,    // asynchronous, active low
  input  packet_t data_in,
  output logic    req,      // registered request bit of data_in
  output flit_t   flit      // registered destination fields and packet
);

  // Request extraction
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) req <= 1'b0;
    else        req <= pkt_req(data_in);
  end

  // Destination X extraction
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) flit.x <= '0;
    else        flit.x <= pkt_x(data_in);
  end

  // Destination Y extraction
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) flit.y <= '0;
    else        flit.y <= pkt_y(data_in);
  end

  // Packet itself
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) flit.pkt <= '0;
    else        flit.pkt <= data_in;
  end

endmodule
