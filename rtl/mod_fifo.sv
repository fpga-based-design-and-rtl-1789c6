// mod_fifo: packet buffer of one router input port.
//
// A circular buffer of DEPTH entries, WIDTH bits each, with a write and a
// read pointer; its status comes from a separate indicator state machine
// (fifo_indicator) that tracks occupancy and gives the empty and full flags.
// The buffer holds packets while the output they need is taken by another
// input or the next router is busy.
//
// Interface (all synchronous to clk, reset asynchronous active low):
//   push/wdata  write wdata at the next edge; ignored when full, unless pop
//               is also high in that cycle
//   pop         remove the head entry at the next edge; ignored when empty
//   rdata       the head entry, combinational from the storage; only
//               meaningful while empty is low
// A written entry is visible on rdata the cycle after the write.
//
// The storage is a plain array without reset, so it maps to distributed or
// block RAM; only pointers and status are reset. DEPTH is not given by the
// original design; 4 is this design's choice.
module mod_fifo #(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned WIDTH = noc_pkg::FLIT_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [WIDTH-1:0]           wdata,
  input  logic                       pop,
  output logic [WIDTH-1:0]           rdata,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wr_ptr, rd_ptr;
  logic             wr, rd;

  assign rd = pop && !empty;
  assign wr = push && (!full || rd);

  fifo_indicator #(.DEPTH(DEPTH)) u_indicator (
    .clk   (clk),
    .rst_n (rst_n),
    .wr    (wr),
    .rd    (rd),
    .empty (empty),
    .full  (full),
    .count (count)
  );

  function automatic logic [PW-1:0] next_ptr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + PW'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (wr) wr_ptr <= next_ptr(wr_ptr);
      if (rd) rd_ptr <= next_ptr(rd_ptr);
    end
  end

  always_ff @(posedge clk) begin
    if (wr) mem[wr_ptr] <= wdata;
  end

  assign rdata = mem[rd_ptr];

endmodule
