// fifo_indicator: occupancy tracker and full/empty status FSM of a FIFO.
//
// A small state machine with three states, EMPTY, PARTIAL and FULL, and an
// occupancy counter of 0..DEPTH entries. A write raises the count, a read
// lowers it, both together leave it unchanged. The state (and so the empty
// and full flags) is registered and always agrees with the count: EMPTY at
// 0, FULL at DEPTH, PARTIAL in between. Reset (asynchronous, active low)
// clears the count and enters EMPTY.
//
// Interface: wr and rd must already be qualified by the FIFO (no write when
// full unless a read happens in the same cycle, no read when empty); the
// assertions check it. empty, full and count change one clock after the
// write or read that causes the change.
//
// The original design gives a pointer that counts up to N with empty/full
// flags; the three-state encoding, the decrement on read and the flag
// polarity (empty = 1 means no data) are this design's choices.
module fifo_indicator #(
  parameter int unsigned DEPTH = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr,     // an entry is written this cycle
  input  logic                       rd,     // an entry is read this cycle
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned CW = $clog2(DEPTH + 1);

  typedef enum logic [1:0] {
    S_EMPTY   = 2'b01,
    S_PARTIAL = 2'b00,
    S_FULL    = 2'b10
  } state_e;

  state_e        state, state_nx;
  logic [CW-1:0] count_nx;

  always_comb begin
    count_nx = count;
    if (wr && !rd)      count_nx = count + CW'(1);
    else if (rd && !wr) count_nx = count - CW'(1);

    if (count_nx == '0)               state_nx = S_EMPTY;
    else if (count_nx == CW'(DEPTH))  state_nx = S_FULL;
    else                              state_nx = S_PARTIAL;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_EMPTY;
      count <= '0;
    end else begin
      state <= state_nx;
      count <= count_nx;
    end
  end

  assign empty = (state == S_EMPTY);
  assign full  = (state == S_FULL);

  initial assert (DEPTH >= 1) else $error("fifo_indicator: DEPTH must be at least 1");

  no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) wr && full  |-> rd);
  no_underflow: assert property (@(posedge clk) disable iff (!rst_n) rd |-> !empty);

endmodule
