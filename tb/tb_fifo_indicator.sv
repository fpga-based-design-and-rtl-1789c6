// tb_fifo_indicator: checks the occupancy FSM against a counter model.
// Random legal write/read patterns (no write when full without a read, no
// read when empty) are applied; after each edge count, empty and full must
// match the model. Every state (empty, partial, full) must be reached.
module tb_fifo_indicator;
  localparam int unsigned DEPTH = 4;

  logic clk = 0, rst_n = 1, wr = 0, rd = 0;
  logic empty, full;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  int model = 0, seen_full = 0, seen_empty = 0;

  fifo_indicator #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .wr, .rd, .empty, .full, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    #1;
    checks++; if (!(empty && !full && count == 0)) failures++;
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // bias towards filling in the first half, draining in the second
      wr = ($urandom % 4) < ((n / 250) % 2 ? 1 : 3);
      rd = ($urandom % 4) < ((n / 250) % 2 ? 3 : 1);
      if (model == 0) rd = 0;
      if (model == DEPTH && !rd) wr = 0;
      @(posedge clk); #1;
      model = model + int'(wr) - int'(rd);
      checks++;
      if (count != model || empty != (model == 0) || full != (model == DEPTH)) begin
        failures++;
        $display("FAIL n=%0d count=%0d empty=%b full=%b model=%0d", n, count, empty, full, model);
      end
      if (full) seen_full++;
      if (empty) seen_empty++;
    end
    checks++; if (seen_full == 0)  begin failures++; $display("FAIL never full");  end
    checks++; if (seen_empty == 0) begin failures++; $display("FAIL never empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
