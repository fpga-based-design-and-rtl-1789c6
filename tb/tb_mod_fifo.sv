// tb_mod_fifo: checks the packet FIFO against a queue model.
// Random push/pop traffic, including pushes while full (which must be
// dropped unless a pop happens in the same cycle) and pops while empty
// (ignored). Head data, empty, full and count are compared every cycle.
module tb_mod_fifo;
  localparam int unsigned DEPTH = 4;
  localparam int unsigned WIDTH = noc_pkg::FLIT_W;

  logic clk = 0, rst_n = 1, push = 0, pop = 0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic empty, full;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [WIDTH-1:0] q[$];
  int checks = 0, failures = 0, full_push = 0;

  mod_fifo #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (
    .clk, .rst_n, .push, .wdata, .pop, .rdata, .empty, .full, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == DEPTH) || count != q.size()) begin
        failures++;
        $display("FAIL flags n=%0d size=%0d count=%0d e=%b f=%b", n, q.size(), count, empty, full);
      end
      if (q.size() > 0) begin
        checks++;
        if (rdata != q[0]) begin
          failures++;
          $display("FAIL head n=%0d got %h want %h", n, rdata, q[0]);
        end
      end
      push  = ($urandom % 8) < (((n / 300) % 2) ? 3 : 6);
      pop   = ($urandom % 8) < (((n / 300) % 2) ? 6 : 3);
      wdata = WIDTH'($urandom);
      @(posedge clk);
      if (pop && q.size() > 0) begin
        if (push) q.push_back(wdata);
        void'(q.pop_front());
      end else if (push && q.size() < DEPTH) begin
        q.push_back(wdata);
      end else if (push) begin
        full_push++;
      end
    end
    checks++; if (full_push == 0) begin failures++; $display("FAIL never pushed while full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
