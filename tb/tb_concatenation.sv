// tb_concatenation: checks the field extraction stage.
// Drives random 13-bit words, checks after each clock edge that req, x, y
// and the packet equal the fields of the word sampled at that edge (bit 12,
// bits 11:10, bits 1:0), and that the asynchronous reset clears them.
module tb_concatenation;
  import noc_pkg::*;

  logic    clk = 0;
  logic    rst_n = 1;
  packet_t data_in = '0;
  logic    req;
  flit_t   flit;
  int      checks = 0, failures = 0;

  concatenation dut (.clk, .rst_n, .data_in, .req, .flit);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    packet_t sent;
    #1 rst_n = 0;
    #1;
    check(req == 0 && flit == '0, "outputs cleared in reset");
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      sent = packet_t'($urandom);
      data_in = sent;
      @(posedge clk); #1;
      check(req == sent[12], $sformatf("req of %b", sent));
      check(flit.x == {sent[11], sent[10]}, $sformatf("x of %b", sent));
      check(flit.y == {sent[1], sent[0]}, $sformatf("y of %b", sent));
      check(flit.pkt == sent, $sformatf("pkt of %b", sent));
    end
    // asynchronous reset in the middle of a cycle
    data_in = 13'h1FFF;
    @(posedge clk); #2;
    check(req == 1 && flit.x == 2'b11, "loaded all ones");
    rst_n = 0; #1;
    check(req == 0 && flit == '0, "asynchronous clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
