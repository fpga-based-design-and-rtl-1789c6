// tb_noc_mesh: a 4 x 4 mesh of routers, the largest network the 2-bit X and
// Y addresses can name.
//
// Router (x, y) has its South output wired to the North input of (x+1, y)
// and its East output to the West input of (x, y+1), and the reverse links
// likewise; busy_out of each receiving port drives busy_in of the sending
// output. Packets are injected on the free boundary inputs (North inputs of
// row 0, South inputs of row 3, West inputs of column 0, East inputs of
// column 3), each source obeying busy_out, with random destinations. A
// scoreboard checks that every packet leaves on the Local output of its
// destination router exactly once and in order per source/destination pair,
// and that no packet is ever driven out of the mesh boundary.
module tb_noc_mesh;
  import noc_pkg::*;

  localparam int N = 4;
  localparam int NSRC = 4 * N;   // boundary inputs

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  packet_t in_e  [N][N], in_w  [N][N], in_n  [N][N], in_s  [N][N];
  packet_t out_e [N][N], out_w [N][N], out_n [N][N], out_s [N][N], out_l [N][N];
  logic    bi_e  [N][N], bi_w  [N][N], bi_n  [N][N], bi_s  [N][N];
  logic    bo_e  [N][N], bo_w  [N][N], bo_n  [N][N], bo_s  [N][N];

  // boundary stimulus, indexed by source number
  packet_t src_data [NSRC];

  for (genvar x = 0; x < N; x++) begin : g_x
    for (genvar y = 0; y < N; y++) begin : g_y
      noc_router u_r (
        .clk, .rst_n, .cx(coord_t'(x)), .cy(coord_t'(y)),
        .data_in_e (in_e[x][y]),  .data_in_w (in_w[x][y]),
        .data_in_n (in_n[x][y]),  .data_in_s (in_s[x][y]),
        .data_out_e(out_e[x][y]), .data_out_w(out_w[x][y]),
        .data_out_n(out_n[x][y]), .data_out_s(out_s[x][y]),
        .data_out_l(out_l[x][y]),
        .busy_in_e (bi_e[x][y]),  .busy_in_w (bi_w[x][y]),
        .busy_in_n (bi_n[x][y]),  .busy_in_s (bi_s[x][y]),
        .busy_out_e(bo_e[x][y]),  .busy_out_w(bo_w[x][y]),
        .busy_out_n(bo_n[x][y]),  .busy_out_s(bo_s[x][y])
      );
      // North side: row x-1 or boundary source y (row 0)
      if (x > 0) begin : g_nlink
        assign in_n[x][y] = out_s[x-1][y];
        assign bi_n[x][y] = bo_s[x-1][y];
      end else begin : g_nedge
        assign in_n[x][y] = src_data[y];
        assign bi_n[x][y] = 1'b0;
      end
      // South side
      if (x < N - 1) begin : g_slink
        assign in_s[x][y] = out_n[x+1][y];
        assign bi_s[x][y] = bo_n[x+1][y];
      end else begin : g_sedge
        assign in_s[x][y] = src_data[N + y];
        assign bi_s[x][y] = 1'b0;
      end
      // West side
      if (y > 0) begin : g_wlink
        assign in_w[x][y] = out_e[x][y-1];
        assign bi_w[x][y] = bo_e[x][y-1];
      end else begin : g_wedge
        assign in_w[x][y] = src_data[2*N + x];
        assign bi_w[x][y] = 1'b0;
      end
      // East side
      if (y < N - 1) begin : g_elink
        assign in_e[x][y] = out_w[x][y+1];
        assign bi_e[x][y] = bo_w[x][y+1];
      end else begin : g_eedge
        assign in_e[x][y] = src_data[3*N + x];
        assign bi_e[x][y] = 1'b0;
      end
    end
  end

  // busy_out seen by each boundary source
  logic src_busy [NSRC];
  for (genvar k = 0; k < N; k++) begin : g_src
    assign src_busy[k]       = bo_n[0][k];
    assign src_busy[N + k]   = bo_s[N-1][k];
    assign src_busy[2*N + k] = bo_w[k][0];
    assign src_busy[3*N + k] = bo_e[k][N-1];
  end

  int checks = 0, failures = 0;
  int sent = 0, received = 0;
  int seen_busy = 0;
  // expected packets per destination router, per source
  packet_t sb [N*N][NSRC][$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Payload carries the source number (4 bits) and a sequence number.
  function automatic packet_t make_pkt(int src, int seq, int dx, int dy);
    packet_t p;
    p = '0;
    p[REQ_BIT] = 1'b1;
    p[11:10] = 2'(dx);
    p[1:0]   = 2'(dy);
    p[9:2]   = 8'({src[3:0], seq[3:0]});
    return p;
  endfunction

  bit run = 0;
  always @(posedge clk) if (run) begin
    #2;
    for (int x = 0; x < N; x++)
      for (int y = 0; y < N; y++) begin
        if (pkt_req(out_l[x][y])) begin
          int src;
          src = int'(out_l[x][y][9:6]);
          received++;
          check(pkt_x(out_l[x][y]) == 2'(x) && pkt_y(out_l[x][y]) == 2'(y),
                $sformatf("router (%0d,%0d) ejected %b", x, y, out_l[x][y]));
          if (sb[x*N+y][src].size() == 0) check(0, $sformatf("unexpected %b", out_l[x][y]));
          else begin
            packet_t want;
            want = sb[x*N+y][src].pop_front();
            check(out_l[x][y] == want, $sformatf("(%0d,%0d) got %b want %b", x, y, out_l[x][y], want));
          end
        end
      end
    // nothing leaves over the mesh edge
    for (int k = 0; k < N; k++) begin
      check(!pkt_req(out_n[0][k]) && !pkt_req(out_s[N-1][k]) &&
            !pkt_req(out_w[k][0]) && !pkt_req(out_e[k][N-1]), "packet left the mesh");
    end
  end

  initial begin
    bit may [NSRC];
    int seq [NSRC];
    for (int s = 0; s < NSRC; s++) begin src_data[s] = '0; seq[s] = 0; end
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int s = 0; s < NSRC; s++) begin
        may[s] = !src_busy[s];
        if (src_busy[s]) seen_busy++;
      end
      @(posedge clk); #1;
      for (int s = 0; s < NSRC; s++) begin
        src_data[s] = '0;
        if (n < 2800 && may[s] && ($urandom % 3) == 0) begin
          int dx, dy;
          packet_t p;
          dx = $urandom % N;
          dy = $urandom % N;
          p = make_pkt(s, seq[s], dx, dy);
          seq[s] = (seq[s] + 1) % 16;
          sb[dx*N+dy][s].push_back(p);
          src_data[s] = p;
          sent++;
        end
      end
    end
    repeat (20) @(posedge clk);
    run = 0;
    for (int d = 0; d < N*N; d++)
      for (int s = 0; s < NSRC; s++)
        check(sb[d][s].size() == 0, $sformatf("%0d packets lost from %0d to %0d", sb[d][s].size(), s, d));
    check(sent == received && sent > 0, $sformatf("sent %0d received %0d", sent, received));
    check(seen_busy > 0, "no back-pressure at the mesh boundary");
    $display("sent=%0d received=%0d boundary_busy_cycles=%0d", sent, received, seen_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
