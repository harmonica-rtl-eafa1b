// tb_work_queue: the work queue with four real array models attached.
// Checks: an MLP packet is evaluated once and leaves with the next address at
// the head after exactly LAT+2 cycles; an AAM packet with Loop = L is fed
// through its array L+1 times, leaves with the CPU address at the head and
// H cleared; entries are independent; a held result stalls the entry.
module tb_work_queue;
  import nca_pkg::*;
  import nca_ref_pkg::*;
  localparam int LAT = 2;
  logic clk = 0, rst_n = 0;
  logic [3:0] in_valid = '0, in_ready, mbc_start, res_valid, res_ready = '0, busy;
  pkt_t [3:0] in_pkt = '0, res_pkt;
  vec_t [3:0] mbc_x, mbc_y;
  logic [3:0][7:0] loops_done;
  int checks = 0, failures = 0;
  wmat_t wm;

  work_queue #(.NLOC(4), .LAT(LAT)) dut (.*);
  for (genvar a = 0; a < 4; a++) begin : g_m
    logic we = 0;
    logic [5:0] r = 0, c = 0;
    logic [7:0] wv = 0;
    mbc_array #(.LAT(LAT)) u_m (.clk, .rst_n, .start(mbc_start[a]), .x(mbc_x[a]), .y(mbc_y[a]),
      .wr_en(we), .wr_row(r), .wr_col(c), .wr_w(wv), .rd_row(6'd0), .rd_col(6'd0), .rd_w());
  end
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic route_t mk_mlp(addr_t a0, addr_t a1, addr_t a2);
    route_t r;
    r = '0; r[63] = 1; r[61:57] = a0; r[56:52] = a1; r[51:47] = a2; r[6:0] = 7'd5;
    return r;
  endfunction
  function automatic route_t mk_aam(addr_t a0, int loops);
    route_t r;
    r = '0; r[63] = 1; r[62] = 1; r[61:57] = a0; r[56:50] = 7'(loops); r[49:45] = 5'h10; r[6:0] = 7'd3;
    return r;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t x, e;
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // identical weights in all four arrays: w = 64 on the diagonal, i.e. y = x/2 (rounded down),
    // plus a small off-diagonal term so repeated passes change the vector
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        wm[i][j] = (i == j) ? 8'd127 : ((j == (i + 1) % 64) ? 8'd64 : 8'd0);
      end
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        @(negedge clk);
        g_m[0].we = 1; g_m[0].r = 6'(i); g_m[0].c = 6'(j); g_m[0].wv = wm[i][j];
        g_m[1].we = 1; g_m[1].r = 6'(i); g_m[1].c = 6'(j); g_m[1].wv = wm[i][j];
        g_m[2].we = 1; g_m[2].r = 6'(i); g_m[2].c = 6'(j); g_m[2].wv = wm[i][j];
        g_m[3].we = 1; g_m[3].r = 6'(i); g_m[3].c = 6'(j); g_m[3].wv = wm[i][j];
      end
    @(negedge clk);
    g_m[0].we = 0; g_m[1].we = 0; g_m[2].we = 0; g_m[3].we = 0;

    // MLP packet into entry 1
    for (int i = 0; i < 64; i++) x[i] = 4'($urandom);
    e = mvm(x, wm, 7);
    check(in_ready == 4'hF, "all entries idle");
    in_pkt[1].route = mk_mlp(5'h05, 5'h0A, 5'h10); in_pkt[1].data = x; in_valid[1] = 1;
    @(negedge clk); in_valid[1] = 0;
    check(busy[1] && !in_ready[1], "entry busy after accept");
    cyc = 1;
    while (!res_valid[1] && cyc < 50) begin @(negedge clk); cyc++; end
    check(cyc == LAT + 2, $sformatf("MLP latency %0d cycles", cyc));
    check(res_pkt[1].data == e, "MLP result");
    check(res_pkt[1].route[61:57] == 5'h0A && res_pkt[1].route[56:52] == 5'h10, "next address at head");
    check(res_pkt[1].route[6:0] == 7'd5 && res_pkt[1].route[63], "count and valid kept");
    check(!busy[1], "entry free with result buffered");

    // result not drained: a second packet runs but its result waits
    in_pkt[1].data = e; in_valid[1] = 1;
    @(negedge clk); in_valid[1] = 0;
    repeat (LAT + 4) @(negedge clk);
    check(busy[1] && res_valid[1] && res_pkt[1].data == e, "entry holds while buffer occupied");
    res_ready[1] = 1; @(negedge clk); res_ready[1] = 0;
    @(negedge clk);
    check(res_valid[1] && res_pkt[1].data == mvm(e, wm, 7), "second result after drain");
    res_ready[1] = 1; @(negedge clk); res_ready[1] = 0;

    // AAM packet with Loop = 3 into entry 2 (4 passes) and MLP into entry 0 at the same time
    for (int i = 0; i < 64; i++) x[i] = 4'($urandom);
    in_pkt[2].route = mk_aam(5'h09, 3); in_pkt[2].data = x;
    in_pkt[0].route = mk_mlp(5'h01, 5'h10, 5'h00); in_pkt[0].data = x;
    in_valid = 4'b0101;
    @(negedge clk); in_valid = '0;
    e = x;
    for (int p = 0; p < 4; p++) e = mvm(e, wm, 7);
    cyc = 1;
    while (!res_valid[2] && cyc < 100) begin
      @(negedge clk); cyc++;
      if (res_valid[0]) begin
        check(res_pkt[0].data == mvm(x, wm, 7), "parallel MLP entry");
        res_ready[0] = 1;
      end else res_ready[0] = 0;
    end
    res_ready[0] = 0;
    check(cyc == 4 * (LAT + 1) + 1, $sformatf("AAM 4 passes in %0d cycles", cyc));
    check(res_pkt[2].data == e, "AAM result after 4 passes");
    check(res_pkt[2].route[61:57] == 5'h10 && !res_pkt[2].route[62], "AAM leaves for CPU, H cleared");
    check(loops_done[2] == 8'd4, "loop counter shows 4 passes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
