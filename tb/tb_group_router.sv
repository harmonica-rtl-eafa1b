// tb_group_router: group router 1 with four array models. Packets enter from
// the central router and from the other groups; the testbench collects what
// leaves on every port and checks destination, data (against the reference
// layer function), routing word, hop latency, dropping of invalid packets,
// back-pressure, arbitration between two inputs and the status recorder.
module tb_group_router;
  import nca_pkg::*;
  import nca_ref_pkg::*;
  localparam int LAT = 2;
  logic clk = 0, rst_n = 0;
  logic [2:0] grp_in_valid = '0, grp_in_ready, grp_out_valid, grp_out_ready = '1;
  pkt_t [2:0] grp_in_pkt = '0, grp_out_pkt;
  logic cen_in_valid = 0, cen_in_ready, cen_out_valid, cen_out_ready = 1;
  pkt_t cen_in_pkt = '0, cen_out_pkt;
  logic [3:0] mbc_start;
  vec_t [3:0] mbc_x, mbc_y;
  logic [11:0] status;
  int checks = 0, failures = 0;
  wmat_t wm;
  logic we = 0;
  logic [5:0] wr = 0, wc = 0;
  logic [7:0] wv = 0;
  pkt_t cen_q[$], grp_q[3][$];
  int cen_t[$];
  int cycle = 0;

  group_router #(.GID(2'd1), .LAT(LAT)) dut (.*);
  for (genvar a = 0; a < 4; a++) begin : g_m
    mbc_array #(.LAT(LAT)) u_m (.clk, .rst_n, .start(mbc_start[a]), .x(mbc_x[a]), .y(mbc_y[a]),
      .wr_en(we), .wr_row(wr), .wr_col(wc), .wr_w(wv), .rd_row(6'd0), .rd_col(6'd0), .rd_w());
  end
  always #5 clk = ~clk;

  int cin_t;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && cen_in_valid && cen_in_ready) cin_t = cycle;
    if (rst_n && cen_out_valid && cen_out_ready) begin cen_q.push_back(cen_out_pkt); cen_t.push_back(cycle); end
    for (int k = 0; k < 3; k++)
      if (rst_n && grp_out_valid[k] && grp_out_ready[k]) grp_q[k].push_back(grp_out_pkt[k]);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic route_t mk(addr_t a0, addr_t a1, addr_t a2);
    route_t r;
    r = '0; r[63] = 1; r[61:57] = a0; r[56:52] = a1; r[51:47] = a2;
    return r;
  endfunction

  task automatic send_cen(route_t r, vec_t d);
    @(negedge clk);
    while (!cen_in_ready) @(negedge clk);
    cen_in_valid = 1; cen_in_pkt.route = r; cen_in_pkt.data = d;
    @(negedge clk); cen_in_valid = 0;
  endtask

  task automatic wait_cycles(int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t x, x2;
    pkt_t p;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        @(negedge clk);
        wm[i][j] = rand_w(30);
        we = 1; wr = 6'(i); wc = 6'(j); wv = wm[i][j];
      end
    @(negedge clk); we = 0;
    for (int i = 0; i < 64; i++) x[i] = 4'($urandom);
    for (int i = 0; i < 64; i++) x2[i] = 4'($urandom);

    // 1. central -> local array 2 of group 1 -> back to central
    send_cen(mk(mbc_addr(2'd1, 2'd2), cpu_addr(), 5'd0), x);
    wait_cycles(20);
    check(cen_q.size() == 1, "one packet back to central");
    if (cen_q.size() == 1) begin
      p = cen_q.pop_front();
      check(p.data == mvm(x, wm, 7), "local layer result");
      check(route_head(p.route) == cpu_addr(), "CPU address at head");
      // one hop into the array's entry, LAT+1 cycles of computing, one hop out
      check(cen_t.pop_front() - cin_t == LAT + 3, "buffer-to-array-to-central latency");
    end

    // 2. central -> another group (3 sits on port index 2 of group 1)
    send_cen(mk(mbc_addr(2'd3, 2'd0), cpu_addr(), 5'd0), x);
    wait_cycles(5);
    check(grp_q[2].size() == 1 && grp_q[2][0].data == x, "forwarded to group 3");
    check(grp_q[0].size() == 0 && grp_q[1].size() == 0, "not on other group links");
    grp_q[2].delete();
    send_cen(mk(mbc_addr(2'd0, 2'd3), cpu_addr(), 5'd0), x);
    wait_cycles(5);
    check(grp_q[0].size() == 1, "forwarded to group 0");
    grp_q[0].delete();

    // 3. from group 0: two local layers (arrays 0 then 1), then central
    @(negedge clk);
    grp_in_valid[0] = 1; grp_in_pkt[0].route = mk(mbc_addr(2'd1, 2'd0), mbc_addr(2'd1, 2'd1), cpu_addr());
    grp_in_pkt[0].data = x2;
    @(negedge clk); grp_in_valid[0] = 0;
    wait_cycles(25);
    check(cen_q.size() == 1 && cen_q[0].data == mvm(mvm(x2, wm, 7), wm, 7), "two-layer path in group");
    cen_q.delete(); cen_t.delete();

    // 4. invalid packet is dropped
    send_cen('0, x);
    wait_cycles(10);
    check(cen_q.size() == 0 && grp_q[0].size() + grp_q[1].size() + grp_q[2].size() == 0, "invalid packet dropped");
    check(cen_in_ready, "buffer freed after drop");

    // 5. back-pressure and arbitration: two packets for the CPU while central is not ready
    cen_out_ready = 0;
    @(negedge clk);
    grp_in_valid[1] = 1; grp_in_pkt[1].route = mk(cpu_addr(), 5'd0, 5'd0); grp_in_pkt[1].data = x;
    cen_in_valid = 1;    cen_in_pkt.route = mk(mbc_addr(2'd1, 2'd3), cpu_addr(), 5'd0); cen_in_pkt.data = x2;
    @(negedge clk); grp_in_valid[1] = 0; cen_in_valid = 0;
    wait_cycles(12);
    check(cen_q.size() == 0, "nothing leaves while central not ready");
    check(!grp_in_ready[1], "input buffer held under back-pressure");
    check(status[1] && status[7], "status shows held buffer and held result");
    cen_out_ready = 1;
    wait_cycles(6);
    check(cen_q.size() == 2, "both packets delivered after release");
    if (cen_q.size() == 2) begin
      check((cen_q[0].data == x && cen_q[1].data == mvm(x2, wm, 7)) ||
            (cen_q[1].data == x && cen_q[0].data == mvm(x2, wm, 7)), "arbitrated packets intact");
    end
    check(status == '0, "status idle at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
