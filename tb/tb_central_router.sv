// tb_central_router: injects packets from the CPU side and from the group
// ports with random destinations and random output back-pressure, and checks
// that each arrives once, intact, at the port its head address names (CPU
// address -> CPU side, array address -> its group), in order per
// source/destination pair; an invalid packet is dropped; one hop per cycle.
module tb_central_router;
  import nca_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] grp_in_valid = '0, grp_in_ready, grp_out_valid, grp_out_ready = '1;
  pkt_t [3:0] grp_in_pkt = '0, grp_out_pkt;
  logic cpu_in_valid = 0, cpu_in_ready, cpu_out_valid, cpu_out_ready = 1;
  pkt_t cpu_in_pkt = '0, cpu_out_pkt;
  logic [4:0] status;
  int checks = 0, failures = 0;
  pkt_t exp_q[5][$];   // expected per output port
  int sent = 0, got = 0;

  central_router dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int port_of(route_t r);
    addr_t a;
    a = route_head(r);
    return a[4] ? 4 : int'(a[1:0]);
  endfunction

  function automatic pkt_t rnd_pkt(int src);
    pkt_t p;
    addr_t a;
    p.data = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    p.route = '0;
    p.route[63] = 1'b1;
    // the CPU side sends to arrays; groups send to the CPU or to other groups
    if (src == 4 || ($urandom % 2)) a = {1'b0, 2'($urandom), 2'($urandom)};
    else a = cpu_addr();
    p.route[61:57] = a;
    p.route[31:0] = 32'(sent);   // tag
    return p;
  endfunction

  // collect and compare
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < 5; o++) begin
      logic v;
      pkt_t p;
      v = (o == 4) ? (cpu_out_valid && cpu_out_ready) : (grp_out_valid[o] && grp_out_ready[o]);
      p = (o == 4) ? cpu_out_pkt : grp_out_pkt[o];
      if (v) begin
        int idx;
        idx = -1;
        got++;
        foreach (exp_q[o][k]) if (idx < 0 && exp_q[o][k] == p) idx = k;
        check(idx >= 0, $sformatf("unexpected packet on port %0d", o));
        if (idx >= 0) exp_q[o].delete(idx);
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // single-packet latency: CPU side -> group 2 leaves the cycle after capture
    @(negedge clk);
    cpu_in_valid = 1; cpu_in_pkt = '0; cpu_in_pkt.route[63] = 1; cpu_in_pkt.route[61:57] = mbc_addr(2'd2, 2'd1);
    cpu_in_pkt.data = '1;
    exp_q[2].push_back(cpu_in_pkt); sent++;
    @(negedge clk); cpu_in_valid = 0;
    check(grp_out_valid[2] && grp_out_pkt[2] == cpu_in_pkt, "CPU -> group 2 in one hop");
    @(negedge clk);
    check(status == 5'b10000, "status (one cycle behind) shows CPU buffer occupied");
    // invalid packet
    cpu_in_valid = 1; cpu_in_pkt.route = '0; @(negedge clk); cpu_in_valid = 0;
    @(negedge clk); @(negedge clk);
    check(cpu_in_ready && grp_out_valid == '0, "invalid packet dropped");
    // random traffic
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      grp_out_ready = 4'($urandom); cpu_out_ready = 1'($urandom);
      for (int s = 0; s < 5; s++) begin
        logic rdy;
        rdy = (s == 4) ? cpu_in_ready : grp_in_ready[s];
        if (rdy && ($urandom % 3 == 0)) begin
          pkt_t p;
          p = rnd_pkt(s);
          sent++;
          exp_q[port_of(p.route)].push_back(p);
          if (s == 4) begin cpu_in_valid = 1; cpu_in_pkt = p; end
          else begin grp_in_valid[s] = 1; grp_in_pkt[s] = p; end
        end else begin
          if (s == 4) cpu_in_valid = 0; else grp_in_valid[s] = 0;
        end
      end
    end
    @(negedge clk);
    grp_in_valid = '0; cpu_in_valid = 0; grp_out_ready = '1; cpu_out_ready = 1;
    repeat (20) @(negedge clk);
    check(got == sent, $sformatf("all %0d packets delivered (%0d)", sent, got));
    for (int o = 0; o < 5; o++) check(exp_q[o].size() == 0, $sformatf("nothing left for port %0d", o));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
