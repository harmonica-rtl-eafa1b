// tb_nca_cpu_if: runs NCA instruction sequences against the CPU boundary.
// Checks that setp/movd/launch build the injected packet (routing word and
// DAC lanes), that launch stalls on an empty Config-queue, a busy injection
// port and a calibration hold, that deq stalls on an empty Out-queue and
// returns the result lanes in order, that setp stalls on a full Config-queue,
// and the run and idle indications.
module tb_nca_cpu_if;
  import nca_pkg::*;
  logic clk = 0, rst_n = 0;
  logic instr_valid = 0, instr_ready, deq_fire;
  nca_op_e instr_op = OP_SETP;
  route_t instr_data = '0;
  sample_t deq_data;
  logic hold = 0, inj_valid, inj_ready = 0, ej_valid = 0, ej_ready, run_done, idle;
  pkt_t inj_pkt, ej_pkt = '0;
  int checks = 0, failures = 0;

  nca_cpu_if dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // issue one instruction; returns the number of stall cycles (gives up at limit)
  task automatic issue(nca_op_e op, route_t d, int limit, output int stalls, output sample_t res);
    stalls = 0;
    res = '0;
    @(negedge clk);
    instr_valid = 1; instr_op = op; instr_data = d;
    #1;
    while (!instr_ready && stalls < limit) begin @(negedge clk); #1; stalls++; end
    if (deq_fire) res = deq_data;
    @(negedge clk);
    instr_valid = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int st;
    sample_t r;
    route_t w0, w1;
    sample_t vals[5];
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(idle, "idle after reset");
    issue(OP_LAUNCH, '0, 5, st, r);
    check(st == 5, "launch stalls on empty Config-queue");
    w0 = {1'b1, 1'b0, mbc_addr(2'd0, 2'd1), cpu_addr(), 45'd0, 7'd3};
    w1 = {1'b1, 1'b1, mbc_addr(2'd2, 2'd2), 7'd5, cpu_addr(), 38'd0, 7'd4};
    issue(OP_SETP, w0, 5, st, r); check(st == 0, "setp");
    issue(OP_SETP, w1, 5, st, r); check(st == 0, "setp 2");
    for (int i = 0; i < 5; i++) begin
      vals[i] = 4'($urandom);
      issue(OP_MOVD, {60'($urandom), vals[i]}, 5, st, r);
      check(st == 0, "movd");
    end
    hold = 1;
    issue(OP_LAUNCH, '0, 4, st, r);
    check(st == 4 && !inj_valid, "launch held during calibration");
    hold = 0;
    issue(OP_LAUNCH, '0, 4, st, r);
    check(st == 0 && inj_valid, "launch");
    check(inj_pkt.route == w0, "injected routing word");
    for (int k = 0; k < 64; k++) check(inj_pkt.data[k] == ((k < 5) ? vals[k] : 4'h0), $sformatf("DAC lane %0d", k));
    check(!idle, "not idle with a run in flight");
    // second launch stalls while the injection port is still occupied
    issue(OP_LAUNCH, '0, 3, st, r);
    check(st == 3, "launch stalls on busy injection port");
    inj_ready = 1; @(negedge clk); inj_ready = 0;
    check(!inj_valid, "injection handed over");
    issue(OP_LAUNCH, '0, 3, st, r);
    check(st == 0 && inj_pkt.route == w1 && inj_pkt.data == '0, "second launch with empty In-queue");
    inj_ready = 1; @(negedge clk); inj_ready = 0;
    // deq on an empty Out-queue stalls
    issue(OP_DEQ, '0, 4, st, r);
    check(st == 4, "deq stalls on empty Out-queue");
    // results return (ADC side)
    @(negedge clk);
    ej_pkt.route = {1'b1, 1'b0, cpu_addr(), 50'd0, 7'd3};
    for (int k = 0; k < 64; k++) ej_pkt.data[k] = 4'(k + 3);
    ej_valid = 1; #1;
    check(ej_ready && run_done, "result taken, run counted");
    @(negedge clk); ej_valid = 0; #1;
    check(!ej_ready, "Out-queue busy until read");
    for (int k = 0; k < 3; k++) begin
      issue(OP_DEQ, '0, 4, st, r);
      check(st == 0 && r == 4'(k + 3), $sformatf("deq %0d", k));
    end
    issue(OP_DEQ, '0, 2, st, r);
    check(st == 2, "Out-queue empty after 3 deq");
    ej_valid = 1; @(negedge clk); ej_valid = 0;   // second run completes
    check(idle, "idle after both runs returned");
    // Config-queue capacity: 128 setp then a stall
    for (int i = 0; i < 128; i++) begin
      issue(OP_SETP, route_t'(i), 2, st, r);
      if (st != 0) check(0, "setp within capacity stalled");
    end
    issue(OP_SETP, '1, 3, st, r);
    check(st == 3, "setp stalls on full Config-queue");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
