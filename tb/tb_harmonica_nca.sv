// tb_harmonica_nca: end-to-end test of the accelerator through its
// instruction interface. Four arrays are programmed; the CPU side then runs
//   a two-layer MLP inside one group, a two-layer MLP across two groups,
//   an AAM iteration (Loop = 3, four passes) on one array,
//   a burst of three launches whose results back up in the network,
//   an interval-triggered inline calibration that repairs drifted weights,
//   a launch that stalls behind the calibration, and an invalid routing word.
// Every deq'd value is compared with the reference layer function applied to
// the testbench's own copy of the weights. The testbench counts how often each
// mechanism occurred (stalls, back-pressure, cross-group hops, AAM passes,
// calibration, diversion, drop) and fails any that never did. The calibration
// interval is shortened to 13 runs and the calibration step raised to 8.
module tb_harmonica_nca;
  import nca_pkg::*;
  import nca_ref_pkg::*;
  localparam int T = 13;
  logic clk = 0, rst_n = 0;
  logic instr_valid = 0, instr_ready, deq_fire;
  nca_op_e instr_op = OP_SETP;
  route_t instr_data = '0;
  sample_t deq_data;
  logic prog_we = 0;
  logic [3:0] prog_arr = '0;
  logic [5:0] prog_row = '0, prog_col = '0;
  logic [7:0] prog_w = '0;
  logic ts_we = 0;
  logic [2:0] ts_idx = '0;
  logic [3:0] ts_arr = '0;
  vec_t ts_x = '0, ts_t = '0;
  logic cal_start = 0, cal_active;
  logic [15:0] cal_count, cal_updates;
  logic [4:0] central_status;
  logic [3:0][11:0] group_status;
  int checks = 0, failures = 0;
  int cycle = 0;

  harmonica_nca #(.T_ITVL(T), .CAL_STEP(8)) dut (.*);
  always #5 clk = ~clk;

  // arrays used: A = group 0 array 0, B = group 0 array 1, C = group 2 array 3, D = group 1 array 2
  localparam logic [3:0] ID_A = 4'b0000, ID_B = 4'b0100, ID_C = 4'b1110, ID_D = 4'b1001;
  wmat_t wa, wb, wc, wd, wa_good;

  // mechanism counters
  int n_launch_stall = 0, n_deq_stall = 0, n_hold_stall = 0, n_backpressure = 0;
  int n_xgroup = 0, n_aam_pass = 0, n_divert = 0, n_drop = 0, n_contention = 0;

  always @(posedge clk) if (rst_n) begin
    cycle <= cycle + 1;
    if (instr_valid && !instr_ready && instr_op == OP_LAUNCH && !dut.hold) n_launch_stall++;
    if (instr_valid && !instr_ready && instr_op == OP_LAUNCH && dut.hold) n_hold_stall++;
    if (instr_valid && !instr_ready && instr_op == OP_DEQ) n_deq_stall++;
    if (dut.cr_cpu_out_valid && !dut.cr_cpu_out_ready) n_backpressure++;
    if (dut.cal_ej_valid && dut.cal_ej_ready) n_divert++;
    if (dut.u_central.drop != '0) n_drop++;
    for (int s = 0; s < 4; s++)
      for (int d = 0; d < 4; d++)
        if (dut.l_valid[s][d] && dut.l_ready[s][d]) n_xgroup++;
    if (dut.g_grp[1].u_grp.mbc_start[2]) n_aam_pass++;
    for (int i = 0; i < 5; i++)
      for (int j = i + 1; j < 5; j++)
        if (dut.u_central.req[i] && dut.u_central.req[j] && dut.u_central.dest[i] == dut.u_central.dest[j]) n_contention++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic issue(nca_op_e op, route_t d, output sample_t res);
    int n;
    n = 0;
    res = '0;
    @(negedge clk);
    instr_valid = 1; instr_op = op; instr_data = d;
    #1;
    while (!instr_ready) begin @(negedge clk); #1; end
    if (deq_fire) res = deq_data;
    @(negedge clk);
    instr_valid = 0;
  endtask

  task automatic prog_array(logic [3:0] id, wmat_t w);
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        @(negedge clk);
        prog_we = 1; prog_arr = id; prog_row = 6'(i); prog_col = 6'(j); prog_w = w[i][j];
      end
    @(negedge clk); prog_we = 0;
  endtask

  task automatic load_inputs(vec_t x, int n);
    sample_t r;
    for (int i = 0; i < n; i++) issue(OP_MOVD, route_t'(x[i]), r);
  endtask

  task automatic read_outputs(vec_t e, int n, string what);
    sample_t r;
    for (int i = 0; i < n; i++) begin
      issue(OP_DEQ, '0, r);
      check(r == e[i], $sformatf("%s: output %0d got %0d expected %0d", what, i, r, e[i]));
    end
  endtask

  function automatic route_t mlp2(addr_t a0, addr_t a1, int nout);
    return {1'b1, 1'b0, a0, a1, cpu_addr(), 40'd0, 7'(nout)};
  endfunction

  function automatic vec_t mask(vec_t x, int n);
    for (int i = n; i < 64; i++) x[i] = '0;
    return x;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t x, e, x0, x1;
    vec_t xs[3];
    sample_t r;
    int t0, lat;
    addr_t aA, aB, aC, aD;
    aA = mbc_addr(2'd0, 2'd0); aB = mbc_addr(2'd0, 2'd1); aC = mbc_addr(2'd2, 2'd3); aD = mbc_addr(2'd1, 2'd2);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // weights: A has a structured block in rows 0..3 that calibration can restore exactly
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        wa[i][j] = (i < 4) ? ((j % 2 == 0) ? 8'd32 : -8'sd16) : rand_w(20);
        wb[i][j] = rand_w(40);
        wc[i][j] = rand_w(40);
        wd[i][j] = (i == j) ? 8'd100 : rand_w(6);
      end
    wa_good = wa;
    prog_array(ID_A, wa); prog_array(ID_B, wb); prog_array(ID_C, wc); prog_array(ID_D, wd);
    x0 = '0;
    for (int i = 0; i < 4; i++) x0[i] = 4'd4;
    ts_we = 1; ts_idx = 0; ts_arr = ID_A; ts_x = x0; ts_t = mvm(x0, wa_good, 7);
    @(negedge clk); ts_we = 0;

    // run 1: MLP 36 -> 16 -> 2 inside group 0, with its latency
    for (int i = 0; i < 64; i++) x[i] = 4'($urandom);
    issue(OP_SETP, mlp2(aA, aB, 2), r);
    load_inputs(x, 36);
    @(negedge clk);
    t0 = cycle;
    issue(OP_LAUNCH, '0, r);
    while (dut.u_cpu_if.outq_empty) @(negedge clk);
    lat = cycle - t0;
    // issue 1, launch register 1, central buffer 1, group buffer 1, per array: hop into
    // its entry 1 + LAT + 1 computing, result hop 1, central buffer 1, Out-queue 1 (LAT = 2)
    check(lat == 10 + 2 * 2, $sformatf("launch-to-result latency %0d cycles", lat));
    e = mvm(mvm(mask(x, 36), wa, 7), wb, 7);
    read_outputs(e, 2, "MLP in group");

    // run 2: MLP across groups (A in group 0, C in group 2)
    for (int i = 0; i < 64; i++) x[i] = 4'($urandom);
    issue(OP_SETP, mlp2(aA, aC, 3), r);
    load_inputs(x, 42);
    issue(OP_LAUNCH, '0, r);
    read_outputs(mvm(mvm(mask(x, 42), wa, 7), wc, 7), 3, "MLP across groups");

    // run 3: AAM on D, Loop = 3 -> 4 passes, 29 inputs, 4 outputs read
    for (int i = 0; i < 64; i++) x[i] = 4'($urandom);
    issue(OP_SETP, {1'b1, 1'b1, aD, 7'd3, cpu_addr(), 38'd0, 7'd4}, r);
    load_inputs(x, 29);
    issue(OP_LAUNCH, '0, r);
    e = mask(x, 29);
    for (int p = 0; p < 4; p++) e = mvm(e, wd, 7);
    read_outputs(e, 4, "AAM");
    check(n_aam_pass == 4, $sformatf("AAM made %0d passes", n_aam_pass));

    // seven single-layer runs to two groups without reading: the results pile up
    // in the network, launches stall behind them, and returning packets compete
    // for the central router's CPU port
    begin
      sample_t exp_vals[$];
      for (int k = 0; k < 7; k++) begin
        wmat_t wk;
        addr_t ak;
        ak = (k % 2 == 0) ? aA : aC;
        wk = (k % 2 == 0) ? wa_good : wc;
        issue(OP_SETP, {1'b1, 1'b0, ak, cpu_addr(), 45'd0, 7'd1}, r);
        x = '0;
        if (k < 6) begin
          x[0] = 4'($urandom_range(1, 7));
          x[1] = 4'($urandom);
          load_inputs(x, 2);
        end
        e = mvm(x, wk, 7);
        exp_vals.push_back(e[0]);
        if (k < 5) issue(OP_LAUNCH, '0, r);
      end
      // the last two launches back to back: the second finds the injection port busy
      @(negedge clk);
      instr_valid = 1; instr_op = OP_LAUNCH;
      for (int n = 0; n < 2; n++) begin
        @(posedge clk);
        while (!instr_ready) @(posedge clk);
      end
      @(negedge clk);
      instr_valid = 0;
      repeat (40) @(negedge clk);
      for (int k = 0; k < 7; k++) begin
        int idx;
        issue(OP_DEQ, '0, r);
        idx = -1;
        foreach (exp_vals[m]) if (idx < 0 && exp_vals[m] == r) idx = m;
        check(idx >= 0, $sformatf("stress result %0d (%0d) expected", k, r));
        if (idx >= 0) exp_vals.delete(idx);
      end
    end

    // drift: rows 0..3 of A lose their weights
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 64; j++) begin
        @(negedge clk);
        prog_we = 1; prog_arr = ID_A; prog_row = 6'(i); prog_col = 6'(j); prog_w = 8'd0;
        wa[i][j] = 8'd0;
      end
    @(negedge clk); prog_we = 0;

    // run 4 with drifted weights
    for (int i = 0; i < 64; i++) x[i] = 4'($urandom);
    issue(OP_SETP, mlp2(aA, aB, 2), r);
    load_inputs(x, 36);
    issue(OP_LAUNCH, '0, r);
    read_outputs(mvm(mvm(mask(x, 36), wa, 7), wb, 7), 2, "drifted run");

    // runs 5-7: burst; results queue up in the network behind the Out-queue
    for (int k = 0; k < 3; k++) issue(OP_SETP, mlp2(aA, aB, 2), r);
    for (int k = 0; k < 3; k++) begin
      for (int i = 0; i < 64; i++) xs[k][i] = 4'($urandom);
      load_inputs(xs[k], 36);
      issue(OP_LAUNCH, '0, r);
    end
    repeat (30) @(negedge clk);
    for (int k = 0; k < 3; k++) read_outputs(mvm(mvm(mask(xs[k], 36), wa, 7), wb, 7), 2, $sformatf("burst %0d", k));

    // the 13th run (second of the burst) completed the interval: calibration is due. Launch run 8 at once; it waits.
    check(cal_active || cal_count == 1, "calibration started after the interval");
    for (int i = 0; i < 64; i++) x[i] = 4'($urandom);
    issue(OP_SETP, mlp2(aA, aB, 2), r);
    load_inputs(x, 36);
    issue(OP_LAUNCH, '0, r);
    check(cal_count == 1 && !cal_active, "launch completed after calibration");
    check(cal_updates > 0, "calibration updated weights");
    read_outputs(mvm(mvm(mask(x, 36), wa_good, 7), wb, 7), 2, "after calibration (weights restored)");

    // invalid routing word: the packet is dropped inside the NCA
    issue(OP_SETP, '0, r);
    issue(OP_LAUNCH, '0, r);
    repeat (10) @(negedge clk);
    check(dut.u_cpu_if.outq_empty, "nothing returned for an invalid word");

    $display("mechanisms: launch_stall=%0d hold_stall=%0d deq_stall=%0d backpressure=%0d xgroup=%0d aam_pass=%0d divert=%0d drop=%0d contention=%0d",
             n_launch_stall, n_hold_stall, n_deq_stall, n_backpressure, n_xgroup, n_aam_pass, n_divert, n_drop, n_contention);
    check(n_hold_stall > 0, "launch stalled by calibration");
    check(n_deq_stall > 0, "deq stalled on empty Out-queue");
    check(n_backpressure > 0, "results backed up behind the Out-queue");
    check(n_xgroup > 0, "group-to-group hop");
    check(n_divert > 0, "calibration results diverted from the CPU");
    check(n_drop > 0, "invalid packet dropped");
    check(n_launch_stall > 0, "launch stalled on a busy injection port");
    check(n_contention > 0, "two packets competed for one router output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
