// tb_calib_ctrl: the calibration controller with one array model and a
// testbench stand-in for the network (inject -> array -> eject). Weights are
// programmed to a trained state, two training vectors are stored, then the
// weights are made to drift. After T_ITVL runs the controller must hold new
// launches, wait for the NCA to drain, re-tune the drifted weights back to the
// trained values with the delta rule, send nothing to the CPU side, and
// restart its run counter.
module tb_calib_ctrl;
  import nca_pkg::*;
  import nca_ref_pkg::*;
  localparam int T = 5;
  logic clk = 0, rst_n = 0;
  logic run_done = 0, nca_idle = 0, start_now = 0, hold, active;
  logic ts_we = 0;
  logic [0:0] ts_idx = '0;
  logic [3:0] ts_arr = '0;
  vec_t ts_x = '0, ts_t = '0;
  logic inj_valid, inj_ready = 1, ej_valid = 0, ej_ready;
  pkt_t inj_pkt, ej_pkt = '0;
  logic w_we;
  logic [3:0] w_arr;
  logic [5:0] w_row, w_col;
  logic [7:0] w_wdata, w_rdata;
  logic [15:0] n_calib, n_updates;
  int checks = 0, failures = 0;
  wmat_t good;
  logic tb_we = 0;
  logic [5:0] tb_r = 0, tb_c = 0;
  logic [7:0] tb_w = 0;
  logic start = 0;
  vec_t mx = '0, my;
  int injections = 0;

  calib_ctrl #(.T_ITVL(T), .N_VEC(2), .MAX_PASS(16), .STEP(8)) dut (.*);
  mbc_array u_arr (.clk, .rst_n, .start, .x(mx), .y(my),
    .wr_en(tb_we || (w_we && w_arr == 4'b0110)), .wr_row(tb_we ? tb_r : w_row),
    .wr_col(tb_we ? tb_c : w_col), .wr_w(tb_we ? tb_w : w_wdata),
    .rd_row(w_row), .rd_col(w_col), .rd_w(w_rdata));
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // network stand-in: one packet at a time, array latency plus four hops
  initial begin
    forever begin
      @(posedge clk);
      if (rst_n && inj_valid && inj_ready) begin
        injections++;
        check(inj_pkt.route[63] && inj_pkt.route[61:57] == mbc_addr(2'd2, 2'd1) &&
              inj_pkt.route[56:52] == cpu_addr(), "calibration packet routed to its array and back");
        @(negedge clk); mx = inj_pkt.data; start = 1;
        @(negedge clk); start = 0;
        repeat (3) @(negedge clk);
        ej_pkt.route = '0; ej_pkt.data = my; ej_valid = 1;
        forever begin
          @(posedge clk);
          if (ej_ready) break;
        end
        @(negedge clk);
        ej_valid = 0;
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_all(bit drifted);
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        @(negedge clk);
        tb_we = 1; tb_r = 6'(i); tb_c = 6'(j);
        tb_w = drifted && ((i < 4) || (i >= 8 && i < 12)) ? 8'd0 : good[i][j];
      end
    @(negedge clk); tb_we = 0;
  endtask

  initial begin
    vec_t x0, x1;
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++)
        good[i][j] = ((i < 4) || (i >= 8 && i < 12)) ? ((j % 2 == 0) ? 8'd32 : -8'sd16) : 8'(rand_w(3));
    x0 = '0; x1 = '0;
    for (int i = 0; i < 4; i++) begin x0[i] = 4'd4; x1[8+i] = 4'd4; end
    write_all(0);
    @(negedge clk);
    ts_we = 1; ts_idx = 0; ts_arr = 4'b0110; ts_x = x0; ts_t = mvm(x0, good, 7);
    @(negedge clk);
    ts_idx = 1; ts_x = x1; ts_t = mvm(x1, good, 7);
    @(negedge clk); ts_we = 0;
    check(ts_t[0] == 4'd4 && ts_t[1] == 4'hE, "targets as designed");
    write_all(1);   // drift
    // T-1 runs: nothing happens
    for (int r = 0; r < T - 1; r++) begin run_done = 1; @(negedge clk); run_done = 0; @(negedge clk); end
    check(!hold && !active, "no calibration before the interval");
    run_done = 1; @(negedge clk); run_done = 0;
    repeat (2) @(negedge clk);
    check(hold, "hold after T_ITVL runs");
    repeat (20) @(negedge clk);
    check(injections == 0, "waits for the NCA to drain");
    nca_idle = 1;
    cyc = 0;
    while (hold && cyc < 150000) begin @(negedge clk); cyc++; end
    check(!active && !hold, "calibration finished");
    check(n_calib == 1, "one calibration");
    check(injections == 10, $sformatf("5 passes over 2 vectors (%0d packets)", injections));
    // even columns: 4 rows x 32 cols x 4 passes; odd columns: 4 x 32 x 2 passes; per vector
    check(n_updates == 16'(2 * (4 * 32 * 4 + 4 * 32 * 2)), $sformatf("delta-rule updates (%0d)", n_updates));
    @(negedge clk); mx = x0; start = 1; @(negedge clk); start = 0; repeat (3) @(negedge clk);
    check(my == mvm(x0, good, 7), "vector 0 restored");
    @(negedge clk); mx = x1; start = 1; @(negedge clk); start = 0; repeat (3) @(negedge clk);
    check(my == mvm(x1, good, 7), "vector 1 restored");
    // counter restarted: T-1 more runs do not trigger
    for (int r = 0; r < T - 1; r++) begin run_done = 1; @(negedge clk); run_done = 0; @(negedge clk); end
    check(!hold, "run counter restarted");
    // software trigger
    start_now = 1; @(negedge clk); start_now = 0;
    cyc = 0;
    while (hold && cyc < 150000) begin @(negedge clk); cyc++; end
    check(n_calib == 2 && injections == 12, "start_now: one clean pass, no further updates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
