// tb_harmonica_full: one complete operation of the accelerator at its default
// parameters (64x64 arrays, 4 groups of 4, 128-word Config-queue, calibration
// interval 20000 runs). Two arrays in different groups are programmed with
// random weights, a 64-input vector is loaded with movd, a two-layer MLP
// route (group 3 array 2, then group 1 array 0, then the CPU) is set with
// setp and launched, and all 64 outputs are read with deq and compared with
// the reference layer function.
module tb_harmonica_full;
  import nca_pkg::*;
  import nca_ref_pkg::*;
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
  wmat_t w1, w2;

  harmonica_nca dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic issue(nca_op_e op, route_t d, output sample_t res);
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

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t x, e;
    sample_t r;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        w1[i][j] = rand_w(40);
        w2[i][j] = rand_w(60);
      end
    prog_array({2'd2, 2'd3}, w1);
    prog_array({2'd0, 2'd1}, w2);
    for (int i = 0; i < 64; i++) x[i] = 4'($urandom);
    issue(OP_SETP, {1'b1, 1'b0, mbc_addr(2'd3, 2'd2), mbc_addr(2'd1, 2'd0), cpu_addr(), 40'd0, 7'd0}, r);
    for (int i = 0; i < 64; i++) issue(OP_MOVD, route_t'(x[i]), r);
    issue(OP_LAUNCH, '0, r);
    e = mvm(mvm(x, w1, 7), w2, 7);
    for (int j = 0; j < 64; j++) begin
      issue(OP_DEQ, '0, r);
      check(r == e[j], $sformatf("output %0d got %0d expected %0d", j, r, e[j]));
    end
    check(dut.u_cpu_if.outq_empty && cal_count == 0, "Out-queue empty, no calibration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
