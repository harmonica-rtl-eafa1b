// tb_mbc_array: programs random weights into one 64x64 array, applies random
// signed input vectors and compares every output lane with the reference
// layer function after exactly LAT cycles; also checks the weight read-back.
module tb_mbc_array;
  import nca_pkg::*;
  import nca_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [63:0][3:0] x = '0, y, exp_y, prev_y = '0;
  logic wr_en = 0;
  logic [5:0] wr_row = 0, wr_col = 0, rd_row = 0, rd_col = 0;
  logic [7:0] wr_w = 0, rd_w;
  int checks = 0, failures = 0;
  wmat_t wm;

  mbc_array dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        @(negedge clk);
        wm[i][j] = rand_w((j < 32) ? 40 : 127);
        wr_en = 1; wr_row = 6'(i); wr_col = 6'(j); wr_w = wm[i][j];
      end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 20; t++) begin
      rd_row = 6'($urandom); rd_col = 6'($urandom);
      #1 check(rd_w == wm[rd_row][rd_col], "weight read-back");
    end
    for (int v = 0; v < 12; v++) begin
      for (int i = 0; i < 64; i++) x[i] = (v == 0) ? 4'(i % 2 ? 1 : -1) : 4'($urandom);
      exp_y = mvm(x, wm, 7);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      // start sampled at one edge; result visible after LAT = 2 edges
      check(y == prev_y, $sformatf("vec %0d: previous result still shown one cycle after start", v));
      @(negedge clk);
      for (int j = 0; j < 64; j++) check(y[j] == exp_y[j], $sformatf("vec %0d lane %0d", v, j));
      x = '0;
      prev_y = exp_y;
      @(negedge clk);
      check(y == exp_y, "output held while idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
