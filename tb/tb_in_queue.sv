// tb_in_queue: checks the In-queue: serial pushes land in lanes 0..n-1, the
// parallel read shows zeros beyond the fill, a drain empties it, a push in
// the drain cycle becomes entry 0, and the queue refuses a 65th element.
module tb_in_queue;
  import nca_pkg::*;
  logic clk = 0, rst_n = 0;
  logic push = 0, drain = 0;
  sample_t wr_data = '0;
  logic [63:0][3:0] vec;
  logic full;
  logic [6:0] count;
  int checks = 0, failures = 0;
  sample_t model[64];

  in_queue dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 36; i++) begin
      model[i] = sample_t'($urandom);
      wr_data = model[i]; push = 1; @(negedge clk);
    end
    push = 0;
    check(count == 36, "count 36");
    for (int k = 0; k < 64; k++)
      check(vec[k] == ((k < 36) ? model[k] : 4'h0), $sformatf("lane %0d", k));
    drain = 1; wr_data = 4'h9; push = 1; @(negedge clk);
    drain = 0; push = 0;
    check(count == 1 && vec[0] == 4'h9 && vec[1] == 0, "push during drain");
    drain = 1; @(negedge clk); drain = 0;
    check(count == 0 && vec == '0, "empty after drain");
    for (int i = 0; i < 64; i++) begin
      model[i] = sample_t'($urandom);
      wr_data = model[i]; push = 1; @(negedge clk);
    end
    push = 0;
    check(full && count == 64, "full at 64");
    for (int k = 0; k < 64; k++) check(vec[k] == model[k], $sformatf("full lane %0d", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
