// tb_out_queue: checks the Out-queue: a vector load is taken only when the
// queue is empty, n lanes become n entries popped lane 0 first, and a lane
// count of 0 means all 64.
module tb_out_queue;
  import nca_pkg::*;
  logic clk = 0, rst_n = 0;
  logic load = 0, pop = 0, ready, empty;
  logic [63:0][3:0] vec = '0, v2;
  logic [5:0] nload = '0;
  sample_t head;
  logic [6:0] count;
  int checks = 0, failures = 0;

  out_queue dut (.*);
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
    check(ready && empty, "ready after reset");
    for (int k = 0; k < 64; k++) vec[k] = 4'($urandom);
    nload = 6'd3; load = 1; @(negedge clk); load = 0;
    check(count == 3 && !ready, "3 entries loaded");
    v2 = vec; v2[0] = ~vec[0];
    vec = v2; load = 1; @(negedge clk); load = 0;   // refused: not empty
    check(count == 3, "load refused while not empty");
    for (int k = 0; k < 3; k++) begin
      check(head == ((k == 0) ? ~v2[0] : v2[k]), $sformatf("pop %0d", k));
      pop = 1; @(negedge clk); pop = 0;
    end
    check(empty && ready, "empty after 3 pops");
    for (int k = 0; k < 64; k++) vec[k] = 4'($urandom);
    nload = 6'd0; load = 1; @(negedge clk); load = 0;
    check(count == 64, "0 means 64");
    for (int k = 0; k < 64; k++) begin
      check(head == vec[k], $sformatf("full pop %0d", k));
      pop = 1; @(negedge clk); pop = 0;
    end
    check(empty, "empty at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
