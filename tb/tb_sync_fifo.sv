// tb_sync_fifo: checks the Config-queue FIFO at its default size (128 x 64):
// fill to full, order of the words read back, empty flag, and simultaneous
// push and pop. Expected values come from a queue model in the testbench.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [63:0] wr_data = '0, rd_data;
  logic full, empty;
  logic [7:0] count;
  int checks = 0, failures = 0;
  logic [63:0] model[$];

  sync_fifo dut (.*);
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
    @(negedge clk);
    check(empty && !full && count == 0, "empty after reset");
    for (int i = 0; i < 128; i++) begin
      wr_data = {$urandom, $urandom}; push = 1;
      model.push_back(wr_data);
      @(negedge clk);
    end
    push = 0;
    check(full && count == 128, "full after 128 pushes");
    for (int i = 0; i < 64; i++) begin
      check(rd_data == model.pop_front(), $sformatf("order at %0d", i));
      pop = 1; @(negedge clk); pop = 0;
    end
    check(count == 64, "count after 64 pops");
    // simultaneous push and pop keeps the count
    for (int i = 0; i < 50; i++) begin
      wr_data = {$urandom, $urandom}; push = 1; pop = 1;
      check(rd_data == model[0], "head during push+pop");
      void'(model.pop_front()); model.push_back(wr_data);
      @(negedge clk);
    end
    push = 0; pop = 0;
    check(count == 64, "count unchanged by push+pop");
    while (!empty) begin
      check(rd_data == model.pop_front(), "drain order");
      pop = 1; @(negedge clk); pop = 0;
    end
    check(model.size() == 0 && count == 0, "drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
