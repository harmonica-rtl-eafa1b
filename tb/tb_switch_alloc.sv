// tb_switch_alloc: drives random requests, destinations and output readiness
// into the 8-port allocator and compares grants with a round-robin model kept
// in the testbench; then checks fairness when all inputs want one output.
module tb_switch_alloc;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req = '0, out_ready = '0, gnt, out_valid;
  logic [N-1:0][2:0] dest = '0, sel;
  int checks = 0, failures = 0;
  int ptr[N];
  int wins[N];

  switch_alloc #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // compare against the model for the inputs now applied, then advance it
  task automatic compare_and_step();
    logic [N-1:0] eg;
    eg = '0;
    for (int o = 0; o < N; o++) begin
      int w;
      w = -1;
      for (int k = 0; k < N; k++) begin
        int i;
        i = (ptr[o] + k) % N;
        if (w < 0 && req[i] && dest[i] == 3'(o)) w = i;
      end
      check(out_valid[o] == (w >= 0), $sformatf("out_valid[%0d]", o));
      if (w >= 0) begin
        check(sel[o] == 3'(w), $sformatf("sel[%0d]", o));
        if (out_ready[o]) begin
          eg[w] = 1'b1;
          ptr[o] = (w + 1) % N;
          wins[w]++;
        end
      end
    end
    check(gnt == eg, "grant vector");
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < N; o++) begin ptr[o] = 0; wins[o] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      req = N'($urandom); out_ready = N'($urandom);
      for (int i = 0; i < N; i++) dest[i] = 3'($urandom);
      #1 compare_and_step();
    end
    for (int o = 0; o < N; o++) wins[o] = 0;
    for (int t = 0; t < 16; t++) begin
      @(negedge clk);
      req = '1; out_ready = '1; dest = '0;
      #1 compare_and_step();
    end
    for (int i = 0; i < N; i++) check(wins[i] == 2, $sformatf("fair share of input %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
