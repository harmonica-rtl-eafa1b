// switch_alloc: switch allocator (SA) of an NCA router.
//
// Each of N input buffers may request one output port (req, dest). For each
// output the allocator grants one requester, searching round-robin from the
// input after the last one it granted, and only while that output can accept
// (out_ready). gnt is one-hot per input and combinational; the round-robin
// pointers advance on a granted transfer. Each input asks for one output, so
// an input is never granted twice. Round-robin arbitration is this design's
// choice; the accelerator names the allocator without its policy.
module switch_alloc #(
  parameter int unsigned N = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [N-1:0]               req,
  input  logic [N-1:0][$clog2(N)-1:0] dest,
  input  logic [N-1:0]               out_ready,
  output logic [N-1:0]               gnt,
  output logic [N-1:0][$clog2(N)-1:0] sel,      // per output: granted input
  output logic [N-1:0]               out_valid  // per output: a grant exists
);
  localparam int unsigned IW = $clog2(N);
  logic [N-1:0][IW-1:0] ptr;

  always_comb begin
    gnt       = '0;
    sel       = '0;
    out_valid = '0;
    for (int o = 0; o < int'(N); o++) begin
      for (int k = 0; k < int'(N); k++) begin
        int i;
        i = (int'(ptr[o]) + k) % int'(N);
        if (!out_valid[o] && req[i] && (int'(dest[i]) == o)) begin
          out_valid[o] = 1'b1;
          sel[o]       = IW'(i);
        end
      end
      if (out_valid[o] && out_ready[o]) gnt[sel[o]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else begin
      for (int o = 0; o < int'(N); o++)
        if (out_valid[o] && out_ready[o])
          ptr[o] <= (sel[o] == IW'(N-1)) ? '0 : sel[o] + 1'b1;
    end
  end

  a_grant_requested: assert property (@(posedge clk) disable iff (!rst_n) (gnt & ~req) == '0);
endmodule
