// out_queue: the NCA Out-queue, 64 entries of 4 bits.
//
// The 64 parallel ADCs deliver a whole output vector at once; load writes
// lanes 0..n-1 of it (n = nload, 0 meaning all 64) into the queue, which must
// be empty to accept it (ready = empty). Each deq instruction then pops one
// element from the head, lane 0 first. Interface: load/ready/vec/nload on the
// NCA side, pop/head/empty on the CPU side. The size is the accelerator's;
// the per-vector lane count comes from the routing word and is this design's
// choice.
module out_queue
  import nca_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    load,
  input  logic [DEPTH-1:0][DATA_W-1:0] vec,
  input  logic [$clog2(DEPTH)-1:0] nload,
  output logic    ready,
  input  logic    pop,
  output sample_t head,
  output logic    empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [DEPTH-1:0][DATA_W-1:0] mem;
  logic [AW-1:0] rptr;

  assign empty = (count == '0);
  assign ready = empty;
  assign head  = mem[rptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem   <= '0;
      rptr  <= '0;
      count <= '0;
    end else if (load && empty) begin
      mem   <= vec;
      rptr  <= '0;
      count <= (nload == '0) ? ($clog2(DEPTH+1))'(DEPTH) : ($clog2(DEPTH+1))'(nload);
    end else if (pop && !empty) begin
      rptr  <= rptr + 1'b1;
      count <= count - 1'b1;
    end
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);
endmodule
