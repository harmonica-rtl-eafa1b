// in_queue: the NCA In-queue, 64 entries of 4 bits.
//
// Each movd instruction pushes one 4-bit input element. On launch the whole
// queue is read at once by the 64 parallel DACs: entry k drives lane k, lanes
// beyond the current fill read as zero, and the queue empties. A push in the
// same cycle as a drain lands as entry 0 of the emptied queue. Interface:
// push/wr_data (taken when !full), drain (one-cycle pulse), vec (all lanes,
// combinational), count. The size is the accelerator's; serial fill with
// parallel drain is this design's reading of how the queue meets the DACs.
module in_queue
  import nca_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    push,
  input  sample_t wr_data,
  input  logic    drain,
  output logic [DEPTH-1:0][DATA_W-1:0] vec,
  output logic    full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  logic [DEPTH-1:0][DATA_W-1:0] mem;

  assign full = (count == ($clog2(DEPTH+1))'(DEPTH));

  always_comb begin
    for (int k = 0; k < DEPTH; k++)
      vec[k] = (k < int'(count)) ? mem[k] : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      mem   <= '0;
    end else if (drain) begin
      if (push) begin
        mem[0] <= wr_data;
        count  <= 1;
      end else begin
        count  <= '0;
      end
    end else if (push && !full) begin
      mem[count[$clog2(DEPTH)-1:0]] <= wr_data;
      count <= count + 1'b1;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) (push && !drain) |-> !full);
endmodule
