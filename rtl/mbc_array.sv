// mbc_array: behavioural model of one memristor-based crossbar (MBC) array
// with its neuron logic. The real part is an analog 64x64 memristor crossbar
// built as four sub-arrays; this model reproduces its function at the level of
// the 4-bit codes that the NCA boundary converters use.
//
// Function: y[j] = f( sum_i x[i] * w[i][j] ), the crossbar's vector-matrix
// product V_o = C x V_i followed by the sigmoid neuron. Weights are signed;
// the four products (positive/negative input) x (positive/negative weight)
// are accumulated separately, as the four physical sub-arrays would, and then
// combined. The neuron is a piecewise-linear stand-in for the sigmoid: the sum
// is scaled down by 2^ACT_SHIFT and saturated to a signed 4-bit code.
//
// Timing: start samples x; y holds the result LAT cycles later and stays
// valid until the next start has propagated (LAT defaults to 2 cycles of a
// 333 MHz clock, covering crossbar, op-amp and sigmoid delays). The array
// has no done flag: the owning router counts LAT itself.
//
// Programming: wr_en writes one weight (row, col); rd_row/rd_col read one
// weight combinationally. Weights are not reset, as memristors are
// non-volatile; the owner programs every weight it relies on.
//
// The 64x64 size, signed inputs and weights over four sub-arrays, and the
// sigmoid neuron follow the accelerator description; the 8-bit weight code
// (sign plus 7-bit resolution), the neuron's scale and the latency in cycles
// are this model's choices.
module mbc_array
  import nca_pkg::*;
#(
  parameter int unsigned N_ROW     = 64,
  parameter int unsigned N_COL     = 64,
  parameter int unsigned ACT_SHIFT = 7,
  parameter int unsigned LAT       = 2
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [N_ROW-1:0][DATA_W-1:0] x,
  output logic [N_COL-1:0][DATA_W-1:0] y,
  input  logic                        wr_en,
  input  logic [$clog2(N_ROW)-1:0]    wr_row,
  input  logic [$clog2(N_COL)-1:0]    wr_col,
  input  logic [WEIGHT_W-1:0]         wr_w,
  input  logic [$clog2(N_ROW)-1:0]    rd_row,
  input  logic [$clog2(N_COL)-1:0]    rd_col,
  output logic [WEIGHT_W-1:0]         rd_w
);
  logic [WEIGHT_W-1:0] w [N_ROW][N_COL];
  logic [N_COL-1:0][DATA_W-1:0] pipe [LAT];

  assign rd_w = w[rd_row][rd_col];
  assign y    = pipe[LAT-1];

  always_ff @(posedge clk) begin
    if (wr_en) w[wr_row][wr_col] <= wr_w;
  end

  // One combinational dot product per column; start registers all columns.
  logic [N_COL-1:0][DATA_W-1:0] y_now;

  for (genvar j = 0; j < int'(N_COL); j++) begin : g_col
    always_comb begin
      // sub-array partial sums: pp = (+x)(+w), pn = (+x)(-w), np = (-x)(+w), nn = (-x)(-w)
      logic signed [31:0] pp, pn, np, nn, xi, wij;
      pp = 0; pn = 0; np = 0; nn = 0;
      for (int i = 0; i < int'(N_ROW); i++) begin
        xi  = 32'(signed'(x[i]));
        wij = 32'(signed'(w[i][j]));
        if (xi >= 0 && wij >= 0)     pp += xi * wij;
        else if (xi >= 0)            pn += xi * (-wij);
        else if (wij >= 0)           np += (-xi) * wij;
        else                         nn += (-xi) * (-wij);
      end
      y_now[j] = sat_sample((pp - pn - np + nn) >>> ACT_SHIFT);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(LAT); s++) pipe[s] <= '0;
    end else begin
      for (int s = 1; s < int'(LAT); s++) pipe[s] <= pipe[s-1];
      if (start) pipe[0] <= y_now;
    end
  end
endmodule
