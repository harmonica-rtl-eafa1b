// work_queue: the work queue (WQ) of a group router, with its computing
// counters (CO) and packet generator (PG).
//
// One entry per local MBC array. A packet delivered to array k (in_valid and
// in_ready) fills entry k: the entry keeps the routing word, pulses
// mbc_start with the packet's samples on mbc_x, and loads its time counter
// with the array latency LAT. When the counter expires the array output
// mbc_y is taken. For an AAM packet (H = 1) the entry's loop counter holds the
// remaining passes: while it is non-zero the output is fed straight back into
// the same array and the counter decrements, so the Hopfield iteration never
// leaves the array. After the last pass the PG rewrites the routing word
// (drops the address just served, and for AAM the loop field) and the result
// becomes a packet on res_valid/res_pkt, the router's input buffer for this
// array. The entry accepts a new packet (in_ready) once its result has moved
// into that buffer; if the buffer is still occupied, the entry waits.
//
// busy/loops_done expose each entry's state to the status recorder.
// The entry-per-array organisation, the counters and the PG rule follow the
// router description; Loop = L meaning L+1 passes, the one-entry result
// buffer and the handshake are this design's choices.
module work_queue
  import nca_pkg::*;
#(
  parameter int unsigned NLOC = 4,
  parameter int unsigned LAT  = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // packets arriving from the crossbar for each local array
  input  logic [NLOC-1:0]      in_valid,
  input  pkt_t [NLOC-1:0]      in_pkt,
  output logic [NLOC-1:0]      in_ready,
  // local MBC arrays
  output logic [NLOC-1:0]      mbc_start,
  output vec_t [NLOC-1:0]      mbc_x,
  input  vec_t [NLOC-1:0]      mbc_y,
  // results, one buffered packet per array
  output logic [NLOC-1:0]      res_valid,
  output pkt_t [NLOC-1:0]      res_pkt,
  input  logic [NLOC-1:0]      res_ready,
  // status
  output logic [NLOC-1:0]      busy,
  output logic [NLOC-1:0][LOOP_W:0] loops_done
);
  localparam int unsigned CW = $clog2(LAT+1);

  route_t [NLOC-1:0]           route_q;
  logic   [NLOC-1:0][CW-1:0]   co_q;       // computing-time counter
  logic   [NLOC-1:0][LOOP_W-1:0] loop_q;   // remaining AAM passes

  assign in_ready = ~busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= '0;
      route_q    <= '0;
      co_q       <= '0;
      loop_q     <= '0;
      loops_done <= '0;
      mbc_start  <= '0;
      mbc_x      <= '0;
      res_valid  <= '0;
      res_pkt    <= '0;
    end else begin
      for (int k = 0; k < int'(NLOC); k++) begin
        mbc_start[k] <= 1'b0;
        if (res_valid[k] && res_ready[k]) res_valid[k] <= 1'b0;

        if (!busy[k]) begin
          if (in_valid[k]) begin
            busy[k]       <= 1'b1;
            route_q[k]    <= in_pkt[k].route;
            loop_q[k]     <= route_h(in_pkt[k].route) ? route_loop(in_pkt[k].route) : '0;
            loops_done[k] <= '0;
            co_q[k]       <= CW'(LAT);
            mbc_start[k]  <= 1'b1;
            mbc_x[k]      <= in_pkt[k].data;
          end
        end else if (co_q[k] != '0) begin
          co_q[k] <= co_q[k] - 1'b1;
        end else if (loop_q[k] != '0) begin
          // AAM: feed the output back for another pass
          loop_q[k]     <= loop_q[k] - 1'b1;
          loops_done[k] <= loops_done[k] + 1'b1;
          co_q[k]       <= CW'(LAT);
          mbc_start[k]  <= 1'b1;
          mbc_x[k]      <= mbc_y[k];
        end else if (!res_valid[k] || res_ready[k]) begin
          // PG: emit the result with the next routing word
          busy[k]          <= 1'b0;
          loops_done[k]    <= loops_done[k] + 1'b1;
          res_valid[k]     <= 1'b1;
          res_pkt[k].route <= route_advance(route_q[k]);
          res_pkt[k].data  <= mbc_y[k];
        end
      end
    end
  end
endmodule
