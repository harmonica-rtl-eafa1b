// group_router: one mixed-signal group router of the M-Net, together with the
// control of its four local MBC arrays.
//
// Eight ports: 0-3 the local MBC arrays, 4-6 the three other group routers
// (in increasing group number, skipping this one), 7 the central router.
// Each incoming port from another router has a one-packet input buffer, the
// sample-and-hold that keeps the analog vector until it can move on; for the
// local arrays that buffer is the work queue's result register. The head
// address of a buffered packet's routing word selects its output: a CPU
// address goes to the central router, an address in this group to the local
// array it names (through the work queue), any other to that group's router.
// A packet whose valid bit is clear is dropped. The switch allocator grants
// at most one input per output each cycle and the crossbar multiplexer
// (a per-output select of the granted buffer) moves the packet, so a hop from
// one router's buffer into the next takes one cycle.
//
// The status recorder (SR) registers the occupancy of the input buffers, the
// result buffers and the busy state of the local arrays into the status
// output. The ready each neighbour sees is the emptiness of its input buffer.
//
// Handshake on every link: valid/pkt from the sender, ready from the
// receiver, transfer when both are high; ready does not depend on valid.
// Port counts, buffer-per-port and the WQ/CO/PG/SA/SR split follow the
// router description; one-cycle hops, single-entry buffers and dropping
// invalid packets are this design's choices.
module group_router
  import nca_pkg::*;
#(
  parameter logic [1:0]  GID = 2'd0,
  parameter int unsigned LAT = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // other group routers
  input  logic [2:0]        grp_in_valid,
  input  pkt_t [2:0]        grp_in_pkt,
  output logic [2:0]        grp_in_ready,
  output logic [2:0]        grp_out_valid,
  output pkt_t [2:0]        grp_out_pkt,
  input  logic [2:0]        grp_out_ready,
  // central router
  input  logic              cen_in_valid,
  input  pkt_t              cen_in_pkt,
  output logic              cen_in_ready,
  output logic              cen_out_valid,
  output pkt_t              cen_out_pkt,
  input  logic              cen_out_ready,
  // local MBC arrays
  output logic [3:0]        mbc_start,
  output vec_t [3:0]        mbc_x,
  input  vec_t [3:0]        mbc_y,
  // status recorder
  output logic [11:0]       status
);
  localparam int unsigned NP = 8;

  // input buffers of the router-to-router ports (4..7)
  logic [3:0] buf_v;
  pkt_t [3:0] buf_p;

  // work queue
  logic [3:0] wq_in_valid, wq_in_ready, res_valid, res_ready, wq_busy;
  pkt_t [3:0] wq_in_pkt, res_pkt;

  work_queue #(.NLOC(4), .LAT(LAT)) u_wq (
    .clk, .rst_n,
    .in_valid(wq_in_valid), .in_pkt(wq_in_pkt), .in_ready(wq_in_ready),
    .mbc_start, .mbc_x, .mbc_y,
    .res_valid, .res_pkt, .res_ready,
    .busy(wq_busy), .loops_done()
  );

  // all eight input ports
  logic [NP-1:0] in_v;
  pkt_t [NP-1:0] in_p;
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      in_v[k]   = res_valid[k];
      in_p[k]   = res_pkt[k];
      in_v[4+k] = buf_v[k];
      in_p[4+k] = buf_p[k];
    end
  end

  // route computation
  function automatic logic [2:0] out_port(addr_t a);
    if (a[4])             return 3'd7;
    else if (a[1:0] == GID) return {1'b0, a[3:2]};
    else if (a[1:0] < GID)  return 3'd4 + {1'b0, a[1:0]};
    else                    return 3'd3 + {1'b0, a[1:0]};
  endfunction

  logic [NP-1:0]        req, drop, gnt, out_ready, out_valid;
  logic [NP-1:0][2:0]   dest, sel;
  always_comb begin
    for (int i = 0; i < int'(NP); i++) begin
      drop[i] = in_v[i] && !route_v(in_p[i].route);
      req[i]  = in_v[i] && route_v(in_p[i].route);
      dest[i] = out_port(route_head(in_p[i].route));
    end
    for (int k = 0; k < 4; k++) out_ready[k] = wq_in_ready[k];
    for (int k = 0; k < 3; k++) out_ready[4+k] = grp_out_ready[k];
    out_ready[7] = cen_out_ready;
  end

  switch_alloc #(.N(NP)) u_sa (
    .clk, .rst_n, .req, .dest, .out_ready, .gnt, .sel, .out_valid
  );

  // crossbar multiplexer
  pkt_t [NP-1:0] xbar;
  always_comb begin
    for (int o = 0; o < int'(NP); o++) xbar[o] = in_p[sel[o]];
    for (int k = 0; k < 4; k++) begin
      wq_in_valid[k] = out_valid[k];
      wq_in_pkt[k]   = xbar[k];
    end
    for (int k = 0; k < 3; k++) begin
      grp_out_valid[k] = out_valid[4+k];
      grp_out_pkt[k]   = xbar[4+k];
    end
    cen_out_valid = out_valid[7];
    cen_out_pkt   = xbar[7];
    for (int k = 0; k < 4; k++) res_ready[k] = gnt[k] || drop[k];
  end

  // input buffers (sample-and-hold)
  logic [3:0] in_valid_ext;
  pkt_t [3:0] in_pkt_ext;
  always_comb begin
    for (int k = 0; k < 3; k++) begin
      in_valid_ext[k] = grp_in_valid[k];
      in_pkt_ext[k]   = grp_in_pkt[k];
    end
    in_valid_ext[3] = cen_in_valid;
    in_pkt_ext[3]   = cen_in_pkt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_v <= '0;
      buf_p <= '0;
    end else begin
      for (int k = 0; k < 4; k++) begin
        if (buf_v[k]) begin
          if (gnt[4+k] || drop[4+k]) buf_v[k] <= 1'b0;
        end else if (in_valid_ext[k]) begin
          buf_v[k] <= 1'b1;
          buf_p[k] <= in_pkt_ext[k];
        end
      end
    end
  end

  // status recorder
  logic [11:0] sr_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr_q <= '0;
    else        sr_q <= {wq_busy, res_valid, buf_v};
  end
  assign status = sr_q;
  // a buffer is free for the neighbour exactly when it holds nothing
  assign grp_in_ready = ~buf_v[2:0];
  assign cen_in_ready = ~buf_v[3];
endmodule
