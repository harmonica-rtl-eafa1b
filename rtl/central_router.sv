// central_router: the M-Net's central router, between the NCA's CPU boundary
// and the four group routers.
//
// Five ports: 0-3 the group routers, 4 the CPU side (packets injected by
// launch or by the calibration controller; results ejected towards the
// Out-queue). Each input has a one-packet buffer. The head address of the
// routing word selects the output: a CPU address goes to port 4, any array
// address to the router of the group it names. A packet whose valid bit is
// clear is dropped. A round-robin switch allocator and a crossbar multiplexer
// move one packet per output per cycle; ready on a link is the emptiness of
// the receiving buffer. The central router's role and its five neighbours
// follow the accelerator description; the buffering and handshake match the
// group routers and are this design's choice.
module central_router
  import nca_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  grp_in_valid,
  input  pkt_t [3:0]  grp_in_pkt,
  output logic [3:0]  grp_in_ready,
  output logic [3:0]  grp_out_valid,
  output pkt_t [3:0]  grp_out_pkt,
  input  logic [3:0]  grp_out_ready,
  input  logic        cpu_in_valid,
  input  pkt_t        cpu_in_pkt,
  output logic        cpu_in_ready,
  output logic        cpu_out_valid,
  output pkt_t        cpu_out_pkt,
  input  logic        cpu_out_ready,
  output logic [4:0]  status
);
  localparam int unsigned NP = 5;

  logic [NP-1:0] buf_v;
  pkt_t [NP-1:0] buf_p;
  logic [NP-1:0] ext_v;
  pkt_t [NP-1:0] ext_p;

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      ext_v[k] = grp_in_valid[k];
      ext_p[k] = grp_in_pkt[k];
    end
    ext_v[4] = cpu_in_valid;
    ext_p[4] = cpu_in_pkt;
  end

  logic [NP-1:0]      req, drop, gnt, out_ready, out_valid;
  logic [NP-1:0][2:0] dest, sel;
  always_comb begin
    for (int i = 0; i < int'(NP); i++) begin
      addr_t a;
      a       = route_head(buf_p[i].route);
      drop[i] = buf_v[i] && !route_v(buf_p[i].route);
      req[i]  = buf_v[i] && route_v(buf_p[i].route);
      dest[i] = a[4] ? 3'd4 : {1'b0, a[1:0]};
    end
    out_ready = {cpu_out_ready, grp_out_ready};
  end

  switch_alloc #(.N(NP)) u_sa (
    .clk, .rst_n, .req, .dest, .out_ready, .gnt, .sel, .out_valid
  );

  always_comb begin
    for (int o = 0; o < 4; o++) begin
      grp_out_valid[o] = out_valid[o];
      grp_out_pkt[o]   = buf_p[sel[o]];
    end
    cpu_out_valid = out_valid[4];
    cpu_out_pkt   = buf_p[sel[4]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_v <= '0;
      buf_p <= '0;
    end else begin
      for (int k = 0; k < int'(NP); k++) begin
        if (buf_v[k]) begin
          if (gnt[k] || drop[k]) buf_v[k] <= 1'b0;
        end else if (ext_v[k]) begin
          buf_v[k] <= 1'b1;
          buf_p[k] <= ext_p[k];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) status <= '0;
    else        status <= buf_v;
  end

  assign grp_in_ready = ~buf_v[3:0];
  assign cpu_in_ready = ~buf_v[4];
endmodule
