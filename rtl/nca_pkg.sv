// nca_pkg: types, sizes and routing-information helpers shared by the
// neuromorphic computing accelerator (NCA).
//
// The NCA keeps its data in analog form between the crossbar arrays. In this
// RTL an analog sample is carried as the 4-bit code that the boundary DAC/ADC
// would produce (0 V..1 V in 62.5 mV steps), read as a signed two's-complement
// value. A packet moving through the routers is one 64-entry sample vector
// plus one 64-bit routing-information word.
//
// Routing-information word (the V/H/Addr/Loop layout follows the accelerator
// description; the split of the low bits is this design's choice):
//   [63]    V     valid
//   [62]    H     0 = MLP (address list), 1 = AAM (address + loop count)
//   [61:7]  route area, read from the top:
//             MLP: Addr0[4:0], Addr1[4:0], ..., CPU address
//             AAM: Addr0[4:0], Loop[6:0], CPU address
//   [6:0]   number of output lanes the CPU collects (0 means 64)
// Address: [4] = 1 selects the CPU, [3:2] the array within a group,
// [1:0] the group.
package nca_pkg;

  localparam int unsigned NLANE    = 64;  // analog signals per port / crossbar rows
  localparam int unsigned DATA_W   = 4;   // DAC/ADC resolution
  localparam int unsigned WEIGHT_W = 8;   // sign + 7-bit memristor programming resolution
  localparam int unsigned ROUTE_W  = 64;  // Config-queue word
  localparam int unsigned ADDR_W   = 5;
  localparam int unsigned LOOP_W   = 7;
  localparam int unsigned NGROUP   = 4;
  localparam int unsigned NARRAY   = 4;   // arrays per group
  localparam int unsigned AREA_HI  = 61;
  localparam int unsigned AREA_LO  = 7;
  localparam int unsigned AREA_W   = AREA_HI - AREA_LO + 1;

  typedef logic [DATA_W-1:0]             sample_t;
  typedef logic [NLANE-1:0][DATA_W-1:0]  vec_t;
  typedef logic [ROUTE_W-1:0]            route_t;
  typedef logic [ADDR_W-1:0]             addr_t;

  typedef struct packed {
    route_t route;
    vec_t   data;
  } pkt_t;

  typedef enum logic [1:0] {
    OP_SETP   = 2'd0,
    OP_MOVD   = 2'd1,
    OP_LAUNCH = 2'd2,
    OP_DEQ    = 2'd3
  } nca_op_e;

  function automatic logic route_v(route_t r);
    return r[63];
  endfunction

  function automatic logic route_h(route_t r);
    return r[62];
  endfunction

  function automatic addr_t route_head(route_t r);
    return r[AREA_HI -: ADDR_W];
  endfunction

  function automatic logic [LOOP_W-1:0] route_loop(route_t r);
    return r[AREA_HI-ADDR_W -: LOOP_W];
  endfunction

  function automatic logic [6:0] route_ocnt(route_t r);
    return r[6:0];
  endfunction

  // Packet generator rule: drop the address just served. An AAM word also
  // drops its loop field, so the CPU address becomes the head and H clears.
  function automatic route_t route_advance(route_t r);
    route_t n;
    n = r;
    if (r[62]) begin
      n[AREA_HI:AREA_LO] = {r[AREA_HI-ADDR_W-LOOP_W:AREA_LO], {(ADDR_W+LOOP_W){1'b0}}};
      n[62] = 1'b0;
    end else begin
      n[AREA_HI:AREA_LO] = {r[AREA_HI-ADDR_W:AREA_LO], {ADDR_W{1'b0}}};
    end
    return n;
  endfunction

  function automatic addr_t cpu_addr();
    return addr_t'(5'b10000);
  endfunction

  function automatic addr_t mbc_addr(logic [1:0] grp, logic [1:0] arr);
    return {1'b0, arr, grp};
  endfunction

  // Saturate a signed sum to a signed DATA_W-bit code.
  function automatic sample_t sat_sample(logic signed [31:0] v);
    if (v > 32'sd7)       return sample_t'(4'sd7);
    else if (v < -32'sd8) return sample_t'(-4'sd8);
    else                  return sample_t'(v[DATA_W-1:0]);
  endfunction

endpackage
