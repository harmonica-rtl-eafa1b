// harmonica_nca: the memristor-based neuromorphic computing accelerator (NCA)
// that sits beside a CPU pipeline and runs neural-network layers in analog
// crossbars.
//
// Structure: the CPU boundary (nca_cpu_if: Config-, In- and Out-queue, the
// DAC/ADC edge and the four NCA instructions) feeds the central router; the
// central router connects to four group routers, which are fully connected to
// each other; each group router owns four MBC arrays, 16 arrays in all. A
// launched packet carries one 64-sample vector and its routing word. Each
// array named in the word computes one layer (MLP), or iterates the same
// array Loop+1 times (AAM), and the last address returns the result to the
// Out-queue, where deq reads it. The inline calibration controller counts runs
// and periodically re-tunes the arrays with stored training vectors.
//
// Ports: instr_* is the instruction issue interface of nca_cpu_if, with
// deq_fire/deq_data returning deq results. prog_* writes one weight of one
// array (prog_arr = {array[1:0], group[1:0]}), the offline training path;
// it is ignored while calibration runs. ts_* loads the calibration training
// set; cal_start triggers a calibration at once. Status outputs expose router
// occupancy and calibration statistics.
//
// Timing at the defaults: one cycle per router hop, MBC_LAT cycles per array
// evaluation, one packet per link per two cycles. The topology, counts and
// sizes follow the accelerator description; the clocking, handshakes and
// latencies in cycles are this design's choices.
module harmonica_nca
  import nca_pkg::*;
#(
  parameter int unsigned MBC_LAT   = 2,
  parameter int unsigned ACT_SHIFT = 7,
  parameter int unsigned T_ITVL    = 20000,
  parameter int unsigned CAL_VEC   = 8,
  parameter int unsigned CAL_PASS  = 16,
  parameter int unsigned CAL_STEP  = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        instr_valid,
  input  nca_op_e     instr_op,
  input  route_t      instr_data,
  output logic        instr_ready,
  output logic        deq_fire,
  output sample_t     deq_data,
  input  logic        prog_we,
  input  logic [3:0]  prog_arr,
  input  logic [5:0]  prog_row,
  input  logic [5:0]  prog_col,
  input  logic [WEIGHT_W-1:0] prog_w,
  input  logic        ts_we,
  input  logic [$clog2(CAL_VEC)-1:0] ts_idx,
  input  logic [3:0]  ts_arr,
  input  vec_t        ts_x,
  input  vec_t        ts_t,
  input  logic        cal_start,
  output logic        cal_active,
  output logic [15:0] cal_count,
  output logic [15:0] cal_updates,
  output logic [4:0]  central_status,
  output logic [3:0][11:0] group_status
);
  // ---------------- CPU boundary and calibration ----------------
  logic cif_inj_valid, cif_inj_ready, cif_ej_valid, cif_ej_ready;
  pkt_t cif_inj_pkt;
  logic run_done, nca_idle, hold;
  logic cal_inj_valid, cal_inj_ready, cal_ej_valid, cal_ej_ready;
  pkt_t cal_inj_pkt;
  logic cr_cpu_in_valid, cr_cpu_in_ready, cr_cpu_out_valid, cr_cpu_out_ready;
  pkt_t cr_cpu_in_pkt, cr_cpu_out_pkt;
  logic cw_we;
  logic [3:0] cw_arr;
  logic [5:0] cw_row, cw_col;
  logic [WEIGHT_W-1:0] cw_wdata, cw_rdata;

  nca_cpu_if u_cpu_if (
    .clk, .rst_n,
    .instr_valid, .instr_op, .instr_data, .instr_ready, .deq_fire, .deq_data,
    .hold,
    .inj_valid(cif_inj_valid), .inj_pkt(cif_inj_pkt), .inj_ready(cif_inj_ready),
    .ej_valid(cif_ej_valid), .ej_pkt(cr_cpu_out_pkt), .ej_ready(cif_ej_ready),
    .run_done, .idle(nca_idle)
  );

  calib_ctrl #(.T_ITVL(T_ITVL), .N_VEC(CAL_VEC), .MAX_PASS(CAL_PASS), .STEP(CAL_STEP)) u_cal (
    .clk, .rst_n, .run_done, .nca_idle, .start_now(cal_start),
    .hold, .active(cal_active),
    .ts_we, .ts_idx, .ts_arr, .ts_x, .ts_t,
    .inj_valid(cal_inj_valid), .inj_pkt(cal_inj_pkt), .inj_ready(cal_inj_ready),
    .ej_valid(cal_ej_valid), .ej_pkt(cr_cpu_out_pkt), .ej_ready(cal_ej_ready),
    .w_we(cw_we), .w_arr(cw_arr), .w_row(cw_row), .w_col(cw_col),
    .w_wdata(cw_wdata), .w_rdata(cw_rdata),
    .n_calib(cal_count), .n_updates(cal_updates)
  );

  // During calibration the controller owns injection and ejection.
  always_comb begin
    cr_cpu_in_valid  = cal_active ? cal_inj_valid : cif_inj_valid;
    cr_cpu_in_pkt    = cal_active ? cal_inj_pkt   : cif_inj_pkt;
    cif_inj_ready    = !cal_active && cr_cpu_in_ready;
    cal_inj_ready    = cal_active && cr_cpu_in_ready;
    cif_ej_valid     = !cal_active && cr_cpu_out_valid;
    cal_ej_valid     = cal_active && cr_cpu_out_valid;
    cr_cpu_out_ready = cal_active ? cal_ej_ready : cif_ej_ready;
  end

  // ---------------- central router ----------------
  logic [3:0] c2g_valid, c2g_ready, g2c_valid, g2c_ready;
  pkt_t [3:0] c2g_pkt, g2c_pkt;

  central_router u_central (
    .clk, .rst_n,
    .grp_in_valid(g2c_valid), .grp_in_pkt(g2c_pkt), .grp_in_ready(g2c_ready),
    .grp_out_valid(c2g_valid), .grp_out_pkt(c2g_pkt), .grp_out_ready(c2g_ready),
    .cpu_in_valid(cr_cpu_in_valid), .cpu_in_pkt(cr_cpu_in_pkt), .cpu_in_ready(cr_cpu_in_ready),
    .cpu_out_valid(cr_cpu_out_valid), .cpu_out_pkt(cr_cpu_out_pkt), .cpu_out_ready(cr_cpu_out_ready),
    .status(central_status)
  );

  // ---------------- group routers ----------------
  // link[s][d]: packet from group s to group d
  logic [3:0][3:0] l_valid, l_ready;
  pkt_t [3:0][3:0] l_pkt;
  logic [3:0][3:0] mbc_start;
  vec_t [3:0][3:0] mbc_x, mbc_y;

  for (genvar g = 0; g < 4; g++) begin : g_grp
    logic [2:0] gi_valid, gi_ready, go_valid, go_ready;
    pkt_t [2:0] gi_pkt, go_pkt;

    // port k of group g faces group (k < g ? k : k+1)
    for (genvar k = 0; k < 3; k++) begin : g_port
      localparam int unsigned P = (k < g) ? k : k + 1;
      assign gi_valid[k]  = l_valid[P][g];
      assign gi_pkt[k]    = l_pkt[P][g];
      assign l_ready[P][g] = gi_ready[k];
      assign l_valid[g][P] = go_valid[k];
      assign l_pkt[g][P]   = go_pkt[k];
      assign go_ready[k]   = l_ready[g][P];
    end
    assign l_valid[g][g] = 1'b0;
    assign l_pkt[g][g]   = '0;
    assign l_ready[g][g] = 1'b0;

    group_router #(.GID(2'(g)), .LAT(MBC_LAT)) u_grp (
      .clk, .rst_n,
      .grp_in_valid(gi_valid), .grp_in_pkt(gi_pkt), .grp_in_ready(gi_ready),
      .grp_out_valid(go_valid), .grp_out_pkt(go_pkt), .grp_out_ready(go_ready),
      .cen_in_valid(c2g_valid[g]), .cen_in_pkt(c2g_pkt[g]), .cen_in_ready(c2g_ready[g]),
      .cen_out_valid(g2c_valid[g]), .cen_out_pkt(g2c_pkt[g]), .cen_out_ready(g2c_ready[g]),
      .mbc_start(mbc_start[g]), .mbc_x(mbc_x[g]), .mbc_y(mbc_y[g]),
      .status(group_status[g])
    );

    // ---------------- MBC arrays ----------------
    for (genvar a = 0; a < 4; a++) begin : g_arr
      localparam logic [3:0] AID = {2'(a), 2'(g)};
      logic [WEIGHT_W-1:0] rd_w;
      logic                we;
      always_comb begin
        if (cal_active) we = cw_we && (cw_arr == AID);
        else            we = prog_we && (prog_arr == AID);
      end
      mbc_array #(.ACT_SHIFT(ACT_SHIFT), .LAT(MBC_LAT)) u_mbc (
        .clk, .rst_n,
        .start(mbc_start[g][a]), .x(mbc_x[g][a]), .y(mbc_y[g][a]),
        .wr_en(we),
        .wr_row(cal_active ? cw_row : prog_row),
        .wr_col(cal_active ? cw_col : prog_col),
        .wr_w(cal_active ? cw_wdata : prog_w),
        .rd_row(cw_row), .rd_col(cw_col), .rd_w(rd_w)
      );
    end
  end

  // weight read-back for calibration
  logic [3:0][3:0][WEIGHT_W-1:0] rd_all;
  for (genvar g = 0; g < 4; g++) begin : g_rd
    for (genvar a = 0; a < 4; a++) begin : g_rd_a
      assign rd_all[a][g] = g_grp[g].g_arr[a].rd_w;
    end
  end
  assign cw_rdata = rd_all[cw_arr[3:2]][cw_arr[1:0]];
endmodule
