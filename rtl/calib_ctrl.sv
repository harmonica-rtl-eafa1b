// calib_ctrl: inline calibration of the MBC arrays.
//
// Memristor resistances drift while the NCA runs. Every T_ITVL completed NCA
// runs this controller pauses new launches (hold), waits until no launched
// packet is left inside the NCA (nca_idle), and then fine-tunes the arrays
// with a small stored training set: for each training vector it injects a
// packet routed to the vector's array and back to the CPU boundary, takes the
// result instead of the Out-queue (active diverts it; the earlier wait for
// the NCA to drain only holds launches), and applies a
// sign-sign delta rule to that array's weights:
//   w[i][j] += STEP * sign(t[j] - y[j]) * sign(x[i])     (saturating)
// one weight per cycle through the array's read/write port, over all rows i
// and all columns j whose output was wrong. Passes over the set repeat until
// every output matches its target or MAX_PASS passes are done; the run counter
// then restarts. start_now begins a calibration at once (counter ignored).
//
// Training set: N_VEC entries written by the host on ts_we/ts_idx with the
// array address ts_arr (a 4-bit array address: [1:0] group, [3:2] array), the
// input vector ts_x and the target vector ts_t; ts_vld marks an entry in use.
// The interval (20000 runs), the trigger between two NCA operations, the use
// of training vectors, the delta rule and the diversion of results away from
// the CPU follow the accelerator description; the training-set size, the
// sign-sign form of the rule, the step and the pass limit are this design's.
module calib_ctrl
  import nca_pkg::*;
#(
  parameter int unsigned T_ITVL   = 20000,
  parameter int unsigned N_VEC    = 8,
  parameter int unsigned MAX_PASS = 16,
  parameter int unsigned STEP     = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run_done,
  input  logic        nca_idle,
  input  logic        start_now,
  output logic        hold,
  output logic        active,
  // training-set write port
  input  logic        ts_we,
  input  logic [$clog2(N_VEC)-1:0] ts_idx,
  input  logic [3:0]  ts_arr,
  input  vec_t        ts_x,
  input  vec_t        ts_t,
  // packets
  output logic        inj_valid,
  output pkt_t        inj_pkt,
  input  logic        inj_ready,
  input  logic        ej_valid,
  input  pkt_t        ej_pkt,
  output logic        ej_ready,
  // weight port
  output logic        w_we,
  output logic [3:0]  w_arr,
  output logic [5:0]  w_row,
  output logic [5:0]  w_col,
  output logic [WEIGHT_W-1:0] w_wdata,
  input  logic [WEIGHT_W-1:0] w_rdata,
  // statistics
  output logic [15:0] n_calib,
  output logic [15:0] n_updates
);
  localparam int unsigned VW = (N_VEC > 1) ? $clog2(N_VEC) : 1;

  typedef enum logic [2:0] {S_COUNT, S_DRAIN, S_SEND, S_WAIT, S_UPDATE, S_NEXT} state_e;
  state_e state;

  logic [3:0] ts_arr_m [N_VEC];
  vec_t       ts_x_m   [N_VEC];
  vec_t       ts_t_m   [N_VEC];
  logic [N_VEC-1:0] ts_vld;

  logic [$clog2(T_ITVL+1)-1:0] runs;
  logic [VW-1:0] vi;
  logic [$clog2(MAX_PASS+1)-1:0] pass;
  logic          pass_err;
  vec_t          y_q;
  logic [5:0]    ri, cj;

  always_ff @(posedge clk) begin
    if (ts_we) begin
      ts_arr_m[ts_idx] <= ts_arr;
      ts_x_m[ts_idx]   <= ts_x;
      ts_t_m[ts_idx]   <= ts_t;
    end
  end

  // error sign of the current column and input sign of the current row
  logic signed [4:0] err;
  logic signed [DATA_W-1:0] xv, tv, yv;
  logic signed [WEIGHT_W:0] wn;
  always_comb begin
    xv  = signed'(ts_x_m[vi][ri]);
    tv  = signed'(ts_t_m[vi][cj]);
    yv  = signed'(y_q[cj]);
    err = 5'(tv) - 5'(yv);
    wn  = (WEIGHT_W+1)'(signed'(w_rdata));
    if ((err > 0) == (xv > 0)) wn = wn + (WEIGHT_W+1)'(STEP);
    else                        wn = wn - (WEIGHT_W+1)'(STEP);
    if (wn > (WEIGHT_W+1)'(2**(WEIGHT_W-1)-1))        wn = (WEIGHT_W+1)'(2**(WEIGHT_W-1)-1);
    if (wn < -(WEIGHT_W+1)'(2**(WEIGHT_W-1)))          wn = -(WEIGHT_W+1)'(2**(WEIGHT_W-1));
  end

  assign w_arr   = ts_arr_m[vi];
  assign w_row   = ri;
  assign w_col   = cj;
  assign w_wdata = wn[WEIGHT_W-1:0];
  assign w_we    = (state == S_UPDATE) && (err != 0) && (xv != 0);
  assign hold    = (state != S_COUNT);
  assign active  = hold && (state != S_DRAIN);
  assign ej_ready = (state == S_WAIT);

  always_comb begin
    inj_pkt       = '0;
    inj_pkt.route = '0;
    inj_pkt.route[63] = 1'b1;
    inj_pkt.route[AREA_HI -: 2*ADDR_W] = {mbc_addr(ts_arr_m[vi][1:0], ts_arr_m[vi][3:2]), cpu_addr()};
    inj_pkt.data  = ts_x_m[vi];
  end
  assign inj_valid = (state == S_SEND);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_COUNT;
      runs      <= '0;
      vi        <= '0;
      pass      <= '0;
      pass_err  <= 1'b0;
      y_q       <= '0;
      ri        <= '0;
      cj        <= '0;
      ts_vld    <= '0;
      n_calib   <= '0;
      n_updates <= '0;
    end else begin
      if (ts_we) ts_vld[ts_idx] <= 1'b1;
      unique case (state)
        S_COUNT: begin
          if (run_done) runs <= runs + 1'b1;
          if (start_now || (runs >= ($clog2(T_ITVL+1))'(T_ITVL))) begin
            state <= S_DRAIN;
            runs  <= '0;
          end
        end
        S_DRAIN: if (nca_idle) begin
          vi       <= '0;
          pass     <= '0;
          pass_err <= 1'b0;
          n_calib  <= n_calib + 1'b1;
          state    <= S_NEXT;
        end
        S_NEXT: begin
          // skip unused training entries
          if (ts_vld[vi]) state <= S_SEND;
          else if (vi == VW'(N_VEC-1)) begin
            if (pass_err && (pass + 1'b1) < ($clog2(MAX_PASS+1))'(MAX_PASS)) begin
              pass     <= pass + 1'b1;
              pass_err <= 1'b0;
              vi       <= '0;
            end else state <= S_COUNT;
          end else vi <= vi + 1'b1;
        end
        S_SEND: if (inj_ready) state <= S_WAIT;
        S_WAIT: if (ej_valid) begin
          y_q   <= ej_pkt.data;
          ri    <= '0;
          cj    <= '0;
          state <= S_UPDATE;
          if (ej_pkt.data != ts_t_m[vi]) pass_err <= 1'b1;
        end
        S_UPDATE: begin
          if (w_we) n_updates <= n_updates + 1'b1;
          ri <= ri + 1'b1;
          if (ri == 6'd63) begin
            cj <= cj + 1'b1;
            if (cj == 6'd63) begin
              // this vector is done; move to the next entry (or end of pass)
              if (vi == VW'(N_VEC-1)) begin
                if (pass_err && (pass + 1'b1) < ($clog2(MAX_PASS+1))'(MAX_PASS)) begin
                  pass     <= pass + 1'b1;
                  pass_err <= 1'b0;
                  vi       <= '0;
                  state    <= S_NEXT;
                end else state <= S_COUNT;
              end else begin
                vi    <= vi + 1'b1;
                state <= S_NEXT;
              end
            end
          end
        end
        default: state <= S_COUNT;
      endcase
    end
  end
endmodule
