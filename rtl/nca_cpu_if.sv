// nca_cpu_if: the boundary between the CPU pipeline and the NCA.
//
// It executes the four NCA instructions against the three queues:
//   setp reg  push the 64-bit routing word reg into the Config-queue
//   movd reg  push the 4-bit input element reg[3:0] into the In-queue
//   launch    pop one routing word, read the whole In-queue through the DACs
//             and hand the packet to the central router
//   deq reg   pop the head of the Out-queue; deq_data is valid with deq_fire
// An instruction is presented on instr_valid/instr_op/instr_data and completes
// in the cycle instr_ready is high; otherwise the pipeline stalls on it. setp
// stalls on a full Config-queue, movd on a full In-queue, deq on an empty
// Out-queue, launch on an empty Config-queue, a busy injection port or while
// the calibration controller holds the NCA (hold). Results from the central
// router (via the ADCs) load the Out-queue when it is empty, with the lane
// count carried in the routing word.
//
// The DACs and ADCs sit at this boundary. The model carries analog samples as
// the codes those converters produce, so the conversion itself is the
// identity here. runs counts completed NCA runs (a pulse per result loaded)
// and idle is high when no launched packet is still inside the NCA.
// Instructions, queues and their sizes follow the accelerator description;
// the stall rules and handshakes are this design's choice.
module nca_cpu_if
  import nca_pkg::*;
#(
  parameter int unsigned CFG_DEPTH = 128,
  parameter int unsigned IN_DEPTH  = 64,
  parameter int unsigned OUT_DEPTH = 64
) (
  input  logic      clk,
  input  logic      rst_n,
  // CPU side
  input  logic      instr_valid,
  input  nca_op_e   instr_op,
  input  route_t    instr_data,
  output logic      instr_ready,
  output logic      deq_fire,
  output sample_t   deq_data,
  // NCA side
  input  logic      hold,
  output logic      inj_valid,
  output pkt_t      inj_pkt,
  input  logic      inj_ready,
  input  logic      ej_valid,
  input  pkt_t      ej_pkt,
  output logic      ej_ready,
  output logic      run_done,
  output logic      idle
);
  logic   cfg_push, cfg_pop, cfg_full, cfg_empty;
  route_t cfg_head;
  logic   inq_push, inq_drain, inq_full;
  logic [IN_DEPTH-1:0][DATA_W-1:0] inq_vec;
  logic   outq_pop, outq_empty, outq_ready;
  logic [15:0] inflight;
  logic [6:0]  ej_ocnt;

  assign ej_ocnt = route_ocnt(ej_pkt.route);

  sync_fifo #(.WIDTH(ROUTE_W), .DEPTH(CFG_DEPTH)) u_cfg_q (
    .clk, .rst_n, .push(cfg_push), .wr_data(instr_data), .pop(cfg_pop),
    .rd_data(cfg_head), .full(cfg_full), .empty(cfg_empty), .count()
  );

  in_queue #(.DEPTH(IN_DEPTH)) u_in_q (
    .clk, .rst_n, .push(inq_push), .wr_data(instr_data[DATA_W-1:0]),
    .drain(inq_drain), .vec(inq_vec), .full(inq_full), .count()
  );

  out_queue #(.DEPTH(OUT_DEPTH)) u_out_q (
    .clk, .rst_n, .load(ej_valid && outq_ready), .vec(ej_pkt.data),
    .nload(ej_ocnt[$clog2(OUT_DEPTH)-1:0]),
    .ready(outq_ready), .pop(outq_pop), .head(deq_data),
    .empty(outq_empty), .count()
  );

  always_comb begin
    instr_ready = 1'b0;
    if (instr_valid) begin
      unique case (instr_op)
        OP_SETP:   instr_ready = !cfg_full;
        OP_MOVD:   instr_ready = !inq_full;
        OP_LAUNCH: instr_ready = !cfg_empty && !inj_valid && !hold;
        OP_DEQ:    instr_ready = !outq_empty;
      endcase
    end
  end

  assign cfg_push  = instr_ready && instr_op == OP_SETP;
  assign inq_push  = instr_ready && instr_op == OP_MOVD;
  assign cfg_pop   = instr_ready && instr_op == OP_LAUNCH;
  assign inq_drain = cfg_pop;
  assign outq_pop  = instr_ready && instr_op == OP_DEQ;
  assign deq_fire  = outq_pop;
  assign ej_ready  = outq_ready;
  assign run_done  = ej_valid && outq_ready;
  assign idle      = (inflight == '0) && !inj_valid;

  // injection register: the DAC outputs held for the central router
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inj_valid <= 1'b0;
      inj_pkt   <= '0;
      inflight  <= '0;
    end else begin
      if (inj_valid && inj_ready) inj_valid <= 1'b0;
      if (cfg_pop) begin
        inj_valid     <= 1'b1;
        inj_pkt.route <= cfg_head;
        for (int k = 0; k < int'(NLANE); k++)
          inj_pkt.data[k] <= (k < int'(IN_DEPTH)) ? inq_vec[k] : '0;
      end
      inflight <= inflight + (cfg_pop ? 16'd1 : 16'd0) - (run_done ? 16'd1 : 16'd0);
    end
  end
endmodule
