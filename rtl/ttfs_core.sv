// ttfs_core: the PE's core, a decoupled access-execute engine of three modules
// that talk only through FIFOs.
//
// The load module (load_unit) reads packets from the incoming spike FIFO and
// pushes read requests into one read-request FIFO per SRAM (weight, ACC,
// neuron), a work item into the load-to-compute FIFO and the target address
// into the load-to-store FIFO. The memory interface serves the read requests
// and fills the read-response FIFOs. The compute module (compute_unit) adds
// each work item's data and pushes the result into the compute-to-store FIFO.
// The store module (store_unit) pairs the result with its address, pushes it
// into the ACC or neuron write-request FIFO and, for fired neurons, into the
// spiked-neuron-address FIFO that the memory interface drains. The structure
// follows the core figure of the source design; the FIFO depths are this
// design's own (IN_DEPTH for incoming spikes, Q_DEPTH for the others).
// Elements of one packet flow through at one per cycle once the pipeline is
// full; a new packet starts only when the previous one has left the core.
module ttfs_core
  import ttfs_pkg::*;
#(
  parameter int unsigned IN_DEPTH = 8,
  parameter int unsigned Q_DEPTH  = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  cfg_t                cfg,
  input  logic                clear,
  // incoming spikes from the router interface
  input  logic                in_valid,
  input  packet_t             in_pkt,
  output logic                in_ready,
  // to / from the memory interface
  output logic                w_rd_valid,
  output logic [WA_W-1:0]     w_rd_addr,
  input  logic                w_rd_ready,
  output logic                acc_rd_valid,
  output logic [NA_W-1:0]     acc_rd_addr,
  input  logic                acc_rd_ready,
  output logic                np_rd_valid,
  output logic [NA_W-1:0]     np_rd_addr,
  input  logic                np_rd_ready,
  output logic                acc_wr_valid,
  output wr_req_t             acc_wr,
  input  logic                acc_wr_ready,
  output logic                np_wr_valid,
  output wr_req_t             np_wr,
  input  logic                np_wr_ready,
  input  logic                w_rsp_valid,
  input  logic [WEIGHT_W-1:0] w_rsp,
  output logic                w_rsp_afull,
  input  logic                acc_rsp_valid,
  input  logic [ACC_W-1:0]    acc_rsp,
  output logic                acc_rsp_afull,
  input  logic                np_rsp_valid,
  input  logic [NP_W-1:0]     np_rsp,
  output logic                np_rsp_afull,
  output logic                spk_valid,
  output spk_t                spk,
  input  logic                spk_ready,
  // status
  output logic                idle,
  output logic [7:0]          ts_count,
  output logic [15:0]         n_fired,
  output logic [15:0]         n_pooled
);
  localparam int unsigned CW = $clog2(Q_DEPTH+1);
  localparam int unsigned ICW = $clog2(IN_DEPTH+1);

  // incoming spike FIFO
  logic    ld_in_valid, ld_in_ready;
  packet_t ld_in_pkt;
  logic [ICW-1:0] in_cnt;
  sync_fifo #(.T(packet_t), .DEPTH(IN_DEPTH)) u_in_q (
    .clk, .rst_n, .in_valid, .in_ready, .in_data(in_pkt),
    .out_valid(ld_in_valid), .out_ready(ld_in_ready), .out_data(ld_in_pkt), .count(in_cnt));

  // load outputs
  logic lw_v, lw_r, la_v, la_r, ln_v, ln_r, lc_v, lc_r, ls_v, ls_r;
  logic [WA_W-1:0] lw_a;
  logic [NA_W-1:0] la_a, ln_a, ls_a;
  l2c_t lc;
  logic drained, ld_busy;

  load_unit u_load (
    .clk, .rst_n, .cfg,
    .in_valid(ld_in_valid), .in_pkt(ld_in_pkt), .in_ready(ld_in_ready), .drained,
    .w_rd_valid(lw_v), .w_rd_addr(lw_a), .w_rd_ready(lw_r),
    .acc_rd_valid(la_v), .acc_rd_addr(la_a), .acc_rd_ready(la_r),
    .np_rd_valid(ln_v), .np_rd_addr(ln_a), .np_rd_ready(ln_r),
    .l2c_valid(lc_v), .l2c(lc), .l2c_ready(lc_r),
    .l2s_valid(ls_v), .l2s_addr(ls_a), .l2s_ready(ls_r),
    .busy(ld_busy));

  // read-request FIFOs
  logic [CW-1:0] c_wrq, c_arq, c_nrq;
  sync_fifo #(.T(logic [WA_W-1:0]), .DEPTH(Q_DEPTH)) u_w_rdq (
    .clk, .rst_n, .in_valid(lw_v), .in_ready(lw_r), .in_data(lw_a),
    .out_valid(w_rd_valid), .out_ready(w_rd_ready), .out_data(w_rd_addr), .count(c_wrq));
  sync_fifo #(.T(logic [NA_W-1:0]), .DEPTH(Q_DEPTH)) u_acc_rdq (
    .clk, .rst_n, .in_valid(la_v), .in_ready(la_r), .in_data(la_a),
    .out_valid(acc_rd_valid), .out_ready(acc_rd_ready), .out_data(acc_rd_addr), .count(c_arq));
  sync_fifo #(.T(logic [NA_W-1:0]), .DEPTH(Q_DEPTH)) u_np_rdq (
    .clk, .rst_n, .in_valid(ln_v), .in_ready(ln_r), .in_data(ln_a),
    .out_valid(np_rd_valid), .out_ready(np_rd_ready), .out_data(np_rd_addr), .count(c_nrq));

  // read-response FIFOs
  logic cw_v, cw_r, ca_v, ca_r, cn_v, cn_r;
  logic [WEIGHT_W-1:0] cw_d;
  logic [ACC_W-1:0]    ca_d;
  logic [NP_W-1:0]     cn_d;
  logic [CW-1:0] c_wrs, c_ars, c_nrs;
  logic unused_rdy_w, unused_rdy_a, unused_rdy_n;
  sync_fifo #(.T(logic [WEIGHT_W-1:0]), .DEPTH(Q_DEPTH)) u_w_rsq (
    .clk, .rst_n, .in_valid(w_rsp_valid), .in_ready(unused_rdy_w), .in_data(w_rsp),
    .out_valid(cw_v), .out_ready(cw_r), .out_data(cw_d), .count(c_wrs));
  sync_fifo #(.T(logic [ACC_W-1:0]), .DEPTH(Q_DEPTH)) u_acc_rsq (
    .clk, .rst_n, .in_valid(acc_rsp_valid), .in_ready(unused_rdy_a), .in_data(acc_rsp),
    .out_valid(ca_v), .out_ready(ca_r), .out_data(ca_d), .count(c_ars));
  sync_fifo #(.T(logic [NP_W-1:0]), .DEPTH(Q_DEPTH)) u_np_rsq (
    .clk, .rst_n, .in_valid(np_rsp_valid), .in_ready(unused_rdy_n), .in_data(np_rsp),
    .out_valid(cn_v), .out_ready(cn_r), .out_data(cn_d), .count(c_nrs));
  // a read is issued only with room for its word, counting the one in flight
  assign w_rsp_afull   = (c_wrs >= CW'(Q_DEPTH - 1));
  assign acc_rsp_afull = (c_ars >= CW'(Q_DEPTH - 1));
  assign np_rsp_afull  = (c_nrs >= CW'(Q_DEPTH - 1));

  // load-to-compute and load-to-store FIFOs
  logic qc_v, qc_r, qs_v, qs_r;
  l2c_t qc;
  logic [NA_W-1:0] qs_a;
  logic [CW-1:0] c_l2c;
  logic [$clog2(Q_DEPTH*2+1)-1:0] c_l2s;
  sync_fifo #(.T(l2c_t), .DEPTH(Q_DEPTH)) u_l2c (
    .clk, .rst_n, .in_valid(lc_v), .in_ready(lc_r), .in_data(lc),
    .out_valid(qc_v), .out_ready(qc_r), .out_data(qc), .count(c_l2c));
  sync_fifo #(.T(logic [NA_W-1:0]), .DEPTH(Q_DEPTH * 2)) u_l2s (
    .clk, .rst_n, .in_valid(ls_v), .in_ready(ls_r), .in_data(ls_a),
    .out_valid(qs_v), .out_ready(qs_r), .out_data(qs_a), .count(c_l2s));

  // compute module and compute-to-store FIFO
  logic cs_v, cs_r, sq_v, sq_r;
  c2s_t cs, sq;
  logic [CW-1:0] c_c2s;
  compute_unit u_cmp (
    .l2c_valid(qc_v), .l2c(qc), .l2c_ready(qc_r),
    .w_rsp_valid(cw_v), .w_rsp(cw_d), .w_rsp_ready(cw_r),
    .acc_rsp_valid(ca_v), .acc_rsp(ca_d), .acc_rsp_ready(ca_r),
    .np_rsp_valid(cn_v), .np_rsp(cn_d), .np_rsp_ready(cn_r),
    .c2s_valid(cs_v), .c2s(cs), .c2s_ready(cs_r));
  sync_fifo #(.T(c2s_t), .DEPTH(Q_DEPTH)) u_c2s (
    .clk, .rst_n, .in_valid(cs_v), .in_ready(cs_r), .in_data(cs),
    .out_valid(sq_v), .out_ready(sq_r), .out_data(sq), .count(c_c2s));

  // store module and its FIFOs
  logic sa_v, sa_r, sn_v, sn_r, sk_v, sk_r, st_busy;
  wr_req_t sa_d, sn_d;
  spk_t sk_d;
  logic [CW-1:0] c_awq, c_nwq, c_spk;
  store_unit u_store (
    .clk, .rst_n, .cfg, .clear,
    .c2s_valid(sq_v), .c2s(sq), .c2s_ready(sq_r),
    .l2s_valid(qs_v), .l2s_addr(qs_a), .l2s_ready(qs_r),
    .acc_wr_valid(sa_v), .acc_wr(sa_d), .acc_wr_ready(sa_r),
    .np_wr_valid(sn_v), .np_wr(sn_d), .np_wr_ready(sn_r),
    .spk_valid(sk_v), .spk(sk_d), .spk_ready(sk_r),
    .busy(st_busy), .ts_count, .n_fired, .n_pooled);
  sync_fifo #(.T(wr_req_t), .DEPTH(Q_DEPTH)) u_acc_wrq (
    .clk, .rst_n, .in_valid(sa_v), .in_ready(sa_r), .in_data(sa_d),
    .out_valid(acc_wr_valid), .out_ready(acc_wr_ready), .out_data(acc_wr), .count(c_awq));
  sync_fifo #(.T(wr_req_t), .DEPTH(Q_DEPTH)) u_np_wrq (
    .clk, .rst_n, .in_valid(sn_v), .in_ready(sn_r), .in_data(sn_d),
    .out_valid(np_wr_valid), .out_ready(np_wr_ready), .out_data(np_wr), .count(c_nwq));
  sync_fifo #(.T(spk_t), .DEPTH(Q_DEPTH)) u_spk_q (
    .clk, .rst_n, .in_valid(sk_v), .in_ready(sk_r), .in_data(sk_d),
    .out_valid(spk_valid), .out_ready(spk_ready), .out_data(spk), .count(c_spk));

  assign drained = (c_l2c == '0) && (c_l2s == '0) && (c_c2s == '0) &&
                   (c_awq == '0) && (c_nwq == '0) && !st_busy;
  assign idle    = drained && !ld_busy && (in_cnt == '0) && (c_spk == '0);

  // read responses always find room: a read is issued only below afull
  a_rsp_room: assert property (@(posedge clk) disable iff (!rst_n)
      (w_rsp_valid -> unused_rdy_w) && (acc_rsp_valid -> unused_rdy_a) &&
      (np_rsp_valid -> unused_rdy_n));
endmodule
