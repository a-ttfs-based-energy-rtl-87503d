// ttfs_pe: one processing element of the accelerator.
//
// A PE holds one layer's slice of a spiking network: up to 256 neurons, with
// their accumulated weights (1 kB ACC SRAM), potentials (1 kB neuron SRAM),
// up to 9216 8-bit weights (9 kB weight SRAM) and one outgoing spike packet per
// neuron (spike address SRAM). Packets from the network-on-chip enter the
// input spike FIFO; the router interface hands spikes and EoT signals to the
// core and forwards them to the next PE of the layer; the core accumulates
// weights per spike and updates potentials and fires neurons per EoT; the
// memory interface arbitrates the four single-port SRAMs and turns fired
// neurons into spike packets, which leave through the output spike FIFO.
// Every PE is programmed by packets before it runs (pe_ctrl). The block
// structure, the SRAM set and sizes follow the source design (the spike
// address entry is 48 bits wide here, 1.5 kB instead of 2 kB); PE_ID is the
// PE's number on the network and is this design's parameter. Interface: one
// valid/ready packet port in each direction, plus status outputs.
module ttfs_pe
  import ttfs_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  packet_t       in_pkt,
  output logic          in_ready,
  output logic          out_valid,
  output packet_t       out_pkt,
  input  logic          out_ready,
  output logic          idle,
  output logic [7:0]    ts_count,
  output logic          done,       // ts_count has reached max_time_steps
  output logic [15:0]   n_fired,
  output logic [15:0]   n_pooled,
  output logic [15:0]   n_forwarded
);
  cfg_t cfg;

  // input and output spike FIFOs
  logic    ri_v, ri_r, ro_v, ro_r;
  packet_t ri_p, ro_p;
  logic [$clog2(FIFO_DEPTH+1)-1:0] c_in, c_out;
  sync_fifo #(.T(packet_t), .DEPTH(FIFO_DEPTH)) u_in_fifo (
    .clk, .rst_n, .in_valid, .in_ready, .in_data(in_pkt),
    .out_valid(ri_v), .out_ready(ri_r), .out_data(ri_p), .count(c_in));
  sync_fifo #(.T(packet_t), .DEPTH(FIFO_DEPTH)) u_out_fifo (
    .clk, .rst_n, .in_valid(ro_v), .in_ready(ro_r), .in_data(ro_p),
    .out_valid, .out_ready, .out_data(out_pkt), .count(c_out));

  // router interface
  logic    cv, cr, gv, gr, reg_we, clear, pv, pr;
  packet_t cp, gp;
  logic [PADDR_W-1:0] reg_a, p_a;
  logic [DATA_W-1:0]  reg_d, p_d;
  prog_tgt_e          p_t;
  router_if u_rif (
    .clk, .rst_n, .cfg,
    .in_valid(ri_v), .in_pkt(ri_p), .in_ready(ri_r),
    .core_valid(cv), .core_pkt(cp), .core_ready(cr),
    .gen_valid(gv), .gen_pkt(gp), .gen_ready(gr),
    .out_valid(ro_v), .out_pkt(ro_p), .out_ready(ro_r),
    .reg_wr_en(reg_we), .reg_wr_addr(reg_a), .reg_wr_data(reg_d), .clear,
    .prog_valid(pv), .prog_tgt(p_t), .prog_addr(p_a), .prog_data(p_d), .prog_ready(pr),
    .n_forwarded);

  pe_ctrl u_ctrl (.clk, .rst_n, .wr_en(reg_we), .wr_addr(reg_a), .wr_data(reg_d), .cfg);

  // core
  logic wrv, wrr, arv, arr, nrv, nrr, awv, awr, nwv, nwr;
  logic wsv, asv, nsv, wsf, asf, nsf, skv, skr, core_idle;
  logic [WA_W-1:0] wra;
  logic [NA_W-1:0] ara, nra;
  wr_req_t aw, nw;
  logic [WEIGHT_W-1:0] wsd;
  logic [ACC_W-1:0]    asd;
  logic [NP_W-1:0]     nsd;
  spk_t sk;
  ttfs_core #(.IN_DEPTH(FIFO_DEPTH * 2), .Q_DEPTH(FIFO_DEPTH)) u_core (
    .clk, .rst_n, .cfg, .clear,
    .in_valid(cv), .in_pkt(cp), .in_ready(cr),
    .w_rd_valid(wrv), .w_rd_addr(wra), .w_rd_ready(wrr),
    .acc_rd_valid(arv), .acc_rd_addr(ara), .acc_rd_ready(arr),
    .np_rd_valid(nrv), .np_rd_addr(nra), .np_rd_ready(nrr),
    .acc_wr_valid(awv), .acc_wr(aw), .acc_wr_ready(awr),
    .np_wr_valid(nwv), .np_wr(nw), .np_wr_ready(nwr),
    .w_rsp_valid(wsv), .w_rsp(wsd), .w_rsp_afull(wsf),
    .acc_rsp_valid(asv), .acc_rsp(asd), .acc_rsp_afull(asf),
    .np_rsp_valid(nsv), .np_rsp(nsd), .np_rsp_afull(nsf),
    .spk_valid(skv), .spk(sk), .spk_ready(skr),
    .idle(core_idle), .ts_count, .n_fired, .n_pooled);

  // memory interface and SRAMs
  logic w_en, w_we, a_en, a_we, n_en, n_we, s_en, s_we;
  logic [WA_W-1:0] w_ad;
  logic [NA_W-1:0] a_ad, n_ad, s_ad;
  logic [WEIGHT_W-1:0] w_wd, w_rd;
  logic [ACC_W-1:0] a_wd, a_rd;
  logic [NP_W-1:0] n_wd, n_rd;
  logic [SPK_W-1:0] s_wd, s_rd;
  mem_if u_mif (
    .clk, .rst_n, .cfg,
    .w_rd_valid(wrv), .w_rd_addr(wra), .w_rd_ready(wrr),
    .acc_rd_valid(arv), .acc_rd_addr(ara), .acc_rd_ready(arr),
    .np_rd_valid(nrv), .np_rd_addr(nra), .np_rd_ready(nrr),
    .acc_wr_valid(awv), .acc_wr(aw), .acc_wr_ready(awr),
    .np_wr_valid(nwv), .np_wr(nw), .np_wr_ready(nwr),
    .w_rsp_valid(wsv), .w_rsp(wsd), .w_rsp_afull(wsf),
    .acc_rsp_valid(asv), .acc_rsp(asd), .acc_rsp_afull(asf),
    .np_rsp_valid(nsv), .np_rsp(nsd), .np_rsp_afull(nsf),
    .spk_valid(skv), .spk(sk), .spk_ready(skr),
    .gen_valid(gv), .gen_pkt(gp), .gen_ready(gr),
    .prog_valid(pv), .prog_tgt(p_t), .prog_addr(p_a), .prog_data(p_d), .prog_ready(pr),
    .w_en, .w_we, .w_addr(w_ad), .w_wdata(w_wd), .w_rdata(w_rd),
    .acc_en(a_en), .acc_we(a_we), .acc_addr(a_ad), .acc_wdata(a_wd), .acc_rdata(a_rd),
    .np_en(n_en), .np_we(n_we), .np_addr(n_ad), .np_wdata(n_wd), .np_rdata(n_rd),
    .sa_en(s_en), .sa_we(s_we), .sa_addr(s_ad), .sa_wdata(s_wd), .sa_rdata(s_rd));

  sp_sram #(.WORDS(N_WEIGHTS), .WIDTH(WEIGHT_W)) u_weight_sram (
    .clk, .en(w_en), .we(w_we), .addr(w_ad), .wdata(w_wd), .rdata(w_rd));
  sp_sram #(.WORDS(N_NEURONS), .WIDTH(ACC_W)) u_acc_sram (
    .clk, .en(a_en), .we(a_we), .addr(a_ad), .wdata(a_wd), .rdata(a_rd));
  sp_sram #(.WORDS(N_NEURONS), .WIDTH(NP_W)) u_neuron_sram (
    .clk, .en(n_en), .we(n_we), .addr(n_ad), .wdata(n_wd), .rdata(n_rd));
  sp_sram #(.WORDS(N_NEURONS), .WIDTH(SPK_W)) u_spike_sram (
    .clk, .en(s_en), .we(s_we), .addr(s_ad), .wdata(s_wd), .rdata(s_rd));

  assign idle = core_idle && (c_in == '0) && (c_out == '0) && !gv;
  assign done = (ts_count >= cfg.max_ts);
endmodule
