// mem_if: the PE's memory interface, one single-port SRAM interface for each of
// the ACC, neuron, weight and spike address SRAMs.
//
// A single-port SRAM does one read or one write per cycle. Where the core has
// both a read request (read-request FIFO head) and a write request
// (write-request FIFO head) for the same SRAM, the interface alternates
// between them, as the source design does, so neither starves. Programming
// writes from the router interface use an SRAM only in a cycle where the core
// does not. A read is issued only when its read-response FIFO has room for
// the word (rsp_afull low); the word is pushed into that FIFO one cycle after
// the read.
// The spike address path serves the spiked-neuron-address FIFO: for a fired
// neuron it reads the neuron's entry {dest, spike data} and hands the spike
// packet to the router interface; for an end-of-sweep marker it emits an EoT
// packet: to eot_dest (the next layer) if this PE is the last of its layer,
// otherwise to fwd_dest (the next PE of the layer). The EoT thus walks the
// layer's PEs in order, each sending it on behind its own spikes, so the next
// layer sees every spike of timestep t before the EoT of t. The source
// design only says that the last PE of a layer sends the EoT after the layer
// has finished; passing it along the chain is this design's way of knowing
// that. This path works on
// one entry at a time (a read cycle, then an output register); its structure
// is this design's own.
module mem_if
  import ttfs_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  cfg_t                cfg,
  // core read-request FIFO heads
  input  logic                w_rd_valid,
  input  logic [WA_W-1:0]     w_rd_addr,
  output logic                w_rd_ready,
  input  logic                acc_rd_valid,
  input  logic [NA_W-1:0]     acc_rd_addr,
  output logic                acc_rd_ready,
  input  logic                np_rd_valid,
  input  logic [NA_W-1:0]     np_rd_addr,
  output logic                np_rd_ready,
  // core write-request FIFO heads
  input  logic                acc_wr_valid,
  input  wr_req_t             acc_wr,
  output logic                acc_wr_ready,
  input  logic                np_wr_valid,
  input  wr_req_t             np_wr,
  output logic                np_wr_ready,
  // read-response FIFO pushes
  output logic                w_rsp_valid,
  output logic [WEIGHT_W-1:0] w_rsp,
  input  logic                w_rsp_afull,
  output logic                acc_rsp_valid,
  output logic [ACC_W-1:0]    acc_rsp,
  input  logic                acc_rsp_afull,
  output logic                np_rsp_valid,
  output logic [NP_W-1:0]     np_rsp,
  input  logic                np_rsp_afull,
  // spiked-neuron-address FIFO head and generated packets
  input  logic                spk_valid,
  input  spk_t                spk,
  output logic                spk_ready,
  output logic                gen_valid,
  output packet_t             gen_pkt,
  input  logic                gen_ready,
  // programming writes
  input  logic                prog_valid,
  input  prog_tgt_e           prog_tgt,
  input  logic [PADDR_W-1:0]  prog_addr,
  input  logic [DATA_W-1:0]   prog_data,
  output logic                prog_ready,
  // SRAM ports
  output logic                w_en,   output logic w_we,
  output logic [WA_W-1:0]     w_addr, output logic [WEIGHT_W-1:0] w_wdata,
  input  logic [WEIGHT_W-1:0] w_rdata,
  output logic                acc_en, output logic acc_we,
  output logic [NA_W-1:0]     acc_addr, output logic [ACC_W-1:0] acc_wdata,
  input  logic [ACC_W-1:0]    acc_rdata,
  output logic                np_en,  output logic np_we,
  output logic [NA_W-1:0]     np_addr, output logic [NP_W-1:0] np_wdata,
  input  logic [NP_W-1:0]     np_rdata,
  output logic                sa_en,  output logic sa_we,
  output logic [NA_W-1:0]     sa_addr, output logic [SPK_W-1:0] sa_wdata,
  input  logic [SPK_W-1:0]    sa_rdata
);
  logic acc_pref_wr, np_pref_wr;          // alternation state
  logic w_rd_q, acc_rd_q, np_rd_q;        // read issued last cycle
  logic sa_rd_q;
  logic gen_full;
  packet_t gen_r;

  // ---- grants
  logic acc_rd_go, acc_wr_go, np_rd_go, np_wr_go, w_rd_go;
  logic spk_take, sa_rd_go, prog_go;

  always_comb begin
    // weight SRAM: only read by the core
    w_rd_go = w_rd_valid && !w_rsp_afull;

    // ACC SRAM: alternate between read and write requests
    acc_rd_go = 1'b0;
    acc_wr_go = 1'b0;
    if (acc_wr_valid && (acc_pref_wr || !acc_rd_valid || acc_rsp_afull)) acc_wr_go = 1'b1;
    else if (acc_rd_valid && !acc_rsp_afull)                               acc_rd_go = 1'b1;

    np_rd_go = 1'b0;
    np_wr_go = 1'b0;
    if (np_wr_valid && (np_pref_wr || !np_rd_valid || np_rsp_afull)) np_wr_go = 1'b1;
    else if (np_rd_valid && !np_rsp_afull)                           np_rd_go = 1'b1;

    // spike address path: one entry at a time
    spk_take = spk_valid && !sa_rd_q && (!gen_full || gen_ready);
    sa_rd_go = spk_take && !spk.eot_mark;

    // programming writes take an SRAM the core leaves free this cycle
    unique case (prog_tgt)
      TGT_WEIGHT: prog_go = prog_valid && !w_rd_go;
      TGT_ACC:    prog_go = prog_valid && !acc_rd_go && !acc_wr_go;
      TGT_NEURON: prog_go = prog_valid && !np_rd_go && !np_wr_go;
      TGT_SPIKE:  prog_go = prog_valid && !sa_rd_go;
      default:    prog_go = prog_valid;   // nothing to write: drop
    endcase

    w_rd_ready   = w_rd_go;
    acc_rd_ready = acc_rd_go;
    acc_wr_ready = acc_wr_go;
    np_rd_ready  = np_rd_go;
    np_wr_ready  = np_wr_go;
    spk_ready    = spk_take;
    prog_ready   = prog_go;

    // ---- SRAM ports
    w_en    = w_rd_go || (prog_go && prog_tgt == TGT_WEIGHT);
    w_we    = !w_rd_go;
    w_addr  = w_rd_go ? w_rd_addr : prog_addr[WA_W-1:0];
    w_wdata = prog_data[WEIGHT_W-1:0];

    acc_en    = acc_rd_go || acc_wr_go || (prog_go && prog_tgt == TGT_ACC);
    acc_we    = !acc_rd_go;
    acc_addr  = acc_rd_go ? acc_rd_addr : acc_wr_go ? acc_wr.addr : prog_addr[NA_W-1:0];
    acc_wdata = acc_wr_go ? acc_wr.data : prog_data[ACC_W-1:0];

    np_en    = np_rd_go || np_wr_go || (prog_go && prog_tgt == TGT_NEURON);
    np_we    = !np_rd_go;
    np_addr  = np_rd_go ? np_rd_addr : np_wr_go ? np_wr.addr[NA_W-1:0] : prog_addr[NA_W-1:0];
    np_wdata = np_wr_go ? np_wr.data[NP_W-1:0] : prog_data[NP_W-1:0];

    sa_en    = sa_rd_go || (prog_go && prog_tgt == TGT_SPIKE);
    sa_we    = !sa_rd_go;
    sa_addr  = sa_rd_go ? spk.n : prog_addr[NA_W-1:0];
    sa_wdata = prog_data[SPK_W-1:0];

    // ---- responses
    w_rsp_valid   = w_rd_q;
    w_rsp         = w_rdata;
    acc_rsp_valid = acc_rd_q;
    acc_rsp       = acc_rdata;
    np_rsp_valid  = np_rd_q;
    np_rsp        = np_rdata;

    gen_valid = gen_full;
    gen_pkt   = gen_r;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_pref_wr <= 1'b0;
      np_pref_wr  <= 1'b0;
      w_rd_q      <= 1'b0;
      acc_rd_q    <= 1'b0;
      np_rd_q     <= 1'b0;
      sa_rd_q     <= 1'b0;
      gen_full    <= 1'b0;
      gen_r       <= '0;
    end else begin
      // after serving one side while the other waited, prefer the other
      if (acc_rd_go && acc_wr_valid) acc_pref_wr <= 1'b1;
      if (acc_wr_go && acc_rd_valid) acc_pref_wr <= 1'b0;
      if (np_rd_go && np_wr_valid)   np_pref_wr  <= 1'b1;
      if (np_wr_go && np_rd_valid)   np_pref_wr  <= 1'b0;
      w_rd_q   <= w_rd_go;
      acc_rd_q <= acc_rd_go;
      np_rd_q  <= np_rd_go;
      sa_rd_q  <= sa_rd_go;

      if (gen_full && gen_ready) gen_full <= 1'b0;
      if (sa_rd_q) begin
        gen_full    <= 1'b1;
        gen_r       <= '0;
        gen_r.dest  <= sa_rdata[SPK_W-1 -: DEST_W];
        gen_r.data  <= DATA_W'(sa_rdata[SPK_W-DEST_W-1:0]);
      end else if (spk_take && spk.eot_mark && (cfg.last_in_layer || cfg.fwd_en)) begin
        gen_full    <= 1'b1;
        gen_r       <= '0;
        gen_r.dest  <= cfg.last_in_layer ? cfg.eot_dest : cfg.fwd_dest;
        gen_r.eot   <= 1'b1;
      end
    end
  end

  a_one_per_sram: assert property (@(posedge clk) disable iff (!rst_n)
                                   !(acc_rd_go && acc_wr_go) && !(np_rd_go && np_wr_go));
endmodule
