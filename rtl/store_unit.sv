// store_unit: the store module of the core. It writes results back and decides
// which neurons spike.
//
// It pairs each result of the compute module with the address the load module
// sent for it.
//   * OP_ACC: the new accumulated weight is written to the ACC SRAM.
//   * OP_EOT: the new potential is written to the neuron SRAM. A neuron fires
//     when its potential is >= the threshold and it has not fired before (its
//     spiked flag, kept in the neuron word, is then set). In a CONV_POOL layer a
//     mask bit per pooling window lets only the first neuron of a window that
//     fires send a spike; the others are marked as spiked and stay silent. In a
//     FC_SOFTMAX layer no threshold applies: after the last neuron the one with
//     the largest potential (the later one on a tie) is sent.
//   * A fired neuron's local address goes to the spiked-neuron-address FIFO,
//     from which its spike address entry is read and sent. After the last
//     neuron of an EoT sweep an end-of-sweep marker follows, so the EoT for
//     the next layer leaves the PE after all of this timestep's spikes.
// The threshold test, the already-spiked rule, the max-pooling mask and the
// softmax rule follow the source design. The pooling window of neuron i is
// found with counters that follow the sweep (this PE's neurons are whole rows
// of a feature map wid_output wide), since EoT sweeps visit neurons in order:
// that, a mask bit per window instead of per neuron, and the marker are this
// design's own. One element is accepted per cycle when all outputs it needs are
// ready; the marker takes one extra cycle. ts_count counts finished sweeps.
module store_unit
  import ttfs_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  cfg_t              cfg,
  input  logic              clear,       // clear the pooling mask and ts_count
  input  logic              c2s_valid,
  input  c2s_t              c2s,
  output logic              c2s_ready,
  input  logic              l2s_valid,
  input  logic [NA_W-1:0]   l2s_addr,
  output logic              l2s_ready,
  output logic              acc_wr_valid,
  output wr_req_t           acc_wr,
  input  logic              acc_wr_ready,
  output logic              np_wr_valid,
  output wr_req_t           np_wr,
  input  logic              np_wr_ready,
  output logic              spk_valid,
  output spk_t              spk,
  input  logic              spk_ready,
  output logic              busy,        // an end-of-sweep marker is waiting
  output logic [7:0]        ts_count,
  output logic [15:0]       n_fired,     // spikes sent (statistics)
  output logic [15:0]       n_pooled     // spikes held back by the pooling mask
);
  logic                    mark_pending;
  logic [N_NEURONS-1:0]    mask;
  logic [GN_W-1:0]         col_r;
  logic [2:0]              px_r, py_r;
  logic [NA_W-1:0]         pcol_r, prow_r;
  logic signed [POT_W-1:0] max_pot_r;
  logic [NA_W-1:0]         max_n_r;

  // ---- current element
  logic                    have, first, is_eot, spiked_in, cand, masked, fire, send;
  logic                    need_np, need_acc, outs_ready, accept;
  logic signed [POT_W-1:0] pot;
  logic [GN_W-1:0]         col_c;
  logic [2:0]              px_c, py_c;
  logic [NA_W-1:0]         pcol_c, prow_c, pidx;
  logic signed [POT_W-1:0] max_pot_n;
  logic [NA_W-1:0]         max_n_n;
  logic                    is_soft, is_pool;

  always_comb begin
    have      = c2s_valid && l2s_valid && !mark_pending;
    is_eot    = (c2s.op == OP_EOT);
    first     = (l2s_addr == '0);
    pot       = c2s.value[POT_W-1:0];
    spiked_in = c2s.value[ACC_W-1];
    is_soft   = (cfg.layer == L_FC_SOFTMAX);
    is_pool   = (cfg.layer == L_CONV_POOL);

    col_c  = first ? '0 : col_r;
    px_c   = first ? '0 : px_r;
    py_c   = first ? '0 : py_r;
    pcol_c = first ? '0 : pcol_r;
    prow_c = first ? '0 : prow_r;
    pidx   = prow_c + pcol_c;

    cand   = !spiked_in && (pot >= cfg.threshold);
    masked = is_pool && mask[pidx];

    if (first || pot >= max_pot_r) begin
      max_pot_n = pot;
      max_n_n   = l2s_addr;
    end else begin
      max_pot_n = max_pot_r;
      max_n_n   = max_n_r;
    end

    fire = is_eot && !is_soft && cand && !masked;
    send = fire || (is_eot && is_soft && c2s.last);

    need_acc   = !is_eot;
    need_np    = is_eot;
    outs_ready = (!need_acc || acc_wr_ready) && (!need_np || np_wr_ready) &&
                 (!send || spk_ready);
    accept     = have && outs_ready;

    c2s_ready    = accept;
    l2s_ready    = accept;
    acc_wr_valid = have && need_acc && outs_ready;
    np_wr_valid  = have && need_np  && outs_ready;
    acc_wr.addr  = l2s_addr;
    acc_wr.data  = c2s.value;
    np_wr.addr   = l2s_addr;
    np_wr.data   = {spiked_in || (cand && !is_soft), pot};

    spk_valid    = mark_pending || (have && send && outs_ready);
    spk.eot_mark = mark_pending;
    spk.n        = (is_soft && !mark_pending) ? max_n_n : l2s_addr;
    busy         = mark_pending;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mark_pending <= 1'b0;
      mask         <= '0;
      col_r        <= '0;
      px_r         <= '0;
      py_r         <= '0;
      pcol_r       <= '0;
      prow_r       <= '0;
      max_pot_r    <= '0;
      max_n_r      <= '0;
      ts_count     <= '0;
      n_fired      <= '0;
      n_pooled     <= '0;
    end else begin
      if (mark_pending && spk_ready) begin
        mark_pending <= 1'b0;
        ts_count     <= ts_count + 8'd1;
      end
      if (accept && is_eot) begin
        max_pot_r <= max_pot_n;
        max_n_r   <= max_n_n;
        if (c2s.last) mark_pending <= 1'b1;
        if (send) n_fired <= n_fired + 16'd1;
        if (is_pool && cand && masked) n_pooled <= n_pooled + 16'd1;
        if (fire && is_pool) mask[pidx] <= 1'b1;
        // follow the sweep through rows and pooling windows
        if (col_c == cfg.wid_output - GN_W'(1)) begin
          col_r  <= '0;
          px_r   <= '0;
          pcol_r <= '0;
          if (py_c == cfg.pool - 3'd1) begin
            py_r   <= '0;
            prow_r <= prow_c + pcol_c + NA_W'(1);
          end else begin
            py_r   <= py_c + 3'd1;
            prow_r <= prow_c;
          end
        end else begin
          col_r  <= col_c + GN_W'(1);
          py_r   <= py_c;
          prow_r <= prow_c;
          if (px_c == cfg.pool - 3'd1) begin
            px_r   <= '0;
            pcol_r <= pcol_c + NA_W'(1);
          end else begin
            px_r   <= px_c + 3'd1;
            pcol_r <= pcol_c;
          end
        end
      end
      if (clear) begin
        mask     <= '0;
        ts_count <= '0;
      end
    end
  end

  a_marker_alone: assert property (@(posedge clk) disable iff (!rst_n)
                                   mark_pending |-> !accept);
endmodule
