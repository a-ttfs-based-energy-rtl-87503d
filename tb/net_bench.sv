// net_bench: end-to-end bench for ttfs_accel, shared by the network-level
// testbenches. It builds a spiking network with random 8-bit weights, maps it
// onto PEs the way the accelerator expects (one layer slice per PE, PEs of a
// layer chained by forwarding, the last PE of a layer sending the EoT on),
// programs every PE with programming packets, runs NUM_TS timesteps of
// time-to-first-spike input and compares, timestep by timestep, the spike
// packets every layer delivers to the next (and the output layer to the host)
// with a software model of the same integrate-and-fire arithmetic.
//   NET = 0: 6x6 input, conv 3x3 (2 channels, pad 1) + 2x2 max-pooling on three
//            PEs (channel 0 split in two row bands), conv 3x3 (2->1 channel)
//            on one PE, FC 9->6 on one PE, FC 6->4 softmax on one PE.
//   NET = 1: the MNIST MLP 784-300-300-10 on 39 PEs (28 + 10 + 1).
//   NET = 2: 28x28 input, conv 3x3 (2 channels, pad 1) + 2x2 max-pooling with
//            each channel split over four PEs in row bands (8, 8, 8, 4 rows),
//            then FC 392->10 softmax on one PE: nine PEs.
// The network-on-chip is modelled as an ideal crossbar that accepts every
// packet a PE emits at once and delivers packets to each destination in the
// order they were emitted. The host sends timestep t+1 only after the output
// layer's EoT of timestep t has come back. Each mechanism of the design is counted and must
// happen at least once.
module net_bench #(
  parameter int NET = 0
);
  import ttfs_pkg::*;

  localparam int NUM_PE = 42;            // the top's default
  localparam int HOST   = 255;
  localparam int NUM_TS = 8;             // timesteps per inference
  localparam int MAXL   = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NUM_PE-1:0] in_valid, in_ready, out_valid, out_ready, idle, done;
  packet_t in_pkt [NUM_PE], out_pkt [NUM_PE];
  logic [7:0]  ts_count [NUM_PE];
  logic [15:0] n_fired [NUM_PE], n_pooled [NUM_PE], n_forwarded [NUM_PE];

  ttfs_accel u_dut (.*);

  // ------------------------------------------------------------ network
  typedef enum int {K_CONV, K_CONV_POOL, K_FC, K_SOFT} kind_e;
  int nl;
  kind_e lk [MAXL];
  int cin [MAXL], hh [MAXL], ww [MAXL], kw [MAXL], pad [MAXL], cout [MAXL], pool [MAXL];
  int nin [MAXL], nout [MAXL], stride_m [MAXL], thr [MAXL];
  int wt [MAXL][];                        // conv ((co*cin+ci)*k+ky)*k+kx ; fc j*nout+i
  int bias [MAXL][];                      // per neuron
  // PE map
  int pe_layer [NUM_PE], pe_ch [NUM_PE], pe_start [NUM_PE], pe_cnt [NUM_PE];
  int first_pe [MAXL];
  int tin [];                             // input spike timestep per input, -1 = none

  function automatic int neurons_of(int l);
    if (lk[l] == K_CONV || lk[l] == K_CONV_POOL) return cout[l] * hh[l] * ww[l];
    return nout[l];
  endfunction
  function automatic int inputs_of(int l);
    if (lk[l] == K_CONV || lk[l] == K_CONV_POOL) return cin[l] * hh[l] * ww[l];
    return nin[l];
  endfunction
  // index, in the next layer's input, of neuron g of layer l
  function automatic int out_index(int l, int g);
    int co, r, oy, ox, ph, pw;
    if (lk[l] != K_CONV_POOL) return g;
    co = g / (hh[l]*ww[l]); r = g % (hh[l]*ww[l]); oy = r / ww[l]; ox = r % ww[l];
    ph = hh[l] / pool[l]; pw = ww[l] / pool[l];
    return co*ph*pw + (oy/pool[l])*pw + ox/pool[l];
  endfunction
  // spike packet data for input s of layer l
  function automatic logic [DATA_W-1:0] spike_data(int l, int s);
    cnn_spike_t c;
    int ci, r, iy, ix, kyl, kyh, kxl, kxh;
    if (l >= nl) return DATA_W'(s);      // class index for the host
    if (lk[l] == K_FC || lk[l] == K_SOFT) return DATA_W'(s * stride_m[l]);
    ci = s / (hh[l]*ww[l]); r = s % (hh[l]*ww[l]); iy = r / ww[l]; ix = r % ww[l];
    kyl = iy + pad[l] - (hh[l]-1); if (kyl < 0) kyl = 0;
    kyh = iy + pad[l]; if (kyh > kw[l]-1) kyh = kw[l]-1;
    kxl = ix + pad[l] - (ww[l]-1); if (kxl < 0) kxl = 0;
    kxh = ix + pad[l]; if (kxh > kw[l]-1) kxh = kw[l]-1;
    c.ch       = CH_W'(ci);
    c.y_jump   = JUMP_W'(kyh - kyl);
    c.x_jump   = JUMP_W'(kxh - kxl);
    c.s_neuron = GN_W'((iy + pad[l] - kyl) * ww[l] + (ix + pad[l] - kxl));
    c.s_weight = SW_W'(kyl * kw[l] + kxl);
    return DATA_W'(c);
  endfunction
  function automatic int dest_of(int l);
    return (l + 1 < nl) ? first_pe[l+1] : HOST;
  endfunction

  task automatic add_pe(input int p, input int l, input int ch, input int st, input int cnt);
    pe_layer[p] = l; pe_ch[p] = ch; pe_start[p] = st; pe_cnt[p] = cnt;
  endtask

  task automatic build();
    for (int p = 0; p < NUM_PE; p++) pe_layer[p] = -1;
    if (NET == 0) begin
      nl = 4;
      lk[0] = K_CONV_POOL; cin[0] = 1; hh[0] = 6; ww[0] = 6; kw[0] = 3; pad[0] = 1; cout[0] = 2; pool[0] = 2; thr[0] = 120;
      lk[1] = K_CONV;      cin[1] = 2; hh[1] = 3; ww[1] = 3; kw[1] = 3; pad[1] = 1; cout[1] = 1; pool[1] = 1; thr[1] = 150;
      lk[2] = K_FC;   nin[2] = 9; nout[2] = 6; stride_m[2] = 6; thr[2] = 150;
      lk[3] = K_SOFT; nin[3] = 6; nout[3] = 4; stride_m[3] = 4; thr[3] = 0;
      add_pe(0, 0, 0, 0, 4);   // channel 0 rows 0-3
      add_pe(1, 0, 0, 4, 2);   // channel 0 rows 4-5
      add_pe(2, 0, 1, 0, 6);   // channel 1
      add_pe(3, 1, 0, 0, 3);
      add_pe(4, 2, 0, 0, 6);
      add_pe(5, 3, 0, 0, 4);
    end else if (NET == 2) begin
      nl = 2;
      lk[0] = K_CONV_POOL; cin[0] = 1; hh[0] = 28; ww[0] = 28; kw[0] = 3; pad[0] = 1; cout[0] = 2; pool[0] = 2; thr[0] = 700;
      lk[1] = K_SOFT; nin[1] = 392; nout[1] = 10; stride_m[1] = 10; thr[1] = 0;
      // each 28x28 channel on four PEs: row bands of 8, 8, 8 and 4 rows
      for (int c = 0; c < 2; c++) for (int b = 0; b < 4; b++) add_pe(c*4 + b, 0, c, b*8, (b == 3) ? 4 : 8);
      add_pe(8, 1, 0, 0, 10);
    end else begin
      nl = 3;
      lk[0] = K_FC;   nin[0] = 784; nout[0] = 300; stride_m[0] = 11; thr[0] = 400;
      lk[1] = K_FC;   nin[1] = 300; nout[1] = 300; stride_m[1] = 30; thr[1] = 300;
      lk[2] = K_SOFT; nin[2] = 300; nout[2] = 10;  stride_m[2] = 10; thr[2] = 0;
      for (int p = 0; p < 28; p++) add_pe(p, 0, 0, p*11, (p == 27) ? 300 - 27*11 : 11);
      for (int p = 0; p < 10; p++) add_pe(28+p, 1, 0, p*30, 30);
      add_pe(38, 2, 0, 0, 10);
    end
    for (int l = 0; l < nl; l++) begin
      int nw;
      first_pe[l] = -1;
      for (int p = NUM_PE-1; p >= 0; p--) if (pe_layer[p] == l) first_pe[l] = p;
      nw = (lk[l] == K_FC || lk[l] == K_SOFT) ? nin[l]*nout[l] : cout[l]*cin[l]*kw[l]*kw[l];
      wt[l] = new[nw];
      bias[l] = new[neurons_of(l)];
      foreach (wt[l][i]) wt[l][i] = int'($urandom_range(0, 90)) - 30;
      foreach (bias[l][i]) bias[l][i] = int'($urandom_range(0, 12)) - 4;
    end
    tin = new[inputs_of(0)];
    // the small network gets a dense, early input so the PE input FIFOs fill up
    foreach (tin[i])
      if (NET == 0) tin[i] = ($urandom_range(0, 7) == 0) ? -1 : int'($urandom_range(0, 1));
      else          tin[i] = ($urandom_range(0, 3) == 0) ? -1 : int'($urandom_range(0, NUM_TS-1));
  endtask

  // ------------------------------------------------------------ reference model
  int checks = 0, failures = 0;
  int exp_cnt [longint];                  // {dest, epoch, data} -> count
  int got_cnt [longint];
  int ref_spikes [MAXL];

  function automatic longint key(int d, int e, logic [DATA_W-1:0] data);
    return (longint'(d) << 56) | (longint'(e) << 48) | longint'(data);
  endfunction

  function automatic int sat(longint v, int bits);
    longint mx = (longint'(1) << (bits-1)) - 1;
    if (v > mx) return int'(mx);
    if (v < -mx-1) return int'(-mx-1);
    return int'(v);
  endfunction

  task automatic reference();
    int acc [MAXL][], np [MAXL][];
    bit spk [MAXL][];
    bit msk [MAXL][];
    int ins [$], outs [$];
    for (int l = 0; l < nl; l++) begin
      acc[l] = new[neurons_of(l)]; np[l] = new[neurons_of(l)];
      spk[l] = new[neurons_of(l)]; msk[l] = new[neurons_of(l)];
      foreach (acc[l][i]) begin acc[l][i] = bias[l][i]; np[l][i] = 0; spk[l][i] = 0; msk[l][i] = 0; end
      ref_spikes[l] = 0;
    end
    for (int t = 0; t < NUM_TS; t++) begin
      ins.delete();
      foreach (tin[s]) if (tin[s] == t) ins.push_back(s);
      for (int l = 0; l < nl; l++) begin
        // input spikes
        foreach (ins[q]) begin
          int s = ins[q];
          if (lk[l] == K_FC || lk[l] == K_SOFT) begin
            for (int i = 0; i < nout[l]; i++) acc[l][i] = sat(longint'(acc[l][i]) + wt[l][s*nout[l]+i], 32);
          end else begin
            int ci = s / (hh[l]*ww[l]), r = s % (hh[l]*ww[l]);
            int iy = r / ww[l], ix = r % ww[l];
            for (int ky = 0; ky < kw[l]; ky++) for (int kx = 0; kx < kw[l]; kx++) begin
              int oy = iy - ky + pad[l], ox = ix - kx + pad[l];
              if (oy >= 0 && oy < hh[l] && ox >= 0 && ox < ww[l])
                for (int co = 0; co < cout[l]; co++) begin
                  int g = co*hh[l]*ww[l] + oy*ww[l] + ox;
                  acc[l][g] = sat(longint'(acc[l][g]) + wt[l][((co*cin[l]+ci)*kw[l]+ky)*kw[l]+kx], 32);
                end
            end
          end
        end
        // end of timestep, PE by PE in address order
        outs.delete();
        for (int p = 0; p < NUM_PE; p++) if (pe_layer[p] == l) begin
          int base = (lk[l] == K_FC || lk[l] == K_SOFT) ? pe_start[p]
                     : pe_ch[p]*hh[l]*ww[l] + pe_start[p]*ww[l];
          int cnt  = (lk[l] == K_FC || lk[l] == K_SOFT) ? pe_cnt[p] : pe_cnt[p]*ww[l];
          int mxp = 0, mxn = 0;
          for (int n = 0; n < cnt; n++) begin
            int g = base + n;
            np[l][g] = sat(longint'(np[l][g]) + acc[l][g], 31);
            if (lk[l] == K_SOFT) begin
              if (n == 0 || np[l][g] >= mxp) begin mxp = np[l][g]; mxn = g; end
            end else if (!spk[l][g] && np[l][g] >= thr[l]) begin
              spk[l][g] = 1;
              if (lk[l] == K_CONV_POOL) begin
                int o = out_index(l, g);
                if (!msk[l][o]) begin msk[l][o] = 1; outs.push_back(o); end
              end else outs.push_back(g);
            end
          end
          if (lk[l] == K_SOFT) outs.push_back(mxn);
        end
        foreach (outs[q]) begin
          longint k = key(dest_of(l), t, spike_data(l+1, outs[q]));
          exp_cnt[k] = exp_cnt.exists(k) ? exp_cnt[k] + 1 : 1;
        end
        ref_spikes[l] += outs.size();
        ins = outs;
      end
    end
  endtask

  // ------------------------------------------------------------ programming
  packet_t dq [NUM_PE][$];                // per destination delivery queues
  packet_t host_q [$];

  function automatic packet_t prog(int p, prog_tgt_e tgt, int addr, logic [DATA_W-1:0] data);
    packet_t k = '0;
    k.dest = DEST_W'(p); k.prog = 1'b1; k.tgt = tgt; k.addr = PADDR_W'(addr); k.data = data;
    return k;
  endfunction

  task automatic program_all();
    for (int p = 0; p < NUM_PE; p++) if (pe_layer[p] >= 0) begin
      int l = pe_layer[p];
      bit fc = (lk[l] == K_FC || lk[l] == K_SOFT);
      int cnt  = fc ? pe_cnt[p] : pe_cnt[p]*ww[l];
      int gbase = fc ? pe_start[p] : pe_ch[p]*hh[l]*ww[l] + pe_start[p]*ww[l];
      int nxt = -1;
      layer_e le;
      for (int q = p+1; q < NUM_PE; q++) if (nxt < 0 && pe_layer[q] == l) nxt = q;
      case (lk[l]) K_CONV: le = L_CONV; K_CONV_POOL: le = L_CONV_POOL; K_FC: le = L_FC; default: le = L_FC_SOFTMAX; endcase
      dq[p].push_back(prog(p, TGT_REG, REG_LAYER, DATA_W'(le)));
      dq[p].push_back(prog(p, TGT_REG, REG_WID_OUT, DATA_W'(fc ? 1 : ww[l])));
      dq[p].push_back(prog(p, TGT_REG, REG_WID_W, DATA_W'(fc ? 1 : kw[l])));
      dq[p].push_back(prog(p, TGT_REG, REG_THRESHOLD, DATA_W'(thr[l])));
      dq[p].push_back(prog(p, TGT_REG, REG_MAX_TS, DATA_W'(NUM_TS)));
      dq[p].push_back(prog(p, TGT_REG, REG_N_BASE, DATA_W'(fc ? 0 : pe_start[p]*ww[l])));
      dq[p].push_back(prog(p, TGT_REG, REG_N_COUNT, DATA_W'(cnt)));
      dq[p].push_back(prog(p, TGT_REG, REG_X_JUMP, DATA_W'(cnt - 1)));
      dq[p].push_back(prog(p, TGT_REG, REG_X_INC, DATA_W'(1)));
      dq[p].push_back(prog(p, TGT_REG, REG_POOL, DATA_W'(fc ? 1 : pool[l])));
      dq[p].push_back(prog(p, TGT_REG, REG_FWD, (nxt >= 0) ? DATA_W'({1'b1, DEST_W'(nxt)}) : '0));
      dq[p].push_back(prog(p, TGT_REG, REG_EOT, (nxt < 0) ? DATA_W'({1'b1, DEST_W'(dest_of(l))}) : '0));
      dq[p].push_back(prog(p, TGT_CLEAR, 0, '0));
      // weights
      if (fc) begin
        for (int j = 0; j < nin[l]; j++) for (int i = 0; i < pe_cnt[p]; i++)
          dq[p].push_back(prog(p, TGT_WEIGHT, j*stride_m[l] + i, DATA_W'(wt[l][j*nout[l] + pe_start[p] + i])));
      end else begin
        for (int ci = 0; ci < cin[l]; ci++) for (int kk = 0; kk < kw[l]*kw[l]; kk++)
          dq[p].push_back(prog(p, TGT_WEIGHT, ci*kw[l]*kw[l] + kk,
                               DATA_W'(wt[l][(pe_ch[p]*cin[l]+ci)*kw[l]*kw[l] + kk])));
      end
      // biases, potentials and spike address entries
      for (int n = 0; n < cnt; n++) begin
        logic [SPK_W-1:0] ent;
        ent = {DEST_W'(dest_of(l)), 40'(spike_data(l+1, out_index(l, gbase + n)))};
        if (lk[l] == K_SOFT) ent = {DEST_W'(HOST), 40'(gbase + n)};
        dq[p].push_back(prog(p, TGT_ACC, n, DATA_W'(bias[l][gbase + n])));
        dq[p].push_back(prog(p, TGT_NEURON, n, '0));
        dq[p].push_back(prog(p, TGT_SPIKE, n, DATA_W'(ent)));
      end
    end
  endtask

  // ------------------------------------------------------------ network model
  int cyc = 0, host_epoch = 0, stall_cycles = 0, both_rw = 0;
  int epoch [NUM_PE];
  always @(posedge clk) cyc <= cyc + 1;

  assign out_ready = '1;
  initial begin
    in_valid = '0;
    for (int d = 0; d < NUM_PE; d++) in_pkt[d] = '0;
  end

  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < NUM_PE; d++) begin
      if (in_valid[d] && in_ready[d]) void'(dq[d].pop_front());
      if (in_valid[d] && !in_ready[d]) stall_cycles++;
    end
    for (int i = 0; i < NUM_PE; i++) if (out_valid[i]) begin
      packet_t k;
      longint kk;
      k = out_pkt[i];
      if (k.dest == DEST_W'(HOST)) begin
        if (k.eot) host_epoch++;
        else begin
          kk = key(HOST, host_epoch, k.data);
          got_cnt[kk] = got_cnt.exists(kk) ? got_cnt[kk] + 1 : 1;
        end
      end else begin
        // spikes from another layer are recorded at the layer's first PE
        if (!k.eot && int'(k.dest) < NUM_PE && pe_layer[i] >= 0 && pe_layer[k.dest] != pe_layer[i]) begin
          kk = key(int'(k.dest), epoch[k.dest], k.data);
          got_cnt[kk] = got_cnt.exists(kk) ? got_cnt[kk] + 1 : 1;
        end
        if (k.eot && pe_layer[i] >= 0 && pe_layer[k.dest] != pe_layer[i]) epoch[k.dest]++;
        dq[k.dest].push_back(k);
      end
    end
    if (u_dut.g_pe[0].u_pe.u_mif.acc_rd_valid && u_dut.g_pe[0].u_pe.u_mif.acc_wr_valid) both_rw++;
    // present the new queue heads from the next cycle on
    for (int d = 0; d < NUM_PE; d++) begin
      in_valid[d] <= (dq[d].size() != 0);
      in_pkt[d]   <= (dq[d].size() != 0) ? dq[d][0] : '0;
    end
  end

  // ------------------------------------------------------------ run
  function automatic bit all_idle();
    for (int d = 0; d < NUM_PE; d++) if (dq[d].size() != 0) return 0;
    return &idle && !(|in_valid);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int in_spk = 0, t_start, t_end;
    for (int p = 0; p < NUM_PE; p++) epoch[p] = 0;
    build();
    reference();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    program_all();
    repeat (2) @(posedge clk);
    while (!all_idle()) @(posedge clk);
    t_start = cyc;
    $display("programmed after %0d cycles", cyc);
    // input spikes, timestep by timestep, then EoT; the next timestep is sent
    // once the output layer has sent its EoT for this one
    for (int t = 0; t < NUM_TS; t++) begin
      packet_t k;
      while (host_epoch < t) @(posedge clk);
      foreach (tin[s]) if (tin[s] == t) begin
        k = '0; k.dest = DEST_W'(first_pe[0]); k.data = spike_data(0, s);
        dq[first_pe[0]].push_back(k);
        in_spk++;
      end
      k = '0; k.dest = DEST_W'(first_pe[0]); k.eot = 1'b1;
      dq[first_pe[0]].push_back(k);
    end
    while (host_epoch < NUM_TS || !all_idle()) @(posedge clk);
    t_end = cyc;

    // every expected spike arrived in its timestep, and nothing else
    foreach (exp_cnt[k]) check(got_cnt.exists(k) && got_cnt[k] == exp_cnt[k],
                               $sformatf("spike key %h expected %0d got %0d", k, exp_cnt[k],
                                         got_cnt.exists(k) ? got_cnt[k] : 0));
    foreach (got_cnt[k]) check(exp_cnt.exists(k), $sformatf("unexpected spike key %h", k));
    for (int p = 0; p < NUM_PE; p++) if (pe_layer[p] >= 0)
      check(ts_count[p] == 8'(NUM_TS) && done[p], $sformatf("PE %0d ts_count %0d", p, ts_count[p]));

    // mechanisms
    begin
      int fwd = 0, fired = 0, pooled = 0, l_hw [MAXL];
      for (int l = 0; l < MAXL; l++) l_hw[l] = 0;
      for (int p = 0; p < NUM_PE; p++) begin
        fwd += n_forwarded[p]; pooled += n_pooled[p];
        if (pe_layer[p] >= 0) l_hw[pe_layer[p]] += n_fired[p];
      end
      for (int l = 0; l < nl; l++) begin
        $display("layer %0d: %0d spikes sent (reference %0d)", l, l_hw[l], ref_spikes[l]);
        check(l_hw[l] > 0, $sformatf("layer %0d never fired", l));
      end
      $display("input spikes %0d, forwarded %0d, pooled away %0d, input stalls %0d, ACC read+write contention %0d, cycles %0d",
               in_spk, fwd, pooled, stall_cycles, both_rw, t_end - t_start);
      check(fwd > 0, "forwarding never happened");
      check(stall_cycles > 0, "no input back-pressure stall happened");
      check(both_rw > 0, "ACC read/write alternation never exercised");
      if (NET != 1) check(pooled > 0, "max-pooling mask never suppressed a spike");
      check(host_epoch == NUM_TS, "host did not see one EoT per timestep");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    $display("host epochs %0d", host_epoch);
    for (int p = 0; p < 6; p++)
      $display("PE %0d: queue %0d idle %0b ts %0d fired %0d fwd %0d in_ready %0b", p, dq[p].size(),
               idle[p], ts_count[p], n_fired[p], n_forwarded[p], in_ready[p]);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
