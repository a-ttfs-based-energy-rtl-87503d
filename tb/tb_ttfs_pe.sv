// tb_ttfs_pe: one processing element driven only through its network port.
// The bench programs it with packets (registers, weights, biases, neuron
// words, spike address entries), then runs four timesteps of a fully connected
// layer of 20 neurons with 16 inputs. Forwarding is on (next PE 5), so every
// input spike must come back out as a copy addressed to PE 5, and the EoT of
// each timestep must leave after this PE's own spikes, also addressed to PE 5.
// Output spikes are compared per timestep with a software model; the spike
// address entry of neuron i is {dest 40 + i % 3, data 1000 + i}. The output
// port is stalled at random. Afterwards `done` must be set (max_ts = 4), and a
// clear packet must reset the timestep count.
module tb_ttfs_pe;
  import ttfs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready, idle, done;
  packet_t in_pkt, out_pkt;
  logic [7:0] ts_count;
  logic [15:0] n_fired, n_pooled, n_forwarded;
  int checks = 0, failures = 0;
  ttfs_pe dut (.*);

  localparam int N = 20, M = 16, TS = 4, THR = 120;

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic int sat(longint v, int bits);
    longint mx = (longint'(1) << (bits-1)) - 1;
    return (v > mx) ? int'(mx) : (v < -mx-1) ? int'(-mx-1) : int'(v);
  endfunction
  function automatic packet_t prog(prog_tgt_e tgt, int addr, logic [DATA_W-1:0] data);
    packet_t k = '0;
    k.prog = 1'b1; k.tgt = tgt; k.addr = PADDR_W'(addr); k.data = data;
    return k;
  endfunction

  packet_t pq [$], outs [$];
  always @(negedge clk) begin
    in_valid = pq.size() != 0;
    if (pq.size() != 0) in_pkt = pq[0];
    out_ready = $urandom_range(0, 2) != 0;
  end
  always @(posedge clk) begin
    if (in_valid && in_ready) void'(pq.pop_front());
    if (out_valid && out_ready) outs.push_back(out_pkt);
  end

  initial begin
    int wts [N*M], acc [N], np [N];
    bit spk [N];
    pq.delete();
    in_pkt = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    pq.push_back(prog(TGT_REG, REG_LAYER, DATA_W'(L_FC)));
    pq.push_back(prog(TGT_REG, REG_THRESHOLD, DATA_W'(THR)));
    pq.push_back(prog(TGT_REG, REG_MAX_TS, DATA_W'(TS)));
    pq.push_back(prog(TGT_REG, REG_N_BASE, 0));
    pq.push_back(prog(TGT_REG, REG_N_COUNT, DATA_W'(N)));
    pq.push_back(prog(TGT_REG, REG_X_JUMP, DATA_W'(N - 1)));
    pq.push_back(prog(TGT_REG, REG_X_INC, 1));
    pq.push_back(prog(TGT_REG, REG_FWD, DATA_W'({1'b1, 8'd5})));
    pq.push_back(prog(TGT_REG, REG_EOT, 0));
    pq.push_back(prog(TGT_CLEAR, 0, 0));
    foreach (wts[i]) begin wts[i] = $urandom_range(0, 60) - 20; pq.push_back(prog(TGT_WEIGHT, i, DATA_W'(wts[i]))); end
    for (int i = 0; i < N; i++) begin
      acc[i] = $urandom_range(0, 8) - 3; np[i] = 0; spk[i] = 0;
      pq.push_back(prog(TGT_ACC, i, DATA_W'(acc[i])));
      pq.push_back(prog(TGT_NEURON, i, 0));
      pq.push_back(prog(TGT_SPIKE, i, DATA_W'({8'(40 + i % 3), 40'(1000 + i)})));
    end
    while (pq.size() != 0) @(posedge clk);
    repeat (5) @(posedge clk);
    check(outs.size() == 0, "programming produced output");
    for (int t = 0; t < TS; t++) begin
      int ins [$], exp [$], got_spk [$], got_fwd [$];
      packet_t p;
      ins.delete(); exp.delete(); got_spk.delete(); got_fwd.delete();
      outs.delete();
      for (int s = 0; s < M; s++) if ($urandom_range(0, 2) == 0) begin
        ins.push_back(s);
        p = '0; p.dest = 8'd3; p.data = DATA_W'(s * N); pq.push_back(p);
        for (int i = 0; i < N; i++) acc[i] = sat(longint'(acc[i]) + wts[s*N + i], 32);
      end
      p = '0; p.eot = 1; pq.push_back(p);
      for (int i = 0; i < N; i++) begin
        np[i] = sat(longint'(np[i]) + acc[i], 31);
        if (!spk[i] && np[i] >= THR) begin spk[i] = 1; exp.push_back(i); end
      end
      while (outs.size() == 0 || !outs[$].eot) @(posedge clk);
      repeat (10) @(posedge clk);
      foreach (outs[k]) begin
        if (outs[k].eot) check(k == outs.size() - 1 && outs[k].dest == 5, "EoT not last or wrong dest");
        else if (outs[k].dest == 5) got_fwd.push_back(int'(outs[k].data) / N);
        else begin
          int i;
          i = int'(outs[k].data) - 1000;
          check(outs[k].dest == 8'(40 + i % 3), $sformatf("spike dest %0d for neuron %0d", outs[k].dest, i));
          got_spk.push_back(i);
        end
      end
      check(got_fwd == ins, $sformatf("step %0d: %0d forwarded copies, expected %0d", t, got_fwd.size(), ins.size()));
      check(got_spk == exp, $sformatf("step %0d: %0d spikes, expected %0d", t, got_spk.size(), exp.size()));
      check(ts_count == 8'(t + 1), "ts_count");
      check(done == (t + 1 >= TS), "done");
      $display("step %0d: %0d inputs, %0d spikes", t, ins.size(), got_spk.size());
    end
    check(n_fired > 0, "nothing fired");
    check(idle, "PE not idle at the end");
    pq.push_back(prog(TGT_CLEAR, 0, 0));
    repeat (5) @(posedge clk);
    check(ts_count == 0 && !done, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
