// tb_store_unit: drives (result, address) pairs into the store module under
// random back-pressure on its three outputs and compares the ACC writes,
// neuron writes and spike FIFO entries with hand-worked expectations:
//   * accumulate results go to the ACC SRAM unchanged;
//   * integrate-and-fire sweep, threshold 10: potentials >= 10 fire once,
//     a neuron with its spiked flag set stays silent, a marker follows;
//   * max pooling 2x2 on a 4-wide map of 8 neurons (windows {0,1,4,5} and
//     {2,3,6,7}): only the first firing neuron of a window sends, the rest are
//     marked spiked; the mask holds across timesteps until `clear`;
//   * softmax over 6 neurons: only the largest potential is sent (the later
//     index on a tie), every timestep.
module tb_store_unit;
  import ttfs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cfg_t cfg;
  logic clear;
  logic c2s_valid, c2s_ready, l2s_valid, l2s_ready;
  c2s_t c2s;
  logic [NA_W-1:0] l2s_addr;
  logic acc_wr_valid, acc_wr_ready, np_wr_valid, np_wr_ready, spk_valid, spk_ready, busy;
  wr_req_t acc_wr, np_wr;
  spk_t spk;
  logic [7:0] ts_count;
  logic [15:0] n_fired, n_pooled;
  int checks = 0, failures = 0;
  store_unit dut (.*);

  typedef struct { op_e op; bit last; logic [31:0] value; int addr; } item_t;
  item_t drv [$];
  int accw [$], npw [$], spks [$];   // addresses seen; data in accd / npd
  logic [31:0] accd [$], npd [$];

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) begin
    acc_wr_ready = $urandom_range(0, 3) != 0;
    np_wr_ready  = $urandom_range(0, 3) != 0;
    spk_ready    = $urandom_range(0, 3) != 0;
    // the two inputs arrive independently
    c2s_valid = drv.size() != 0 && $urandom_range(0, 4) != 0;
    l2s_valid = drv.size() != 0 && $urandom_range(0, 4) != 0;
    if (drv.size() != 0) begin
      c2s.op = drv[0].op; c2s.last = drv[0].last; c2s.value = drv[0].value;
      l2s_addr = NA_W'(drv[0].addr);
    end
  end
  always @(posedge clk) if (rst_n) begin
    if (c2s_valid && c2s_ready) void'(drv.pop_front());
    if (c2s_ready != l2s_ready || (c2s_ready && !(c2s_valid && l2s_valid))) begin
      failures++; $display("FAIL: input handshake");
    end
    if (acc_wr_valid && acc_wr_ready) begin accw.push_back(int'(acc_wr.addr)); accd.push_back(acc_wr.data); end
    if (np_wr_valid && np_wr_ready) begin npw.push_back(int'(np_wr.addr)); npd.push_back(np_wr.data); end
    if (spk_valid && spk_ready) spks.push_back(spk.eot_mark ? -1 : int'(spk.n));
  end

  function automatic logic [31:0] nw(bit spiked, int pot);
    return {spiked, 31'(pot)};
  endfunction

  task automatic sweep(input int pots [], input bit flags [], input int exp_spk [], input bit exp_flag []);
    spks.delete(); npw.delete(); npd.delete();
    foreach (pots[i]) drv.push_back('{OP_EOT, i == pots.size() - 1, nw(flags[i], pots[i]), i});
    while (drv.size() != 0 || busy) @(posedge clk);
    repeat (3) @(posedge clk);
    check(spks.size() == exp_spk.size() + 1, $sformatf("spike entries %0d expected %0d", spks.size(), exp_spk.size() + 1));
    foreach (exp_spk[i]) if (i < spks.size()) check(spks[i] == exp_spk[i], $sformatf("spike %0d: got %0d exp %0d", i, spks[i], exp_spk[i]));
    if (spks.size() != 0) check(spks[$] == -1, "marker is not last");
    check(npw.size() == pots.size(), "neuron writes");
    foreach (pots[i]) if (i < npw.size())
      check(npw[i] == i && npd[i] == nw(exp_flag[i], pots[i]),
            $sformatf("neuron write %0d: addr %0d data %h", i, npw[i], npd[i]));
  endtask

  initial begin
    int ts0;
    clear = 0; cfg = '0; cfg.threshold = 10; cfg.layer = L_FC; cfg.wid_output = 4; cfg.pool = 2;
    drv.delete();
    repeat (2) @(posedge clk); rst_n = 1;

    // accumulate results
    for (int i = 0; i < 20; i++) drv.push_back('{OP_ACC, 0, $urandom, i % 7});
    begin
      item_t copy [$];
      copy = drv;
      while (drv.size() != 0) @(posedge clk);
      @(posedge clk);
      check(accw.size() == 20 && spks.size() == 0, "ACC writes only");
      check(copy.size() == 20, "copy");
      foreach (copy[i]) if (i < accw.size()) check(accw[i] == copy[i].addr && accd[i] == copy[i].value, "ACC write");
    end

    // integrate and fire, threshold 10
    ts0 = ts_count;
    sweep('{3, 10, 25, 9, 40, -7}, '{0, 0, 1, 0, 0, 0}, '{1, 4}, '{0, 1, 1, 0, 1, 0});
    check(ts_count == ts0 + 1, "ts_count after sweep");
    // same potentials next step: neurons 1 and 4 now carry the flag
    sweep('{3, 10, 25, 9, 40, -7}, '{0, 1, 1, 0, 1, 0}, '{}, '{0, 1, 1, 0, 1, 0});

    // max pooling 2x2 on a 4-wide map
    cfg.layer = L_CONV_POOL;
    ts0 = n_pooled;
    sweep('{0, 12, 0, 0, 0, 15, 0, 0}, '{0, 0, 0, 0, 0, 0, 0, 0}, '{1}, '{0, 1, 0, 0, 0, 1, 0, 0});
    check(n_pooled == ts0 + 1, "pooled count");
    sweep('{11, 12, 13, 0, 0, 15, 0, 0}, '{0, 1, 0, 0, 0, 1, 0, 0}, '{2}, '{1, 1, 1, 0, 0, 1, 0, 0});
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    check(ts_count == 0, "clear resets ts_count");
    sweep('{0, 0, 0, 0, 0, 0, 12, 11}, '{0, 0, 0, 0, 0, 0, 0, 0}, '{6}, '{0, 0, 0, 0, 0, 0, 1, 1});

    // softmax: no threshold, largest potential each step
    cfg.layer = L_FC_SOFTMAX;
    sweep('{3, 9, 2, 9, 1, -5}, '{0, 0, 0, 0, 0, 0}, '{3}, '{0, 0, 0, 0, 0, 0});
    sweep('{-3, -9, -2, -9, -1, -5}, '{0, 0, 0, 0, 0, 0}, '{4}, '{0, 0, 0, 0, 0, 0});
    sweep('{50, 9, 2, 9, 1, -5}, '{0, 0, 0, 0, 0, 0}, '{0}, '{0, 0, 0, 0, 0, 0});

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
