// tb_ttfs_core: the load/compute/store core against a behavioural memory that
// grants reads and writes at random (respecting the almost-full flags) and
// answers reads one cycle later. Two layers are run, each for four timesteps
// with random input spikes sent back to back:
//   * fully connected, 20 neurons and 16 inputs (weights of input j at
//     j*20 .. j*20+19), threshold 150;
//   * 3x3 convolution with padding 1 on a 6x6 map, threshold 60.
// After every EoT the ACC and neuron memories must equal a software model
// (saturating sums, potential += accumulated weight), and the spiked-neuron
// FIFO must carry exactly the neurons that crossed the threshold for the first
// time, in address order, followed by the end-of-sweep marker.
module tb_ttfs_core;
  import ttfs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cfg_t cfg;
  logic clear;
  logic in_valid, in_ready;
  packet_t in_pkt;
  logic w_rd_valid, w_rd_ready, acc_rd_valid, acc_rd_ready, np_rd_valid, np_rd_ready;
  logic [WA_W-1:0] w_rd_addr;
  logic [NA_W-1:0] acc_rd_addr, np_rd_addr;
  logic acc_wr_valid, acc_wr_ready, np_wr_valid, np_wr_ready;
  wr_req_t acc_wr, np_wr;
  logic w_rsp_valid, w_rsp_afull, acc_rsp_valid, acc_rsp_afull, np_rsp_valid, np_rsp_afull;
  logic [WEIGHT_W-1:0] w_rsp;
  logic [ACC_W-1:0] acc_rsp;
  logic [NP_W-1:0] np_rsp;
  logic spk_valid, spk_ready, idle;
  spk_t spk;
  logic [7:0] ts_count;
  logic [15:0] n_fired, n_pooled;
  int checks = 0, failures = 0;
  ttfs_core dut (.*);

  // ---- behavioural memory
  logic [7:0]  W   [N_WEIGHTS];
  logic [31:0] ACC [N_NEURONS], NP [N_NEURONS];
  logic [7:0]  w_q;
  logic [31:0] a_q, n_q;
  always @(negedge clk) begin
    w_rd_ready   = w_rd_valid   && !w_rsp_afull   && $urandom_range(0, 3) != 0;
    acc_rd_ready = acc_rd_valid && !acc_rsp_afull && $urandom_range(0, 3) != 0;
    np_rd_ready  = np_rd_valid  && !np_rsp_afull  && $urandom_range(0, 3) != 0;
    acc_wr_ready = $urandom_range(0, 3) != 0;
    np_wr_ready  = $urandom_range(0, 3) != 0;
    spk_ready    = $urandom_range(0, 2) != 0;
  end
  int spks [$];
  always @(posedge clk) begin
    w_rsp_valid <= rst_n && w_rd_valid && w_rd_ready;
    acc_rsp_valid <= rst_n && acc_rd_valid && acc_rd_ready;
    np_rsp_valid <= rst_n && np_rd_valid && np_rd_ready;
    w_rsp <= W[w_rd_addr]; acc_rsp <= ACC[acc_rd_addr]; np_rsp <= NP[np_rd_addr];
    if (acc_wr_valid && acc_wr_ready) ACC[acc_wr.addr] <= acc_wr.data;
    if (np_wr_valid && np_wr_ready)   NP[np_wr.addr]   <= np_wr.data;
    if (spk_valid && spk_ready) spks.push_back(spk.eot_mark ? -1 : int'(spk.n));
  end

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic int sat(longint v, int bits);
    longint mx = (longint'(1) << (bits-1)) - 1;
    return (v > mx) ? int'(mx) : (v < -mx-1) ? int'(-mx-1) : int'(v);
  endfunction

  packet_t pq [$];
  always @(negedge clk) begin
    in_valid = pq.size() != 0;
    if (pq.size() != 0) in_pkt = pq[0];
  end
  always @(posedge clk) if (in_valid && in_ready) void'(pq.pop_front());

  int m_acc [N_NEURONS], m_np [N_NEURONS];
  bit m_spk [N_NEURONS];

  task automatic run_layer(input bit conv);
    int n = conv ? 36 : 20;
    int m = conv ? 36 : 16;
    int wts [];
    wts = new[conv ? 9 : 320];
    cfg = '0; cfg.x_inc = 1; cfg.pool = 1; cfg.max_ts = 8; cfg.n_base = 0; cfg.n_count = 9'(n);
    cfg.layer = conv ? L_CONV : L_FC; cfg.wid_output = conv ? 6 : 1; cfg.wid_weight = conv ? 3 : 1;
    cfg.threshold = conv ? 60 : 150; cfg.x_jump = 9'(n - 1);
    foreach (wts[i]) begin wts[i] = $urandom_range(0, 50) - 15; W[i] = 8'(wts[i]); end
    for (int i = 0; i < n; i++) begin
      m_acc[i] = $urandom_range(0, 6) - 2; m_np[i] = 0; m_spk[i] = 0;
      ACC[i] = 32'(m_acc[i]); NP[i] = '0;
    end
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int t = 0; t < 4; t++) begin
      int exp_spk [$];
      packet_t p;
      for (int s = 0; s < m; s++) if ($urandom_range(0, 2) == 0) begin
        p = '0;
        if (!conv) begin
          p.data = DATA_W'(s * n);
          for (int i = 0; i < n; i++) m_acc[i] = sat(longint'(m_acc[i]) + wts[s*n + i], 32);
        end else begin
          cnn_spike_t c;
          int iy = s / 6, ix = s % 6;
          int kyl = (iy - 4 > 0) ? iy - 4 : 0, kyh = (iy + 1 < 2) ? iy + 1 : 2;
          int kxl = (ix - 4 > 0) ? ix - 4 : 0, kxh = (ix + 1 < 2) ? ix + 1 : 2;
          c = '0;
          c.y_jump = JUMP_W'(kyh - kyl); c.x_jump = JUMP_W'(kxh - kxl);
          c.s_neuron = GN_W'((iy + 1 - kyl) * 6 + (ix + 1 - kxl));
          c.s_weight = SW_W'(kyl * 3 + kxl);
          p.data = DATA_W'(c);
          for (int ky = 0; ky < 3; ky++) for (int kx = 0; kx < 3; kx++) begin
            int oy = iy - ky + 1, ox = ix - kx + 1;
            if (oy >= 0 && oy < 6 && ox >= 0 && ox < 6)
              m_acc[oy*6 + ox] = sat(longint'(m_acc[oy*6 + ox]) + wts[ky*3 + kx], 32);
          end
        end
        pq.push_back(p);
      end
      p = '0; p.eot = 1; pq.push_back(p);
      for (int i = 0; i < n; i++) begin
        m_np[i] = sat(longint'(m_np[i]) + m_acc[i], 31);
        if (!m_spk[i] && m_np[i] >= cfg.threshold) begin m_spk[i] = 1; exp_spk.push_back(i); end
      end
      exp_spk.push_back(-1);
      spks.delete();
      while (spks.size() == 0 || spks[$] != -1) @(posedge clk);
      repeat (2) @(posedge clk);
      check(spks == exp_spk, $sformatf("layer %0d step %0d: %0d spike entries, expected %0d", conv, t, spks.size(), exp_spk.size()));
      for (int i = 0; i < n; i++) begin
        check(ACC[i] == 32'(m_acc[i]), $sformatf("ACC[%0d] %0d expected %0d", i, $signed(ACC[i]), m_acc[i]));
        check(NP[i] == {m_spk[i], 31'(m_np[i])}, $sformatf("NP[%0d] %h expected pot %0d", i, NP[i], m_np[i]));
      end
      check(ts_count == 8'(t + 1), "ts_count");
      check(idle, "core not idle after sweep");
    end
  endtask

  initial begin
    clear = 0; cfg = '0; in_pkt = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    run_layer(0);
    run_layer(1);
    check(n_fired > 10, "few neurons fired");
    $display("fired %0d", n_fired);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
