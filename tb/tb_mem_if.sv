// tb_mem_if: the memory interface with its four SRAMs under random traffic
// from every port (core reads and writes, programming writes), checked
// against array models: every read response must equal the model word at the
// time the read was granted, no read may be granted while its response FIFO
// is almost full, and when a read and a write of the ACC or neuron SRAM wait
// together neither may be granted twice in a row. A directed part then checks
// the spike path: spiked-neuron addresses read the spike address SRAM and come
// out as packets {dest, data} in order, and the end-of-sweep marker becomes an
// EoT to the forwarding destination, to the layer-end destination, or to no
// one, depending on the configuration.
module tb_mem_if;
  import ttfs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cfg_t cfg;
  logic w_rd_valid, w_rd_ready, acc_rd_valid, acc_rd_ready, np_rd_valid, np_rd_ready;
  logic [WA_W-1:0] w_rd_addr;
  logic [NA_W-1:0] acc_rd_addr, np_rd_addr;
  logic acc_wr_valid, acc_wr_ready, np_wr_valid, np_wr_ready;
  wr_req_t acc_wr, np_wr;
  logic w_rsp_valid, w_rsp_afull, acc_rsp_valid, acc_rsp_afull, np_rsp_valid, np_rsp_afull;
  logic [WEIGHT_W-1:0] w_rsp;
  logic [ACC_W-1:0] acc_rsp;
  logic [NP_W-1:0] np_rsp;
  logic spk_valid, spk_ready, gen_valid, gen_ready;
  spk_t spk;
  packet_t gen_pkt;
  logic prog_valid, prog_ready;
  prog_tgt_e prog_tgt;
  logic [PADDR_W-1:0] prog_addr;
  logic [DATA_W-1:0] prog_data;
  logic w_en, w_we, acc_en, acc_we, np_en, np_we, sa_en, sa_we;
  logic [WA_W-1:0] w_addr;
  logic [WEIGHT_W-1:0] w_wdata, w_rdata;
  logic [NA_W-1:0] acc_addr, np_addr, sa_addr;
  logic [ACC_W-1:0] acc_wdata, acc_rdata;
  logic [NP_W-1:0] np_wdata, np_rdata;
  logic [SPK_W-1:0] sa_wdata, sa_rdata;

  mem_if dut (.*);
  sp_sram #(.WORDS(N_WEIGHTS), .WIDTH(WEIGHT_W)) u_w (.clk, .en(w_en), .we(w_we), .addr(w_addr), .wdata(w_wdata), .rdata(w_rdata));
  sp_sram #(.WORDS(N_NEURONS), .WIDTH(ACC_W)) u_acc (.clk, .en(acc_en), .we(acc_we), .addr(acc_addr), .wdata(acc_wdata), .rdata(acc_rdata));
  sp_sram #(.WORDS(N_NEURONS), .WIDTH(NP_W)) u_np (.clk, .en(np_en), .we(np_we), .addr(np_addr), .wdata(np_wdata), .rdata(np_rdata));
  sp_sram #(.WORDS(N_NEURONS), .WIDTH(SPK_W)) u_sa (.clk, .en(sa_en), .we(sa_we), .addr(sa_addr), .wdata(sa_wdata), .rdata(sa_rdata));

  int checks = 0, failures = 0, both_wait = 0;
  logic [7:0]  mw [N_WEIGHTS];
  logic [31:0] macc [N_NEURONS], mnp [N_NEURONS];
  logic [47:0] msa [N_NEURONS];
  logic [31:0] ew [$], eacc [$], enp [$];
  packet_t gens [$];
  bit random_traffic;
  logic last_acc_grant_wr, last_acc_both, last_np_grant_wr, last_np_both;

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (random_traffic) begin
    w_rd_valid   = $urandom_range(0, 1); w_rd_addr = WA_W'($urandom_range(0, 63));
    acc_rd_valid = $urandom_range(0, 2) != 0; acc_rd_addr = NA_W'($urandom_range(0, 15));
    np_rd_valid  = $urandom_range(0, 2) != 0; np_rd_addr  = NA_W'($urandom_range(0, 15));
    acc_wr_valid = $urandom_range(0, 2) != 0; acc_wr.addr = NA_W'($urandom_range(0, 15)); acc_wr.data = $urandom;
    np_wr_valid  = $urandom_range(0, 2) != 0; np_wr.addr  = NA_W'($urandom_range(0, 15)); np_wr.data  = $urandom;
    w_rsp_afull   = $urandom_range(0, 5) == 0;
    acc_rsp_afull = $urandom_range(0, 5) == 0;
    np_rsp_afull  = $urandom_range(0, 5) == 0;
    prog_valid = $urandom_range(0, 2) == 0;
    prog_tgt   = prog_tgt_e'($urandom_range(1, 4));
    prog_addr  = PADDR_W'($urandom_range(0, 15)); prog_data = {$urandom, $urandom};
  end

  always @(posedge clk) if (rst_n) begin
    // read grants and afull
    if ((w_rd_ready && w_rsp_afull) || (acc_rd_ready && acc_rsp_afull) || (np_rd_ready && np_rsp_afull)) begin
      failures++; $display("FAIL: read granted while response FIFO almost full");
    end
    // responses
    if (w_rsp_valid)   begin checks++; if (ew.size() == 0 || 8'(ew.pop_front()) != w_rsp) begin failures++; $display("FAIL: weight read"); end end
    if (acc_rsp_valid) begin checks++; if (eacc.size() == 0 || eacc.pop_front() != acc_rsp) begin failures++; $display("FAIL: ACC read"); end end
    if (np_rsp_valid)  begin checks++; if (enp.size() == 0 || enp.pop_front() != np_rsp) begin failures++; $display("FAIL: neuron read"); end end
    // alternation when a read and a write of the same SRAM both wait
    if (acc_rd_valid && acc_wr_valid && !acc_rsp_afull) begin
      both_wait++;
      if (last_acc_both && (acc_wr_ready == last_acc_grant_wr)) begin failures++; $display("FAIL: ACC not alternating"); end
      checks++;
    end
    if (np_rd_valid && np_wr_valid && !np_rsp_afull) begin
      if (last_np_both && (np_wr_ready == last_np_grant_wr)) begin failures++; $display("FAIL: neuron SRAM not alternating"); end
      checks++;
    end
    last_acc_both <= acc_rd_valid && acc_wr_valid && !acc_rsp_afull;
    last_acc_grant_wr <= acc_wr_ready;
    last_np_both <= np_rd_valid && np_wr_valid && !np_rsp_afull;
    last_np_grant_wr <= np_wr_ready;
    // model updates: reads see the word before this cycle's write
    if (w_rd_valid && w_rd_ready)     ew.push_back(32'(mw[w_rd_addr]));
    if (acc_rd_valid && acc_rd_ready) eacc.push_back(macc[acc_rd_addr]);
    if (np_rd_valid && np_rd_ready)   enp.push_back(mnp[np_rd_addr]);
    if (acc_wr_valid && acc_wr_ready) macc[acc_wr.addr] = acc_wr.data;
    if (np_wr_valid && np_wr_ready)   mnp[np_wr.addr]   = np_wr.data;
    if (prog_valid && prog_ready) begin
      unique case (prog_tgt)
        TGT_WEIGHT: mw[prog_addr[WA_W-1:0]]   = prog_data[7:0];
        TGT_ACC:    macc[prog_addr[NA_W-1:0]] = prog_data[31:0];
        TGT_NEURON: mnp[prog_addr[NA_W-1:0]]  = prog_data[31:0];
        TGT_SPIKE:  msa[prog_addr[NA_W-1:0]]  = prog_data;
        default: ;
      endcase
    end
    if (gen_valid && gen_ready) gens.push_back(gen_pkt);
  end

  task automatic prog(input prog_tgt_e t, input int a, input logic [47:0] d);
    @(negedge clk); prog_valid = 1; prog_tgt = t; prog_addr = PADDR_W'(a); prog_data = d;
    do @(posedge clk); while (!prog_ready);
    @(negedge clk); prog_valid = 0;
  endtask

  task automatic spike_run(input int ns [], input int exp_dest);
    int k = 0;
    gens.delete();
    while (k <= ns.size()) begin
      @(negedge clk);
      spk_valid = 1;
      spk.eot_mark = (k == ns.size());
      spk.n = (k < ns.size()) ? NA_W'(ns[k]) : '0;
      gen_ready = $urandom_range(0, 2) != 0;
      @(posedge clk);
      if (spk_ready) k++;
    end
    @(negedge clk); spk_valid = 0;
    repeat (10) begin @(negedge clk); gen_ready = $urandom_range(0, 1); end
    @(negedge clk); gen_ready = 1; repeat (3) @(negedge clk);
    check(gens.size() == ns.size() + (exp_dest >= 0), $sformatf("%0d packets generated", gens.size()));
    foreach (ns[i]) if (i < gens.size())
      check(!gens[i].eot && !gens[i].prog && gens[i].dest == msa[ns[i]][47:40] && gens[i].data[39:0] == msa[ns[i]][39:0],
            $sformatf("spike packet %0d", i));
    if (exp_dest >= 0 && gens.size() == ns.size() + 1)
      check(gens[$].eot && gens[$].dest == 8'(exp_dest), $sformatf("EoT packet dest %0d", gens[$].dest));
  endtask

  initial begin
    random_traffic = 0;
    {w_rd_valid, acc_rd_valid, np_rd_valid, acc_wr_valid, np_wr_valid, spk_valid, prog_valid} = '0;
    {w_rsp_afull, acc_rsp_afull, np_rsp_afull} = '0;
    gen_ready = 1; spk = '0; cfg = '0;
    last_acc_both = 0; last_np_both = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // defined contents first
    for (int i = 0; i < 64; i++) prog(TGT_WEIGHT, i, 48'($urandom));
    for (int i = 0; i < 16; i++) begin
      prog(TGT_ACC, i, 48'($urandom)); prog(TGT_NEURON, i, 48'($urandom));
    end
    for (int i = 0; i < 16; i++) prog(TGT_SPIKE, i, {8'(i + 20), 40'(i * 1000 + 7)});
    random_traffic = 1;
    repeat (3000) @(posedge clk);
    @(negedge clk);
    random_traffic = 0;
    {w_rd_valid, acc_rd_valid, np_rd_valid, acc_wr_valid, np_wr_valid, prog_valid} = '0;
    {w_rsp_afull, acc_rsp_afull, np_rsp_afull} = '0;
    repeat (3) @(posedge clk);
    check(ew.size() == 0 && eacc.size() == 0 && enp.size() == 0, "responses missing");
    check(both_wait > 100, "read/write contention not exercised");
    for (int i = 0; i < 16; i++) prog(TGT_SPIKE, i, {8'(i + 20), 40'(i * 1000 + 7)});

    cfg.fwd_en = 1; cfg.fwd_dest = 9;
    spike_run('{3, 5, 0, 15}, 9);
    cfg.last_in_layer = 1; cfg.eot_dest = 8'hff;
    spike_run('{7}, 255);
    cfg.last_in_layer = 0; cfg.fwd_en = 0;
    spike_run('{1, 2}, -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
