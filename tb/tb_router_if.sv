// tb_router_if: random packets of every kind (register write, clear, SRAM
// write, input spike, EoT) with random ready signals and random generated
// packets, with forwarding on and off. Each cycle the outputs are compared
// with an independent model of the routing rules: spikes go to the core and,
// when forwarding is on, a copy with dest = fwd_dest goes out in the same
// cycle; EoT goes to the core only; programming packets go to the control
// unit or memory interface; generated packets go out when no copy is being
// forwarded. The forwarded-packet counter is checked at the end.
module tb_router_if;
  import ttfs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cfg_t cfg;
  logic in_valid, in_ready, core_valid, core_ready, gen_valid, gen_ready, out_valid, out_ready;
  packet_t in_pkt, core_pkt, gen_pkt, out_pkt;
  logic reg_wr_en, clear, prog_valid, prog_ready;
  logic [PADDR_W-1:0] reg_wr_addr, prog_addr;
  logic [DATA_W-1:0] reg_wr_data, prog_data;
  prog_tgt_e prog_tgt;
  logic [15:0] n_forwarded;
  int checks = 0, failures = 0, fwd_count = 0, seen_fwd = 0, seen_gen = 0, seen_prog = 0, seen_eot = 0;
  router_if dut (.*);

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin
    packet_t fcopy;
    bit is_data, fwd, go;
    cfg = '0;
    {in_valid, core_ready, gen_valid, out_ready, prog_ready} = '0;
    in_pkt = '0; gen_pkt = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      if (i % 1000 == 0) begin cfg.fwd_en = (i / 1000) % 2; cfg.fwd_dest = 8'($urandom); end
      in_valid = $urandom_range(0, 3) != 0;
      in_pkt = packet_t'({$urandom, $urandom, $urandom});
      case ($urandom_range(0, 4))
        0: begin in_pkt.prog = 1; in_pkt.tgt = TGT_REG; end
        1: begin in_pkt.prog = 1; in_pkt.tgt = TGT_CLEAR; end
        2: begin in_pkt.prog = 1; in_pkt.tgt = prog_tgt_e'($urandom_range(1, 4)); end
        3: begin in_pkt.prog = 0; in_pkt.eot = 1; end
        default: begin in_pkt.prog = 0; in_pkt.eot = 0; end
      endcase
      gen_valid = $urandom_range(0, 1); gen_pkt = packet_t'({$urandom, $urandom, $urandom});
      core_ready = $urandom_range(0, 3) != 0; out_ready = $urandom_range(0, 3) != 0;
      prog_ready = $urandom_range(0, 1);
      #1;
      is_data = in_valid && !in_pkt.prog;
      fwd     = is_data && cfg.fwd_en && !in_pkt.eot;
      go      = is_data && core_ready && (!fwd || out_ready);
      check(core_valid == go, "core_valid");
      if (go) check(core_pkt == in_pkt, "core packet");
      check(reg_wr_en == (in_valid && in_pkt.prog && in_pkt.tgt == TGT_REG), "reg_wr_en");
      if (reg_wr_en) check(reg_wr_addr == in_pkt.addr && reg_wr_data == in_pkt.data, "register write");
      check(clear == (in_valid && in_pkt.prog && in_pkt.tgt == TGT_CLEAR), "clear");
      check(prog_valid == (in_valid && in_pkt.prog && in_pkt.tgt inside {TGT_WEIGHT, TGT_ACC, TGT_NEURON, TGT_SPIKE}), "prog_valid");
      if (prog_valid) check(prog_tgt == in_pkt.tgt && prog_addr == in_pkt.addr && prog_data == in_pkt.data, "prog fields");
      check(in_ready == (reg_wr_en || clear || (prog_valid && prog_ready) || go), "in_ready");
      if (go && fwd) begin
        fcopy = in_pkt; fcopy.dest = cfg.fwd_dest;
        check(out_valid && out_pkt == fcopy && !gen_ready, "forwarded copy");
        fwd_count++; seen_fwd++;
      end else begin
        check(out_valid == gen_valid && gen_ready == out_ready, "generated path");
        if (gen_valid) check(out_pkt == gen_pkt, "generated packet");
        if (gen_valid && out_ready) seen_gen++;
      end
      if (go && in_pkt.eot) seen_eot++;
      if (prog_valid && prog_ready) seen_prog++;
    end
    @(negedge clk);
    check(n_forwarded == 16'(fwd_count), $sformatf("n_forwarded %0d expected %0d", n_forwarded, fwd_count));
    check(seen_fwd > 100 && seen_gen > 100 && seen_prog > 100 && seen_eot > 100, "a path was not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
