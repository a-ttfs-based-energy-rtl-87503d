// tb_load_unit: feeds single packets to the load module and compares the
// stream of (weight address, accumulated-weight address, neuron address, op,
// last) elements with the expected list, under random back-pressure from the
// five downstream FIFOs. Cases:
//   * the worked convolution example of the source: 6x6 output map, 3x3
//     filter, spike {Ch 0, Y_jump 1, X_jump 1, S_neuron 7, S_weight 0} gives
//     (acc 7, w 0), (6, 1), (1, 3), (0, 4);
//   * the same spike on channel 1 (weights offset by 9) and on a PE holding
//     only neurons 6..11 (elements 1 and 0 are skipped, addresses are local);
//   * the fully connected example: W_START 4, X_jump 3 gives weights 4..7 for
//     accumulators 0..3, and with x_inc 2 weights 4,6,8,10 for 0,2,4,6;
//   * an end-of-timestep sweep over 5 neurons with the last element flagged.
// It also checks that without back-pressure elements leave one per cycle and
// that a new packet is not taken while `drained` is low.
module tb_load_unit;
  import ttfs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cfg_t cfg;
  logic in_valid, in_ready, drained;
  packet_t in_pkt;
  logic w_rd_valid, w_rd_ready, acc_rd_valid, acc_rd_ready, np_rd_valid, np_rd_ready;
  logic [WA_W-1:0] w_rd_addr;
  logic [NA_W-1:0] acc_rd_addr, np_rd_addr, l2s_addr;
  logic l2c_valid, l2c_ready, l2s_valid, l2s_ready, busy;
  l2c_t l2c;
  int checks = 0, failures = 0;
  bit stall_mode;
  load_unit dut (.*);

  typedef struct { int w; int acc; int np; bit eot; bit last; } elem_t;
  elem_t got [$];

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // random back-pressure
  always @(negedge clk) begin
    w_rd_ready   = !stall_mode || $urandom_range(0, 3) != 0;
    acc_rd_ready = !stall_mode || $urandom_range(0, 3) != 0;
    np_rd_ready  = !stall_mode || $urandom_range(0, 3) != 0;
    l2c_ready    = !stall_mode || $urandom_range(0, 3) != 0;
    l2s_ready    = !stall_mode || $urandom_range(0, 3) != 0;
  end

  always @(posedge clk) if (rst_n) begin
    // all pushes happen together or not at all
    if (l2c_valid != l2s_valid || l2c_valid != acc_rd_valid ||
        (l2c_valid && (w_rd_valid != (l2c.op == OP_ACC) || np_rd_valid != (l2c.op == OP_EOT)))) begin
      failures++; $display("FAIL: pushes not aligned");
    end
    if (l2c_valid && !(w_rd_ready && acc_rd_ready && np_rd_ready && l2c_ready && l2s_ready) &&
        !(l2c.op == OP_ACC && !np_rd_ready && w_rd_ready && acc_rd_ready && l2c_ready && l2s_ready) &&
        !(l2c.op == OP_EOT && !w_rd_ready && np_rd_ready && acc_rd_ready && l2c_ready && l2s_ready)) begin
      failures++; $display("FAIL: push into a full FIFO");
    end
    if (l2c_valid) begin
      checks++;
      if (l2s_addr != acc_rd_addr) begin failures++; $display("FAIL: l2s address"); end
      got.push_back('{w: (l2c.op == OP_ACC) ? int'(w_rd_addr) : -1, acc: int'(acc_rd_addr),
                      np: (l2c.op == OP_EOT) ? int'(np_rd_addr) : -1,
                      eot: l2c.op == OP_EOT, last: l2c.last});
    end
  end

  task automatic run(input string name, input packet_t p, input elem_t exp [$], input int max_cycles = 0);
    int t0, cyc;
    got.delete();
    @(negedge clk);
    in_pkt = p; in_valid = 1;
    do @(posedge clk); while (!(in_valid && in_ready));
    t0 = $time;
    @(negedge clk); in_valid = 0;
    while (busy) @(negedge clk);
    cyc = ($time - t0) / 10;
    check(got.size() == exp.size(), $sformatf("%s: %0d elements, expected %0d", name, got.size(), exp.size()));
    foreach (exp[i]) if (i < got.size())
      check(got[i] == exp[i], $sformatf("%s: element %0d got w%0d acc%0d np%0d e%0d l%0d exp w%0d acc%0d np%0d e%0d l%0d",
            name, i, got[i].w, got[i].acc, got[i].np, got[i].eot, got[i].last,
            exp[i].w, exp[i].acc, exp[i].np, exp[i].eot, exp[i].last));
    if (max_cycles > 0) check(cyc <= max_cycles, $sformatf("%s: took %0d cycles", name, cyc));
  endtask

  function automatic packet_t cnn(int ch, int yj, int xj, int sn, int sw);
    packet_t p = '0;
    cnn_spike_t c;
    c.ch = CH_W'(ch); c.y_jump = JUMP_W'(yj); c.x_jump = JUMP_W'(xj);
    c.s_neuron = GN_W'(sn); c.s_weight = SW_W'(sw);
    p.data = DATA_W'(c);
    return p;
  endfunction

  initial begin
    packet_t p;
    elem_t e [$];
    in_valid = 0; in_pkt = '0; drained = 1; stall_mode = 0;
    cfg = '0;
    cfg.layer = L_CONV; cfg.wid_output = 6; cfg.wid_weight = 3;
    cfg.n_base = 0; cfg.n_count = 36; cfg.x_inc = 1;
    repeat (2) @(posedge clk); rst_n = 1;

    for (int pass = 0; pass < 2; pass++) begin
      stall_mode = pass;
      cfg.layer = L_CONV; cfg.n_base = 0; cfg.n_count = 36;
      e = '{'{0, 7, -1, 0, 0}, '{1, 6, -1, 0, 0}, '{3, 1, -1, 0, 0}, '{4, 0, -1, 0, 0}};
      // IDLE + CONFIG + four elements
      run("conv example", cnn(0, 1, 1, 7, 0), e, pass ? 0 : 6);
      e = '{'{9, 7, -1, 0, 0}, '{10, 6, -1, 0, 0}, '{12, 1, -1, 0, 0}, '{13, 0, -1, 0, 0}};
      run("conv channel 1", cnn(1, 1, 1, 7, 0), e);
      e = '{'{0, 14, -1, 0, 0}, '{1, 13, -1, 0, 0}, '{2, 12, -1, 0, 0},
            '{3, 8, -1, 0, 0}, '{4, 7, -1, 0, 0}, '{5, 6, -1, 0, 0},
            '{6, 2, -1, 0, 0}, '{7, 1, -1, 0, 0}, '{8, 0, -1, 0, 0}};
      run("conv full 3x3", cnn(0, 2, 2, 14, 0), e, pass ? 0 : 11);
      cfg.n_base = 6; cfg.n_count = 6;
      e = '{'{0, 1, -1, 0, 0}, '{1, 0, -1, 0, 0}};
      run("conv row band", cnn(0, 1, 1, 7, 0), e);
      cfg.layer = L_FC; cfg.n_base = 0; cfg.n_count = 5; cfg.x_jump = 3; cfg.x_inc = 1;
      p = '0; p.data = 48'd4;
      e = '{'{4, 0, -1, 0, 0}, '{5, 1, -1, 0, 0}, '{6, 2, -1, 0, 0}, '{7, 3, -1, 0, 0}};
      run("fc example", p, e, pass ? 0 : 6);
      cfg.x_inc = 2;
      e = '{'{4, 0, -1, 0, 0}, '{6, 2, -1, 0, 0}, '{8, 4, -1, 0, 0}, '{10, 6, -1, 0, 0}};
      run("fc x_inc 2", p, e);
      cfg.x_inc = 1;
      p = '0; p.eot = 1;
      e = '{'{-1, 0, 0, 1, 0}, '{-1, 1, 1, 1, 0}, '{-1, 2, 2, 1, 0}, '{-1, 3, 3, 1, 0}, '{-1, 4, 4, 1, 1}};
      run("eot sweep", p, e, pass ? 0 : 7);
    end

    // fence: a packet waits while the core is not drained
    stall_mode = 0;
    @(negedge clk);
    drained = 0; in_valid = 1; in_pkt = p;
    repeat (5) begin
      @(posedge clk); check(!in_ready && !busy, "packet taken while not drained");
    end
    @(negedge clk); drained = 1;
    @(posedge clk); check(in_ready, "packet not taken after drain");
    @(negedge clk); in_valid = 0;
    while (busy) @(negedge clk);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
