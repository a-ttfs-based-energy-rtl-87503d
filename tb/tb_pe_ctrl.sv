// tb_pe_ctrl: checks the reset values and that each register number updates
// exactly its own configuration field.
module tb_pe_ctrl;
  import ttfs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en;
  logic [PADDR_W-1:0] wr_addr;
  logic [DATA_W-1:0] wr_data;
  cfg_t cfg;
  int checks = 0, failures = 0;
  pe_ctrl dut (.*);

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic wr(input logic [PADDR_W-1:0] a, input logic [DATA_W-1:0] d);
    @(negedge clk); wr_en = 1; wr_addr = a; wr_data = d;
    @(negedge clk); wr_en = 0;
  endtask

  initial begin
    wr_en = 0; wr_addr = 0; wr_data = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    check(cfg.layer == L_FC && cfg.fwd_en == 0 && cfg.last_in_layer == 0 && cfg.max_ts == 8, "reset values");
    wr(REG_LAYER, 48'd1);          check(cfg.layer == L_CONV_POOL, "layer");
    wr(REG_WID_OUT, 48'd28);       check(cfg.wid_output == 28, "wid_output");
    wr(REG_WID_W, 48'd3);          check(cfg.wid_weight == 3, "wid_weight");
    wr(REG_THRESHOLD, 48'h7fff_fff0 & 48'h7fff_ffff); check(cfg.threshold == 31'h7fff_fff0, "threshold");
    wr(REG_THRESHOLD, 48'(-5));    check(cfg.threshold == -31'sd5, "negative threshold");
    wr(REG_MAX_TS, 48'd8);         check(cfg.max_ts == 8, "max_ts");
    wr(REG_N_BASE, 48'd196);       check(cfg.n_base == 196, "n_base");
    wr(REG_N_COUNT, 48'd256);      check(cfg.n_count == 256, "n_count");
    wr(REG_X_JUMP, 48'd10);        check(cfg.x_jump == 10, "x_jump");
    wr(REG_X_INC, 48'd2);          check(cfg.x_inc == 2, "x_inc");
    wr(REG_FWD, 48'h105);          check(cfg.fwd_en && cfg.fwd_dest == 5, "fwd");
    wr(REG_EOT, 48'h1ff);          check(cfg.last_in_layer && cfg.eot_dest == 8'hff, "eot");
    wr(REG_POOL, 48'd2);           check(cfg.pool == 2, "pool");
    // earlier fields untouched
    check(cfg.layer == L_CONV_POOL && cfg.wid_output == 28 && cfg.n_base == 196 && cfg.x_jump == 10, "fields kept");
    wr(14'd100, 48'hffff_ffff_ffff);
    check(cfg.wid_output == 28 && cfg.threshold == -31'sd5, "unknown register ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
