// tb_compute_unit: random operands, including values at the saturation
// limits, for both operations; results are compared with a wide-integer model.
module tb_compute_unit;
  import ttfs_pkg::*;
  logic l2c_valid, l2c_ready, w_rsp_valid, w_rsp_ready, acc_rsp_valid, acc_rsp_ready;
  logic np_rsp_valid, np_rsp_ready, c2s_valid, c2s_ready;
  l2c_t l2c;
  c2s_t c2s;
  logic [WEIGHT_W-1:0] w_rsp;
  logic [ACC_W-1:0] acc_rsp;
  logic [NP_W-1:0] np_rsp;
  int checks = 0, failures = 0, sat_hi = 0, sat_lo = 0;
  compute_unit dut (.*);

  function automatic longint clip(longint v, int bits, ref int hi, ref int lo);
    longint mx = (longint'(1) << (bits-1)) - 1;
    if (v > mx) begin hi++; return mx; end
    if (v < -mx-1) begin lo++; return -mx-1; end
    return v;
  endfunction

  initial begin
    longint a, w, p, r;
    for (int i = 0; i < 4000; i++) begin
      l2c.op = op_e'($urandom_range(0, 1)); l2c.last = $urandom_range(0, 1);
      w_rsp = 8'($urandom);
      case ($urandom_range(0, 3))
        0: acc_rsp = 32'h7fff_ff80 + 32'($urandom_range(0, 127));
        1: acc_rsp = 32'h8000_0000 + 32'($urandom_range(0, 127));
        default: acc_rsp = $urandom;
      endcase
      np_rsp = $urandom;
      l2c_valid = 1; acc_rsp_valid = 1;
      w_rsp_valid = $urandom_range(0, 3) != 0; np_rsp_valid = $urandom_range(0, 3) != 0;
      c2s_ready = $urandom_range(0, 3) != 0;
      #1;
      checks++;
      if (c2s_valid != ((l2c.op == OP_ACC) ? w_rsp_valid : np_rsp_valid)) begin failures++; $display("FAIL: valid"); end
      if (c2s_valid) begin
        a = longint'($signed(acc_rsp));
        if (l2c.op == OP_ACC) begin
          w = longint'($signed(w_rsp));
          r = clip(a + w, 32, sat_hi, sat_lo);
          checks++;
          if (longint'($signed(c2s.value)) != r) begin failures++; $display("FAIL: acc %0d + %0d = %0d", a, w, $signed(c2s.value)); end
        end else begin
          p = longint'($signed(np_rsp[30:0]));
          r = clip(p + a, 31, sat_hi, sat_lo);
          checks++;
          if (longint'($signed(c2s.value[30:0])) != r || c2s.value[31] != np_rsp[31]) begin
            failures++; $display("FAIL: pot %0d + %0d = %0d", p, a, $signed(c2s.value[30:0]));
          end
        end
        checks++;
        if (c2s.op != l2c.op || c2s.last != l2c.last) begin failures++; $display("FAIL: tag"); end
        checks++;
        if (l2c_ready != c2s_ready || acc_rsp_ready != c2s_ready ||
            w_rsp_ready != (c2s_ready && l2c.op == OP_ACC) || np_rsp_ready != (c2s_ready && l2c.op == OP_EOT)) begin
          failures++; $display("FAIL: pops");
        end
      end
      #1;
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0) begin failures++; $display("FAIL: saturation not exercised"); end
    $display("saturated high %0d, low %0d", sat_hi, sat_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
