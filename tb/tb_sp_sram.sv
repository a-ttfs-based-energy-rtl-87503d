// tb_sp_sram: writes random words to random addresses of a 256 x 32 SRAM and
// reads them back (one-cycle read latency, output held between reads),
// against an array model.
module tb_sp_sram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en, we;
  logic [7:0] addr;
  logic [31:0] wdata, rdata;
  logic [31:0] model [256];
  bit written [256];
  int checks = 0, failures = 0;
  sp_sram #(.WORDS(256), .WIDTH(32)) dut (.*);

  initial begin
    logic [31:0] expv;
    en = 0; we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); en = 1; we = 1; addr = 8'(i); wdata = $urandom; model[i] = wdata; written[i] = 1;
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en = 1; we = $urandom_range(0, 1); addr = 8'($urandom); wdata = $urandom;
      expv = model[addr];
      if (we) model[addr] = wdata;
      @(negedge clk);
      if (!we) begin
        checks++;
        if (rdata != expv) begin failures++; $display("FAIL: addr %0d got %h exp %h", addr, rdata, expv); end
        en = 0;                       // output holds without a read
        @(negedge clk);
        checks++;
        if (rdata != expv) begin failures++; $display("FAIL: hold"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
