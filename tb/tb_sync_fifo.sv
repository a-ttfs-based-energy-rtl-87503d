// tb_sync_fifo: random pushes and pops against a queue model; checks order,
// the full and empty flags, the count and a push and pop in the same cycle
// when full.
module tb_sync_fifo;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [7:0] in_data, out_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0, full_pushpop = 0;
  logic [7:0] model [$];

  sync_fifo #(.T(logic [7:0]), .DEPTH(DEPTH)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check(count == model.size(), $sformatf("count %0d model %0d", count, model.size()));
      check(out_valid == (model.size() != 0), "out_valid");
      if (model.size() != 0) check(out_data == model[0], $sformatf("data %0d vs %0d", out_data, model[0]));
      in_valid  = ($urandom_range(0, 3) != 0) && (i < 1900);
      out_ready = ($urandom_range(0, 2) == 0) || (i > 1900);
      in_data   = 8'($urandom);
      #1;
      check(in_ready == (model.size() < DEPTH || out_ready), "in_ready");
      @(posedge clk);
      if (in_valid && in_ready && out_valid && out_ready && model.size() == DEPTH) full_pushpop++;
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
    end
    check(full_pushpop > 0, "push and pop on a full FIFO never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
