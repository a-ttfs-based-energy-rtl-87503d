// tb_accel_cnn28: end-to-end run of a small convolutional network on the
// full-size accelerator: a 28x28 image, a 3x3 convolution with two output
// channels and 2x2 max pooling, each channel split over four PEs by rows,
// followed by a 392->10 softmax layer on one PE. Spikes of every layer are
// compared timestep by timestep with the software model in net_bench, which
// also prints the result line. A last-resort guard here ends the run should
// the bench's own watchdog not have done so.
module tb_accel_cnn28;
  net_bench #(.NET(2)) u_bench ();

  initial begin
    repeat (3500000) @(posedge u_bench.clk);
    $display("FAIL: run did not end");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
