// tb_ttfs_accel: end-to-end test of the accelerator on a small CNN
// (convolution + max-pooling split over three PEs, a second convolution, a
// fully connected layer and a softmax output layer), checked spike by spike
// against a software model. See net_bench for the details.
module tb_ttfs_accel;
  net_bench #(.NET(0)) u_bench ();
endmodule
