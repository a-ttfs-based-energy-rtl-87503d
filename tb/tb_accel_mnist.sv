// tb_accel_mnist: the MNIST multilayer perceptron 784-300-300-10 run on the
// accelerator at its default size (42 PEs, 39 of them used), eight timesteps
// of one inference, checked spike by spike against a software model. See
// net_bench for the details.
module tb_accel_mnist;
  net_bench #(.NET(1)) u_bench ();
endmodule
