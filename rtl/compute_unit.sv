// compute_unit: the compute module of the core, a saturating adder between
// FIFOs.
//
// For each work item from the load module it waits for the memory data that
// the load module requested, adds, and passes the result on to the store
// module together with the operation type:
//   * OP_ACC (CNN or MLP spike): accumulated weight + sign-extended 8-bit weight,
//     saturated to 32 bits;
//   * OP_EOT: neuron potential + accumulated weight, saturated to the 31-bit
//     potential; the neuron word's spiked flag is passed through unchanged.
// Saturating adders, the two operations and the FIFO coupling follow the
// source design. Its idle/active state pair reduces here to "a work item and
// its data are present": the unit works on one element per cycle and holds
// nothing, which is this design's own simplification. All handshakes are
// valid/ready; an element is consumed in the cycle it is pushed to c2s.
module compute_unit
  import ttfs_pkg::*;
(
  input  logic                l2c_valid,
  input  l2c_t                l2c,
  output logic                l2c_ready,
  input  logic                w_rsp_valid,
  input  logic [WEIGHT_W-1:0] w_rsp,
  output logic                w_rsp_ready,
  input  logic                acc_rsp_valid,
  input  logic [ACC_W-1:0]    acc_rsp,
  output logic                acc_rsp_ready,
  input  logic                np_rsp_valid,
  input  logic [NP_W-1:0]     np_rsp,
  output logic                np_rsp_ready,
  output logic                c2s_valid,
  output c2s_t                c2s,
  input  logic                c2s_ready
);
  logic data_ok, go;

  always_comb begin
    data_ok = acc_rsp_valid && ((l2c.op == OP_ACC) ? w_rsp_valid : np_rsp_valid);
    go      = l2c_valid && data_ok && c2s_ready;

    c2s_valid     = l2c_valid && data_ok;
    l2c_ready     = go;
    acc_rsp_ready = go;
    w_rsp_ready   = go && (l2c.op == OP_ACC);
    np_rsp_ready  = go && (l2c.op == OP_EOT);

    c2s.op   = l2c.op;
    c2s.last = l2c.last;
    if (l2c.op == OP_ACC) c2s.value = sat_add_acc(acc_rsp, w_rsp);
    else                  c2s.value = {np_rsp[NP_W-1], sat_add_pot(np_rsp[POT_W-1:0], acc_rsp)};
  end
endmodule
