// ttfs_accel: the accelerator, an array of NUM_PE processing elements for
// time-to-first-spike (TTFS) spiking neural networks.
//
// In the source design the PEs sit on a 2-D mesh network-on-chip whose routers
// come from an external NoC generator; a network is mapped so that each PE
// holds one slice of one layer, every PE of a layer sees every input spike of
// that layer, and each fired neuron sends one packet to the next layer. The
// routers are not part of this RTL: every PE's packet ports are brought out
// as arrays, indexed by PE number, for a network to connect. A packet leaving
// PE i at out_pkt[i] must be delivered to the input of PE out_pkt[i].dest.
// NUM_PE = 42 is the PE count of the document's MNIST MLP result.
module ttfs_accel
  import ttfs_pkg::*;
#(
  parameter int unsigned NUM_PE     = 42,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NUM_PE-1:0]   in_valid,
  input  packet_t             in_pkt    [NUM_PE],
  output logic [NUM_PE-1:0]   in_ready,
  output logic [NUM_PE-1:0]   out_valid,
  output packet_t             out_pkt   [NUM_PE],
  input  logic [NUM_PE-1:0]   out_ready,
  output logic [NUM_PE-1:0]   idle,
  output logic [NUM_PE-1:0]   done,
  output logic [7:0]          ts_count  [NUM_PE],
  output logic [15:0]         n_fired   [NUM_PE],
  output logic [15:0]         n_pooled  [NUM_PE],
  output logic [15:0]         n_forwarded [NUM_PE]
);
  for (genvar i = 0; i < NUM_PE; i++) begin : g_pe
    ttfs_pe #(.FIFO_DEPTH(FIFO_DEPTH)) u_pe (
      .clk, .rst_n,
      .in_valid(in_valid[i]), .in_pkt(in_pkt[i]), .in_ready(in_ready[i]),
      .out_valid(out_valid[i]), .out_pkt(out_pkt[i]), .out_ready(out_ready[i]),
      .idle(idle[i]), .ts_count(ts_count[i]), .done(done[i]),
      .n_fired(n_fired[i]), .n_pooled(n_pooled[i]), .n_forwarded(n_forwarded[i]));
  end
endmodule
