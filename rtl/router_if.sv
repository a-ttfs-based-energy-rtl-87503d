// router_if: the router interface, the PE's gateway to the network-on-chip.
//
// It takes packets from the PE's input spike FIFO and
//   (1) delivers input spikes and EoT signals to the core's incoming spike FIFO,
//   (2) at the same time forwards a copy of each input spike to the next PE of
//       the same layer (fwd_dest) when forwarding is enabled, so all PEs of a
//       layer see every input, and
//   (3) sends the packets the memory interface builds from the spike address
//       SRAM (spikes of fired neurons and the layer's EoT) into the output
//       spike FIFO.
// Operations (1) and (2) happen in the same cycle, as in the source design;
// a packet waits until both the core FIFO and the output FIFO can take it.
// EoT signals are not forwarded here: the memory interface passes the EoT on
// to fwd_dest once this PE has finished its own sweep and sent its spikes, so
// the layer's EoT can never overtake a spike of an earlier PE of the layer
// (this design's choice; see mem_if).
// Programming packets (this design's format) are consumed here: register
// writes go to the control unit, SRAM writes to the memory interface, and
// TGT_CLEAR pulses clear. In the output FIFO forwarded copies go before
// generated spikes (this design's choice).
module router_if
  import ttfs_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  cfg_t               cfg,
  input  logic               in_valid,
  input  packet_t            in_pkt,
  output logic               in_ready,
  output logic               core_valid,
  output packet_t            core_pkt,
  input  logic               core_ready,
  input  logic               gen_valid,
  input  packet_t            gen_pkt,
  output logic               gen_ready,
  output logic               out_valid,
  output packet_t            out_pkt,
  input  logic               out_ready,
  output logic               reg_wr_en,
  output logic [PADDR_W-1:0] reg_wr_addr,
  output logic [DATA_W-1:0]  reg_wr_data,
  output logic               clear,
  output logic               prog_valid,
  output prog_tgt_e          prog_tgt,
  output logic [PADDR_W-1:0] prog_addr,
  output logic [DATA_W-1:0]  prog_data,
  input  logic               prog_ready,
  output logic [15:0]        n_forwarded
);
  logic is_prog, is_reg, is_clr, is_mem, fwd, data_go;

  always_comb begin
    is_prog = in_valid && in_pkt.prog;
    is_reg  = is_prog && in_pkt.tgt == TGT_REG;
    is_clr  = is_prog && in_pkt.tgt == TGT_CLEAR;
    is_mem  = is_prog && !is_reg && !is_clr;
    fwd     = cfg.fwd_en && !in_pkt.eot;   // EoT moves on only after this PE's sweep
    data_go = in_valid && !in_pkt.prog && core_ready && (!fwd || out_ready);

    reg_wr_en   = is_reg;
    reg_wr_addr = in_pkt.addr;
    reg_wr_data = in_pkt.data;
    clear       = is_clr;
    prog_valid  = is_mem;
    prog_tgt    = in_pkt.tgt;
    prog_addr   = in_pkt.addr;
    prog_data   = in_pkt.data;

    core_valid  = data_go;
    core_pkt    = in_pkt;

    in_ready    = is_reg || is_clr || (is_mem && prog_ready) || data_go;

    if (data_go && fwd) begin
      out_valid     = 1'b1;
      out_pkt       = in_pkt;
      out_pkt.dest  = cfg.fwd_dest;
      gen_ready     = 1'b0;
    end else begin
      out_valid     = gen_valid;
      out_pkt       = gen_pkt;
      gen_ready     = out_ready;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                n_forwarded <= '0;
    else if (data_go && fwd)   n_forwarded <= n_forwarded + 16'd1;
  end
endmodule
