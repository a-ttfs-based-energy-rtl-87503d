// load_unit: the load module of the core. It turns each incoming packet into a
// stream of memory read requests and the matching work items for the compute
// and store modules.
//
// States follow the source design: IDLE waits for a packet in the incoming
// spike FIFO, CONFIG decodes it into the address registers, PROCESS emits one
// element per cycle, then the unit returns to IDLE and reads the next packet.
//   * CNN input spike {Ch, Y_jump, X_jump, S_neuron, S_weight}: for
//     y = 0..Y_jump and x = 0..X_jump it reads weight w_addr and accumulated
//     weight acc_addr; along x acc_addr falls by one and w_addr rises by one,
//     and each new row starts wid_output lower in acc_addr and wid_weight
//     higher in w_addr than the row before. This reproduces the worked example
//     of the source (START_Acc 7 with weight 0, then 6 with weight 1, then 1
//     with weight 3 and 0 with weight 4 on a 6x6 map with a 3x3 filter).
//     The weight base is Ch * K * K + S_weight, so a PE holds one filter slice
//     per input channel (this offset is this design's reading of Ch).
//   * MLP input spike (data = weight start address): for k = 0..x_jump it reads
//     weight W_START + k*x_inc and accumulated weight k*x_inc.
//   * EoT: for every neuron i of the PE it reads accumulated weight i and
//     neuron word i; the last element is flagged for the store module.
// S_neuron is an address in the whole output feature map; this PE holds the
// neurons n_base .. n_base+n_count-1 of it (whole rows) and skips the rest.
// That split and the wait for the core to drain before a new packet starts
// (so that a read never overtakes a pending write of the same word) are this
// design's own choices.
module load_unit
  import ttfs_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  cfg_t             cfg,
  // incoming spike FIFO head
  input  logic             in_valid,
  input  packet_t          in_pkt,
  output logic             in_ready,
  input  logic             drained,    // no element of an earlier packet in flight
  // read requests
  output logic             w_rd_valid,
  output logic [WA_W-1:0]  w_rd_addr,
  input  logic             w_rd_ready,
  output logic             acc_rd_valid,
  output logic [NA_W-1:0]  acc_rd_addr,
  input  logic             acc_rd_ready,
  output logic             np_rd_valid,
  output logic [NA_W-1:0]  np_rd_addr,
  input  logic             np_rd_ready,
  // work items
  output logic             l2c_valid,
  output l2c_t             l2c,
  input  logic             l2c_ready,
  output logic             l2s_valid,
  output logic [NA_W-1:0]  l2s_addr,
  input  logic             l2s_ready,
  output logic             busy
);
  typedef enum logic [1:0] {S_IDLE, S_CONFIG, S_PROCESS} state_e;
  typedef enum logic [1:0] {K_CNN, K_MLP, K_EOT} kind_e;

  state_e            state;
  kind_e             kind;
  packet_t           pkt;
  logic [GN_W:0]     acc_addr, row_acc;    // layer neuron address, one extra bit
  logic [WA_W-1:0]   w_addr, row_w;
  logic [8:0]        x, y, x_end, y_end;   // x doubles as k (MLP) and i (EoT)
  cnn_spike_t        cs;

  assign cs = cnn_spike_t'(pkt.data[CNN_SPIKE_W-1:0]);

  // element of the current cycle
  logic            in_band;
  logic [GN_W:0]   local_n;
  logic            need_w, need_np, all_ready, emit, advance, last_elem;

  always_comb begin
    local_n  = acc_addr - {1'b0, cfg.n_base};
    in_band  = (acc_addr >= {1'b0, cfg.n_base}) &&
               (acc_addr <  {1'b0, cfg.n_base} + (GN_W+1)'(cfg.n_count));
    need_w   = (kind != K_EOT);
    need_np  = (kind == K_EOT);
    all_ready = acc_rd_ready && l2c_ready && l2s_ready &&
                (!need_w || w_rd_ready) && (!need_np || np_rd_ready);
    emit     = (state == S_PROCESS) && (kind != K_CNN || in_band);
    advance  = (state == S_PROCESS) && (!emit || all_ready);
    last_elem = (x == x_end) && (y == y_end);
  end

  assign w_rd_valid   = emit && need_w  && all_ready;
  assign np_rd_valid  = emit && need_np && all_ready;
  assign acc_rd_valid = emit && all_ready;
  assign l2c_valid    = emit && all_ready;
  assign l2s_valid    = emit && all_ready;
  assign w_rd_addr    = w_addr;
  assign acc_rd_addr  = (kind == K_CNN) ? local_n[NA_W-1:0] : acc_addr[NA_W-1:0];
  assign np_rd_addr   = acc_addr[NA_W-1:0];
  assign l2s_addr     = acc_rd_addr;
  assign l2c.op       = (kind == K_EOT) ? OP_EOT : OP_ACC;
  assign l2c.last     = (kind == K_EOT) && last_elem;

  assign in_ready = (state == S_IDLE) && drained;
  assign busy     = (state != S_IDLE);

  logic [WA_W-1:0] kk;
  assign kk = WA_W'(cfg.wid_weight) * WA_W'(cfg.wid_weight);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      kind     <= K_EOT;
      pkt      <= '0;
      acc_addr <= '0;
      row_acc  <= '0;
      w_addr   <= '0;
      row_w    <= '0;
      x        <= '0;
      y        <= '0;
      x_end    <= '0;
      y_end    <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (in_valid && in_ready) begin
          pkt   <= in_pkt;
          state <= S_CONFIG;
        end
        S_CONFIG: begin
          x <= '0;
          y <= '0;
          if (pkt.eot) begin
            kind     <= K_EOT;
            acc_addr <= '0;
            x_end    <= cfg.n_count - 9'd1;
            y_end    <= '0;
          end else if (cfg.layer == L_FC || cfg.layer == L_FC_SOFTMAX) begin
            kind     <= K_MLP;
            acc_addr <= '0;
            w_addr   <= pkt.data[WA_W-1:0];
            x_end    <= cfg.x_jump;
            y_end    <= '0;
          end else begin
            kind     <= K_CNN;
            acc_addr <= {1'b0, cs.s_neuron};
            row_acc  <= {1'b0, cs.s_neuron};
            w_addr   <= WA_W'(cs.ch) * kk + WA_W'(cs.s_weight);
            row_w    <= WA_W'(cs.ch) * kk + WA_W'(cs.s_weight);
            x_end    <= 9'(cs.x_jump);
            y_end    <= 9'(cs.y_jump);
          end
          state <= S_PROCESS;
        end
        S_PROCESS: if (advance) begin
          if (last_elem) begin
            state <= S_IDLE;
          end else if (kind == K_CNN) begin
            if (x == x_end) begin
              x        <= '0;
              y        <= y + 9'd1;
              acc_addr <= row_acc - (GN_W+1)'(cfg.wid_output);
              row_acc  <= row_acc - (GN_W+1)'(cfg.wid_output);
              w_addr   <= row_w + WA_W'(cfg.wid_weight);
              row_w    <= row_w + WA_W'(cfg.wid_weight);
            end else begin
              x        <= x + 9'd1;
              acc_addr <= acc_addr - (GN_W+1)'(1);
              w_addr   <= w_addr + WA_W'(1);
            end
          end else if (kind == K_MLP) begin
            x        <= x + 9'd1;
            acc_addr <= acc_addr + (GN_W+1)'(cfg.x_inc);
            w_addr   <= w_addr + WA_W'(cfg.x_inc);
          end else begin
            x        <= x + 9'd1;
            acc_addr <= acc_addr + (GN_W+1)'(1);
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
