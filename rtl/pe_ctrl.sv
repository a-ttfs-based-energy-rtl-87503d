// pe_ctrl: the PE's control unit, the configuration registers that
// programming spikes set before a network runs.
//
// The source design programs, per PE, the filter width and the output feature
// map width, the firing threshold, max_time_steps, the layer type, the
// destination for output and the forwarding destination, plus x_jump and x_inc
// for fully connected layers. This block holds them as one cfg_t struct. A
// write (wr_en, wr_addr = register number from ttfs_pkg, wr_data) updates the
// register at the next clock edge. Two registers of this design's own are
// added: the layer address range of the neurons the PE holds (n_base,
// n_count), so a feature map can be split over several PEs, and the pooling
// window size. After reset the PE is an unconfigured fully connected layer
// that forwards nothing.
module pe_ctrl
  import ttfs_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                wr_en,
  input  logic [PADDR_W-1:0]  wr_addr,
  input  logic [DATA_W-1:0]   wr_data,
  output cfg_t                cfg
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg            <= '0;
      cfg.layer      <= L_FC;
      cfg.wid_output <= GN_W'(1);
      cfg.wid_weight <= 4'd1;
      cfg.threshold  <= POT_W'(1);
      cfg.max_ts     <= 8'd8;
      cfg.n_count    <= 9'd1;
      cfg.x_inc      <= 8'd1;
      cfg.pool       <= 3'd2;
    end else if (wr_en) begin
      unique case (wr_addr)
        REG_LAYER:     cfg.layer         <= layer_e'(wr_data[1:0]);
        REG_WID_OUT:   cfg.wid_output    <= wr_data[GN_W-1:0];
        REG_WID_W:     cfg.wid_weight    <= wr_data[3:0];
        REG_THRESHOLD: cfg.threshold     <= wr_data[POT_W-1:0];
        REG_MAX_TS:    cfg.max_ts        <= wr_data[7:0];
        REG_N_BASE:    cfg.n_base        <= wr_data[GN_W-1:0];
        REG_N_COUNT:   cfg.n_count       <= wr_data[8:0];
        REG_X_JUMP:    cfg.x_jump        <= wr_data[8:0];
        REG_X_INC:     cfg.x_inc         <= wr_data[7:0];
        REG_FWD:       {cfg.fwd_en, cfg.fwd_dest}       <= wr_data[DEST_W:0];
        REG_EOT:       {cfg.last_in_layer, cfg.eot_dest} <= wr_data[DEST_W:0];
        REG_POOL:      cfg.pool          <= wr_data[2:0];
        default: ;
      endcase
    end
  end
endmodule
