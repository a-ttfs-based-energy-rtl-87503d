// ttfs_pkg: types and constants shared by every block of the TTFS spiking CNN
// accelerator.
//
// A packet is the unit that travels between processing elements (PEs). Every
// packet carries a destination PE number, a programming flag and the one-bit
// spike/EoT prefix (0 = input spike, 1 = end-of-timestep). Input spikes carry
// their access pattern in the data field: the CNN format
// {Ch, Y_jump, X_jump, S_neuron, S_weight} or, for fully connected layers, the
// start address of the weights the spike touches. Programming packets use the
// target/address/data fields to fill configuration registers and SRAMs.
//
// The packet prefix bit, the CNN field list, the 8-bit weights, 256 neurons and
// 9216 weights per PE follow the source design. Field widths, the programming
// packet layout, the neuron word layout (spiked flag above a 31-bit potential)
// and the register map are this implementation's choices.
package ttfs_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned N_NEURONS = 256;   // neurons per PE (ACC and neuron SRAM words)
  localparam int unsigned N_WEIGHTS = 9216;  // weights per PE (9 kB of 8-bit weights)
  localparam int unsigned NA_W      = $clog2(N_NEURONS);
  localparam int unsigned WA_W      = $clog2(N_WEIGHTS);
  localparam int unsigned DEST_W    = 8;     // PE number in a packet
  localparam int unsigned PADDR_W   = 14;    // address field of a programming packet
  localparam int unsigned DATA_W    = 48;    // data field of a packet
  localparam int unsigned WEIGHT_W  = 8;     // weights are 8-bit signed
  localparam int unsigned ACC_W     = 32;    // accumulated weight (slope) word
  localparam int unsigned POT_W     = 31;    // neuron potential, below the spiked flag
  localparam int unsigned NP_W      = POT_W + 1;
  localparam int unsigned SPK_W     = DEST_W + 40; // spike address entry: {dest, spike data}
  localparam int unsigned GN_W      = 12;    // neuron address inside a whole layer
  localparam int unsigned CH_W      = 9;
  localparam int unsigned JUMP_W    = 3;
  localparam int unsigned SW_W      = 8;     // S_weight: offset inside one filter

  // ---------------------------------------------------------------- packet
  typedef enum logic [2:0] {
    TGT_REG    = 3'd0,   // configuration register (address = register number)
    TGT_WEIGHT = 3'd1,   // weight SRAM word
    TGT_ACC    = 3'd2,   // accumulated-weight SRAM word (biases go here)
    TGT_NEURON = 3'd3,   // neuron SRAM word (initial potential)
    TGT_SPIKE  = 3'd4,   // spike address SRAM entry
    TGT_CLEAR  = 3'd5    // clear the max-pooling mask and the timestep counter
  } prog_tgt_e;

  typedef struct packed {
    logic [DEST_W-1:0]  dest;
    logic               prog;   // 1: programming packet
    logic               eot;    // prefix bit: 0 input spike, 1 end of timestep
    prog_tgt_e          tgt;
    logic [PADDR_W-1:0] addr;
    logic [DATA_W-1:0]  data;
  } packet_t;

  localparam int unsigned PKT_W = $bits(packet_t);

  // CNN-format input spike, in the low bits of packet_t.data
  typedef struct packed {
    logic [CH_W-1:0]   ch;
    logic [JUMP_W-1:0] y_jump;
    logic [JUMP_W-1:0] x_jump;
    logic [GN_W-1:0]   s_neuron;
    logic [SW_W-1:0]   s_weight;
  } cnn_spike_t;

  localparam int unsigned CNN_SPIKE_W = $bits(cnn_spike_t);

  // ---------------------------------------------------------------- config
  typedef enum logic [1:0] {
    L_CONV      = 2'd0,  // convolution, integrate-and-fire
    L_CONV_POOL = 2'd1,  // convolution followed by max-pooling
    L_FC        = 2'd2,  // fully connected, integrate-and-fire
    L_FC_SOFTMAX= 2'd3   // fully connected output layer: the maximum neuron spikes
  } layer_e;

  // register numbers of programming packets with tgt = TGT_REG
  localparam logic [PADDR_W-1:0] REG_LAYER     = 'd0;
  localparam logic [PADDR_W-1:0] REG_WID_OUT   = 'd1;
  localparam logic [PADDR_W-1:0] REG_WID_W     = 'd2;
  localparam logic [PADDR_W-1:0] REG_THRESHOLD = 'd3;
  localparam logic [PADDR_W-1:0] REG_MAX_TS    = 'd4;
  localparam logic [PADDR_W-1:0] REG_N_BASE    = 'd5;
  localparam logic [PADDR_W-1:0] REG_N_COUNT   = 'd6;
  localparam logic [PADDR_W-1:0] REG_X_JUMP    = 'd7;
  localparam logic [PADDR_W-1:0] REG_X_INC     = 'd8;
  localparam logic [PADDR_W-1:0] REG_FWD       = 'd9;   // data = {en, dest}
  localparam logic [PADDR_W-1:0] REG_EOT       = 'd10;  // data = {last_in_layer, dest}
  localparam logic [PADDR_W-1:0] REG_POOL      = 'd11;

  typedef struct packed {
    layer_e               layer;
    logic [GN_W-1:0]      wid_output;   // width of the whole output feature map
    logic [3:0]           wid_weight;   // filter width K
    logic signed [POT_W-1:0] threshold;
    logic [7:0]           max_ts;       // max_time_steps
    logic [GN_W-1:0]      n_base;       // layer address of this PE's first neuron
    logic [8:0]           n_count;      // neurons held by this PE (1..256)
    logic [8:0]           x_jump;       // FC: accesses per spike minus one
    logic [7:0]           x_inc;        // FC: address increment per access
    logic                 fwd_en;
    logic [DEST_W-1:0]    fwd_dest;
    logic                 last_in_layer;
    logic [DEST_W-1:0]    eot_dest;
    logic [2:0]           pool;         // max-pooling window size P
  } cfg_t;

  // ---------------------------------------------------------------- core
  typedef enum logic [0:0] {
    OP_ACC = 1'b0,   // accumulate a weight into an accumulated weight
    OP_EOT = 1'b1    // add an accumulated weight into a neuron potential
  } op_e;

  typedef struct packed {
    op_e  op;
    logic last;      // last element of an EoT sweep
  } l2c_t;

  typedef struct packed {
    op_e              op;
    logic             last;
    logic [ACC_W-1:0] value;   // OP_ACC: new accumulated weight; OP_EOT: {spiked, potential}
  } c2s_t;

  // entry of the spiked-neuron-address FIFO
  typedef struct packed {
    logic       eot_mark;      // end of an EoT sweep: emit EoT if last PE in layer
    logic [NA_W-1:0] n;        // local neuron address that spiked
  } spk_t;

  typedef struct packed {
    logic [NA_W-1:0]  addr;
    logic [ACC_W-1:0] data;
  } wr_req_t;

  // ---------------------------------------------------------------- arithmetic
  function automatic logic [ACC_W-1:0] sat_add_acc(input logic [ACC_W-1:0] a,
                                                   input logic [WEIGHT_W-1:0] w);
    logic signed [ACC_W:0] s;
    s = $signed({a[ACC_W-1], a}) + $signed({{(ACC_W+1-WEIGHT_W){w[WEIGHT_W-1]}}, w});
    if (s > $signed({2'b00, {(ACC_W-1){1'b1}}}))      return {1'b0, {(ACC_W-1){1'b1}}};
    else if (s < $signed({2'b11, {(ACC_W-1){1'b0}}})) return {1'b1, {(ACC_W-1){1'b0}}};
    else                                              return s[ACC_W-1:0];
  endfunction

  function automatic logic [POT_W-1:0] sat_add_pot(input logic [POT_W-1:0] p,
                                                   input logic [ACC_W-1:0] a);
    logic signed [ACC_W+1:0] s;
    s = $signed({{(ACC_W+2-POT_W){p[POT_W-1]}}, p}) + $signed({{2{a[ACC_W-1]}}, a});
    if (s > $signed({{(ACC_W+3-POT_W){1'b0}}, {(POT_W-1){1'b1}}}))      return {1'b0, {(POT_W-1){1'b1}}};
    else if (s < $signed({{(ACC_W+3-POT_W){1'b1}}, {(POT_W-1){1'b0}}})) return {1'b1, {(POT_W-1){1'b0}}};
    else                                                                return s[POT_W-1:0];
  endfunction

endpackage
