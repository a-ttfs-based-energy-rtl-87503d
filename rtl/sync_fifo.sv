// sync_fifo: synchronous first-in first-out buffer with valid/ready ports.
//
// The PE decouples all of its modules with FIFOs: the input and output spike
// FIFOs of the router interface, and inside the core the read-request,
// read-response, write-request, load-to-compute, load-to-store,
// compute-to-store and spiked-neuron-address FIFOs. This one module serves them
// all. It is a circular buffer of DEPTH entries of type T; a push is accepted
// when in_ready is high, the head is visible at out_data whenever out_valid is
// high, and out_ready pops it. Push and pop may happen in the same cycle, even
// when the buffer is full. The data written in cycle n is visible at the output
// in cycle n+1 (no fall-through). The depth is this implementation's choice;
// the source design does not give FIFO depths.
module sync_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                 mem [DEPTH];
  logic [AW-1:0]    rd_ptr, wr_ptr;
  logic [$clog2(DEPTH+1)-1:0] cnt;

  wire push = in_valid && in_ready;
  wire pop  = out_valid && out_ready;

  assign count     = cnt;
  assign out_valid = (cnt != '0);
  assign in_ready  = (cnt != DEPTH[$clog2(DEPTH+1)-1:0]) || out_ready;
  assign out_data  = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      cnt    <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({push, pop})
        2'b10:   cnt <= cnt + 1'b1;
        2'b01:   cnt <= cnt - 1'b1;
        default: cnt <= cnt;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  // a pop of an empty FIFO or a push into a full one can never be accepted
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  push |-> (cnt != DEPTH[$clog2(DEPTH+1)-1:0]) || pop);
endmodule
