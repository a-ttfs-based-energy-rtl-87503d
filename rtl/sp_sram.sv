// sp_sram: single-port synchronous SRAM, one access per cycle.
//
// Each PE holds four of these: the accumulated-weight (ACC) SRAM, the neuron
// SRAM, the weight SRAM and the spike address SRAM. The source design uses
// single-port SRAM macros to save power, so only one read or one write can be
// done per cycle; the memory interface arbitrates. This is the synthesizable
// array form of such a macro: with en and we high, wdata is written to addr at
// the clock edge; with en high and we low, the word at addr appears on rdata
// one cycle later and holds until the next read. Contents are not reset; the
// host programs every word that is read.
module sp_sram #(
  parameter int unsigned WORDS = 256,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
