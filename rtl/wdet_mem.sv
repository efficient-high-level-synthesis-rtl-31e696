// wdet_mem: block RAM holding the detection matrices W_det of one subframe.
//
// Neighbouring groups of K subcarriers share one channel matrix, so one
// subframe needs N_SUB/K matrices of K x M entries. A memory word holds a
// whole row of one matrix (M entries of the 48-bit cw_t), the "wider word"
// organisation that lets the detector fetch a full row per clock; word
// address = group * K + row, N_SUB words in all.
//
// Interface: one write port (we, waddr, wdata) driven by the channel
// estimation & pre-processing block, one read port (re, raddr, rdata) used by
// the detection block; both may be used in the same clock. Read data appear
// one clock after re (registered output, as in a block RAM) and hold until
// the next read. A read of the address being written returns the old word.
// The memory's place and content follow the source; the word organisation is
// one of the memory layouts the source discusses, the port timing is this
// design's choice.
module wdet_mem
  import mimo_pkg::*;
#(
  parameter int unsigned M     = M_ANT,
  parameter int unsigned DEPTH = N_SUB,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            we,
  input  logic [AW-1:0]   waddr,
  input  cw_t  [M-1:0]    wdata,
  input  logic            re,
  input  logic [AW-1:0]   raddr,
  output cw_t  [M-1:0]    rdata
);

  cw_t [M-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
