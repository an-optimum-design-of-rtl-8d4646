// fftmul_memory: the on-chip memory module, a small operand/result cache plus
// the twiddle-factor look-up table.
//
// The long operands and all intermediate transforms live in off-chip main
// memory; this module only stages the data of the operations in flight. It
// holds ENTRIES (8) entries, each big enough for the data of one butterfly
// (two complex words). It has two write ports and two read ports so that
// fetching and writing back never compete in the pipeline:
//   write port 0 : operands arriving from main memory
//   read port 0  : operands leaving for the arithmetic module
//   write port 1 : results arriving from the arithmetic module
//   read port 1  : results leaving for main memory
// Writes take effect at the clock edge; reads are combinational (a register
// file), so an entry written in one cycle can be read in the next. The
// controller uses entries 0..3 as a ring for operands and 4..7 as a ring for
// results; which entries serve which purpose is this design's choice, the
// entry count and the two read and two write ports follow the design
// description.
//
// The look-up table holds the M = 2^LOG2M twiddle factors W^e =
// exp(-2*pi*i*e/2m), e = 0..M-1, written in advance through lut_we (they
// are computed off line; there is no arithmetic here to generate them). Its
// read is synchronous: lut_rdata is valid the cycle after lut_raddr.
module fftmul_memory
  import fftmul_pkg::*;
#(
  parameter int unsigned ENTRIES = 8,
  parameter int unsigned LOG2M   = 13,
  localparam int unsigned IW     = $clog2(ENTRIES)
) (
  input  logic             clk,
  // cache
  input  logic             wr0_en,
  input  logic [IW-1:0]    wr0_idx,
  input  pair_t            wr0_data,
  input  logic [IW-1:0]    rd0_idx,
  output pair_t            rd0_data,
  input  logic             wr1_en,
  input  logic [IW-1:0]    wr1_idx,
  input  pair_t            wr1_data,
  input  logic [IW-1:0]    rd1_idx,
  output pair_t            rd1_data,
  // twiddle look-up table
  input  logic             lut_we,
  input  logic [LOG2M-1:0] lut_waddr,
  input  cplx_t            lut_wdata,
  input  logic [LOG2M-1:0] lut_raddr,
  output cplx_t            lut_rdata
);
  pair_t cache [ENTRIES];
  cplx_t lut   [2**LOG2M];

  always_ff @(posedge clk) begin
    if (wr0_en) cache[wr0_idx] <= wr0_data;
    if (wr1_en) cache[wr1_idx] <= wr1_data;
  end

  assign rd0_data = cache[rd0_idx];
  assign rd1_data = cache[rd1_idx];

  always_ff @(posedge clk) begin
    if (lut_we) lut[lut_waddr] <= lut_wdata;
    lut_rdata <= lut[lut_raddr];
  end

  a_no_write_clash: assert property (@(posedge clk)
    !(wr0_en && wr1_en && wr0_idx == wr1_idx))
    else $error("fftmul_memory: both write ports address entry %0d", wr0_idx);
endmodule
