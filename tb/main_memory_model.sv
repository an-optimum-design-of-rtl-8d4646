// main_memory_model: behavioural model of the external main memory.
//
// One complex word per address, two write ports and two read ports. Reads
// are synchronous: data for the addresses presented with re appears on the
// next cycle. Writes take effect at the clock edge. The array is public so a
// testbench can load operands and inspect results directly. Not
// synthesizable intent: it stands for an off-chip memory device.
module main_memory_model
  import fftmul_pkg::*;
#(
  parameter int unsigned AW = 15
) (
  input  logic          clk,
  input  logic          re,
  input  logic [AW-1:0] raddr0,
  input  logic [AW-1:0] raddr1,
  output cplx_t         rdata0,
  output cplx_t         rdata1,
  input  logic          we0,
  input  logic [AW-1:0] waddr0,
  input  cplx_t         wdata0,
  input  logic          we1,
  input  logic [AW-1:0] waddr1,
  input  cplx_t         wdata1
);
  cplx_t mem [2**AW];

  always_ff @(posedge clk) begin
    if (re) begin
      rdata0 <= mem[raddr0];
      rdata1 <= mem[raddr1];
    end
    if (we0) mem[waddr0] <= wdata0;
    if (we1) mem[waddr1] <= wdata1;
  end
endmodule
