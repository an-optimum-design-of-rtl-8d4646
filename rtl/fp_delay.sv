// fp_delay: the "buf" of the datapath figures, a fixed-length register chain
// that keeps operands in step with results from deeper pipelines.
//
// A word entering on d appears on q exactly DEPTH clock cycles later. There
// is no enable and no reset: every stage shifts on every clock, as the whole
// datapath does. DEPTH must be at least 1. The buffers' role (synchronising
// operands) follows the design description; building them as plain shift
// registers is this implementation's choice.
module fp_delay #(
  parameter int unsigned W     = 35,
  parameter int unsigned DEPTH = 17
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] pipe [DEPTH];

  always_ff @(posedge clk) begin
    pipe[0] <= d;
    for (int i = 1; i < DEPTH; i++) pipe[i] <= pipe[i-1];
  end

  assign q = pipe[DEPTH-1];

  initial assert (DEPTH >= 1) else $error("fp_delay: DEPTH must be >= 1");
endmodule
