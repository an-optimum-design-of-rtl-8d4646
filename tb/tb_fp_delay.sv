// tb_fp_delay: checks that the buffer returns every word exactly DEPTH
// cycles after it entered, for the 17-cycle depth used in the butterflies.
module tb_fp_delay;
  localparam int W = 35, DEPTH = 17, NW = 500;
  logic clk = 1'b0;
  logic [W-1:0] d, q;
  logic [W-1:0] hist [NW];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fp_delay #(.W(W), .DEPTH(DEPTH)) dut (.clk, .d, .q);

  initial begin
    for (int i = 0; i < NW; i++) begin
      @(negedge clk);
      if (i >= DEPTH) begin
        checks++;
        if (q !== hist[i - DEPTH]) begin
          failures++;
          if (failures < 10) $display("FAIL word %0d: got %h expected %h", i - DEPTH, q, hist[i - DEPTH]);
        end
      end
      hist[i] = {$urandom(), 3'($urandom())};
      d = hist[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NW + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
