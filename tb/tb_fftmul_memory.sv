// tb_fftmul_memory: checks the 8-entry cache (both write ports in the same
// cycle on different entries, both read ports independent, data readable
// the cycle after it is written) and the twiddle look-up table (written in
// advance, synchronous read one cycle after the address), against a
// reference model kept in the testbench.
module tb_fftmul_memory;
  import fftmul_pkg::*;

  localparam int LOG2M = 6, NOPS = 3000;

  logic             clk = 1'b0;
  logic             wr0_en = 0, wr1_en = 0, lut_we = 0;
  logic [2:0]       wr0_idx = 0, wr1_idx = 0, rd0_idx = 0, rd1_idx = 0;
  pair_t            wr0_data = '0, wr1_data = '0, rd0_data, rd1_data;
  logic [LOG2M-1:0] lut_waddr = 0, lut_raddr = 0;
  cplx_t            lut_wdata = '0, lut_rdata;
  int               checks = 0, failures = 0;
  pair_t            model [8];
  cplx_t            lmodel [2**LOG2M];

  always #5 clk = ~clk;

  fftmul_memory #(.ENTRIES(8), .LOG2M(LOG2M)) dut (.*);

  function automatic pair_t rnd_pair();
    pair_t p;
    p = {$urandom(), $urandom(), $urandom(), $urandom(), $urandom()};
    return p;
  endfunction

  initial begin
    cplx_t lexp;
    // fill the table
    for (int i = 0; i < 2**LOG2M; i++) begin
      @(negedge clk);
      lut_we = 1; lut_waddr = LOG2M'(i);
      lut_wdata = {$urandom(), $urandom(), 6'($urandom())};
      lmodel[i] = lut_wdata;
    end
    // fill the cache
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      lut_we = 0;
      wr0_en = 1; wr0_idx = 3'(i); wr0_data = rnd_pair(); model[i] = wr0_data;
    end
    @(negedge clk);
    wr0_en = 0;
    for (int i = 0; i < NOPS; i++) begin
      // check reads of the state before this cycle's writes
      rd0_idx = 3'($urandom()); rd1_idx = 3'($urandom());
      lut_raddr = LOG2M'($urandom());
      lexp = lmodel[lut_raddr];
      #1;
      checks++;
      if (rd0_data !== model[rd0_idx] || rd1_data !== model[rd1_idx]) begin
        failures++;
        if (failures < 10) $display("FAIL: cache read mismatch at entries %0d/%0d", rd0_idx, rd1_idx);
      end
      wr0_en = 1'($urandom()); wr0_idx = 3'($urandom()); wr0_data = rnd_pair();
      wr1_en = 1'($urandom()); wr1_idx = 3'($urandom()); wr1_data = rnd_pair();
      if (wr1_idx == wr0_idx) wr1_idx = wr0_idx + 3'd4;
      @(posedge clk);
      if (wr0_en) model[wr0_idx] = wr0_data;
      if (wr1_en) model[wr1_idx] = wr1_data;
      @(negedge clk);
      checks++;
      if (lut_rdata !== lexp) begin
        failures++;
        if (failures < 10) $display("FAIL: table read mismatch");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NOPS + 2**LOG2M + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
