// tb_fft_multiplier: end-to-end test of the FFT multiplier.
//
// Loads the twiddle table (computed here with $cos/$sin), places the digits
// of two random or patterned m-digit hexadecimal numbers in the main-memory
// model, runs the multiplier and compares the 2m output digits with a
// schoolbook product computed here in integers. Also checks the cycle count
// of a multiplication against the pass-by-pass formula of the controller and
// that every mechanism (both forward transforms, the pointwise product, the
// inverse transform, scaling, rounding, carry propagation, both main-memory
// write ports, cache ring wrap-around) was exercised.
module tb_fft_multiplier;
  import fftmul_pkg::*;
  import fftmul_tb_pkg::*;

  localparam int unsigned LOG2M = 5;
  localparam int unsigned NRUNS = 4;
  localparam int unsigned K  = LOG2M + 1;
  localparam int unsigned AW = K + 1;
  localparam int unsigned M  = 1 << LOG2M;
  localparam int unsigned N  = 2 * M;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done;
  logic lut_we = 1'b0;
  logic [LOG2M-1:0] lut_waddr = '0;
  cplx_t lut_wdata = '0;
  logic mm_re, mm_we0, mm_we1;
  logic [AW-1:0] mm_raddr0, mm_raddr1, mm_waddr0, mm_waddr1;
  cplx_t mm_rdata0, mm_rdata1, mm_wdata0, mm_wdata1;
  logic digit_valid;
  logic [K-1:0] digit_idx;
  logic [3:0] digit;
  fp_t carry_out;

  int checks = 0, failures = 0;
  int unsigned a_dig [M], b_dig [M];
  int unsigned got [N];
  longint      ref_dig [N];
  int          n_digits;
  longint      cyc = 0;

  // mechanism counters
  int unsigned cnt_fft_u = 0, cnt_fft_v = 0, cnt_cmul = 0, cnt_ifft = 0;
  int unsigned cnt_scale = 0, cnt_round = 0, cnt_carry = 0, cnt_we1 = 0, cnt_wrap = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  fft_multiplier #(.LOG2M(LOG2M)) dut (.*);

  main_memory_model #(.AW(AW)) u_mm (
    .clk, .re(mm_re), .raddr0(mm_raddr0), .raddr1(mm_raddr1),
    .rdata0(mm_rdata0), .rdata1(mm_rdata1),
    .we0(mm_we0), .waddr0(mm_waddr0), .wdata0(mm_wdata0),
    .we1(mm_we1), .waddr1(mm_waddr1), .wdata1(mm_wdata1));

  always @(posedge clk) begin
    if (dut.res_valid) begin
      case (dut.phase)
        PH_FFT_U: cnt_fft_u++;
        PH_FFT_V: cnt_fft_v++;
        PH_CMUL:  cnt_cmul++;
        PH_IFFT:  cnt_ifft++;
        PH_SCALE: cnt_scale++;
        PH_ROUND: cnt_round++;
        default: ;
      endcase
    end
    if (mm_we1) cnt_we1++;
    if (dut.c_wr0_en && dut.c_wr0_idx == 3'd3) cnt_wrap++;
    if (dut.u_rc.out_valid && dut.u_rc.carry_new.exp != 0) cnt_carry++;
    if (digit_valid) begin
      got[digit_idx] = digit;
      n_digits++;
    end
  end

  task automatic load_lut();
    real ang;
    for (int e = 0; e < M; e++) begin
      ang = 2.0 * 3.14159265358979323846 * real'(e) / real'(N);
      @(negedge clk);
      lut_we    = 1'b1;
      lut_waddr = LOG2M'(e);
      lut_wdata.re = to_fp($cos(ang));
      lut_wdata.im = to_fp(-$sin(ang));
    end
    @(negedge clk);
    lut_we = 1'b0;
  endtask

  task automatic run_one(input int kind);
    longint acc, t0, t1, expect_cyc;
    // operands: 0 random, 1 all digits F (largest error), 2 random b, a = 1
    for (int i = 0; i < M; i++) begin
      case (kind)
        1:       begin a_dig[i] = 15; b_dig[i] = 15; end
        2:       begin a_dig[i] = (i == 0) ? 1 : 0; b_dig[i] = $urandom_range(0, 15); end
        default: begin a_dig[i] = $urandom_range(0, 15); b_dig[i] = $urandom_range(0, 15); end
      endcase
    end
    for (int i = 0; i < N; i++) begin
      u_mm.mem[i]     = '{re: (i < M) ? to_fp(real'(a_dig[i])) : FP_ZERO, im: FP_ZERO};
      u_mm.mem[N + i] = '{re: (i < M) ? to_fp(real'(b_dig[i])) : FP_ZERO, im: FP_ZERO};
    end
    // integer reference
    for (int k2 = 0; k2 < N; k2++) begin
      acc = 0;
      for (int i = 0; i < M; i++)
        if (k2 - i >= 0 && k2 - i < M) acc += longint'(a_dig[i]) * longint'(b_dig[k2 - i]);
      ref_dig[k2] = acc;
    end
    acc = 0;
    for (int k2 = 0; k2 < N; k2++) begin
      acc = acc + ref_dig[k2];
      ref_dig[k2] = acc % 16;
      acc = acc / 16;
    end
    n_digits = 0;
    @(negedge clk);
    start = 1'b1;
    t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    t1 = cyc;
    expect_cyc = 1 + 3 * K * (M + T_BFLY + 3) + (N + T_CMUL + 3) + (N + T_SCL + 3)
               + (N * T_RC + 3);
    checks++;
    if (t1 - t0 != expect_cyc) begin
      failures++;
      $display("FAIL kind %0d: %0d cycles, expected %0d", kind, t1 - t0, expect_cyc);
    end
    checks++;
    if (n_digits != N) begin
      failures++;
      $display("FAIL kind %0d: %0d digits out, expected %0d", kind, n_digits, N);
    end
    for (int k2 = 0; k2 < N; k2++) begin
      checks++;
      if (longint'(got[k2]) != ref_dig[k2]) begin
        failures++;
        if (failures < 10)
          $display("FAIL kind %0d digit %0d: got %h expected %h", kind, k2, got[k2], ref_dig[k2]);
      end
    end
    checks++;
    if (carry_out != FP_ZERO) begin
      failures++;
      $display("FAIL kind %0d: carry out of the top digit", kind);
    end
    $display("run kind %0d: %0d cycles", kind, t1 - t0);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_lut();
    for (int r = 0; r < NRUNS; r++) run_one(r % 3);
    // every mechanism must have happened
    checks++; if (cnt_fft_u == 0) begin failures++; $display("FAIL: no forward butterflies on U"); end
    checks++; if (cnt_fft_v == 0) begin failures++; $display("FAIL: no forward butterflies on V"); end
    checks++; if (cnt_cmul  == 0) begin failures++; $display("FAIL: no pointwise products"); end
    checks++; if (cnt_ifft  == 0) begin failures++; $display("FAIL: no inverse butterflies"); end
    checks++; if (cnt_scale == 0) begin failures++; $display("FAIL: no scaling"); end
    checks++; if (cnt_round == 0) begin failures++; $display("FAIL: no rounding"); end
    checks++; if (cnt_carry == 0) begin failures++; $display("FAIL: no carry propagated"); end
    checks++; if (cnt_we1   == 0) begin failures++; $display("FAIL: second write port unused"); end
    checks++; if (cnt_wrap  == 0) begin failures++; $display("FAIL: cache ring never wrapped"); end
    $display("mechanisms: fftU=%0d fftV=%0d cmul=%0d ifft=%0d scale=%0d round=%0d carries=%0d we1=%0d wraps=%0d",
             cnt_fft_u, cnt_fft_v, cnt_cmul, cnt_ifft, cnt_scale, cnt_round, cnt_carry, cnt_we1, cnt_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NRUNS * (3 * K * (M + 40) + N * 20 + 500) + 2 * M + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
