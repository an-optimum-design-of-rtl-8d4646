// tb_fftmul_controller: runs the controller alone for m = 8 (16-point
// transforms) with the arithmetic modules replaced by fixed-latency echoes.
// Checks, for every pass, the order of main-memory read addresses and
// twiddle indices, the write-back addresses and which write ports are used,
// the cache entry handshake (operands read from the entry written the cycle
// before), the one-digit-per-T_RC issue rate of the rounding pass, the
// done pulse and the total cycle count. The expected address lists are built
// here from the textbook loop nest (group, offset) rather than from the
// controller's counter arithmetic.
module tb_fftmul_controller;
  import fftmul_pkg::*;

  localparam int LOG2M = 3;
  localparam int K = LOG2M + 1, AW = K + 1, M = 1 << LOG2M, N = 2 * M;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done, mm_re, mm_we0, mm_we1, c_wr0_en, c_wr1_en, op_valid, rc_clear;
  phase_e phase;
  logic [3:0] stage;
  logic [AW-1:0] mm_raddr0, mm_raddr1, mm_waddr0, mm_waddr1;
  logic [2:0] c_wr0_idx, c_rd0_idx, c_wr1_idx, c_rd1_idx;
  logic [LOG2M-1:0] lut_raddr;
  logic res_valid;
  logic [K-1:0] res_idx;

  int checks = 0, failures = 0, cyc = 0;
  typedef struct { int ph; int x; int y; int tw; bit two; } item_t;
  item_t rd_q [$], wr_q [$];
  int    tw_q [$];
  logic  vpipe [64];
  phase_e vph  [64];
  logic [2:0] last_wr0;
  int    last_issue = -100, n_round_issue = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  fftmul_controller #(.LOG2M(LOG2M)) dut (.*);

  function automatic int rev(input int v, input int nb);
    int r = 0;
    for (int i = 0; i < nb; i++) if (v & (1 << i)) r |= 1 << (nb - 1 - i);
    return r;
  endfunction

  function automatic int lat(input phase_e p);
    case (p)
      PH_CMUL:  return T_CMUL;
      PH_SCALE: return T_SCL;
      PH_ROUND: return T_RC;
      default:  return T_BFLY;
    endcase
  endfunction

  // fixed-latency echo of the active arithmetic module
  always @(posedge clk) begin
    for (int i = 63; i > 0; i--) begin
      vpipe[i] <= vpipe[i-1];
      vph[i]   <= vph[i-1];
    end
    vpipe[0] <= op_valid && rst_n;
    vph[0]   <= phase;
  end
  assign res_valid = vpipe[lat(phase) - 1] && vph[lat(phase) - 1] == phase;

  always @(posedge clk) if (rst_n) begin
    item_t e;
    if (mm_re) begin
      e = rd_q.pop_front();
      checks++;
      if (int'(mm_raddr0) != e.x || (e.ph != int'(PH_SCALE) && e.ph != int'(PH_ROUND) && int'(mm_raddr1) != e.y)) begin
        failures++;
        if (failures < 10) $display("FAIL read: phase %0d got %0d/%0d expected %0d/%0d", phase, mm_raddr0, mm_raddr1, e.x, e.y);
      end
      tw_q.push_back(e.tw);
      if (phase == PH_ROUND) begin
        checks++;
        if (n_round_issue > 0 && cyc - last_issue != T_RC) begin
          failures++;
          $display("FAIL: rounding issue spacing %0d", cyc - last_issue);
        end
        last_issue = cyc;
        n_round_issue++;
      end
    end
    if (c_wr0_en) begin
      int t;
      t = tw_q.pop_front();
      if (phase == PH_FFT_U || phase == PH_FFT_V || phase == PH_IFFT) begin
        checks++;
        if (int'(lut_raddr) != t) begin
          failures++;
          if (failures < 10) $display("FAIL twiddle: got %0d expected %0d", lut_raddr, t);
        end
      end
      last_wr0 <= c_wr0_idx;
    end
    if (op_valid) begin
      checks++;
      if (c_rd0_idx != last_wr0) begin failures++; $display("FAIL: cache operand entry"); end
    end
    if (mm_we0) begin
      e = wr_q.pop_front();
      checks++;
      if (int'(mm_waddr0) != e.x || mm_we1 != e.two || (e.two && int'(mm_waddr1) != e.y)) begin
        failures++;
        if (failures < 10) $display("FAIL write: phase %0d got %0d/%0d/%0d expected %0d/%0d/%0d",
                                    phase, mm_waddr0, mm_waddr1, mm_we1, e.x, e.y, e.two);
      end
    end
  end

  task automatic build_lists();
    item_t it;
    for (int f = 0; f < 3; f++) begin
      for (int s = 0; s < K; s++) begin
        int h;
        h = (f == 2) ? (1 << s) : (1 << (K - 1 - s));
        for (int g = 0; g < N / (2 * h); g++)
          for (int o = 0; o < h; o++) begin
            it.ph = (f == 0) ? int'(PH_FFT_U) : (f == 1) ? int'(PH_FFT_V) : int'(PH_IFFT);
            it.x  = g * 2 * h + o + ((f == 1) ? N : 0);
            it.y  = it.x + h;
            it.tw = rev(g, K - 1);
            it.two = 1;
            rd_q.push_back(it);
            wr_q.push_back(it);
          end
      end
      if (f == 1)
        for (int i = 0; i < N; i++) begin
          it = '{int'(PH_CMUL), i, N + i, 0, 0};
          rd_q.push_back(it); wr_q.push_back(it);
        end
    end
    for (int i = 0; i < N; i++) begin
      it = '{int'(PH_SCALE), i, i, 0, 0};
      rd_q.push_back(it); wr_q.push_back(it);
    end
    for (int i = 0; i < N; i++) rd_q.push_back('{int'(PH_ROUND), i, i, 0, 0});
  endtask

  initial begin
    int t0, expect_cyc, ndone;
    for (int i = 0; i < 64; i++) begin vpipe[i] = 1'b0; vph[i] = PH_IDLE; end
    build_lists();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    expect_cyc = 1 + 3 * K * (M + T_BFLY + 3) + (N + T_CMUL + 3) + (N + T_SCL + 3) + (N * T_RC + 3);
    checks++;
    if (cyc - t0 != expect_cyc) begin
      failures++;
      $display("FAIL: %0d cycles, expected %0d", cyc - t0, expect_cyc);
    end
    ndone = 0;
    repeat (5) begin @(negedge clk); if (done) ndone++; end
    checks++;
    if (rd_q.size() != 0 || wr_q.size() != 0 || ndone != 0 || busy || n_round_issue != N) begin
      failures++;
      $display("FAIL: %0d reads / %0d writes left, %0d extra done, busy %b, %0d digits",
               rd_q.size(), wr_q.size(), ndone, busy, n_round_issue);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
