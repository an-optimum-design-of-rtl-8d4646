// fftmul_controller: sequences one FFT multiplication.
//
// A multiplication of two m-digit numbers (m = 2^LOG2M) runs as a series of
// passes over main memory. Each pass streams its items through one
// arithmetic module: fetch from main memory, stage in the cache, compute,
// stage the result in the cache, write back. The passes, in order:
//   PH_FFT_U  K = LOG2M+1 butterfly stages on region U (first operand)
//   PH_FFT_V  K butterfly stages on region V (second operand)
//   PH_CMUL   2m pointwise products U[i] = U[i] * V[i]
//   PH_IFFT   K inverse-butterfly stages on region U
//   PH_SCALE  2m divisions by 2m, U[i] = U[i] / 2m
//   PH_ROUND  2m digits through the rounder-carrier, least significant first
// A pass ends when its last result is written; the next starts on the next
// cycle, because each FFT stage reads what the previous one wrote.
//
// Addressing. The forward transform is a decimation-in-time FFT that takes
// its input in natural order and leaves its output in bit-reversed order.
// Stage s (0..K-1) pairs x = g*2h + o with y = x + h, h = 2^(K-1-s),
// g = j >> (K-1-s), o = j mod h, for butterfly j = 0..m-1, and uses twiddle
// W^bitrev(g) (bit reversal over K-1 bits). The inverse transform is a
// decimation-in-frequency FFT taking bit-reversed input to natural output:
// stage s pairs x = g*2h + o with y = x + h, h = 2^s, g = j >> s, and uses
// conj(W^bitrev(g)). The pointwise product works in bit-reversed order on
// both operands, so no reordering pass is needed and the digits come out in
// natural order. The published design names a Cooley-Tukey FFT with these
// two butterfly types; the in-order/bit-reversed arrangement, the address
// map (U at 0, V at 2m) and all timing below are this design's choices.
//
// Timing of one item issued in cycle c: main-memory read addresses in c,
// read data written to a cache operand entry in c+1 (twiddle address to the
// look-up table in c+1), operands and twiddle at the module in c+2 (op_valid),
// result back in c+2+L (res_valid) and written to a cache result entry,
// written to main memory in c+3+L. One item is issued per cycle except in
// PH_ROUND, where the carry loop allows one every T_RC cycles. A pass of n
// items with latency L takes n+L+3 cycles (n*T_RC+3 for PH_ROUND).
module fftmul_controller
  import fftmul_pkg::*;
#(
  parameter int unsigned LOG2M = 13,
  localparam int unsigned K    = LOG2M + 1,     // FFT stages, log2(2m)
  localparam int unsigned AW   = K + 1          // main-memory word address
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  output logic             done,        // one-cycle pulse at the end
  output phase_e           phase,
  output logic [3:0]       stage,
  // main memory, read side (data arrives the next cycle)
  output logic             mm_re,
  output logic [AW-1:0]    mm_raddr0,
  output logic [AW-1:0]    mm_raddr1,
  // main memory, write side
  output logic             mm_we0,
  output logic [AW-1:0]    mm_waddr0,
  output logic             mm_we1,
  output logic [AW-1:0]    mm_waddr1,
  // cache
  output logic             c_wr0_en,
  output logic [2:0]       c_wr0_idx,
  output logic [2:0]       c_rd0_idx,
  output logic             c_wr1_en,
  output logic [2:0]       c_wr1_idx,
  output logic [2:0]       c_rd1_idx,
  output logic [LOG2M-1:0] lut_raddr,
  // arithmetic modules
  output logic             op_valid,    // operands at the active module
  input  logic             res_valid,   // result from the active module
  output logic [K-1:0]     res_idx,     // index of that result in its pass
  output logic             rc_clear     // clear the rounder-carrier's carry
);
  localparam int unsigned N = 1 << K;   // transform length 2m
  localparam int unsigned M = 1 << LOG2M;

  typedef struct packed {
    logic [AW-1:0]    x;
    logic [AW-1:0]    y;
    logic [LOG2M-1:0] tw;
  } addr_t;

  // Addresses of item j of the current pass.
  function automatic addr_t item_addr(input phase_e ph, input logic [3:0] s,
                                      input logic [K-1:0] j);
    addr_t            a;
    logic [K-1:0]     h, g, o;
    logic [AW-1:0]    base;
    int unsigned      sh;
    a    = '0;
    base = (ph == PH_FFT_V) ? AW'(N) : '0;
    h    = '0;
    g    = '0;
    o    = '0;
    sh   = 0;
    case (ph)
      PH_FFT_U, PH_FFT_V: begin
        sh = K - 1 - int'(s);
        h  = K'(1) << sh;
        g  = j >> sh;
        o  = j & (h - 1'b1);
        a.x  = base + AW'(K'(g << (sh + 1)) | o);
        a.y  = a.x + AW'(h);
        a.tw = LOG2M'(bitrev(32'(g), LOG2M));
      end
      PH_IFFT: begin
        sh = int'(s);
        h  = K'(1) << sh;
        g  = j >> sh;
        o  = j & (h - 1'b1);
        a.x  = AW'(K'(g << (sh + 1)) | o);
        a.y  = a.x + AW'(h);
        a.tw = LOG2M'(bitrev(32'(g), LOG2M));
      end
      PH_CMUL: begin
        a.x = AW'(j);
        a.y = AW'(N) + AW'(j);
      end
      default: begin    // PH_SCALE, PH_ROUND
        a.x = AW'(j);
        a.y = AW'(j);
      end
    endcase
    return a;
  endfunction

  logic [K-1:0]  ji, jw;        // issue and result counters
  logic [K:0]    n_items;
  logic          issuing;
  logic [3:0]    gap;           // spacing counter for PH_ROUND
  logic          issue;
  addr_t         ia, wa;
  logic          pass_end;

  // pipeline on the read side
  logic             p1_v, p2_v;
  logic [1:0]       p1_idx, p2_idx;
  logic [LOG2M-1:0] p1_tw;
  // pipeline on the write side
  logic             q1_v, q1_last;
  logic [1:0]       q1_idx;
  logic [AW-1:0]    q1_x, q1_y;

  always_comb begin
    case (phase)
      PH_FFT_U, PH_FFT_V, PH_IFFT: n_items = (K+1)'(M);
      default:                     n_items = (K+1)'(N);
    endcase
  end

  assign issue = issuing && (phase != PH_ROUND || gap == 0);
  assign ia    = item_addr(phase, stage, ji);
  assign wa    = item_addr(phase, stage, jw);

  assign mm_re     = issue;
  assign mm_raddr0 = ia.x;
  assign mm_raddr1 = ia.y;

  assign c_wr0_en  = p1_v;
  assign c_wr0_idx = {1'b0, p1_idx};
  assign lut_raddr = p1_tw;
  assign c_rd0_idx = {1'b0, p2_idx};
  assign op_valid  = p2_v;

  assign c_wr1_en  = res_valid && phase != PH_ROUND;
  assign c_wr1_idx = {1'b1, jw[1:0]};
  assign res_idx   = jw;
  assign c_rd1_idx = {1'b1, q1_idx};
  assign mm_we0    = q1_v;
  assign mm_waddr0 = q1_x;
  assign mm_we1    = q1_v && (phase == PH_FFT_U || phase == PH_FFT_V || phase == PH_IFFT);
  assign mm_waddr1 = q1_y;

  assign pass_end = (phase == PH_ROUND) ? (res_valid && (K+1)'(jw) == n_items - 1'b1)
                                        : (q1_v && q1_last);
  assign busy     = (phase != PH_IDLE);
  assign rc_clear = start && phase == PH_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase   <= PH_IDLE;
      stage   <= '0;
      ji      <= '0;
      jw      <= '0;
      issuing <= 1'b0;
      gap     <= '0;
      done    <= 1'b0;
      p1_v    <= 1'b0;
      p2_v    <= 1'b0;
      p1_idx  <= '0;
      p2_idx  <= '0;
      p1_tw   <= '0;
      q1_v    <= 1'b0;
      q1_last <= 1'b0;
      q1_idx  <= '0;
      q1_x    <= '0;
      q1_y    <= '0;
    end else begin
      done <= 1'b0;

      // read side
      p1_v   <= issue;
      p1_idx <= ji[1:0];
      p1_tw  <= ia.tw;
      p2_v   <= p1_v;
      p2_idx <= p1_idx;
      if (issue) begin
        ji <= ji + 1'b1;
        if ((K+1)'(ji) == n_items - 1'b1) issuing <= 1'b0;
      end
      if (phase == PH_ROUND && issuing)
        gap <= (gap == 0) ? 4'(T_RC - 1) : gap - 1'b1;

      // write side
      q1_v <= res_valid && phase != PH_ROUND;
      if (res_valid) begin
        q1_idx  <= jw[1:0];
        q1_x    <= wa.x;
        q1_y    <= wa.y;
        q1_last <= ((K+1)'(jw) == n_items - 1'b1);
        jw      <= jw + 1'b1;
      end

      // pass sequencing
      if (phase == PH_IDLE) begin
        if (start) begin
          phase   <= PH_FFT_U;
          stage   <= '0;
          ji      <= '0;
          jw      <= '0;
          gap     <= '0;
          issuing <= 1'b1;
        end
      end else if (pass_end) begin
        ji      <= '0;
        jw      <= '0;
        gap     <= '0;
        issuing <= 1'b1;
        q1_v    <= 1'b0;
        case (phase)
          PH_FFT_U, PH_FFT_V, PH_IFFT:
            if (stage == 4'(K - 1)) begin
              stage <= '0;
              phase <= phase_e'(phase + 1'b1);
            end else begin
              stage <= stage + 1'b1;
            end
          PH_ROUND: begin
            phase   <= PH_IDLE;
            issuing <= 1'b0;
            done    <= 1'b1;
          end
          default: phase <= phase_e'(phase + 1'b1);
        endcase
      end
    end
  end

  initial assert (K <= 15) else $error("fftmul_controller: LOG2M too large for the stage counter");
endmodule
