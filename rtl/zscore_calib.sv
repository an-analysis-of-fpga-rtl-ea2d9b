// zscore_calib: standardises a group of N ring-oscillator counts and rescales
// them to a fixed reference mean and spread.
//
// For the group v[0..N-1] it computes the mean u and the sample standard
// deviation s (divisor N-1), the z-score z_i = (v_i - u) / s, and returns
// roc_i = z_i * SIGMA_REF + MU_REF. This removes what the group members have
// in common (chip-to-chip and design offsets, and, for groups of identically
// placed rings, the LUT path-length bias) and keeps their differences.
// With N=8, SIGMA_REF=46.3, MU_REF=0 it is the calibration applied to the
// eight identically placed rings of the eight macros before bit generation;
// with N=32, SIGMA_REF=20.9 it is the per-shift-register normalisation used to
// expose path-length bias.
//
// Arithmetic, all integer: sum = sum(v); d_i = N*v_i - sum (exact);
// S = sum(d_i^2); then z_i*SIGMA_REF = d_i * SIGMA_REF*sqrt(N-1) / sqrt(S).
// sqrt(S) is taken with SQ_FRAC fraction bits by a bit-serial integer square
// root, and each quotient by a bit-serial restoring divider, rounded to
// nearest. Outputs are signed fixed point with FRAC fraction bits, saturated
// to OUT_W bits. A group of equal values (S=0) gives MU_REF for all.
// Because the z-score does not change when all v_i are scaled, v may be sums
// of several samples instead of means.
//
// Interface: start (one cycle) with vals valid; vals are captured at start.
// busy is high until done pulses; roc then holds the result until the next
// start. Latency: N (sum) + N (squares) + 1 + SQ_W/2 (root)
// + N*(NUM_W+2) (divisions) + 2 cycles from start to done, with SQ_W and
// NUM_W as below (N=8, IN_W=20: 474 cycles; a group without spread skips
// the divisions).
// The formula is the reference one; the fixed-point format, the bit-serial
// arithmetic and the handshake are this design's own.
`timescale 1ps/1ps
module zscore_calib #(
  parameter int unsigned N         = 8,
  parameter int unsigned IN_W      = 20,
  parameter int unsigned OUT_W     = 16,
  parameter int unsigned FRAC      = 4,
  parameter real         SIGMA_REF = 46.3,
  parameter real         MU_REF    = 0.0
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           start,
  input  logic        [IN_W-1:0]         vals [N],
  output logic                           busy,
  output logic                           done,
  output logic signed [OUT_W-1:0]        roc  [N]
);
  localparam int unsigned LOGN   = $clog2(N);
  localparam int unsigned IDX_W  = (LOGN < 1) ? 1 : LOGN;
  localparam int unsigned SUM_W  = IN_W + LOGN + 1;
  localparam int unsigned D_W    = IN_W + LOGN + 2;          // signed
  localparam int unsigned S_W    = 2 * D_W + LOGN;           // sum of squares
  localparam int unsigned SQ_FRAC = 12;
  localparam int unsigned SQ_W   = S_W + 2 * SQ_FRAC + ((S_W % 2 == 1) ? 1 : 0);
  localparam int unsigned R_W    = SQ_W / 2;                 // root, SQ_FRAC frac bits
  localparam real         K_REAL = SIGMA_REF * $sqrt(real'(N - 1))
                                   * real'(64'd1 << (FRAC + SQ_FRAC));
  localparam longint      K_INT  = longint'(K_REAL);       // rounds to nearest
  localparam int unsigned K_W    = $clog2(K_INT + 1) + 1;
  localparam int unsigned NUM_W  = D_W + K_W + 1;            // |d|*K + r/2
  localparam longint      MU_INT = longint'(MU_REF * real'(1 << FRAC));
  localparam longint      OUT_MAX = (64'sd1 <<< (OUT_W - 1)) - 1;
  localparam longint      OUT_MIN = -(64'sd1 <<< (OUT_W - 1));

  typedef enum logic [2:0] {Z_IDLE, Z_SUM, Z_SQ, Z_RLD, Z_ROOT, Z_DIVLD, Z_DIV, Z_DONE} zstate_t;

  zstate_t                 state;
  logic [IN_W-1:0]         v [N];
  logic [IDX_W-1:0]        idx;
  logic [SUM_W-1:0]        sum;
  logic [S_W-1:0]          ssq;
  // square root
  logic [SQ_W-1:0]         sq_x;
  logic [SQ_W-1:0]         sq_bit;
  logic [SQ_W-1:0]         sq_res;
  logic [R_W-1:0]          root;
  // divider
  logic [NUM_W-1:0]        num;
  logic [R_W-1:0]          rem;      // remainder, always below root
  logic [$clog2(NUM_W+1)-1:0] div_cnt;
  logic                    neg;

  logic signed [D_W-1:0]   d_cur;
  logic [D_W-1:0]          d_abs;
  logic [2*D_W-1:0]        d_sq;
  logic [R_W:0]            trial;

  assign trial = {rem, num[NUM_W-1]};

  assign d_cur = signed'(D_W'(v[idx]) << LOGN) - signed'(D_W'(sum));
  assign d_abs = d_cur[D_W-1] ? D_W'(-d_cur) : D_W'(d_cur);
  assign d_sq  = d_abs * d_abs;

  assign busy = (state != Z_IDLE);

  // Quotient (in num after NUM_W steps) to output: sign, offset, saturation.
  function automatic logic signed [OUT_W-1:0] finish(input logic [NUM_W-1:0] q,
                                                     input logic is_neg);
    longint val;
    val = is_neg ? -longint'(q) : longint'(q);
    val = val + MU_INT;
    if (val > OUT_MAX) val = OUT_MAX;
    if (val < OUT_MIN) val = OUT_MIN;
    return OUT_W'(val);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= Z_IDLE;
      done    <= 1'b0;
      idx     <= '0;
      sum     <= '0;
      ssq     <= '0;
      sq_x    <= '0;
      sq_bit  <= '0;
      sq_res  <= '0;
      root    <= '0;
      num     <= '0;
      rem     <= '0;
      div_cnt <= '0;
      neg     <= 1'b0;
      for (int i = 0; i < N; i++) begin
        v[i]   <= '0;
        roc[i] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        Z_IDLE: if (start) begin
          for (int i = 0; i < N; i++) v[i] <= vals[i];
          idx   <= '0;
          sum   <= '0;
          ssq   <= '0;
          state <= Z_SUM;
        end
        Z_SUM: begin
          sum <= sum + SUM_W'(v[idx]);
          if (idx == IDX_W'(N - 1)) begin
            idx   <= '0;
            state <= Z_SQ;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        Z_SQ: begin
          ssq <= ssq + S_W'(d_sq);
          if (idx == IDX_W'(N - 1)) begin
            idx   <= '0;
            state <= Z_RLD;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        Z_RLD: begin
          // operand S scaled by 2^(2*SQ_FRAC), so the root has SQ_FRAC
          // fraction bits
          sq_x   <= SQ_W'(ssq) << (2 * SQ_FRAC);
          sq_res <= '0;
          sq_bit <= SQ_W'(1) << (SQ_W - 2);
          state  <= Z_ROOT;
        end
        Z_ROOT: begin
          if (sq_x >= (sq_res | sq_bit)) begin
            sq_x   <= sq_x - (sq_res | sq_bit);
            sq_res <= (sq_res >> 1) | sq_bit;
          end else begin
            sq_res <= sq_res >> 1;
          end
          sq_bit <= sq_bit >> 2;
          if (sq_bit == SQ_W'(1)) begin
            root  <= R_W'((sq_x >= (sq_res | sq_bit)) ? ((sq_res >> 1) | sq_bit)
                                                       : (sq_res >> 1));
            state <= Z_DIVLD;
          end
        end
        Z_DIVLD: begin
          // numerator |d_i| * K + root/2 (rounding), divided by root
          neg     <= d_cur[D_W-1];
          num     <= NUM_W'(d_abs) * NUM_W'(K_INT) + NUM_W'(root >> 1);
          rem     <= '0;
          div_cnt <= '0;
          state   <= Z_DIV;
        end
        Z_DIV: begin
          if (root == '0 || div_cnt == $bits(div_cnt)'(NUM_W)) begin
            // num now holds the quotient (or the group had no spread)
            roc[idx] <= (root == '0) ? finish('0, 1'b0) : finish(num, neg);
            if (idx == IDX_W'(N - 1)) begin
              state <= Z_DONE;
            end else begin
              idx   <= idx + 1'b1;
              state <= Z_DIVLD;
            end
          end else begin
            // restoring division step: shift in the next numerator bit,
            // shift out the next quotient bit into num's free end
            if (trial >= (R_W+1)'(root)) begin
              rem <= R_W'(trial - (R_W+1)'(root));
              num <= {num[NUM_W-2:0], 1'b1};
            end else begin
              rem <= R_W'(trial);
              num <= {num[NUM_W-2:0], 1'b0};
            end
            div_cnt <= div_cnt + 1'b1;
          end
        end
        Z_DONE: begin
          done  <= 1'b1;
          state <= Z_IDLE;
        end
        default: state <= Z_IDLE;
      endcase
    end
  end
endmodule
