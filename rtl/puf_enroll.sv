// puf_enroll: enrollment engine that turns the 4096 ring oscillators into a
// helper-data bitstring and a response bitstring.
//
// It runs three passes over the array:
//   1. Measure: every ring (macro x, SR y, RO z) is measured N_SAMPLES times
//      through the measurement sequencer; the sum of the counts (the mean
//      times N_SAMPLES) is stored in sum_mem[{x,y,z}].
//   2. Calibrate: for each of the 512 (y,z) positions the eight identically
//      placed rings of the eight macros form a group; zscore_calib maps the
//      group to mean MU_REF and spread SIGMA_REF (46.3 counts). This removes
//      the chip offset, the design offset of the position and the LUT
//      path-length bias, which all eight share; what is left is within-die
//      variation. Results go to roc_mem (signed, 4 fraction bits).
//   3. Pair and threshold: rings z and z+1 (z even) of the same SR form one of
//      2048 disjoint adjacent pairs; bit_enroll gives helper bit p (1 =
//      strong, |difference| > THRESH) and response bit p (1 = first ring
//      faster). n_strong is the length of the strong bitstring.
// Pair p is rings {p,0} and {p,1}, i.e. p = {x, y, z/2}. With VERTICAL=1 the
// alternative pairing of the same (y,z) ring in macros x and x+1 (x even) is
// used instead: pair p = {x/2, y, z} is rings {x/2,0,y,z} and {x/2,1,y,z}. The processor reads
// the results as 32-bit words: rd_word 0..63 are helper bits 32w..32w+31,
// 64..127 the response bits (bit 0 of a word is the lowest pair index).
// The passes, group sizes, reference values, the 16 samples and the
// adjacent pairing follow the reference method; the memories, the order of
// the passes and the readout layout are this design's own.
//
// Interface: start (one cycle) begins an enrollment; busy stays high until it
// ends, done then stays high until the next start. meas_start/meas_addr drive
// the measurement sequencer; meas_done/meas_busy/count come back from it.
// Time: 4096*N_SAMPLES measurements (about 600 cycles each at runtime 512),
// then about 512*500 cycles of calibration and 4*2048 cycles of pairing.
`timescale 1ps/1ps
module puf_enroll
  import srpuf_pkg::*;
#(
  parameter int unsigned N_SAMPLES = 16,
  parameter real         SIGMA_REF = 46.3,
  parameter real         MU_REF    = 0.0,
  parameter real         THRESH    = 2.0,
  parameter bit          VERTICAL  = 1'b0
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  // measurement sequencer
  output logic               meas_start,
  output ro_addr_t           meas_addr,
  input  logic               meas_done,
  input  logic               meas_busy,
  input  logic [COUNT_W-1:0] count,
  // results
  input  logic [6:0]         rd_word,
  output logic [31:0]        rd_data,
  output logic               busy,
  output logic               done,
  output logic [11:0]        n_strong
);
  localparam int unsigned N_RO    = N_MACROS * N_SR * SRL_DEPTH;   // 4096
  localparam int unsigned N_PAIR  = N_RO / 2;                      // 2048
  localparam int unsigned IDX_W   = $clog2(N_RO);
  localparam int unsigned GRP_W   = IDX_W - MACRO_W;               // (y,z)
  localparam int unsigned SMP_W   = (N_SAMPLES > 1) ? $clog2(N_SAMPLES) : 1;
  localparam int unsigned SUM_W   = COUNT_W + $clog2(N_SAMPLES);
  localparam int unsigned ROC_W   = 16;
  localparam int unsigned FRAC    = 4;

  typedef enum logic [3:0] {
    E_IDLE, E_MSTART, E_MWAIT, E_CRD, E_CSTART, E_CWAIT, E_CWR, E_PRDA, E_PRDB, E_PEVAL,
    E_PWR, E_DONE
  } estate_t;

  estate_t              state;
  logic [IDX_W-1:0]     idx;       // ring index in pass 1, pair index in pass 3
  logic [SMP_W-1:0]     smp;
  logic [SUM_W-1:0]     acc;
  logic [GRP_W-1:0]     grp;
  logic [MACRO_W:0]     cx;        // macro counter in pass 2

  // memories (simple dual port, synchronous read)
  logic [SUM_W-1:0]        sum_mem [N_RO];
  logic                    sum_we;
  logic [IDX_W-1:0]        sum_waddr, sum_raddr;
  logic [SUM_W-1:0]        sum_wdata, sum_rdata;
  logic signed [ROC_W-1:0] roc_mem [N_RO];
  logic                    roc_we;
  logic [IDX_W-1:0]        roc_waddr, roc_raddr;
  logic signed [ROC_W-1:0] roc_wdata, roc_rdata;

  logic [N_PAIR-1:0]       helper_bits;
  logic [N_PAIR-1:0]       resp_bits;

  // calibration and thresholding units
  logic                    cal_start, cal_busy_unused, cal_done;
  logic [SUM_W-1:0]        cal_vals [N_MACROS];
  logic signed [ROC_W-1:0] cal_roc  [N_MACROS];
  logic                    be_valid, be_valid_unused, be_helper, be_bit;
  logic signed [ROC_W-1:0] roc_a;

  zscore_calib #(
    .N(N_MACROS), .IN_W(SUM_W), .OUT_W(ROC_W), .FRAC(FRAC),
    .SIGMA_REF(SIGMA_REF), .MU_REF(MU_REF)
  ) u_cal (
    .clk(clk), .rst(rst), .start(cal_start), .vals(cal_vals),
    .busy(cal_busy_unused), .done(cal_done), .roc(cal_roc)
  );

  bit_enroll #(.IN_W(ROC_W), .FRAC(FRAC), .THRESH(THRESH), .CNT_W(12)) u_be (
    .clk(clk), .rst(rst), .clr(start && state == E_IDLE), .in_valid(be_valid),
    .roc_a(roc_a), .roc_b(roc_rdata), .out_valid(be_valid_unused),
    .helper(be_helper), .bit_out(be_bit), .n_strong(n_strong)
  );

  always_ff @(posedge clk) begin
    if (sum_we) sum_mem[sum_waddr] <= sum_wdata;
    sum_rdata <= sum_mem[sum_raddr];
  end

  always_ff @(posedge clk) begin
    if (roc_we) roc_mem[roc_waddr] <= roc_wdata;
    roc_rdata <= roc_mem[roc_raddr];
  end

  // Ring index of member b (0 or 1) of pair p.
  function automatic logic [IDX_W-1:0] pair_addr(input logic [IDX_W-2:0] p, input logic b);
    if (VERTICAL) return {p[IDX_W-2:IDX_W-MACRO_W], b, p[IDX_W-MACRO_W-1:0]};
    else          return {p, b};
  endfunction

  // memory and unit controls
  always_comb begin
    meas_start = (state == E_MSTART);
    meas_addr  = ro_addr_t'(idx);
    sum_we     = (state == E_MWAIT) && meas_done && !meas_busy
                 && (smp == SMP_W'(N_SAMPLES - 1));
    sum_waddr  = idx;
    sum_wdata  = acc + SUM_W'(count);
    sum_raddr  = {cx[MACRO_W-1:0], grp};
    cal_start  = (state == E_CSTART);
    roc_we     = (state == E_CWR);
    roc_waddr  = {cx[MACRO_W-1:0], grp};
    roc_wdata  = cal_roc[cx[MACRO_W-1:0]];
    roc_raddr  = pair_addr(idx[IDX_W-2:0], state != E_PRDA);
    be_valid   = (state == E_PEVAL);
    busy       = (state != E_IDLE) && (state != E_DONE);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= E_IDLE;
      idx         <= '0;
      smp         <= '0;
      acc         <= '0;
      grp         <= '0;
      cx          <= '0;
      done        <= 1'b0;
      roc_a       <= '0;
      helper_bits <= '0;
      resp_bits   <= '0;
      for (int i = 0; i < N_MACROS; i++) cal_vals[i] <= '0;
    end else begin
      unique case (state)
        E_IDLE, E_DONE: if (start) begin
          done  <= 1'b0;
          idx   <= '0;
          smp   <= '0;
          acc   <= '0;
          state <= E_MSTART;
        end
        // pass 1: measure every ring N_SAMPLES times
        E_MSTART: state <= E_MWAIT;
        E_MWAIT: if (meas_done && !meas_busy) begin
          if (smp == SMP_W'(N_SAMPLES - 1)) begin
            smp <= '0;
            acc <= '0;
            idx <= idx + 1'b1;
            if (idx == IDX_W'(N_RO - 1)) begin
              grp   <= '0;
              cx    <= '0;
              state <= E_CRD;
            end else begin
              state <= E_MSTART;
            end
          end else begin
            smp   <= smp + 1'b1;
            acc   <= acc + SUM_W'(count);
            state <= E_MSTART;
          end
        end
        // pass 2: read the group (one macro per cycle), then calibrate it
        E_CRD: begin
          if (cx != '0) cal_vals[MACRO_W'(cx - 1'b1)] <= sum_rdata;
          if (cx == (MACRO_W+1)'(N_MACROS)) begin
            cx    <= '0;
            state <= E_CSTART;
          end else begin
            cx <= cx + 1'b1;
          end
        end
        E_CSTART: state <= E_CWAIT;
        E_CWAIT: if (cal_done) state <= E_CWR;
        E_CWR: begin
          if (cx == (MACRO_W+1)'(N_MACROS - 1)) begin
            cx  <= '0;
            grp <= grp + 1'b1;
            if (grp == GRP_W'((1 << GRP_W) - 1)) begin
              idx   <= '0;
              state <= E_PRDA;
            end else begin
              state <= E_CRD;
            end
          end else begin
            cx <= cx + 1'b1;
          end
        end
        // pass 3: adjacent pairs, threshold, store helper and response bits
        E_PRDA:  state <= E_PRDB;
        E_PRDB: begin
          roc_a <= roc_rdata;
          state <= E_PEVAL;
        end
        E_PEVAL: state <= E_PWR;
        E_PWR: begin
          helper_bits[idx[IDX_W-2:0]] <= be_helper;
          resp_bits[idx[IDX_W-2:0]]   <= be_bit;
          if (idx == IDX_W'(N_PAIR - 1)) begin
            done  <= 1'b1;
            state <= E_DONE;
          end else begin
            idx   <= idx + 1'b1;
            state <= E_PRDA;
          end
        end
        default: state <= E_IDLE;
      endcase
    end
  end

  assign rd_data = rd_word[6] ? resp_bits[32 * rd_word[5:0] +: 32]
                              : helper_bits[32 * rd_word[5:0] +: 32];
endmodule
