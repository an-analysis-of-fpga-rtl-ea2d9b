// srpuf_ctrl: sequencer for one ring-oscillator measurement.
//
// On start it latches the requested RO address, then
//   CLR  : pulses meas_rst for one cycle (clears counter, timer and go_reg)
//          and latches the window length,
//   LOAD : runs the CMB pattern load with phase = ro_sel[0], so the selected
//          CMB bit is 1 and the ring starts as soon as it is enabled,
//   RUN  : holds go until the timer reports its window has closed,
//   DRAIN: waits DRAIN_CYC cycles so the ring's last pulse reaches the counter,
// and then raises done, which stays high until the next start.
// Clearing first and the fixed window follow the reference procedure; the
// pattern reload before each measurement and the drain wait are this design's
// own choices (the reference loads the pattern once after configuration).
//
// Interface: clk, rst (sync, active high), start, addr_in, runtime_in in
// (addr_in is sampled with start, runtime_in one cycle later);
// addr and runtime (held from start until the next start, so a new runtime
// written after a measurement cannot reopen the finished window), meas_rst, init_start, go, busy, done out;
// init_done and meas_done come back from cmb_init and the timer.
`timescale 1ps/1ps
module srpuf_ctrl
  import srpuf_pkg::*;
#(
  parameter int unsigned DRAIN_CYC = 4
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     start,
  input  ro_addr_t addr_in,
  input  logic [TIMER_W-1:0] runtime_in,
  input  logic     init_done,
  input  logic     meas_done,
  output ro_addr_t addr,
  output logic [TIMER_W-1:0] runtime,
  output logic     meas_rst,
  output logic     init_start,
  output logic     go,
  output logic     busy,
  output logic     done
);
  typedef enum logic [2:0] {C_IDLE, C_CLR, C_LOAD, C_RUN, C_DRAIN} cstate_t;

  cstate_t                          state;
  logic [$clog2(DRAIN_CYC+1)-1:0]   drain_cnt;

  assign meas_rst = (state == C_CLR);
  assign go       = (state == C_RUN);
  assign busy     = (state != C_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= C_IDLE;
      addr       <= '0;
      runtime    <= DEFAULT_RUNTIME;
      init_start <= 1'b0;
      drain_cnt  <= '0;
      done       <= 1'b0;
    end else begin
      init_start <= 1'b0;
      unique case (state)
        C_IDLE: if (start) begin
          addr  <= addr_in;
          done  <= 1'b0;
          state <= C_CLR;
        end
        C_CLR: begin
          // Taken on the same edge that clears go_reg and the timer, so the
          // finished window of the previous measurement cannot reopen.
          runtime    <= runtime_in;
          init_start <= 1'b1;
          state      <= C_LOAD;
        end
        C_LOAD: if (init_done) state <= C_RUN;
        C_RUN: if (meas_done) begin
          drain_cnt <= '0;
          state     <= C_DRAIN;
        end
        C_DRAIN: begin
          if (drain_cnt == $bits(drain_cnt)'(DRAIN_CYC - 1)) begin
            done  <= 1'b1;
            state <= C_IDLE;
          end else begin
            drain_cnt <= drain_cnt + 1'b1;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end
endmodule
