// cmb_init: the configuration states that scan an alternating bit pattern into
// the configuration memory bits (CMB) of every shift-register LUT.
//
// On start it raises ctrl (the select of the Data and Clk MUXes in front of
// every SRL), then for each of the DEPTH bits it drives cmb_data and gives one
// cmb_clk period (one system-clock cycle low, one high). Bit i sent is
// phase ^ i[0]. After DEPTH shifts the bit at address k of every SRL is
// phase ^ ~k[0], so phase = ro_sel[0] puts a 1 at address ro_sel. ctrl drops
// one cycle after the last cmb_clk fall, while cmb_clk and the ring pulses are
// low, so the clock MUX switches without a glitch. done is a one-cycle pulse.
//
// Interface: clk, rst (sync, active high), start, phase in; ctrl, cmb_data,
// cmb_clk, busy, done out. A load takes 2*DEPTH+3 cycles from start.
`timescale 1ps/1ps
module cmb_init #(
  parameter int unsigned DEPTH = 32
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  logic phase,
  output logic ctrl,
  output logic cmb_data,
  output logic cmb_clk,
  output logic busy,
  output logic done
);
  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_LOW, S_HIGH, S_HOLD} state_t;

  state_t                     state;
  logic [$clog2(DEPTH)-1:0]   bit_idx;
  logic                       phase_q;

  assign busy     = (state != S_IDLE);
  assign ctrl     = (state != S_IDLE);
  assign cmb_clk  = (state == S_HIGH);
  assign cmb_data = phase_q ^ bit_idx[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      bit_idx <= '0;
      phase_q <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          phase_q <= phase;
          bit_idx <= '0;
          state   <= S_SETUP;
        end
        S_SETUP: state <= S_LOW;
        S_LOW:   state <= S_HIGH;
        S_HIGH: begin
          if (bit_idx == $bits(bit_idx)'(DEPTH - 1)) begin
            state <= S_HOLD;
          end else begin
            bit_idx <= bit_idx + 1'b1;
            state   <= S_LOW;
          end
        end
        S_HOLD: begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
