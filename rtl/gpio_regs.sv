// gpio_regs: the two 32-bit GPIO words between the processor and the PUF.
//
// gpio_o (processor to fabric) carries commands; gpio_i (fabric to processor)
// carries status and data. The processor writes gpio_o as a whole word:
//   gpio_o[31]    = 0  : control word
//       [0]     soft reset of the measurement system (level)
//       [1]     go; a 0->1 change starts a single measurement
//       [4:2]   macro_sel   [8:5] sr_sel   [13:9] ro_sel
//       [14]    enroll; a 0->1 change starts an enrollment
//   gpio_o[31:30] = 10 : runtime word, [22:0] = measurement window in cycles
//   gpio_o[31:30] = 11 : read word, [6:0] = index of the result word
// gpio_i after a read word: the selected result word (rd_data); otherwise
//   {n_strong[11:0], enr_done, enr_busy, busy, done, count[15:0]}.
// The word is registered on clk; control fields and runtime are held until
// the next word of their kind. start and enr_start are registered too, so
// they arrive one cycle after the fields of the same word are valid (three
// clk edges after gpio_o). go and enroll are ignored on words that are not
// control words. runtime resets to 512 cycles (5.12 us at 100 MHz). The bit
// layout is this design's own: the reference only says that two 32-bit GPIO
// registers carry status, data and control. Bits [30:23] of a runtime word
// are not used.
//
// Interface: clk, rst (sync, active high), gpio_o, count, done, busy,
// rd_data, enr_busy, enr_done, n_strong in; gpio_i, soft_rst, start,
// enr_start (one-cycle pulses), addr, runtime, rd_word out.
`timescale 1ps/1ps
module gpio_regs
  import srpuf_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic [31:0]        gpio_o,
  input  logic [COUNT_W-1:0] count,
  input  logic               done,
  input  logic               busy,
  input  logic [31:0]        rd_data,
  input  logic               enr_busy,
  input  logic               enr_done,
  input  logic [11:0]        n_strong,
  output logic [31:0]        gpio_i,
  output logic               soft_rst,
  output logic               start,
  output logic               enr_start,
  output ro_addr_t           addr,
  output logic [TIMER_W-1:0] runtime,
  output logic [6:0]         rd_word
);
  logic [31:0] word;
  logic        go_q, enr_q;
  logic        go_bit, enr_bit;
  logic        rd_mode;

  assign go_bit  = ~word[31] & word[1];
  assign enr_bit = ~word[31] & word[14];

  always_ff @(posedge clk) begin
    if (rst) begin
      word      <= '0;
      go_q      <= 1'b0;
      enr_q     <= 1'b0;
      start     <= 1'b0;
      enr_start <= 1'b0;
      soft_rst  <= 1'b0;
      addr      <= '0;
      runtime   <= DEFAULT_RUNTIME;
      rd_word   <= '0;
      rd_mode   <= 1'b0;
    end else begin
      word      <= gpio_o;
      go_q      <= go_bit;
      enr_q     <= enr_bit;
      start     <= go_bit & ~go_q;
      enr_start <= enr_bit & ~enr_q;
      unique casez (word[31:30])
        2'b0?: begin
          soft_rst       <= word[0];
          addr.macro_sel <= word[2 +: MACRO_W];
          addr.sr_sel    <= word[5 +: SR_W];
          addr.ro_sel    <= word[9 +: RO_W];
          rd_mode        <= 1'b0;
        end
        2'b10: runtime <= word[TIMER_W-1:0];
        default: begin
          rd_word <= word[6:0];
          rd_mode <= 1'b1;
        end
      endcase
    end
  end

  assign gpio_i = rd_mode ? rd_data : {n_strong, enr_done, enr_busy, busy, done, count};
endmodule
