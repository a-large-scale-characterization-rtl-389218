// Measurement controller: executes the host's commands to clear the counters,
// enable and disable the addressed ring oscillator, and load the counter
// values into the JTAG shift register.
//
// States and timing (all in the 50 MHz domain, outputs registered):
//   IDLE   accepts CLEAR, ENABLE and LOAD.
//   CLEAR  cnt_clr high for CLEAR_CYCLES cycles, then IDLE.
//   ARM    one cycle with the new address latched and the RO still off, so
//          the output multiplexer never switches on a running RO.
//   RUN    ro_en high until a DISABLE command; the host times this period
//          and the reference counter measures it.
//   SETTLE ro_en low for SETTLE_CYCLES cycles, letting the RO counter take its
//          last edge before it can be read, then IDLE.
// LOAD in IDLE gives a one-cycle sr_load pulse. Commands that do not fit the
// current state are ignored. busy is high outside IDLE and RUN.
// That a simple FSM under host control enables/disables the ROs, loads the
// shift register and clears the counters follows the measurement setup; the
// state set, the opcodes and the cycle counts are this design's choices.
module measure_fsm
  import ro_puf_pkg::*;
#(
  parameter int unsigned CLEAR_CYCLES  = 2,
  parameter int unsigned SETTLE_CYCLES = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              cmd_valid,
  input  logic [CMD_W-1:0]  cmd,
  output logic [ADDR_W-1:0] ro_addr,
  output logic              ro_en,
  output logic              cnt_clr,
  output logic              sr_load,
  output logic              busy
);

  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_ARM, S_RUN, S_SETTLE} state_e;

  localparam int unsigned TW = $clog2(CLEAR_CYCLES + SETTLE_CYCLES + 1);

  state_e         state;
  logic [TW-1:0]  timer;
  cmd_t           c;

  assign c = cmd_t'(cmd);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      timer   <= '0;
      ro_addr <= '0;
      ro_en   <= 1'b0;
      cnt_clr <= 1'b0;
      sr_load <= 1'b0;
    end else begin
      sr_load <= 1'b0;
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          unique case (c.op)
            CMD_CLEAR: begin
              state   <= S_CLEAR;
              cnt_clr <= 1'b1;
              timer   <= TW'(CLEAR_CYCLES - 1);
            end
            CMD_ENABLE: begin
              state   <= S_ARM;
              ro_addr <= c.addr;
            end
            CMD_LOAD: sr_load <= 1'b1;
            default: ;
          endcase
        end
        S_CLEAR: begin
          if (timer == '0) begin
            state   <= S_IDLE;
            cnt_clr <= 1'b0;
          end else timer <= timer - 1'b1;
        end
        S_ARM: begin
          state <= S_RUN;
          ro_en <= 1'b1;
        end
        S_RUN: if (cmd_valid && c.op == CMD_DISABLE) begin
          state <= S_SETTLE;
          ro_en <= 1'b0;
          timer <= TW'(SETTLE_CYCLES - 1);
        end
        S_SETTLE: begin
          if (timer == '0) state <= S_IDLE;
          else             timer <= timer - 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state == S_CLEAR) || (state == S_ARM) || (state == S_SETTLE);

  // The RO and the counter clear are never active together.
  a_no_clear_while_running: assert property (@(posedge clk) disable iff (rst) !(ro_en && cnt_clr));

endmodule
