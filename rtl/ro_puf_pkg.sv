// Shared types and constants of the ring-oscillator measurement design.
//
// The array size (512 ring oscillators in 16 rows of 32) and the 32-bit
// counter width follow the measurement setup this design implements. The
// command word that the host shifts in over JTAG, its opcodes and the
// process-variation formula used by the behavioural array model are this
// design's own choices.
//
// Command word (CMD_W = 12 bits, the first 12 bits shifted into the data
// register, LSB first):
//   [2:0]  opcode  (cmd_op_e)
//   [11:3] RO address, row*COLS + col
`timescale 1ns/1ps
package ro_puf_pkg;

  localparam int unsigned ADDR_W = 9;            // $clog2(512 ROs)
  localparam int unsigned CMD_W  = 3 + ADDR_W;   // 12

  typedef enum logic [2:0] {
    CMD_NOP     = 3'd0,
    CMD_CLEAR   = 3'd1,   // clear both counters
    CMD_ENABLE  = 3'd2,   // select the addressed RO and start it
    CMD_DISABLE = 3'd3,   // stop the RO (end of the enable period)
    CMD_LOAD    = 3'd4    // copy {ref count, RO count} into the shift register
  } cmd_op_e;

  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    cmd_op_e           op;
  } cmd_t;

  // Pseudo-random static offset in [-1, 1) for RO number idx, used by the
  // behavioural array model as its process-variation term: an integer hash
  // of the index, scaled to the interval.
  function automatic real ro_pv_offset(input int unsigned idx);
    logic [31:0] h;
    h = idx * 32'h9E37_79B1 + 32'h7F4A_7C15;
    h = h ^ (h >> 15);
    h = h * 32'h85EB_CA6B;
    h = h ^ (h >> 13);
    return (real'(h[31:16]) / 32768.0) - 1.0;
  endfunction

endpackage
