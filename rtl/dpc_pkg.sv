// dpc_pkg - shared types and constants of the digital photonic computer (DPC) datapath.
//
// Every channel in the DPC is one bit wide: operands (IEEE 754 FP64 words) travel bit-serially,
// least significant bit first, one bit per DPC clock. A channel therefore carries a data bit and a
// marker bit that is high for every clock on which the stream holds valid data (the mx / my
// markers of the operand block). The operand block works in one of four synchronization modes
// (sm = 0..3); its control block has two more states for loading the constant register and the
// forced delay. The 10^3-cycle boundary between the shift-register synchronizer and the external
// memory path and the 64-bit constant register come from the architecture description; the
// packaging into a struct is this design's choice.
package dpc_pkg;

  // One bit-serial channel: data bit and stream marker.
  typedef struct packed {
    logic d;  // data bit
    logic m;  // marker: 1 while the stream carries valid data
  } stream_t;

  // Synchronization mode number sm printed on the operand block.
  typedef enum logic [1:0] {
    SM_CONST  = 2'd0,  // mode 0: stream paired with the constant register
    SM_DIRECT = 2'd1,  // mode 1: streams already in step
    SM_SHIFT  = 2'd2,  // mode 2: leading stream delayed in the shift register (<= 10^3 cycles)
    SM_MEMORY = 2'd3   // mode 3: leading stream delayed through external memory (> 10^3 cycles)
  } sm_t;

  // States of the control block (the six nodes of its transition diagram).
  typedef enum logic [2:0] {
    ST_MODE0 = 3'd0,
    ST_WRG   = 3'd1,   // write the constant register rg
    ST_MODE1 = 3'd2,
    ST_MODE2 = 3'd3,
    ST_MODE3 = 3'd4,
    ST_WDEL  = 3'd5    // write the forced delay del
  } ctrl_state_t;

  // Kind of a functional device (adder SUM, multiplier MUL, divider DIV).
  typedef enum logic [1:0] {
    FD_ADD = 2'd0,
    FD_MUL = 2'd1,
    FD_DIV = 2'd2
  } fd_kind_t;

endpackage
