// cdp1802_pkg: types and constants shared by the 1802 core and the system
// around it.
//
// The 1802 runs in machine cycles. Each machine cycle here is four clocks,
// numbered 0..3 by a cycle counter. The state codes (SC1,SC0) follow the
// original part: 0 fetch, 1 execute, 2 DMA, 3 interrupt. The two control
// inputs CLEAR and WAIT (both active low) select one of four modes; the
// 2-bit mode value is {CLEAR_n, WAIT_n}.
package cdp1802_pkg;

  // State codes, as driven on SC1/SC0.
  typedef enum logic [1:0] {
    SC_FETCH   = 2'd0,
    SC_EXECUTE = 2'd1,
    SC_DMA     = 2'd2,
    SC_INT     = 2'd3
  } sc_e;

  // Internal machine-cycle states. INIT is the first execute-type cycle
  // after reset; EXEC2 is the forced second execute cycle of the long
  // branch / long skip / NOP group (opcodes Cx).
  typedef enum logic [2:0] {
    ST_INIT  = 3'd0,
    ST_FETCH = 3'd1,
    ST_EXEC  = 3'd2,
    ST_EXEC2 = 3'd3,
    ST_DMA   = 3'd4,
    ST_INT   = 3'd5
  } state_e;

  // Control modes, encoded as {CLEAR_n, WAIT_n}.
  typedef enum logic [1:0] {
    M_LOAD  = 2'b00,
    M_RESET = 2'b01,
    M_PAUSE = 2'b10,
    M_RUN   = 2'b11
  } mode_e;

  // ALU operations (selected from the opcode by the core).
  typedef enum logic [2:0] {
    ALU_OR  = 3'd0,
    ALU_AND = 3'd1,
    ALU_XOR = 3'd2,
    ALU_ADD = 3'd3,
    ALU_SD  = 3'd4,   // memory - D
    ALU_SM  = 3'd5    // D - memory
  } alu_op_e;

  // Register snapshot brought out for the debug displays and for testing.
  typedef struct packed {
    logic [7:0]  d;
    logic        df;
    logic        q;
    logic        ie;
    logic [3:0]  p;
    logic [3:0]  x;
    logic [7:0]  t;
    logic [15:0] pc;      // R(P)
    logic        idle;
  } cpu_debug_t;

endpackage
