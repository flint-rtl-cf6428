// flint_pkg: constants and types shared by the timing-emulation framework.
//
// The instrumented cells emulate gate propagation delays by counting cycles of
// the reference clock clk_ref; one cycle stands for one time quantum (for
// example 1 ps, 10 ps or 100 ps of ASIC time). A programmed delay parameter P
// yields an output transition P + MIN_LATENCY reference cycles after the input
// transition, so the host subtracts MIN_LATENCY when it converts SDF delays.
// The 9-cycle minimum matches the instrumentation pipeline of the cells.
//
// The framework registers sit on a simple word-addressed I/O bus; the region
// and register codes below form its address map.
package flint_pkg;

  // Width of one delay parameter word (counter preset). Own choice: 16 bits
  // cover 65 ns of gate delay at 1 ps resolution.
  localparam int unsigned DELAY_W_DEF = 16;

  // Reference cycles from a cell input transition to the instrumented output
  // for a delay parameter of zero.
  localparam int unsigned MIN_LATENCY = 9;

  // Evaluation netlist placed in the framework.
  typedef enum logic [1:0] {
    NL_ADD = 2'd0,   // ripple-carry adder, WIDTH+1 result bits
    NL_MUL = 2'd1,   // ripple-carry array multiplier, 2*WIDTH result bits
    NL_DIV = 2'd2    // non-restoring array divider, WIDTH quotient bits
  } netlist_e;

  // Bus data width.
  localparam int unsigned BUS_DW = 32;
  // Bus address: [20:18] region, [17:0] word offset inside the region.
  localparam int unsigned BUS_AW  = 21;
  localparam int unsigned BUS_OFW = 18;

  typedef enum logic [2:0] {
    REG_REGION    = 3'd0,  // control register file
    PARAM_REGION  = 3'd1,  // timing parameter memory
    OPA_REGION    = 3'd2,  // operand memory A
    OPB_REGION    = 3'd3,  // operand memory B
    RESULT_REGION = 3'd4   // result memory
  } region_e;

  // Control register file word addresses (offset inside REG_REGION).
  typedef enum logic [2:0] {
    REG_CTRL       = 3'd0,  // W: bit0 start, bit1 configure parameters first
    REG_STATUS     = 3'd1,  // R: bit0 done flag, bit1 busy
    REG_NUM_PARAMS = 3'd2,  // number of parameter words in the chain
    REG_NUM_OPS    = 3'd3,  // number of operations to emulate
    REG_SYS_PERIOD = 3'd4,  // system clock period in reference cycles (quanta)
    REG_LOAD_DIV   = 3'd5,  // reference cycles per parameter shift (clk_load)
    REG_OP_COUNT   = 3'd6   // R: operations completed in the last run
  } reg_addr_e;

  // Control FSM states.
  typedef enum logic [2:0] {
    ST_IDLE,
    ST_LOAD,
    ST_RUN,
    ST_DONE
  } fsm_state_e;

endpackage
