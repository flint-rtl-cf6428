// control_fsm: sequences one emulation run of the framework.
//
// After a start pulse it
//   1. LOAD (only if do_load): shifts num_params words from the timing
//      parameter memory, address 0 first, into the configuration chain, one
//      word per clk_load_en pulse. load_en is raised only while the word read
//      from memory is valid, so the chain shifts exactly num_params times.
//   2. RUN: enables the quantized system clock. Before system clock pulse k
//      the operand memories are read at address k (held at num_ops-1 after the
//      last operand), so operand k enters the netlist's input registers at
//      pulse k. Its sum is captured by the output registers at pulse k+1 and
//      stored from their delayed outputs into the result memory at pulse k+2,
//      address k. The run therefore takes num_ops + 2 system clock periods.
//   3. DONE: raises the done flag until the next start.
// Operands are applied back to back, so each operation starts from the
// circuit state left by the previous one, as in a real clocked circuit.
// The document gives the three duties and the done flag; the sequencing and
// latencies are this design's own. Memory reads have one cycle of latency.
module control_fsm #(
  parameter int unsigned PAW = 10,   // parameter memory address width
  parameter int unsigned OAW = 17    // operand / result memory address width
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic           do_load,
  input  logic [31:0]    num_params,
  input  logic [31:0]    num_ops,
  // configuration chain
  input  logic           clk_load_en,
  output logic           load_en,
  output logic [PAW-1:0] param_addr,
  // quantized system clock
  output logic           run,
  input  logic           sys_clk_ff,
  // operand and result memories
  output logic [OAW-1:0] op_addr,
  output logic           result_we,
  output logic [OAW-1:0] result_addr,
  // status
  output logic           done,
  output logic           busy,
  output logic [31:0]    op_count
);
  import flint_pkg::*;

  fsm_state_e  state;
  logic [31:0] idx;        // parameter word index
  logic        rd_valid;   // parameter memory output matches idx
  logic [31:0] pcount;     // system clock pulses in this run
  logic        shift;

  assign load_en    = (state == ST_LOAD) && rd_valid;
  assign shift      = load_en && clk_load_en;
  assign param_addr = PAW'(idx);
  assign run        = (state == ST_RUN);
  assign busy       = (state == ST_LOAD) || (state == ST_RUN);
  assign done       = (state == ST_DONE);

  always_comb begin
    if (num_ops == 0)          op_addr = '0;
    else if (pcount < num_ops) op_addr = OAW'(pcount);
    else                       op_addr = OAW'(num_ops - 1);
  end
  assign result_we   = run && sys_clk_ff && (pcount >= 2);
  assign result_addr = OAW'(pcount - 2);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= ST_IDLE;
      idx      <= '0;
      rd_valid <= 1'b0;
      pcount   <= '0;
      op_count <= '0;
    end else begin
      case (state)
        ST_IDLE, ST_DONE: begin
          if (start) begin
            idx      <= '0;
            rd_valid <= 1'b0;
            pcount   <= '0;
            op_count <= '0;
            if (do_load && num_params != 0) state <= ST_LOAD;
            else if (num_ops != 0)           state <= ST_RUN;
            else                             state <= ST_DONE;
          end
        end
        ST_LOAD: begin
          if (shift) begin
            idx      <= idx + 1;
            rd_valid <= 1'b0;
            if (idx + 1 == num_params)
              state <= (num_ops != 0) ? ST_RUN : ST_DONE;
          end else begin
            rd_valid <= 1'b1;
          end
        end
        ST_RUN: begin
          if (sys_clk_ff) begin
            pcount <= pcount + 1;
            if (pcount >= 2) op_count <= op_count + 1;
            if (pcount == num_ops + 1) state <= ST_DONE;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // The chain shifts only in LOAD, and results are written only on a system
  // clock pulse of a run.
  a_load_in_load: assert property (@(posedge clk) disable iff (rst)
                                   load_en |-> state == ST_LOAD);
  a_result_on_pulse: assert property (@(posedge clk) disable iff (rst)
                                      result_we |-> sys_clk_ff && run);

endmodule
