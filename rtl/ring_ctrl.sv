// ring_ctrl: control part of an LUT ring.
//
// Three states. IDLE waits for start; on start it asks for the input register
// to load and the output register to clear, and resets the step counter. RUN
// spends one clock per LUT step: the entry at `step` is applied, its LUT word
// is read, and the counter advances. A step whose entry is marked last (or the
// last address of the interconnection memory) ends RUN. FLUSH is the one
// extra clock in which the final LUT word is written to the output register.
//
// Timing: a program of S steps started at clock edge 0 performs its reads at
// edges 1..S, its output writes at edges 2..S+1, and done is high for the one
// cycle after edge S+1. `run` marks the cycles that read the LUT memory;
// `wr_out` marks those whose clock edge writes the output register (each one
// cycle behind the read it stores). start is ignored while busy.
// The paper names the control part only; this sequencing is this design's.
module ring_ctrl
  import rt_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               last,      // last flag of the entry at `step`
  output logic [PROG_AW-1:0] step,
  output logic               load,      // load inputs, clear outputs
  output logic               run,
  output logic               wr_out,
  output logic               busy,
  output logic               done
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FLUSH} state_t;
  state_t state;

  assign load = (state == S_IDLE) && start;
  assign run  = (state == S_RUN);
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      step   <= '0;
      wr_out <= 1'b0;
      done   <= 1'b0;
    end else begin
      wr_out <= (state == S_RUN);
      done   <= (state == S_FLUSH);
      unique case (state)
        S_IDLE: if (start) begin
          step  <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          step <= step + 1'b1;
          if (last || step == '1) state <= S_FLUSH;
        end
        S_FLUSH: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // done is a single-cycle pulse
  assert property (@(posedge clk) disable iff (!rst_n) done |=> !done);

endmodule
