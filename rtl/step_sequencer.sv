// step_sequencer: step counter and run control for one systolic array.
//
// A start pulse, accepted whenever no computation is running, raises load
// for one cycle (the array latches its input matrices and empties its
// channels) and sets the step counter to T_BEGIN. From the next cycle on,
// each clock cycle is one systolic step: step counts up by one until it
// reaches T_END, after which the sequencer sits in ST_DONE until the next
// start. Steps may be negative: the method lets the step function fix the
// number of the first parallel command, and data must enter the array
// some steps before that ("soaking") and leave some steps after the last
// one ("draining").
//
// Interface: start in; load, run (high during the steps T_BEGIN..T_END),
// done (high after the last step) and the signed step number out.
module step_sequencer
  import systolic_pkg::*;
#(
  parameter int T_BEGIN = 0,
  parameter int T_END   = 9
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  output logic  load,
  output logic  run,
  output logic  done,
  output step_t step
);

  run_state_e st;

  assign load = start && (st != ST_RUN);
  assign run  = (st == ST_RUN);
  assign done = (st == ST_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= ST_IDLE;
      step <= step_t'(T_BEGIN);
    end else if (load) begin
      st   <= ST_RUN;
      step <= step_t'(T_BEGIN);
    end else if (st == ST_RUN) begin
      if (step == step_t'(T_END)) st <= ST_DONE;
      else                        step <= step + step_t'(1);
    end
  end

  a_order : assert property (@(posedge clk) disable iff (!rst_n)
                             T_BEGIN <= T_END);

endmodule
