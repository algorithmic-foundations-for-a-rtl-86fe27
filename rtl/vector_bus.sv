// vector_bus: broadcast of vector commands to all bank controllers.
//
// The vector command unit hands over one command at a time; the bus registers
// it and presents it to every bank controller for exactly one cycle. It then
// watches the controllers' busy lines and signals op_done, for one cycle, once
// all of them have finished (issued every access and received every read).
// Broadcasting one command to all controllers follows the paper; the
// one-cycle register stage and the busy/done completion protocol are this
// design's own choices.
//
// Timing: issue on edge E0 (issue_valid && issue_ready) -> bc_cmd_valid high
// between E0 and E1 -> controllers busy from E1 -> op_done is combinational in
// the first cycle after E1 in which no controller is busy.
// Reset is synchronous and active low.
module vector_bus
  import pva_pkg::*;
#(
  parameter int N_BC = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  // from the vector command unit
  input  logic            issue_valid,
  output logic            issue_ready,
  input  vec_cmd_t        issue_cmd,
  output logic            op_done,
  // to / from the bank controllers
  output logic            bc_cmd_valid,
  output vec_cmd_t        bc_cmd,
  input  logic [N_BC-1:0] bc_busy
);
  logic pending;

  assign issue_ready = !pending;
  assign op_done     = pending && !bc_cmd_valid && (bc_busy == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pending      <= 1'b0;
      bc_cmd_valid <= 1'b0;
      bc_cmd       <= '0;
    end else begin
      bc_cmd_valid <= 1'b0;
      if (issue_valid && issue_ready) begin
        bc_cmd       <= issue_cmd;
        bc_cmd_valid <= 1'b1;
        pending      <= 1'b1;
      end else if (op_done) begin
        pending <= 1'b0;
      end
    end
  end

  // The broadcast reaches idle controllers only.
  a_bc_free: assert property (@(posedge clk) disable iff (!rst_n)
    issue_valid && issue_ready |-> bc_busy == '0);
endmodule
