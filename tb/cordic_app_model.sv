// cordic_app_model: behavioural stand-in for the case-study application, a
// wrapper around three CORDIC cores (square root, sine, tanh) selected by a
// Task ID.  Not synthesizable logic of the relocation system: the real cores
// are vendor IP.
//
// Interface: start/task_id/din start one computation (ignored while busy);
// done pulses for one cycle latency(task_id) cycles after start, with dout
// valid in that cycle and held afterwards.  dpr_swap changes the latency of a
// task to swap_lat, modelling a circuit changed by partial reconfiguration.
module cordic_app_model
  import cordic_ref_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [1:0] task_id,
  input  logic [7:0] din,
  output logic       done,
  output logic [7:0] dout,
  output logic       busy,
  input  logic       dpr_swap,
  input  logic [1:0] swap_task,
  input  int unsigned swap_lat
);

  int unsigned lat [4];
  int unsigned cnt;
  logic [7:0]  result;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) lat[i] <= latency(i);
      busy   <= 1'b0;
      done   <= 1'b0;
      dout   <= '0;
      cnt    <= 0;
      result <= '0;
    end else begin
      done <= 1'b0;
      if (dpr_swap) lat[swap_task] <= swap_lat;
      if (!busy) begin
        if (start) begin
          busy   <= 1'b1;
          cnt    <= lat[task_id] - 1;
          result <= compute(32'(task_id), din);
        end
      end else if (cnt <= 1) begin
        busy <= 1'b0;
        done <= 1'b1;
        dout <= result;
      end else begin
        cnt <= cnt - 1;
      end
    end
  end

endmodule
