// duration_evaluator: checks that a relocation can finish within its time
// constraint.
//
// A LUT RAM holds, per circuit (Task ID), e, the cycles the circuit takes to
// compute one output, and Mt, the cycles needed to copy its section of the
// output memory into the template.  Two registers hold the cycles needed to
// configure the template and to run the area finder.  For a request naming
// a set of circuits (task_mask) the unit evaluates
//
//     R_t = sum over circuits of (n_i * e_i + Mt_i) + C_t,
//     C_t = max(template configuration time, area finder time),
//
// where n_i is the number of outputs still missing from the memorizer, read
// through missing_task/missing_cnt, and accepts the request if R_t does not
// exceed the deadline.  All times are in clock cycles.
//
// When a circuit is changed by partial reconfiguration (dpr_event) its e is
// re-measured: the cycles from the next meas_start of that circuit to its
// meas_done are written into the table.
//
// Timing: one cycle to take the request, one cycle per Task ID up to the
// highest one in the mask, then one to compare: res_valid is high at most
// NUM_TASKS + 2 cycles after the cycle of req_valid.  req_valid is only
// honoured when res_busy is low.
// From the design description: the LUT RAM of per-circuit timing, equation
// (1), C_t as the larger of configuration and area-finder time, and the
// re-measurement of e after reconfiguration.  e_rd_task/e_rd let the
// relocation controller hand each circuit's e to the template's delay block.  This design's own choices:
// the sequential accumulation, the table layout and the write ports.
module duration_evaluator
  import reloc_pkg::*;
#(
  parameter int unsigned TIME_W = 32,   // width of a duration in cycles
  parameter int unsigned E_W    = 16    // width of e and Mt entries
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // table write port
  input  logic                 wr_en,
  input  logic [TASK_W-1:0]    wr_task,
  input  logic [E_W-1:0]       wr_e,
  input  logic [E_W-1:0]       wr_mt,
  input  logic                 glob_wr_en,
  input  logic [TIME_W-1:0]    glob_t_cfg,
  input  logic [TIME_W-1:0]    glob_t_area,
  // request
  input  logic                 req_valid,
  input  logic [NUM_TASKS-1:0] req_mask,
  input  logic [TIME_W-1:0]    req_deadline,
  output logic                 res_busy,
  output logic                 res_valid,
  output logic                 res_ok,
  output logic [TIME_W-1:0]    res_time,
  // missing-output counts from the output memorizer
  output logic [TASK_W-1:0]    missing_task,
  input  logic [IN_W:0]        missing_cnt,
  // re-measurement of e
  input  logic                 dpr_event,
  input  logic [TASK_W-1:0]    dpr_task,
  input  logic                 meas_start,
  input  logic [TASK_W-1:0]    meas_task,
  input  logic                 meas_done,
  input  logic [TASK_W-1:0]    e_rd_task,
  output logic [E_W-1:0]       e_rd          // current e of e_rd_task
);

  logic [E_W-1:0]       e_tab  [NUM_TASKS];
  logic [E_W-1:0]       mt_tab [NUM_TASKS];
  logic [TIME_W-1:0]    t_cfg_q, t_area_q;
  logic [NUM_TASKS-1:0] rearm_q;

  logic                 run_q;
  logic [TASK_W-1:0]    idx_q;
  logic [NUM_TASKS-1:0] mask_q;
  logic [TIME_W-1:0]    deadline_q;
  logic [TIME_W-1:0]    acc_q;

  logic                 meas_run_q;
  logic [TASK_W-1:0]    meas_task_q;
  logic [E_W-1:0]       meas_cnt_q;

  logic [TIME_W-1:0]    term;
  logic [TIME_W-1:0]    c_t;
  logic [TIME_W-1:0]    total;

  assign missing_task = idx_q;
  assign e_rd         = e_tab[e_rd_task];
  assign res_busy     = run_q;

  assign term  = TIME_W'(missing_cnt) * TIME_W'(e_tab[idx_q]) + TIME_W'(mt_tab[idx_q]);
  assign c_t   = (t_cfg_q > t_area_q) ? t_cfg_q : t_area_q;
  assign total = acc_q + c_t;

  // Request evaluation.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run_q      <= 1'b0;
      idx_q      <= '0;
      mask_q     <= '0;
      deadline_q <= '0;
      acc_q      <= '0;
      res_valid  <= 1'b0;
      res_ok     <= 1'b0;
      res_time   <= '0;
    end else begin
      res_valid <= 1'b0;
      if (!run_q) begin
        if (req_valid) begin
          run_q      <= 1'b1;
          idx_q      <= '0;
          mask_q     <= req_mask;
          deadline_q <= req_deadline;
          acc_q      <= '0;
        end
      end else if (mask_q != '0) begin
        if (mask_q[idx_q]) acc_q <= acc_q + term;
        mask_q[idx_q] <= 1'b0;
        idx_q         <= idx_q + 1'b1;
      end else begin
        run_q     <= 1'b0;
        idx_q     <= '0;
        res_valid <= 1'b1;
        res_time  <= total;
        res_ok    <= (total <= deadline_q);
      end
    end
  end

  // Timing table, global times and re-measurement of e.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_TASKS; i++) begin
        e_tab[i]  <= '0;
        mt_tab[i] <= '0;
      end
      t_cfg_q     <= '0;
      t_area_q    <= '0;
      rearm_q     <= '0;
      meas_run_q  <= 1'b0;
      meas_task_q <= '0;
      meas_cnt_q  <= '0;
    end else begin
      if (wr_en) begin
        e_tab[wr_task]  <= wr_e;
        mt_tab[wr_task] <= wr_mt;
      end
      if (glob_wr_en) begin
        t_cfg_q  <= glob_t_cfg;
        t_area_q <= glob_t_area;
      end
      if (dpr_event) rearm_q[dpr_task] <= 1'b1;

      if (meas_start && rearm_q[meas_task]) begin
        meas_run_q  <= 1'b1;
        meas_task_q <= meas_task;
        meas_cnt_q  <= E_W'(1);
      end else if (meas_run_q) begin
        if (meas_done) begin
          meas_run_q           <= 1'b0;
          e_tab[meas_task_q]   <= meas_cnt_q;
          rearm_q[meas_task_q] <= 1'b0;
        end else begin
          meas_cnt_q <= meas_cnt_q + 1'b1;
        end
      end
    end
  end

endmodule
