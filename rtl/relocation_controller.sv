// relocation_controller: runs one relocation request through the relocation
// flow.
//
// A request names a set of circuits (req_mask) and a time constraint in
// cycles.  The flow is:
//   1. DBR check: if the direct-bitstream relocater reports that an identical
//      location is available and profitable (req_dbr_ok), the original
//      bitstream is configured there (bs_cfg_start/bs_cfg_done) and success
//      is reported.
//   2. FBR check: every circuit of the request must be listed as relocatable
//      by functionality in the task memory (reloc_mask).
//   3. Duration check by the duration evaluator against the deadline.
//   4. Area check: the area finder scans for a free template location.
//   5. Compute missing outputs: a FILL sweep of the output memorizer for each
//      circuit of the request.
//   6. Configure the template at the location found (tpl_cfg_start/
//      tpl_cfg_done, carried out by the self-reconfiguration controller).
//   7. Copy data: a COPY sweep for each circuit streams its memorized outputs
//      into the template; the circuit's e is written into the template's
//      delay table at the same time.
//   8. Report success: the area is committed as used and the circuits are
//      marked as relocated (relocated_mask), which moves their traffic to
//      the template.
// A failed check 2, 3 or 4 declines the request.  Outside a request the
// controller also runs refresh sweeps (ref_valid/ref_task), used when a
// circuit has been changed by partial reconfiguration.
//
// res_valid pulses with res_code and res_cycles, the cycles from accepting
// the request to the report; fill_cycles, cfg_cycles and copy_cycles give
// the share of steps 5, 6 and 7.  An e wider than the template's delay
// table is saturated to its largest value.  req_valid and ref_valid are taken only
// when idle is high.
// The order of the steps and the three checks follow the operational flow
// of the design description; the handshakes, the request mask and the
// cycle counters are this design's own choices.
module relocation_controller
  import reloc_pkg::*;
#(
  parameter int unsigned TIME_W = 32,
  parameter int unsigned E_W    = 16,
  parameter int unsigned LAT_W  = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // relocation request
  input  logic                 req_valid,
  input  logic [NUM_TASKS-1:0] req_mask,
  input  logic [TIME_W-1:0]    req_deadline,
  input  logic                 req_dbr_ok,
  output logic                 idle,
  output logic                 res_valid,
  output reloc_result_t        res_code,
  output logic [TIME_W-1:0]    res_cycles,
  output logic [TIME_W-1:0]    fill_cycles,
  output logic [TIME_W-1:0]    cfg_cycles,
  output logic [TIME_W-1:0]    copy_cycles,
  output logic [NUM_TASKS-1:0] relocated_mask,
  // refresh request
  input  logic                 ref_valid,
  input  logic [TASK_W-1:0]    ref_task,
  // direct bitstream configuration
  output logic                 bs_cfg_start,
  input  logic                 bs_cfg_done,
  // output memorizer
  input  logic [NUM_TASKS-1:0] reloc_mask,
  output logic                 mem_start,
  output memo_mode_t           mem_mode,
  output logic [TASK_W-1:0]    mem_task,
  output logic                 mem_sweeping,   // the memorizer belongs to the controller
  input  logic                 mem_busy,
  input  logic                 mem_sweep_done,
  // duration evaluator
  output logic                 dur_req,
  output logic [NUM_TASKS-1:0] dur_mask,
  output logic [TIME_W-1:0]    dur_deadline,
  input  logic                 dur_valid,
  input  logic                 dur_ok,
  output logic [TASK_W-1:0]    e_rd_task,
  input  logic [E_W-1:0]       e_rd,
  // area finder
  output logic                 af_scan,
  input  logic                 af_done,
  input  logic                 af_found,
  output logic                 af_commit,
  input  logic                 af_commit_done,
  // template configuration and delay table
  output logic                 tpl_cfg_start,
  input  logic                 tpl_cfg_done,
  output logic                 tpl_lat_wr_en,
  output logic [TASK_W-1:0]    tpl_lat_task,
  output logic [LAT_W-1:0]     tpl_lat_val
);

  typedef enum logic [3:0] {
    C_IDLE, C_DBR, C_BS_WAIT, C_FBR, C_DUR, C_AREA,
    C_FILL_NEXT, C_FILL_WAIT, C_CFG, C_COPY_NEXT, C_COPY_WAIT,
    C_COMMIT, C_REF_START, C_REF_WAIT, C_REPORT
  } cstate_t;

  cstate_t              st;
  logic [NUM_TASKS-1:0] mask_q;
  logic [NUM_TASKS-1:0] work_q;
  logic [TIME_W-1:0]    deadline_q;
  logic                 dbr_q;
  logic [TASK_W-1:0]    task_q;
  logic [TIME_W-1:0]    cyc_q;
  reloc_result_t        code_q;
  logic [TASK_W-1:0]    first_task;

  // e saturated to the width of the template's delay table
  logic [LAT_W-1:0] lat_sat;
  assign lat_sat = (e_rd > E_W'({LAT_W{1'b1}})) ? {LAT_W{1'b1}} : LAT_W'(e_rd);

  // lowest circuit still to be processed
  always_comb begin
    first_task = '0;
    for (int i = NUM_TASKS - 1; i >= 0; i--)
      if (work_q[i]) first_task = TASK_W'(i);
  end

  assign idle         = (st == C_IDLE);
  assign mem_task     = task_q;
  assign mem_sweeping = st inside {C_FILL_NEXT, C_FILL_WAIT, C_COPY_NEXT, C_COPY_WAIT,
                                   C_REF_START, C_REF_WAIT};
  assign dur_mask     = mask_q;
  assign dur_deadline = deadline_q;
  assign e_rd_task    = task_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st             <= C_IDLE;
      mask_q         <= '0;
      work_q         <= '0;
      deadline_q     <= '0;
      dbr_q          <= 1'b0;
      task_q         <= '0;
      cyc_q          <= '0;
      code_q         <= RES_NONE;
      res_valid      <= 1'b0;
      res_code       <= RES_NONE;
      res_cycles     <= '0;
      fill_cycles    <= '0;
      cfg_cycles     <= '0;
      copy_cycles    <= '0;
      relocated_mask <= '0;
      bs_cfg_start   <= 1'b0;
      mem_start      <= 1'b0;
      mem_mode       <= MODE_MEMO;
      dur_req        <= 1'b0;
      af_scan        <= 1'b0;
      af_commit      <= 1'b0;
      tpl_cfg_start  <= 1'b0;
      tpl_lat_wr_en  <= 1'b0;
      tpl_lat_task   <= '0;
      tpl_lat_val    <= '0;
    end else begin
      res_valid     <= 1'b0;
      bs_cfg_start  <= 1'b0;
      mem_start     <= 1'b0;
      dur_req       <= 1'b0;
      af_scan       <= 1'b0;
      af_commit     <= 1'b0;
      tpl_cfg_start <= 1'b0;
      tpl_lat_wr_en <= 1'b0;
      if (st != C_IDLE) cyc_q <= cyc_q + 1'b1;
      if (st inside {C_FILL_NEXT, C_FILL_WAIT}) fill_cycles <= fill_cycles + 1'b1;
      if (st == C_CFG) cfg_cycles <= cfg_cycles + 1'b1;
      if (st inside {C_COPY_NEXT, C_COPY_WAIT}) copy_cycles <= copy_cycles + 1'b1;

      unique case (st)
        C_IDLE: begin
          mem_mode <= MODE_MEMO;
          if (req_valid) begin
            mask_q      <= req_mask;
            deadline_q  <= req_deadline;
            dbr_q       <= req_dbr_ok;
            cyc_q       <= TIME_W'(1);
            fill_cycles <= '0;
            cfg_cycles  <= '0;
            copy_cycles <= '0;
            st          <= C_DBR;
          end else if (ref_valid) begin
            task_q <= ref_task;
            st     <= C_REF_START;
          end
        end

        C_DBR: begin
          if (dbr_q) begin
            bs_cfg_start <= 1'b1;
            st           <= C_BS_WAIT;
          end else begin
            st <= C_FBR;
          end
        end

        C_BS_WAIT: begin
          if (bs_cfg_done) begin
            code_q <= RES_DBR_DONE;
            st     <= C_REPORT;
          end
        end

        C_FBR: begin
          if (mask_q != '0 && (mask_q & ~reloc_mask) == '0) begin
            dur_req <= 1'b1;
            st      <= C_DUR;
          end else begin
            code_q <= RES_NOT_MEMO;
            st     <= C_REPORT;
          end
        end

        C_DUR: begin
          if (dur_valid) begin
            if (dur_ok) begin
              af_scan <= 1'b1;
              st      <= C_AREA;
            end else begin
              code_q <= RES_TOO_SLOW;
              st     <= C_REPORT;
            end
          end
        end

        C_AREA: begin
          if (af_done) begin
            if (af_found) begin
              work_q <= mask_q;
              st     <= C_FILL_NEXT;
            end else begin
              code_q <= RES_NO_AREA;
              st     <= C_REPORT;
            end
          end
        end

        // compute missing outputs, one circuit after the other
        C_FILL_NEXT: begin
          if (work_q == '0) begin
            tpl_cfg_start <= 1'b1;
            st            <= C_CFG;
          end else if (!mem_busy && !mem_start) begin
            task_q    <= first_task;
            mem_mode  <= MODE_FILL;
            mem_start <= 1'b1;
            st        <= C_FILL_WAIT;
          end
        end

        C_FILL_WAIT: begin
          if (mem_sweep_done) begin
            work_q[task_q] <= 1'b0;
            st             <= C_FILL_NEXT;
          end
        end

        C_CFG: begin
          if (tpl_cfg_done) begin
            work_q <= mask_q;
            st     <= C_COPY_NEXT;
          end
        end

        // copy the memorized outputs into the template
        C_COPY_NEXT: begin
          if (work_q == '0) begin
            af_commit <= 1'b1;
            st        <= C_COMMIT;
          end else if (!mem_busy && !mem_start) begin
            task_q    <= first_task;
            mem_mode  <= MODE_COPY;
            mem_start <= 1'b1;
            st        <= C_COPY_WAIT;
          end
        end

        C_COPY_WAIT: begin
          if (mem_sweep_done) begin
            tpl_lat_wr_en  <= 1'b1;
            tpl_lat_task   <= task_q;
            tpl_lat_val    <= lat_sat;
            work_q[task_q] <= 1'b0;
            st             <= C_COPY_NEXT;
          end
        end

        C_COMMIT: begin
          if (af_commit_done) begin
            relocated_mask <= relocated_mask | mask_q;
            code_q         <= RES_FBR_DONE;
            st             <= C_REPORT;
          end
        end

        // refresh of the valid bits of one circuit
        C_REF_START: begin
          if (!mem_busy && !mem_start) begin
            mem_mode  <= MODE_REFRESH;
            mem_start <= 1'b1;
            st        <= C_REF_WAIT;
          end
        end

        C_REF_WAIT: begin
          if (mem_sweep_done) begin
            relocated_mask[task_q] <= 1'b0;
            st                     <= C_IDLE;
          end
        end

        C_REPORT: begin
          res_valid  <= 1'b1;
          res_code   <= code_q;
          res_cycles <= cyc_q + 1'b1;
          st         <= C_IDLE;
        end

        default: st <= C_IDLE;
      endcase
    end
  end

  // A sweep is started only when the memorizer is free.
  a_sweep_free: assert property (@(posedge clk) disable iff (!rst_n)
    mem_start |-> !mem_busy);

endmodule
