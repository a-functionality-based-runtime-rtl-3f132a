// relocation_system: runtime relocation manager that can move a circuit
// either as its own bitstream or, when no identical location exists, by its
// function: the circuit's results are memorized while it runs and a generic
// memory template, filled with those results, takes its place.
//
// Contents:
//   output_memorizer       task memory, memo logic and output memory; watches
//                          every request the user sends to the circuits.
//   duration_evaluator     checks the time a relocation will take (eq. R_t).
//   area_finder            finds a free place for the template.
//   relocation_controller  runs the relocation flow.
//   memory_template        the relocated equivalent, filled by the copy step.
//
// The memorized circuits themselves (app_*), the direct-bitstream relocater
// (req_dbr_ok), the self-reconfiguration controller (bs_cfg_*, tpl_cfg_*,
// copy_ready) and the host that sets up the tables are outside; their
// signals are ports.  The copy step is modelled as a stream into the
// template's memory whose pace is set by copy_ready, standing in for the
// copy through the configuration layer.
//
// User traffic: user_start/user_task/user_data start one computation when
// user_ready is high; res_done/res_data return the result.  A task whose bit
// is set in relocated_mask is served by the template, with the same latency
// as the original circuit; any other task goes to the original circuit and is
// memorized if its task-memory entry is marked relocatable.  One computation
// is in flight at a time.
// dpr_event/dpr_task tell the system that a circuit was reconfigured: its
// memorized outputs are invalidated and its e is re-measured.
// The busy outputs of the duration evaluator and the area finder are left
// open: only the controller starts them, one request at a time.  Of the
// task-memory entry the top itself uses only base and tol.
module relocation_system
  import reloc_pkg::*;
#(
  parameter int unsigned ROWS     = 32,
  parameter int unsigned COLS     = 64,
  parameter int unsigned NUM_LOCS = 8,
  parameter int unsigned TIME_W   = 32,
  parameter int unsigned E_W      = 16,
  parameter int unsigned LAT_W    = 8,
  localparam int unsigned RW = $clog2(ROWS),
  localparam int unsigned CW = $clog2(COLS),
  localparam int unsigned LW = $clog2(NUM_LOCS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // host set-up: task memory
  input  logic                 tm_wr_en,
  input  logic [TASK_W-1:0]    tm_wr_id,
  input  task_entry_t          tm_wr_entry,
  // host set-up: duration evaluator
  input  logic                 dur_wr_en,
  input  logic [TASK_W-1:0]    dur_wr_task,
  input  logic [E_W-1:0]       dur_wr_e,
  input  logic [E_W-1:0]       dur_wr_mt,
  input  logic                 dur_glob_wr_en,
  input  logic [TIME_W-1:0]    dur_t_cfg,
  input  logic [TIME_W-1:0]    dur_t_area,
  // host set-up: area finder
  input  logic                 st_wr_en,
  input  logic [RW-1:0]        st_row,
  input  logic [CW-1:0]        st_col,
  input  logic                 st_val,
  input  logic                 loc_wr_en,
  input  logic [LW-1:0]        loc_idx,
  input  logic                 loc_valid,
  input  logic [RW-1:0]        loc_row,
  input  logic [CW-1:0]        loc_col,
  input  logic [RW:0]          loc_height,
  input  logic [CW:0]          loc_width,
  // user traffic
  input  logic                 user_start,
  input  logic [TASK_W-1:0]    user_task,
  input  logic [IN_W-1:0]      user_data,
  output logic                 user_ready,
  output logic                 res_done,
  output logic [OUT_W-1:0]     res_data,
  output logic                 res_from_template,
  // memo logic observation
  output logic                 chk_done,
  output logic                 chk_hit,
  output logic [OUT_W-1:0]     chk_data,
  output logic [OM_AW-1:0]     task_base,
  output logic                 save_done,
  // original circuits
  output logic                 app_start,
  output logic [TASK_W-1:0]    app_task,
  output logic [IN_W-1:0]      app_data,
  input  logic                 app_done,
  input  logic [OUT_W-1:0]     app_dout,
  // relocation request
  input  logic                 req_valid,
  input  logic [NUM_TASKS-1:0] req_mask,
  input  logic [TIME_W-1:0]    req_deadline,
  input  logic                 req_dbr_ok,
  output logic                 req_ready,
  output logic                 rel_done,
  output reloc_result_t        rel_code,
  output logic [TIME_W-1:0]    rel_cycles,
  output logic [TIME_W-1:0]    rel_fill_cycles,
  output logic [TIME_W-1:0]    rel_cfg_cycles,
  output logic [TIME_W-1:0]    rel_copy_cycles,
  output logic [TIME_W-1:0]    rel_estimate,
  output logic [NUM_TASKS-1:0] relocated_mask,
  // partial reconfiguration of a circuit
  input  logic                 dpr_event,
  input  logic [TASK_W-1:0]    dpr_task,
  // self-reconfiguration controller
  output logic                 bs_cfg_start,
  input  logic                 bs_cfg_done,
  output logic                 tpl_cfg_start,
  output logic [RW-1:0]        tpl_row,
  output logic [CW-1:0]        tpl_col,
  output logic [LW-1:0]        tpl_loc,
  input  logic                 tpl_cfg_done,
  output logic                 copy_valid,
  output copy_word_t           copy_word,
  input  logic                 copy_ready
);

  // controller <-> units
  logic                 mem_sweeping, ctrl_mem_start, mem_busy, sweep_done;
  memo_mode_t           ctrl_mem_mode;
  logic [TASK_W-1:0]    ctrl_task;
  logic [NUM_TASKS-1:0] reloc_mask;
  logic                 dur_req, dur_valid, dur_ok;
  logic [NUM_TASKS-1:0] dur_mask;
  logic [TIME_W-1:0]    dur_deadline;
  logic [TASK_W-1:0]    e_rd_task, missing_task;
  logic [E_W-1:0]       e_rd;
  logic [IN_W:0]        missing_cnt;
  logic                 af_scan, af_done, af_found, af_commit, af_commit_done;
  logic                 tpl_lat_wr_en;
  logic [TASK_W-1:0]    tpl_lat_task;
  logic [LAT_W-1:0]     tpl_lat_val;

  // memorizer signals
  logic                 memo_start;
  memo_mode_t           memo_mode;
  logic [TASK_W-1:0]    memo_task;
  task_entry_t          memo_entry;
  logic [OUT_W-1:0]     memo_out;
  logic                 fill_start;
  logic [IN_W-1:0]      fill_data;

  // user routing
  logic                 user_go, to_tpl;
  logic                 app_busy_q, app_user_q;
  logic                 tpl_busy, tpl_done;
  logic [OUT_W-1:0]     tpl_data;
  logic                 busy_to_ctrl;
  logic                 ctrl_idle;

  assign to_tpl     = relocated_mask[user_task];
  assign user_ready = !mem_sweeping && !mem_busy && !app_busy_q && !tpl_busy;
  assign user_go    = user_start && user_ready;

  assign memo_start = mem_sweeping ? ctrl_mem_start : (user_go && !to_tpl);
  assign memo_mode  = mem_sweeping ? ctrl_mem_mode  : MODE_MEMO;
  assign memo_task  = mem_sweeping ? ctrl_task      : user_task;

  assign app_start  = (user_go && !to_tpl) || fill_start;
  assign app_task   = mem_sweeping ? ctrl_task : user_task;
  assign app_data   = fill_start ? fill_data : user_data;

  assign res_done          = (app_done && app_user_q) || tpl_done;
  assign res_data          = tpl_done ? tpl_data : app_dout;
  assign res_from_template = tpl_done;

  assign busy_to_ctrl = mem_busy || app_busy_q;
  assign req_ready    = ctrl_idle;
  assign task_base    = memo_entry.base;
  assign chk_data     = memo_out;

  // one outstanding computation of the original circuits
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      app_busy_q <= 1'b0;
      app_user_q <= 1'b0;
    end else if (app_start) begin
      app_busy_q <= 1'b1;
      app_user_q <= !fill_start;
    end else if (app_done) begin
      app_busy_q <= 1'b0;
      app_user_q <= 1'b0;
    end
  end

  output_memorizer u_output_memorizer (
    .clk          (clk),
    .rst_n        (rst_n),
    .tm_wr_en     (tm_wr_en),
    .tm_wr_id     (tm_wr_id),
    .tm_wr_entry  (tm_wr_entry),
    .mode         (memo_mode),
    .start        (memo_start),
    .task_id      (memo_task),
    .data_in      (user_data),
    .busy         (mem_busy),
    .task_entry   (memo_entry),
    .reloc_mask   (reloc_mask),
    .app_done     (app_done),
    .app_dout     (app_dout),
    .chk_done     (chk_done),
    .hit          (chk_hit),
    .out_data     (memo_out),
    .save_done    (save_done),
    .fill_start   (fill_start),
    .fill_data    (fill_data),
    .copy_valid   (copy_valid),
    .copy_ready   (copy_ready),
    .copy_word    (copy_word),
    .sweep_done   (sweep_done),
    .missing_task (missing_task),
    .missing_cnt  (missing_cnt)
  );

  duration_evaluator #(.TIME_W(TIME_W), .E_W(E_W)) u_duration_evaluator (
    .clk          (clk),
    .rst_n        (rst_n),
    .wr_en        (dur_wr_en),
    .wr_task      (dur_wr_task),
    .wr_e         (dur_wr_e),
    .wr_mt        (dur_wr_mt),
    .glob_wr_en   (dur_glob_wr_en),
    .glob_t_cfg   (dur_t_cfg),
    .glob_t_area  (dur_t_area),
    .req_valid    (dur_req),
    .req_mask     (dur_mask),
    .req_deadline (dur_deadline),
    .res_busy     (),
    .res_valid    (dur_valid),
    .res_ok       (dur_ok),
    .res_time     (rel_estimate),
    .missing_task (missing_task),
    .missing_cnt  (missing_cnt),
    .dpr_event    (dpr_event),
    .dpr_task     (dpr_task),
    .meas_start   (app_start),
    .meas_task    (app_task),
    .meas_done    (app_done),
    .e_rd_task    (e_rd_task),
    .e_rd         (e_rd)
  );

  area_finder #(.ROWS(ROWS), .COLS(COLS), .NUM_LOCS(NUM_LOCS)) u_area_finder (
    .clk         (clk),
    .rst_n       (rst_n),
    .st_wr_en    (st_wr_en),
    .st_row      (st_row),
    .st_col      (st_col),
    .st_val      (st_val),
    .loc_wr_en   (loc_wr_en),
    .loc_idx     (loc_idx),
    .loc_valid   (loc_valid),
    .loc_row     (loc_row),
    .loc_col     (loc_col),
    .loc_height  (loc_height),
    .loc_width   (loc_width),
    .scan_start  (af_scan),
    .busy        (),
    .scan_done   (af_done),
    .found       (af_found),
    .found_loc   (tpl_loc),
    .found_row   (tpl_row),
    .found_col   (tpl_col),
    .commit      (af_commit),
    .commit_done (af_commit_done)
  );

  relocation_controller #(.TIME_W(TIME_W), .E_W(E_W), .LAT_W(LAT_W)) u_relocation_controller (
    .clk            (clk),
    .rst_n          (rst_n),
    .req_valid      (req_valid),
    .req_mask       (req_mask),
    .req_deadline   (req_deadline),
    .req_dbr_ok     (req_dbr_ok),
    .idle           (ctrl_idle),
    .res_valid      (rel_done),
    .res_code       (rel_code),
    .res_cycles     (rel_cycles),
    .fill_cycles    (rel_fill_cycles),
    .cfg_cycles     (rel_cfg_cycles),
    .copy_cycles    (rel_copy_cycles),
    .relocated_mask (relocated_mask),
    .ref_valid      (dpr_event),
    .ref_task       (dpr_task),
    .bs_cfg_start   (bs_cfg_start),
    .bs_cfg_done    (bs_cfg_done),
    .reloc_mask     (reloc_mask),
    .mem_start      (ctrl_mem_start),
    .mem_mode       (ctrl_mem_mode),
    .mem_task       (ctrl_task),
    .mem_sweeping   (mem_sweeping),
    .mem_busy       (busy_to_ctrl),
    .mem_sweep_done (sweep_done),
    .dur_req        (dur_req),
    .dur_mask       (dur_mask),
    .dur_deadline   (dur_deadline),
    .dur_valid      (dur_valid),
    .dur_ok         (dur_ok),
    .e_rd_task      (e_rd_task),
    .e_rd           (e_rd),
    .af_scan        (af_scan),
    .af_done        (af_done),
    .af_found       (af_found),
    .af_commit      (af_commit),
    .af_commit_done (af_commit_done),
    .tpl_cfg_start  (tpl_cfg_start),
    .tpl_cfg_done   (tpl_cfg_done),
    .tpl_lat_wr_en  (tpl_lat_wr_en),
    .tpl_lat_task   (tpl_lat_task),
    .tpl_lat_val    (tpl_lat_val)
  );

  memory_template #(.LAT_W(LAT_W)) u_memory_template (
    .clk       (clk),
    .rst_n     (rst_n),
    .wr_en     (copy_valid && copy_ready),
    .wr_addr   ({copy_word.task_id, copy_word.offset}),
    .wr_data   (copy_word.data),
    .lat_wr_en (tpl_lat_wr_en),
    .lat_task  (tpl_lat_task),
    .lat_val   (tpl_lat_val),
    .start     (user_go && to_tpl),
    .task_id   (user_task),
    .offset    (user_data >> memo_entry.tol),
    .busy      (tpl_busy),
    .done      (tpl_done),
    .data_out  (tpl_data)
  );

endmodule
