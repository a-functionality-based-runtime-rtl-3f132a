// output_memorizer: saves the results of selected circuits while they run.
//
// Three units wired as in the architectural overview of the design: the task
// memory turns the Task ID into the circuit's Base_Addr, the memo logic
// forms Base_Addr + offset from the circuit's input and runs the CHECK, SAVE
// and sweep modes, and the output memory holds {output, valid bit} words.
// The memorizer sits beside the circuit: it sees the circuit's input
// (start/data_in) and its result (app_done/app_dout), and never stalls it.
//
// Interface: task-memory write port; Mode/start/Task ID/Data Input; the
// circuit's Data Output and done; CHECK results (chk_done, hit, out_data);
// save_done; the Task Base Address; fill requests to the circuit; the copy
// stream towards the memory template; the missing-output count per task.
// Timing: as memo_logic (CHECK 3 cycles, SAVE 2 cycles).
module output_memorizer
  import reloc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // task-memory write port
  input  logic               tm_wr_en,
  input  logic [TASK_W-1:0]  tm_wr_id,
  input  task_entry_t        tm_wr_entry,
  // command and circuit input
  input  memo_mode_t         mode,
  input  logic               start,
  input  logic [TASK_W-1:0]  task_id,
  input  logic [IN_W-1:0]    data_in,
  output logic               busy,
  output task_entry_t        task_entry,     // Task Base Address and fields
  output logic [NUM_TASKS-1:0] reloc_mask,    // relocatable flags of all tasks
  // circuit output
  input  logic               app_done,
  input  logic [OUT_W-1:0]   app_dout,
  // results
  output logic               chk_done,
  output logic               hit,
  output logic [OUT_W-1:0]   out_data,
  output logic               save_done,
  output logic               fill_start,
  output logic [IN_W-1:0]    fill_data,
  output logic               copy_valid,
  input  logic               copy_ready,
  output copy_word_t         copy_word,
  output logic               sweep_done,
  input  logic [TASK_W-1:0]  missing_task,
  output logic [IN_W:0]      missing_cnt
);

  logic               om_we;
  logic [OM_AW-1:0]   om_waddr, om_raddr;
  logic [OM_DW-1:0]   om_wdata, om_rdata;

  task_memory u_task_memory (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_en    (tm_wr_en),
    .wr_id    (tm_wr_id),
    .wr_entry (tm_wr_entry),
    .rd_id    (task_id),
    .rd_entry (task_entry),
    .reloc_mask (reloc_mask)
  );

  memo_logic u_memo_logic (
    .clk          (clk),
    .rst_n        (rst_n),
    .mode         (mode),
    .start        (start),
    .task_id      (task_id),
    .entry        (task_entry),
    .data_in      (data_in),
    .busy         (busy),
    .app_done     (app_done),
    .app_dout     (app_dout),
    .chk_done     (chk_done),
    .hit          (hit),
    .out_data     (out_data),
    .save_done    (save_done),
    .fill_start   (fill_start),
    .fill_data    (fill_data),
    .copy_valid   (copy_valid),
    .copy_ready   (copy_ready),
    .copy_word    (copy_word),
    .sweep_done   (sweep_done),
    .missing_task (missing_task),
    .missing_cnt  (missing_cnt),
    .om_we        (om_we),
    .om_waddr     (om_waddr),
    .om_wdata     (om_wdata),
    .om_raddr     (om_raddr),
    .om_rdata     (om_rdata)
  );

  output_memory u_output_memory (
    .clk   (clk),
    .we    (om_we),
    .waddr (om_waddr),
    .wdata (om_wdata),
    .raddr (om_raddr),
    .rdata (om_rdata)
  );

endmodule
