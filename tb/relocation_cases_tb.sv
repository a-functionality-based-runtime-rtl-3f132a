// relocation_cases_tb: relocation time of the case-study application at
// 0 %, 50 % and 100 % memorized outputs, at the default sizes.
//
// The three CORDIC circuits (behavioural model, latencies 15, 19 and 56
// cycles) are memorized to the given level, then all three are relocated
// by function under a 1 ms (100000-cycle) constraint.  The template takes
// 8230 cycles (82.30 us) to configure and accepts one copy word every
// COPY_PACE cycles.  For each level the testbench checks:
//   - the request succeeds and moves all three circuits to the template;
//   - R_t reported by the duration evaluator equals an independent sum
//     T_CFG + sum(n_i * e_i + Mt_i) over the three circuits;
//   - the number of circuit runs started by the FILL sweep equals the number
//     of missing outputs, and the fill time lies between sum(n_i * e_i) and
//     that plus one cycle per memorized word (+ a small constant), i.e. the
//     scan for missing words hides behind the computations;
//   - the configure time is T_CFG and the copy time 768 words at the pace;
//   - the total stays within the constraint;
//   - afterwards every one of the 768 inputs is answered by the template with
//     the circuit's result and latency.
// Between levels the circuits are reconfigured (dpr_event), which clears
// their memorized outputs and returns their traffic to the originals.  The
// measured times are printed in microseconds at 100 MHz.
module relocation_cases_tb;
  import reloc_pkg::*;
  import cordic_ref_pkg::*;

  localparam int unsigned T_CFG     = 8230;    // template configuration, cycles
  localparam int unsigned T_AREA    = 200;     // area finder budget, cycles
  localparam int unsigned COPY_PACE = 6;       // copy stream: 1 word per 6 cycles
  localparam int unsigned MT_TASK   = 256 * COPY_PACE;
  localparam int unsigned DEADLINE  = 100000;  // 1 ms at 100 MHz

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic                 tm_wr_en = 0;
  logic [TASK_W-1:0]    tm_wr_id = 0;
  task_entry_t          tm_wr_entry = '0;
  logic                 dur_wr_en = 0;
  logic [TASK_W-1:0]    dur_wr_task = 0;
  logic [15:0]          dur_wr_e = 0, dur_wr_mt = 0;
  logic                 dur_glob_wr_en = 0;
  logic [31:0]          dur_t_cfg = 0, dur_t_area = 0;
  logic                 st_wr_en = 0;
  logic [4:0]           st_row = 0;
  logic [5:0]           st_col = 0;
  logic                 st_val = 0;
  logic                 loc_wr_en = 0;
  logic [2:0]           loc_idx = 0;
  logic                 loc_valid = 0;
  logic [4:0]           loc_row = 0;
  logic [5:0]           loc_col = 0;
  logic [5:0]           loc_height = 0;
  logic [6:0]           loc_width = 0;
  logic                 user_start = 0;
  logic [TASK_W-1:0]    user_task = 0;
  logic [IN_W-1:0]      user_data = 0;
  logic                 user_ready, res_done, res_from_template;
  logic [OUT_W-1:0]     res_data;
  logic                 chk_done, chk_hit, save_done;
  logic [OUT_W-1:0]     chk_data;
  logic [OM_AW-1:0]     task_base;
  logic                 app_start, app_done;
  logic [TASK_W-1:0]    app_task;
  logic [IN_W-1:0]      app_data;
  logic [OUT_W-1:0]     app_dout;
  logic                 app_busy;
  logic                 req_valid = 0;
  logic [NUM_TASKS-1:0] req_mask = 0;
  logic [31:0]          req_deadline = 0;
  logic                 req_dbr_ok = 0;
  logic                 req_ready, rel_done;
  reloc_result_t        rel_code;
  logic [31:0]          rel_cycles, rel_fill_cycles, rel_cfg_cycles, rel_copy_cycles, rel_estimate;
  logic [NUM_TASKS-1:0] relocated_mask;
  logic                 dpr_event = 0;
  logic [TASK_W-1:0]    dpr_task = 0;
  logic                 bs_cfg_start, tpl_cfg_start, copy_valid;
  logic                 bs_cfg_done = 0, tpl_cfg_done = 0, copy_ready = 0;
  logic [4:0]           tpl_row;
  logic [5:0]           tpl_col;
  logic [2:0]           tpl_loc;
  copy_word_t           copy_word;
  logic                 dpr_swap = 0;
  logic [1:0]           swap_task = 0;
  int unsigned          swap_lat = 0;

  relocation_system dut (.*);

  cordic_app_model app (
    .clk, .rst_n, .start(app_start), .task_id(app_task), .din(app_data),
    .done(app_done), .dout(app_dout), .busy(app_busy),
    .dpr_swap, .swap_task, .swap_lat
  );

  // circuit runs not started by the user are FILL runs
  int n_fill_runs = 0;
  always @(posedge clk)
    if (rst_n && app_start && !user_start) n_fill_runs++;

  // self-reconfiguration controller model: template configuration only
  initial begin
    forever begin
      @(posedge clk);
      if (tpl_cfg_start) begin
        repeat (T_CFG - 1) @(posedge clk);
        tpl_cfg_done <= 1'b1;
        @(posedge clk);
        tpl_cfg_done <= 1'b0;
      end
    end
  end

  int unsigned pace = 0;
  always @(posedge clk) begin
    pace       <= (pace == COPY_PACE - 1) ? 0 : pace + 1;
    copy_ready <= (pace == COPY_PACE - 1);
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, msg);
    end
  endtask

  // one user computation: result, latency and serving unit
  task automatic user_op(input int t, input logic [7:0] d, input bit expect_tpl);
    longint unsigned t0;
    @(negedge clk);
    while (!user_ready) @(negedge clk);
    user_start = 1; user_task = 2'(t); user_data = d;
    @(posedge clk);
    t0 = cyc;
    @(negedge clk);
    user_start = 0;
    do begin @(posedge clk); #1; end while (!res_done);
    check(res_data == compute(32'(t), d), $sformatf("task %0d in %0d: got %0d", t, d, res_data));
    check(cyc - t0 == longint'(latency(t)), $sformatf("task %0d latency %0d", t, cyc - t0));
    check(res_from_template == expect_tpl, $sformatf("task %0d served by the wrong unit", t));
    // let a SAVE finish before the next request
    @(posedge clk); @(posedge clk);
  endtask

  task automatic reconfigure(input int t);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    dpr_event = 1; dpr_task = 2'(t);
    @(negedge clk);
    dpr_event = 0;
    @(negedge clk);
    while (!req_ready) @(negedge clk);
  endtask

  // memorize the lowest pct % of the inputs of each of the three circuits
  task automatic memorize(input int pct, output int n_missing [3]);
    for (int t = 0; t < 3; t++) begin
      n_missing[t] = 256;
      for (int d = 0; d < 256; d++)
        if (d * 100 < pct * 256) begin
          user_op(t, 8'(d), 0);
          n_missing[t]--;
        end
    end
  endtask

  task automatic relocate_case(input int pct);
    int          n_missing [3];
    int unsigned exp_rt, sum_ne;
    int          runs0;
    memorize(pct, n_missing);
    exp_rt = T_CFG;
    sum_ne = 0;
    for (int t = 0; t < 3; t++) begin
      exp_rt += n_missing[t] * latency(t) + MT_TASK;
      sum_ne += n_missing[t] * latency(t);
    end
    runs0 = n_fill_runs;

    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_mask = 4'b0111; req_deadline = DEADLINE; req_dbr_ok = 0;
    @(negedge clk);
    req_valid = 0;
    while (!rel_done) @(negedge clk);

    check(rel_code == RES_FBR_DONE, $sformatf("%0d %%: relocation code %0d", pct, rel_code));
    check(relocated_mask == 4'b0111, "all three circuits relocated");
    check(rel_estimate == exp_rt, $sformatf("%0d %%: R_t %0d, expected %0d", pct, rel_estimate, exp_rt));
    check(n_fill_runs - runs0 == n_missing[0] + n_missing[1] + n_missing[2],
          $sformatf("%0d %%: %0d fill runs", pct, n_fill_runs - runs0));
    check(rel_fill_cycles >= sum_ne &&
          rel_fill_cycles <= sum_ne + (768 - n_fill_runs + runs0) + 32,
          $sformatf("%0d %%: fill time %0d for sum(n*e) %0d", pct, rel_fill_cycles, sum_ne));
    check(rel_cfg_cycles >= T_CFG && rel_cfg_cycles <= T_CFG + 2,
          $sformatf("configure time %0d", rel_cfg_cycles));
    check(rel_copy_cycles >= 768 * COPY_PACE - COPY_PACE && rel_copy_cycles <= 768 * COPY_PACE + 16,
          $sformatf("copy time %0d", rel_copy_cycles));
    check(rel_cycles <= DEADLINE, "relocation within 1 ms");
    check(rel_cycles >= rel_fill_cycles + rel_cfg_cycles + rel_copy_cycles, "total covers the steps");
    $display("%3d %% memorized: missing %0d, total %0d.%02d us (compute %0d.%02d, configure %0d.%02d, copy %0d.%02d), R_t %0d cycles",
             pct, n_missing[0] + n_missing[1] + n_missing[2],
             rel_cycles / 100, rel_cycles % 100, rel_fill_cycles / 100, rel_fill_cycles % 100,
             rel_cfg_cycles / 100, rel_cfg_cycles % 100, rel_copy_cycles / 100, rel_copy_cycles % 100,
             rel_estimate);

    // the relocated equivalent answers every input like the original
    for (int t = 0; t < 3; t++)
      for (int d = 0; d < 256; d++) user_op(t, 8'(d), 1);

    // reconfiguring the circuits returns their traffic and clears the memory
    for (int t = 0; t < 3; t++) reconfigure(t);
    check(relocated_mask == '0, "traffic back on the original circuits");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    for (int t = 0; t < 4; t++) begin
      tm_wr_en = 1; tm_wr_id = 2'(t);
      tm_wr_entry = '{relocatable: (t < 3), base: 11'(t * 256), off_bits: 4'd8, tol: 4'd0};
      dur_wr_en = 1; dur_wr_task = 2'(t); dur_wr_e = 16'(latency(t)); dur_wr_mt = 16'(MT_TASK);
      @(negedge clk);
    end
    tm_wr_en = 0; dur_wr_en = 0;
    dur_glob_wr_en = 1; dur_t_cfg = T_CFG; dur_t_area = T_AREA;
    @(negedge clk);
    dur_glob_wr_en = 0;
    // three free candidate locations, one used up by each relocation
    for (int i = 0; i < 3; i++) begin
      loc_wr_en = 1; loc_idx = 3'(i); loc_valid = 1;
      loc_row = 5'(8 * i); loc_col = 6'(16 * i); loc_height = 6; loc_width = 8;
      @(negedge clk);
    end
    loc_wr_en = 0;

    for (int t = 0; t < 3; t++) reconfigure(t);   // clear the output memory

    relocate_case(0);     // worst case
    relocate_case(50);
    relocate_case(100);   // best case

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
