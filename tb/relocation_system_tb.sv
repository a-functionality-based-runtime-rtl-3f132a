// relocation_system_tb: end-to-end test of the relocation system at its
// default sizes.
//
// The case-study application (square root, sine and tanh cores behind a
// Task ID) is the behavioural model cordic_app_model.  The testbench plays
// the host, the user of the circuits, the direct-bitstream relocater and the
// self-reconfiguration controller (template configuration takes T_CFG
// cycles; the copy stream is accepted on one cycle in COPY_PACE).
//
// Sequence: set up the tables; refresh the three circuits; send random
// inputs until about half of the 768 outputs are memorized (checking every
// result, its latency and every memo hit); then requests that end in each
// outcome: direct bitstream, FBR check failed, area check failed, duration
// check failed (with R_t checked against an independent sum), and finally a
// functionality-based relocation of all three circuits.  Afterwards all 768
// inputs are sent again and must be answered by the template with the
// original results and latencies.  Last, circuit 0 is reconfigured with a
// new latency: its outputs must be invalidated, its traffic returned to the
// original circuit and its e re-measured.
// Each mechanism is counted and must have happened at least once.
module relocation_system_tb;
  import reloc_pkg::*;
  import cordic_ref_pkg::*;

  localparam int unsigned T_CFG      = 8230;   // template configuration, cycles
  localparam int unsigned T_AREA     = 200;    // area finder budget, cycles
  localparam int unsigned COPY_PACE  = 6;      // copy stream: 1 word per 6 cycles
  localparam int unsigned MT_TASK    = 256 * (COPY_PACE + 2);
  localparam int unsigned T_BS       = 500;    // direct bitstream configuration
  localparam int unsigned DEADLINE   = 100000; // 1 ms at 100 MHz

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // DUT signals
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

  // mechanism counters
  int n_hit = 0, n_save = 0, n_fill = 0, n_dbr = 0, n_not_memo = 0, n_too_slow = 0;
  int n_no_area = 0, n_fbr = 0, n_tpl = 0, n_refresh = 0, n_remeasure = 0, n_backpressure = 0;
  int n_copy = 0;

  int unsigned lat_exp [4] = '{15, 19, 56, 15};   // expected latency per task

  // testbench view of which outputs are memorized
  bit saved [4][256];

  always @(posedge clk) begin
    if (rst_n) begin
      if (app_start && !user_start) n_fill++;   // a start the user did not issue is a FILL
      if (copy_valid && !copy_ready) n_backpressure++;
      if (copy_valid && copy_ready) begin
        n_copy++;
        checks++;
        if (copy_word.data !== compute(32'(copy_word.task_id), copy_word.offset)) begin
          failures++;
          $display("FAIL copy word task %0d off %0d data %0h", copy_word.task_id,
                   copy_word.offset, copy_word.data);
        end
      end
    end
  end

  // self-reconfiguration controller model
  initial begin
    forever begin
      @(posedge clk);
      if (tpl_cfg_start) begin
        repeat (T_CFG - 1) @(posedge clk);
        tpl_cfg_done <= 1'b1;
        @(posedge clk);
        tpl_cfg_done <= 1'b0;
      end else if (bs_cfg_start) begin
        repeat (T_BS - 1) @(posedge clk);
        bs_cfg_done <= 1'b1;
        @(posedge clk);
        bs_cfg_done <= 1'b0;
      end
    end
  end

  int unsigned pace = 0;
  always @(posedge clk) begin
    pace <= (pace == COPY_PACE - 1) ? 0 : pace + 1;
    copy_ready <= (pace == COPY_PACE - 1);
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, msg);
    end
  endtask

  // one user computation with result, latency and memo checks
  task automatic user_op(input int t, input logic [7:0] d, input bit expect_tpl);
    longint unsigned t0;
    bit seen_chk = 0, hit = 0;
    logic [7:0] exp_v;
    exp_v = compute(32'(t), d);
    @(negedge clk);
    while (!user_ready) @(negedge clk);
    user_start = 1; user_task = 2'(t); user_data = d;
    @(posedge clk);
    t0 = cyc;
    @(negedge clk);
    user_start = 0;
    forever begin
      @(posedge clk);
      #1;
      if (chk_done) begin
        seen_chk = 1;
        hit = chk_hit;
        check(cyc - t0 == 3, $sformatf("CHECK took %0d cycles", cyc - t0));
        if (chk_hit) begin
          n_hit++;
          check(chk_data == exp_v, "memorized output differs");
        end
        check(chk_hit == saved[t][d], $sformatf("hit=%0d for task %0d in %0d", chk_hit, t, d));
      end
      if (res_done) break;
    end
    check(res_data == exp_v, $sformatf("task %0d in %0d: got %0d want %0d", t, d, res_data, exp_v));
    check(cyc - t0 == longint'(lat_exp[t]),
          $sformatf("task %0d latency %0d", t, cyc - t0));
    check(res_from_template == expect_tpl, "served by the wrong unit");
    if (res_from_template) n_tpl++;
    if (!expect_tpl && t < 3) check(seen_chk, "no CHECK for a memorized circuit");
    if (!expect_tpl && t < 3 && !hit) begin
      // SAVE completes 2 cycles after done
      @(posedge clk); #1;
      @(posedge clk); #1;
      check(save_done, "SAVE did not finish 2 cycles after done");
      n_save++;
      saved[t][d] = 1;
    end
  endtask

  task automatic request(input logic [3:0] mask, input int unsigned dl, input bit dbr,
                         output reloc_result_t code);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_mask = mask; req_deadline = dl; req_dbr_ok = dbr;
    @(negedge clk);
    req_valid = 0;
    while (!rel_done) @(negedge clk);
    code = rel_code;
  endtask

  task automatic refresh(input int t);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    dpr_event = 1; dpr_task = 2'(t);
    @(negedge clk);
    dpr_event = 0;
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    for (int i = 0; i < 256; i++) saved[t][i] = 0;
    n_refresh++;
  endtask

  function automatic int missing(input int t);
    int n = 0;
    for (int i = 0; i < 256; i++) if (!saved[t][i]) n++;
    return n;
  endfunction

  reloc_result_t code;
  int unsigned exp_rt;
  int          fills_expected;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- host set-up ----
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
    check(task_base == 11'd0, "base of task 0");
    // candidate locations: 0 at (0,0) 4x2, 1 at (8,20) 4x2
    loc_wr_en = 1; loc_idx = 0; loc_valid = 1; loc_row = 0; loc_col = 0; loc_height = 4; loc_width = 2;
    @(negedge clk);
    loc_idx = 1; loc_row = 8; loc_col = 20;
    @(negedge clk);
    loc_wr_en = 0;
    // both candidates damaged for now
    st_wr_en = 1; st_val = 1; st_row = 1; st_col = 1;
    @(negedge clk);
    st_row = 10; st_col = 21;
    @(negedge clk);
    st_wr_en = 0;

    // ---- refresh the three circuits ----
    for (int t = 0; t < 3; t++) refresh(t);

    // ---- normal operation: memorize about half the outputs ----
    for (int i = 0; i < 700; i++) begin
      int t;
      logic [7:0] d;
      t = $urandom_range(0, 3);
      d = 8'($urandom_range(0, 255));
      user_op(t, d, 0);
    end
    $display("memorized: %0d %0d %0d of 256", 256 - missing(0), 256 - missing(1), 256 - missing(2));

    // ---- DBR check succeeds: direct bitstream relocation ----
    request(4'b0111, DEADLINE, 1, code);
    check(code == RES_DBR_DONE, "DBR relocation");
    if (code == RES_DBR_DONE) n_dbr++;
    check(relocated_mask == '0, "DBR must not move traffic to the template");

    // ---- FBR check fails: task 3 is not memorized ----
    request(4'b1001, DEADLINE, 0, code);
    check(code == RES_NOT_MEMO, "FBR check");
    if (code == RES_NOT_MEMO) n_not_memo++;

    // ---- area check fails ----
    request(4'b0111, DEADLINE, 0, code);
    check(code == RES_NO_AREA, $sformatf("area check, code %0d", code));
    if (code == RES_NO_AREA) n_no_area++;

    // ---- duration check fails; R_t against an independent sum ----
    exp_rt = T_CFG;
    for (int t = 0; t < 3; t++) exp_rt += missing(t) * latency(t) + MT_TASK;
    request(4'b0111, 1000, 0, code);
    check(code == RES_TOO_SLOW, "duration check");
    if (code == RES_TOO_SLOW) n_too_slow++;
    check(rel_estimate == exp_rt, $sformatf("R_t %0d, expected %0d", rel_estimate, exp_rt));

    // free candidate 1 and relocate by functionality
    @(negedge clk);
    st_wr_en = 1; st_val = 0; st_row = 10; st_col = 21;
    @(negedge clk);
    st_wr_en = 0;
    fills_expected = missing(0) + missing(1) + missing(2);
    request(4'b0111, DEADLINE, 0, code);
    check(code == RES_FBR_DONE, $sformatf("FBR relocation, code %0d", code));
    if (code == RES_FBR_DONE) n_fbr++;
    check(tpl_loc == 3'd1 && tpl_row == 5'd8 && tpl_col == 6'd20, "template location");
    check(relocated_mask == 4'b0111, "relocated mask");
    check(rel_cycles <= DEADLINE, "relocation within its deadline");
    check(rel_cfg_cycles >= T_CFG, "template configuration time");
    check(n_copy == 768, $sformatf("copied %0d words", n_copy));
    $display("relocation: total %0d cycles (estimate %0d): fill %0d, configure %0d, copy %0d",
             rel_cycles, rel_estimate, rel_fill_cycles, rel_cfg_cycles, rel_copy_cycles);
    for (int t = 0; t < 3; t++) for (int i = 0; i < 256; i++) saved[t][i] = 1;
    check(n_fill == fills_expected, $sformatf("computed %0d missing outputs, expected %0d",
                                              n_fill, fills_expected));
    // the area is now used: a second scan of the same area must fail
    request(4'b0111, DEADLINE, 0, code);
    check(code == RES_NO_AREA, "area committed");

    // ---- the template serves every input of the three circuits ----
    for (int t = 0; t < 3; t++)
      for (int i = 0; i < 256; i++) user_op(t, 8'(i), 1);
    // circuit 3 still runs on the original logic
    user_op(3, 8'h5a, 0);

    // ---- reconfiguration of circuit 0 with a new latency ----
    @(negedge clk);
    dpr_swap = 1; swap_task = 0; swap_lat = 20;
    @(negedge clk);
    dpr_swap = 0;
    lat_exp[0] = 20;
    refresh(0);
    check(relocated_mask == 4'b0110, "circuit 0 back on the original logic");
    user_op(0, 8'd77, 0);   // miss, re-measures e
    exp_rt = T_CFG + 255 * 20 + MT_TASK;
    request(4'b0001, 10, 0, code);
    check(code == RES_TOO_SLOW, "duration check after DPR");
    check(rel_estimate == exp_rt, $sformatf("R_t after DPR %0d, expected %0d", rel_estimate, exp_rt));
    if (rel_estimate == exp_rt) n_remeasure++;
    user_op(0, 8'd77, 0);   // hit

    // ---- every mechanism must have happened ----
    check(n_hit > 0, "no memo hit");
    check(n_save > 0, "no SAVE");
    check(n_fill > 0, "no missing output computed");
    check(n_dbr > 0, "no direct bitstream relocation");
    check(n_not_memo > 0, "no FBR decline");
    check(n_too_slow > 0, "no duration decline");
    check(n_no_area > 0, "no area decline");
    check(n_fbr > 0, "no functionality relocation");
    check(n_tpl > 0, "no template service");
    check(n_refresh > 0, "no refresh");
    check(n_remeasure > 0, "no re-measurement of e");
    check(n_backpressure > 0, "no copy back-pressure");
    $display("mechanisms: hit %0d save %0d fill %0d dbr %0d not_memo %0d too_slow %0d no_area %0d fbr %0d template %0d refresh %0d remeasure %0d backpressure %0d",
             n_hit, n_save, n_fill, n_dbr, n_not_memo, n_too_slow, n_no_area, n_fbr, n_tpl,
             n_refresh, n_remeasure, n_backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
