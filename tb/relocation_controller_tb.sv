// relocation_controller_tb: the controller against scripted responders for
// the memorizer, duration evaluator, area finder and configuration
// controller.  Every command the controller issues is logged, and each
// request's log is compared with the step order of the relocation flow:
// DBR success, FBR failure (non-memorized circuit, empty mask), duration
// failure, area failure, a full functionality-based relocation of two
// circuits (fill each, configure, copy each with its latency written to the
// template, commit), and a refresh.  Also checked: result codes, the
// relocated mask, the total cycle count, and that no sweep starts while the
// memorizer is busy.  Then 80 random requests (random circuit set,
// relocatable flags, DBR verdict, duration and area answers, and e values
// that must saturate in the delay table) with random refreshes in between,
// each compared with the flow worked out by a reference function.
module relocation_controller_tb;
  import reloc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic                 req_valid = 0, req_dbr_ok = 0, ref_valid = 0;
  logic [NUM_TASKS-1:0] req_mask = 0, relocated_mask, dur_mask;
  logic [NUM_TASKS-1:0] reloc_mask = 4'b0111;
  logic [31:0]          req_deadline = 0, res_cycles, fill_cycles, cfg_cycles, copy_cycles, dur_deadline;
  logic                 idle, res_valid;
  reloc_result_t        res_code;
  logic [TASK_W-1:0]    ref_task = 0, mem_task, e_rd_task;
  logic                 bs_cfg_start, bs_cfg_done = 0;
  logic                 mem_start, mem_sweeping, mem_busy = 0, mem_sweep_done = 0;
  memo_mode_t           mem_mode;
  logic                 dur_req, dur_valid = 0, dur_ok = 0;
  logic [15:0]          e_rd;
  logic                 af_scan, af_done = 0, af_found = 0, af_commit, af_commit_done = 0;
  logic                 tpl_cfg_start, tpl_cfg_done = 0, tpl_lat_wr_en;
  logic [TASK_W-1:0]    tpl_lat_task;
  logic [7:0]           tpl_lat_val;

  relocation_controller dut (.*);

  bit e_big = 0;   // e wider than the template's delay table
  assign e_rd = e_big ? 16'(300 + e_rd_task) : 16'(10 + e_rd_task);

  // responder behaviour
  bit dur_answer = 1, af_answer = 1;
  string log_q [$];
  int busy_violations = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (bs_cfg_start) log_q.push_back("bs");
      if (dur_req) begin
        log_q.push_back("dur");
        if (dur_mask != req_mask || dur_deadline != req_deadline) log_q.push_back("dur-args");
      end
      if (af_scan) log_q.push_back("scan");
      if (af_commit) log_q.push_back("commit");
      if (tpl_cfg_start) log_q.push_back("cfg");
      if (mem_start) begin
        log_q.push_back($sformatf("%s%0d", mem_mode.name(), mem_task));
        if (mem_busy) busy_violations++;
      end
      if (tpl_lat_wr_en) log_q.push_back($sformatf("lat%0d=%0d", tpl_lat_task, tpl_lat_val));
    end
  end

  // delayed one-cycle answer
  task automatic pulse_after(input int d, ref logic sig);
    repeat (d) @(negedge clk);
    sig = 1;
    @(negedge clk);
    sig = 0;
  endtask

  initial forever begin
    @(negedge clk);
    if (bs_cfg_start) fork pulse_after(20, bs_cfg_done); join_none
    if (dur_req) begin
      fork begin
        repeat (4) @(negedge clk);
        dur_ok = dur_answer; dur_valid = 1;
        @(negedge clk);
        dur_valid = 0;
      end join_none
    end
    if (af_scan) begin
      fork begin
        repeat (7) @(negedge clk);
        af_found = af_answer; af_done = 1;
        @(negedge clk);
        af_done = 0;
      end join_none
    end
    if (af_commit) fork pulse_after(3, af_commit_done); join_none
    if (tpl_cfg_start) fork pulse_after(50, tpl_cfg_done); join_none
    if (mem_start) begin
      fork begin
        @(posedge clk);
        #1 mem_busy = 1;
        repeat (30) @(negedge clk);
        mem_busy = 0;
        mem_sweep_done = 1;
        @(negedge clk);
        mem_sweep_done = 0;
      end join_none
    end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  task automatic request(input logic [3:0] mask, input bit dbr, input reloc_result_t want,
                         input string steps);
    string got;
    longint unsigned t0;
    log_q.delete();
    @(negedge clk);
    while (!idle) @(negedge clk);
    req_valid = 1; req_mask = mask; req_dbr_ok = dbr; req_deadline = 32'(1000 + mask);
    @(posedge clk);
    t0 = cyc;
    @(negedge clk);
    req_valid = 0;
    while (!res_valid) @(negedge clk);
    check(res_code == want, $sformatf("result %s, expected %s", res_code.name(), want.name()));
    check(res_cycles == 32'(cyc - t0), $sformatf("cycle count %0d vs %0d", res_cycles, cyc - t0));
    got = "";
    foreach (log_q[i]) got = {got, (i == 0) ? "" : " ", log_q[i]};
    check(got == steps, $sformatf("steps '%s', expected '%s'", got, steps));
  endtask

  // expected log of a request, worked out from the flow
  function automatic string expected_steps(input logic [3:0] mask, input logic [3:0] rmask,
                                           input bit dbr, input bit dok, input bit aok,
                                           output reloc_result_t code);
    string st;
    int    e;
    if (dbr) begin code = RES_DBR_DONE; return "bs"; end
    if (mask == 0 || (mask & ~rmask) != 0) begin code = RES_NOT_MEMO; return ""; end
    if (!dok) begin code = RES_TOO_SLOW; return "dur"; end
    if (!aok) begin code = RES_NO_AREA; return "dur scan"; end
    st = "dur scan";
    for (int t = 0; t < 4; t++) if (mask[t]) st = {st, $sformatf(" MODE_FILL%0d", t)};
    st = {st, " cfg"};
    for (int t = 0; t < 4; t++)
      if (mask[t]) begin
        e = e_big ? 255 : 10 + t;
        st = {st, $sformatf(" MODE_COPY%0d lat%0d=%0d", t, t, e)};
      end
    code = RES_FBR_DONE;
    return {st, " commit"};
  endfunction

  task automatic refresh(input int t);
    log_q.delete();
    @(negedge clk);
    while (!idle) @(negedge clk);
    ref_valid = 1; ref_task = 2'(t);
    @(negedge clk);
    ref_valid = 0;
    @(negedge clk);
    while (!idle) @(negedge clk);
    check(log_q.size() == 1 && log_q[0] == $sformatf("MODE_REFRESH%0d", t), "random refresh step");
  endtask

  initial begin
    string got;
    repeat (2) @(negedge clk);
    rst_n = 1;
    request(4'b0011, 1, RES_DBR_DONE, "bs");
    check(relocated_mask == 0, "DBR does not mark relocated");
    request(4'b1001, 0, RES_NOT_MEMO, "");
    request(4'b0000, 0, RES_NOT_MEMO, "");
    dur_answer = 0;
    request(4'b0011, 0, RES_TOO_SLOW, "dur");
    dur_answer = 1; af_answer = 0;
    request(4'b0011, 0, RES_NO_AREA, "dur scan");
    af_answer = 1;
    request(4'b0101, 0, RES_FBR_DONE,
            "dur scan MODE_FILL0 MODE_FILL2 cfg MODE_COPY0 lat0=10 MODE_COPY2 lat2=12 commit");
    check(relocated_mask == 4'b0101, "relocated mask");
    check(fill_cycles >= 60 && cfg_cycles >= 50 && copy_cycles >= 60, "phase cycle counts");
    // refresh of circuit 2
    log_q.delete();
    @(negedge clk);
    ref_valid = 1; ref_task = 2;
    @(negedge clk);
    ref_valid = 0;
    @(negedge clk);
    while (!idle) @(negedge clk);
    got = (log_q.size() == 1) ? log_q[0] : "?";
    check(got == "MODE_REFRESH2", {"refresh step ", got});
    check(relocated_mask == 4'b0001, "refresh clears the relocated bit");

    // random requests against the reference flow
    for (int n = 0; n < 80; n++) begin
      logic [3:0]    mask, exp_rel;
      bit            dbr;
      reloc_result_t want;
      string         steps;
      mask        = 4'($urandom_range(0, 15));
      reloc_mask  = 4'($urandom_range(0, 15));
      dbr         = ($urandom_range(0, 5) == 0);
      dur_answer  = ($urandom_range(0, 3) != 0);
      af_answer   = ($urandom_range(0, 3) != 0);
      e_big       = ($urandom_range(0, 3) == 0);
      steps       = expected_steps(mask, reloc_mask, dbr, dur_answer, af_answer, want);
      exp_rel     = relocated_mask | ((want == RES_FBR_DONE) ? mask : 4'b0);
      request(mask, dbr, want, steps);
      check(relocated_mask == exp_rel, "relocated mask after a random request");
      if ($urandom_range(0, 3) == 0) begin
        int t;
        t = $urandom_range(0, 3);
        exp_rel = relocated_mask;
        exp_rel[t] = 1'b0;
        refresh(t);
        check(relocated_mask == exp_rel, "relocated mask after a random refresh");
      end
    end
    check(busy_violations == 0, "no sweep started while busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
