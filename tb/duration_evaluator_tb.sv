// duration_evaluator_tb: programs random e, Mt and global times, presents
// random missing counts and request masks, and checks R_t, the accept
// decision against deadlines just below, at and above R_t, and the result
// latency.  Then checks that e is re-measured after a reconfiguration event
// and only then.
module duration_evaluator_tb;
  import reloc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic                 wr_en = 0, glob_wr_en = 0, req_valid = 0;
  logic [TASK_W-1:0]    wr_task = 0, dpr_task = 0, meas_task = 0, e_rd_task = 0;
  logic [15:0]          wr_e = 0, wr_mt = 0, e_rd;
  logic [31:0]          glob_t_cfg = 0, glob_t_area = 0, req_deadline = 0, res_time;
  logic [NUM_TASKS-1:0] req_mask = 0;
  logic                 res_busy, res_valid, res_ok;
  logic [TASK_W-1:0]    missing_task;
  logic [IN_W:0]        missing_cnt;
  logic                 dpr_event = 0, meas_start = 0, meas_done = 0;

  int unsigned e_m [4], mt_m [4], n_m [4];
  int unsigned cfg_m, area_m;

  // the memorizer's missing count, for the task the evaluator asks about
  always @(negedge clk) missing_cnt = (IN_W + 1)'(n_m[missing_task]);

  duration_evaluator dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  task automatic evaluate(input logic [3:0] mask, input int unsigned dl,
                          output bit ok, output int unsigned rt);
    longint unsigned t0;
    @(negedge clk);
    req_valid = 1; req_mask = mask; req_deadline = dl;
    @(posedge clk);
    t0 = cyc;
    @(negedge clk);
    req_valid = 0;
    do begin @(posedge clk); #1; end while (!res_valid);
    check(cyc - t0 <= NUM_TASKS + 2, "result latency");
    ok = res_ok; rt = res_time;
    @(negedge clk);
  endtask

  task automatic measure(input int t, input int lat);
    @(negedge clk);
    meas_start = 1; meas_task = 2'(t);
    @(negedge clk);
    meas_start = 0;
    repeat (lat - 1) @(negedge clk);
    meas_done = 1;
    @(negedge clk);
    meas_done = 0;
  endtask

  initial begin
    bit ok;
    int unsigned rt, want;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 40; r++) begin
      for (int t = 0; t < 4; t++) begin
        e_m[t] = $urandom_range(1, 200); mt_m[t] = $urandom_range(0, 5000);
        n_m[t] = $urandom_range(0, 256);
        wr_en = 1; wr_task = 2'(t); wr_e = 16'(e_m[t]); wr_mt = 16'(mt_m[t]);
        @(negedge clk);
      end
      wr_en = 0;
      cfg_m = $urandom_range(0, 20000); area_m = $urandom_range(0, 20000);
      glob_wr_en = 1; glob_t_cfg = cfg_m; glob_t_area = area_m;
      @(negedge clk);
      glob_wr_en = 0;
      for (int k = 0; k < 4; k++) begin
        logic [3:0] mask;
        mask = 4'($urandom_range(0, 15));
        want = (cfg_m > area_m) ? cfg_m : area_m;
        for (int t = 0; t < 4; t++) if (mask[t]) want += n_m[t] * e_m[t] + mt_m[t];
        evaluate(mask, want, ok, rt);
        check(rt == want, $sformatf("R_t %0d want %0d", rt, want));
        check(ok, "deadline equal to R_t accepted");
        evaluate(mask, want - 1, ok, rt);
        check(!ok, "deadline below R_t declined");
        evaluate(mask, want + 1000, ok, rt);
        check(ok, "deadline above R_t accepted");
      end
    end
    // re-measurement of e
    e_rd_task = 2;
    #1 want = e_rd;
    measure(2, 77);
    e_rd_task = 2;
    #1 check(e_rd == 16'(want), "e unchanged without reconfiguration");
    @(negedge clk);
    dpr_event = 1; dpr_task = 2;
    @(negedge clk);
    dpr_event = 0;
    measure(1, 33);
    #1 check(e_rd == 16'(want), "other task does not update");
    measure(2, 77);
    #1 check(e_rd == 16'd77, $sformatf("e re-measured as %0d", e_rd));
    measure(2, 90);
    #1 check(e_rd == 16'd77, "measured only once per event");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
