// memo_logic_tb: memo logic with an output memory and the behavioural
// case-study circuits.  The testbench plays the task memory.
//   task 0: base 0,   8 offset bits, no tolerance
//   task 1: base 256, 6 offset bits, tolerance 2 (inputs differing only in
//           their 2 LSBs share one word)
//   task 2: not relocatable, must never be checked
// Checks: REFRESH length and missing counts; CHECK result 3 cycles after
// start, hit flag and memorized data against a model of the memory; SAVE
// completes 2 cycles after the circuit's done; FILL computes exactly the
// missing outputs of a section, in about sum(e) cycles; COPY streams every word in offset order
// under random back-pressure.
module memo_logic_tb;
  import reloc_pkg::*;
  import cordic_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  memo_mode_t        mode = MODE_MEMO;
  logic              start = 0;
  logic [TASK_W-1:0] task_id = 0, missing_task = 0;
  task_entry_t       entry;
  logic [IN_W-1:0]   data_in = 0;
  logic              busy, chk_done, hit, save_done, fill_start, copy_valid, sweep_done;
  logic              copy_ready = 0;
  logic [OUT_W-1:0]  out_data;
  logic [IN_W-1:0]   fill_data;
  copy_word_t        copy_word;
  logic [IN_W:0]     missing_cnt;
  logic              om_we;
  logic [OM_AW-1:0]  om_waddr, om_raddr;
  logic [OM_DW-1:0]  om_wdata, om_rdata;
  logic              app_start, app_done, app_busy;
  logic [7:0]        app_dout;
  logic              user_start = 0;

  task_entry_t tm [4];
  assign entry = tm[task_id];

  memo_logic dut (.*);
  output_memory u_mem (.clk, .we(om_we), .waddr(om_waddr), .wdata(om_wdata),
                       .raddr(om_raddr), .rdata(om_rdata));

  assign app_start = user_start || fill_start;
  cordic_app_model app (.clk, .rst_n, .start(app_start), .task_id(task_id),
                        .din(fill_start ? fill_data : data_in), .done(app_done),
                        .dout(app_dout), .busy(app_busy), .dpr_swap(1'b0),
                        .swap_task(2'd0), .swap_lat(0));

  // model of the memorized words per task and key
  bit         valid_m [4][256];
  logic [7:0] data_m  [4][256];
  int n_fill = 0, n_bp = 0;

  always @(posedge clk) begin
    if (fill_start) n_fill++;
    if (copy_valid && !copy_ready) n_bp++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  function automatic int key(input int t, input logic [7:0] d);
    return int'(d) >> tm[t].tol;
  endfunction

  task automatic sweep(input memo_mode_t m, input int t);
    @(negedge clk);
    mode = m; task_id = 2'(t); start = 1;
    @(negedge clk);
    start = 0;
    while (!sweep_done) @(negedge clk);
    mode = MODE_MEMO;
  endtask

  task automatic memo_op(input int t, input logic [7:0] d);
    longint unsigned t0;
    bit got_chk = 0, was_hit = 0;
    int k;
    k = key(t, d);
    @(negedge clk);
    while (busy || app_busy) @(negedge clk);
    task_id = 2'(t); data_in = d; start = 1; user_start = 1;
    @(posedge clk);
    t0 = cyc;
    @(negedge clk);
    start = 0; user_start = 0;
    forever begin
      @(posedge clk); #1;
      if (chk_done) begin
        got_chk = 1; was_hit = hit;
        check(cyc - t0 == 3, "CHECK takes 3 cycles");
        check(hit == valid_m[t][k], $sformatf("hit task %0d key %0d", t, k));
        if (hit) check(out_data == data_m[t][k], "memorized data");
      end
      if (app_done) break;
    end
    check(got_chk == (t != 2), "CHECK only on relocatable tasks");
    if (got_chk && !was_hit) begin
      data_m[t][k] = app_dout;
      valid_m[t][k] = 1;
      @(posedge clk); #1;
      check(!save_done, "SAVE too early");
      @(posedge clk); #1;
      check(save_done, "SAVE takes 2 cycles");
    end
  endtask

  function automatic int n_missing(input int t);
    int n = 0;
    for (int i = 0; i < (1 << tm[t].off_bits); i++) if (!valid_m[t][i]) n++;
    return n;
  endfunction

  initial begin
    longint unsigned t0;
    tm[0] = '{relocatable: 1, base: 11'd0,   off_bits: 4'd8, tol: 4'd0};
    tm[1] = '{relocatable: 1, base: 11'd256, off_bits: 4'd6, tol: 4'd2};
    tm[2] = '{relocatable: 0, base: 11'd512, off_bits: 4'd8, tol: 4'd0};
    tm[3] = '{relocatable: 0, base: 11'd768, off_bits: 4'd8, tol: 4'd0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    // refresh
    t0 = cyc;
    sweep(MODE_REFRESH, 0);
    check(cyc - t0 >= 256 && cyc - t0 < 262, $sformatf("refresh of 256 words took %0d", cyc - t0));
    sweep(MODE_REFRESH, 1);
    missing_task = 0; #1 check(missing_cnt == 256, "missing count task 0 after refresh");
    missing_task = 1; #1 check(missing_cnt == 64, "missing count task 1 after refresh");
    // memorize
    for (int n = 0; n < 300; n++) begin
      int t;
      t = $urandom_range(0, 2);
      memo_op(t, 8'($urandom_range(0, 255)));
    end
    for (int t = 0; t < 2; t++) begin
      missing_task = 2'(t);
      #1 check(missing_cnt == (IN_W + 1)'(n_missing(t)), $sformatf("missing count task %0d", t));
    end
    // fill task 0 and task 1
    for (int t = 0; t < 2; t++) begin
      int n_before;
      longint unsigned f0, bound;
      n_before = n_fill;
      // the scan hides behind the computations: at most sum(e) over the
      // missing words plus one cycle per word of the section, plus a few
      bound = longint'(n_missing(t)) * latency(t) + (1 << tm[t].off_bits) + 8;
      f0 = cyc;
      sweep(MODE_FILL, t);
      check(n_fill - n_before == n_missing(t), $sformatf("fill of task %0d computed %0d", t, n_fill - n_before));
      check(cyc - f0 >= longint'(n_missing(t)) * latency(t) && cyc - f0 <= bound,
            $sformatf("fill of task %0d took %0d cycles, bound %0d", t, cyc - f0, bound));
      for (int i = 0; i < (1 << tm[t].off_bits); i++)
        if (!valid_m[t][i]) begin
          valid_m[t][i] = 1;
          data_m[t][i] = compute(32'(t), 8'(i << tm[t].tol));
        end
      missing_task = 2'(t);
      #1 check(missing_cnt == 0, "nothing missing after fill");
    end
    // copy task 0 and 1 with back-pressure
    for (int t = 0; t < 2; t++) begin
      int idx;
      idx = 0;
      @(negedge clk);
      mode = MODE_COPY; task_id = 2'(t); start = 1;
      @(negedge clk);
      start = 0;
      while (!sweep_done) begin
        copy_ready = ($urandom_range(0, 2) == 0);
        #1;
        if (copy_valid && copy_ready) begin
          check(copy_word.offset == 8'(idx) && copy_word.task_id == 2'(t), "copy order");
          check(copy_word.data == data_m[t][idx], $sformatf("copy data task %0d off %0d", t, idx));
          idx++;
        end
        @(negedge clk);
      end
      copy_ready = 0;
      check(idx == (1 << tm[t].off_bits), $sformatf("copied %0d words", idx));
      mode = MODE_MEMO;
    end
    check(n_bp > 0, "back-pressure seen");
    // all hits now
    for (int n = 0; n < 20; n++) memo_op(n % 2, 8'($urandom_range(0, 255)));
    // refresh invalidates
    sweep(MODE_REFRESH, 0);
    for (int i = 0; i < 256; i++) valid_m[0][i] = 0;
    memo_op(0, 8'd33);
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
