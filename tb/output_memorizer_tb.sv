// output_memorizer_tb: the memorizer (task memory, memo logic, output
// memory) beside the behavioural case-study circuits.  The host writes the
// task memory; the testbench checks the Task Base Address, CHECK and SAVE
// timing and results through the whole unit, the missing counts, a FILL
// sweep and a COPY sweep of one circuit.
module output_memorizer_tb;
  import reloc_pkg::*;
  import cordic_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic                 tm_wr_en = 0;
  logic [TASK_W-1:0]    tm_wr_id = 0, task_id = 0, missing_task = 0;
  task_entry_t          tm_wr_entry = '0, task_entry;
  memo_mode_t           mode = MODE_MEMO;
  logic                 start = 0, user_start = 0, copy_ready = 1;
  logic [IN_W-1:0]      data_in = 0, fill_data;
  logic                 busy, chk_done, hit, save_done, fill_start, copy_valid, sweep_done;
  logic [NUM_TASKS-1:0] reloc_mask;
  logic [OUT_W-1:0]     out_data;
  copy_word_t           copy_word;
  logic [IN_W:0]        missing_cnt;
  logic                 app_start, app_done, app_busy;
  logic [7:0]           app_dout;

  output_memorizer dut (.*);
  assign app_start = user_start || fill_start;
  cordic_app_model app (.clk, .rst_n, .start(app_start), .task_id(task_id),
                        .din(fill_start ? fill_data : data_in), .done(app_done),
                        .dout(app_dout), .busy(app_busy), .dpr_swap(1'b0),
                        .swap_task(2'd0), .swap_lat(0));

  bit saved [4][256];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  task automatic sweep(input memo_mode_t m, input int t);
    @(negedge clk);
    mode = m; task_id = 2'(t); start = 1;
    @(negedge clk);
    start = 0;
    while (!sweep_done) begin
      #1;
      if (copy_valid) begin
        check(copy_word.data == compute(32'(t), copy_word.offset), "copy data");
      end
      @(negedge clk);
    end
    mode = MODE_MEMO;
  endtask

  task automatic op(input int t, input logic [7:0] d);
    longint unsigned t0;
    bit h = 0;
    @(negedge clk);
    while (busy || app_busy) @(negedge clk);
    task_id = 2'(t); data_in = d; start = 1; user_start = 1;
    @(posedge clk);
    t0 = cyc;
    @(negedge clk);
    start = 0; user_start = 0;
    do begin
      @(posedge clk); #1;
      if (chk_done) begin
        h = hit;
        check(cyc - t0 == 3, "CHECK 3 cycles");
        check(hit == saved[t][d], "hit");
        if (hit) check(out_data == compute(32'(t), d), "memorized value");
      end
    end while (!app_done);
    check(cyc - t0 == longint'(latency(t)), "circuit latency");
    if (!h) begin
      saved[t][d] = 1;
      @(posedge clk); #1;
      @(posedge clk); #1;
      check(save_done, "SAVE 2 cycles");
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      tm_wr_en = 1; tm_wr_id = 2'(t);
      tm_wr_entry = '{relocatable: 1'b1, base: 11'(t * 256 + 64), off_bits: 4'd8, tol: 4'd0};
      @(negedge clk);
    end
    tm_wr_en = 0;
    for (int t = 0; t < 4; t++) begin
      task_id = 2'(t);
      #1 check(t == 3 ? !task_entry.relocatable : task_entry.base == 11'(t * 256 + 64), "Task Base Address");
    end
    check(reloc_mask == 4'b0111, "relocatable mask");
    for (int t = 0; t < 3; t++) sweep(MODE_REFRESH, t);
    for (int n = 0; n < 120; n++) op($urandom_range(0, 2), 8'($urandom_range(0, 40)));
    for (int t = 0; t < 3; t++) begin
      int m;
      m = 0;
      for (int i = 0; i < 256; i++) if (!saved[t][i]) m++;
      missing_task = 2'(t);
      #1 check(missing_cnt == (IN_W + 1)'(m), "missing count");
    end
    sweep(MODE_FILL, 1);
    missing_task = 1;
    #1 check(missing_cnt == 0, "filled");
    for (int i = 0; i < 256; i++) saved[1][i] = 1;
    sweep(MODE_COPY, 1);
    for (int n = 0; n < 10; n++) op(1, 8'($urandom_range(0, 255)));
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
