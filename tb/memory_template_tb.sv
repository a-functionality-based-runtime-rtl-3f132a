// memory_template_tb: fills the template with the case-study results, sets
// the latencies of the replaced circuits (15, 19, 56 cycles, and 1 for the
// fourth slot, below the template's own 2-cycle read), then sends every
// input and checks the data and that done comes exactly at the programmed
// latency (never earlier than 2 cycles).  A start while busy must be ignored.
module memory_template_tb;
  import reloc_pkg::*;
  import cordic_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic              wr_en = 0, lat_wr_en = 0, start = 0;
  logic [9:0]        wr_addr = 0;
  logic [7:0]        wr_data = 0, lat_val = 0;
  logic [TASK_W-1:0] lat_task = 0, task_id = 0;
  logic [IN_W-1:0]   offset = 0;
  logic              busy, done;
  logic [7:0]        data_out;
  int unsigned       lat [4] = '{15, 19, 56, 1};

  memory_template dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      lat_wr_en = 1; lat_task = 2'(t); lat_val = 8'(lat[t]);
      for (int i = 0; i < 256; i++) begin
        wr_en = 1; wr_addr = {2'(t), 8'(i)}; wr_data = compute(32'(t), 8'(i));
        @(negedge clk);
        lat_wr_en = 0;
      end
    end
    wr_en = 0;
    for (int t = 0; t < 4; t++) begin
      for (int i = 0; i < 256; i += ((t == 2) ? 5 : 1)) begin
        longint unsigned t0;
        int unsigned want;
        want = (lat[t] < 2) ? 2 : lat[t];
        start = 1; task_id = 2'(t); offset = 8'(i);
        @(posedge clk);
        t0 = cyc;
        @(negedge clk);
        if (want > 3) begin
          // a second start while busy is ignored
          offset = 8'(i + 1);
          @(negedge clk);
        end
        start = 0;
        for (int k = 0; k < 100; k++) begin
          @(posedge clk); #1;
          if (done) break;
        end
        check(done, $sformatf("task %0d in %0d: done within 100 cycles", t, i));
        check(cyc - t0 == longint'(want), $sformatf("task %0d latency %0d", t, cyc - t0));
        check(data_out == compute(32'(t), 8'(i)), $sformatf("task %0d in %0d data", t, i));
        @(posedge clk); #1;
        check(!done && data_out == compute(32'(t), 8'(i)), "done one cycle, data held");
        @(negedge clk);
      end
    end
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
