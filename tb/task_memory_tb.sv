// task_memory_tb: writes random entries into the task memory and reads them
// back through the read port and the relocatable-flag vector; checks that
// reset clears the relocatable flags and that a write is visible one cycle
// later.
module task_memory_tb;
  import reloc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                 wr_en = 0;
  logic [TASK_W-1:0]    wr_id = 0, rd_id = 0;
  task_entry_t          wr_entry = '0, rd_entry;
  logic [NUM_TASKS-1:0] reloc_mask;
  task_entry_t          model [NUM_TASKS];

  task_memory dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(reloc_mask == '0, "reset clears relocatable flags");
    for (int i = 0; i < NUM_TASKS; i++) model[i] = '0;
    for (int n = 0; n < 200; n++) begin
      task_entry_t e;
      e = task_entry_t'($urandom);
      wr_en = 1; wr_id = TASK_W'($urandom); wr_entry = e;
      rd_id = wr_id;
      #1 check(rd_entry == model[wr_id], "write visible too early");
      @(negedge clk);
      model[wr_id] = e;
      wr_en = 0;
      for (int i = 0; i < NUM_TASKS; i++) begin
        rd_id = TASK_W'(i);
        #1 check(rd_entry == model[i], $sformatf("entry %0d", i));
        check(reloc_mask[i] == model[i].relocatable, "relocatable flag");
      end
      @(negedge clk);
    end
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    check(reloc_mask == '0, "reset clears again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
