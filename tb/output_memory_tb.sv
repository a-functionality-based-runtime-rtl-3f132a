// output_memory_tb: fills the 2048 x 9 output memory with a pattern, reads
// every word back one cycle after its address, and checks read-first
// behaviour when a word is written and read in the same cycle.
module output_memory_tb;
  import reloc_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic             we = 0;
  logic [OM_AW-1:0] waddr = 0, raddr = 0;
  logic [OM_DW-1:0] wdata = 0, rdata;

  output_memory dut (.*);

  function automatic logic [OM_DW-1:0] pat(input int a, input int k);
    return OM_DW'(a * 37 + k * 101 + (a >> 3));
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    @(negedge clk);
    for (int a = 0; a < 2 ** OM_AW; a++) begin
      we = 1; waddr = OM_AW'(a); wdata = pat(a, 0);
      @(negedge clk);
    end
    we = 0;
    for (int a = 0; a < 2 ** OM_AW; a++) begin
      raddr = OM_AW'(a);
      @(negedge clk);
      check(rdata == pat(a, 0), $sformatf("word %0d", a));
    end
    // read-first: old value comes out, new value next time
    for (int a = 0; a < 64; a++) begin
      raddr = OM_AW'(a * 31); waddr = raddr; we = 1; wdata = pat(a * 31, 1);
      @(negedge clk);
      we = 0;
      check(rdata == pat(a * 31, 0), "read-first");
      @(negedge clk);
      check(rdata == pat(a * 31, 1), "new value");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
